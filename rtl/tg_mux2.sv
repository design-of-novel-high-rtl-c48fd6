// tg_mux2: 2:1 multiplexer modelled on a transmission-gate pair.
//
// Each data input reaches the output through its own transmission gate. The
// gate on d1 conducts while sel is high, the gate on d0 while sel_n is high,
// so the select is supplied in both polarities, exactly as the XOR/XNOR
// cells of the compressor provide them. Written as logic, the conducting
// gate passes its input onto the shared output node:
//     y = (d1 & sel) | (d0 & sel_n)
// A real transmission-gate pair only works with complementary controls
// (both on means contention, both off a floating node), so an assertion
// flags any settled input where sel_n is not the inverse of sel.
//
// Interface: d0, d1 data, sel / sel_n complementary select, y output.
// Purely combinational. The transmission-gate multiplexer is the design's;
// the AND-OR formulation and the assertion are this model's choices.
module tg_mux2 (
  input  logic d0,
  input  logic d1,
  input  logic sel,
  input  logic sel_n,
  output logic y
);

  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    y = (d1 & sel) | (d0 & sel_n);
  end

  // Checked once the inputs have settled in the current time step.
  always_comb begin
    assert final (sel_n == ~sel)
      else $error("tg_mux2: select controls are not complementary (sel=%b sel_n=%b)", sel, sel_n);
  end

endmodule
