// compressor_4_2: 4:2 compressor built from XOR/XNOR cells and 2:1 multiplexers.
//
// A 4:2 compressor takes four bits of equal weight (x1..x4) plus a carry-in
// from its lower-weight neighbour and returns
//     x1 + x2 + x3 + x4 + cin = sum + 2 * (carry + cout)
// where cout goes to the higher-weight neighbour and does not depend on cin,
// so a row of compressors has no rippling carry chain.
//
// This design reorganises the truth table around two exclusive-ORs:
//   * x1 ^ x3 and x4 ^ cin are each formed once, in both polarities, by an
//     xor_xnor_cell.
//   * M = x1 ^ x2 ^ x3 is picked by a multiplexer: x2 when x1 == x3,
//     otherwise ~x2.
//   * cout = x1 when x1 == x3, otherwise x2 (the majority of x1, x2, x3).
//   * sum = M when x4 == cin, otherwise ~M.
//   * carry = x4 when x4 == cin, otherwise M. This multiplexer passes the
//     inverted candidates (~x4, ~M) and a final inverter restores full-swing
//     polarity, as the transistor-level circuit does.
// Every output is thus one multiplexer (plus, for carry, one inverter) behind
// an XOR/XNOR cell, which is what keeps the critical path short.
//
// Interface: inputs x1, x2, x3, x4, cin; outputs sum, carry, cout, all one
// bit. Purely combinational, no clock or reset.
//
// The equations, the multiplexer selects and data inputs, and the carry
// output inverter follow the design. Modelling the transmission gates and
// inverters as logic operators, not transistors, is this model's choice.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);

  timeunit 1ns;
  timeprecision 1ps;

  logic x13_xor, x13_xnor;    // x1 ^ x3 and its complement
  logic x4c_xor, x4c_xnor;    // x4 ^ cin and its complement
  logic x2_n, x4_n;           // complemented inputs for the multiplexers
  logic m, m_n;               // M = x1 ^ x2 ^ x3 and its complement
  logic carry_n;              // carry before the output inverter

  xor_xnor_cell u_xor13 (
    .a(x1), .b(x3), .y_xor(x13_xor), .y_xnor(x13_xnor)
  );

  xor_xnor_cell u_xor4c (
    .a(x4), .b(cin), .y_xor(x4c_xor), .y_xnor(x4c_xnor)
  );

  always_comb begin
    x2_n = ~x2;
    x4_n = ~x4;
    m_n  = ~m;
    carry = ~carry_n;
  end

  // M: x2 when x1 == x3, ~x2 when they differ.
  tg_mux2 u_mux_m (
    .d0(x2), .d1(x2_n), .sel(x13_xor), .sel_n(x13_xnor), .y(m)
  );

  // cout: x1 when x1 == x3, x2 when they differ.
  tg_mux2 u_mux_cout (
    .d0(x1), .d1(x2), .sel(x13_xor), .sel_n(x13_xnor), .y(cout)
  );

  // sum: M when x4 == cin, ~M when they differ.
  tg_mux2 u_mux_sum (
    .d0(m), .d1(m_n), .sel(x4c_xor), .sel_n(x4c_xnor), .y(sum)
  );

  // carry (inverted): ~x4 when x4 == cin, ~M when they differ.
  tg_mux2 u_mux_carry (
    .d0(x4_n), .d1(m_n), .sel(x4c_xor), .sel_n(x4c_xnor), .y(carry_n)
  );

endmodule
