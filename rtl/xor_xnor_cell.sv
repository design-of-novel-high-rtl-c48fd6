// xor_xnor_cell: two-input cell that delivers both a XOR b and a XNOR b.
//
// The compressor needs every exclusive-OR in both polarities, because each
// result steers a pair of transmission gates: one gate of the pair is opened
// by the true value and the other by its complement. The transistor-level cell
// this models forms the XOR node from a few pass transistors and then buffers
// it through a restoring inverter, which yields the XNOR. Here the same two
// functions are written at gate level: y_xor = a ^ b, and y_xnor is the
// inverse of y_xor, taken from the XOR node as in the circuit.
//
// Interface: inputs a, b; outputs y_xor, y_xnor. Purely combinational, no
// clock and no state; the outputs settle one gate delay after the inputs.
// The two-output XOR/XNOR cell follows the design; expressing it at gate
// level rather than with switch-level transistors is this model's choice.
module xor_xnor_cell (
  input  logic a,
  input  logic b,
  output logic y_xor,
  output logic y_xnor
);

  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    y_xor  = a ^ b;
    y_xnor = ~y_xor;
  end

endmodule
