// tb_xor_xnor_cell: exhaustive self-checking test of the XOR/XNOR cell.
// Applies all four input pairs and compares both outputs with a truth table
// written out by hand (XOR column 0110, XNOR column 1001). A time-based
// watchdog ends the run with a failure if it ever hangs.
module tb_xor_xnor_cell;
  timeunit 1ns;
  timeprecision 1ps;

  logic a, b, y_xor, y_xnor;
  int checks = 0;
  int failures = 0;

  // Expected outputs indexed by {a, b}.
  localparam logic [3:0] XOR_TT  = 4'b0110;
  localparam logic [3:0] XNOR_TT = 4'b1001;

  xor_xnor_cell dut (.a(a), .b(b), .y_xor(y_xor), .y_xnor(y_xnor));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y_xor !== XOR_TT[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y_xor=%b expected %b", a, b, y_xor, XOR_TT[i]);
      end
      checks++;
      if (y_xnor !== XNOR_TT[i]) begin
        failures++;
        $display("FAIL a=%b b=%b y_xnor=%b expected %b", a, b, y_xnor, XNOR_TT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
