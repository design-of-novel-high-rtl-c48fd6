// tb_tg_mux2: exhaustive self-checking test of the 2:1 transmission-gate
// multiplexer model. Drives every combination of d0, d1 and sel, with sel_n
// always the complement of sel (the only legal use of a transmission-gate
// pair), and checks that y equals d1 when sel is high and d0 otherwise.
// A time-based watchdog ends the run with a failure if it ever hangs.
module tb_tg_mux2;
  timeunit 1ns;
  timeprecision 1ps;

  logic d0, d1, sel, sel_n, y;
  logic expected;
  int checks = 0;
  int failures = 0;

  tg_mux2 dut (.d0(d0), .d1(d1), .sel(sel), .sel_n(sel_n), .y(y));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, d1, d0} = 3'(i);
      sel_n = ~sel;
      #1;
      expected = i[2] ? i[1] : i[0];
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL sel=%b d1=%b d0=%b y=%b expected %b", sel, d1, d0, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
