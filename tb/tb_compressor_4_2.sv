// tb_compressor_4_2: end-to-end self-checking test of the 4:2 compressor.
//
// Three parts:
//   1. Worked examples with published results, given as the bit string
//      X1 X2 X3 X4 Cin: 01101 -> Cout=1 Carry=0 Sum=1; 11111 -> all three
//      outputs 1; 01111 -> Sum=0, Cout=1, Carry=1.
//   2. All 32 input combinations, compared with a reference built from
//      integer arithmetic only: cout is 1 when at least two of x1..x3 are 1,
//      s = (x1+x2+x3) mod 2, carry is 1 when at least two of s, x4, cin are
//      1, and sum = (s+x4+cin) mod 2. The compressor identity
//      x1+x2+x3+x4+cin = sum + 2*(carry+cout) and the independence of cout
//      from cin are checked as well.
//   3. 4000 random vectors applied back to back, so that every output sees
//      many transitions from many previous states.
// The design steers its outputs through four multiplexers whose selects are
// x1 ^ x3 and x4 ^ cin. The test counts how often each multiplexer passed
// each of its two data inputs and fails if any of the eight paths never
// happened. The design has no clock; vectors are applied 1 ns apart and a
// time-based watchdog ends the run with a failure if it ever hangs.
module tb_compressor_4_2;
  timeunit 1ns;
  timeprecision 1ps;

  logic x1, x2, x3, x4, cin;
  logic sum, carry, cout;
  int checks = 0;
  int failures = 0;

  // Path counters: [0] select low (x1 == x3 or x4 == cin), [1] select high.
  int m_path[2];      // M = x2 / M = ~x2
  int cout_path[2];   // cout = x1 / cout = x2
  int sum_path[2];    // sum = M / sum = ~M
  int carry_path[2];  // carry = x4 / carry = M

  compressor_4_2 dut (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
    .sum(sum), .carry(carry), .cout(cout)
  );

  task automatic check(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: in(x1..cin)=%b%b%b%b%b got %b expected %b",
               what, x1, x2, x3, x4, cin, got, want);
    end
  endtask

  // Drive one vector given as the bit string X1 X2 X3 X4 Cin.
  task automatic apply(input logic [4:0] v);
    {x1, x2, x3, x4, cin} = v;
    #1;
    m_path[x1 ^ x3]++;
    cout_path[x1 ^ x3]++;
    sum_path[x4 ^ cin]++;
    carry_path[x4 ^ cin]++;
  endtask

  // Compare all outputs with the arithmetic reference.
  task automatic check_reference();
    int upper, s, lower, total;
    upper = int'(x1) + int'(x2) + int'(x3);
    s     = upper % 2;
    lower = s + int'(x4) + int'(cin);
    total = upper + int'(x4) + int'(cin);
    check("cout",  cout,  logic'(upper >= 2));
    check("carry", carry, logic'(lower >= 2));
    check("sum",   sum,   logic'(lower % 2));
    checks++;
    if (total != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
      failures++;
      $display("FAIL identity: in=%b%b%b%b%b total=%0d sum=%b carry=%b cout=%b",
               x1, x2, x3, x4, cin, total, sum, carry, cout);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic cout_c0;
    logic [4:0] v;

    // 1. Worked examples.
    apply(5'b01101);
    check("example 01101 cout",  cout,  1'b1);
    check("example 01101 carry", carry, 1'b0);
    check("example 01101 sum",   sum,   1'b1);
    apply(5'b11111);
    check("example 11111 cout",  cout,  1'b1);
    check("example 11111 carry", carry, 1'b1);
    check("example 11111 sum",   sum,   1'b1);
    apply(5'b01111);
    check("example 01111 cout",  cout,  1'b1);
    check("example 01111 carry", carry, 1'b1);
    check("example 01111 sum",   sum,   1'b0);

    // 2. Exhaustive, in pairs differing only in cin.
    for (int i = 0; i < 16; i++) begin
      apply({4'(i), 1'b0});
      check_reference();
      cout_c0 = cout;
      apply({4'(i), 1'b1});
      check_reference();
      check("cout independent of cin", cout, cout_c0);
    end

    // 3. Random back-to-back vectors.
    for (int n = 0; n < 4000; n++) begin
      v = 5'($urandom_range(0, 31));
      apply(v);
      check_reference();
    end

    // Every multiplexer path must have been exercised.
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (m_path[p] == 0)     begin failures++; $display("FAIL M path %0d never taken", p); end
      checks++;
      if (cout_path[p] == 0)  begin failures++; $display("FAIL cout path %0d never taken", p); end
      checks++;
      if (sum_path[p] == 0)   begin failures++; $display("FAIL sum path %0d never taken", p); end
      checks++;
      if (carry_path[p] == 0) begin failures++; $display("FAIL carry path %0d never taken", p); end
    end
    $display("paths: M=x2 %0d, M=~x2 %0d, cout=x1 %0d, cout=x2 %0d",
             m_path[0], m_path[1], cout_path[0], cout_path[1]);
    $display("paths: sum=M %0d, sum=~M %0d, carry=x4 %0d, carry=M %0d",
             sum_path[0], sum_path[1], carry_path[0], carry_path[1]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
