// bcd_adder_two_level_tb: exhaustive self-checking test of bcd_adder_two_level.
//
// Applies all 200 valid operand combinations (a, b in 0..9, cin in 0..1) and
// compares {cout, s} with the decimal sum a + b + cin worked out here with
// integer arithmetic. It then replays the rows of the adder's reference
// truth table (6 + 8 + 0 = 14, 9 + 9 + 1 = 19). The unit is combinational, so
// each result is sampled one time step after its inputs change. A watchdog
// ends the run with a failure if the test does not finish in time.
module bcd_adder_two_level_tb;
  import bcd_pkg::*;

  bcd_digit_t a, b, s;
  logic       cin, cout;
  int         checks = 0;
  int         failures = 0;

  bcd_adder_two_level dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check_add(input int ai, input int bi, input int ci);
    int total;
    a   = 4'(ai);
    b   = 4'(bi);
    cin = 1'(ci);
    #1;
    total = ai + bi + ci;
    checks++;
    if (s !== 4'(total % 10) || cout !== (total >= 10)) begin
      failures++;
      $display("FAIL %0d + %0d + %0d: got cout=%0d s=%0d, want cout=%0d s=%0d",
               ai, bi, ci, cout, s, total >= 10, total % 10);
    end
      // The first level passes the upper bits of a[1:0] + b[1:0] + cin.
      checks++;
      if (dut.x !== 2'((32'(a[1:0]) + 32'(b[1:0]) + 32'(cin)) >> 1)) begin
        failures++;
        $display("FAIL level1 x=%0d for a=%0d b=%0d cin=%0d", dut.x, a, b, cin);
      end
  endtask

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int ai = 0; ai < 10; ai++)
        for (int bi = 0; bi < 10; bi++)
          check_add(ai, bi, ci);
    // Reference rows: 0110 + 1000, cin 0 -> 1 0100; 1001 + 1001, cin 1 -> 1 1001.
    a = 4'b0110; b = 4'b1000; cin = 1'b0; #1;
    checks++;
    if ({cout, s} !== 5'b1_0100) begin failures++; $display("FAIL table row 1"); end
    a = 4'b1001; b = 4'b1001; cin = 1'b1; #1;
    checks++;
    if ({cout, s} !== 5'b1_1001) begin failures++; $display("FAIL table row 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
