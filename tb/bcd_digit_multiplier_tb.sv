// bcd_digit_multiplier_tb: exhaustive self-checking test of the BCD digit
// multiplier.
//
// Applies all 100 valid digit pairs and compares p with the two BCD digits of
// a * b worked out here with integer arithmetic, then replays the reference
// rows 6 * 8 = 48 and 9 * 9 = 81. Over all 256 input codes, valid or not, it
// also checks the two narrow output functions the design relies on:
// p[0] = a0 & b0 and p[7] = a3 & a0 & b3 & b0. The unit is combinational; each
// result is sampled one time step after its inputs change. A watchdog ends
// the run with a failure if the test does not finish in time.
module bcd_digit_multiplier_tb;
  import bcd_pkg::*;

  bcd_digit_t a, b;
  bcd_pair_t  p;
  int         checks = 0;
  int         failures = 0;

  bcd_digit_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    int prod;
    for (int ai = 0; ai < 10; ai++)
      for (int bi = 0; bi < 10; bi++) begin
        a = 4'(ai);
        b = 4'(bi);
        #1;
        prod = ai * bi;
        checks++;
        if (p.tens !== 4'(prod / 10) || p.units !== 4'(prod % 10)) begin
          failures++;
          $display("FAIL %0d * %0d: got %0d%0d, want %0d", ai, bi, p.tens, p.units, prod);
        end
      end
    a = 4'b0110; b = 4'b1000; #1;
    checks++;
    if (p !== 8'b0100_1000) begin failures++; $display("FAIL table row 6*8"); end
    a = 4'b1001; b = 4'b1001; #1;
    checks++;
    if (p !== 8'b1000_0001) begin failures++; $display("FAIL table row 9*9"); end
    for (int code = 0; code < 256; code++) begin
      {a, b} = 8'(code);
      #1;
      checks++;
      if (p[0] !== (a[0] & b[0]) || p[7] !== (a[3] & a[0] & b[3] & b[0])) begin
        failures++;
        $display("FAIL narrow outputs for a=%0d b=%0d: p0=%0d p7=%0d", a, b, p[0], p[7]);
      end
    end
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
