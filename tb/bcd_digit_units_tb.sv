// bcd_digit_units_tb: end-to-end test of the three BCD digit units.
//
// Drives all three units of the top level at once, each from its own
// operand ports, and checks every result against integer arithmetic done
// here. Both adders receive the same operands so their outputs are also
// compared with each other. The first pass is exhaustive over valid digits
// (200 adder cases, 100 multiplier cases); a second pass uses 2000 random
// valid operands. The test counts how often each mechanism occurs -- a
// carry-in consumed, a decimal carry-out produced (sum >= 10), a sum with no
// carry, a two-digit product, and the 9 * 9 product that sets the tens MSB --
// and counts a failure for any that never occurred. All units are
// combinational; results are sampled one time step after the inputs change.
// The top has no parameters, so this is also the full-size test.
module bcd_digit_units_tb;
  import bcd_pkg::*;

  bcd_digit_t add1_a, add1_b, add1_s, add2_a, add2_b, add2_s, mul_a, mul_b;
  logic       add1_cin, add1_cout, add2_cin, add2_cout;
  bcd_pair_t  mul_p;

  int checks = 0;
  int failures = 0;
  int n_cin = 0, n_carry_out = 0, n_no_carry = 0, n_two_digit = 0, n_p7 = 0;

  bcd_digit_units dut (
    .add1_a, .add1_b, .add1_cin, .add1_s, .add1_cout,
    .add2_a, .add2_b, .add2_cin, .add2_s, .add2_cout,
    .mul_a, .mul_b, .mul_p
  );

  task automatic apply(input int ai, input int bi, input int ci, input int ma, input int mb);
    int total, prod;
    add1_a = 4'(ai); add1_b = 4'(bi); add1_cin = 1'(ci);
    add2_a = 4'(ai); add2_b = 4'(bi); add2_cin = 1'(ci);
    mul_a  = 4'(ma); mul_b  = 4'(mb);
    #1;
    total = ai + bi + ci;
    prod  = ma * mb;
    checks++;
    if (add1_s !== 4'(total % 10) || add1_cout !== (total >= 10)) begin
      failures++;
      $display("FAIL direct adder %0d+%0d+%0d -> %0d%0d", ai, bi, ci, add1_cout, add1_s);
    end
    checks++;
    if (add2_s !== 4'(total % 10) || add2_cout !== (total >= 10)) begin
      failures++;
      $display("FAIL two-level adder %0d+%0d+%0d -> %0d%0d", ai, bi, ci, add2_cout, add2_s);
    end
    checks++;
    if ({add1_cout, add1_s} !== {add2_cout, add2_s}) begin
      failures++;
      $display("FAIL adders disagree for %0d+%0d+%0d", ai, bi, ci);
    end
    checks++;
    if (mul_p.tens !== 4'(prod / 10) || mul_p.units !== 4'(prod % 10)) begin
      failures++;
      $display("FAIL multiplier %0d*%0d -> %0d%0d", ma, mb, mul_p.tens, mul_p.units);
    end
    if (add1_cin)      n_cin++;
    if (add1_cout)     n_carry_out++;
    else               n_no_carry++;
    if (mul_p.tens != 0) n_two_digit++;
    if (mul_p[7])      n_p7++;
  endtask

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int ai = 0; ai < 10; ai++)
        for (int bi = 0; bi < 10; bi++)
          apply(ai, bi, ci, ai, bi);
    for (int n = 0; n < 2000; n++)
      apply(int'($urandom_range(9)), int'($urandom_range(9)), int'($urandom_range(1)),
            int'($urandom_range(9)), int'($urandom_range(9)));
    $display("mechanisms: carry_in=%0d carry_out=%0d no_carry=%0d two_digit_product=%0d tens_msb=%0d",
             n_cin, n_carry_out, n_no_carry, n_two_digit, n_p7);
    if (n_cin == 0)       begin failures++; $display("FAIL carry-in never used"); end
    if (n_carry_out == 0) begin failures++; $display("FAIL decimal carry-out never produced"); end
    if (n_no_carry == 0)  begin failures++; $display("FAIL no sum without carry"); end
    if (n_two_digit == 0) begin failures++; $display("FAIL no two-digit product"); end
    if (n_p7 == 0)        begin failures++; $display("FAIL product 81 never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
