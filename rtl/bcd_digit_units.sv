// bcd_digit_units: the three BCD digit units side by side.
//
// Holds the two correction-free BCD digit adders and the direct BCD digit
// multiplier. They are independent building blocks for wider decimal adders
// and multipliers, so each has its own operand and result ports:
//   add1_*  direct Boolean-expression adder (nine-input, one-level logic)
//   add2_*  minimal-area two-level adder (5-input and 6-input LUT stages)
//   mul_*   direct digit multiplier, two-digit BCD product
// Both adders compute the same function, so with equal operands their
// results match. Timing: all outputs are combinational functions of the
// inputs of their own unit; there is no clock.
module bcd_digit_units
  import bcd_pkg::*;
(
  input  bcd_digit_t add1_a,
  input  bcd_digit_t add1_b,
  input  logic       add1_cin,
  output bcd_digit_t add1_s,
  output logic       add1_cout,

  input  bcd_digit_t add2_a,
  input  bcd_digit_t add2_b,
  input  logic       add2_cin,
  output bcd_digit_t add2_s,
  output logic       add2_cout,

  input  bcd_digit_t mul_a,
  input  bcd_digit_t mul_b,
  output bcd_pair_t  mul_p
);

  bcd_adder_direct u_add_direct (
    .a    (add1_a),
    .b    (add1_b),
    .cin  (add1_cin),
    .s    (add1_s),
    .cout (add1_cout)
  );

  bcd_adder_two_level u_add_two_level (
    .a    (add2_a),
    .b    (add2_b),
    .cin  (add2_cin),
    .s    (add2_s),
    .cout (add2_cout)
  );

  bcd_digit_multiplier u_mul (
    .a (mul_a),
    .b (mul_b),
    .p (mul_p)
  );

endmodule
