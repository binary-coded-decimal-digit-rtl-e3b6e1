// bcd_digit_multiplier: direct BCD digit multiplier.
//
// Multiplies two BCD digits a and b and returns their product as two BCD
// digits, p.tens = p[7:4] and p.units = p[3:0]. Each of the eight product
// bits is a two-level AND-OR expression of the eight operand bits. The
// product is never formed in binary and then converted to BCD, and no
// operand recoding is used: the decimal digits come straight out of the
// expressions.
//
// The expressions are the minimized sum-of-products form of the 256-row
// truth table of a * b, in which the 156 rows with a > 9 or b > 9 are don't
// cares. With those don't cares the units parity bit needs only two inputs
// (p[0] = a0 & b0) and the tens MSB only four (p[7] is set only by 9 * 9 = 81),
// so each fits one 6-input LUT, while bits such as p[1] depend on all eight
// inputs and need more than one LUT. The direct approach and the don't-care
// treatment follow the published design; the particular cover is this
// design's own.
//
// Interface: a, b are BCD digits (0..9). For valid inputs p is the BCD value
// of a * b (00..81). For a or b above 9 the outputs are not specified.
// Timing: purely combinational, no clock.
module bcd_digit_multiplier
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  output bcd_pair_t  p
);

  assign p[0] = (a[0] & b[0]);
  assign p[1] = (~a[3] & ~a[2] & ~a[1] & a[0] & b[1]) |
      (~a[2] & a[1] & ~a[0] & ~b[3] & ~b[2] & b[0]) |
      (a[1] & ~b[3] & ~b[2] & ~b[1] & b[0]) |
      (a[1] & ~a[0] & b[2] & b[1] & ~b[0]) |
      (~a[2] & a[1] & ~a[0] & b[3] & ~b[0]) |
      (~a[2] & a[1] & a[0] & ~b[2] & b[1] & ~b[0]) |
      (~a[2] & a[1] & a[0] & b[2] & ~b[1] & ~b[0]) |
      (a[1] & a[0] & b[3] & b[0]) |
      (a[2] & ~a[1] & ~a[0] & ~b[2] & b[1] & b[0]) |
      (a[2] & ~a[1] & ~a[0] & b[2] & ~b[1] & ~b[0]) |
      (a[2] & ~a[1] & ~a[0] & b[3]) |
      (a[2] & a[1] & ~a[0] & b[1] & ~b[0]) |
      (a[2] & a[1] & ~a[0] & b[2] & b[1]) |
      (a[2] & a[1] & b[2] & b[1] & ~b[0]) |
      (a[2] & a[1] & a[0] & b[3]) |
      (a[3] & ~a[0] & ~b[2] & b[1] & ~b[0]) |
      (a[3] & b[2] & ~b[1] & ~b[0]) |
      (a[3] & b[2] & b[1] & b[0]) |
      (a[3] & ~a[0] & b[3] & b[0]) |
      (a[3] & a[0] & b[1] & b[0]) |
      (a[3] & a[0] & b[3] & ~b[0]);
  assign p[2] = (~a[3] & ~a[2] & ~a[1] & a[0] & b[2]) |
      (~a[2] & ~a[1] & a[0] & b[2] & ~b[0]) |
      (a[0] & b[2] & ~b[1] & b[0]) |
      (~a[2] & a[1] & ~b[2] & b[1] & ~b[0]) |
      (~a[2] & a[1] & ~a[0] & b[1] & b[0]) |
      (~a[2] & a[1] & b[3] & ~b[0]) |
      (a[1] & a[0] & ~b[2] & b[1] & ~b[0]) |
      (~a[2] & a[1] & a[0] & b[3]) |
      (a[1] & a[0] & b[3] & ~b[0]) |
      (a[2] & ~a[0] & ~b[2] & ~b[1] & b[0]) |
      (a[2] & ~a[0] & b[2] & ~b[0]) |
      (a[2] & ~a[1] & a[0] & b[0]) |
      (a[2] & a[0] & ~b[3] & ~b[1] & b[0]) |
      (a[3] & ~a[0] & ~b[2] & b[1]) |
      (a[3] & ~a[0] & b[1] & b[0]) |
      (a[3] & ~b[2] & b[1] & b[0]) |
      (a[3] & ~a[0] & b[3] & ~b[0]);
  assign p[3] = (~a[3] & ~a[2] & ~a[1] & a[0] & b[3]) |
      (~a[2] & a[1] & ~a[0] & b[2] & ~b[1] & ~b[0]) |
      (~a[2] & a[1] & ~a[0] & b[3] & b[0]) |
      (~a[2] & a[1] & a[0] & ~b[2] & b[1] & b[0]) |
      (~a[2] & a[1] & a[0] & b[2] & b[1] & ~b[0]) |
      (a[2] & ~a[1] & ~a[0] & ~b[2] & b[1] & ~b[0]) |
      (a[2] & ~a[1] & ~a[0] & b[2] & b[1] & b[0]) |
      (a[2] & a[1] & ~a[0] & ~b[2] & b[1] & b[0]) |
      (a[2] & a[1] & ~a[0] & b[3] & ~b[0]) |
      (a[2] & a[1] & a[0] & b[2] & ~b[1] & ~b[0]) |
      (a[2] & a[1] & a[0] & b[2] & b[1] & b[0]) |
      (a[3] & ~b[3] & ~b[2] & ~b[1] & b[0]) |
      (a[3] & ~a[0] & b[2] & b[1] & ~b[0]) |
      (a[3] & a[0] & ~b[2] & b[1] & ~b[0]);
  assign p[4] = (a[1] & b[2] & ~b[1] & b[0]) |
      (~a[2] & a[1] & ~a[0] & b[2] & b[1]) |
      (a[1] & ~a[0] & b[2] & b[1] & ~b[0]) |
      (~a[2] & a[1] & ~a[0] & b[3]) |
      (~a[2] & a[1] & a[0] & b[2] & ~b[0]) |
      (a[2] & ~a[1] & ~b[2] & b[1] & b[0]) |
      (a[2] & ~a[1] & ~a[0] & b[2] & ~b[1] & ~b[0]) |
      (a[2] & ~a[1] & ~a[0] & b[3]) |
      (a[2] & ~a[0] & b[3] & b[0]) |
      (a[2] & ~a[1] & a[0] & b[1]) |
      (a[2] & a[1] & ~a[0] & ~b[2] & b[1]) |
      (a[2] & a[1] & ~b[2] & b[1] & ~b[0]) |
      (a[2] & a[1] & a[0] & b[3] & ~b[0]) |
      (a[3] & ~b[2] & b[1] & ~b[0]) |
      (a[3] & b[2] & ~b[1] & ~b[0]) |
      (a[3] & ~a[0] & b[2] & b[1] & b[0]) |
      (a[3] & ~a[0] & b[3] & b[0]) |
      (a[3] & a[0] & b[1] & ~b[0]) |
      (a[3] & a[0] & b[3] & ~b[0]);
  assign p[5] = (~a[2] & a[1] & a[0] & b[2] & b[1] & b[0]) |
      (~a[2] & a[1] & a[0] & b[3]) |
      (a[1] & a[0] & b[3] & b[0]) |
      (a[2] & b[2] & ~b[1] & b[0]) |
      (a[2] & ~a[1] & b[2] & b[1]) |
      (a[2] & ~a[1] & ~a[0] & b[3]) |
      (a[2] & ~a[1] & a[0] & b[2]) |
      (a[2] & a[1] & ~a[0] & b[2] & ~b[0]) |
      (a[2] & a[1] & b[2] & ~b[1]) |
      (a[2] & a[1] & a[0] & ~b[2] & b[1] & b[0]) |
      (a[3] & ~b[2] & b[1] & b[0]) |
      (a[3] & b[2] & ~b[1] & ~b[0]) |
      (a[3] & ~a[0] & b[3]) |
      (a[3] & b[3] & ~b[0]) |
      (a[3] & a[0] & b[1] & b[0]);
  assign p[6] = (a[2] & a[0] & b[3]) |
      (a[2] & a[1] & b[2] & b[1] & b[0]) |
      (a[2] & a[1] & b[3]) |
      (a[2] & a[1] & a[0] & b[2] & b[1]) |
      (a[3] & b[2] & b[0]) |
      (a[3] & b[2] & b[1]) |
      (a[3] & ~a[0] & b[3]) |
      (a[3] & b[3] & ~b[0]);
  assign p[7] = (a[3] & a[0] & b[3] & b[0]);

endmodule
