// bcd_add_level2: second level of the two-level BCD digit adder.
//
// A six-input, four-output stage. Its inputs are the two high bits of each
// operand, a_hi = a[3:2] and b_hi = b[3:2], and the two bits x[1:0] from the
// first level. Dropping the sum bit s0, which the first level already
// produced, the remaining value is half = 2*(a_hi + b_hi) + x, which lies in
// 0..9. The stage returns cout = (half >= 5) and s_hi = s[3:1] = half mod 5,
// so that the full sum digit is {s_hi, s0}. No binary sum is corrected: each
// output is a direct AND-OR expression of the six inputs, one 6-input LUT
// each.
//
// The expressions are the minimized sum-of-products form of that function,
// with input codes that no pair of valid digits can produce (a_hi or b_hi
// equal to 3, and x values too large for the given a_hi and b_hi) left as
// don't cares. The split into two levels and the signals passed between them
// follow the published design; the equations are derived here.
// Timing: purely combinational.
module bcd_add_level2 (
  input  logic [1:0] a_hi,
  input  logic [1:0] b_hi,
  input  logic [1:0] x,
  output logic [2:0] s_hi,
  output logic       cout
);

  assign s_hi[0] = (~a_hi[1] & ~a_hi[0] & ~b_hi[1] & ~b_hi[0] & x[0]) |
      (~a_hi[1] & ~a_hi[0] & b_hi[0] & ~x[1] & x[0]) |
      (b_hi[1] & x[1]) |
      (a_hi[0] & ~b_hi[1] & ~b_hi[0] & ~x[1] & x[0]) |
      (a_hi[0] & b_hi[0] & x[1] & ~x[0]) |
      (a_hi[0] & b_hi[1] & ~x[0]) |
      (a_hi[1] & x[1]) |
      (a_hi[1] & b_hi[0] & ~x[0]) |
      (a_hi[1] & b_hi[1] & ~x[0]);
  assign s_hi[1] = (~a_hi[1] & ~a_hi[0] & ~b_hi[1] & ~b_hi[0] & x[1]) |
      (~a_hi[1] & ~a_hi[0] & b_hi[0] & ~x[1]) |
      (a_hi[0] & ~b_hi[1] & ~b_hi[0] & ~x[1]) |
      (a_hi[0] & b_hi[0] & x[1] & x[0]) |
      (a_hi[0] & b_hi[1] & x[0]) |
      (a_hi[0] & b_hi[1] & x[1]) |
      (a_hi[1] & b_hi[0] & x[0]) |
      (a_hi[1] & b_hi[0] & x[1]) |
      (a_hi[1] & b_hi[1] & ~x[0]);
  assign s_hi[2] = (~a_hi[1] & ~a_hi[0] & b_hi[0] & x[1] & ~x[0]) |
      (~a_hi[1] & ~a_hi[0] & b_hi[1] & ~x[1] & ~x[0]) |
      (a_hi[0] & ~b_hi[1] & ~b_hi[0] & x[1] & ~x[0]) |
      (a_hi[0] & b_hi[0] & ~x[1] & ~x[0]) |
      (a_hi[1] & ~b_hi[1] & ~b_hi[0] & ~x[1] & ~x[0]) |
      (a_hi[1] & b_hi[1] & x[0]);
  assign cout = (b_hi[0] & x[1] & x[0]) |
      (b_hi[1] & x[0]) |
      (b_hi[1] & x[1]) |
      (a_hi[0] & x[1] & x[0]) |
      (a_hi[0] & b_hi[0] & x[0]) |
      (a_hi[0] & b_hi[0] & x[1]) |
      (a_hi[0] & b_hi[1]) |
      (a_hi[1] & x[0]) |
      (a_hi[1] & x[1]) |
      (a_hi[1] & b_hi[0]) |
      (a_hi[1] & b_hi[1]);

endmodule
