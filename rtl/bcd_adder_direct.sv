// bcd_adder_direct: BCD digit adder built from direct Boolean expressions.
//
// Adds two BCD digits a and b and a decimal carry-in cin. The nine input
// bits map straight onto the five output bits (sum digit s and decimal carry
// cout) through two-level AND-OR logic, one expression per output bit. There
// is no binary addition followed by a +6 correction: the decimal result is
// read directly off the truth table, so the unit is correction-free.
//
// The expressions are the minimized sum-of-products form of the 512-row truth
// table of a + b + cin, where every row with a > 9 or b > 9 was left as a
// don't care. Treating invalid digits as don't cares, the nine-input adder
// structure and the correction-free idea follow the published design; the
// particular cover (which prime implicants are used) is this design's own.
// s[0] is written as the three-input parity, which is the same function.
//
// Interface: a, b are BCD digits (0..9), cin is 0 or 1. For valid inputs
// {cout, s} is the BCD value of a + b + cin (0..19). For a or b above 9 the
// outputs are not specified. Timing: purely combinational, no clock.
module bcd_adder_direct
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t s,
  output logic       cout
);

  assign s[0] = cin ^ a[0] ^ b[0];

  assign s[1] = (~cin & ~a[3] & ~a[2] & ~a[1] & ~a[0] & b[1]) |
      (~cin & ~a[3] & ~a[2] & ~a[1] & b[1] & ~b[0]) |
      (~a[3] & ~a[2] & ~a[1] & ~a[0] & b[1] & ~b[0]) |
      (~a[3] & ~a[1] & a[0] & ~b[3] & ~b[2] & ~b[1] & b[0]) |
      (~a[3] & ~a[2] & ~a[1] & a[0] & b[2] & ~b[1] & b[0]) |
      (~cin & a[1] & ~a[0] & ~b[3] & ~b[2] & ~b[1]) |
      (~cin & a[1] & ~b[3] & ~b[2] & ~b[1] & ~b[0]) |
      (a[1] & ~a[0] & ~b[3] & ~b[2] & ~b[1] & ~b[0]) |
      (~cin & ~a[2] & a[1] & ~a[0] & b[2] & ~b[1]) |
      (~cin & ~a[2] & a[1] & b[2] & ~b[1] & ~b[0]) |
      (~a[2] & a[1] & ~a[0] & b[2] & ~b[1] & ~b[0]) |
      (~a[2] & a[1] & a[0] & ~b[2] & b[1] & b[0]) |
      (a[1] & a[0] & b[3] & b[0]) |
      (~cin & a[2] & ~a[1] & ~a[0] & ~b[2] & b[1]) |
      (~cin & a[2] & ~a[1] & ~b[2] & b[1] & ~b[0]) |
      (a[2] & ~a[1] & ~a[0] & ~b[2] & b[1] & ~b[0]) |
      (~cin & a[2] & ~a[1] & ~a[0] & b[3]) |
      (~cin & a[2] & ~a[1] & b[3] & ~b[0]) |
      (a[2] & ~a[1] & ~a[0] & b[3] & ~b[0]) |
      (a[2] & ~a[1] & a[0] & b[2] & b[1] & b[0]) |
      (~cin & a[2] & a[1] & ~a[0] & b[2] & b[1]) |
      (~cin & a[2] & a[1] & b[2] & b[1] & ~b[0]) |
      (a[2] & a[1] & ~a[0] & b[2] & b[1] & ~b[0]) |
      (a[2] & a[1] & a[0] & b[2] & ~b[1] & b[0]) |
      (~cin & a[3] & ~a[0] & b[2] & ~b[1]) |
      (~cin & a[3] & b[2] & ~b[1] & ~b[0]) |
      (a[3] & ~a[0] & b[2] & ~b[1] & ~b[0]) |
      (~cin & a[3] & ~a[0] & b[3]) |
      (~cin & a[3] & b[3] & ~b[0]) |
      (a[3] & ~a[0] & b[3] & ~b[0]) |
      (a[3] & a[0] & b[1] & b[0]) |
      (cin & ~a[3] & ~a[2] & ~a[1] & ~b[3] & ~b[1] & b[0]) |
      (cin & ~a[3] & ~a[2] & ~a[1] & a[0] & ~b[3] & ~b[1]) |
      (cin & ~a[2] & a[1] & ~b[2] & b[1] & b[0]) |
      (cin & a[1] & b[3] & b[0]) |
      (cin & ~a[2] & a[1] & a[0] & ~b[2] & b[1]) |
      (cin & a[1] & a[0] & b[3]) |
      (cin & a[2] & ~a[1] & ~b[3] & ~b[2] & ~b[1] & b[0]) |
      (cin & a[2] & ~a[1] & b[2] & b[1] & b[0]) |
      (cin & a[2] & ~a[1] & a[0] & ~b[3] & ~b[2] & ~b[1]) |
      (cin & a[2] & ~a[1] & a[0] & b[2] & b[1]) |
      (cin & a[2] & a[1] & b[2] & ~b[1] & b[0]) |
      (cin & a[2] & a[1] & a[0] & b[2] & ~b[1]) |
      (cin & a[3] & b[1] & b[0]) |
      (cin & a[3] & a[0] & b[1]);
  assign s[2] = (~a[3] & ~a[2] & ~a[1] & b[2] & ~b[1]) |
      (~a[3] & ~a[2] & ~a[0] & b[2] & ~b[1] & ~b[0]) |
      (~cin & ~a[2] & ~a[1] & ~a[0] & b[2] & b[1]) |
      (~cin & ~a[2] & ~a[1] & b[2] & b[1] & ~b[0]) |
      (~a[2] & ~a[1] & ~a[0] & b[2] & b[1] & ~b[0]) |
      (~a[3] & ~a[2] & a[0] & ~b[2] & b[1] & b[0]) |
      (~a[2] & a[1] & ~b[2] & b[1]) |
      (~cin & ~a[2] & a[1] & ~a[0] & b[2] & ~b[1]) |
      (~cin & ~a[2] & a[1] & b[2] & ~b[1] & ~b[0]) |
      (~a[2] & a[1] & a[0] & ~b[3] & ~b[2] & b[0]) |
      (~cin & a[2] & ~a[1] & ~a[0] & ~b[3] & ~b[2]) |
      (a[2] & ~a[1] & ~a[0] & ~b[3] & ~b[2] & ~b[0]) |
      (a[2] & ~a[1] & ~b[3] & ~b[2] & ~b[1]) |
      (a[2] & ~a[0] & ~b[3] & ~b[2] & ~b[1] & ~b[0]) |
      (~cin & a[2] & ~a[1] & ~b[2] & b[1] & ~b[0]) |
      (a[2] & a[0] & b[3] & b[0]) |
      (~cin & a[2] & a[1] & ~a[0] & ~b[2] & ~b[1]) |
      (~cin & a[2] & a[1] & ~b[2] & ~b[1] & ~b[0]) |
      (a[2] & a[1] & b[3]) |
      (a[2] & a[1] & a[0] & b[2] & b[1] & b[0]) |
      (a[3] & b[2] & b[1]) |
      (~cin & a[3] & ~a[0] & b[3]) |
      (~cin & a[3] & b[3] & ~b[0]) |
      (a[3] & ~a[0] & b[3] & ~b[0]) |
      (a[3] & a[0] & b[2] & b[0]) |
      (cin & ~a[3] & ~a[2] & ~b[2] & b[1] & b[0]) |
      (cin & ~a[3] & ~a[2] & a[0] & ~b[2] & b[1]) |
      (cin & ~a[2] & a[1] & ~b[3] & ~b[2] & b[0]) |
      (cin & ~a[2] & a[1] & a[0] & ~b[3] & ~b[2]) |
      (cin & a[2] & b[3] & b[0]) |
      (cin & a[2] & a[0] & b[3]) |
      (cin & a[2] & a[1] & b[2] & b[1] & b[0]) |
      (cin & a[2] & a[1] & a[0] & b[2] & b[1]) |
      (cin & a[3] & b[2] & b[0]) |
      (cin & a[3] & a[0] & b[2]);
  assign s[3] = (~cin & ~a[3] & ~a[2] & ~a[1] & ~a[0] & b[3]) |
      (~cin & ~a[3] & ~a[2] & ~a[1] & b[3] & ~b[0]) |
      (~a[3] & ~a[2] & ~a[1] & ~a[0] & b[3] & ~b[0]) |
      (~a[3] & ~a[2] & ~a[1] & a[0] & b[2] & b[1] & b[0]) |
      (~cin & ~a[2] & a[1] & ~a[0] & b[2] & b[1]) |
      (~cin & ~a[2] & a[1] & b[2] & b[1] & ~b[0]) |
      (~a[2] & a[1] & ~a[0] & b[2] & b[1] & ~b[0]) |
      (~a[2] & a[1] & a[0] & b[2] & ~b[1] & b[0]) |
      (~cin & a[2] & ~a[1] & ~a[0] & b[2] & ~b[1]) |
      (~cin & a[2] & ~a[1] & b[2] & ~b[1] & ~b[0]) |
      (a[2] & ~a[1] & ~a[0] & b[2] & ~b[1] & ~b[0]) |
      (a[2] & ~a[1] & a[0] & ~b[2] & b[1] & b[0]) |
      (~cin & a[2] & a[1] & ~a[0] & ~b[2] & b[1]) |
      (~cin & a[2] & a[1] & ~b[2] & b[1] & ~b[0]) |
      (a[2] & a[1] & ~a[0] & ~b[2] & b[1] & ~b[0]) |
      (a[2] & a[1] & a[0] & ~b[3] & ~b[2] & ~b[1] & b[0]) |
      (~cin & a[3] & ~a[0] & ~b[3] & ~b[2] & ~b[1]) |
      (~cin & a[3] & ~b[3] & ~b[2] & ~b[1] & ~b[0]) |
      (a[3] & ~a[0] & ~b[3] & ~b[2] & ~b[1] & ~b[0]) |
      (a[3] & a[0] & b[3] & b[0]) |
      (cin & ~a[3] & ~a[2] & ~a[1] & b[2] & b[1] & b[0]) |
      (cin & ~a[3] & ~a[2] & ~a[1] & a[0] & b[2] & b[1]) |
      (cin & ~a[2] & a[1] & b[2] & ~b[1] & b[0]) |
      (cin & ~a[2] & a[1] & a[0] & b[2] & ~b[1]) |
      (cin & a[2] & ~a[1] & ~b[2] & b[1] & b[0]) |
      (cin & a[2] & ~a[1] & a[0] & ~b[2] & b[1]) |
      (cin & a[2] & a[1] & ~b[3] & ~b[2] & ~b[1] & b[0]) |
      (cin & a[2] & a[1] & a[0] & ~b[3] & ~b[2] & ~b[1]) |
      (cin & a[3] & b[3] & b[0]) |
      (cin & a[3] & a[0] & b[3]);
  assign cout = (a[0] & b[3] & b[0]) |
      (a[1] & b[3]) |
      (a[1] & a[0] & b[2] & b[1] & b[0]) |
      (a[2] & b[2] & b[1]) |
      (a[2] & b[3]) |
      (a[2] & a[0] & b[2] & b[0]) |
      (a[2] & a[1] & b[2]) |
      (a[2] & a[1] & a[0] & b[1] & b[0]) |
      (a[3] & b[1]) |
      (a[3] & b[2]) |
      (a[3] & b[3]) |
      (a[3] & a[0] & b[0]) |
      (cin & b[3] & b[0]) |
      (cin & a[0] & b[3]) |
      (cin & a[1] & b[2] & b[1] & b[0]) |
      (cin & a[1] & a[0] & b[2] & b[1]) |
      (cin & a[2] & b[2] & b[0]) |
      (cin & a[2] & a[0] & b[2]) |
      (cin & a[2] & a[1] & b[1] & b[0]) |
      (cin & a[2] & a[1] & a[0] & b[1]) |
      (cin & a[3] & b[0]) |
      (cin & a[3] & a[0]);

endmodule
