// bcd_adder_two_level: minimal-area BCD digit adder in two LUT levels.
//
// Adds two BCD digits a, b and a decimal carry-in cin. The nine inputs are
// split so that no function needs more than six inputs, which lets each
// output map to one 6-input LUT:
//   level 1 (5 inputs, 3 outputs): a[1:0] + b[1:0] + cin -> x[1:0], s[0]
//   level 2 (6 inputs, 4 outputs): a[3:2], b[3:2], x[1:0] -> s[3:1], cout
// Seven LUT-sized functions in all. The carry never passes through a binary
// +6 correction step; the second level produces the decimal digit directly.
// The level structure follows the published design; the level-2 equations
// are derived in bcd_add_level2.
//
// Interface: a, b BCD digits (0..9), cin 0 or 1; {cout, s} is the BCD value
// of a + b + cin for valid inputs, unspecified otherwise. Timing: purely
// combinational, two LUT levels deep.
module bcd_adder_two_level
  import bcd_pkg::*;
(
  input  bcd_digit_t a,
  input  bcd_digit_t b,
  input  logic       cin,
  output bcd_digit_t s,
  output logic       cout
);

  logic [1:0] x;

  bcd_add_level1 u_level1 (
    .a_lo (a[1:0]),
    .b_lo (b[1:0]),
    .cin  (cin),
    .x    (x),
    .s0   (s[0])
  );

  bcd_add_level2 u_level2 (
    .a_hi (a[3:2]),
    .b_hi (b[3:2]),
    .x    (x),
    .s_hi (s[3:1]),
    .cout (cout)
  );

endmodule
