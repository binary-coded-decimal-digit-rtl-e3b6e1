// bcd_add_level1: first level of the two-level BCD digit adder.
//
// A five-input, three-output stage: it adds the two low bits of each operand
// and the decimal carry-in, a[1:0] + b[1:0] + cin, a value from 0 to 7. Its
// lowest bit is already the lowest bit of the final BCD sum (a decimal
// correction by 10 never changes parity), so it leaves as s0. The two upper
// bits x[1:0] (0..3) go to the second level. Each output depends on five
// inputs and so fits one 6-input LUT. Purely combinational. The stage's
// inputs and outputs follow the published design; writing it as a small
// binary addition is this design's choice (the function is the same).
module bcd_add_level1 (
  input  logic [1:0] a_lo,
  input  logic [1:0] b_lo,
  input  logic       cin,
  output logic [1:0] x,
  output logic       s0
);

  assign {x, s0} = 3'(a_lo) + 3'(b_lo) + 3'(cin);

endmodule
