// Variable-latency speculative (VLS) 4:2 compressor cell.
//
// x3 and x4 come from the partial-product levels of multiplier bits b_hi
// and b_lo. When both bits are zero those levels are entirely zero, so x3,
// x4 and with them cin and cout are zero in every cell of the row, and the
// exact outputs reduce to sum = x1^x2 and carry = x1&x2 (short path: one
// gate and one multiplexer). Otherwise the conventional compressor's outputs
// are taken (long path). The select is b_hi | b_lo; cout always comes from
// the conventional cell. The result is exact in both cases.
// Purely combinational.
module vls_comp42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  input  logic b_hi,
  input  logic b_lo,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic sel_long;
  logic sum_long, carry_long;
  logic sum_short, carry_short;

  comp42 u_conv (
    .x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
    .sum(sum_long), .carry(carry_long), .cout(cout)
  );

  assign sum_short   = x1 ^ x2;
  assign carry_short = x1 & x2;
  assign sel_long    = b_hi | b_lo;
  assign sum         = sel_long ? sum_long   : sum_short;
  assign carry       = sel_long ? carry_long : carry_short;
endmodule
