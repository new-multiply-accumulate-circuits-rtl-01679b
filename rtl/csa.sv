// Carry-save adder (CSA): a row of independent full adders that reduces
// three W-bit vectors to a sum vector and a carry vector with the delay of
// one full adder.
//
// Interface: x, y, z in; s = x^y^z; c = majority(x,y,z) moved one place
// left, so that x + y + z = s + c (mod 2^W). The carry out of the top
// column is dropped, which keeps all arithmetic modulo 2^W like the
// 2n-bit accumulator registers it feeds. Purely combinational.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;

  assign s   = x ^ y ^ z;
  assign maj = (x & y) | (x & z) | (y & z);
  assign c   = maj << 1;
endmodule
