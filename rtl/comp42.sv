// Conventional 4:2 compressor cell (one column).
//
// Four bits x1..x4 of one column plus cin from the next lower column are
// compressed to sum (this column) and carry and cout (next column):
//   cout  = (x4^x3) ? x2 : x4
//   carry = (x4^x3^x2^x1) ? cin : x1
//   sum   = x4^x3^x2^x1^cin
// so x1+x2+x3+x4+cin = sum + 2*(carry+cout). cout does not depend on cin,
// so a row of cells has no rippling carry. Purely combinational.
module comp42 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic x34, x1234;

  assign x34   = x4 ^ x3;
  assign x1234 = x34 ^ x2 ^ x1;
  assign cout  = x34 ? x2 : x4;
  assign carry = x1234 ? cin : x1;
  assign sum   = x1234 ^ cin;
endmodule
