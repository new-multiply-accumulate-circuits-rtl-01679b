// Final merge of a MAC's accumulator registers, outside the accumulation
// loop: a CSA tree reduces the M stored vectors (sum and carry of every
// accumulator pair) to two, and a carry-propagate adder (CPA) adds those.
//
// Interface: rows[M] in, sum = rows[0] + ... + rows[M-1] mod 2^W. The CPA
// is written as a behavioural adder and left to synthesis; the adder type
// is not fixed by the architecture. Purely combinational.
module acc_merge #(
  parameter int unsigned W = 16,
  parameter int unsigned M = 4
) (
  input  logic [W-1:0] rows [M],
  output logic [W-1:0] sum
);
  logic [W-1:0] s, c;

  csa_tree #(.W(W), .M(M)) u_tree (.rows(rows), .s(s), .c(c));

  assign sum = s + c;
endmodule
