// A row of W VLS 4:2 compressors compressing four W-bit levels to two.
//
// Column j takes bit j of x1..x4 and the cout of column j-1 (zero for
// column 0); the cout of the top column is dropped, so s + c equals
// x1 + x2 + x3 + x4 modulo 2^W. b_hi/b_lo are the multiplier bits of the
// levels on x4/x3 and select the short path in every cell at once.
// Outputs: s (weight j) and c, the carries already moved one place left.
// Purely combinational. The cell and its select follow the architecture;
// spanning all W columns, the zero cin into column 0 and dropping the top
// cout (chain[W], left unused) are this design's choices.
module vls_comp42_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] x3,
  input  logic [W-1:0] x4,
  input  logic         b_hi,
  input  logic         b_lo,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W:0]   chain;     // chain[j] = cin of column j
  logic [W-1:0] carry;

  assign chain[0] = 1'b0;

  for (genvar j = 0; j < W; j++) begin : g_col
    vls_comp42 u_cell (
      .x1(x1[j]), .x2(x2[j]), .x3(x3[j]), .x4(x4[j]), .cin(chain[j]),
      .b_hi(b_hi), .b_lo(b_lo),
      .sum(s[j]), .carry(carry[j]), .cout(chain[j+1])
    );
  end

  assign c = carry << 1;
endmodule
