// Partial-product generation phase (PPGP) of an unsigned N x N multiplier.
//
// pps[i] is level pps_(i+1) = b_i x A: the AND of every bit of
// A with bit b_i of B, moved i places left and zero-extended to W bits.
// When b_i is zero the whole level is zero, which is what every VLS short
// path of this design exploits. Purely combinational.
module pp_gen #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 2 * N
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [W-1:0] pps [N]
);
  for (genvar i = 0; i < N; i++) begin : g_level
    logic [W-1:0] row;
    assign row    = W'(a & {N{b[i]}});
    assign pps[i] = row << i;
  end
endmodule
