// Wallace-style carry-save reduction tree: M vectors of W bits in, two out
// (s + c equals the sum of all rows modulo 2^W).
//
// Each stage groups the rows present in threes, reduces every group with
// one CSA row in parallel and passes the one or two rows left over
// unchanged, as in the parts and stages of a Wallace tree, until two rows
// remain. Stage t takes rows_at(M, t) rows in cur[0..] and produces the
// next stage's rows in nxt[0..]; entries above that count are tied to zero
// and unused. M = 1 gives (row, 0), M = 2 passes both rows through.
// Grouping in threes follows the Wallace-tree reduction the architecture
// uses; the generic staging for any M is this design's. Purely
// combinational.
module csa_tree #(
  parameter int unsigned W = 16,
  parameter int unsigned M = 3
) (
  input  logic [W-1:0] rows [M],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  // number of rows left after t stages, starting from m rows
  function automatic int unsigned rows_at(int unsigned m, int unsigned t);
    int unsigned r;
    r = m;
    for (int unsigned i = 0; i < t; i++) r = 2 * (r / 3) + r % 3;
    return r;
  endfunction

  // number of stages needed to reach two rows
  function automatic int unsigned num_stages(int unsigned m);
    int unsigned r, n;
    r = m;
    n = 0;
    while (r > 2) begin
      r = 2 * (r / 3) + r % 3;
      n++;
    end
    return n;
  endfunction

  localparam int unsigned S = num_stages(M);

  for (genvar t = 0; t < S; t++) begin : g_stage
    localparam int unsigned CNT = rows_at(M, t);
    localparam int unsigned G   = CNT / 3;        // full-adder parts
    localparam int unsigned R   = CNT % 3;        // rows not in a part
    localparam int unsigned NXT = 2 * G + R;      // rows after this stage

    logic [W-1:0] cur [M];                        // rows entering the stage
    logic [W-1:0] nxt [M];                        // rows leaving the stage

    for (genvar i = 0; i < M; i++) begin : g_in
      if (t == 0) begin : g_first
        assign cur[i] = rows[i];
      end else begin : g_chain
        assign cur[i] = g_stage[t-1].nxt[i];
      end
    end

    for (genvar g = 0; g < G; g++) begin : g_part
      csa #(.W(W)) u_csa (
        .x(cur[3*g]),  .y(cur[3*g+1]), .z(cur[3*g+2]),
        .s(nxt[2*g]),  .c(nxt[2*g+1])
      );
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign nxt[2*G+r] = cur[3*G+r];
    end
    for (genvar z = NXT; z < M; z++) begin : g_zero
      assign nxt[z] = '0;
    end
  end

  if (M == 1) begin : g_one
    assign s = rows[0];
    assign c = '0;
  end else if (S == 0) begin : g_two
    assign s = rows[0];
    assign c = rows[1];
  end else begin : g_out
    assign s = g_stage[S-1].nxt[0];
    assign c = g_stage[S-1].nxt[1];
  end
endmodule
