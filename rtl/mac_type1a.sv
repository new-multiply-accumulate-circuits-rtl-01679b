// Type-I-A VLS multiply-accumulate unit (unsigned A x B accumulated mod
// 2^ACC_W).
//
// The partial-product levels pps_1..pps_N are merged with the accumulators
// in pairs without any reduction: every pair (pps_(2k+1), pps_(2k+2)) owns
// two accumulator registers (sum and carry). Long path: two CSA rows add
// both levels and the two stored vectors. Short path: if b_2k & b_(2k+1) is
// zero at least one level of the pair is zero, so an OR gate merges the two
// levels into one and a single CSA row suffices. A multiplexer per pair,
// selected by b_2k & b_(2k+1), picks the path; both give the exact sum. An
// odd last level (odd N only, not in the reported sizes) has one CSA row of
// its own. All stored vectors are added outside the loop by a CSA tree and
// a CPA (acc_merge).
//
// Timing: the whole operation takes one cycle when every pair is on its
// short path, else LONG_CYCLES (vls_ctrl). The grouping, the OR/CSA/MUX
// paths and their select follow the architecture; the handshake, clear and
// cycle counts are this design's choice.
module mac_type1a
  import vls_mac_pkg::*;
#(
  parameter int unsigned N           = DEFAULT_N,
  parameter int unsigned ACC_W       = 2 * N,
  parameter int unsigned LONG_CYCLES = DEFAULT_LONG_CYCLES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [N-1:0]     a,
  input  logic [N-1:0]     b,
  output logic             in_ready,
  output logic             short_path,
  output logic             done,
  output logic             long_busy,
  output logic [ACC_W-1:0] result
);
  localparam int unsigned P = (N + 1) / 2;   // pairs (the last may be single)

  logic [ACC_W-1:0] pps   [N];
  logic [ACC_W-1:0] acc_s [P];
  logic [ACC_W-1:0] acc_c [P];
  logic [ACC_W-1:0] nxt_s [P];
  logic [ACC_W-1:0] nxt_c [P];
  logic [ACC_W-1:0] merge_rows [2*P];
  logic [P-1:0]     grp_short;
  logic             acc_en;

  pp_gen #(.N(N), .W(ACC_W)) u_pp (.a(a), .b(b), .pps(pps));

  for (genvar k = 0; k < P; k++) begin : g_grp
    if (2*k + 1 < N) begin : g_pair
      logic [ACC_W-1:0] or_lvl, sh_s, sh_c, l1_s, l1_c, lg_s, lg_c;

      // short path: OR gate + one CSA row
      assign or_lvl = pps[2*k] | pps[2*k+1];
      csa #(.W(ACC_W)) u_short (.x(or_lvl), .y(acc_s[k]), .z(acc_c[k]),
                                .s(sh_s), .c(sh_c));
      // long path: two CSA rows
      csa #(.W(ACC_W)) u_long1 (.x(pps[2*k+1]), .y(pps[2*k]), .z(acc_s[k]),
                                .s(l1_s), .c(l1_c));
      csa #(.W(ACC_W)) u_long2 (.x(l1_s), .y(l1_c), .z(acc_c[k]),
                                .s(lg_s), .c(lg_c));

      assign grp_short[k] = ~(b[2*k] & b[2*k+1]);
      assign nxt_s[k]     = grp_short[k] ? sh_s : lg_s;
      assign nxt_c[k]     = grp_short[k] ? sh_c : lg_c;
    end else begin : g_single
      csa #(.W(ACC_W)) u_single (.x(pps[2*k]), .y(acc_s[k]), .z(acc_c[k]),
                                 .s(nxt_s[k]), .c(nxt_c[k]));
      assign grp_short[k] = 1'b1;
    end
    assign merge_rows[2*k]   = acc_s[k];
    assign merge_rows[2*k+1] = acc_c[k];
  end

  assign short_path = &grp_short;

  vls_ctrl #(.LONG_CYCLES(LONG_CYCLES)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .short_path(short_path), .in_ready(in_ready), .acc_en(acc_en),
    .done(done), .long_busy(long_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < P; k++) begin
        acc_s[k] <= '0;
        acc_c[k] <= '0;
      end
    end else if (clear) begin
      for (int k = 0; k < P; k++) begin
        acc_s[k] <= '0;
        acc_c[k] <= '0;
      end
    end else if (acc_en) begin
      for (int k = 0; k < P; k++) begin
        acc_s[k] <= nxt_s[k];
        acc_c[k] <= nxt_c[k];
      end
    end
  end

  acc_merge #(.W(ACC_W), .M(2*P)) u_merge (.rows(merge_rows), .sum(result));
endmodule
