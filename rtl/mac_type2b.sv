// Type-II-B VLS multiply-accumulate unit (unsigned A x B accumulated mod
// 2^ACC_W): Type-II-A with the two accumulator CSA rows shared between the
// short and the long path, which saves two CSA rows of area.
//
// The lower half (pps_1..pps_N/2) and the upper half (pps_N/2+1..pps_N) of
// the partial-product levels are each reduced to two vectors by a CSA
// tree; two CSA rows merge the halves (long path). A multiplexer pair,
// selected by b_(N-1) | ... | b_(N/2), passes either the merged vectors or,
// when the N/2 most significant bits of B are zero, the lower half's
// vectors alone (short path). Two shared CSA rows then add the stored sum
// and carry, and the single accumulator pair is loaded. A CPA adds the pair
// outside the loop.
//
// Timing: one cycle on the short path, else LONG_CYCLES (vls_ctrl). The
// structure follows the architecture; the handshake, clear and cycle
// counts are this design's choice. N must be even.
module mac_type2b
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
  localparam int unsigned H = N / 2;

  if (N % 2 != 0) begin : g_bad_n
    $error("mac_type2b: N must be even");
  end

  logic [ACC_W-1:0] pps [N];
  logic [ACC_W-1:0] lo_rows [H];
  logic [ACC_W-1:0] hi_rows [H];
  logic [ACC_W-1:0] lo_s, lo_c, hi_s, hi_c, m1_s, m1_c, all_s, all_c;
  logic [ACC_W-1:0] sel_s, sel_c, sa_s, sa_c, nx_s, nx_c;
  logic [ACC_W-1:0] acc_s, acc_c;
  logic [ACC_W-1:0] merge_rows [2];
  logic             acc_en;

  pp_gen #(.N(N), .W(ACC_W)) u_pp (.a(a), .b(b), .pps(pps));

  for (genvar i = 0; i < H; i++) begin : g_split
    assign lo_rows[i] = pps[i];
    assign hi_rows[i] = pps[H+i];
  end

  csa_tree #(.W(ACC_W), .M(H)) u_lo (.rows(lo_rows), .s(lo_s), .c(lo_c));
  csa_tree #(.W(ACC_W), .M(H)) u_hi (.rows(hi_rows), .s(hi_s), .c(hi_c));

  // long path: merge the two halves
  csa #(.W(ACC_W)) u_m1  (.x(hi_s), .y(hi_c), .z(lo_s), .s(m1_s), .c(m1_c));
  csa #(.W(ACC_W)) u_m2  (.x(m1_s), .y(m1_c), .z(lo_c), .s(all_s), .c(all_c));

  // path select: the short path bypasses the two merging rows
  assign sel_s = short_path ? lo_s : all_s;
  assign sel_c = short_path ? lo_c : all_c;

  // shared rows: add the accumulators
  csa #(.W(ACC_W)) u_ac1 (.x(sel_s), .y(sel_c), .z(acc_s), .s(sa_s), .c(sa_c));
  csa #(.W(ACC_W)) u_ac2 (.x(sa_s), .y(sa_c), .z(acc_c), .s(nx_s), .c(nx_c));

  assign short_path = ~|b[N-1:H];

  vls_ctrl #(.LONG_CYCLES(LONG_CYCLES)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .short_path(short_path), .in_ready(in_ready), .acc_en(acc_en),
    .done(done), .long_busy(long_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s <= '0;
      acc_c <= '0;
    end else if (clear) begin
      acc_s <= '0;
      acc_c <= '0;
    end else if (acc_en) begin
      acc_s <= nx_s;
      acc_c <= nx_c;
    end
  end

  assign merge_rows[0] = acc_s;
  assign merge_rows[1] = acc_c;
  acc_merge #(.W(ACC_W), .M(2)) u_merge (.rows(merge_rows), .sum(result));
endmodule
