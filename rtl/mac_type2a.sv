// Type-II-A VLS multiply-accumulate unit (unsigned A x B accumulated mod
// 2^ACC_W).
//
// The partial-product levels are split into a lower half (pps_1..pps_N/2)
// and an upper half (pps_N/2+1..pps_N), each reduced to two vectors by its
// own CSA tree. Long path: two CSA rows merge the halves and two more add
// the stored sum and carry. Short path: if the N/2 most significant bits of
// B are all zero, the whole upper half is zero, and the lower half's two
// vectors go straight into their own two CSA rows with the stored vectors,
// skipping two reduction stages. A multiplexer pair selected by
// b_(N-1) | ... | b_(N/2) loads one result into the single accumulator pair
// (sum and carry); a CPA adds the pair outside the loop.
//
// Timing: one cycle on the short path, else LONG_CYCLES (vls_ctrl). The
// split, the paths and the select follow the architecture; the handshake,
// clear and cycle counts are this design's choice. N must be even.
module mac_type2a
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
    $error("mac_type2a: N must be even");
  end

  logic [ACC_W-1:0] pps [N];
  logic [ACC_W-1:0] lo_rows [H];
  logic [ACC_W-1:0] hi_rows [H];
  logic [ACC_W-1:0] lo_s, lo_c, hi_s, hi_c, m1_s, m1_c, all_s, all_c;
  logic [ACC_W-1:0] sa_s, sa_c, sh_s, sh_c;     // short path
  logic [ACC_W-1:0] la_s, la_c, lg_s, lg_c;     // long path
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

  // short path: lower half + accumulators
  csa #(.W(ACC_W)) u_sh1 (.x(lo_s), .y(lo_c), .z(acc_s), .s(sa_s), .c(sa_c));
  csa #(.W(ACC_W)) u_sh2 (.x(sa_s), .y(sa_c), .z(acc_c), .s(sh_s), .c(sh_c));

  // long path: merge the halves, then add the accumulators
  csa #(.W(ACC_W)) u_m1  (.x(hi_s), .y(hi_c), .z(lo_s), .s(m1_s), .c(m1_c));
  csa #(.W(ACC_W)) u_m2  (.x(m1_s), .y(m1_c), .z(lo_c), .s(all_s), .c(all_c));
  csa #(.W(ACC_W)) u_lg1 (.x(all_s), .y(all_c), .z(acc_s), .s(la_s), .c(la_c));
  csa #(.W(ACC_W)) u_lg2 (.x(la_s), .y(la_c), .z(acc_c), .s(lg_s), .c(lg_c));

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
      acc_s <= short_path ? sh_s : lg_s;
      acc_c <= short_path ? sh_c : lg_c;
    end
  end

  assign merge_rows[0] = acc_s;
  assign merge_rows[1] = acc_c;
  acc_merge #(.W(ACC_W), .M(2)) u_merge (.rows(merge_rows), .sum(result));
endmodule
