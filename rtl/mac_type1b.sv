// Type-I-B VLS multiply-accumulate unit (unsigned A x B accumulated mod
// 2^ACC_W).
//
// The partial-product levels are taken in blocks of three, from the most
// significant level down (pps_N, pps_(N-1), pps_(N-2) first); each block
// owns two accumulator registers. Long path: one CSA row reduces the three
// levels to two (first PPRP stage) and two more CSA rows add the stored sum
// and carry. Short path: if at most one of the block's three multiplier bits
// is 1, at least two of its levels are zero, so two OR gates merge the three
// levels into one and a single CSA row adds the stored vectors. The select,
// b_i.b_(i+1) + b_i.b_(i+2) + b_(i+1).b_(i+2), drives one multiplexer pair
// per block. The N mod 3 lowest levels left over form a plain block with
// no speculation (two levels: two CSA rows; one level: one CSA row). All
// stored vectors are added outside the loop (CSA tree + CPA).
//
// Timing: one cycle when every block is on its short path, else LONG_CYCLES
// (vls_ctrl). Blocks, gates and select follow the architecture; the
// handshake, clear and cycle counts are this design's choice.
module mac_type1b
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
  localparam int unsigned T = N / 3;               // speculative blocks
  localparam int unsigned R = N % 3;               // leftover low levels
  localparam int unsigned G = T + ((R > 0) ? 1 : 0);

  logic [ACC_W-1:0] pps   [N];
  logic [ACC_W-1:0] acc_s [G];
  logic [ACC_W-1:0] acc_c [G];
  logic [ACC_W-1:0] nxt_s [G];
  logic [ACC_W-1:0] nxt_c [G];
  logic [ACC_W-1:0] merge_rows [2*G];
  logic [G-1:0]     grp_short;
  logic             acc_en;

  pp_gen #(.N(N), .W(ACC_W)) u_pp (.a(a), .b(b), .pps(pps));

  for (genvar k = 0; k < T; k++) begin : g_blk
    localparam int unsigned L = R + 3 * k;         // lowest level of block
    logic [ACC_W-1:0] or_lvl, sh_s, sh_c, p_s, p_c, l1_s, l1_c, lg_s, lg_c;
    logic             two_ones;

    // short path: two OR gates + one CSA row
    assign or_lvl = pps[L+2] | pps[L+1] | pps[L];
    csa #(.W(ACC_W)) u_short (.x(or_lvl), .y(acc_s[k]), .z(acc_c[k]),
                              .s(sh_s), .c(sh_c));
    // long path: first-stage CSA, then two CSA rows with the accumulators
    csa #(.W(ACC_W)) u_part  (.x(pps[L+2]), .y(pps[L+1]), .z(pps[L]),
                              .s(p_s), .c(p_c));
    csa #(.W(ACC_W)) u_long1 (.x(p_s), .y(p_c), .z(acc_s[k]),
                              .s(l1_s), .c(l1_c));
    csa #(.W(ACC_W)) u_long2 (.x(l1_s), .y(l1_c), .z(acc_c[k]),
                              .s(lg_s), .c(lg_c));

    assign two_ones     = (b[L] & b[L+1]) | (b[L] & b[L+2]) | (b[L+1] & b[L+2]);
    assign grp_short[k] = ~two_ones;
    assign nxt_s[k]     = grp_short[k] ? sh_s : lg_s;
    assign nxt_c[k]     = grp_short[k] ? sh_c : lg_c;
  end

  if (R == 2) begin : g_rest_pair
    logic [ACC_W-1:0] l1_s, l1_c;
    csa #(.W(ACC_W)) u_r1 (.x(pps[1]), .y(pps[0]), .z(acc_s[T]),
                           .s(l1_s), .c(l1_c));
    csa #(.W(ACC_W)) u_r2 (.x(l1_s), .y(l1_c), .z(acc_c[T]),
                           .s(nxt_s[T]), .c(nxt_c[T]));
    assign grp_short[T] = 1'b1;
  end else if (R == 1) begin : g_rest_single
    csa #(.W(ACC_W)) u_r1 (.x(pps[0]), .y(acc_s[T]), .z(acc_c[T]),
                           .s(nxt_s[T]), .c(nxt_c[T]));
    assign grp_short[T] = 1'b1;
  end

  for (genvar k = 0; k < G; k++) begin : g_rows
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
      for (int k = 0; k < G; k++) begin
        acc_s[k] <= '0;
        acc_c[k] <= '0;
      end
    end else if (clear) begin
      for (int k = 0; k < G; k++) begin
        acc_s[k] <= '0;
        acc_c[k] <= '0;
      end
    end else if (acc_en) begin
      for (int k = 0; k < G; k++) begin
        acc_s[k] <= nxt_s[k];
        acc_c[k] <= nxt_c[k];
      end
    end
  end

  acc_merge #(.W(ACC_W), .M(2*G)) u_merge (.rows(merge_rows), .sum(result));
endmodule
