// Type-III VLS multiply-accumulate unit (unsigned A x B accumulated mod
// 2^ACC_W), built on the VLS 4:2 compressor.
//
// The first reduction stage is a row of VLS 4:2 compressors for every group
// of four partial-product levels (pps_4k+1 .. pps_4k+4 on x1 .. x4). Each
// row's select is b_(4k+3) | b_(4k+2), the bits of the two levels on x4 and
// x3: when both are zero the compressors take their short path (sum x1^x2,
// carry x1&x2), otherwise the conventional compressor's path. The two
// vectors of every group are then merged in pairs with that group's own
// accumulator registers by two CSA rows. All stored vectors are added
// outside the loop (CSA tree + CPA).
//
// Timing: one cycle when every compressor row is on its short path, else
// LONG_CYCLES (vls_ctrl). The structure follows the architecture; the
// handshake, clear and cycle counts are this design's choice. N must be a
// multiple of 4.
module mac_type3
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
  localparam int unsigned G = N / 4;

  if (N % 4 != 0) begin : g_bad_n
    $error("mac_type3: N must be a multiple of 4");
  end

  logic [ACC_W-1:0] pps   [N];
  logic [ACC_W-1:0] acc_s [G];
  logic [ACC_W-1:0] acc_c [G];
  logic [ACC_W-1:0] nxt_s [G];
  logic [ACC_W-1:0] nxt_c [G];
  logic [ACC_W-1:0] merge_rows [2*G];
  logic [G-1:0]     grp_short;
  logic             acc_en;

  pp_gen #(.N(N), .W(ACC_W)) u_pp (.a(a), .b(b), .pps(pps));

  for (genvar k = 0; k < G; k++) begin : g_grp
    logic [ACC_W-1:0] cp_s, cp_c, l1_s, l1_c;

    vls_comp42_row #(.W(ACC_W)) u_comp (
      .x1(pps[4*k]), .x2(pps[4*k+1]), .x3(pps[4*k+2]), .x4(pps[4*k+3]),
      .b_hi(b[4*k+3]), .b_lo(b[4*k+2]),
      .s(cp_s), .c(cp_c)
    );
    csa #(.W(ACC_W)) u_ac1 (.x(cp_s), .y(cp_c), .z(acc_s[k]),
                            .s(l1_s), .c(l1_c));
    csa #(.W(ACC_W)) u_ac2 (.x(l1_s), .y(l1_c), .z(acc_c[k]),
                            .s(nxt_s[k]), .c(nxt_c[k]));

    assign grp_short[k]      = ~(b[4*k+3] | b[4*k+2]);
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
