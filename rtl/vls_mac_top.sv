// Top level: the five variable-latency speculative (VLS) multiply-accumulate
// architectures side by side, each a complete unsigned N x N MAC with its
// own operand handshake and result.
//
// Lane index = vls_mac_pkg::mac_type_e:
//   MAC_TYPE1A  pps levels merged in pairs, OR-gate short path
//   MAC_TYPE1B  pps levels merged in threes, two-OR-gate short path
//   MAC_TYPE2A  upper half of the levels skipped when B's upper half is 0
//   MAC_TYPE2B  as Type-II-A with shared accumulator CSA rows
//   MAC_TYPE3   VLS 4:2 compressor first stage
// Per lane: offer a[l], b[l] with in_valid[l]; the pair is consumed in the
// cycle in_ready[l] is high (1 cycle on the short path, LONG_CYCLES on the
// long path; short_path[l] says which). done[l] pulses the cycle after,
// when result[l] holds the running sum mod 2^ACC_W. clear[l] zeros the
// lane's accumulators. The lanes share only the clock and reset.
module vls_mac_top
  import vls_mac_pkg::*;
#(
  parameter int unsigned N           = DEFAULT_N,
  parameter int unsigned ACC_W       = 2 * N,
  parameter int unsigned LONG_CYCLES = DEFAULT_LONG_CYCLES
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM_MAC_TYPES-1:0] clear,
  input  logic [NUM_MAC_TYPES-1:0] in_valid,
  input  logic [N-1:0]             a      [NUM_MAC_TYPES],
  input  logic [N-1:0]             b      [NUM_MAC_TYPES],
  output logic [NUM_MAC_TYPES-1:0] in_ready,
  output logic [NUM_MAC_TYPES-1:0] short_path,
  output logic [NUM_MAC_TYPES-1:0] done,
  output logic [NUM_MAC_TYPES-1:0] long_busy,
  output logic [ACC_W-1:0]         result [NUM_MAC_TYPES]
);
  mac_type1a #(.N(N), .ACC_W(ACC_W), .LONG_CYCLES(LONG_CYCLES)) u_type1a (
    .clk(clk), .rst_n(rst_n), .clear(clear[MAC_TYPE1A]),
    .in_valid(in_valid[MAC_TYPE1A]), .a(a[MAC_TYPE1A]), .b(b[MAC_TYPE1A]),
    .in_ready(in_ready[MAC_TYPE1A]), .short_path(short_path[MAC_TYPE1A]),
    .done(done[MAC_TYPE1A]), .long_busy(long_busy[MAC_TYPE1A]),
    .result(result[MAC_TYPE1A])
  );

  mac_type1b #(.N(N), .ACC_W(ACC_W), .LONG_CYCLES(LONG_CYCLES)) u_type1b (
    .clk(clk), .rst_n(rst_n), .clear(clear[MAC_TYPE1B]),
    .in_valid(in_valid[MAC_TYPE1B]), .a(a[MAC_TYPE1B]), .b(b[MAC_TYPE1B]),
    .in_ready(in_ready[MAC_TYPE1B]), .short_path(short_path[MAC_TYPE1B]),
    .done(done[MAC_TYPE1B]), .long_busy(long_busy[MAC_TYPE1B]),
    .result(result[MAC_TYPE1B])
  );

  mac_type2a #(.N(N), .ACC_W(ACC_W), .LONG_CYCLES(LONG_CYCLES)) u_type2a (
    .clk(clk), .rst_n(rst_n), .clear(clear[MAC_TYPE2A]),
    .in_valid(in_valid[MAC_TYPE2A]), .a(a[MAC_TYPE2A]), .b(b[MAC_TYPE2A]),
    .in_ready(in_ready[MAC_TYPE2A]), .short_path(short_path[MAC_TYPE2A]),
    .done(done[MAC_TYPE2A]), .long_busy(long_busy[MAC_TYPE2A]),
    .result(result[MAC_TYPE2A])
  );

  mac_type2b #(.N(N), .ACC_W(ACC_W), .LONG_CYCLES(LONG_CYCLES)) u_type2b (
    .clk(clk), .rst_n(rst_n), .clear(clear[MAC_TYPE2B]),
    .in_valid(in_valid[MAC_TYPE2B]), .a(a[MAC_TYPE2B]), .b(b[MAC_TYPE2B]),
    .in_ready(in_ready[MAC_TYPE2B]), .short_path(short_path[MAC_TYPE2B]),
    .done(done[MAC_TYPE2B]), .long_busy(long_busy[MAC_TYPE2B]),
    .result(result[MAC_TYPE2B])
  );

  mac_type3 #(.N(N), .ACC_W(ACC_W), .LONG_CYCLES(LONG_CYCLES)) u_type3 (
    .clk(clk), .rst_n(rst_n), .clear(clear[MAC_TYPE3]),
    .in_valid(in_valid[MAC_TYPE3]), .a(a[MAC_TYPE3]), .b(b[MAC_TYPE3]),
    .in_ready(in_ready[MAC_TYPE3]), .short_path(short_path[MAC_TYPE3]),
    .done(done[MAC_TYPE3]), .long_busy(long_busy[MAC_TYPE3]),
    .result(result[MAC_TYPE3])
  );
endmodule
