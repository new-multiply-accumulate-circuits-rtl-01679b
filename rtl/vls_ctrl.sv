// Variable-latency sequencer shared by all VLS MAC architectures.
//
// The clock period is meant to be set by the short data path. When the
// offered operands select the short path (short_path = 1) the product is
// accumulated in the same cycle it is accepted (latency 1). Otherwise the
// long path is treated as a multicycle path: the sequencer holds the
// accumulators for LONG_CYCLES-1 extra cycles, keeping in_ready low, and
// loads them in the last one. This design's choice: the operands follow a
// valid/ready rule and must stay unchanged while in_valid is high and
// in_ready low. clear zeros the accumulators (done by the MAC), blocks
// acceptance for that cycle and abandons a long operation in progress.
//
// Outputs: in_ready = acc_en = operand pair consumed this cycle;
// done = acc_en one cycle later (the MAC result then includes the product);
// long_busy = a long operation is settling.
module vls_ctrl
  import vls_mac_pkg::*;
#(
  parameter int unsigned LONG_CYCLES = DEFAULT_LONG_CYCLES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic short_path,
  output logic in_ready,
  output logic acc_en,
  output logic done,
  output logic long_busy
);
  localparam int unsigned CW = (LONG_CYCLES > 1) ? $clog2(LONG_CYCLES) : 1;

  ctrl_state_e    state, state_nxt;
  logic [CW-1:0]  cnt, cnt_nxt;

  always_comb begin
    state_nxt = state;
    cnt_nxt   = cnt;
    acc_en    = 1'b0;
    if (clear) begin
      state_nxt = CTRL_IDLE;
      cnt_nxt   = '0;
    end else if (state == CTRL_IDLE) begin
      if (in_valid) begin
        if (short_path || LONG_CYCLES <= 1) begin
          acc_en = 1'b1;
        end else begin
          state_nxt = CTRL_LONG;
          cnt_nxt   = CW'(1);
        end
      end
    end else begin
      if (32'(cnt) >= LONG_CYCLES - 1) begin
        acc_en    = 1'b1;
        state_nxt = CTRL_IDLE;
        cnt_nxt   = '0;
      end else begin
        cnt_nxt = cnt + CW'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= CTRL_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_nxt;
      cnt   <= cnt_nxt;
      done  <= acc_en;
    end
  end

  assign in_ready  = acc_en;
  assign long_busy = (state == CTRL_LONG);

  // A long operation is only entered with an operand pair offered, and the
  // pair must still be offered until it is consumed.
  a_hold_valid: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == CTRL_LONG && !clear) |-> in_valid)
    else $error("vls_ctrl: in_valid dropped during a long-path operation");
endmodule
