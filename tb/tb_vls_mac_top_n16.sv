// End-to-end testbench of vls_mac_top, sized for 16 x 16 operands.
//
// All five MAC lanes receive the same stream of operand pairs; each lane
// consumes a pair on its own schedule (1 cycle on its short path,
// LONG_CYCLES on its long path) and the testbench drops that lane's
// in_valid as soon as it is consumed. After every pair all five results
// must equal the running sum of a*b mod 2^ACC_W computed here. B is drawn
// so that every lane takes both paths; the lanes disagree on which pairs
// are short, which also exercises the lanes running out of step.
// Mechanisms counted, each of which must happen at least once per lane:
// short-path operation, long-path operation (a stall of in_ready),
// accumulator clear, idle cycles, and a long run of operations that
// wraps the ACC_W-bit accumulator.
module tb_vls_mac_top_n16;
  import vls_mac_pkg::*;

  localparam int unsigned N     = 16;
  localparam int unsigned ACC_W = 2 * N;
  localparam int unsigned L     = NUM_MAC_TYPES;
  localparam int unsigned LONGC = DEFAULT_LONG_CYCLES;
  localparam int unsigned NOPS  = 1000;

  logic                  clk = 1'b0;
  logic                  rst_n = 1'b0;
  logic [L-1:0]          clear = '0;
  logic [L-1:0]          in_valid = '0;
  logic [N-1:0]          a [L];
  logic [N-1:0]          b [L];
  logic [L-1:0]          in_ready, short_path, done, long_busy;
  logic [ACC_W-1:0]      result [L];

  int checks = 0, failures = 0;
  int n_short [L];
  int n_long  [L];
  int n_clear = 0, n_idle = 0, n_wrap = 0;

  always #5 clk = ~clk;

  vls_mac_top #(.N(16)) dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .a(a), .b(b), .in_ready(in_ready), .short_path(short_path),
    .done(done), .long_busy(long_busy), .result(result)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic logic [N-1:0] gen_b();
    logic [N-1:0] v;
    case ($urandom % 6)
      0, 1: v = N'({$urandom, $urandom});
      2:    v = N'({$urandom, $urandom}) & N'((64'd1 << (N / 2)) - 1);
      3: begin
        v = '0;
        for (int i = 0; i < N; i++) if ($urandom % 6 == 0) v[i] = 1'b1;
      end
      4:    v = '0;
      default: v = '1;
    endcase
    return v;
  endfunction

  initial begin : watchdog
    repeat (NOPS * (LONGC + 5) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [ACC_W-1:0] ref_acc;
    logic [ACC_W:0]   wide;
    logic [N-1:0]     av, bv;
    logic [L-1:0]     pending;
    int               cyc;
    int               lat [L];

    for (int l = 0; l < L; l++) begin
      n_short[l] = 0;
      n_long[l]  = 0;
      a[l] = '0;
      b[l] = '0;
    end
    ref_acc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int op = 0; op < NOPS; op++) begin
      if (op % 97 == 50) begin
        clear = '1;
        @(negedge clk);
        clear = '0;
        ref_acc = '0;
        n_clear++;
        for (int l = 0; l < L; l++)
          check(result[l] == '0, $sformatf("lane %0d not cleared", l));
      end
      if ($urandom % 8 == 0) begin
        @(negedge clk);
        n_idle++;
        for (int l = 0; l < L; l++)
          check(result[l] == ref_acc, $sformatf("lane %0d changed while idle", l));
      end

      av = N'({$urandom, $urandom});
      bv = (op % 97 < 20) ? '1 : gen_b();   // runs of all-ones B force wrap
      for (int l = 0; l < L; l++) begin
        a[l] = av;
        b[l] = bv;
        lat[l] = 0;
      end
      in_valid = '1;
      pending  = '1;
      cyc      = 0;
      while (pending != '0 && cyc < 10 * LONGC) begin
        #1;
        cyc++;
        for (int l = 0; l < L; l++) begin
          if (pending[l] && in_ready[l]) begin
            lat[l]     = cyc;
            pending[l] = 1'b0;
            check((cyc == 1) == short_path[l],
                  $sformatf("lane %0d latency %0d with short_path=%0b", l, cyc, short_path[l]));
            if (short_path[l]) n_short[l]++; else n_long[l]++;
          end else if (pending[l]) begin
            check(!short_path[l], $sformatf("lane %0d stalled on short path", l));
          end
        end
        @(negedge clk);
        in_valid = pending;
      end
      wide = {1'b0, ref_acc} + (ACC_W + 1)'(ACC_W'(av) * ACC_W'(bv));
      if (wide[ACC_W]) n_wrap++;
      ref_acc = wide[ACC_W-1:0];
      #1;
      for (int l = 0; l < L; l++) begin
        check(lat[l] == 1 || lat[l] == int'(LONGC),
              $sformatf("lane %0d latency %0d", l, lat[l]));
        check(result[l] == ref_acc,
              $sformatf("lane %0d result %h expected %h (a=%h b=%h)",
                        l, result[l], ref_acc, av, bv));
      end
    end

    for (int l = 0; l < L; l++) begin
      $display("lane %0d: short=%0d long=%0d", l, n_short[l], n_long[l]);
      check(n_short[l] > 0, $sformatf("lane %0d never took its short path", l));
      check(n_long[l] > 0, $sformatf("lane %0d never took its long path", l));
    end
    $display("clears=%0d idle=%0d wraps=%0d", n_clear, n_idle, n_wrap);
    check(n_clear > 0, "clear never used");
    check(n_idle > 0, "no idle cycle");
    check(n_wrap > 0, "accumulator never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
