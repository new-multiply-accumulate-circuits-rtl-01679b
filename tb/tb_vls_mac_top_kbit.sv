// End-to-end testbench of vls_mac_top at default parameters, running the
// narrow-operand workload: K-bit operands (K = N/2) on the N-bit MACs, as
// when a wide MAC serves a narrower word length or small positive values.
// Here the upper half of B is always zero, so the Type-II lanes must take
// their short path on every operation; the testbench checks that and
// reports the average cycles per operation of every lane.
//
// As in the general test, all five lanes receive the same operand stream;
// each lane consumes a pair on its own schedule (1 cycle on its short
// path, LONG_CYCLES on its long path) and the testbench drops that lane's
// in_valid as soon as it is consumed. After every pair all five results
// must equal the running sum of a*b mod 2^ACC_W computed here.
// Mechanisms counted: short-path operations (every lane), long-path
// operations (every lane but Type-II, which must have none), clears and
// idle cycles. Narrow products cannot wrap the accumulator between clears.
module tb_vls_mac_top_kbit;
  import vls_mac_pkg::*;

  localparam int unsigned N     = DEFAULT_N;
  localparam int unsigned ACC_W = 2 * N;
  localparam int unsigned L     = NUM_MAC_TYPES;
  localparam int unsigned LONGC = DEFAULT_LONG_CYCLES;
  localparam int unsigned NOPS  = 2000;
  localparam int unsigned K     = N / 2;
  localparam logic [N-1:0] KMASK = N'((64'd1 << K) - 1);

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

  vls_mac_top dut (
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

      av = N'({$urandom, $urandom}) & KMASK;
      bv = ((op % 97 < 20) ? '1 : gen_b()) & KMASK;   // runs of all-ones B
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
            if (l == int'(MAC_TYPE2A) || l == int'(MAC_TYPE2B))
              check(short_path[l] && cyc == 1,
                    $sformatf("Type-II lane %0d not short on a K-bit operand", l));
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
      if (l != int'(MAC_TYPE2A) && l != int'(MAC_TYPE2B))
        check(n_long[l] > 0, $sformatf("lane %0d never took its long path", l));
      $display("lane %0d: %0d.%02d cycles per operation", l,
               (n_short[l] + int'(LONGC) * n_long[l]) / NOPS,
               ((n_short[l] + int'(LONGC) * n_long[l]) * 100 / NOPS) % 100);
    end
    $display("clears=%0d idle=%0d wraps=%0d", n_clear, n_idle, n_wrap);
    check(n_clear > 0, "clear never used");
    check(n_idle > 0, "no idle cycle");
    check(n_long[MAC_TYPE2A] == 0 && n_long[MAC_TYPE2B] == 0,
          "a Type-II lane took its long path");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
