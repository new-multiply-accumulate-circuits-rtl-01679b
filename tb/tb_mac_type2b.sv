// Self-checking testbench of mac_type2b, the Type-II-B VLS MAC (shared accumulator rows) at its default size.
//
// A stream of operand pairs is offered with random idle gaps and the
// occasional clear. The multiplier operand B is drawn from several
// distributions (uniform, upper half zero, sparse bits, zero, all ones) so
// that both the short and the long data path are taken many times. For
// every operation the testbench checks, against its own model:
//   - short_path against the architecture's short-path condition on B,
//     written here independently of the RTL,
//   - the latency: 1 cycle on the short path, LONG_CYCLES on the long path,
//   - done one cycle after the pair is consumed and the running sum
//     result == sum(a*b) mod 2^ACC_W.
// It fails if either path was never taken.
module tb_mac_type2b;
  import vls_mac_pkg::*;

  localparam int unsigned N     = DEFAULT_N;
  localparam int unsigned ACC_W = 2 * N;
  localparam int unsigned LONGC = DEFAULT_LONG_CYCLES;
  localparam int unsigned NOPS  = 3000;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             clear = 1'b0;
  logic             in_valid = 1'b0;
  logic [N-1:0]     a = '0;
  logic [N-1:0]     b = '0;
  logic             in_ready, short_path, done, long_busy;
  logic [ACC_W-1:0] result;

  int checks = 0, failures = 0;
  int n_short = 0, n_long = 0, n_clear = 0;

  always #5 clk = ~clk;

  mac_type2b dut (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid),
    .a(a), .b(b), .in_ready(in_ready), .short_path(short_path),
    .done(done), .long_busy(long_busy), .result(result)
  );

  // Short-path condition of the architecture, computed from B alone.
  function automatic bit exp_short(logic [N-1:0] bb);
    // the N/2 most significant bits of B are all zero
    return (bb >> (N / 2)) == '0;
  endfunction

  function automatic logic [N-1:0] gen_b();
    logic [N-1:0] v;
    case ($urandom % 6)
      0, 1: v = N'($urandom);
      2:    v = N'($urandom) & N'((1 << (N / 2)) - 1);
      3: begin
        v = '0;
        for (int i = 0; i < N; i++) if ($urandom % 5 == 0) v[i] = 1'b1;
      end
      4:    v = '0;
      default: v = '1;
    endcase
    return v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (NOPS * (LONGC + 4) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [ACC_W-1:0] ref_acc;
    int unsigned      cyc;
    bit               es;

    ref_acc = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(result == '0, "result not zero after reset");

    for (int op = 0; op < NOPS; op++) begin
      if ($urandom % 64 == 0) begin
        clear = 1'b1;
        @(negedge clk);
        clear = 1'b0;
        ref_acc = '0;
        n_clear++;
        check(result == '0, "result not zero after clear");
      end
      if ($urandom % 4 == 0) begin
        repeat ($urandom % 3 + 1) @(negedge clk);
        check(result == ref_acc, "result changed while idle");
      end

      a        = N'($urandom);
      b        = gen_b();
      in_valid = 1'b1;
      es       = exp_short(b);
      #1;
      check(short_path == es, $sformatf("short_path=%0b expected %0b for b=%h",
                                        short_path, es, b));
      cyc = 1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
        cyc++;
        if (cyc > 10 * LONGC) break;
      end
      check(cyc == (es ? 1 : LONGC),
            $sformatf("latency %0d cycles, expected %0d", cyc, es ? 1 : LONGC));
      if (es) n_short++; else n_long++;
      ref_acc = ref_acc + ACC_W'(ACC_W'(a) * ACC_W'(b));
      @(negedge clk);
      in_valid = 1'b0;
      check(done == 1'b1, "done not raised after the operation");
      check(result == ref_acc, $sformatf("result %h expected %h (a=%h b=%h)",
                                         result, ref_acc, a, b));
    end

    check(n_short > 0, "short path never taken");
    check(n_long > 0, "long path never taken");
    check(n_clear > 0, "clear never used");
    $display("short=%0d long=%0d clears=%0d", n_short, n_long, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
