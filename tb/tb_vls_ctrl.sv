// Self-checking testbench of vls_ctrl with LONG_CYCLES = 2 and 3: random
// requests with random short/long flags; checks that in_ready/acc_en come
// after exactly 1 or LONG_CYCLES cycles, that done follows one cycle
// later, that long_busy is high only while a long operation settles, and
// that clear abandons a long operation.
module tb_vls_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, short_path = 1'b0;
  logic [1:0] in_valid = 2'b00;
  logic [1:0] in_ready, acc_en, done, long_busy;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vls_ctrl #(.LONG_CYCLES(2)) dut2 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid[0]),
    .short_path(short_path), .in_ready(in_ready[0]), .acc_en(acc_en[0]),
    .done(done[0]), .long_busy(long_busy[0]));
  vls_ctrl #(.LONG_CYCLES(3)) dut3 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .in_valid(in_valid[1]),
    .short_path(short_path), .in_ready(in_ready[1]), .acc_en(acc_en[1]),
    .done(done[1]), .long_busy(long_busy[1]));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One request on instance idx (0: two cycles, 1: three cycles).
  task automatic request(int idx, bit sp);
    int cyc;
    int expc;
    expc       = sp ? 1 : idx + 2;
    in_valid[idx] = 1'b1;
    short_path = sp;
    cyc        = 1;
    #1;
    check(long_busy[idx] == 1'b0, "long_busy high at the start");
    while (!in_ready[idx] && cyc < 10) begin
      @(negedge clk);
      #1;
      cyc++;
      check(long_busy[idx] == 1'b1, "long_busy low while waiting");
    end
    check(cyc == expc, $sformatf("latency %0d expected %0d", cyc, expc));
    check(acc_en[idx] == in_ready[idx], "acc_en differs from in_ready");
    @(negedge clk);
    in_valid[idx] = 1'b0;
    check(done[idx] == 1'b1, "done missing");
    #1;
    check(in_ready[idx] == 1'b0, "in_ready without in_valid");
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 400; i++) begin
      // drive one instance at a time; every fourth request is abandoned
      // half-way by a clear pulse
      if (i % 4 == 3) begin
        in_valid[i % 2] = 1'b1;
        short_path      = 1'b0;
        @(negedge clk);
        #1;
        check(long_busy[i % 2] == 1'b1, "long operation not started");
      end else begin
        request(i % 2, 1'($urandom));
      end
      clear = 1'b1;
      @(negedge clk);
      #1;
      check(in_ready == 2'b00, "in_ready during clear");
      clear = 1'b0;
      in_valid = 2'b00;
      @(negedge clk);
      #1;
      check(long_busy == 2'b00, "clear did not return to idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
