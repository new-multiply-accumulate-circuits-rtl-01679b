// Self-checking testbench of pp_gen at N = 8: each level i must equal
// b_i ? A << i : 0, and the levels must add up to A x B.
module tb_pp_gen;
  localparam int unsigned N = 8;
  localparam int unsigned W = 16;
  logic [N-1:0] a, b;
  logic [W-1:0] pps [N];
  logic [W-1:0] total;
  int checks = 0, failures = 0;

  pp_gen #(.N(N), .W(W)) dut (.a(a), .b(b), .pps(pps));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = N'($urandom);
      b = N'($urandom);
      #1;
      total = '0;
      for (int l = 0; l < N; l++) begin
        checks++;
        if (pps[l] != (b[l] ? (W'(a) << l) : W'(0))) begin
          failures++;
          if (failures <= 10) $display("FAIL: level %0d = %h for a=%h b=%h", l, pps[l], a, b);
        end
        total = total + pps[l];
      end
      checks++;
      if (total != W'(a) * W'(b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
