// Self-checking testbench of csa_tree: trees of 7 and 2 rows (W = 16) with
// random rows; checks s + c against the plain sum of the rows mod 2^16.
module tb_csa_tree;
  localparam int unsigned W = 16;
  logic [W-1:0] rows7 [7];
  logic [W-1:0] rows2 [2];
  logic [W-1:0] s7, c7, s2, c2, ref7;
  int checks = 0, failures = 0;

  csa_tree #(.W(W), .M(7)) dut7 (.rows(rows7), .s(s7), .c(c7));
  csa_tree #(.W(W), .M(2)) dut2 (.rows(rows2), .s(s2), .c(c2));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      ref7 = '0;
      for (int r = 0; r < 7; r++) begin
        rows7[r] = (i == 0) ? '1 : W'($urandom);
        ref7     = ref7 + rows7[r];
      end
      rows2[0] = W'($urandom);
      rows2[1] = W'($urandom);
      #1;
      checks++;
      if (W'(s7 + c7) != ref7) begin
        failures++;
        if (failures <= 10) $display("FAIL: 7-row sum %h expected %h", W'(s7 + c7), ref7);
      end
      checks++;
      if (W'(s2 + c2) != W'(rows2[0] + rows2[1])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
