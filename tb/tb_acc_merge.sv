// Self-checking testbench of acc_merge with 4 and 8 rows (W = 16): the
// output must be the sum of all rows mod 2^16.
module tb_acc_merge;
  localparam int unsigned W = 16;
  logic [W-1:0] rows4 [4];
  logic [W-1:0] rows8 [8];
  logic [W-1:0] sum4, sum8, ref4, ref8;
  int checks = 0, failures = 0;

  acc_merge #(.W(W), .M(4)) dut4 (.rows(rows4), .sum(sum4));
  acc_merge #(.W(W), .M(8)) dut8 (.rows(rows8), .sum(sum8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      ref4 = '0;
      ref8 = '0;
      for (int r = 0; r < 8; r++) begin
        rows8[r] = W'($urandom);
        ref8     = ref8 + rows8[r];
        if (r < 4) begin
          rows4[r] = W'($urandom);
          ref4     = ref4 + rows4[r];
        end
      end
      #1;
      checks += 2;
      if (sum4 != ref4) failures++;
      if (sum8 != ref8) begin
        failures++;
        if (failures <= 10) $display("FAIL: 8-row sum %h expected %h", sum8, ref8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
