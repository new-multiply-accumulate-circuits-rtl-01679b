// Self-checking testbench of vls_comp42_row at W = 16. Four random levels
// are compressed; when the select bits are zero the levels on x3 and x4 are
// made zero, as a zero multiplier bit would. In every case s + c must equal
// x1 + x2 + x3 + x4 mod 2^16; in the short case s must be x1 ^ x2.
module tb_vls_comp42_row;
  localparam int unsigned W = 16;
  logic [W-1:0] x1, x2, x3, x4, s, c;
  logic         b_hi, b_lo;
  int checks = 0, failures = 0, n_short = 0;

  vls_comp42_row #(.W(W)) dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4),
                               .b_hi(b_hi), .b_lo(b_lo), .s(s), .c(c));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      x1   = W'($urandom);
      x2   = W'($urandom);
      b_hi = 1'($urandom);
      b_lo = 1'($urandom);
      x4   = b_hi ? W'($urandom) : '0;
      x3   = b_lo ? W'($urandom) : '0;
      #1;
      checks++;
      if (W'(s + c) != W'(x1 + x2 + x3 + x4)) begin
        failures++;
        if (failures <= 10) $display("FAIL: %h+%h+%h+%h -> %h", x1, x2, x3, x4, W'(s + c));
      end
      if (!b_hi && !b_lo) begin
        n_short++;
        checks++;
        if (s != (x1 ^ x2)) failures++;
      end
    end
    checks++;
    if (n_short == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
