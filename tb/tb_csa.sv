// Self-checking testbench of csa: random and corner vectors at W = 16;
// checks s = x^y^z bit by bit and s + c == x + y + z mod 2^16.
module tb_csa;
  localparam int unsigned W = 16;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      case (i)
        0:       begin x = '1; y = '1; z = '1; end
        1:       begin x = '0; y = '0; z = '0; end
        default: begin x = W'($urandom); y = W'($urandom); z = W'($urandom); end
      endcase
      #1;
      check(s == (x ^ y ^ z), $sformatf("sum %h for %h %h %h", s, x, y, z));
      check(W'(s + c) == W'(x + y + z),
            $sformatf("s+c %h != %h", W'(s + c), W'(x + y + z)));
      check(c[0] == 1'b0, "carry vector bit 0 not zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
