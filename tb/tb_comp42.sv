// Exhaustive self-checking testbench of comp42: for all 32 input
// combinations, x1+x2+x3+x4+cin == sum + 2*(carry+cout), and cout must not
// depend on cin.
module tb_comp42;
  logic x1, x2, x3, x4, cin, sum, carry, cout, cout_c0;
  int checks = 0, failures = 0;

  comp42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
              .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x4, x3, x2, x1} = 4'(v);
      for (int ci = 0; ci < 2; ci++) begin
        cin = 1'(ci);
        #1;
        if (ci == 0) cout_c0 = cout;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin) !=
            int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL: x=%b cin=%b -> sum=%b carry=%b cout=%b",
                   {x4, x3, x2, x1}, cin, sum, carry, cout);
        end
        checks++;
        if (cout != cout_c0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
