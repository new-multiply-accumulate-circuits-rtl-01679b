// Exhaustive self-checking testbench of vls_comp42 over x1..x4, cin and the
// two select bits (128 cases):
//   - select bits not both zero: outputs equal the conventional compressor
//     equations, and the column sum is exact;
//   - both zero: sum = x1^x2, carry = x1&x2, and when x3 = x4 = cin = 0
//     (what two zero levels imply) the column sum is exact.
module tb_vls_comp42;
  logic x1, x2, x3, x4, cin, b_hi, b_lo, sum, carry, cout;
  logic e_sum, e_carry, e_cout;
  int checks = 0, failures = 0;

  vls_comp42 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                  .b_hi(b_hi), .b_lo(b_lo),
                  .sum(sum), .carry(carry), .cout(cout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s x=%b cin=%b b=%b%b", what,
                                   {x4, x3, x2, x1}, cin, b_hi, b_lo);
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
    for (int v = 0; v < 128; v++) begin
      {b_hi, b_lo, cin, x4, x3, x2, x1} = 7'(v);
      #1;
      if (b_hi || b_lo) begin
        e_cout  = (x4 != x3) ? x2 : x4;
        e_carry = ((x1 + x2 + x3 + x4) % 2 == 1) ? cin : x1;
        e_sum   = 1'((x1 + x2 + x3 + x4 + cin) % 2);
        check(sum == e_sum && carry == e_carry && cout == e_cout, "long path");
        check(int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin) ==
              int'(sum) + 2 * (int'(carry) + int'(cout)), "long path not exact");
      end else begin
        check(sum == (x1 ^ x2) && carry == (x1 & x2), "short path");
        if (!x3 && !x4 && !cin)
          check(int'(x1) + int'(x2) == int'(sum) + 2 * (int'(carry) + int'(cout)),
                "short path not exact");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
