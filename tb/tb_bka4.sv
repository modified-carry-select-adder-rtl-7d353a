// tb_bka4: exhaustive self-check of the 4-bit Brent-Kung adder over all
// 512 combinations of a, b and carry-in against integer addition. It also
// counts the carry-in cases that must ripple through all four bits
// (a + b = 15 with carry-in 1), where only a carry-in that reaches the
// prefix network gives the right result, and fails if none occurred.
module tb_bka4;
  logic [3:0] a, b, sum;
  logic       cin, cout;
  int checks = 0, failures = 0, full_ripple = 0;

  bka4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    for (int v = 0; v < 512; v++) begin
      {cin, a, b} = 9'(v);
      #1;
      exp = int'(a) + int'(b) + int'(cin);
      if (cin && (int'(a) + int'(b) == 15)) full_ripple++;
      checks++;
      if ({cout, sum} !== 5'(exp)) begin
        failures++;
        $display("FAIL a=%0d b=%0d cin=%0b -> cout=%0b sum=%0d expected %0d",
                 a, b, cin, cout, sum, exp);
      end
    end
    checks++;
    if (full_ripple == 0) begin
      failures++;
      $display("FAIL no full-ripple carry-in case exercised");
    end
    $display("full-ripple carry-in cases: %0d", full_ripple);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
