// tb_mux2: exhaustive self-check of the 2:1 mux over all eight input
// combinations: sel = 0 must give in0, sel = 1 must give in1.
module tb_mux2;
  logic in0, in1, sel, out;
  int checks = 0, failures = 0;

  mux2 dut (.in0(in0), .in1(in1), .sel(sel), .out(out));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 8; v++) begin
      {sel, in1, in0} = 3'(v);
      #1;
      exp = (v >= 4) ? 1'(v >> 1) : 1'(v);
      checks++;
      if (out !== exp) begin
        failures++;
        $display("FAIL sel=%0b in1=%0b in0=%0b out=%0b expected %0b",
                 sel, in1, in0, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
