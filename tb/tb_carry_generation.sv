// tb_carry_generation: exhaustive self-check of the 4-bit Brent-Kung carry
// network over all 256 generate/propagate patterns. The reference is a
// serial carry chain, c(i) = g(i) | p(i) & c(i-1) with c(-1) = 0, so it
// shares nothing with the prefix tree it checks.
module tb_carry_generation;
  logic [3:0] g, p, c;
  logic       p0_out;
  int checks = 0, failures = 0;

  carry_generation dut (.g(g), .p(p), .c(c), .p0_out(p0_out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] ec;
    logic       run;
    for (int v = 0; v < 256; v++) begin
      {g, p} = 8'(v);
      #1;
      run = 1'b0;
      for (int i = 0; i < 4; i++) begin
        run   = g[i] | (p[i] & run);
        ec[i] = run;
      end
      checks += 2;
      if (c !== ec) begin
        failures++;
        $display("FAIL g=%b p=%b c=%b expected %b", g, p, c, ec);
      end
      if (p0_out !== p[0]) begin
        failures++;
        $display("FAIL p0_out=%b expected %b", p0_out, p[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
