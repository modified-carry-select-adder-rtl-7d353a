// tb_black_cell: exhaustive self-check of the black cell. The reference
// treats the two spans as small carry problems: the joined span generates
// a carry if the high span generates one, or propagates one generated by
// the low span; it propagates if both spans propagate.
module tb_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g, p;
  int checks = 0, failures = 0;

  black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo),
                  .g(g), .p(p));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg, ep;
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      eg = g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0);
      ep = (p_hi && p_lo);
      checks += 2;
      if (g !== eg) begin
        failures++;
        $display("FAIL g: in=%04b g=%0b expected %0b", v[3:0], g, eg);
      end
      if (p !== ep) begin
        failures++;
        $display("FAIL p: in=%04b p=%0b expected %0b", v[3:0], p, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
