// tb_grey_cell: exhaustive self-check of the grey cell: the joined span
// generates a carry if the high span generates one, or propagates the one
// generated below it.
module tb_grey_cell;
  logic g_hi, p_hi, g_lo, g;
  int checks = 0, failures = 0;

  grey_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g(g));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic eg;
    for (int v = 0; v < 8; v++) begin
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      eg = g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0);
      checks++;
      if (g !== eg) begin
        failures++;
        $display("FAIL in=%03b g=%0b expected %0b", v[2:0], g, eg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
