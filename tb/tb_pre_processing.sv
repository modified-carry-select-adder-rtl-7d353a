// tb_pre_processing: exhaustive self-check of the 4-bit generate/propagate
// stage. The reference derives both from the two-bit sum of each bit pair:
// generate is its carry bit, propagate its sum bit.
module tb_pre_processing;
  localparam int W = 4;
  logic [W-1:0] a, b, g, p;
  int checks = 0, failures = 0;

  pre_processing dut (.a(a), .b(b), .g(g), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] eg, ep;
    logic [1:0]   s;
    for (int v = 0; v < (1 << (2 * W)); v++) begin
      {a, b} = (2 * W)'(v);
      #1;
      for (int i = 0; i < W; i++) begin
        s = 2'(a[i]) + 2'(b[i]);
        eg[i] = s[1];
        ep[i] = s[0];
      end
      checks++;
      if (g !== eg || p !== ep) begin
        failures++;
        $display("FAIL a=%h b=%h g=%h p=%h expected g=%h p=%h", a, b, g, p, eg, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
