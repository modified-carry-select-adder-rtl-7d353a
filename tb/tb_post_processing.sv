// tb_post_processing: exhaustive self-check of the sum stage, 4 bits: each
// sum bit must be the low bit of propagate plus incoming carry.
module tb_post_processing;
  localparam int W = 4;
  logic [W-1:0] p, c, s;
  int checks = 0, failures = 0;

  post_processing dut (.p(p), .c(c), .s(s));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] es;
    for (int v = 0; v < (1 << (2 * W)); v++) begin
      {p, c} = (2 * W)'(v);
      #1;
      for (int i = 0; i < W; i++) es[i] = 1'((int'(p[i]) + int'(c[i])) % 2);
      checks++;
      if (s !== es) begin
        failures++;
        $display("FAIL p=%h c=%h s=%h expected %h", p, c, s, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
