// tb_mgdi_or2: exhaustive self-check of the two-input or gate against
// its truth table, written out literally rather than with the operator.
module tb_mgdi_or2;
  logic a, b, y;
  int checks = 0, failures = 0;
  logic [3:0] truth;   // truth[{a,b}]

  mgdi_or2 dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    case ("or")
      "and":   truth = 4'b1000;
      "or":    truth = 4'b1110;
      default: truth = 4'b0110;
    endcase
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== truth[v]) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b expected %0b", a, b, y, truth[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
