// tb_modified_csa_widths: checks the carry select adder at widths other than
// the default 16 bits: exhaustively at 8 bits (two groups, all 2^17 inputs)
// and with pseudo-random operands at 32 bits (eight groups), against
// integer addition.
module tb_modified_csa_widths;
  logic [7:0]  a8, b8, s8;
  logic [31:0] a32, b32, s32;
  logic        c8, co8, c32, co32;
  int checks = 0, failures = 0;

  modified_csa #(.WIDTH(8))  dut8  (.a(a8),  .b(b8),  .cin(c8),  .sum(s8),  .cout(co8));
  modified_csa #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(co32));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp;
    a32 = '0; b32 = '0; c32 = 1'b0;
    for (int v = 0; v < (1 << 17); v++) begin
      {c8, a8, b8} = 17'(v);
      #1;
      exp = longint'(a8) + longint'(b8) + longint'(c8);
      checks++;
      if ({co8, s8} !== 9'(exp)) begin
        failures++;
        if (failures < 20) $display("FAIL w8 a=%h b=%h cin=%0b -> %0b_%h", a8, b8, c8, co8, s8);
      end
    end
    for (int n = 0; n < 50000; n++) begin
      a32 = $urandom;
      b32 = (n % 4 == 3) ? ~a32 : $urandom;
      c32 = 1'($urandom);
      #1;
      exp = longint'(a32) + longint'(b32) + longint'(c32);
      checks++;
      if ({co32, s32} !== 33'(exp)) begin
        failures++;
        if (failures < 20) $display("FAIL w32 a=%h b=%h cin=%0b -> %0b_%h", a32, b32, c32, co32, s32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
