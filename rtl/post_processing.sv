// post_processing: last stage of the parallel prefix adder.
//
// Each sum bit is the propagate of its position XORed with the carry that
// enters it:  s[i] = p[i] ^ c[i], where c[0] is the group carry-in and
// c[i] (i > 0) is the carry out of bit i-1 from the carry network. One MGDI
// XOR cell per bit. The buffer cells that follow each XOR in the transistor
// schematic only restore drive strength and are plain wires here.
// Purely combinational.
module post_processing #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] c,   // carry into each bit
  output logic [WIDTH-1:0] s
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mgdi_xor2 u_xor (.a(p[i]), .b(c[i]), .y(s[i]));
  end
endmodule
