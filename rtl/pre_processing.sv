// pre_processing: first stage of the parallel prefix adder.
//
// For every bit position it forms the generate and propagate signals
//   g[i] = a[i] & b[i]      p[i] = a[i] ^ b[i]
// with one MGDI AND and one MGDI XOR cell per bit. WIDTH defaults to the
// 4 bits of one Brent-Kung group. Purely combinational.
module pre_processing #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] p
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    mgdi_and2 u_and (.a(a[i]), .b(b[i]), .y(g[i]));
    mgdi_xor2 u_xor (.a(a[i]), .b(b[i]), .y(p[i]));
  end
endmodule
