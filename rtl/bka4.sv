// bka4: 4-bit Brent-Kung (parallel prefix) adder with carry-in.
//
// Three stages:
//   1. pre_processing   g[i] = a[i] & b[i], p[i] = a[i] ^ b[i]
//   2. carry_generation Brent-Kung prefix network, carries c[i] = G(i:0)
//   3. post_processing  sum[i] = p[i] ^ carry into bit i
// The carry-in is taken into the carries by one grey cell in front of the
// prefix network, g0' = g[0] | (p[0] & cin), so that every carry, and not
// only sum[0], sees it. This is this design's own choice: without it the
// adder that is meant to assume carry-in 1 inside the carry select adder
// would not add that 1 into its carries. cout is the carry out of bit 3.
// Purely combinational.
module bka4
  import mcsa_pkg::*;
(
  input  logic [BKA_BITS-1:0] a,
  input  logic [BKA_BITS-1:0] b,
  input  logic                cin,
  output logic [BKA_BITS-1:0] sum,
  output logic                cout
);
  logic [BKA_BITS-1:0] g, p, g_in, c;
  logic                p0;

  pre_processing #(.WIDTH(BKA_BITS)) u_pre (.a(a), .b(b), .g(g), .p(p));

  // carry-in folded into bit 0's generate
  grey_cell u_grey_cin (.g_hi(g[0]), .p_hi(p[0]), .g_lo(cin), .g(g_in[0]));
  assign g_in[BKA_BITS-1:1] = g[BKA_BITS-1:1];

  carry_generation u_carry (.g(g_in), .p(p), .c(c), .p0_out(p0));

  post_processing #(.WIDTH(BKA_BITS)) u_post (
    .p ({p[BKA_BITS-1:1], p0}),
    .c ({c[BKA_BITS-2:0], cin}),
    .s (sum)
  );

  assign cout = c[BKA_BITS-1];
endmodule
