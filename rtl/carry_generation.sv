// carry_generation: 4-bit Brent-Kung carry network.
//
// Inputs are the per-bit generate/propagate pairs of one 4-bit group; the
// outputs c[i] = G(i:0) are the carries out of bit i (no carry-in: a
// carry-in is merged into g[0] by the caller). The network is:
//   level 1: black cell (G3,P3 with G2,P2)  -> G(3:2), P(3:2)
//            grey  cell (G1,P1 with G0)     -> C1 = G(1:0)
//   level 2: grey  cell (G(3:2),P(3:2) with C1) -> C3 = G(3:0)
//            grey  cell (G2,P2 with C1)          -> C2 = G(2:0)
//   C0 = G0.
// This is the cell arrangement of the 4-bit network with one black and
// three grey cells. The buffer cells that balance the load on the
// unprocessed paths (G0, P0, G2/P2, C1, C3) are plain wires here. P0 is
// passed through as p0_out as in that network; the sum stage needs it.
// Purely combinational; the longest path is two prefix levels.
module carry_generation (
  input  logic [3:0] g,
  input  logic [3:0] p,
  output logic [3:0] c,
  output logic       p0_out
);
  logic g32, p32;

  black_cell u_black_32 (.g_hi(g[3]), .p_hi(p[3]), .g_lo(g[2]), .p_lo(p[2]),
                         .g(g32), .p(p32));
  grey_cell  u_grey_10  (.g_hi(g[1]), .p_hi(p[1]), .g_lo(g[0]), .g(c[1]));
  grey_cell  u_grey_30  (.g_hi(g32),  .p_hi(p32),  .g_lo(c[1]), .g(c[3]));
  grey_cell  u_grey_20  (.g_hi(g[2]), .p_hi(p[2]), .g_lo(c[1]), .g(c[2]));

  assign c[0]   = g[0];
  assign p0_out = p[0];
endmodule
