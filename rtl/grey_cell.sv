// grey_cell: Brent-Kung prefix operator that produces only a group generate.
//
//   G(i:j) = G(i:k) | (P(i:k) & G(k-1:j))
// Used where the joined span reaches bit 0, so its generate is already the
// carry out of bit i and no group propagate is needed any more. One AND and
// one OR, built from the MGDI gate cells. Purely combinational.
module grey_cell (
  input  logic g_hi,   // G(i:k)
  input  logic p_hi,   // P(i:k)
  input  logic g_lo,   // G(k-1:j)
  output logic g       // G(i:j)
);
  logic pg;

  mgdi_and2 u_and_pg (.a(p_hi), .b(g_lo), .y(pg));
  mgdi_or2  u_or_g   (.a(g_hi), .b(pg),   .y(g));
endmodule
