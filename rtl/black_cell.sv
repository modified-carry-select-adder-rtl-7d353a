// black_cell: Brent-Kung prefix operator that merges two adjacent bit spans.
//
// Given the group generate/propagate of a high span (i:k) and of the span
// just below it (k-1:j) it forms the pair for the joined span (i:j):
//   G(i:j) = G(i:k) | (P(i:k) & G(k-1:j))
//   P(i:j) = P(i:k) & P(k-1:j)
// It is a grey cell (one AND, one OR) plus one more AND for the propagate,
// built here from the MGDI gate cells. Purely combinational.
module black_cell (
  input  logic g_hi,   // G(i:k)
  input  logic p_hi,   // P(i:k)
  input  logic g_lo,   // G(k-1:j)
  input  logic p_lo,   // P(k-1:j)
  output logic g,      // G(i:j)
  output logic p       // P(i:j)
);
  logic pg;

  mgdi_and2 u_and_pg (.a(p_hi), .b(g_lo), .y(pg));
  mgdi_or2  u_or_g   (.a(g_hi), .b(pg),   .y(g));
  mgdi_and2 u_and_p  (.a(p_hi), .b(p_lo), .y(p));
endmodule
