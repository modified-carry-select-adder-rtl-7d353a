// modified_csa: carry select adder whose ripple-carry adders are replaced by
// 4-bit Brent-Kung adders.
//
// The WIDTH-bit operands are cut into 4-bit groups. The lowest group is a
// single bka4 fed by the carry-in. Every higher group holds two bka4s that
// add the group's bits at the same time, one assuming a carry-in of 0 and
// one assuming 1, and five 2:1 muxes (four sum bits and the carry) that keep
// the right result once the carry out of the group below is known. That
// carry is the select of the muxes, so after the first group the carry
// passes from group to group through one mux each, not through an adder.
//
// Interface: sum = (a + b + cin) mod 2^WIDTH, cout = carry out of the top
// bit. Purely combinational, no clock and no latency in cycles.
//
// WIDTH = 16 and the 4-bit group size follow the design description; the
// carry-in port of the lowest group is this design's own choice (the
// description ties it to a source). WIDTH must be a multiple of 4.
module modified_csa
  import mcsa_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned GROUPS = WIDTH / BKA_BITS;

  if (WIDTH % BKA_BITS != 0 || WIDTH == 0) begin : g_bad_width
    $error("modified_csa: WIDTH must be a non-zero multiple of %0d", BKA_BITS);
  end

  // carry[k] is the carry out of group k
  logic [GROUPS-1:0] carry;

  // lowest group: one adder, real carry-in
  bka4 u_bka_g0 (
    .a(a[BKA_BITS-1:0]), .b(b[BKA_BITS-1:0]), .cin(cin),
    .sum(sum[BKA_BITS-1:0]), .cout(carry[0])
  );

  for (genvar k = 1; k < GROUPS; k++) begin : g_group
    localparam int unsigned LO = k * BKA_BITS;
    logic [BKA_BITS-1:0] sum0, sum1;
    logic                cout0, cout1;

    bka4 u_bka_c0 (.a(a[LO +: BKA_BITS]), .b(b[LO +: BKA_BITS]), .cin(1'b0),
                   .sum(sum0), .cout(cout0));
    bka4 u_bka_c1 (.a(a[LO +: BKA_BITS]), .b(b[LO +: BKA_BITS]), .cin(1'b1),
                   .sum(sum1), .cout(cout1));

    for (genvar i = 0; i < BKA_BITS; i++) begin : g_sum_mux
      mux2 u_mux (.in0(sum0[i]), .in1(sum1[i]), .sel(carry[k-1]),
                  .out(sum[LO + i]));
    end
    mux2 u_mux_carry (.in0(cout0), .in1(cout1), .sel(carry[k-1]),
                      .out(carry[k]));
  end

  assign cout = carry[GROUPS-1];
endmodule
