// mcsa_pkg: constants shared by the modified carry select adder.
//
// The adder is built from 4-bit Brent-Kung groups. BKA_BITS is that group
// width; it is fixed because the Brent-Kung carry network (carry_generation)
// is the hand-drawn 4-bit network, not a generator for arbitrary widths.
package mcsa_pkg;
  localparam int unsigned BKA_BITS = 4;
endpackage
