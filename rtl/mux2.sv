// mux2: one-bit 2:1 multiplexer, out = sel ? in1 : in0.
//
// The carry select adder uses it to pick, per bit, between the result of
// the adder that assumed carry-in 0 (in0) and the one that assumed
// carry-in 1 (in1). Purely combinational.
module mux2 (
  input  logic in0,
  input  logic in1,
  input  logic sel,
  output logic out
);
  assign out = sel ? in1 : in0;
endmodule
