// mgdi_and2: two-input AND gate.
//
// In the adder this gate stands for a 2-transistor modified gate diffusion input
// (MGDI) cell. MGDI changes only the transistor count, area and power of
// the gate, not its logic, so the RTL describes the logic function alone:
// y = a AND b. Purely combinational, no clock.
module mgdi_and2 (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a & b;
endmodule
