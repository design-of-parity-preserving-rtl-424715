// Fredkin gate (FRG), a 3x3 parity-preserving reversible gate: a controlled
// swap of B and C steered by A.
//   P = A,  Q = ~A&B | A&C,  R = ~A&C | A&B
// With C = 0 it yields Q = ~A&B and R = A&B, so one gate gives a product bit
// and, on Q, a product with an inverted operand, while A passes through on P.
// Quantum cost 5. Purely combinational.
module frg (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
