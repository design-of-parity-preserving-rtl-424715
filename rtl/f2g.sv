// Double Feynman gate (F2G), a 3x3 parity-preserving reversible gate.
//   P = A,  Q = A ^ B,  R = A ^ C
// With B = C = 0 it copies A twice (the fan-out generator of reversible
// logic, where a wire may not branch); with B = 1 the Q output carries the
// complement of A. Quantum cost 2. Purely combinational.
module f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
