// ZPLG, a 5x5 parity-preserving reversible gate used as the full adder.
//   P = A
//   Q = A ^ B
//   R = A ^ B ^ C                      (sum when D = E = 0)
//   S = (A^B)&C ^ A&B ^ D              (carry, i.e. majority, when D = 0)
//   T = (A^B)&C ^ A&B ^ B ^ E          (restores parity; garbage)
// With D = E = 0 the gate is a full adder: sum on R, carry on S.
// Only that behaviour and the gate's size are fixed by the multiplier; the
// P, Q and T equations are this design's choice of a reversible,
// parity-preserving completion (A, B, C, D, E are recoverable from P..T and
// the XOR of the outputs equals the XOR of the inputs).
// Quantum cost 8. Purely combinational.
module zplg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  logic hx;   // A ^ B
  logic maj;  // majority of A, B, C
  assign hx  = a ^ b;
  assign maj = (hx & c) ^ (a & b);
  assign p = a;
  assign q = hx;
  assign r = hx ^ c;
  assign s = maj ^ d;
  assign t = maj ^ b ^ e;
endmodule
