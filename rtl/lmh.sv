// LMH gate, a 4x4 parity-preserving reversible gate.
//   P = A,  Q = B ^ C,  R = ~A&C ^ A&B,  S = ~A&C ^ A&B ^ D
// R and S share the multiplexer term ~A&C ^ A&B, which is how the gate has
// three distinct XORs, two distinct ANDs (~A&C, A&B) and one NOT.
// As a partial-product cell: with C = 0, D = 0 it passes A on P and B on Q
// and gives A&B on R and S; with C = 0, D = 1 the S output is ~(A&B), the
// inverted product term of the modified Baugh-Wooley scheme.
// The output equations are this design's reading of the gate: they match the
// gate's stated cost (3 XOR, 2 AND, 1 NOT) and its stated use for normal and
// inverted product terms, and they are reversible and parity-preserving.
// Quantum cost 6. Purely combinational.
module lmh (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic m;  // shared term ~A&C ^ A&B
  assign m = (~a & c) ^ (a & b);
  assign p = a;
  assign q = b ^ c;
  assign r = m;
  assign s = m ^ d;
endmodule
