// ZCG, a 4x4 parity-preserving reversible gate used as the half adder.
//   P = A
//   Q = A ^ B                (sum when C = D = 0)
//   R = A&B ^ C              (carry when C = 0)
//   S = A&~B ^ D             (restores parity; garbage)
// With C = D = 0 it is a half adder with the sum on Q and the carry on R.
// That behaviour is what the multiplier relies on; the exact equations are
// this design's choice of a reversible, parity-preserving completion.
// Quantum cost 6. Purely combinational.
module zcg (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
  assign s = (a & ~b) ^ d;
endmodule
