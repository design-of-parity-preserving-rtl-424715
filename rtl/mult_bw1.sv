// Parity-preserving reversible signed array multiplier, original (first)
// Baugh-Wooley scheme: the ppg_bw1 partial product generator (Fredkin and
// double Feynman gates) feeding the moa_bw1 multi-operand adder (ZPLG full
// adders, ZCG half adders). It is the costlier of the two multipliers (for
// n = 4 the published circuit has 41 gates and a quantum cost of 214; this
// implementation has 39 gates, two F2Gs fewer in the PPG).
//
// Interface: x, y are n-bit two's complement operands; p is the 2n-bit two's
// complement product; garbage is every unused gate output (PPG bits first).
// The XOR of x, y and the constant inputs (rev_pkg::mult1_const_ones(N) of
// them are 1) equals the XOR of p and garbage in a fault-free circuit.
// Purely combinational, no clock.
module mult_bw1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]                         x,
  input  logic [N-1:0]                         y,
  output logic [2*N-1:0]                       p,
  output logic [rev_pkg::mult1_garbage(N)-1:0] garbage
);
  localparam int unsigned GP = rev_pkg::ppg1_garbage(N);
  logic [N-1:0][N-1:0] pp;
  logic xm, ym, xm_n, ym_n;

  ppg_bw1 #(.N(N)) u_ppg (.x(x), .y(y), .pp(pp), .xm(xm), .ym(ym), .xm_n(xm_n), .ym_n(ym_n),
                          .garbage(garbage[GP-1:0]));
  moa_bw1 #(.N(N)) u_moa (.pp(pp), .xm(xm), .ym(ym), .xm_n(xm_n), .ym_n(ym_n), .p(p),
                          .garbage(garbage[rev_pkg::mult1_garbage(N)-1:GP]));
endmodule
