// Parity-preserving reversible signed array multiplier, modified (second)
// Baugh-Wooley scheme: the ppg_bw2 partial product generator feeding the
// moa_bw2 multi-operand adder. This is the lower-cost of the two
// multipliers: for n = 4 it has 29 gates (11 LMH, 5 FRG, 9 ZPLG, 3 ZCG,
// 1 F2G), 54 constant inputs, 54 garbage outputs and a quantum cost of 183;
// in general (n-1)^2+2 LMH, 2n-3 FRG, (n-1)^2 ZPLG, n-1 ZCG and one F2G,
// 4n^2-4n+6 constant inputs and garbage outputs, quantum cost 14n^2-12n+7.
//
// Interface: x, y are n-bit two's complement operands; p is the 2n-bit two's
// complement product; garbage is every unused gate output (PPG bits first).
// Since every gate preserves parity, the XOR of x, y and the constant inputs
// (rev_pkg::mult2_const_ones(N) of them are 1) equals the XOR of p and
// garbage in a fault-free circuit. Purely combinational, no clock.
module mult_bw2 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]                         x,
  input  logic [N-1:0]                         y,
  output logic [2*N-1:0]                       p,
  output logic [rev_pkg::mult2_garbage(N)-1:0] garbage
);
  localparam int unsigned GP = rev_pkg::ppg2_garbage(N);
  logic [N-1:0][N-1:0] pp;

  ppg_bw2 #(.N(N)) u_ppg (.x(x), .y(y), .pp(pp), .garbage(garbage[GP-1:0]));
  moa_bw2 #(.N(N)) u_moa (.pp(pp), .p(p), .garbage(garbage[rev_pkg::mult2_garbage(N)-1:GP]));
endmodule
