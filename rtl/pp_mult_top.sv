// Parity-preserving reversible signed array multipliers with error detection.
//
// Two n x n two's complement multipliers stand side by side, each with its own
// operands and outputs:
//   - mult_bw2: modified Baugh-Wooley scheme, LMH/Fredkin partial products
//     and a ZPLG/ZCG array with one F2G, the lower-cost design;
//   - mult_bw1: original Baugh-Wooley scheme, Fredkin/F2G partial products
//     and a ZPLG/ZCG array.
// Each multiplier brings out its product, all of its garbage outputs, and an
// error flag from a parity_checker that compares the parity of the operands
// and constant inputs with the parity of the product and garbage outputs.
// The flag is 0 in a fault-free circuit and rises on any single flipped wire.
// Purely combinational: outputs follow the operands after the gate delays,
// no clock or reset.
module pp_mult_top #(
  parameter int unsigned N = 4
) (
  // modified Baugh-Wooley multiplier (mult_bw2)
  input  logic [N-1:0]                         bw2_x,
  input  logic [N-1:0]                         bw2_y,
  output logic [2*N-1:0]                       bw2_p,
  output logic [rev_pkg::mult2_garbage(N)-1:0] bw2_garbage,
  output logic                                 bw2_err,
  // original Baugh-Wooley multiplier (mult_bw1)
  input  logic [N-1:0]                         bw1_x,
  input  logic [N-1:0]                         bw1_y,
  output logic [2*N-1:0]                       bw1_p,
  output logic [rev_pkg::mult1_garbage(N)-1:0] bw1_garbage,
  output logic                                 bw1_err
);
  mult_bw2 #(.N(N)) u_bw2 (.x(bw2_x), .y(bw2_y), .p(bw2_p), .garbage(bw2_garbage));
  parity_checker #(
    .IN_W(2 * N), .OUT_W(2 * N + rev_pkg::mult2_garbage(N)),
    .CONST_PAR(rev_pkg::mult2_const_ones(N) % 2 == 1)
  ) u_chk_bw2 (
    .in_bits({bw2_x, bw2_y}), .out_bits({bw2_p, bw2_garbage}), .err(bw2_err)
  );

  mult_bw1 #(.N(N)) u_bw1 (.x(bw1_x), .y(bw1_y), .p(bw1_p), .garbage(bw1_garbage));
  parity_checker #(
    .IN_W(2 * N), .OUT_W(2 * N + rev_pkg::mult1_garbage(N)),
    .CONST_PAR(rev_pkg::mult1_const_ones(N) % 2 == 1)
  ) u_chk_bw1 (
    .in_bits({bw1_x, bw1_y}), .out_bits({bw1_p, bw1_garbage}), .err(bw1_err)
  );
endmodule
