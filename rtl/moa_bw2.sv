// Multi-operand adder for the modified (second) Baugh-Wooley scheme, built
// from parity-preserving reversible adders: ZPLG full adders (D = E = 0,
// sum on R, carry on S) and ZCG half adders (C = D = 0, sum on Q, carry on R).
//
// It is a carry-save array followed by a ripple row. Stage 1 adds rows 0 and
// 1 of the partial products with n-1 half adders; stages 2..n-1 each add one
// more row with n-1 full adders, every carry going diagonally to the next
// column of the next stage. Product bit k (k < n) leaves stage k. The ripple
// row (n-1 full adders, columns n..2n-2) merges the last sums and carries;
// its first carry input is the constant '1' the scheme adds at column n.
// The scheme's second '1', at column 2n-1, turns product bit 2n-1 into the
// complement of the last carry, so one F2G with B = 1 replaces a half adder.
// Counts: (n-1)^2 ZPLG + (n-1) ZCG + 1 F2G; for n = 4, 9 + 3 + 1 gates,
// 27 constant inputs, 35 garbage outputs, quantum cost 92.
// The gate counts and the F2G inversion follow the design this block
// implements; the exact wiring of the array is this design's own.
//
// Interface: pp[i][j] from ppg_bw2 (row i, column i+j), p = two's complement
// product. garbage layout: stage-1 ZCGs (2 bits each), then the ZPLGs of
// stages 2..n-1 and of the ripple row (3 bits each), then the F2G (2 bits).
// Purely combinational.
module moa_bw2 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0][N-1:0]                 pp,
  output logic [2*N-1:0]                      p,
  output logic [rev_pkg::moa2_garbage(N)-1:0] garbage
);
  localparam int unsigned G_FA = 2 * (N - 1);                   // first ZPLG garbage bit
  localparam int unsigned G_RR = G_FA + 3 * (N - 2) * (N - 1);  // ripple row
  localparam int unsigned G_F2 = G_RR + 3 * (N - 1);            // final F2G

  assign p[0] = pp[0][0];

  // Carry-save stages; column of g_st[k].g_c[j] is k+j.
  for (genvar k = 1; k < N; k++) begin : g_st
    for (genvar j = 0; j < N - 1; j++) begin : g_c
      logic a;   // running sum bit of this column from the stage above
      logic s;   // sum
      logic co;  // carry to column k+j+1 of the next stage
      if (k == 1) begin : g_a
        assign a = pp[0][j+1];
      end else if (j == N - 2) begin : g_a
        assign a = pp[k-1][N-1];  // leftmost bit of the previous row
      end else begin : g_a
        assign a = g_st[k-1].g_c[j+1].s;
      end
      if (k == 1) begin : g_add
        zcg u_ha (.a(a), .b(pp[k][j]), .c(1'b0), .d(1'b0),
                  .p(garbage[2*j]), .q(s), .r(co), .s(garbage[2*j+1]));
      end else begin : g_add
        localparam int unsigned GO = G_FA + 3 * ((k - 2) * (N - 1) + j);
        zplg u_fa (.a(a), .b(pp[k][j]), .c(g_st[k-1].g_c[j].co), .d(1'b0), .e(1'b0),
                   .p(garbage[GO]), .q(garbage[GO+1]), .r(s), .s(co), .t(garbage[GO+2]));
      end
      if (j == 0) begin : g_out
        assign p[k] = s;
      end
    end
  end

  // Ripple row, columns n..2n-2.
  for (genvar m = 0; m < N - 1; m++) begin : g_rr
    localparam int unsigned GO = G_RR + 3 * m;
    logic a, ci, co;
    if (m == N - 2) begin : g_a
      assign a = pp[N-1][N-1];
    end else begin : g_a
      assign a = g_st[N-1].g_c[m+1].s;
    end
    if (m == 0) begin : g_ci
      assign ci = 1'b1;  // the constant '1' of column n
    end else begin : g_ci
      assign ci = g_rr[m-1].co;
    end
    zplg u_fa (.a(a), .b(g_st[N-1].g_c[m].co), .c(ci), .d(1'b0), .e(1'b0),
               .p(garbage[GO]), .q(garbage[GO+1]), .r(p[N+m]), .s(co), .t(garbage[GO+2]));
  end

  // Column 2n-1: adding the constant '1' to the last carry = complementing it.
  f2g u_inv (.a(g_rr[N-2].co), .b(1'b1), .c(1'b0),
             .p(garbage[G_F2]), .q(p[2*N-1]), .r(garbage[G_F2+1]));
endmodule
