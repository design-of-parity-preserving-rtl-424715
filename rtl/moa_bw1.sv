// Multi-operand adder for the original (first) Baugh-Wooley scheme, built
// from parity-preserving reversible adders: ZPLG full adders (D = E = 0,
// sum on R, carry on S) and ZCG half adders (C = D = 0, sum on Q, carry on R).
//
// Besides the n x n partial products it adds the bits x_{n-1} and y_{n-1} at
// column n-1, ~x_{n-1} and ~y_{n-1} at column 2n-2 and a constant '1' at
// column 2n-1. The array is the carry-save array of moa_bw2 with these
// additions:
//   - a ZCG adds x_{n-1} + y_{n-1}; its sum joins the column n-1 adder of
//     stage 1 (a full adder instead of a half adder) and its carry is the
//     carry input of the ripple row at column n;
//   - a second full adder at column 2n-2 adds ~x_{n-1} and ~y_{n-1} to the
//     ripple-row sum there;
//   - a full adder at column 2n-1 adds the constant '1' to the two carries
//     entering that column; its carry out is garbage.
// Counts: n^2-2n+4 ZPLG and n-1 ZCG; for n = 4, 12 + 3 gates, 31 constant
// inputs, 43 garbage outputs, quantum cost 114, matching the published 4x4
// circuit. The wiring is this design's own.
//
// Interface: pp[i][j] from ppg_bw1 (row i, column i+j), the four sign bits,
// p = two's complement product. garbage layout: the x/y ZCG (2 bits), the
// stage-1 adders (ZCG 2 bits, the last one a ZPLG with 3), stages 2..n-1,
// the ripple row, the column 2n-2 adder and the column 2n-1 adder (3 bits
// each) and the final carry. Purely combinational.
module moa_bw1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0][N-1:0]                 pp,
  input  logic                                xm,
  input  logic                                ym,
  input  logic                                xm_n,
  input  logic                                ym_n,
  output logic [2*N-1:0]                      p,
  output logic [rev_pkg::moa1_garbage(N)-1:0] garbage
);
  localparam int unsigned G_S1 = 2;                             // stage 1
  localparam int unsigned G_FA = G_S1 + 2 * (N - 2) + 3;        // stages 2..n-1
  localparam int unsigned G_RR = G_FA + 3 * (N - 2) * (N - 1);  // ripple row
  localparam int unsigned G_TP = G_RR + 3 * (N - 1);            // columns 2n-2, 2n-1

  logic hs, hc;  // x_{n-1} + y_{n-1}
  zcg u_ha_sign (.a(xm), .b(ym), .c(1'b0), .d(1'b0),
                 .p(garbage[0]), .q(hs), .r(hc), .s(garbage[1]));

  assign p[0] = pp[0][0];

  // Carry-save stages; column of g_st[k].g_c[j] is k+j.
  for (genvar k = 1; k < N; k++) begin : g_st
    for (genvar j = 0; j < N - 1; j++) begin : g_c
      logic a, s, co;
      if (k == 1) begin : g_a
        assign a = pp[0][j+1];
      end else if (j == N - 2) begin : g_a
        assign a = pp[k-1][N-1];
      end else begin : g_a
        assign a = g_st[k-1].g_c[j+1].s;
      end
      if (k == 1 && j < N - 2) begin : g_add
        zcg u_ha (.a(a), .b(pp[k][j]), .c(1'b0), .d(1'b0),
                  .p(garbage[G_S1+2*j]), .q(s), .r(co), .s(garbage[G_S1+2*j+1]));
      end else if (k == 1) begin : g_add
        // column n-1 of stage 1 also takes x_{n-1} + y_{n-1}
        localparam int unsigned GO = G_S1 + 2 * (N - 2);
        zplg u_fa (.a(a), .b(pp[k][j]), .c(hs), .d(1'b0), .e(1'b0),
                   .p(garbage[GO]), .q(garbage[GO+1]), .r(s), .s(co), .t(garbage[GO+2]));
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
    logic a, ci, s, co;
    if (m == N - 2) begin : g_a
      assign a = pp[N-1][N-1];
    end else begin : g_a
      assign a = g_st[N-1].g_c[m+1].s;
    end
    if (m == 0) begin : g_ci
      assign ci = hc;
    end else begin : g_ci
      assign ci = g_rr[m-1].co;
    end
    zplg u_fa (.a(a), .b(g_st[N-1].g_c[m].co), .c(ci), .d(1'b0), .e(1'b0),
               .p(garbage[GO]), .q(garbage[GO+1]), .r(s), .s(co), .t(garbage[GO+2]));
    if (m < N - 2) begin : g_out
      assign p[N+m] = s;
    end
  end

  // Column 2n-2: ripple sum + ~x_{n-1} + ~y_{n-1}.
  logic c2;
  zplg u_fa_top (.a(g_rr[N-2].s), .b(xm_n), .c(ym_n), .d(1'b0), .e(1'b0),
                 .p(garbage[G_TP]), .q(garbage[G_TP+1]), .r(p[2*N-2]), .s(c2),
                 .t(garbage[G_TP+2]));
  // Column 2n-1: constant '1' + both carries; the carry out is dropped.
  zplg u_fa_msb (.a(g_rr[N-2].co), .b(c2), .c(1'b1), .d(1'b0), .e(1'b0),
                 .p(garbage[G_TP+3]), .q(garbage[G_TP+4]), .r(p[2*N-1]), .s(garbage[G_TP+6]),
                 .t(garbage[G_TP+5]));
endmodule
