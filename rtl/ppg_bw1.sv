// Partial product generator for the original (first) Baugh-Wooley scheme,
// built from Fredkin gates (FRG, C = 0) and double Feynman fan-out gates.
//
// The scheme needs, besides the plain products x_j y_i (i, j < n-1) and
// x_{n-1} y_{n-1}, the terms x_{n-1} & ~y_i (sign column) and ~x_j & y_{n-1}
// (sign row), and the single bits x_{n-1}, y_{n-1}, ~x_{n-1}, ~y_{n-1}.
// A Fredkin gate with C = 0 gives R = A&B and Q = ~A&B, so the terms with an
// inverted operand come from Q with the inverted operand on A; no separate
// inverter is needed. A passes through on P; B is consumed, so B operands
// come from F2G fan-out chains:
//   - x_j (j < n-1) runs down column j as the A input of every cell; the
//     bottom cell gives Q = ~x_j & y_{n-1}.
//   - y_i (i < n-1) enters cell (i,n-1) first as A (Q = ~y_i & x_{n-1}),
//     then its P output is fanned out to the B inputs of cells (i, 0..n-2).
//   - x_{n-1} is fanned out (with its complement) to the B inputs of column
//     n-1 and to A of cell (n-1,n-1), whose P output is the bit x_{n-1}.
//   - y_{n-1} is fanned out (with its complement) to the B inputs of row n-1
//     and to the bit y_{n-1}.
// For n = 4 this uses 16 FRG and 8 F2G. The gate kinds and the way inverted
// terms are formed follow the design this block implements; the fan-out
// arrangement is this design's own and uses two F2Gs fewer than the 10 of
// the published 4x4 circuit.
//
// Interface: pp[i][j] is row i, bit j (column i+j); xm, ym, xm_n, ym_n are
// x_{n-1}, y_{n-1} (column n-1) and their complements (column 2n-2).
// garbage layout: rev_pkg::ppg1_goff per cell, then fan-out spares.
// Purely combinational.
module ppg_bw1 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]                        x,
  input  logic [N-1:0]                        y,
  output logic [N-1:0][N-1:0]                 pp,
  output logic                                xm,
  output logic                                ym,
  output logic                                xm_n,
  output logic                                ym_n,
  output logic [rev_pkg::ppg1_garbage(N)-1:0] garbage
);
  import rev_pkg::*;
  localparam int unsigned KY  = fanout_k(ppg1_ycopies(N), 1'b0);
  localparam int unsigned KXM = fanout_k(ppg1_xmcopies(N), 1'b1);
  localparam int unsigned KYM = fanout_k(ppg1_ymcopies(N), 1'b1);
  localparam int unsigned SY  = fanout_spare(ppg1_ycopies(N), 1'b0);
  localparam int unsigned SXM = fanout_spare(ppg1_xmcopies(N), 1'b1);
  localparam int unsigned SYM = fanout_spare(ppg1_ymcopies(N), 1'b1);
  localparam int unsigned G_SP = N * N + N - 1;  // first fan-out spare bit

  // Fan-out of x_{n-1}: copies 0..n-2 to column n-1, copy n-1 to cell (n-1,n-1).
  logic [2*KXM:0] xm_o;
  f2g_fanout #(.COPIES(ppg1_xmcopies(N)), .INV(1'b1)) u_fo_xm (.a(x[N-1]), .o(xm_o));
  assign xm_n = xm_o[1];
  // Fan-out of y_{n-1}: copies 0..n-1 to row n-1, copy n is the bit y_{n-1}.
  logic [2*KYM:0] ym_o;
  f2g_fanout #(.COPIES(ppg1_ymcopies(N)), .INV(1'b1)) u_fo_ym (.a(y[N-1]), .o(ym_o));
  assign ym_n = ym_o[1];
  assign ym   = ym_o[fanout_cidx(N, 1'b1)];
  for (genvar s = 0; s < SXM; s++) begin : g_sp_xm
    assign garbage[G_SP + s] = xm_o[fanout_cidx(N + s, 1'b1)];
  end
  for (genvar s = 0; s < SYM; s++) begin : g_sp_ym
    assign garbage[G_SP + SXM + s] = ym_o[fanout_cidx(N + 1 + s, 1'b1)];
  end

  for (genvar i = 0; i < N; i++) begin : g_r
    // Row fan-out of y_i (i < n-1), fed by the P output of cell (i,n-1).
    if (i < N - 1) begin : g_fo
      logic [2*KY:0] y_o;
      f2g_fanout #(.COPIES(ppg1_ycopies(N)), .INV(1'b0)) u_fo (.a(g_r[i].g_c[N-1].po), .o(y_o));
      for (genvar s = 0; s < SY; s++) begin : g_sp
        assign garbage[G_SP + SXM + SYM + i * SY + s] = y_o[N - 1 + s];
      end
    end

    for (genvar j = 0; j < N; j++) begin : g_c
      localparam int unsigned GO = ppg1_goff(N, i, j);
      logic ai, bi, po, qo, ro;
      frg u_gate (.a(ai), .b(bi), .c(1'b0), .p(po), .q(qo), .r(ro));

      if (j < N - 1 && i < N - 1) begin : g_plain
        // x_j & y_i on R; x_j passes down
        if (i == 0) begin : g_a
          assign ai = x[j];
        end else begin : g_a
          assign ai = g_r[i-1].g_c[j].po;
        end
        assign bi = g_r[i].g_fo.y_o[j];
        assign pp[i][j] = ro;
        assign garbage[GO] = qo;
      end else if (j == N - 1 && i < N - 1) begin : g_scol
        // ~y_i & x_{n-1} on Q; y_i passes on to the row fan-out
        assign ai = y[i];
        assign bi = xm_o[fanout_cidx(i, 1'b1)];
        assign pp[i][j] = qo;
        assign garbage[GO] = ro;
      end else if (j < N - 1) begin : g_srow
        // ~x_j & y_{n-1} on Q; the x_j chain ends here
        assign ai = g_r[i-1].g_c[j].po;
        assign bi = ym_o[fanout_cidx(j, 1'b1)];
        assign pp[i][j] = qo;
        assign garbage[GO]   = po;
        assign garbage[GO+1] = ro;
      end else begin : g_sign
        // x_{n-1} & y_{n-1} on R; P gives the bit x_{n-1}
        assign ai = xm_o[fanout_cidx(N - 1, 1'b1)];
        assign bi = ym_o[fanout_cidx(N - 1, 1'b1)];
        assign pp[i][j] = ro;
        assign xm = po;
        assign garbage[GO] = qo;
      end
    end
  end
endmodule
