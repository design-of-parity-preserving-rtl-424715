// Partial product generator for the modified (second) Baugh-Wooley scheme,
// built only from parity-preserving reversible gates.
//
// Cell (i,j) forms the partial product of x_j and y_i, with weight 2^(i+j).
// The modified Baugh-Wooley scheme needs the products of the sign column
// (j = n-1, i < n-1) and of the sign row (i = n-1, j < n-1) inverted; those
// cells are LMH gates with C = 0, D = 1, whose S output is ~(x_j & y_i).
// Because a reversible wire cannot branch, each operand bit is threaded
// through the cells that need it: an LMH cell (C = D = 0 for a plain product)
// passes x on P and y on Q, so it can sit anywhere in both chains. A Fredkin
// cell (C = 0) passes only its A input, so it is used where the chain of its
// B operand ends. Each column chain x_j (j < n-1) visits rows n-1, 0, 1, ..
// n-2 and each row chain y_i (i < n-1) visits columns n-1, 0, 1, .. n-2; this
// ends 2n-3 chains at non-inverted cells, which become Fredkin gates:
// row n-2 (A = y, B = x) and column n-2 above it (A = x, B = y). The other
// (n-1)^2+2 cells are LMH gates. For n = 4: 11 LMH + 5 FRG, 27 constant
// inputs, 19 garbage outputs and a quantum cost of 91.
// The gate counts, gate kinds and which terms are inverted follow the
// design this block implements; the chain order is this design's own choice
// that reproduces those counts.
//
// Interface: pp[i][j] is row i, bit j (column i+j), inverted where the
// scheme says so. garbage carries every unused gate output (see
// rev_pkg::ppg2_goff for the layout). Purely combinational.
module ppg_bw2 #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]                     x,
  input  logic [N-1:0]                     y,
  output logic [N-1:0][N-1:0]              pp,
  output logic [rev_pkg::ppg2_garbage(N)-1:0] garbage
);
  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < N; j++) begin : g_c
      localparam int unsigned GO = rev_pkg::ppg2_goff(N, i, j);
      logic xi, yi;   // operand bits arriving at this cell
      logic xo, yo;   // operand bits passed on (unused where a chain ends)

      // x_j chain: column n-1 top to bottom, other columns rows n-1,0..n-2
      if (j == N - 1) begin : g_xs
        if (i == 0) begin : g_first
          assign xi = x[j];
        end else begin : g_next
          assign xi = g_r[i-1].g_c[j].xo;
        end
      end else begin : g_xs
        if (i == N - 1) begin : g_first
          assign xi = x[j];
        end else if (i == 0) begin : g_wrap
          assign xi = g_r[N-1].g_c[j].xo;
        end else begin : g_next
          assign xi = g_r[i-1].g_c[j].xo;
        end
      end

      // y_i chain: row n-1 left to right, other rows columns n-1,0..n-2
      if (i == N - 1) begin : g_ys
        if (j == 0) begin : g_first
          assign yi = y[i];
        end else begin : g_next
          assign yi = g_r[i].g_c[j-1].yo;
        end
      end else begin : g_ys
        if (j == N - 1) begin : g_first
          assign yi = y[i];
        end else if (j == 0) begin : g_wrap
          assign yi = g_r[i].g_c[N-1].yo;
        end else begin : g_next
          assign yi = g_r[i].g_c[j-1].yo;
        end
      end

      if (i == N - 2 && j <= N - 2) begin : g_frg_ay
        // Fredkin, A = y_i (passes on), B = x_j (its chain ends here)
        logic gq;
        frg u_gate (.a(yi), .b(xi), .c(1'b0), .p(yo), .q(gq), .r(pp[i][j]));
        assign xo = 1'b0;
        assign garbage[GO] = gq;
        if (j == N - 2) begin : g_end
          assign garbage[GO+1] = yo;  // y_{n-2} chain ends here too
        end
      end else if (j == N - 2 && i < N - 2) begin : g_frg_ax
        // Fredkin, A = x_j (passes on), B = y_i (its chain ends here)
        logic gq;
        frg u_gate (.a(xi), .b(yi), .c(1'b0), .p(xo), .q(gq), .r(pp[i][j]));
        assign yo = 1'b0;
        assign garbage[GO] = gq;
      end else begin : g_lmh
        // LMH, A = x_j, B = y_i; D = 1 on the inverted terms
        localparam bit INV = (i == N - 1) != (j == N - 1);
        logic gr;
        lmh u_gate (.a(xi), .b(yi), .c(1'b0), .d(INV), .p(xo), .q(yo), .r(gr), .s(pp[i][j]));
        assign garbage[GO] = gr;
        if (i == N - 1 && j == N - 1) begin : g_end
          assign garbage[GO+1] = xo;  // x_{n-1} and y_{n-1} chains end here
          assign garbage[GO+2] = yo;
        end
      end
    end
  end
endmodule
