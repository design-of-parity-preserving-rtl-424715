// Shared sizing functions of the parity-preserving reversible signed array
// multipliers. Every reversible block exposes its garbage outputs (outputs
// that feed nothing but keep the circuit reversible) as a bus; these
// functions give the widths and the garbage-bit offsets of each cell, plus
// the parity of the constant inputs each block ties to 1, which the parity
// checker needs. All are constant functions of the operand width n (n >= 2).
package rev_pkg;

  // ---------------- BW2 (modified Baugh-Wooley) multiplier ----------------
  // PPG: (n-1)^2+2 LMH gates and 2n-3 Fredkin gates.
  function automatic int unsigned ppg2_lmh_count(input int unsigned n);
    return (n - 1) * (n - 1) + 2;
  endfunction
  function automatic int unsigned ppg2_frg_count(input int unsigned n);
    return 2 * n - 3;
  endfunction
  // One garbage bit per cell, two on the Fredkin cell (n-2,n-2) and three on
  // the LMH cell (n-1,n-1): n^2 + 3 in all.
  function automatic int unsigned ppg2_garbage(input int unsigned n);
    return n * n + 3;
  endfunction
  // Offset of cell (i,j)'s garbage bits, cells in row-major order.
  function automatic int unsigned ppg2_goff(input int unsigned n, input int unsigned i,
                                            input int unsigned j);
    int unsigned k;
    k = i * n + j;
    return (k > (n - 2) * n + (n - 2)) ? k + 1 : k;
  endfunction
  // MOA: (n-1)^2 ZPLG full adders, n-1 ZCG half adders and one F2G.
  function automatic int unsigned moa2_garbage(input int unsigned n);
    return 3 * (n - 1) * (n - 1) + 2 * (n - 1) + 2;
  endfunction
  function automatic int unsigned mult2_garbage(input int unsigned n);
    return ppg2_garbage(n) + moa2_garbage(n);
  endfunction
  // Constant inputs tied to 1: 2(n-1) LMH D inputs, the '1' of column n and
  // the F2G B input.
  function automatic int unsigned mult2_const_ones(input int unsigned n);
    return 2 * (n - 1) + 2;
  endfunction

  // ---------------- BW1 (Baugh-Wooley) multiplier ----------------
  // F2G fan-out chain: K gates give 2K+1 outputs, enough for COPIES plain
  // copies plus one inverted copy when INV is set.
  function automatic int unsigned fanout_k(input int unsigned copies, input bit inv);
    int unsigned need;
    need = copies + (inv ? 1 : 0);
    return (need <= 1) ? 0 : need / 2;
  endfunction
  function automatic int unsigned fanout_spare(input int unsigned copies, input bit inv);
    return 2 * fanout_k(copies, inv) + 1 - copies - (inv ? 1 : 0);
  endfunction
  // Output index of plain copy c in a fan-out chain (index 1 holds the
  // inverted copy when INV is set).
  function automatic int unsigned fanout_cidx(input int unsigned c, input bit inv);
    return (inv && c >= 1) ? c + 1 : c;
  endfunction
  // Fan-out shapes used by the BW1 PPG.
  function automatic int unsigned ppg1_ycopies(input int unsigned n);  // y_i, i < n-1
    return n - 1;
  endfunction
  function automatic int unsigned ppg1_xmcopies(input int unsigned n); // x_{n-1}
    return n;
  endfunction
  function automatic int unsigned ppg1_ymcopies(input int unsigned n); // y_{n-1}
    return n + 1;
  endfunction
  function automatic int unsigned ppg1_f2g_count(input int unsigned n);
    return (n - 1) * fanout_k(ppg1_ycopies(n), 1'b0) + fanout_k(ppg1_xmcopies(n), 1'b1)
         + fanout_k(ppg1_ymcopies(n), 1'b1);
  endfunction
  // Garbage: one bit per Fredkin cell, two per bottom-row cell j < n-1, plus
  // the spare outputs of the fan-out chains.
  function automatic int unsigned ppg1_garbage(input int unsigned n);
    return n * n + (n - 1) + (n - 1) * fanout_spare(ppg1_ycopies(n), 1'b0)
         + fanout_spare(ppg1_xmcopies(n), 1'b1) + fanout_spare(ppg1_ymcopies(n), 1'b1);
  endfunction
  // Offset of cell (i,j)'s garbage bits; cells first, in row-major order.
  function automatic int unsigned ppg1_goff(input int unsigned n, input int unsigned i,
                                            input int unsigned j);
    return (i == n - 1) ? (n - 1) * n + 2 * j : i * n + j;
  endfunction
  // MOA: n^2-2n+4 ZPLG full adders and n-1 ZCG half adders; the final
  // carry out of column 2n-1 is garbage too.
  function automatic int unsigned moa1_fa_count(input int unsigned n);
    return n * n - 2 * n + 4;
  endfunction
  function automatic int unsigned moa1_garbage(input int unsigned n);
    return 3 * moa1_fa_count(n) + 2 * (n - 1) + 1;
  endfunction
  function automatic int unsigned mult1_garbage(input int unsigned n);
    return ppg1_garbage(n) + moa1_garbage(n);
  endfunction
  // Constant inputs tied to 1: the B inputs of the two inverting F2Gs and the
  // '1' of column 2n-1.
  function automatic int unsigned mult1_const_ones(input int unsigned n);
    return (n >= 2) ? 3 : 0;
  endfunction

endpackage
