// Size sweep for both multipliers at the sizes they are compared at: 5x5
// (every operand pair), 8x8 (every operand pair) and 16x16 (20000 random
// pairs plus the extreme operands). Products are compared with the signed
// product computed by the simulator, and the parity identity of the
// reversible circuits, XOR(x, y, constants) == XOR(p, garbage), is checked.
module tb_mult_sizes;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int unsigned SZ[3] = '{5, 8, 16};
  for (genvar gi = 0; gi < 3; gi++) begin : g_sz
    localparam int unsigned N = SZ[gi];
    logic [N-1:0] x, y;
    logic [2*N-1:0] p2, p1;
    logic [rev_pkg::mult2_garbage(N)-1:0] g2;
    logic [rev_pkg::mult1_garbage(N)-1:0] g1;
    bit done = 1'b0;
    mult_bw2 #(.N(N)) u2 (.x(x), .y(y), .p(p2), .garbage(g2));
    mult_bw1 #(.N(N)) u1 (.x(x), .y(y), .p(p1), .garbage(g1));
    initial begin
      longint exp;
      int runs;
      runs = (N <= 8) ? (1 << (2 * N)) : 20004;
      for (int v = 0; v < runs; v++) begin
        if (N <= 8) {x, y} = (2*N)'(v);
        else if (v < 4) {x, y} = {{v[1], {(N-1){~v[1]}}}, {v[0], {(N-1){~v[0]}}}};
        else {x, y} = (2*N)'($urandom);
        #1;
        exp = longint'($signed(x)) * longint'($signed(y));
        checks++; if (p2 !== exp[2*N-1:0]) failures++;
        checks++; if (p1 !== exp[2*N-1:0]) failures++;
        checks++; if ((^{x, y} ^ rev_pkg::mult2_const_ones(N)[0]) !== ^{p2, g2}) failures++;
        checks++; if ((^{x, y} ^ rev_pkg::mult1_const_ones(N)[0]) !== ^{p1, g1}) failures++;
      end
      $display("N=%0d: %0d operand pairs", N, runs);
      done = 1'b1;
    end
  end

  initial begin
    wait (g_sz[0].done && g_sz[1].done && g_sz[2].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
