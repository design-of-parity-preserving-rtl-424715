// Testbench for moa_bw1: random partial-product patterns and sign bits at
// N = 2..5, plus every pattern of the 20 input bits at N = 4; p must equal
// the weighted sum pp[i][j] * 2^(i+j) + (xm + ym) * 2^(N-1)
// + (xm_n + ym_n) * 2^(2N-2) + 2^(2N-1), modulo 2^(2N), and the output
// parity must equal the input parity plus the constant one.
module tb_moa_bw1;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar gi = 0; gi < 4; gi++) begin : g_sz
    localparam int unsigned N = gi + 2;
    logic [N-1:0][N-1:0] pp;
    logic xm, ym, xm_n, ym_n;
    logic [2*N-1:0] p;
    logic [rev_pkg::moa1_garbage(N)-1:0] g;
    bit done = 1'b0;
    moa_bw1 #(.N(N)) dut (.pp(pp), .xm(xm), .ym(ym), .xm_n(xm_n), .ym_n(ym_n), .p(p), .garbage(g));
    initial begin
      longint sum;
      int runs;
      runs = (N == 4) ? (1 << 20) : 4000;
      for (int v = 0; v < runs; v++) begin
        if (N == 4) {xm, ym, xm_n, ym_n, pp} = (N*N+4)'(v);
        else        {xm, ym, xm_n, ym_n, pp} = (N*N+4)'({$urandom, $urandom});
        #1;
        sum = (longint'(1) << (2 * N - 1)) + ((longint'(xm) + longint'(ym)) << (N - 1))
            + ((longint'(xm_n) + longint'(ym_n)) << (2 * N - 2));
        for (int i = 0; i < int'(N); i++)
          for (int j = 0; j < int'(N); j++)
            if (pp[i][j]) sum += longint'(1) << (i + j);
        checks++;
        if (p !== sum[2*N-1:0]) begin
          failures++;
          if (failures < 10) $display("N=%0d pp=%h p=%h exp=%h", N, pp, p, sum[2*N-1:0]);
        end
        checks++;
        if (~^{pp, xm, ym, xm_n, ym_n} !== ^{p, g}) failures++;
      end
      done = 1'b1;
    end
  end

  initial begin
    wait (g_sz[0].done && g_sz[1].done && g_sz[2].done && g_sz[3].done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
