// Testbench for moa_bw2: every partial-product pattern at N = 4 (2^16) and
// random patterns at N = 2, 3, 5 are driven directly; p must equal the
// weighted sum of the bits, pp[i][j] * 2^(i+j), plus the two constant ones
// of the modified Baugh-Wooley scheme (2^N and 2^(2N-1)), modulo 2^(2N).
// The output parity must equal the parity of the inputs plus the two
// constant ones.
module tb_moa_bw2;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar gi = 0; gi < 4; gi++) begin : g_sz
    localparam int unsigned N = gi + 2;
    logic [N-1:0][N-1:0] pp;
    logic [2*N-1:0] p;
    logic [rev_pkg::moa2_garbage(N)-1:0] g;
    bit done = 1'b0;
    moa_bw2 #(.N(N)) dut (.pp(pp), .p(p), .garbage(g));
    initial begin
      longint sum;
      int runs;
      runs = (N == 4) ? (1 << 16) : 4000;
      for (int v = 0; v < runs; v++) begin
        pp = (N == 4) ? (N*N)'(v) : (N*N)'({$urandom, $urandom});
        #1;
        sum = (longint'(1) << N) + (longint'(1) << (2 * N - 1));
        for (int i = 0; i < int'(N); i++)
          for (int j = 0; j < int'(N); j++)
            if (pp[i][j]) sum += longint'(1) << (i + j);
        checks++;
        if (p !== sum[2*N-1:0]) begin
          failures++;
          if (failures < 10) $display("N=%0d pp=%h p=%h exp=%h", N, pp, p, sum[2*N-1:0]);
        end
        checks++;
        if (^pp !== ^{p, g}) failures++;
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
