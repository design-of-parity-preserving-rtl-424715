// Testbench for ppg_bw2: for every operand pair at N = 4 (and at N = 2, 3 and
// 5, to cover the edge cases of the cell arrangement) each term pp[i][j] is
// compared with x_j & y_i, complemented in the sign column (j = N-1, i < N-1)
// and sign row (i = N-1, j < N-1); the XOR of x, y and the constants must
// equal the XOR of pp and garbage.
module tb_ppg_bw2;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // one checker per size
  for (genvar gi = 0; gi < 4; gi++) begin : g_sz
    localparam int unsigned N = gi + 2;
    logic [N-1:0] x, y;
    logic [N-1:0][N-1:0] pp;
    logic [rev_pkg::ppg2_garbage(N)-1:0] g;
    bit done = 1'b0;
    ppg_bw2 #(.N(N)) dut (.x(x), .y(y), .pp(pp), .garbage(g));
    initial begin
      logic e;
      for (int a = 0; a < (1 << N); a++) begin
        for (int b = 0; b < (1 << N); b++) begin
          x = a[N-1:0]; y = b[N-1:0];
          #1;
          for (int i = 0; i < int'(N); i++) begin
            for (int j = 0; j < int'(N); j++) begin
              e = x[j] & y[i];
              if ((i == int'(N) - 1) != (j == int'(N) - 1)) e = ~e;
              checks++;
              if (pp[i][j] !== e) begin
                failures++;
                if (failures < 10) $display("N=%0d x=%b y=%b pp[%0d][%0d]=%b", N, x, y, i, j, pp[i][j]);
              end
            end
          end
          checks++;
          if ((^{x, y} ^ ((2 * (N - 1)) % 2 == 1)) !== ^{pp, g}) failures++;
        end
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
