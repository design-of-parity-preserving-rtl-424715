// Testbench for ppg_bw1: for every operand pair at N = 2..5 each term is
// compared with the original Baugh-Wooley terms: x_j & y_i for i, j < N-1
// and i = j = N-1, x_{N-1} & ~y_i in the sign column, ~x_j & y_{N-1} in the
// sign row, and the bits x_{N-1}, y_{N-1} and their complements. The XOR of
// x, y and the two constant ones must equal the XOR of all outputs.
module tb_ppg_bw1;
  int checks = 0, failures = 0;

  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar gi = 0; gi < 4; gi++) begin : g_sz
    localparam int unsigned N = gi + 2;
    logic [N-1:0] x, y;
    logic [N-1:0][N-1:0] pp;
    logic xm, ym, xm_n, ym_n;
    logic [rev_pkg::ppg1_garbage(N)-1:0] g;
    bit done = 1'b0;
    ppg_bw1 #(.N(N)) dut (.x(x), .y(y), .pp(pp), .xm(xm), .ym(ym), .xm_n(xm_n), .ym_n(ym_n),
                          .garbage(g));
    initial begin
      logic e;
      for (int a = 0; a < (1 << N); a++) begin
        for (int b = 0; b < (1 << N); b++) begin
          x = a[N-1:0]; y = b[N-1:0];
          #1;
          for (int i = 0; i < int'(N); i++) begin
            for (int j = 0; j < int'(N); j++) begin
              if (j == int'(N) - 1 && i < int'(N) - 1)      e = x[N-1] & ~y[i];
              else if (i == int'(N) - 1 && j < int'(N) - 1) e = ~x[j] & y[N-1];
              else                                          e = x[j] & y[i];
              checks++;
              if (pp[i][j] !== e) begin
                failures++;
                if (failures < 10) $display("N=%0d x=%b y=%b pp[%0d][%0d]=%b", N, x, y, i, j, pp[i][j]);
              end
            end
          end
          checks++;
          if ({xm, ym, xm_n, ym_n} !== {x[N-1], y[N-1], ~x[N-1], ~y[N-1]}) failures++;
          checks++;
          if (^{x, y} !== ^{pp, xm, ym, xm_n, ym_n, g}) failures++;
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
