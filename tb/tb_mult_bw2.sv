// Self-checking testbench for mult_bw2 (modified Baugh-Wooley reversible
// multiplier). Runs every operand pair at N = 4 and compares p with the
// product of the signed operands computed by the simulator; it also checks
// the parity-preservation identity XOR(x, y, constants) == XOR(p, garbage),
// which is what makes errors detectable. A second instance at N = 5 (the
// other size the multiplier is compared at) is also run exhaustively.
module tb_mult_bw2;
  localparam int unsigned N  = 4;
  localparam int unsigned N5 = 5;
  int checks = 0, failures = 0;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  logic [rev_pkg::mult2_garbage(N)-1:0] g;
  logic [N5-1:0]   x5, y5;
  logic [2*N5-1:0] p5;
  logic [rev_pkg::mult2_garbage(N5)-1:0] g5;

  mult_bw2 #(.N(N))  dut  (.x(x),  .y(y),  .p(p),  .garbage(g));
  mult_bw2 #(.N(N5)) dut5 (.x(x5), .y(y5), .p(p5), .garbage(g5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic par_in, par_out;
    longint exp;
    x5 = '0; y5 = '0;
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        x = a[N-1:0]; y = b[N-1:0];
        #1;
        exp = longint'($signed(x)) * longint'($signed(y));
        checks++;
        if (p !== exp[2*N-1:0]) begin
          failures++;
          if (failures < 10) $display("N=%0d x=%0d y=%0d p=%0d exp=%0d", N, $signed(x), $signed(y), $signed(p), exp);
        end
        par_in  = ^{x, y} ^ rev_pkg::mult2_const_ones(N)[0];
        par_out = ^{p, g};
        checks++;
        if (par_in !== par_out) failures++;
      end
    end
    for (int a = 0; a < (1 << N5); a++) begin
      for (int b = 0; b < (1 << N5); b++) begin
        x5 = a[N5-1:0]; y5 = b[N5-1:0];
        #1;
        exp = longint'($signed(x5)) * longint'($signed(y5));
        checks++;
        if (p5 !== exp[2*N5-1:0]) begin
          failures++;
          if (failures < 10) $display("N=%0d x=%0d y=%0d p=%0d exp=%0d", N5, $signed(x5), $signed(y5), $signed(p5), exp);
        end
        checks++;
        if ((^{x5, y5} ^ rev_pkg::mult2_const_ones(N5)[0]) !== ^{p5, g5}) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
