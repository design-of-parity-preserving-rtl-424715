// Testbench for the F2G fan-out chain: for several sizes, with and without
// the inverted copy, every plain copy must equal the input, the inverted copy
// its complement, and the chain must use the expected number of gates
// (2K+1 outputs, K = smallest chain that gives all copies).
module tb_f2g_fanout;
  int checks = 0, failures = 0;
  logic a;

  initial begin : watchdog
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int unsigned CP[4] = '{1, 3, 4, 6};
  for (genvar gi = 0; gi < 8; gi++) begin : g_cfg
    localparam int unsigned COPIES = CP[gi % 4];
    localparam bit          INV    = (gi >= 4);
    localparam int unsigned K      = rev_pkg::fanout_k(COPIES, INV);
    logic [2*K:0] o;
    f2g_fanout #(.COPIES(COPIES), .INV(INV)) dut (.a(a), .o(o));
    always @(a) begin
      #1;
      for (int c = 0; c < int'(COPIES); c++) begin
        checks++;
        if (o[rev_pkg::fanout_cidx(c, INV)] !== a) failures++;
      end
      if (INV) begin
        checks++;
        if (o[INV ? 1 : 0] !== ~a) failures++;
      end
      checks++;
      // fewest gates: one fewer could not give enough outputs
      if (2 * K + 1 < COPIES + INV || (K > 0 && 2 * K - 1 >= COPIES + INV)) failures++;
    end
  end

  initial begin
    a = 1'b0;
    #5 a = 1'b1;
    #5 a = 1'b0;
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
