// End-to-end testbench for pp_mult_top at its default size (N = 4).
//
// 1. Every operand pair is applied to both multipliers; each product is
//    compared with the signed product computed by the simulator and both
//    error flags must stay 0 (no false alarm).
// 2. Single-wire faults: for random operands a wire inside each multiplier
//    (a partial-product bit between generator and adder, an operand wire
//    threaded between partial-product cells, a carry inside the adder array)
//    is forced to the complement of its fault-free value; the error flag of
//    that multiplier must rise and the other flag must stay 0.
// It counts how often each mechanism of the design was exercised: negative
// products (sign handling of the Baugh-Wooley terms), the final-carry
// complement at column 2N-1 with the carry both 0 and 1, the (-2^(N-1))^2
// corner case, and detected faults; a mechanism never exercised is a failure.
module tb_pp_mult_top;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  int n_neg = 0, n_carry0 = 0, n_carry1 = 0, n_corner = 0, n_det2 = 0, n_det1 = 0;

  logic [N-1:0] bw2_x, bw2_y, bw1_x, bw1_y;
  logic [2*N-1:0] bw2_p, bw1_p;
  logic [rev_pkg::mult2_garbage(N)-1:0] bw2_garbage;
  logic [rev_pkg::mult1_garbage(N)-1:0] bw1_garbage;
  logic bw2_err, bw1_err;

  pp_mult_top dut (.*);

  initial begin : watchdog
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_fault(input bit is_bw2, input string where);
    checks++;
    if (is_bw2 ? !(bw2_err && !bw1_err) : !(bw1_err && !bw2_err)) begin
      failures++;
      $display("fault at %s not flagged: err2=%b err1=%b", where, bw2_err, bw1_err);
    end else if (is_bw2) n_det2++;
    else n_det1++;
  endtask

  initial begin
    longint exp;
    logic [N-1:0][N-1:0] ppv;
    logic w;
    // ---- 1. all operand pairs ----
    for (int a = 0; a < (1 << N); a++) begin
      for (int b = 0; b < (1 << N); b++) begin
        bw2_x = a[N-1:0]; bw2_y = b[N-1:0];
        bw1_x = b[N-1:0]; bw1_y = a[N-1:0];
        #1;
        exp = longint'($signed(bw2_x)) * longint'($signed(bw2_y));
        checks++; if (bw2_p !== exp[2*N-1:0]) failures++;
        checks++; if (bw1_p !== exp[2*N-1:0]) failures++;
        checks++; if (bw2_err || bw1_err) failures++;
        if (exp < 0) n_neg++;
        if (dut.u_bw2.u_moa.g_rr[N-2].co) n_carry1++; else n_carry0++;
        if (bw2_x == {1'b1, {(N-1){1'b0}}} && bw2_y == {1'b1, {(N-1){1'b0}}}) n_corner++;
      end
    end
    // ---- 2. single-wire faults ----
    for (int n = 0; n < 64; n++) begin
      bw2_x = N'($urandom); bw2_y = N'($urandom);
      bw1_x = N'($urandom); bw1_y = N'($urandom);
      #1;
      // partial-product bit between PPG and MOA, BW2
      ppv = dut.u_bw2.pp;
      ppv[n % N][(n / N) % N] = ~ppv[n % N][(n / N) % N];
      force dut.u_bw2.pp = ppv;
      #1; check_fault(1'b1, "bw2 pp"); release dut.u_bw2.pp; #1;
      // partial-product bit, BW1
      ppv = dut.u_bw1.pp;
      ppv[n % N][(n / N) % N] = ~ppv[n % N][(n / N) % N];
      force dut.u_bw1.pp = ppv;
      #1; check_fault(1'b0, "bw1 pp"); release dut.u_bw1.pp; #1;
      // x operand wire threaded from cell (0,0) of the BW2 generator
      w = ~dut.u_bw2.u_ppg.g_r[0].g_c[0].xo;
      force dut.u_bw2.u_ppg.g_r[0].g_c[0].xo = w;
      #1; check_fault(1'b1, "bw2 x chain"); release dut.u_bw2.u_ppg.g_r[0].g_c[0].xo; #1;
      // carry inside the BW2 carry-save array
      w = ~dut.u_bw2.u_moa.g_st[2].g_c[1].co;
      force dut.u_bw2.u_moa.g_st[2].g_c[1].co = w;
      #1; check_fault(1'b1, "bw2 carry"); release dut.u_bw2.u_moa.g_st[2].g_c[1].co; #1;
      // y operand wire leaving the sign-column cell of the BW1 generator
      w = ~dut.u_bw1.u_ppg.g_r[1].g_c[N-1].po;
      force dut.u_bw1.u_ppg.g_r[1].g_c[N-1].po = w;
      #1; check_fault(1'b0, "bw1 y chain"); release dut.u_bw1.u_ppg.g_r[1].g_c[N-1].po; #1;
      // sign-bit half-adder sum inside the BW1 adder
      w = ~dut.u_bw1.u_moa.hs;
      force dut.u_bw1.u_moa.hs = w;
      #1; check_fault(1'b0, "bw1 sign sum"); release dut.u_bw1.u_moa.hs; #1;
      // fault removed: flags clear again, products right
      exp = longint'($signed(bw2_x)) * longint'($signed(bw2_y));
      checks++; if (bw2_err || bw1_err || bw2_p !== exp[2*N-1:0]) failures++;
    end
    $display("negative products %0d, final carry 0/1: %0d/%0d, corner %0d, faults detected bw2 %0d bw1 %0d",
             n_neg, n_carry0, n_carry1, n_corner, n_det2, n_det1);
    if (n_neg == 0 || n_carry0 == 0 || n_carry1 == 0 || n_corner == 0 || n_det2 == 0 || n_det1 == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
