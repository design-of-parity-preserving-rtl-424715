// Exhaustive testbench for the LMH gate: truth table, reversibility, parity
// preservation, and the two partial-product settings: C = D = 0 gives A&B on
// S with A and B passed on P and Q; C = 0, D = 1 gives ~(A&B) on S.
module tb_lmh;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;
  bit [15:0] seen;
  lmh dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  initial begin : watchdog
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic mux;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = v[3:0];
      #1;
      mux = a ? b : c;
      checks++; if ({p, q, r, s} !== {a, b != c, mux, mux != d}) failures++;
      if (!c) begin
        checks++; if ({p, q} !== {a, b}) failures++;
        checks++; if (s !== ((a && b) != d)) failures++;
      end
      checks++; if ((a ^ b ^ c ^ d) !== (p ^ q ^ r ^ s)) failures++;
      checks++; if (seen[{p, q, r, s}]) failures++;
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
