// Exhaustive testbench for the Fredkin gate: B and C are swapped exactly when
// A is 1; also checks reversibility and parity preservation, and the
// partial-product use with C = 0 (R = A&B, Q = ~A&B).
module tb_frg;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  bit [7:0] seen;
  frg dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
  initial begin : watchdog
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = v[2:0];
      #1;
      checks++; if (p !== a) failures++;
      checks++; if ({q, r} !== (a ? {c, b} : {b, c})) failures++;
      if (!c) begin
        checks++; if (r !== (a && b)) failures++;
        checks++; if (q !== (!a && b)) failures++;
      end
      checks++; if ((a ^ b ^ c) !== (p ^ q ^ r)) failures++;
      checks++; if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
