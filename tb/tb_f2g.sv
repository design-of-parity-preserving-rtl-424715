// Exhaustive testbench for the double Feynman gate: checks the truth table,
// that the 8 output vectors are all distinct (reversibility) and that the
// output parity equals the input parity.
module tb_f2g;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;
  bit [7:0] seen;
  f2g dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));
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
      checks++; if (q !== (a != b)) failures++;
      checks++; if (r !== (a != c)) failures++;
      checks++; if ((a ^ b ^ c) !== (p ^ q ^ r)) failures++;
      checks++; if (seen[{p, q, r}]) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
