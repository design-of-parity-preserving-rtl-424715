// Exhaustive testbench for the ZPLG gate: with D = E = 0 it must be a full
// adder (R = sum, S = carry, compared with the arithmetic sum a+b+c); for
// all 32 inputs the outputs must be distinct (reversible) and keep parity.
module tb_zplg;
  int checks = 0, failures = 0;
  logic a, b, c, d, e, p, q, r, s, t;
  bit [31:0] seen;
  zplg dut (.a(a), .b(b), .c(c), .d(d), .e(e), .p(p), .q(q), .r(r), .s(s), .t(t));
  initial begin : watchdog
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sum;
    seen = '0;
    for (int v = 0; v < 32; v++) begin
      {a, b, c, d, e} = v[4:0];
      #1;
      if (!d && !e) begin
        sum = int'(a) + int'(b) + int'(c);
        checks++; if ({s, r} !== 2'(sum)) failures++;
      end
      checks++; if ((a ^ b ^ c ^ d ^ e) !== (p ^ q ^ r ^ s ^ t)) failures++;
      checks++; if (seen[{p, q, r, s, t}]) failures++;
      seen[{p, q, r, s, t}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
