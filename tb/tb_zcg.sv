// Exhaustive testbench for the ZCG gate: with C = D = 0 it must be a half
// adder (Q = sum, R = carry, compared with a+b); for all 16 inputs the
// outputs must be distinct (reversible) and keep parity.
module tb_zcg;
  int checks = 0, failures = 0;
  logic a, b, c, d, p, q, r, s;
  bit [15:0] seen;
  zcg dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));
  initial begin : watchdog
    #1000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int sum;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = v[3:0];
      #1;
      if (!c && !d) begin
        sum = int'(a) + int'(b);
        checks++; if ({r, q} !== 2'(sum)) failures++;
      end
      checks++; if ((a ^ b ^ c ^ d) !== (p ^ q ^ r ^ s)) failures++;
      checks++; if (seen[{p, q, r, s}]) failures++;
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
