// Testbench for parity_checker: random input and output vectors, compared
// with a bit-by-bit parity count, for both values of CONST_PAR.
module tb_parity_checker;
  int checks = 0, failures = 0;
  logic [7:0]  in_bits;
  logic [12:0] out_bits;
  logic        err0, err1;
  parity_checker #(.IN_W(8), .OUT_W(13), .CONST_PAR(1'b0)) dut0 (.in_bits(in_bits), .out_bits(out_bits), .err(err0));
  parity_checker #(.IN_W(8), .OUT_W(13), .CONST_PAR(1'b1)) dut1 (.in_bits(in_bits), .out_bits(out_bits), .err(err1));
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int ones;
    for (int n = 0; n < 2000; n++) begin
      in_bits  = 8'($urandom);
      out_bits = 13'($urandom);
      #1;
      ones = 0;
      for (int k = 0; k < 8; k++)  ones += int'(in_bits[k]);
      for (int k = 0; k < 13; k++) ones += int'(out_bits[k]);
      checks++; if (err0 !== ((ones % 2) == 1)) failures++;
      checks++; if (err1 !== ((ones % 2) == 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
