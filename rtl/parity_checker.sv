// Error detector for a parity-preserving reversible circuit.
// Every gate of such a circuit has the XOR of its outputs equal to the XOR
// of its inputs, so for the whole circuit the XOR of the primary inputs and
// constant inputs equals the XOR of the primary and garbage outputs. A single
// flipped wire breaks that equality. This block compares the two parities:
// err = ^in_bits ^ CONST_PAR ^ ^out_bits, 1 when they differ. CONST_PAR is
// the parity of the circuit's constant inputs (1 when an odd number of them
// are tied to 1). The parity-based detection principle follows the design;
// the checker itself is ordinary (irreversible) logic. Purely combinational.
module parity_checker #(
  parameter int unsigned IN_W      = 8,
  parameter int unsigned OUT_W     = 8,
  parameter bit          CONST_PAR = 1'b0
) (
  input  logic [IN_W-1:0]  in_bits,
  input  logic [OUT_W-1:0] out_bits,
  output logic             err
);
  assign err = (^in_bits) ^ CONST_PAR ^ (^out_bits);
endmodule
