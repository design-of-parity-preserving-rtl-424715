// Reversible fan-out: a chain of K double Feynman gates (F2G) that turns one
// signal into 2K+1 outputs, since a wire may not branch in reversible logic.
// Gate k takes the P output of gate k-1 on A and B = C = 0, so its Q and R are
// copies; the P output of the last gate is o[0]. When INV is set the first
// gate has B = 1 and o[1] is the complement of a. K = rev_pkg::fanout_k
// (COPIES, INV) is the smallest chain giving COPIES plain copies (plus the
// inverted one). Plain copy c is o[rev_pkg::fanout_cidx(c, INV)]; outputs
// beyond those are spare (garbage). With K = 0, o[0] is a itself.
// Purely combinational.
module f2g_fanout #(
  parameter int unsigned COPIES = 3,
  parameter bit          INV    = 1'b0
) (
  input  logic                                          a,
  output logic [2*rev_pkg::fanout_k(COPIES, INV):0]     o
);
  localparam int unsigned K = rev_pkg::fanout_k(COPIES, INV);

  if (K == 0) begin : g_wire
    assign o[0] = a;
  end else begin : g_chain
    for (genvar k = 0; k < K; k++) begin : g_gate
      logic ai, po;
      if (k == 0) begin : g_a
        assign ai = a;
      end else begin : g_a
        assign ai = g_gate[k-1].po;
      end
      f2g u_f2g (.a(ai), .b((k == 0) ? INV : 1'b0), .c(1'b0),
                 .p(po), .q(o[2*k+1]), .r(o[2*k+2]));
    end
    assign o[0] = g_gate[K-1].po;
  end
endmodule
