// class_argmax: class decision for every node from its INT8 output logits.
//
// The predicted label of a node is the index of its largest logit, which is
// the class a softmax would rank first (softmax is monotonic, so it is not
// evaluated).  Ties go to the lowest class index.  Purely combinational: the
// labels are valid in the same cycle as the logits.
module class_argmax
  import gnn_pkg::*;
#(
  parameter int unsigned N  = gnn_pkg::N_NODES,
  parameter int unsigned NC = gnn_pkg::F_OUT,
  localparam int unsigned LW = (NC > 1) ? $clog2(NC) : 1
) (
  input  q8_t           logits_i [N][NC],
  output logic [LW-1:0] label_o  [N]
);
  always_comb
    for (int n = 0; n < N; n++) begin
      q8_t best;
      best       = logits_i[n][0];
      label_o[n] = '0;
      for (int c = 1; c < NC; c++)
        if (logits_i[n][c] > best) begin
          best       = logits_i[n][c];
          label_o[n] = LW'(c);
        end
    end

endmodule
