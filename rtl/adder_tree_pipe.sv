// adder_tree_pipe: pipelined signed adder tree.
//
// Sums N signed inputs.  Each pipeline stage adds groups of up to RADIX
// values and registers the partial sums, so the latency is
// gnn_pkg::tree_stages(N, RADIX) clock cycles (at least one) and a new set
// of inputs can be accepted every cycle.  All partial sums are W_OUT bits
// wide; inputs are sign-extended to W_OUT, and the caller sizes W_OUT so
// that the full sum cannot overflow.  No reset: the datapath carries no
// state beyond the pipeline, and validity is tracked by the caller.
module adder_tree_pipe #(
  parameter int unsigned N     = 8,
  parameter int unsigned W_IN  = 24,
  parameter int unsigned W_OUT = 25,
  parameter int unsigned RADIX = 4
) (
  input  logic                    clk,
  input  logic signed [W_IN-1:0]  din [N],
  output logic signed [W_OUT-1:0] sum
);
  localparam int unsigned STAGES = gnn_pkg::tree_stages(N, RADIX);

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    localparam int unsigned CNT_IN  = gnn_pkg::tree_count(N, RADIX, s);
    localparam int unsigned CNT_OUT = gnn_pkg::tree_count(N, RADIX, s + 1);

    logic signed [W_OUT-1:0] d [CNT_IN];
    logic signed [W_OUT-1:0] q [CNT_OUT];

    if (s == 0) begin : g_first
      always_comb
        for (int k = 0; k < CNT_IN; k++) d[k] = W_OUT'(din[k]);
    end else begin : g_next
      always_comb
        for (int k = 0; k < CNT_IN; k++) d[k] = g_stage[s-1].q[k];
    end

    always_ff @(posedge clk) begin
      for (int k = 0; k < CNT_OUT; k++) begin
        logic signed [W_OUT-1:0] acc;
        acc = '0;
        for (int r = 0; r < RADIX; r++)
          if (k * RADIX + r < CNT_IN) acc = acc + d[k * RADIX + r];
        q[k] <= acc;
      end
    end
  end

  assign sum = g_stage[STAGES-1].q[0];

endmodule
