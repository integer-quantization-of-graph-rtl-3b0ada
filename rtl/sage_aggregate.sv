// sage_aggregate: integer mean aggregation of one GraphSAGE layer.
//
// For every node i and feature f it forms T[i][f] = sum_j A[i][j] * h[j][f],
// where A holds the row-normalised adjacency scaled by K = 2^12 (A[i][j] =
// round(K / deg(i)) for an edge j -> i, 0 otherwise, including the diagonal),
// and then requantises T to INT8 with a rounding right shift by SHIFT and
// saturation.  All N*N*F products are computed in parallel.
//
// Timing: one register stage for the products, tree_stages(N, RADIX) stages
// for the sums (2 for N = 8, RADIX = 4) and one for the rescaled result, so
// LATENCY = 4 cycles by default, with a new graph accepted every cycle.
// valid_i is carried alongside as valid_o; the valid chain is cleared by
// the synchronous active-low reset, the datapath registers are not reset.
// The product widths and the T_W accumulator width follow the sizing rule
// of gnn_pkg; an assertion checks that adjacency entries lie in [0, K].
module sage_aggregate
  import gnn_pkg::*;
#(
  parameter int unsigned N     = gnn_pkg::N_NODES,
  parameter int unsigned F     = gnn_pkg::F_IN,
  parameter int unsigned SHIFT = gnn_pkg::BETA1_SHIFT,
  parameter int unsigned TW    = gnn_pkg::T_W,
  parameter int unsigned RADIX = gnn_pkg::TREE_RADIX
) (
  input  logic clk,
  input  logic rst_n,
  input  logic valid_i,
  input  q8_t  h_i   [N][F],
  input  adj_t adj_i [N][N],
  output logic valid_o,
  output q8_t  hh_o  [N][F]
);
  localparam int unsigned P_W     = A_W + 8;
  localparam int unsigned LATENCY = 1 + tree_stages(N, RADIX) + 1;

  // Stage 1: adjacency-weighted features, indexed [node][feature][neighbour].
  logic signed [P_W-1:0] prod [N][F][N];

  always_ff @(posedge clk)
    for (int i = 0; i < N; i++)
      for (int f = 0; f < F; f++)
        for (int j = 0; j < N; j++)
          prod[i][f][j] <= mul_adj(adj_i[i][j], h_i[j][f]);

  // Stages 2..: neighbour sums, then rescale into the output register.
  for (genvar i = 0; i < N; i++) begin : g_node
    for (genvar f = 0; f < F; f++) begin : g_feat
      logic signed [TW-1:0] t_sum;
      q8_t                  t_q;

      adder_tree_pipe #(.N(N), .W_IN(P_W), .W_OUT(TW), .RADIX(RADIX)) u_sum (
        .clk (clk),
        .din (prod[i][f]),
        .sum (t_sum)
      );

      po2_rescale #(.IN_W(TW), .SHIFT(SHIFT), .RELU(1'b0)) u_rescale (
        .x (t_sum),
        .y (t_q)
      );

      always_ff @(posedge clk) hh_o[i][f] <= t_q;
    end
  end

  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], valid_i};
  assign valid_o = vpipe[LATENCY-1];

  // Adjacency entries come from Eq. A = round(K / deg) and never exceed K.
  always_ff @(posedge clk)
    if (rst_n && valid_i)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          assert (adj_i[i][j] >= 0 && adj_i[i][j] <= (adj_t'(1) <<< K_B))
            else $error("adjacency entry [%0d][%0d] = %0d out of range", i, j, adj_i[i][j]);

endmodule
