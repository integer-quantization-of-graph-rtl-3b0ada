// sage_layer: one GraphSAGE layer with mean aggregation and no root term.
//
// Each node's new embedding is computed from its neighbours only:
//   hh = sat8(R_SB(A * h))                  (aggregation, sage_aggregate)
//   y  = sat8(rho(R_SG(b + W * hh)))        (combine,     sage_linear)
// The self-contribution of the original GraphSAGE formulation (concatenating
// the node's own embedding) is left out, which removes a root weight matrix.
// The adjacency matrix is delayed alongside the data so that a following
// layer receives it aligned with this layer's output (adj_o).
//
// Timing: LATENCY = sage_aggregate latency + sage_linear latency (4 + 5 = 9
// cycles at the default sizes), fully pipelined, one graph per cycle.
module sage_layer
  import gnn_pkg::*;
#(
  parameter int unsigned N       = gnn_pkg::N_NODES,
  parameter int unsigned FI      = gnn_pkg::F_IN,
  parameter int unsigned FO      = gnn_pkg::F_HID,
  parameter int unsigned S_AGG   = gnn_pkg::BETA1_SHIFT,
  parameter int unsigned S_LIN   = gnn_pkg::EFF_SCALE1_SHIFT,
  parameter bit          RELU    = 1'b1,
  parameter int unsigned RADIX   = gnn_pkg::TREE_RADIX
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_i,
  input  q8_t   h_i   [N][FI],
  input  adj_t  adj_i [N][N],
  input  q8_t   w_i   [FO][FI],
  input  bias_t b_i   [FO],
  output logic  valid_o,
  output q8_t   h_o   [N][FO],
  output adj_t  adj_o [N][N]
);
  localparam int unsigned LAT_AGG = 1 + tree_stages(N, RADIX) + 1;
  localparam int unsigned LAT_LIN = 1 + tree_stages(FI + 1, RADIX) + 1;
  localparam int unsigned LATENCY = LAT_AGG + LAT_LIN;

  logic agg_valid;
  q8_t  hh [N][FI];

  sage_aggregate #(.N(N), .F(FI), .SHIFT(S_AGG), .RADIX(RADIX)) u_agg (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (valid_i),
    .h_i     (h_i),
    .adj_i   (adj_i),
    .valid_o (agg_valid),
    .hh_o    (hh)
  );

  sage_linear #(.N(N), .FI(FI), .FO(FO), .SHIFT(S_LIN), .RELU(RELU), .RADIX(RADIX)) u_lin (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (agg_valid),
    .hh_i    (hh),
    .w_i     (w_i),
    .b_i     (b_i),
    .valid_o (valid_o),
    .h_o     (h_o)
  );

  // Adjacency delay line, LATENCY registers deep.
  adj_t adj_pipe [LATENCY][N][N];
  always_ff @(posedge clk) begin
    adj_pipe[0] <= adj_i;
    for (int s = 1; s < LATENCY; s++) adj_pipe[s] <= adj_pipe[s-1];
  end
  assign adj_o = adj_pipe[LATENCY-1];

endmodule
