// sage_linear: combine step of one GraphSAGE layer.
//
// For every node n and output channel o it forms the integer accumulator
// a[n][o] = b[o] + sum_f hh[n][f] * w[o][f] (INT8 x INT8 products, bias
// already in the accumulator domain), then requantises it to INT8 with a
// rounding right shift by SHIFT, a ReLU when RELU = 1 (hidden layer) or
// none (output layer), and saturation to [-128, 127].  All N*FO*FI products
// are computed in parallel.
//
// Timing: one register stage for the products (and the bias term),
// tree_stages(FI + 1, RADIX) stages for the sum (3 for FI = 16 or 24 with
// RADIX = 4) and one for the rescaled result: LATENCY = 5 cycles by
// default, one new node set per cycle.  Weights and biases are expected to
// be static; they are sampled in the product stage.  valid_o follows
// valid_i through a reset-cleared chain.
module sage_linear
  import gnn_pkg::*;
#(
  parameter int unsigned N     = gnn_pkg::N_NODES,
  parameter int unsigned FI    = gnn_pkg::F_IN,
  parameter int unsigned FO    = gnn_pkg::F_HID,
  parameter int unsigned SHIFT = gnn_pkg::EFF_SCALE1_SHIFT,
  parameter bit          RELU  = 1'b1,
  parameter int unsigned AW    = gnn_pkg::ACC_W,
  parameter int unsigned RADIX = gnn_pkg::TREE_RADIX
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid_i,
  input  q8_t   hh_i [N][FI],
  input  q8_t   w_i  [FO][FI],
  input  bias_t b_i  [FO],
  output logic  valid_o,
  output q8_t   h_o  [N][FO]
);
  localparam int unsigned NT      = FI + 1;   // products plus the bias term
  localparam int unsigned LATENCY = 1 + tree_stages(NT, RADIX) + 1;

  // Stage 1: products, indexed [node][output][term]; the last term is the bias.
  logic signed [AW-1:0] term [N][FO][NT];

  always_ff @(posedge clk)
    for (int n = 0; n < N; n++)
      for (int o = 0; o < FO; o++) begin
        for (int f = 0; f < FI; f++)
          term[n][o][f] <= AW'(mul_q8(hh_i[n][f], w_i[o][f]));
        term[n][o][FI] <= AW'(b_i[o]);
      end

  for (genvar n = 0; n < N; n++) begin : g_node
    for (genvar o = 0; o < FO; o++) begin : g_out
      logic signed [AW-1:0] acc;
      q8_t                  y;

      adder_tree_pipe #(.N(NT), .W_IN(AW), .W_OUT(AW), .RADIX(RADIX)) u_sum (
        .clk (clk),
        .din (term[n][o]),
        .sum (acc)
      );

      po2_rescale #(.IN_W(AW), .SHIFT(SHIFT), .RELU(RELU)) u_rescale (
        .x (acc),
        .y (y)
      );

      always_ff @(posedge clk) h_o[n][o] <= y;
    end
  end

  logic [LATENCY-1:0] vpipe;
  always_ff @(posedge clk)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LATENCY-2:0], valid_i};
  assign valid_o = vpipe[LATENCY-1];

endmodule
