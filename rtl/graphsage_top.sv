// graphsage_top: fixed-latency integer GraphSAGE inference for 8-node graphs.
//
// Classifies every node of a graph of N_NODES nodes in one pass through a
// fully unrolled, fully pipelined two-layer GraphSAGE network
// (16 -> 24 -> 7).  Inputs are the INT8 projected node features x_i (the
// projection from raw features to 16 values is done upstream), the
// fixed-point row-normalised adjacency adj_i (adj_i[i][j] = round(4096 /
// deg(i)) for an edge j -> i, else 0) and the trained INT8 weights and
// integer biases of both layers, which are meant to be held constant.
//
//   layer 1: aggregate (shift 17), linear 16 -> 24 (shift 7), ReLU
//   layer 2: aggregate (shift 12), linear 24 -> 7  (shift 8), identity
//
// Every rescale is a rounding right shift with INT8 saturation, so the
// datapath holds no rescaling multipliers.  The outputs are the INT8 class
// logits and, from class_argmax, the predicted class of each node.
//
// Timing: the inputs are registered (1 cycle), each layer takes 9 cycles,
// so valid_o rises 19 cycles after valid_i; a new graph may be presented on
// every cycle (initiation interval 1).  rst_n is synchronous, active low,
// and clears only the valid chain.  The weights and biases are ports here
// because the trained values are model data rather than design; an FPGA
// build would tie them to constants.
module graphsage_top #(
  parameter int unsigned N                = gnn_pkg::N_NODES,
  parameter int unsigned FI               = gnn_pkg::F_IN,
  parameter int unsigned FH               = gnn_pkg::F_HID,
  parameter int unsigned FO               = gnn_pkg::F_OUT,
  parameter int unsigned BETA1_SHIFT      = gnn_pkg::BETA1_SHIFT,
  parameter int unsigned EFF_SCALE1_SHIFT = gnn_pkg::EFF_SCALE1_SHIFT,
  parameter int unsigned BETA2_SHIFT      = gnn_pkg::BETA2_SHIFT,
  parameter int unsigned EFF_SCALE2_SHIFT = gnn_pkg::EFF_SCALE2_SHIFT,
  parameter int unsigned RADIX            = gnn_pkg::TREE_RADIX,
  localparam int unsigned LW              = (FO > 1) ? $clog2(FO) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            valid_i,
  input  gnn_pkg::q8_t    x_i      [N][FI],
  input  gnn_pkg::adj_t   adj_i    [N][N],
  input  gnn_pkg::q8_t    w1_i     [FH][FI],
  input  gnn_pkg::bias_t  b1_i     [FH],
  input  gnn_pkg::q8_t    w2_i     [FO][FH],
  input  gnn_pkg::bias_t  b2_i     [FO],
  output logic            valid_o,
  output gnn_pkg::q8_t    logits_o [N][FO],
  output logic [LW-1:0]   label_o  [N]
);
  // Input register.
  logic valid_r;
  gnn_pkg::q8_t  x_r   [N][FI];
  gnn_pkg::adj_t adj_r [N][N];

  always_ff @(posedge clk) begin
    if (!rst_n) valid_r <= 1'b0;
    else        valid_r <= valid_i;
    x_r   <= x_i;
    adj_r <= adj_i;
  end

  logic l1_valid;
  gnn_pkg::q8_t  h1     [N][FH];
  gnn_pkg::adj_t adj_l1 [N][N];
  gnn_pkg::adj_t adj_l2 [N][N];  // unused: the last layer's adjacency copy is left open

  sage_layer #(
    .N(N), .FI(FI), .FO(FH), .S_AGG(BETA1_SHIFT), .S_LIN(EFF_SCALE1_SHIFT), .RELU(1'b1), .RADIX(RADIX)
  ) u_layer1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (valid_r),
    .h_i     (x_r),
    .adj_i   (adj_r),
    .w_i     (w1_i),
    .b_i     (b1_i),
    .valid_o (l1_valid),
    .h_o     (h1),
    .adj_o   (adj_l1)
  );

  sage_layer #(
    .N(N), .FI(FH), .FO(FO), .S_AGG(BETA2_SHIFT), .S_LIN(EFF_SCALE2_SHIFT), .RELU(1'b0), .RADIX(RADIX)
  ) u_layer2 (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (l1_valid),
    .h_i     (h1),
    .adj_i   (adj_l1),
    .w_i     (w2_i),
    .b_i     (b2_i),
    .valid_o (valid_o),
    .h_o     (logits_o),
    .adj_o   (adj_l2)
  );

  class_argmax #(.N(N), .NC(FO)) u_argmax (
    .logits_i (logits_o),
    .label_o  (label_o)
  );

endmodule
