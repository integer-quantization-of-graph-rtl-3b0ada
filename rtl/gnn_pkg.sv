// gnn_pkg: sizes, number formats and shift constants shared by the integer
// GraphSAGE pipeline.
//
// The network is a two-layer GraphSAGE with mean aggregation and no root
// (self) term, 16 projected input features, 24 hidden features and 7 output
// classes, evaluated on a fixed graph of 8 nodes.  Activations and weights
// are signed INT8, biases INT32.  Every rescaling is a power of two, so it
// is a rounding arithmetic right shift by a compile-time constant; the four
// shift amounts below are those of the reference model.
//
// Accumulator widths follow the sizing rule B = ceil(log2(m + 1)) + 1 + delta
// with a safety margin delta = 2, where m is the largest magnitude a signal
// can take.  For the adjacency entries m = K = 2^12 exactly; for the
// aggregation sum the worst case d_max * K * 127 is used with d_max = 7 (an
// 8-node graph without self-loops).  The linear accumulator stays at 32 bits
// because its bound depends on trained bias values that are not fixed here.
// The adder-tree radix (4 terms per pipeline stage) is this design's own
// choice; with it the whole network takes 19 clock cycles from input
// register to output.
package gnn_pkg;

  // Graph and network sizes.
  localparam int unsigned N_NODES = 8;
  localparam int unsigned F_IN    = 16;   // projected input features
  localparam int unsigned F_HID   = 24;   // hidden features
  localparam int unsigned F_OUT   = 7;    // output classes

  // Fixed-point adjacency: A^K = round(K / deg(i)), K = 2^K_B.
  localparam int unsigned K_B     = 12;

  // Power-of-two shift amounts: BETA for the aggregation rescale, EFF_SCALE
  // for the linear (effective scale) rescale, one of each per layer.
  localparam int unsigned BETA1_SHIFT      = 17;
  localparam int unsigned BETA2_SHIFT      = 12;
  localparam int unsigned EFF_SCALE1_SHIFT = 7;
  localparam int unsigned EFF_SCALE2_SHIFT = 8;

  // Terms summed per pipeline stage in the adder trees.
  localparam int unsigned TREE_RADIX = 4;

  // Width of a signed integer able to hold magnitudes up to m, plus margin.
  function automatic int unsigned bits_for(longint unsigned m, int unsigned delta);
    return $clog2(m + 1) + 1 + delta;
  endfunction

  localparam int unsigned SAFETY = 2;
  localparam int unsigned D_MAX  = N_NODES - 1;
  localparam int unsigned A_W    = bits_for(64'(1) << K_B, SAFETY);               // 16
  localparam int unsigned T_W    = bits_for(64'(D_MAX) * (64'(1) << K_B) * 127, SAFETY); // 25
  localparam int unsigned ACC_W  = 32;
  localparam int unsigned BIAS_W = 32;

  typedef logic signed [7:0]        q8_t;    // INT8 activation or weight
  typedef logic signed [A_W-1:0]    adj_t;   // fixed-point adjacency entry
  typedef logic signed [BIAS_W-1:0] bias_t;  // integer bias (accumulator domain)

  // Full-width products.  The return type sets the width in which the
  // operands are multiplied, so no product is truncated.
  function automatic logic signed [15:0] mul_q8(q8_t a, q8_t b);
    return a * b;
  endfunction

  function automatic logic signed [A_W+7:0] mul_adj(adj_t a, q8_t h);
    return a * h;
  endfunction

  // Number of values left after s stages of a radix-r reduction of n values.
  function automatic int unsigned tree_count(int unsigned n, int unsigned r, int unsigned s);
    int unsigned c;
    c = n;
    for (int unsigned k = 0; k < s; k++) c = (c + r - 1) / r;
    return c;
  endfunction

  // Pipeline stages of a radix-r adder tree over n values (at least one).
  function automatic int unsigned tree_stages(int unsigned n, int unsigned r);
    int unsigned c;
    int unsigned st;
    c  = n;
    st = 0;
    do begin
      c  = (c + r - 1) / r;
      st = st + 1;
    end while (c > 1);
    return st;
  endfunction

endpackage
