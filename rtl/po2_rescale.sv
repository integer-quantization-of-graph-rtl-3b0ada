// po2_rescale: multiplier-free requantisation of an accumulator to INT8.
//
// Computes y = sat8(rho(R_S(x))), where R_S(x) = (x + 2^(S-1)) >>> S is a
// round-to-nearest division by 2^S (half-way values round towards +inf),
// rho is a ReLU when RELU = 1 and the identity otherwise, and sat8 clamps
// to [-128, 127].  The ReLU is applied before saturation.  The addition is
// done one bit wider than the input so the rounding constant cannot
// overflow.  SHIFT = 0 passes the value through unrounded.  Purely
// combinational; the calling stage registers the result.
module po2_rescale #(
  parameter int unsigned IN_W  = 32,
  parameter int unsigned SHIFT = 8,
  parameter bit          RELU  = 1'b0
) (
  input  logic signed [IN_W-1:0] x,
  output gnn_pkg::q8_t           y
);
  localparam logic signed [IN_W:0] ROUND =
      (SHIFT == 0) ? '0 : ((IN_W + 1)'(1) <<< (SHIFT - 1));

  logic signed [IN_W:0] biased;
  logic signed [IN_W:0] shifted;
  logic signed [IN_W:0] act;

  always_comb begin
    biased  = (IN_W + 1)'(x) + ROUND;
    shifted = biased >>> SHIFT;
    act     = (RELU && shifted < 0) ? '0 : shifted;
    if (act > 127)       y = 8'sd127;
    else if (act < -128) y = -8'sd128;
    else                 y = gnn_pkg::q8_t'(act);
  end

endmodule
