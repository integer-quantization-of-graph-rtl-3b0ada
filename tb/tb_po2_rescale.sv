// tb_po2_rescale: checks the shift-round-ReLU-saturate unit in the four
// configurations the network uses (shifts 17 and 12 on the 25-bit
// aggregation sum, 7 with ReLU and 8 without on the 32-bit accumulator)
// plus a zero shift, against the floor-division model of gnn_ref_pkg.
// Directed values cover half-way cases on both signs, the saturation
// boundaries and the extremes of the input range.
module tb_po2_rescale;
  import gnn_pkg::*;
  import gnn_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic signed [24:0] xa;
  logic signed [31:0] xl;
  q8_t ya17, ya12, yl7r, yl8, yl0;

  po2_rescale #(.IN_W(25), .SHIFT(17), .RELU(1'b0)) u_a17 (.x(xa), .y(ya17));
  po2_rescale #(.IN_W(25), .SHIFT(12), .RELU(1'b0)) u_a12 (.x(xa), .y(ya12));
  po2_rescale #(.IN_W(32), .SHIFT(7),  .RELU(1'b1)) u_l7r (.x(xl), .y(yl7r));
  po2_rescale #(.IN_W(32), .SHIFT(8),  .RELU(1'b0)) u_l8  (.x(xl), .y(yl8));
  po2_rescale #(.IN_W(32), .SHIFT(0),  .RELU(1'b0)) u_l0  (.x(xl), .y(yl0));

  task automatic check(string what, int got, int exp, longint x);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%0d got=%0d exp=%0d", what, x, got, exp);
    end
  endtask

  task automatic apply(longint va, longint vl);
    xa = 25'(va);
    xl = 32'(vl);
    @(negedge clk);
    check("s17", int'(ya17), requant(longint'(xa), 17, 1'b0), xa);
    check("s12", int'(ya12), requant(longint'(xa), 12, 1'b0), xa);
    check("s7r", int'(yl7r), requant(longint'(xl), 7, 1'b1), xl);
    check("s8",  int'(yl8),  requant(longint'(xl), 8, 1'b0), xl);
    check("s0",  int'(yl0),  requant(longint'(xl), 0, 1'b0), xl);
  endtask

  initial begin
    longint dir [$];
    dir = '{0, 1, -1, 64, -64, 127, 128, -128, -129, 255, 256, -256, 2048, -2048,
            4096, -4096, 65536, -65536, 65535, -65537, 127 * 128 + 63, 127 * 128 + 64,
            -128 * 128 - 64, -128 * 128 - 65, 127 * 256 + 127, 127 * 256 + 128,
            -128 * 256 - 128, -128 * 256 - 129, 16646143, -16777216, 16777215,
            2147483647, -2147483648};
    foreach (dir[k]) apply(dir[k], dir[k]);
    for (int k = 0; k < 4000; k++) begin
      int sh;
      sh = int'($urandom_range(24));
      apply(longint'($signed(25'($urandom))) >>> ($urandom_range(24)),
            longint'($signed($urandom)) >>> sh);
    end
    if (n_tie == 0 || n_relu == 0 || n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL coverage tie=%0d relu=%0d sat_hi=%0d sat_lo=%0d",
               n_tie, n_relu, n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
