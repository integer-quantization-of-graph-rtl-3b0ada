// tb_sage_linear: streams random INT8 node features through the combine
// stage in both of the network's configurations, 16 -> 24 with shift 7 and
// ReLU (default parameters) and 24 -> 7 with shift 8 and no activation.
// Biases mix small values with large ones so that saturation at both ends,
// ReLU clamping and half-way rounding all occur; every output is compared
// with the reference model and the 5-cycle latency is checked.
module tb_sage_linear;
  import gnn_pkg::*;
  import gnn_ref_pkg::*;

  localparam int N   = 8;
  localparam int LAT = 5;
  localparam int NG  = 120;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid_i = 1'b0;
  always #5 clk = ~clk;

  q8_t   x1 [N][16];
  q8_t   x2 [N][24];
  q8_t   w1 [24][16];
  q8_t   w2 [7][24];
  bias_t b1 [24];
  bias_t b2 [7];
  logic  v1, v2;
  q8_t   y1 [N][24];
  q8_t   y2 [N][7];

  sage_linear dut1 (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .hh_i(x1), .w_i(w1), .b_i(b1),
    .valid_o(v1), .h_o(y1)
  );

  sage_linear #(.FI(24), .FO(7), .SHIFT(8), .RELU(1'b0)) dut2 (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .hh_i(x2), .w_i(w2), .b_i(b2),
    .valid_o(v2), .h_o(y2)
  );

  int checks   = 0;
  int failures = 0;
  int cyc      = 0;
  int n_sent   = 0;
  int n_recv   = 0;

  wmat_t wr1, wr2;
  bvec_t br1, br2;
  feat_t xs [NG];
  int    sent_cyc [NG];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int o = 0; o < 24; o++) begin
      for (int f = 0; f < 16; f++) wr1[o][f] = rand_s8();
      br1[o] = (o % 4 == 0) ? rand_pm(1 << 16) : rand_pm(1 << 10);
      for (int f = 0; f < 16; f++) w1[o][f] = q8_t'(wr1[o][f]);
      b1[o] = bias_t'(br1[o]);
    end
    for (int o = 0; o < 7; o++) begin
      for (int f = 0; f < 24; f++) wr2[o][f] = rand_s8();
      br2[o] = (o % 3 == 0) ? rand_pm(1 << 18) : rand_pm(1 << 10);
      for (int f = 0; f < 24; f++) w2[o][f] = q8_t'(wr2[o][f]);
      b2[o] = bias_t'(br2[o]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_sent < NG) begin
      @(negedge clk);
      if ($urandom_range(5) == 0) begin
        valid_i = 1'b0;
      end else begin
        int m;
        m = (n_sent % 2 == 0) ? 127 : 8;
        for (int n = 0; n < N; n++)
          for (int f = 0; f < 24; f++) xs[n_sent][n][f] = (m == 127) ? rand_s8() : rand_pm(m);
        for (int n = 0; n < N; n++) begin
          for (int f = 0; f < 16; f++) x1[n][f] = q8_t'(xs[n_sent][n][f]);
          for (int f = 0; f < 24; f++) x2[n][f] = q8_t'(xs[n_sent][n][f]);
        end
        valid_i = 1'b1;
        sent_cyc[n_sent] = cyc;
        n_sent++;
      end
    end
    @(negedge clk);
    valid_i = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (n_recv != NG) begin
      failures++;
      $display("FAIL received %0d of %0d", n_recv, NG);
    end
    checks++;
    if (n_tie == 0 || n_relu == 0 || n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL coverage tie=%0d relu=%0d sat_hi=%0d sat_lo=%0d",
               n_tie, n_relu, n_sat_hi, n_sat_lo);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    checks++;
    if (v1 != v2) begin
      failures++;
      $display("FAIL valid mismatch between instances");
    end
    if (v1) begin
      if (n_recv >= n_sent) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        feat_t e1, e2;
        linear(xs[n_recv], wr1, br1, N, 16, 24, 7, 1'b1, e1);
        linear(xs[n_recv], wr2, br2, N, 24, 7, 8, 1'b0, e2);
        checks++;
        if (cyc - sent_cyc[n_recv] != LAT) begin
          failures++;
          $display("FAIL latency %0d", cyc - sent_cyc[n_recv]);
        end
        for (int n = 0; n < N; n++) begin
          for (int o = 0; o < 24; o++) begin
            checks++;
            if (int'(y1[n][o]) != e1[n][o]) begin
              failures++;
              $display("FAIL g%0d A [%0d][%0d] got %0d exp %0d", n_recv, n, o, y1[n][o], e1[n][o]);
            end
          end
          for (int o = 0; o < 7; o++) begin
            checks++;
            if (int'(y2[n][o]) != e2[n][o]) begin
              failures++;
              $display("FAIL g%0d B [%0d][%0d] got %0d exp %0d", n_recv, n, o, y2[n][o], e2[n][o]);
            end
          end
        end
        n_recv++;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
