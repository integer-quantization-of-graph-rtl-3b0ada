// tb_sage_layer: runs a full GraphSAGE layer at its default configuration
// (8 nodes, 16 -> 24, shifts 17 and 7, ReLU) on a stream of random graphs,
// compares the layer output with the reference model (aggregation followed
// by the linear step), checks that the adjacency leaves aligned with the
// data, and checks the 9-cycle latency.
module tb_sage_layer;
  import gnn_pkg::*;
  import gnn_ref_pkg::*;

  localparam int N   = 8;
  localparam int FI  = 16;
  localparam int FO  = 24;
  localparam int LAT = 9;
  localparam int NG  = 100;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid_i = 1'b0;
  always #5 clk = ~clk;

  q8_t   h   [N][FI];
  adj_t  adj [N][N];
  q8_t   w   [FO][FI];
  bias_t b   [FO];
  logic  v;
  q8_t   y   [N][FO];
  adj_t  adj_o [N][N];

  sage_layer dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .h_i(h), .adj_i(adj), .w_i(w), .b_i(b),
    .valid_o(v), .h_o(y), .adj_o(adj_o)
  );

  int checks   = 0;
  int failures = 0;
  int cyc      = 0;
  int n_sent   = 0;
  int n_recv   = 0;
  int n_iso    = 0;

  wmat_t wr;
  bvec_t br;
  feat_t hs [NG];
  adjm_t as [NG];
  int    sent_cyc [NG];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int o = 0; o < FO; o++) begin
      for (int f = 0; f < FI; f++) wr[o][f] = rand_s8();
      br[o] = (o % 4 == 0) ? rand_pm(1 << 15) : rand_pm(1 << 8);
      for (int f = 0; f < FI; f++) w[o][f] = q8_t'(wr[o][f]);
      b[o] = bias_t'(br[o]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_sent < NG) begin
      @(negedge clk);
      if ($urandom_range(5) == 0) begin
        valid_i = 1'b0;
      end else begin
        bit mask [MAXN][MAXN];
        int p;
        p = int'($urandom_range(100));
        for (int i = 0; i < MAXN; i++)
          for (int j = 0; j < MAXN; j++) mask[i][j] = ($urandom_range(99) < p);
        n_iso += make_adj(mask, N, as[n_sent]);
        for (int j = 0; j < N; j++)
          for (int f = 0; f < FI; f++) hs[n_sent][j][f] = rand_s8();
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) adj[i][j] = adj_t'(as[n_sent][i][j]);
        for (int j = 0; j < N; j++)
          for (int f = 0; f < FI; f++) h[j][f] = q8_t'(hs[n_sent][j][f]);
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
    // A ReLU layer cannot saturate low, so only the high end is required.
    if (n_iso == 0 || n_relu == 0 || n_sat_hi == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL coverage iso=%0d relu=%0d sat_hi=%0d tie=%0d",
               n_iso, n_relu, n_sat_hi, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (v) begin
      if (n_recv >= n_sent) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        feat_t hh, e;
        aggregate(hs[n_recv], as[n_recv], N, FI, 17, hh);
        linear(hh, wr, br, N, FI, FO, 7, 1'b1, e);
        checks++;
        if (cyc - sent_cyc[n_recv] != LAT) begin
          failures++;
          $display("FAIL latency %0d", cyc - sent_cyc[n_recv]);
        end
        for (int n = 0; n < N; n++) begin
          for (int o = 0; o < FO; o++) begin
            checks++;
            if (int'(y[n][o]) != e[n][o]) begin
              failures++;
              $display("FAIL g%0d [%0d][%0d] got %0d exp %0d", n_recv, n, o, y[n][o], e[n][o]);
            end
          end
          for (int j = 0; j < N; j++) begin
            checks++;
            if (int'(adj_o[n][j]) != as[n_recv][n][j]) begin
              failures++;
              $display("FAIL g%0d adj_o[%0d][%0d]", n_recv, n, j);
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
