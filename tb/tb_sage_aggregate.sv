// tb_sage_aggregate: streams random graphs through the aggregation stage at
// its default size (8 nodes, 16 features, shift 17) and through a second
// instance with the layer-2 settings (24 features, shift 12), compares every
// output with the reference model and checks the 4-cycle latency.  Graphs
// are sent back to back (one per cycle) with occasional idle cycles, and
// include isolated nodes and fully connected rows.
module tb_sage_aggregate;
  import gnn_pkg::*;
  import gnn_ref_pkg::*;

  localparam int N   = 8;
  localparam int LAT = 4;
  localparam int NG  = 120;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid_i = 1'b0;
  always #5 clk = ~clk;

  q8_t  h1 [N][16];
  q8_t  h2 [N][24];
  adj_t adj [N][N];
  logic v1, v2;
  q8_t  hh1 [N][16];
  q8_t  hh2 [N][24];

  sage_aggregate dut1 (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .h_i(h1), .adj_i(adj),
    .valid_o(v1), .hh_o(hh1)
  );

  sage_aggregate #(.F(24), .SHIFT(12)) dut2 (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .h_i(h2), .adj_i(adj),
    .valid_o(v2), .hh_o(hh2)
  );

  int checks   = 0;
  int failures = 0;
  int cyc      = 0;
  int n_sent   = 0;
  int n_recv   = 0;
  int n_iso    = 0;
  int n_b2b    = 0;

  feat_t hs [NG];
  adjm_t as [NG];
  int    sent_cyc [NG];

  always @(posedge clk) cyc <= cyc + 1;

  // Stimulus, applied on the falling edge.
  initial begin
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
          for (int f = 0; f < 24; f++) hs[n_sent][j][f] = rand_s8();
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) adj[i][j] = adj_t'(as[n_sent][i][j]);
        for (int j = 0; j < N; j++) begin
          for (int f = 0; f < 16; f++) h1[j][f] = q8_t'(hs[n_sent][j][f]);
          for (int f = 0; f < 24; f++) h2[j][f] = q8_t'(hs[n_sent][j][f]);
        end
        if (valid_i) n_b2b++;
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
    if (n_iso == 0 || n_b2b == 0 || n_tie == 0) begin
      failures++;
      $display("FAIL coverage iso=%0d b2b=%0d tie=%0d", n_iso, n_b2b, n_tie);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard, sampled on the falling edge.
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
        aggregate(hs[n_recv], as[n_recv], N, 16, 17, e1);
        aggregate(hs[n_recv], as[n_recv], N, 24, 12, e2);
        checks++;
        if (cyc - sent_cyc[n_recv] != LAT) begin
          failures++;
          $display("FAIL latency %0d", cyc - sent_cyc[n_recv]);
        end
        for (int i = 0; i < N; i++) begin
          for (int f = 0; f < 16; f++) begin
            checks++;
            if (int'(hh1[i][f]) != e1[i][f]) begin
              failures++;
              $display("FAIL g%0d L1 [%0d][%0d] got %0d exp %0d", n_recv, i, f, hh1[i][f], e1[i][f]);
            end
          end
          for (int f = 0; f < 24; f++) begin
            checks++;
            if (int'(hh2[i][f]) != e2[i][f]) begin
              failures++;
              $display("FAIL g%0d L2 [%0d][%0d] got %0d exp %0d", n_recv, i, f, hh2[i][f], e2[i][f]);
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
