// tb_graphsage_top: end-to-end test of the two-layer network at its default
// size (8 nodes, 16 -> 24 -> 7, no parameter overrides).
//
// One set of random INT8 weights and integer biases is loaded, then a
// stream of random graphs is sent, mostly back to back at one graph per
// cycle with occasional idle cycles.  Graph densities range from empty to
// fully connected, so isolated nodes occur.  Each graph's logits and class
// labels are compared with the reference model (aggregation and linear
// step of both layers, then argmax), and every result must appear exactly
// 19 cycles after its input.  A reset is applied in the middle of the
// stream to check that it flushes the graphs in flight.  At the end the
// testbench requires that each mechanism of the datapath was exercised at
// least once: half-way rounding, ReLU clamping, saturation high and low,
// isolated nodes, back-to-back inputs, idle cycles, label ties and the
// mid-stream reset.
module tb_graphsage_top;
  import gnn_pkg::*;
  import gnn_ref_pkg::*;

  localparam int N   = 8;
  localparam int FI  = 16;
  localparam int FH  = 24;
  localparam int FO  = 7;
  localparam int LAT = 19;
  localparam int NG  = 200;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic valid_i = 1'b0;
  always #5 clk = ~clk;

  q8_t        x    [N][FI];
  adj_t       adj  [N][N];
  q8_t        w1   [FH][FI];
  bias_t      b1   [FH];
  q8_t        w2   [FO][FH];
  bias_t      b2   [FO];
  logic       v;
  q8_t        lg   [N][FO];
  logic [2:0] lbl  [N];

  graphsage_top dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .x_i(x), .adj_i(adj),
    .w1_i(w1), .b1_i(b1), .w2_i(w2), .b2_i(b2),
    .valid_o(v), .logits_o(lg), .label_o(lbl)
  );

  int checks   = 0;
  int failures = 0;
  int cyc      = 0;
  int n_sent   = 0;
  int n_recv   = 0;
  int n_iso    = 0;
  int n_b2b    = 0;
  int n_idle   = 0;
  int n_lbltie = 0;
  int n_flush  = 0;

  wmat_t wr1, wr2;
  bvec_t br1, br2;
  feat_t xs [NG];
  adjm_t as [NG];
  int    sent_cyc [NG];
  bit    dropped  [NG];

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int o = 0; o < FH; o++) begin
      for (int f = 0; f < FI; f++) wr1[o][f] = rand_s8();
      br1[o] = (o % 4 == 0) ? rand_pm(1 << 15) : rand_pm(1 << 8);
      for (int f = 0; f < FI; f++) w1[o][f] = q8_t'(wr1[o][f]);
      b1[o] = bias_t'(br1[o]);
    end
    // A large positive bias on hidden channel 4 drives it into high saturation.
    br1[4] = 1 << 15;
    b1[4]  = bias_t'(br1[4]);
    for (int o = 0; o < FO; o++) begin
      for (int f = 0; f < FH; f++) wr2[o][f] = rand_pm(40);
      br2[o] = rand_pm(1 << 9);
      for (int f = 0; f < FH; f++) w2[o][f] = q8_t'(wr2[o][f]);
      b2[o] = bias_t'(br2[o]);
    end
    // Class 6 duplicates class 3, so their logits tie whenever 3 wins.
    for (int f = 0; f < FH; f++) begin
      wr2[6][f] = wr2[3][f];
      w2[6][f]  = w2[3][f];
    end
    br2[6] = br2[3];
    b2[6]  = b2[3];
    // A large negative bias on class 0 drives its logit into low saturation.
    br2[0] = -(1 << 16);
    b2[0]  = bias_t'(br2[0]);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (n_sent < NG) begin
      @(negedge clk);
      if (n_sent == NG / 2 && n_flush == 0) begin
        // Mid-stream reset: everything in flight is dropped.
        valid_i = 1'b0;
        rst_n   = 1'b0;
        for (int g = n_recv; g < n_sent; g++) dropped[g] = 1'b1;
        n_flush = n_sent - n_recv;
        @(negedge clk);
        rst_n  = 1'b1;
        n_recv = n_sent;
      end else if ($urandom_range(7) == 0) begin
        valid_i = 1'b0;
        n_idle++;
      end else begin
        bit mask [MAXN][MAXN];
        int p;
        p = int'($urandom_range(100));
        for (int i = 0; i < MAXN; i++)
          for (int j = 0; j < MAXN; j++) mask[i][j] = ($urandom_range(99) < p);
        n_iso += make_adj(mask, N, as[n_sent]);
        for (int j = 0; j < N; j++)
          for (int f = 0; f < FI; f++) xs[n_sent][j][f] = rand_s8();
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) adj[i][j] = adj_t'(as[n_sent][i][j]);
        for (int j = 0; j < N; j++)
          for (int f = 0; f < FI; f++) x[j][f] = q8_t'(xs[n_sent][j][f]);
        if (valid_i) n_b2b++;
        valid_i = 1'b1;
        sent_cyc[n_sent] = cyc;
        dropped[n_sent]  = 1'b0;
        n_sent++;
      end
    end
    @(negedge clk);
    valid_i = 1'b0;
    repeat (LAT + 4) @(negedge clk);
    checks++;
    if (n_recv != NG) begin
      failures++;
      $display("FAIL received up to %0d of %0d", n_recv, NG);
    end
    $display("coverage: tie=%0d relu=%0d sat_hi=%0d sat_lo=%0d iso=%0d b2b=%0d idle=%0d label_tie=%0d flushed=%0d",
             n_tie, n_relu, n_sat_hi, n_sat_lo, n_iso, n_b2b, n_idle, n_lbltie, n_flush);
    if (n_tie == 0)    begin failures++; $display("FAIL never: half-way rounding"); end
    if (n_relu == 0)   begin failures++; $display("FAIL never: ReLU clamp"); end
    if (n_sat_hi == 0) begin failures++; $display("FAIL never: saturation high"); end
    if (n_sat_lo == 0) begin failures++; $display("FAIL never: saturation low"); end
    if (n_iso == 0)    begin failures++; $display("FAIL never: isolated node"); end
    if (n_b2b == 0)    begin failures++; $display("FAIL never: back-to-back graphs"); end
    if (n_idle == 0)   begin failures++; $display("FAIL never: idle cycle"); end
    if (n_lbltie == 0) begin failures++; $display("FAIL never: label tie"); end
    if (n_flush == 0)  begin failures++; $display("FAIL never: reset with graphs in flight"); end
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (v) begin
      if (n_recv >= n_sent) begin
        failures++;
        $display("FAIL output without input");
      end else begin
        feat_t hh1, h1, hh2, e;
        aggregate(xs[n_recv], as[n_recv], N, FI, 17, hh1);
        linear(hh1, wr1, br1, N, FI, FH, 7, 1'b1, h1);
        aggregate(h1, as[n_recv], N, FH, 12, hh2);
        linear(hh2, wr2, br2, N, FH, FO, 8, 1'b0, e);
        checks++;
        if (cyc - sent_cyc[n_recv] != LAT) begin
          failures++;
          $display("FAIL g%0d latency %0d", n_recv, cyc - sent_cyc[n_recv]);
        end
        for (int n = 0; n < N; n++) begin
          int el, cnt;
          for (int o = 0; o < FO; o++) begin
            checks++;
            if (int'(lg[n][o]) != e[n][o]) begin
              failures++;
              $display("FAIL g%0d logit[%0d][%0d] got %0d exp %0d", n_recv, n, o, lg[n][o], e[n][o]);
            end
          end
          el  = argmax(e, n, FO);
          cnt = 0;
          for (int o = 0; o < FO; o++) if (e[n][o] == e[n][el]) cnt++;
          if (cnt > 1) n_lbltie++;
          checks++;
          if (int'(lbl[n]) != el) begin
            failures++;
            $display("FAIL g%0d label[%0d] got %0d exp %0d", n_recv, n, lbl[n], el);
          end
        end
        n_recv++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
