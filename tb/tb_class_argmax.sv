// tb_class_argmax: checks the per-node class decision on random logits and
// on logits with forced ties (the lowest class index must win) and with
// the maximum at the first and the last class.
module tb_class_argmax;
  import gnn_pkg::*;
  import gnn_ref_pkg::*;

  localparam int N  = 8;
  localparam int NC = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int n_ties   = 0;

  q8_t        logits [N][NC];
  logic [2:0] label  [N];

  class_argmax dut (.logits_i(logits), .label_o(label));

  initial begin
    feat_t y;
    for (int t = 0; t < 2000; t++) begin
      for (int n = 0; n < N; n++)
        for (int c = 0; c < NC; c++)
          y[n][c] = (t % 3 == 0) ? rand_pm(3) : rand_s8();
      if (t % 5 == 1) y[t % N][0] = 127;
      if (t % 5 == 2) y[t % N][NC-1] = 127;
      for (int n = 0; n < N; n++)
        for (int c = 0; c < NC; c++) logits[n][c] = q8_t'(y[n][c]);
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        int e, cnt;
        e   = argmax(y, n, NC);
        cnt = 0;
        for (int c = 0; c < NC; c++) if (y[n][c] == y[n][e]) cnt++;
        if (cnt > 1) n_ties++;
        checks++;
        if (int'(label[n]) != e) begin
          failures++;
          $display("FAIL t=%0d node %0d label=%0d exp=%0d", t, n, label[n], e);
        end
      end
    end
    if (n_ties == 0) begin
      failures++;
      $display("FAIL no tie exercised");
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
