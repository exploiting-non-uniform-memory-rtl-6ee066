// Self-checking test of cluster_counters.
//
// Random increments and flushes are applied and the counters compared each
// cycle with a model kept here. A second instance with 4-bit counters is
// driven hard on one cluster to check saturation at 15.
module tb_cluster_counters;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic inc_en, flush;
  logic [2:0] inc_cluster;
  logic [7:0][31:0] count;
  logic [7:0][3:0]  count_s;
  longint model [8];
  int     model_s [8];

  cluster_counters dut (.clk, .rst_n, .inc_en, .inc_cluster, .flush, .count);
  cluster_counters #(.CNT_W(4)) dut_s (.clk, .rst_n, .inc_en, .inc_cluster, .flush,
                                       .count(count_s));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    inc_en = 0; flush = 0; inc_cluster = 0;
    foreach (model[c]) begin model[c] = 0; model_s[c] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      inc_en      = ($urandom_range(3, 0) != 0);
      // skewed: cluster 5 is hot
      inc_cluster = ($urandom_range(1, 0) == 1) ? 3'd5 : 3'($urandom_range(7, 0));
      flush       = ($urandom_range(199, 0) == 0);
      for (int c = 0; c < 8; c++) begin
        logic hit;
        hit = inc_en && (int'(inc_cluster) == c);
        if (flush) begin
          model[c]   = hit ? 1 : 0;
          model_s[c] = hit ? 1 : 0;
        end else if (hit) begin
          model[c]++;
          if (model_s[c] < 15) model_s[c]++;
        end
      end
      @(negedge clk);
      for (int c = 0; c < 8; c++) begin
        checks++;
        if (longint'(count[c]) != model[c] || int'(count_s[c]) != model_s[c]) begin
          failures++;
          $display("FAIL t=%0d c=%0d count=%0d/%0d exp=%0d/%0d", t, c, count[c], count_s[c],
                   model[c], model_s[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
