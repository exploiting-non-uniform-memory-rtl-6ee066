// Self-checking test of seg_config_reg.
//
// After reset the map must be the identity. Random permutations are then
// written; each must appear the cycle after wr_en and hold while wr_en is
// low.
module tb_seg_config_reg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, wr_en = 0;
  logic [7:0][2:0] wr_map, map, model;

  seg_config_reg dut (.clk, .rst_n, .wr_en, .wr_map, .map);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_map = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < 8; c++) begin
      checks++;
      if (map[c] !== 3'(c)) begin failures++; $display("FAIL reset map[%0d]=%0d", c, map[c]); end
    end
    model = map;
    for (int t = 0; t < 200; t++) begin
      // random permutation by swaps
      logic [7:0][2:0] p;
      for (int c = 0; c < 8; c++) p[c] = 3'(c);
      for (int c = 7; c > 0; c--) begin
        int k; logic [2:0] tmp;
        k = $urandom_range(c, 0);
        tmp = p[c]; p[c] = p[k]; p[k] = tmp;
      end
      wr_map = p;
      wr_en  = ($urandom_range(1, 0) == 1);
      if (wr_en) model = p;
      @(negedge clk);
      checks++;
      if (map !== model) begin failures++; $display("FAIL t=%0d map=%h exp=%h", t, map, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
