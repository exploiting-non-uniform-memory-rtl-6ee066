// Self-checking test of remap_ctrl.
//
// The counters and the current map are driven directly. The expected map is
// worked out here by sorting the clusters (count descending, then cluster
// number ascending) and giving the k-th cluster segment k. Checked:
//   * dcf: context switch -> new map, counter flush, invalidation of exactly
//     the segments whose cluster changed;
//   * dncf: same map, no flush;
//   * a request waits while allow is low;
//   * interval timer (REMAP_INTERVAL shortened to 400) raises a request;
//   * static: software map applied, context switches ignored.
module tb_remap_ctrl;
  import sbc_pkg::*;
  localparam int INTERVAL = 400;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  map_mode_e mode;
  logic context_switch, sw_load, allow;
  logic [7:0][2:0]  sw_map, cur_map, cfg_map;
  logic [7:0][31:0] count;
  logic cfg_we, cnt_flush, remap_done, pending;
  logic [7:0] inval_seg;
  int n_dyn = 0, n_static = 0, n_interval = 0;

  remap_ctrl #(.REMAP_INTERVAL(INTERVAL)) dut (
    .clk, .rst_n, .mode, .context_switch, .sw_load, .sw_map, .allow, .count, .cur_map,
    .cfg_we, .cfg_map, .inval_seg, .cnt_flush, .remap_done, .pending);

  always #5 clk = ~clk;

  // The config register, modelled here.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) for (int c = 0; c < 8; c++) cur_map[c] <= 3'(c);
    else if (cfg_we) cur_map <= cfg_map;

  task automatic expect_rank(output logic [7:0][2:0] m);
    int order [8];
    for (int c = 0; c < 8; c++) order[c] = c;
    for (int a = 0; a < 8; a++)
      for (int b = a + 1; b < 8; b++)
        if (count[order[b]] > count[order[a]] ||
            (count[order[b]] == count[order[a]] && order[b] < order[a])) begin
          int tmp; tmp = order[a]; order[a] = order[b]; order[b] = tmp;
        end
    for (int k = 0; k < 8; k++) m[order[k]] = 3'(k);
  endtask

  function automatic logic [7:0] expect_inval(logic [7:0][2:0] o, logic [7:0][2:0] n);
    logic [7:0] v = '0;
    for (int p = 0; p < 8; p++) begin
      int oc = -1, nc = -1;
      for (int c = 0; c < 8; c++) begin
        if (o[c] == 3'(p)) oc = c;
        if (n[c] == 3'(p)) nc = c;
      end
      if (oc != nc) v[p] = 1'b1;
    end
    return v;
  endfunction

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic random_counts();
    for (int c = 0; c < 8; c++) count[c] = $urandom_range(20, 0) * 1000 + $urandom_range(3, 0);
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    logic [7:0][2:0] exp_map;
    mode = MAP_DCF; context_switch = 0; sw_load = 0; sw_map = '0; allow = 1; count = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // dcf and dncf, several rounds each
    for (int r = 0; r < 20; r++) begin
      mode = (r % 2 == 0) ? MAP_DCF : MAP_DNCF;
      random_counts();
      allow = ($urandom_range(1, 0) == 1);
      context_switch = 1;
      @(negedge clk);
      context_switch = 0;
      if (!allow) begin
        repeat (3) begin
          chk("held while not allowed", !cfg_we && pending);
          @(negedge clk);
        end
        allow = 1;
      end
      expect_rank(exp_map);
      #1;
      chk("cfg_we", cfg_we === 1'b1);
      chk("rank map", cfg_map === exp_map);
      chk("flush only in dcf", cnt_flush === (mode == MAP_DCF));
      chk("invalidate moved segments", inval_seg === expect_inval(cur_map, exp_map));
      if (cfg_we) n_dyn++;
      @(negedge clk);
      chk("single pulse", !cfg_we && !pending);
    end
    // interval timer: wait without context switches
    mode = MAP_DCF;
    random_counts();
    begin
      int waited = 0;
      while (!cfg_we && waited < 3 * INTERVAL) begin @(negedge clk); waited++; end
      chk("interval remap happened", cfg_we === 1'b1 && waited <= INTERVAL + 1);
      expect_rank(exp_map);
      chk("interval rank map", cfg_map === exp_map);
      if (cfg_we) n_interval++;
      @(negedge clk);
    end
    // static: context switch ignored, software map applied
    mode = MAP_STATIC;
    random_counts();
    context_switch = 1; @(negedge clk); context_switch = 0;
    repeat (INTERVAL + 5) begin
      chk("static: no hardware remap", !cfg_we);
      @(negedge clk);
    end
    for (int c = 0; c < 8; c++) sw_map[c] = 3'(7 - c);
    sw_load = 1; @(negedge clk); sw_load = 0;
    #1;
    chk("static load applied", cfg_we && cfg_map === sw_map && !cnt_flush);
    chk("static invalidation", inval_seg === expect_inval(cur_map, sw_map));
    if (cfg_we) n_static++;
    @(negedge clk);
    chk("static map held", cur_map === sw_map);
    chk("mechanisms seen", n_dyn == 20 && n_interval == 1 && n_static == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
