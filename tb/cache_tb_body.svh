// Shared body of the end-to-end cache testbenches.
//
// The including module declares INTERVAL (the cache's re-mapping interval),
// PHASE_OPS (processor requests per workload phase) and instantiates the
// cache as `dut` on the signals declared here.
//
// A memory model answers line reads after a random delay, applies
// write-through words and stalls requests at random. The processor model
// issues reads and writes (70/30) to addresses drawn from six tags per set,
// with one "hot" cluster taking about 60 % of the accesses, so the cache
// sees hits, misses, evictions and a skewed per-cluster access count.
//
// Phases: dcf with a context switch; dcf with a new hot cluster and an
// interval-triggered re-mapping; dncf; static map loaded by software.
//
// Checked on every request: read data against the memory model; response
// latency of a read hit (2 cycles); the segment used equals the map entry
// of the address's cluster; segmenter controls equal the thermometer code
// of that segment (all on while idle); no unresolved read.
// Checked at every re-mapping: the new map ranks the clusters by the counts
// shown just before (ties to the lower cluster); dcf clears the counters,
// dncf keeps them; every row of an invalidated segment lost its valid bits;
// after a skewed phase the hot cluster sits in segment 0.
// Every mechanism (hit, miss, eviction, write hit/miss, memory stall, remap
// stall, context-switch, interval, dcf, dncf and static re-mapping,
// invalidation) must occur at least once.

  import sbc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  longint cyc = 0;

  logic              req_valid, req_ready, req_we;
  logic [31:0]       req_addr;
  logic [63:0]       req_wdata, resp_rdata;
  logic [7:0]        req_wstrb;
  logic              resp_valid, resp_hit;
  logic              mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid;
  logic [31:0]       mem_req_addr;
  logic [63:0]       mem_req_wdata;
  logic [7:0]        mem_req_wstrb;
  logic [511:0]      mem_resp_line;
  map_mode_e         map_mode;
  logic              context_switch, sw_load;
  logic [7:0][2:0]   sw_map, cur_map;
  logic [7:0][31:0]  cluster_count;
  logic              remap_done, acc_valid, sense_err;
  logic [7:0]        inval_seg;
  logic [2:0]        acc_segment;
  logic [6:0]        sc;

  // mechanism counters
  int n_rd_hit = 0, n_rd_miss = 0, n_wr_hit = 0, n_wr_miss = 0, n_evict = 0;
  int n_mem_stall = 0, n_remap_stall = 0, n_ctx = 0, n_interval = 0;
  int n_dcf = 0, n_dncf = 0, n_static = 0, n_inval = 0, n_hot0 = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cyc);
    end
  endtask

  // ------------------------------------------------------------ memory model
  logic [63:0] mem_words [int unsigned];

  function automatic logic [63:0] mem_word(int unsigned waddr);
    if (mem_words.exists(waddr)) return mem_words[waddr];
    return {waddr ^ 32'hA5A5_0F0F, ~(waddr * 32'd2654435761)};
  endfunction

  int unsigned refill_line;
  int          refill_wait = -1;

  initial begin
    mem_req_ready = 0; mem_resp_valid = 0; mem_resp_line = '0;
    forever begin
      @(negedge clk);
      mem_resp_valid = 0;
      if (refill_wait == 0) begin
        for (int w = 0; w < 8; w++) mem_resp_line[w*64 +: 64] = mem_word(refill_line * 8 + w);
        mem_resp_valid = 1;
        refill_wait = -1;
      end else if (refill_wait > 0) begin
        refill_wait--;
      end
      mem_req_ready = ($urandom_range(3, 0) != 0);
      if (mem_req_valid && !mem_req_ready) n_mem_stall++;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) begin
          int unsigned wa;
          logic [63:0] v;
          wa = mem_req_addr >> 3;
          v  = mem_word(wa);
          for (int b = 0; b < 8; b++) if (mem_req_wstrb[b]) v[b*8 +: 8] = mem_req_wdata[b*8 +: 8];
          mem_words[wa] = v;
        end else begin
          chk("line-aligned refill address", mem_req_addr[5:0] == 0);
          refill_line = mem_req_addr >> 6;
          refill_wait = $urandom_range(3, 0);
        end
      end
    end
  end

  // ------------------------------------------------------------ monitors
  always @(negedge clk) begin
    if (rst_n) begin
      if (acc_valid) begin
        logic [6:0] e;
        for (int j = 0; j < 7; j++) e[j] = (j < int'(acc_segment));
        chk("segment follows map", acc_segment == cur_map[dut.index_q[5:3]]);
        chk("sc during access", sc == e);
        if (dut.fill_en && dut.u_tag.valid[dut.dec_row][dut.victim_way]) n_evict++;
      end else begin
        chk("sc all on while idle", sc == 7'h7f);
      end
      if (sense_err) chk("read resolved", 0);
    end
  end

  // Re-mapping monitor.
  bit ctx_seen = 0;
  always @(negedge clk) begin
    if (rst_n && remap_done) begin
      logic [7:0][31:0] cnt;
      logic [7:0][2:0]  exp_map;
      logic [7:0]       inv;
      map_mode_e        md;
      int order [8];
      cnt = cluster_count; inv = inval_seg; md = map_mode;
      for (int c = 0; c < 8; c++) order[c] = c;
      for (int a = 0; a < 8; a++)
        for (int b = a + 1; b < 8; b++)
          if (cnt[order[b]] > cnt[order[a]] ||
              (cnt[order[b]] == cnt[order[a]] && order[b] < order[a])) begin
            int t; t = order[a]; order[a] = order[b]; order[b] = t;
          end
      for (int k = 0; k < 8; k++) exp_map[order[k]] = 3'(k);
      if (inv != 0) n_inval++;
      @(negedge clk);
      if (md == MAP_STATIC) begin
        n_static++;
        chk("static map loaded", cur_map == sw_map);
      end else begin
        if (ctx_seen) n_ctx++; else n_interval++;
        ctx_seen = 0;
        chk("ranked map", cur_map == exp_map);
        if (md == MAP_DCF) begin
          n_dcf++;
          chk("dcf flushes counters", cluster_count == '0);
        end else begin
          n_dncf++;
          chk("dncf keeps counters", cluster_count == cnt);
        end
      end
      for (int s = 0; s < 8; s++)
        if (inv[s])
          for (int r = s * 8; r < s * 8 + 8; r++) chk("segment invalidated", dut.u_tag.valid[r] == 0);
    end
  end

  // ------------------------------------------------------------ processor
  int hot = 5;

  task automatic access(bit we);
    logic [31:0] a;
    int set, tag, word;
    longint c0;
    if ($urandom_range(9, 0) < 6) set = hot * 8 + $urandom_range(7, 0);
    else set = $urandom_range(63, 0);
    tag  = $urandom_range(5, 0) + 16;
    word = $urandom_range(7, 0);
    a = {20'(tag), 6'(set), 3'(word), 3'b000};
    req_valid = 1; req_addr = a; req_we = we;
    req_wdata = {$urandom, $urandom};
    req_wstrb = 8'($urandom_range(255, 1));
    while (!req_ready) begin
      if (dut.remap_pending) n_remap_stall++;
      @(negedge clk);
    end
    c0 = cyc;
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (we) begin
      if (resp_hit) n_wr_hit++; else n_wr_miss++;
    end else begin
      chk("read data", resp_rdata == mem_word(a >> 3));
      if (resp_rdata != mem_word(a >> 3)) $display("  addr=%h got=%h exp=%h hit=%0d", a, resp_rdata, mem_word(a >> 3), resp_hit);
      if (resp_hit) begin
        n_rd_hit++;
        chk("read hit latency 2", cyc - c0 == 2);
        if (set / 8 == hot && cur_map[hot] == 0) n_hot0++;
      end else n_rd_miss++;
    end
  endtask

  task automatic run_phase(int n);
    for (int i = 0; i < n; i++) begin
      access($urandom_range(9, 0) < 3);
      // a request sometimes arrives together with a pending re-mapping
      if ($urandom_range(63, 0) == 0 && map_mode != MAP_STATIC) pulse_ctx();
    end
  endtask

  task automatic pulse_ctx();
    ctx_seen = 1;
    context_switch = 1;
    @(negedge clk);
    context_switch = 0;
  endtask

  initial begin
    req_valid = 0; req_addr = 0; req_we = 0; req_wdata = 0; req_wstrb = 0;
    map_mode = MAP_DCF; context_switch = 0; sw_load = 0;
    for (int c = 0; c < 8; c++) sw_map[c] = 3'(c);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // dcf, hot cluster 5, re-mapped at a context switch
    hot = 5;
    run_phase(PHASE_OPS);
    pulse_ctx();
    repeat (3) @(negedge clk);
    chk("hot cluster 5 in segment 0", cur_map[5] == 0);
    run_phase(PHASE_OPS / 4);

    // dcf, hot cluster 2, wait for the interval re-mapping
    hot = 2;
    begin
      int n_int0 = n_interval;
      while (n_interval < n_int0 + 2) run_phase(16);
      chk("hot cluster 2 in segment 0 after interval", cur_map[2] == 0);
    end
    run_phase(PHASE_OPS / 4);

    // dncf, hot cluster 6 (cumulative counts)
    map_mode = MAP_DNCF;
    hot = 6;
    run_phase(PHASE_OPS);
    pulse_ctx();
    repeat (3) @(negedge clk);
    run_phase(PHASE_OPS / 4);

    // static map loaded by software: reverse order
    map_mode = MAP_STATIC;
    for (int c = 0; c < 8; c++) sw_map[c] = 3'(7 - c);
    sw_load = 1; @(negedge clk); sw_load = 0;
    repeat (3) @(negedge clk);
    chk("static map in place", cur_map == sw_map);
    pulse_ctx();           // ignored in static mode
    ctx_seen = 0;
    run_phase(PHASE_OPS / 2);
    chk("static map kept", cur_map == sw_map);

    $display("mechanisms: rd_hit=%0d rd_miss=%0d wr_hit=%0d wr_miss=%0d evict=%0d mem_stall=%0d",
             n_rd_hit, n_rd_miss, n_wr_hit, n_wr_miss, n_evict, n_mem_stall);
    $display("mechanisms: remap_stall=%0d ctx=%0d interval=%0d dcf=%0d dncf=%0d static=%0d inval=%0d hot_in_seg0=%0d",
             n_remap_stall, n_ctx, n_interval, n_dcf, n_dncf, n_static, n_inval, n_hot0);
    chk("rd hit seen", n_rd_hit > 0);
    chk("rd miss seen", n_rd_miss > 0);
    chk("wr hit seen", n_wr_hit > 0);
    chk("wr miss seen", n_wr_miss > 0);
    chk("eviction seen", n_evict > 0);
    chk("memory stall seen", n_mem_stall > 0);
    chk("remap stall seen", n_remap_stall > 0);
    chk("context-switch remap seen", n_ctx > 0);
    chk("interval remap seen", n_interval > 0);
    chk("dcf remap seen", n_dcf > 0);
    chk("dncf remap seen", n_dncf > 0);
    chk("static load seen", n_static > 0);
    chk("invalidation seen", n_inval > 0);
    chk("hot hits in segment 0", n_hot0 > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cyc == WATCHDOG);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
