// One run of the segment-activity workload (helper of tb_segment_activity).
//
// Drives a seg_bitline_cache with NSEG row groups (segmenters at the
// boundaries flagged in PRESENT) through N_REQ requests of a
// synthetic skewed address stream and counts, per physical segment, how
// many requests were looked up in each row group. The stream mimics an L1 access
// histogram in which a few sets take most accesses: three hot sets take
// about 20 % of the requests each, six warm sets share 15 %, and the rest
// is spread over all 64 sets. No hot set lies in the first cluster, so
// the identity map gives them no head start. Halfway through, the hot and
// warm sets move (a program phase change). 30 % of requests are writes.
//
// MODE selects the mapping:
//   0  identity map, never changed (the plain address-decoded placement)
//   1  static map from a profile: a first pass under the identity map is
//      run, the clusters are ranked from the cache's own counters, the map
//      is loaded with sw_load, and the measured pass repeats the stream
//   2  dcf, re-mapped at a context switch every CTX_EVERY requests
//   3  dncf, same context switches
// Read data is checked against a memory model throughout.
module seg_activity_run #(
  parameter int NSEG      = 8,
  parameter int MODE      = 0,
  parameter int N_REQ     = 6000,
  parameter int CTX_EVERY = 500,
  parameter logic [NSEG-2:0] PRESENT = '1
) (
  output logic       done,
  output int         seg_acc [8],
  output int         checks,
  output int         failures,
  output int         remaps
);
  import sbc_pkg::*;
  localparam int SEG_W = (NSEG > 1) ? $clog2(NSEG) : 1;
  localparam int SC_W  = (NSEG > 1) ? NSEG - 1 : 1;
  localparam int RPS   = 64 / NSEG;

  logic clk = 0, rst_n = 0;
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
  logic [NSEG-1:0][SEG_W-1:0] sw_map, cur_map;
  logic [NSEG-1:0][31:0]      cluster_count;
  logic              remap_done, acc_valid, sense_err;
  logic [NSEG-1:0]   inval_seg;
  logic [SEG_W-1:0]  acc_segment;
  logic [SC_W-1:0]   sc;

  seg_bitline_cache #(.NSEG(NSEG), .REMAP_INTERVAL(0), .SEGMENTER_PRESENT(PRESENT)) dut (.*);

  always #5 clk = ~clk;

  bit measuring = 0;
  always @(negedge clk) begin
    if (measuring && dut.lookup && !dut.replay_q) seg_acc[int'(acc_segment)]++;
    if (remap_done) remaps++;
    if (rst_n && sense_err) begin checks++; failures++; end
  end

  // memory model
  logic [63:0] mem_words [int unsigned];
  function automatic logic [63:0] mem_word(int unsigned waddr);
    if (mem_words.exists(waddr)) return mem_words[waddr];
    return {waddr ^ 32'h5A5A_F0F0, waddr * 32'd40503};
  endfunction

  initial begin
    mem_req_ready = 1; mem_resp_valid = 0; mem_resp_line = '0;
    forever begin
      @(negedge clk);
      mem_resp_valid = 0;
      if (mem_req_valid && mem_req_ready) begin
        if (mem_req_we) begin
          int unsigned wa;
          logic [63:0] v;
          wa = mem_req_addr >> 3;
          v  = mem_word(wa);
          for (int b = 0; b < 8; b++) if (mem_req_wstrb[b]) v[b*8 +: 8] = mem_req_wdata[b*8 +: 8];
          mem_words[wa] = v;
        end else begin
          int unsigned ln;
          ln = mem_req_addr >> 6;
          @(negedge clk);
          for (int w = 0; w < 8; w++) mem_resp_line[w*64 +: 64] = mem_word(ln * 8 + w);
          mem_resp_valid = 1;
        end
      end
    end
  end

  function automatic int pick_set(int phase);
    int u, hot [3], warm [6];
    if (phase == 0) begin
      hot  = '{22, 45, 59};
      warm = '{2, 20, 29, 44, 50, 61};
    end else begin
      hot  = '{30, 52, 41};
      warm = '{9, 17, 33, 40, 55, 62};
    end
    u = $urandom_range(999, 0);
    if (u < 600) return hot[u / 200];
    if (u < 750) return warm[(u - 600) / 25 % 6];
    return $urandom_range(63, 0);
  endfunction

  task automatic access(int set);
    logic [31:0] a;
    bit we;
    we = ($urandom_range(9, 0) < 3);
    a = {20'($urandom_range(3, 0)), 6'(set), 3'($urandom_range(7, 0)), 3'b000};
    req_valid = 1; req_addr = a; req_we = we;
    req_wdata = {$urandom, $urandom}; req_wstrb = 8'($urandom_range(255, 1));
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) @(negedge clk);
    if (!we) begin
      checks++;
      if (resp_rdata != mem_word(a >> 3)) failures++;
    end
  endtask

  task automatic run_stream(bit with_ctx);
    for (int i = 0; i < N_REQ; i++) begin
      access(pick_set(i < N_REQ / 2 ? 0 : 1));
      if (with_ctx && i % CTX_EVERY == CTX_EVERY - 1) begin
        context_switch = 1; @(negedge clk); context_switch = 0;
      end
    end
  endtask

  initial begin
    done = 0; checks = 0; failures = 0; remaps = 0;
    foreach (seg_acc[s]) seg_acc[s] = 0;
    req_valid = 0; req_addr = 0; req_we = 0; req_wdata = 0; req_wstrb = 0;
    context_switch = 0; sw_load = 0;
    for (int c = 0; c < NSEG; c++) sw_map[c] = SEG_W'(c);
    map_mode = (MODE == 2) ? MAP_DCF : (MODE == 3) ? MAP_DNCF : MAP_STATIC;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    if (MODE == 1) begin
      int order [NSEG];
      // profiling pass under the identity map
      run_stream(0);
      for (int c = 0; c < NSEG; c++) order[c] = c;
      for (int x = 0; x < NSEG; x++)
        for (int y = x + 1; y < NSEG; y++)
          if (cluster_count[order[y]] > cluster_count[order[x]]) begin
            int t; t = order[x]; order[x] = order[y]; order[y] = t;
          end
      for (int k = 0; k < NSEG; k++) sw_map[order[k]] = SEG_W'(k);
      sw_load = 1; @(negedge clk); sw_load = 0;
      repeat (3) @(negedge clk);
      checks++;
      if (cur_map != sw_map) failures++;
    end
    measuring = 1;
    run_stream(MODE >= 2);
    measuring = 0;
    done = 1;
  end
endmodule
