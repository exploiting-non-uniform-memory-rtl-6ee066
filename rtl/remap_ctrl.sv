// Cluster-to-segment re-mapping controller.
//
// Chooses the contents of the configuration register.
//
//   * MAP_STATIC: the map is whatever software loads (sw_load, sw_map), for
//     example a map obtained by profiling. Hardware never changes it.
//   * MAP_DCF / MAP_DNCF: a re-mapping is requested at every context switch
//     (context_switch pulse) and, when REMAP_INTERVAL is non-zero, every
//     REMAP_INTERVAL cycles. The clusters are ranked by their access
//     counts, most accessed first (ties go to the lower cluster number), and
//     the cluster of rank k is mapped to segment k, so the most used cluster
//     lands in segment 0, next to the sense amplifiers, where an access
//     costs least. In MAP_DCF the counters are flushed with the re-mapping;
//     in MAP_DNCF they keep counting.
//
// Moving a cluster leaves stale data in the segments involved, so with
// every map change the controller raises inval_seg for each physical
// segment whose cluster changed; the cache clears the valid bits of those
// rows (lines are not copied).
//
// Timing: a request stays pending until allow is high (the cache is idle);
// in that cycle cfg_we, the new map, inval_seg and (dcf) cnt_flush are
// given together and remap_done pulses. The ranking is combinational
// (NSEG*(NSEG-1) comparators).
//
// Ranking by counters, dcf/dncf, re-mapping at context switches or fixed
// intervals, and invalidation instead of copying follow the published
// proposal. The tie rule, the per-segment invalidation and the pending/allow
// handshake are this design's choices.
module remap_ctrl
  import sbc_pkg::*;
#(
  parameter int unsigned NSEG           = sbc_pkg::NSEG_DEF,
  parameter int unsigned CNT_W          = sbc_pkg::CNT_W_DEF,
  parameter int unsigned REMAP_INTERVAL = sbc_pkg::REMAP_INTERVAL_DEF,
  parameter int unsigned SEG_W          = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  map_mode_e                  mode,
  input  logic                       context_switch,
  input  logic                       sw_load,
  input  logic [NSEG-1:0][SEG_W-1:0] sw_map,
  input  logic                       allow,
  input  logic [NSEG-1:0][CNT_W-1:0] count,
  input  logic [NSEG-1:0][SEG_W-1:0] cur_map,
  output logic                       cfg_we,
  output logic [NSEG-1:0][SEG_W-1:0] cfg_map,
  output logic [NSEG-1:0]            inval_seg,
  output logic                       cnt_flush,
  output logic                       remap_done,
  output logic                       pending
);

  logic                       dyn_pending, sw_pending;
  logic [NSEG-1:0][SEG_W-1:0] sw_map_q;
  logic [31:0]                interval_cnt;
  logic                       interval_tick;
  logic [NSEG-1:0][SEG_W-1:0] rank_map;
  logic                       dynamic;

  assign dynamic = (mode == MAP_DCF) || (mode == MAP_DNCF);

  // Interval timer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      interval_cnt <= '0;
    end else if (REMAP_INTERVAL != 0) begin
      interval_cnt <= interval_tick ? '0 : interval_cnt + 1'b1;
    end
  end
  assign interval_tick = (REMAP_INTERVAL != 0) && (interval_cnt == 32'(REMAP_INTERVAL - 1));

  // Rank of each cluster: number of clusters accessed more often (or as
  // often with a lower number).
  always_comb begin
    for (int i = 0; i < NSEG; i++) begin
      int unsigned r;
      r = 0;
      for (int j = 0; j < NSEG; j++) begin
        if (j != i && (count[j] > count[i] || (count[j] == count[i] && j < i))) r++;
      end
      rank_map[i] = SEG_W'(r);
    end
  end

  always_comb begin
    cfg_we    = 1'b0;
    cfg_map   = cur_map;
    cnt_flush = 1'b0;
    if (allow && sw_pending && mode == MAP_STATIC) begin
      cfg_we  = 1'b1;
      cfg_map = sw_map_q;
    end else if (allow && dyn_pending && dynamic) begin
      cfg_we    = 1'b1;
      cfg_map   = rank_map;
      cnt_flush = (mode == MAP_DCF);
    end
    inval_seg = '0;
    if (cfg_we) begin
      for (int c = 0; c < NSEG; c++) begin
        if (cfg_map[c] != cur_map[c]) begin
          inval_seg[cfg_map[c]] = 1'b1;
          inval_seg[cur_map[c]] = 1'b1;
        end
      end
    end
  end
  assign remap_done = cfg_we;
  assign pending    = (dyn_pending && dynamic) || (sw_pending && mode == MAP_STATIC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dyn_pending <= 1'b0;
      sw_pending  <= 1'b0;
      sw_map_q    <= '0;
    end else begin
      if (cfg_we) begin
        dyn_pending <= 1'b0;
        sw_pending  <= 1'b0;
      end
      if (dynamic && (context_switch || interval_tick)) dyn_pending <= 1'b1;
      if (!dynamic) dyn_pending <= 1'b0;
      if (sw_load) begin
        sw_pending <= 1'b1;
        sw_map_q   <= sw_map;
      end
    end
  end

endmodule
