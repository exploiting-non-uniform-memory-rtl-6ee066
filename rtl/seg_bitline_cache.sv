// Segmented-bitline L1 cache (top level).
//
// A set-associative cache whose data array has its bitlines cut into NSEG
// segments. An access to the segment next to the sense amplifiers
// discharges only that short piece of bitline; an access further away
// switches on the segmenters in between. Because a few sets take most of
// the accesses, the cache places the busiest sets in the near segments:
//
//   * Clustering: the MSBs of the set index name a cluster (NSETS/NSEG sets);
//     the LSBs name the row inside a segment.
//   * Mapping: a configuration register maps each cluster to a segment; the
//     address decoder reads it through a mux in front of the segment bits.
//   * Re-mapping: per-cluster access counters rank the clusters at each
//     context switch and every REMAP_INTERVAL cycles (dcf: counters flushed
//     each time; dncf: cumulative), or software loads a fixed map (static).
//     Segments whose cluster changed are invalidated.
//
// Defaults: 16 KB, 4 ways, 64-byte lines (64 sets), 8 segments of 8 rows,
// re-mapping every 1,000,000 cycles. SEGMENTER_PRESENT leaves out
// segmenters at chosen boundaries between the NSEG row groups, which gives
// the unequal segment layouts (for example 8/16/40 rows) that trade part of
// the saving for fewer segmenters in the path of the far rows. A "segment"
// at the ports and in the map is always one of the NSEG equal row groups.
//
// Processor port (valid/ready request, one response per request):
//   req_addr is a byte address; a request moves one WORD_W-bit word,
//   req_wstrb selects bytes of a write. A read hit is accepted at one rising
//   edge, looked up in the next cycle, and its response (resp_valid,
//   resp_rdata, resp_hit=1) is registered at the edge after that. A read
//   miss fetches the line (mem_req_*, then mem_resp_valid with the whole
//   line), fills the LRU or a free way and replays the lookup; its response
//   has resp_hit=0. Writes are write-through without allocation: a write hit
//   also updates the array; every write is sent to memory and acknowledged
//   with resp_valid once memory accepts it. Because no line is ever dirty,
//   invalidating a segment never loses data.
// Memory port: mem_req_valid/ready carry a line read (mem_req_we=0, line
//   address) or a word write; mem_resp_valid returns a read line.
// Mapping port: map_mode, context_switch (pulse), sw_load/sw_map (static
//   map). A pending re-mapping is applied in an idle cycle and holds off new
//   requests (req_ready low) for that cycle.
// Observation: acc_valid/acc_segment mark each data-array access and the
//   physical segment it used; sc shows the segmenter controls; sense_err
//   flags a read whose bitlines did not resolve.
//
// Clustering by index MSBs, the configuration register and mux, the
// segmenter operation, the counters and dcf/dncf/static mapping and
// invalidation on re-mapping follow the published proposal. The handshakes,
// the write policy, LRU replacement, word width and latencies are this
// design's own choices.
module seg_bitline_cache
  import sbc_pkg::*;
#(
  parameter int unsigned NSETS          = sbc_pkg::NSETS_DEF,
  parameter int unsigned WAYS           = sbc_pkg::WAYS_DEF,
  parameter int unsigned LINE_BYTES     = sbc_pkg::LINE_BYTES_DEF,
  parameter int unsigned NSEG           = sbc_pkg::NSEG_DEF,
  parameter int unsigned ADDR_W         = sbc_pkg::ADDR_W_DEF,
  parameter int unsigned WORD_W         = sbc_pkg::WORD_W_DEF,
  parameter int unsigned CNT_W          = sbc_pkg::CNT_W_DEF,
  parameter int unsigned REMAP_INTERVAL = sbc_pkg::REMAP_INTERVAL_DEF,
  parameter int unsigned SEG_W          = (NSEG > 1) ? $clog2(NSEG) : 1,
  parameter int unsigned SC_W           = (NSEG > 1) ? NSEG - 1 : 1,
  // Which row-group boundaries carry a segmenter (all: NSEG equal segments).
  parameter logic [SC_W-1:0] SEGMENTER_PRESENT = '1,
  parameter int unsigned LINE_W         = LINE_BYTES * 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processor side
  input  logic                       req_valid,
  output logic                       req_ready,
  input  logic [ADDR_W-1:0]          req_addr,
  input  logic                       req_we,
  input  logic [WORD_W-1:0]          req_wdata,
  input  logic [WORD_W/8-1:0]        req_wstrb,
  output logic                       resp_valid,
  output logic [WORD_W-1:0]          resp_rdata,
  output logic                       resp_hit,
  // memory side
  output logic                       mem_req_valid,
  input  logic                       mem_req_ready,
  output logic                       mem_req_we,
  output logic [ADDR_W-1:0]          mem_req_addr,
  output logic [WORD_W-1:0]          mem_req_wdata,
  output logic [WORD_W/8-1:0]        mem_req_wstrb,
  input  logic                       mem_resp_valid,
  input  logic [LINE_W-1:0]          mem_resp_line,
  // mapping control
  input  map_mode_e                  map_mode,
  input  logic                       context_switch,
  input  logic                       sw_load,
  input  logic [NSEG-1:0][SEG_W-1:0] sw_map,
  output logic [NSEG-1:0][SEG_W-1:0] cur_map,
  output logic [NSEG-1:0][CNT_W-1:0] cluster_count,
  output logic                       remap_done,
  output logic [NSEG-1:0]            inval_seg,
  // observation
  output logic                       acc_valid,
  output logic [SEG_W-1:0]           acc_segment,
  output logic [SC_W-1:0]            sc,
  output logic                       sense_err
);

  localparam int unsigned OFF_W   = $clog2(LINE_BYTES);
  localparam int unsigned IDX_W   = $clog2(NSETS);
  localparam int unsigned TAG_W   = ADDR_W - IDX_W - OFF_W;
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned WPL     = LINE_W / WORD_W;          // words per line
  localparam int unsigned WSEL_W  = (WPL > 1) ? $clog2(WPL) : 1;
  localparam int unsigned BOFF_W  = $clog2(WORD_W / 8);
  localparam int unsigned ROW_W   = WAYS * LINE_W;

  typedef enum logic [2:0] {
    S_IDLE, S_LOOKUP, S_MEM_WR, S_REFILL_REQ, S_REFILL_WAIT
  } state_e;

  state_e                state_q;
  logic [ADDR_W-1:0]     addr_q;
  logic                  we_q;
  logic [WORD_W-1:0]     wdata_q;
  logic [WORD_W/8-1:0]   wstrb_q;
  logic                  replay_q;
  logic                  hit_q_wr;

  logic [TAG_W-1:0]      tag_q;
  logic [IDX_W-1:0]      index_q;
  logic [WSEL_W-1:0]     wsel_q;

  // decoder / array / tag wires
  logic                  arr_en, precharge;
  logic [SEG_W-1:0]      dec_cluster, dec_segment;
  logic [IDX_W-1:0]      dec_row;
  logic [NSETS-1:0]      wordline;
  logic                  arr_wr_en;
  logic [ROW_W-1:0]      arr_wr_mask, arr_wr_data, arr_rd_data;
  logic                  sense_ok;
  logic                  hit;
  logic [WAY_W-1:0]      hit_way, victim_way;
  logic                  touch_en, fill_en;
  logic                  lookup, filling;

  // mapping wires
  logic                       cfg_we, cnt_flush, remap_pending, allow;
  logic [NSEG-1:0][SEG_W-1:0] cfg_map;

  assign tag_q   = addr_q[ADDR_W-1 -: TAG_W];
  assign index_q = addr_q[OFF_W +: IDX_W];
  if (WPL > 1) begin : g_wsel
    assign wsel_q = addr_q[BOFF_W +: WSEL_W];
  end else begin : g_wsel1
    assign wsel_q = '0;
  end

  assign lookup    = (state_q == S_LOOKUP);
  assign filling   = (state_q == S_REFILL_WAIT) && mem_resp_valid;
  assign arr_en    = lookup || filling;
  assign precharge = !arr_en;

  // ---------------------------------------------------------------- mapping
  assign allow     = (state_q == S_IDLE);
  assign req_ready = (state_q == S_IDLE) && !remap_pending;

  seg_config_reg #(.NSEG(NSEG)) u_cfg (
    .clk, .rst_n, .wr_en(cfg_we), .wr_map(cfg_map), .map(cur_map)
  );

  cluster_counters #(.NSEG(NSEG), .CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n,
    .inc_en(lookup && !replay_q), .inc_cluster(dec_cluster),
    .flush(cnt_flush), .count(cluster_count)
  );

  remap_ctrl #(.NSEG(NSEG), .CNT_W(CNT_W), .REMAP_INTERVAL(REMAP_INTERVAL)) u_remap (
    .clk, .rst_n, .mode(map_mode), .context_switch, .sw_load, .sw_map,
    .allow, .count(cluster_count), .cur_map,
    .cfg_we, .cfg_map, .inval_seg, .cnt_flush, .remap_done, .pending(remap_pending)
  );

  // ---------------------------------------------------------------- arrays
  seg_addr_decoder #(.NSETS(NSETS), .NSEG(NSEG)) u_dec (
    .en(arr_en), .index(index_q), .map(cur_map),
    .cluster(dec_cluster), .segment(dec_segment), .row(dec_row), .wordline
  );

  segmenter_ctrl #(.NSEG(NSEG), .SEGMENTER_PRESENT(SEGMENTER_PRESENT)) u_sc (
    .precharge, .segment(dec_segment), .sc
  );

  seg_bitline_array #(.NSETS(NSETS), .NSEG(NSEG), .ROW_W(ROW_W),
                      .SEGMENTER_PRESENT(SEGMENTER_PRESENT)) u_data (
    .clk, .wordline, .sc, .wr_en(arr_wr_en), .wr_mask(arr_wr_mask),
    .wr_data(arr_wr_data), .rd_data(arr_rd_data), .sense_ok
  );

  tag_array #(.NSETS(NSETS), .WAYS(WAYS), .NSEG(NSEG), .TAG_W(TAG_W)) u_tag (
    .clk, .rst_n, .row(dec_row), .lookup_tag(tag_q),
    .hit, .hit_way, .victim_way,
    .touch_en, .touch_way(hit_way),
    .fill_en, .fill_way(victim_way), .fill_tag(tag_q),
    .inval_seg
  );

  // Data-array write: a word on a write hit, a whole way on a refill.
  always_comb begin
    arr_wr_en   = 1'b0;
    arr_wr_mask = '0;
    arr_wr_data = '0;
    if (filling) begin
      arr_wr_en = 1'b1;
      arr_wr_mask[int'(victim_way)*LINE_W +: LINE_W] = '1;
      arr_wr_data[int'(victim_way)*LINE_W +: LINE_W] = mem_resp_line;
    end else if (lookup && we_q && hit) begin
      arr_wr_en = 1'b1;
      for (int b = 0; b < WORD_W / 8; b++) begin
        if (wstrb_q[b]) begin
          arr_wr_mask[int'(hit_way)*LINE_W + int'(wsel_q)*WORD_W + b*8 +: 8] = '1;
        end
      end
      arr_wr_data[int'(hit_way)*LINE_W + int'(wsel_q)*WORD_W +: WORD_W] = wdata_q;
    end
  end

  assign touch_en = lookup && hit;
  assign fill_en  = filling;

  assign acc_valid   = arr_en;
  assign acc_segment = dec_segment;

  // ---------------------------------------------------------------- memory
  always_comb begin
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = addr_q;
    mem_req_wdata = wdata_q;
    mem_req_wstrb = wstrb_q;
    if (state_q == S_MEM_WR) begin
      mem_req_valid = 1'b1;
      mem_req_we    = 1'b1;
    end else if (state_q == S_REFILL_REQ) begin
      mem_req_valid = 1'b1;
      mem_req_addr  = {addr_q[ADDR_W-1:OFF_W], OFF_W'(0)};
    end
  end

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      addr_q     <= '0;
      we_q       <= 1'b0;
      wdata_q    <= '0;
      wstrb_q    <= '0;
      replay_q   <= 1'b0;
      resp_valid <= 1'b0;
      resp_rdata <= '0;
      resp_hit   <= 1'b0;
      sense_err  <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      sense_err  <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (req_valid && req_ready) begin
            addr_q   <= req_addr;
            we_q     <= req_we;
            wdata_q  <= req_wdata;
            wstrb_q  <= req_wstrb;
            replay_q <= 1'b0;
            state_q  <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          if (we_q) begin
            state_q <= S_MEM_WR;
          end else if (hit) begin
            resp_valid <= 1'b1;
            resp_rdata <= arr_rd_data[int'(hit_way)*LINE_W + int'(wsel_q)*WORD_W +: WORD_W];
            resp_hit   <= !replay_q;
            sense_err  <= !sense_ok;
            state_q    <= S_IDLE;
          end else begin
            state_q <= S_REFILL_REQ;
          end
        end
        S_MEM_WR: begin
          if (mem_req_ready) begin
            resp_valid <= 1'b1;
            resp_rdata <= '0;
            resp_hit   <= hit_q_wr;
            state_q    <= S_IDLE;
          end
        end
        S_REFILL_REQ: begin
          if (mem_req_ready) state_q <= S_REFILL_WAIT;
        end
        S_REFILL_WAIT: begin
          if (mem_resp_valid) begin
            replay_q <= 1'b1;
            state_q  <= S_LOOKUP;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Whether the write being sent to memory hit in the cache.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       hit_q_wr <= 1'b0;
    else if (lookup)  hit_q_wr <= hit;
  end

  // A read never leaves the array unresolved.
  a_read_resolves: assert property (@(posedge clk) disable iff (!rst_n)
    (lookup && !we_q && hit) |-> sense_ok)
    else $error("segmented bitline read did not resolve");

endmodule
