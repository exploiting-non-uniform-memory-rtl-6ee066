// Tag array of the set-associative cache, with per-segment invalidation.
//
// Holds, for each of the NSETS rows and WAYS ways, a valid bit and a tag,
// and per row a true-LRU order (an age per way, 0 = most recently used).
// It is indexed by the same physical row as the data array, so a set moves
// with its data when its cluster is re-mapped. The tag array itself is not
// bitline-segmented; it only needs to know which rows belong to a segment in
// order to invalidate a segment's lines after a re-mapping.
//
// Interface and timing:
//   * row, lookup_tag -> hit, hit_way, victim_way: combinational. The victim
//     is the lowest invalid way, else the least recently used way.
//   * touch_en/touch_way: make that way of row the most recently used.
//   * fill_en/fill_way/fill_tag: write the tag of row, set valid, touch it.
//   * inval_seg: clear every valid bit of the rows of each flagged segment.
//     All updates happen at the rising edge; invalidation wins over a fill
//     in the same cycle.
//
// The geometry follows the evaluated cache (16 KB, 4-way, 64-byte lines).
// LRU replacement and the port set are this design's choices: the
// published proposal does not describe the tag side of the cache.
module tag_array #(
  parameter int unsigned NSETS = sbc_pkg::NSETS_DEF,
  parameter int unsigned WAYS  = sbc_pkg::WAYS_DEF,
  parameter int unsigned NSEG  = sbc_pkg::NSEG_DEF,
  parameter int unsigned TAG_W = sbc_pkg::ADDR_W_DEF - $clog2(sbc_pkg::NSETS_DEF)
                                 - $clog2(sbc_pkg::LINE_BYTES_DEF),
  parameter int unsigned IDX_W = $clog2(NSETS),
  parameter int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] row,
  input  logic [TAG_W-1:0] lookup_tag,
  output logic             hit,
  output logic [WAY_W-1:0] hit_way,
  output logic [WAY_W-1:0] victim_way,
  input  logic             touch_en,
  input  logic [WAY_W-1:0] touch_way,
  input  logic             fill_en,
  input  logic [WAY_W-1:0] fill_way,
  input  logic [TAG_W-1:0] fill_tag,
  input  logic [NSEG-1:0]  inval_seg
);

  localparam int unsigned RPS = NSETS / NSEG;

  logic [WAYS-1:0]             valid [NSETS];
  logic [WAYS-1:0][TAG_W-1:0]  tags  [NSETS];
  logic [WAYS-1:0][WAY_W-1:0]  age   [NSETS];

  logic             upd_en;
  logic [WAY_W-1:0] upd_way;

  // Lookup and victim choice.
  always_comb begin
    hit        = 1'b0;
    hit_way    = '0;
    victim_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid[row][w] && tags[row][w] == lookup_tag) begin
        hit     = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
    begin
      logic found;
      found = 1'b0;
      for (int w = 0; w < WAYS; w++) begin
        if (!found && !valid[row][w]) begin
          found      = 1'b1;
          victim_way = WAY_W'(w);
        end
      end
      for (int w = 0; w < WAYS; w++) begin
        if (!found && age[row][w] == WAY_W'(WAYS - 1)) victim_way = WAY_W'(w);
      end
    end
  end

  assign upd_en  = touch_en || fill_en;
  assign upd_way = fill_en ? fill_way : touch_way;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NSETS; r++) begin
        valid[r] <= '0;
        for (int w = 0; w < WAYS; w++) age[r][w] <= WAY_W'(w);
      end
    end else begin
      if (upd_en) begin
        for (int w = 0; w < WAYS; w++) begin
          if (age[row][w] < age[row][upd_way]) age[row][w] <= age[row][w] + 1'b1;
        end
        age[row][upd_way] <= '0;
      end
      if (fill_en) valid[row][fill_way] <= 1'b1;
      for (int r = 0; r < NSETS; r++) begin
        if (inval_seg[r / RPS]) valid[r] <= '0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_en) tags[row][fill_way] <= fill_tag;
  end

endmodule
