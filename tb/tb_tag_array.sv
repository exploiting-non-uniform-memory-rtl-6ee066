// Self-checking test of tag_array.
//
// Random lookups, fills, touches and segment invalidations are applied.
// A model kept here (valid bits, tags and a recency list per row) predicts
// hit, hit way and victim way (lowest invalid way, else least recently
// used), which are compared every cycle. Tags are drawn from a small range so
// that hits, misses and evictions all occur; their numbers are counted.
module tb_tag_array;
  localparam int NSETS = 64, WAYS = 4, NSEG = 8, TAG_W = 20, RPS = NSETS / NSEG;
  int checks = 0, failures = 0;
  int n_hit = 0, n_fill = 0, n_evict = 0, n_inval = 0;
  logic clk = 0, rst_n = 0;
  logic [5:0] row;
  logic [TAG_W-1:0] lookup_tag, fill_tag;
  logic hit, touch_en, fill_en;
  logic [1:0] hit_way, victim_way, touch_way, fill_way;
  logic [NSEG-1:0] inval_seg;

  tag_array dut (.clk, .rst_n, .row, .lookup_tag, .hit, .hit_way, .victim_way,
                 .touch_en, .touch_way, .fill_en, .fill_way, .fill_tag, .inval_seg);

  bit               m_valid [NSETS][WAYS];
  logic [TAG_W-1:0] m_tag   [NSETS][WAYS];
  int               m_lru   [NSETS][WAYS];   // m_lru[r][0] = most recent way

  always #5 clk = ~clk;

  function automatic void m_touch(int r, int w);
    int pos = 0;
    for (int i = 0; i < WAYS; i++) if (m_lru[r][i] == w) pos = i;
    for (int i = pos; i > 0; i--) m_lru[r][i] = m_lru[r][i-1];
    m_lru[r][0] = w;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    touch_en = 0; fill_en = 0; inval_seg = '0; row = 0; lookup_tag = 0;
    touch_way = 0; fill_way = 0; fill_tag = 0;
    for (int r = 0; r < NSETS; r++)
      for (int w = 0; w < WAYS; w++) begin m_valid[r][w] = 0; m_lru[r][w] = w; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      int r, ehit, eway, evic;
      r = $urandom_range(7, 0) + 8 * $urandom_range(1, 0);   // rows 0..15, segments 0..1
      row = 6'(r);
      lookup_tag = TAG_W'($urandom_range(6, 0));
      touch_en = 0; fill_en = 0; inval_seg = '0;
      #1;
      ehit = 0; eway = 0;
      for (int w = WAYS - 1; w >= 0; w--)
        if (m_valid[r][w] && m_tag[r][w] == lookup_tag) begin ehit = 1; eway = w; end
      evic = -1;
      for (int w = 0; w < WAYS; w++) if (evic < 0 && !m_valid[r][w]) evic = w;
      if (evic < 0) evic = m_lru[r][WAYS-1];
      checks++;
      if (hit !== 1'(ehit) || (ehit && hit_way !== 2'(eway)) || victim_way !== 2'(evic)) begin
        failures++;
        $display("FAIL t=%0d row=%0d hit=%0d/%0d way=%0d/%0d victim=%0d/%0d", t, r, hit, ehit,
                 hit_way, eway, victim_way, evic);
      end
      if (ehit) begin
        touch_en = 1; touch_way = 2'(eway); m_touch(r, eway); n_hit++;
      end else begin
        fill_en = 1; fill_way = 2'(evic); fill_tag = lookup_tag;
        if (m_valid[r][evic]) n_evict++;
        m_valid[r][evic] = 1; m_tag[r][evic] = lookup_tag; m_touch(r, evic); n_fill++;
      end
      if ($urandom_range(99, 0) == 0) begin
        int s;
        s = $urandom_range(1, 0);
        inval_seg[s] = 1'b1; n_inval++;
        for (int rr = s * RPS; rr < (s + 1) * RPS; rr++)
          for (int w = 0; w < WAYS; w++) m_valid[rr][w] = 0;
      end
      @(negedge clk);
    end
    checks++;
    if (n_hit == 0 || n_fill == 0 || n_evict == 0 || n_inval == 0) begin
      failures++;
      $display("FAIL coverage hit=%0d fill=%0d evict=%0d inval=%0d", n_hit, n_fill, n_evict, n_inval);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
