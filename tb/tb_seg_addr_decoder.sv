// Self-checking test of seg_addr_decoder.
//
// For random cluster-to-segment maps, every set index is decoded and the
// cluster (index MSBs), physical segment (the map entry of the cluster),
// physical row and one-hot wordline are compared with values computed here.
// Covers the default 64 sets / 8 segments and 64 sets / 4 segments, where
// A4 and A5 pick one of four map entries. With en low no wordline may rise.
module tb_seg_addr_decoder;
  int checks = 0, failures = 0;

  logic            en;
  logic [5:0]      index;
  logic [7:0][2:0] map8;
  logic [3:0][1:0] map4;
  logic [2:0]      cl8, sg8;
  logic [1:0]      cl4, sg4;
  logic [5:0]      row8, row4;
  logic [63:0]     wl8, wl4;

  seg_addr_decoder dut8 (.en, .index, .map(map8), .cluster(cl8), .segment(sg8),
                         .row(row8), .wordline(wl8));
  seg_addr_decoder #(.NSEG(4)) dut4 (.en, .index, .map(map4), .cluster(cl4),
                         .segment(sg4), .row(row4), .wordline(wl4));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s index=%0d got=%0h exp=%0h", what, index, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int c = 0; c < 8; c++) map8[c] = 3'(c);
      for (int c = 0; c < 4; c++) map4[c] = 2'(c);
      if (t > 0) begin
        for (int c = 7; c > 0; c--) begin
          int k; logic [2:0] tmp;
          k = $urandom_range(c, 0); tmp = map8[c]; map8[c] = map8[k]; map8[k] = tmp;
        end
        for (int c = 3; c > 0; c--) begin
          int k; logic [1:0] tmp;
          k = $urandom_range(c, 0); tmp = map4[c]; map4[c] = map4[k]; map4[k] = tmp;
        end
      end
      for (int i = 0; i < 64; i++) begin
        int c8, c4, r8, r4;
        en = 1; index = 6'(i);
        #1;
        c8 = i / 8;  r8 = int'(map8[c8]) * 8 + (i % 8);
        c4 = i / 16; r4 = int'(map4[c4]) * 16 + (i % 16);
        check("cluster8", cl8, c8);
        check("segment8", sg8, map8[c8]);
        check("row8", row8, r8);
        check("wl8", wl8, 64'(1) << r8);
        check("cluster4", cl4, c4);
        check("segment4", sg4, map4[c4]);
        check("row4", row4, r4);
        check("wl4", wl4, 64'(1) << r4);
      end
    end
    en = 0; index = 6'd37; #1;
    check("wl8 idle", wl8, 0);
    check("wl4 idle", wl4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
