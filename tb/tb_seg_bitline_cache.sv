// End-to-end test of seg_bitline_cache at its default geometry (16 KB,
// 4 ways, 64-byte lines, 8 segments) with the re-mapping interval shortened
// to 3000 cycles so that an interval-triggered re-mapping happens within a
// short run. The stimulus and checks are described in cache_tb_body.svh.
module tb_seg_bitline_cache;
  localparam int     PHASE_OPS = 600;
  localparam longint WATCHDOG  = 200_000;

  seg_bitline_cache #(.REMAP_INTERVAL(3000)) dut (.*);

`include "cache_tb_body.svh"
endmodule
