// End-to-end test of seg_bitline_cache with every parameter at its default
// (16 KB, 4 ways, 64-byte lines, 8 segments, re-mapping every 1,000,000
// cycles). Runs the same workload phases and checks as
// tb_seg_bitline_cache (see cache_tb_body.svh); the interval phase here
// runs through two full 1,000,000-cycle re-mapping intervals.
module tb_seg_bitline_cache_full;
  localparam int     PHASE_OPS = 2000;
  localparam longint WATCHDOG  = 6_000_000;

  seg_bitline_cache dut (.*);

`include "cache_tb_body.svh"
endmodule
