// Shared types and constants of the segmented-bitline cache.
//
// The cache geometry defaults follow the evaluated L1 configuration: 16 KB,
// 4-way set associative, 64-byte lines, hence 64 sets (one data-array row
// per set). The default of eight bitline segments is the configuration the
// main mapping results are given for. Address and word widths are this
// design's own choice (32-bit byte address, 64-bit access word).
package sbc_pkg;

  // Cache geometry (defaults used by every module of the design).
  localparam int unsigned NSETS_DEF      = 64;
  localparam int unsigned WAYS_DEF       = 4;
  localparam int unsigned LINE_BYTES_DEF = 64;
  localparam int unsigned NSEG_DEF       = 8;
  localparam int unsigned ADDR_W_DEF     = 32;
  localparam int unsigned WORD_W_DEF     = 64;
  localparam int unsigned CNT_W_DEF      = 32;
  // Cycles between two automatic re-mappings (0 = only at context switches).
  localparam int unsigned REMAP_INTERVAL_DEF = 1_000_000;

  // How the cluster-to-segment map is chosen.
  //   MAP_STATIC : map loaded by software (for example from a profile), never
  //                changed by hardware.
  //   MAP_DCF    : dynamic re-mapping, counters flushed at every re-mapping.
  //   MAP_DNCF   : dynamic re-mapping, counters cumulative from reset.
  typedef enum logic [1:0] {
    MAP_STATIC = 2'd0,
    MAP_DCF    = 2'd1,
    MAP_DNCF   = 2'd2
  } map_mode_e;

endpackage
