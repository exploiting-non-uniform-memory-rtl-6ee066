// Configuration register of the remapping address decoder.
//
// Holds, for every cluster c (the group of sets that share the same index
// MSBs), the number of the bitline segment that cluster is stored in:
// map[c]. Segment 0 is the one next to the precharge/sense/write circuitry.
// The whole map is written at once (wr_en, wr_map) so that it always stays a
// permutation. Reset loads the identity map, under which the cache behaves
// like an ordinary address-decoded array.
//
// Timing: the new map is visible in the cycle after wr_en.
//
// The register and its role (feeding the remapping mux) follow the
// published proposal; the whole-map write port and the identity reset value
// are this design's choices.
module seg_config_reg #(
  parameter int unsigned NSEG  = sbc_pkg::NSEG_DEF,
  parameter int unsigned SEG_W = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [NSEG-1:0][SEG_W-1:0] wr_map,
  output logic [NSEG-1:0][SEG_W-1:0] map
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < NSEG; c++) map[c] <= SEG_W'(c);
    end else if (wr_en) begin
      map <= wr_map;
    end
  end

endmodule
