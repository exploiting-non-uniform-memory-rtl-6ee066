// Row address decoder with cluster-to-segment remapping.
//
// The set index (A0..A5 for 64 sets) is split in two. Its most significant
// log2(NSEG) bits name the cluster; the remaining bits name the row inside a
// segment. The cluster number steers a mux that picks the cluster's entry of
// the configuration register: the physical segment. The physical row is
// {segment, row-in-segment}, and a one-hot decoder drives its wordline. The
// only logic added to a plain decoder is the mux in front of the segment
// bits (for four segments, two 4:1 muxes).
//
// Interface: index in; cluster, physical segment, physical row and the
// one-hot wordlines out (wordlines gated by en). Purely combinational.
//
// The split into MSB cluster bits and LSB row bits, and the mux fed by the
// configuration register, follow the published proposal; port names are
// this design's.
module seg_addr_decoder #(
  parameter int unsigned NSETS = sbc_pkg::NSETS_DEF,
  parameter int unsigned NSEG  = sbc_pkg::NSEG_DEF,
  parameter int unsigned IDX_W = $clog2(NSETS),
  parameter int unsigned SEG_W = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic                       en,
  input  logic [IDX_W-1:0]           index,
  input  logic [NSEG-1:0][SEG_W-1:0] map,
  output logic [SEG_W-1:0]           cluster,
  output logic [SEG_W-1:0]           segment,
  output logic [IDX_W-1:0]           row,
  output logic [NSETS-1:0]           wordline
);

  localparam int unsigned ROWS_PER_SEG = NSETS / NSEG;
  localparam int unsigned LINE_W       = IDX_W - $clog2(NSEG);

  logic [IDX_W-1:0] line_in_seg;

  always_comb begin
    if (NSEG > 1) begin
      cluster     = SEG_W'(index >> LINE_W);
      line_in_seg = index & IDX_W'(ROWS_PER_SEG - 1);
      segment     = map[cluster];                 // remapping mux
      row         = IDX_W'(segment) * IDX_W'(ROWS_PER_SEG) + line_in_seg;
    end else begin
      cluster     = '0;
      line_in_seg = index;
      segment     = '0;
      row         = index;
    end
    wordline = '0;
    if (en) wordline[row] = 1'b1;
  end

  initial begin
    assert (NSETS % NSEG == 0 && (NSEG & (NSEG - 1)) == 0)
      else $error("NSEG must be a power of two dividing NSETS");
  end

endmodule
