// Bitline-segmented SRAM data array (logic-level model).
//
// The array has NSETS rows of ROW_W cells. Every column is a bitline pair
// (BL, nBL) cut into NSEG equal segments of NSETS/NSEG rows; segment 0 is
// the one next to the precharge/sense/write circuitry. Neighbouring segments
// are joined by a segmenter (transmission gate) controlled by sc[j], which
// sits between segment j and segment j+1.
//
// Unequal segments: the NSEG row groups are always equal, but a boundary
// j with SEGMENTER_PRESENT[j] = 0 has no segmenter, so its two groups are one
// continuous piece of bitline (sc[j] is ignored there). With eight groups of
// 8 rows, mask 7'b0000001 gives segments of 8/56 rows, 7'b0000101 gives
// 8/16/40 and 7'b0001111 gives 8/8/8/8/32. The default (all present) gives
// NSEG equal segments.
//
// The bitlines are modelled at logic level:
//   * Both lines of a pair rest precharged high. An enabled cell storing v
//     pulls nBL low when v=1 and BL low when v=0 (wired AND).
//   * Segments joined through conducting segmenters form one net; the sense
//     amplifier sees the net that contains segment 0.
//   * The sense amplifier resolves a column only when exactly one of BL and
//     nBL is low. sense_ok is the AND of that over all columns, so a read
//     from a segment cut off from the sense amplifier is flagged instead of
//     returning data.
//   * A write drives the net containing segment 0; a selected row receives
//     the data only if its segment is on that net. wr_mask selects columns.
//
// Interface: wordline (one-hot, at most one row), sc, wr_en/wr_mask/wr_data
// in; rd_data and sense_ok out. The read is combinational (the sense
// amplifier output is captured by the user); a write takes effect at the
// rising clock edge. Contents are not reset.
//
// The organisation (rows per segment, segmenters between segments, all
// segmenters on for precharge, only the path to the accessed segment on
// during the access) follows the published proposal. The two-valued
// wired-AND model of precharge, discharge and sensing is this design's
// stand-in for the analog circuitry.
module seg_bitline_array #(
  parameter int unsigned NSETS = sbc_pkg::NSETS_DEF,
  parameter int unsigned NSEG  = sbc_pkg::NSEG_DEF,
  parameter int unsigned ROW_W = sbc_pkg::WAYS_DEF * sbc_pkg::LINE_BYTES_DEF * 8,
  parameter int unsigned SC_W  = (NSEG > 1) ? NSEG - 1 : 1,
  parameter logic [SC_W-1:0] SEGMENTER_PRESENT = '1
) (
  input  logic              clk,
  input  logic [NSETS-1:0]  wordline,
  input  logic [SC_W-1:0]   sc,
  input  logic              wr_en,
  input  logic [ROW_W-1:0]  wr_mask,
  input  logic [ROW_W-1:0]  wr_data,
  output logic [ROW_W-1:0]  rd_data,
  output logic              sense_ok
);

  localparam int unsigned RPS   = NSETS / NSEG;        // rows per segment
  localparam int unsigned RIN_W = (RPS > 1) ? $clog2(RPS) : 1;

  logic [ROW_W-1:0] mem [NSETS];

  // Per segment: is a row selected, and which one.
  logic [NSEG-1:0]            seg_sel;
  logic [NSEG-1:0][RIN_W-1:0] seg_row;
  // Local bitline pair of every segment.
  logic [NSEG-1:0][ROW_W-1:0] seg_bl, seg_nbl;
  // Segment is joined to the sense amplifier / write driver net.
  logic [NSEG-1:0]            conn;
  logic [ROW_W-1:0]           sa_bl, sa_nbl;

  always_comb begin
    for (int s = 0; s < NSEG; s++) begin
      seg_sel[s] = 1'b0;
      seg_row[s] = '0;
      for (int i = 0; i < RPS; i++) begin
        if (wordline[s*RPS + i]) begin
          seg_sel[s] = 1'b1;
          seg_row[s] = RIN_W'(i);
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NSEG; s++) begin
      if (seg_sel[s]) begin
        seg_bl[s]  =  mem[s*RPS + int'(seg_row[s])];
        seg_nbl[s] = ~mem[s*RPS + int'(seg_row[s])];
      end else begin
        seg_bl[s]  = '1;                      // precharged, nothing discharges
        seg_nbl[s] = '1;
      end
    end
    begin
      logic joined;
      joined = 1'b1;
      for (int s = 0; s < NSEG; s++) begin
        if (s > 0 && SEGMENTER_PRESENT[s-1]) joined &= sc[s-1];
        conn[s] = joined;
      end
    end
    sa_bl  = '1;
    sa_nbl = '1;
    for (int s = 0; s < NSEG; s++) begin
      if (conn[s]) begin
        sa_bl  &= seg_bl[s];
        sa_nbl &= seg_nbl[s];
      end
    end
    rd_data  = sa_bl;
    sense_ok = &(sa_bl ^ sa_nbl);
  end

  // Write: only a selected row on the driven net receives data.
  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int s = 0; s < NSEG; s++) begin
        if (seg_sel[s] && conn[s]) begin
          mem[s*RPS + int'(seg_row[s])] <=
            (mem[s*RPS + int'(seg_row[s])] & ~wr_mask) | (wr_data & wr_mask);
        end
      end
    end
  end

  // At most one wordline may be raised.
  always_comb begin
    assert ($onehot0(wordline)) else $error("more than one wordline raised");
  end


endmodule
