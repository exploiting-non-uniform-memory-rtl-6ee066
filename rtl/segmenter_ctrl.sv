// Segmenter control (SC) generation.
//
// A bitline cut into NSEG segments has NSEG-1 segmenters, full CMOS
// transmission gates. Segmenter j (SC[j], SC1 of the figure is sc[0]) sits
// between segment j and segment j+1, counting segment 0 as the one next to
// the precharge/sense/write circuitry. While the bitlines are precharged
// every segmenter is on, so the whole bitline is charged. During an access
// to segment s, segmenters 0..s-1 stay on to give segment s a path to the
// sense amplifier and all others turn off, isolating the unused far part of
// the bitline.
//
// Unequal segments: SEGMENTER_PRESENT[j] = 0 means there is no segmenter
// at boundary j, only continuous wire; its sc bit is then held at 1 so that
// sc always describes which boundaries conduct. Row groups with no segmenter
// between them form one longer electrical segment.
//
// Interface: precharge (high in the precharge phase), segment (the decoded
// physical segment) in; sc (1 = gate on) out. Combinational.
//
// The behaviour follows the published proposal; representing the clock-low
// precharge phase as a separate precharge input is this design's choice.
module segmenter_ctrl #(
  parameter int unsigned NSEG  = sbc_pkg::NSEG_DEF,
  parameter int unsigned SEG_W = (NSEG > 1) ? $clog2(NSEG) : 1,
  parameter int unsigned SC_W  = (NSEG > 1) ? NSEG - 1 : 1,
  parameter logic [SC_W-1:0] SEGMENTER_PRESENT = '1
) (
  input  logic             precharge,
  input  logic [SEG_W-1:0] segment,
  output logic [SC_W-1:0]  sc
);

  always_comb begin
    for (int j = 0; j < SC_W; j++) begin
      sc[j] = precharge || (NSEG > 1 && int'(segment) > j) || !SEGMENTER_PRESENT[j];
    end
  end

endmodule
