// Per-cluster access counters.
//
// One counter per cluster (a cluster is the group of sets mapped together
// to one bitline segment). Every cache access to cluster inc_cluster, with
// inc_en high, adds one to that cluster's counter. flush clears all
// counters; an increment in the same cycle is then counted from zero, so no
// access is lost. The counters saturate at their maximum value so that the
// ordering of heavily used clusters is kept rather than wrapped.
//
// In dcf mode the re-mapping logic flushes the counters at every
// re-mapping, so they hold the previous interval only; in dncf mode they are
// never flushed and hold the counts since reset.
//
// Timing: counts are registered, visible the cycle after the access.
//
// A counter per cluster, incremented on each access, follows the published
// proposal; the width, saturation and flush priority are this design's
// choices.
module cluster_counters #(
  parameter int unsigned NSEG  = sbc_pkg::NSEG_DEF,
  parameter int unsigned CNT_W = sbc_pkg::CNT_W_DEF,
  parameter int unsigned SEG_W = (NSEG > 1) ? $clog2(NSEG) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       inc_en,
  input  logic [SEG_W-1:0]           inc_cluster,
  input  logic                       flush,
  output logic [NSEG-1:0][CNT_W-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
    end else begin
      for (int c = 0; c < NSEG; c++) begin
        if (flush) begin
          count[c] <= (inc_en && int'(inc_cluster) == c) ? CNT_W'(1) : '0;
        end else if (inc_en && int'(inc_cluster) == c && count[c] != '1) begin
          count[c] <= count[c] + 1'b1;
        end
      end
    end
  end

endmodule
