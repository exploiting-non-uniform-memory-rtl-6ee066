// Workload test: where do a skewed program's accesses land?
//
// Runs the synthetic skewed stream of seg_activity_run on caches with two,
// four and eight equal segments and with the three unequal layouts of
// eight 8-row groups (8/56, 8/16/40 and 8/8/8/8/32 rows), each under four
// mappings: the identity map, a static profiled map, dcf and dncf. Prints,
// for each run, the share of requests served by segment 0 (the cheapest)
// and the mean segment number, i.e. the mean number of segmenters between
// the accessed row and the sense amplifier (lower is cheaper).
//
// Checks that every run's data is correct and that the dynamic runs
// re-mapped. For four and eight segments, and for the unequal layouts, it
// also checks that the profiled static, dcf and dncf maps give a lower mean
// segment number than the identity map, and that static and dcf put more
// requests in segment 0. dncf is not held to the segment-0 check: its
// cumulative counts lag behind the phase change by design. The two-segment
// results are only reported.
module tb_segment_activity;
  localparam int NC = 6;
  localparam int NS [NC] = '{2, 4, 8, 8, 8, 8};
  // Segmenter masks: equal segments, then 8/56, 8/16/40 and 8/8/8/8/32 rows.
  localparam logic [6:0] MK [NC] = '{7'h7f, 7'h7f, 7'h7f, 7'b0000001, 7'b0000101, 7'b0001111};
  localparam string LAYOUT [NC] = '{"2 equal segments", "4 equal segments", "8 equal segments",
                                    "segments of 8/56 rows", "segments of 8/16/40 rows",
                                    "segments of 8/8/8/8/32 rows"};

  logic done   [NC][4];
  int   acc    [NC][4][8];
  int   chk    [NC][4];
  int   fail   [NC][4];
  int   remaps [NC][4];
  int checks = 0, failures = 0;

  for (genvar n = 0; n < NC; n++) begin : g_n
    for (genvar m = 0; m < 4; m++) begin : g_m
      seg_activity_run #(.NSEG(NS[n]), .MODE(m), .PRESENT(MK[n][NS[n]-2:0])) u_run (
        .done(done[n][m]), .seg_acc(acc[n][m]), .checks(chk[n][m]),
        .failures(fail[n][m]), .remaps(remaps[n][m]));
    end
  end

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [4];
    real seg0 [4], mean [4];
    names = '{"identity", "static  ", "dcf     ", "dncf    "};
    #100;
    for (int n = 0; n < NC; n++)
      for (int m = 0; m < 4; m++)
        wait (done[n][m] === 1'b1);
    for (int n = 0; n < NC; n++) begin
      $display("%s:", LAYOUT[n]);
      for (int m = 0; m < 4; m++) begin
        int tot;
        real sum;
        tot = 0;
        sum = 0;
        for (int s = 0; s < NS[n]; s++) begin
          int e;   // segmenters between row group s and the sense amplifier
          e = 0;
          for (int j = 0; j < s; j++) if (MK[n][j]) e++;
          tot += acc[n][m][s];
          sum += real'(e) * acc[n][m][s];
        end
        seg0[m] = 100.0 * acc[n][m][0] / tot;
        mean[m] = sum / tot;
        $display("  %s  segment-0 share %5.1f %%   mean segment %4.2f   remaps %0d",
                 names[m], seg0[m], mean[m], remaps[n][m]);
        checks += chk[n][m] + 1;
        failures += fail[n][m];
        if (tot == 0) failures++;
      end
      // Two segments: too coarse for a reliable ordering; reported only.
      for (int m = 1; m < 4 && NS[n] > 2; m++) begin
        checks++;
        if (!(mean[m] < mean[0])) begin failures++; $display("FAIL %0d seg, mode %0d: mean segment", NS[n], m); end
        if (m <= 2) begin
          checks++;
          if (!(seg0[m] > seg0[0])) begin failures++; $display("FAIL %0d seg, mode %0d: segment-0 share", NS[n], m); end
        end
      end
      checks += 2;
      if (remaps[n][2] == 0 || remaps[n][3] == 0) failures++;
      if (remaps[n][1] != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
