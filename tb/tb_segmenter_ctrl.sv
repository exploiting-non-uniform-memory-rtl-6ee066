// Self-checking test of segmenter_ctrl.
//
// Checks, for the default eight-segment bitline and for a four-segment one
// (three segmenters, SC1..SC3), every segment number in both phases:
// during precharge every segmenter must be on; during an access to segment
// s exactly the segmenters between the sense amplifier and segment s
// (sc[0..s-1]) must be on. A third instance has segmenters only at
// boundaries 0 and 2 (8/16/40 rows); its missing boundaries must read 1.
module tb_segmenter_ctrl;
  int checks = 0, failures = 0;

  logic       pre8, pre4;
  logic [2:0] seg8;
  logic [1:0] seg4;
  logic [6:0] sc8;
  logic [2:0] sc4;
  logic [6:0] scu;
  // 8/16/40-row layout: segmenters only at boundaries 0 and 2.
  localparam logic [6:0] MASK_U = 7'b0000101;

  segmenter_ctrl dut8 (.precharge(pre8), .segment(seg8), .sc(sc8));
  segmenter_ctrl #(.NSEG(4)) dut4 (.precharge(pre4), .segment(seg4), .sc(sc4));
  segmenter_ctrl #(.SEGMENTER_PRESENT(MASK_U)) dutu (.precharge(pre8), .segment(seg8), .sc(scu));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 2; p++) begin
      for (int s = 0; s < 8; s++) begin
        logic [6:0] exp8;
        pre8 = 1'(p); seg8 = 3'(s);
        #1;
        for (int j = 0; j < 7; j++) exp8[j] = (p == 1) || (j < s);
        checks++;
        if (sc8 !== exp8) begin
          failures++;
          $display("FAIL 8seg pre=%0d seg=%0d sc=%b exp=%b", p, s, sc8, exp8);
        end
        checks++;
        if (scu !== (exp8 | ~MASK_U)) begin
          failures++;
          $display("FAIL unequal pre=%0d seg=%0d sc=%b", p, s, scu);
        end
      end
      for (int s = 0; s < 4; s++) begin
        logic [2:0] exp4;
        pre4 = 1'(p); seg4 = 2'(s);
        #1;
        for (int j = 0; j < 3; j++) exp4[j] = (p == 1) || (j < s);
        checks++;
        if (sc4 !== exp4) begin
          failures++;
          $display("FAIL 4seg pre=%0d seg=%0d sc=%b exp=%b", p, s, sc4, exp4);
        end
      end
    end
    // Named cases: reading segment one isolates it; reading segment four of
    // four keeps every segmenter on.
    pre4 = 0; seg4 = 0; #1; checks++; if (sc4 !== 3'b000) failures++;
    pre4 = 0; seg4 = 3; #1; checks++; if (sc4 !== 3'b111) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
