// Self-checking test of seg_bitline_array (default 64 rows, 8 segments,
// 2048-bit rows).
//
// Segmenter controls are worked out here from the row's segment, so the
// test does not depend on segmenter_ctrl. Checked against a model memory:
//   * writes and reads with the proper segmenter setting for every segment;
//   * byte-masked partial writes;
//   * a read with every segmenter on (the precharge setting) still resolves;
//   * a read from a segment whose path to the sense amplifier is cut is
//     flagged (sense_ok low), and a write over a cut path changes nothing;
//   * with no wordline raised nothing resolves (both lines stay precharged);
//   * a second array with segmenters only at boundaries 0 and 2 gets the
//     same inputs: a boundary with no segmenter never cuts the path, so its
//     reads resolve and its writes land where the first array's do not.
module tb_seg_bitline_array;
  localparam int NSETS = 64, NSEG = 8, RPS = 8, ROW_W = 2048;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [NSETS-1:0] wordline;
  logic [NSEG-2:0]  sc;
  logic             wr_en, sense_ok;
  logic [ROW_W-1:0] wr_mask, wr_data, rd_data;
  logic [ROW_W-1:0] model [NSETS];
  // Second array, same inputs, segmenters only at boundaries 0 and 2
  // (segments of 8/16/40 rows).
  localparam logic [NSEG-2:0] MASK_U = 7'b0000101;
  logic [ROW_W-1:0] rd_data_u, model_u [NSETS];
  logic             sense_ok_u;

  seg_bitline_array dut (.clk, .wordline, .sc, .wr_en, .wr_mask, .wr_data, .rd_data, .sense_ok);
  seg_bitline_array #(.SEGMENTER_PRESENT(MASK_U)) dut_u (
    .clk, .wordline, .sc, .wr_en, .wr_mask, .wr_data, .rd_data(rd_data_u), .sense_ok(sense_ok_u));

  // Does row r's group share a net with the sense amplifier under s?
  function automatic bit conducts(int r, logic [NSEG-2:0] s, logic [NSEG-2:0] present);
    for (int j = 0; j < r / RPS; j++) if (present[j] && !s[j]) return 0;
    return 1;
  endfunction

  always #5 clk = ~clk;

  function automatic logic [NSEG-2:0] path_to(int seg);
    logic [NSEG-2:0] v;
    for (int j = 0; j < NSEG - 1; j++) v[j] = (j < seg);
    return v;
  endfunction

  function automatic logic [ROW_W-1:0] rand_row();
    logic [ROW_W-1:0] v;
    for (int i = 0; i < ROW_W / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic do_write(int r, logic [ROW_W-1:0] m, logic [ROW_W-1:0] d, logic [NSEG-2:0] s);
    wordline = '0; wordline[r] = 1'b1; sc = s; wr_en = 1; wr_mask = m; wr_data = d;
    if (conducts(r, s, MASK_U)) model_u[r] = (model_u[r] & ~m) | (d & m);
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic do_read(int r, logic [NSEG-2:0] s, bit expect_ok, string what);
    wordline = '0; wordline[r] = 1'b1; sc = s; wr_en = 0;
    #1;
    checks++;
    if (sense_ok !== expect_ok || (expect_ok && rd_data !== model[r])) begin
      failures++;
      $display("FAIL %s row=%0d sense_ok=%0d", what, r, sense_ok);
    end
    checks++;
    if (sense_ok_u !== 1'(conducts(r, s, MASK_U)) || (sense_ok_u && rd_data_u !== model_u[r])) begin
      failures++;
      $display("FAIL unequal %s row=%0d sense_ok=%0d", what, r, sense_ok_u);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wordline = '0; sc = '1; wr_en = 0; wr_mask = '0; wr_data = '0;
    @(negedge clk);
    // fill every row through the proper path
    for (int r = 0; r < NSETS; r++) begin
      model[r] = rand_row();
      do_write(r, '1, model[r], path_to(r / RPS));
    end
    for (int r = 0; r < NSETS; r++) do_read(r, path_to(r / RPS), 1, "read");
    // masked writes
    for (int t = 0; t < 100; t++) begin
      int r;
      logic [ROW_W-1:0] m, d;
      r = $urandom_range(NSETS - 1, 0);
      m = rand_row();
      d = rand_row();
      do_write(r, m, d, path_to(r / RPS));
      model[r] = (model[r] & ~m) | (d & m);
      do_read(r, path_to(r / RPS), 1, "masked");
    end
    // all segmenters on
    for (int r = 0; r < NSETS; r += 3) do_read(r, '1, 1, "all-on");
    // cut path: the segmenter just in front of the row's segment is off
    for (int r = RPS; r < NSETS; r += 5) begin
      logic [NSEG-2:0] s;
      s = path_to(r / RPS);
      s[r / RPS - 1] = 1'b0;
      do_read(r, s, 0, "cut read");
      do_write(r, '1, ~model[r], s);
      do_read(r, path_to(r / RPS), 1, "after cut write");
    end
    // idle: nothing selected
    wordline = '0; sc = '1; #1;
    checks++;
    if (sense_ok !== 1'b0) begin failures++; $display("FAIL idle resolved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
