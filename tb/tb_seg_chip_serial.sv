// tb_seg_chip_serial: end-to-end test of the segmentation chip built with
// weight-serial cells (WEIGHT_SERIAL = 1), at the default 10 x 10 size.
//
// The same frames, memory models and reference labels as the weight-parallel
// test: block checker-board, colour image with noise in colour and in grey
// mode, homogeneous image. The labels must be identical to the weight-parallel
// result, since only the way a cell forms its sum differs. The timing differs:
// every growth step takes nine clocks, so a segment with E excitation numbers
// takes 9*E + 1 clocks. From the reference count C = sum(E_s + 1) + 1 over S
// segments, the expected search/growth time is 9*(C - S - 1) + S + 1.
// Mechanisms are counted as in the weight-parallel test.
module tb_seg_chip_serial;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  localparam int N = 10, M = 10, CH = 3;
  localparam int COL_W = $clog2(N + 1);

  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, grey_mode = 1'b0;
  sum_t phi_z, phi_p;
  logic img_rd_en;
  logic [COL_W-1:0] img_rd_col;
  pix_t img_col [M][CH];
  logic seg_we;
  logic [COL_W-1:0] seg_col;
  label_t seg_label [M];
  logic busy, done, finish;
  logic row_x [M];
  label_t seg_count;
  logic [31:0] seg_cycles;

  seg_chip #(.WEIGHT_SERIAL(1'b1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  img_t img;
  map_t got;
  int writes;

  // mechanism counters
  int n_seed = 0, n_grow = 0, n_inhibit = 0, n_finish = 0, n_unlabelled = 0;
  int n_passed = 0, n_colour = 0, n_grey = 0, n_rowx = 0;

  // Input image memory model.
  always_ff @(posedge clk)
    if (img_rd_en)
      for (int y = 0; y < M; y++)
        for (int c = 0; c < CH; c++) img_col[y][c] <= pix_t'(img[img_rd_col][y][c]);

  // Segmentation memory model.
  always_ff @(posedge clk)
    if (seg_we) begin
      writes <= writes + 1;
      for (int y = 0; y < M; y++) got[seg_col][y] <= int'(seg_label[y]);
    end

  always_ff @(posedge clk) begin
    for (int y = 0; y < M; y++) if (row_x[y]) n_rowx <= n_rowx + 1;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_frame(string name, bit grey, int pz, int pp);
    result_t r;
    int cyc, expect_cyc, ser_cycles;
    bit saw_finish;
    g_img = img;
    leaders(N, M, grey, pp);
    r = segment(N, M, grey, pz);
    grey_mode = grey;
    phi_z = sum_t'(pz);
    phi_p = sum_t'(pp);
    writes = 0;
    saw_finish = 1'b0;
    for (int x = 0; x < N; x++) for (int y = 0; y < M; y++) got[x][y] = -1;
    @(negedge clk) go = 1'b1;
    @(negedge clk) go = 1'b0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (busy && finish) saw_finish = 1'b1;
      if (cyc > 20000) break;
    end
    repeat (2) @(negedge clk);
    ser_cycles = 9 * (r.cycles - r.segments - 1) + r.segments + 1;
    expect_cyc = 2 + 2 * (N + 1) + ser_cycles + 1 + 2 * (N + 1);
    check(cyc == expect_cyc, $sformatf("%s: frame took %0d clocks, expected %0d", name, cyc, expect_cyc));
    check(int'(seg_cycles) == ser_cycles, $sformatf("%s: seg_cycles %0d, expected %0d", name, seg_cycles, ser_cycles));
    check(int'(seg_count) == r.segments, $sformatf("%s: %0d segments, expected %0d", name, seg_count, r.segments));
    check(writes == N, $sformatf("%s: %0d column writes", name, writes));
    check(saw_finish, $sformatf("%s: finish never raised", name));
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++)
        check(got[x][y] == r.label[x][y],
              $sformatf("%s: label(%0d,%0d)=%0d expected %0d", name, x, y, got[x][y], r.label[x][y]));
    n_seed    += r.segments;
    n_inhibit += int'(seg_count);
    n_grow    += r.growth_steps;
    n_finish  += saw_finish ? 1 : 0;
    n_passed  += r.passed_labelled_leaders;
    for (int x = 0; x < N; x++) for (int y = 0; y < M; y++) if (got[x][y] == 0) n_unlabelled++;
    if (grey) n_grey++; else n_colour++;
    $display("%s: %0d segments, %0d search/growth clocks, %0d frame clocks", name, seg_count, seg_cycles, cyc);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bx, by, v;
    phi_z = '0; phi_p = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. checker-board: column blocks 0-3, 4-6, 7-9; row blocks 0-2, 3-5, 6-9
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) begin
        bx = (x < 4) ? 0 : (x < 7) ? 1 : 2;
        by = (y < 3) ? 0 : (y < 6) ? 1 : 2;
        v = ((bx + by) % 2 == 0) ? 255 : 0;
        for (int c = 0; c < 3; c++) img[x][y][c] = v;
      end
    run_frame("block checker-board", 1'b1, 100, 600);

    // 2./3. blocky colour image with isolated noise pixels
    void'($urandom(7));
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) begin
        bx = (x < 5) ? 0 : 1;
        by = (y < 4) ? 0 : (y < 7) ? 1 : 2;
        img[x][y][0] = (bx == 0) ? 200 : 60;
        img[x][y][1] = (by == 1) ? 180 : 40;
        img[x][y][2] = 120 + int'($urandom_range(0, 3));
        if ($urandom_range(0, 9) == 0)
          for (int c = 0; c < 3; c++) img[x][y][c] = int'($urandom_range(0, 255));
      end
    run_frame("colour", 1'b0, 90, 700);
    run_frame("colour-as-grey", 1'b1, 90, 700);

    // 4. homogeneous
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++)
        for (int c = 0; c < 3; c++) img[x][y][c] = 77;
    run_frame("homogeneous", 1'b0, 100, 600);

    $display("mechanisms: seeds=%0d growth_steps=%0d inhibitions=%0d finish=%0d unlabelled=%0d labelled_leaders_skipped=%0d colour=%0d grey=%0d row_x=%0d",
             n_seed, n_grow, n_inhibit, n_finish, n_unlabelled, n_passed, n_colour, n_grey, n_rowx);
    check(n_seed > 0, "no seed found");
    check(n_grow > 0, "no growth step");
    check(n_inhibit > 0, "no inhibition");
    check(n_finish > 0, "no finish");
    check(n_unlabelled > 0, "no unlabelled pixel");
    check(n_passed > 0, "token never skipped a labelled leader");
    check(n_colour > 0 && n_grey > 0, "mode not switched");
    check(n_rowx > 0, "row excitation never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
