// tb_table2_images: the five 10 x 10 grey-scale test images of the test-chip
// measurement, run through the segmentation chip at its default size:
// homogeneous, stripe, S-shape, triangle and checker-board.
//
// Only the checker-board (nine blocks of 0/255) has a known layout. The other
// four shapes are this testbench's own drawings of their names: vertical
// stripes three pixels wide, an S-shaped band three pixels thick, and a lower-left
// triangle, each of 230 on a background of 20, with a small ramp inside
// the regions. Every label, the segment count, the search/growth clock count
// and the frame time are compared with the reference model in seg_ref_pkg.
// The segmentation time of each image is printed in clocks and in
// microseconds at 10 MHz. It is not compared with the measured chip times,
// because the measured chip had its own clock-level overheads.
module tb_table2_images;
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

  seg_chip dut (.*);

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
    int cyc, expect_cyc;
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
      if (cyc > 5000) break;
    end
    repeat (2) @(negedge clk);
    expect_cyc = 2 + 2 * (N + 1) + r.cycles + 1 + 2 * (N + 1);
    check(cyc == expect_cyc, $sformatf("%s: frame took %0d clocks, expected %0d", name, cyc, expect_cyc));
    check(int'(seg_cycles) == r.cycles, $sformatf("%s: seg_cycles %0d, expected %0d", name, seg_cycles, r.cycles));
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
    $display("%s: %0d segments, %0d search/growth clocks (%0.1f us at 10 MHz), %0d frame clocks",
             name, seg_count, seg_cycles, real'(seg_cycles) / 10.0, cyc);
  endtask

  initial begin
    #100000;
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

    // homogeneous
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++)
        for (int c = 0; c < 3; c++) img[x][y][c] = 128;
    run_frame("homogeneous", 1'b1, 100, 600);

    // stripe: vertical stripes three pixels wide
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++)
        for (int c = 0; c < 3; c++) img[x][y][c] = ((x / 3) % 2 == 0) ? 230 - y : 20 + y;
    run_frame("stripe", 1'b1, 100, 400);

    // S-shape: top bar, left upper side, middle bar, right lower side, bottom bar
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) begin
        v = ((y < 2 && x >= 1) || (y >= 4 && y < 6) || (y >= 8 && x <= 8) ||
             (x < 3 && y < 6) || (x >= 7 && y >= 4)) ? 230 - x : 20;
        for (int c = 0; c < 3; c++) img[x][y][c] = v;
      end
    run_frame("S-shape", 1'b1, 100, 600);

    // triangle: lower-left half including the diagonal
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++)
        for (int c = 0; c < 3; c++) img[x][y][c] = (x <= y) ? 230 - y : 20 + x;
    run_frame("triangle", 1'b1, 100, 600);

    // checker-board: column blocks 0-3, 4-6, 7-9; row blocks 0-2, 3-5, 6-9
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) begin
        bx = (x < 4) ? 0 : (x < 7) ? 1 : 2;
        by = (y < 3) ? 0 : (y < 6) ? 1 : 2;
        v = ((bx + by) % 2 == 0) ? 255 : 0;
        for (int c = 0; c < 3; c++) img[x][y][c] = v;
      end
    run_frame("checker-board", 1'b1, 100, 600);

    $display("mechanisms: seeds=%0d growth_steps=%0d inhibitions=%0d finish=%0d unlabelled=%0d labelled_leaders_skipped=%0d colour=%0d grey=%0d row_x=%0d",
             n_seed, n_grow, n_inhibit, n_finish, n_unlabelled, n_passed, n_colour, n_grey, n_rowx);
    check(n_seed > 0, "no seed found");
    check(n_grow > 0, "no growth step");
    check(n_inhibit > 0, "no inhibition");
    check(n_finish > 0, "no finish");
    check(n_passed > 0, "token never skipped a labelled leader");
    check(n_rowx > 0, "row excitation never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
