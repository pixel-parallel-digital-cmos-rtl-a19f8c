// tb_cell_network: the 10 x 10 cell network on the checker-board example of
// the test-chip measurement.
//
// Nine rectangular segments (columns 0-3 / 4-6 / 7-9, rows 0-2 / 3-5 / 6-9)
// are loaded as they were into the test chip: link weights generated outside
// (code 7 inside a segment, 0 across segments) and leader bits set only on the
// upper-left cell of each segment. The testbench then acts as the sequencer
// (search, growth, inhibition with a new label each time) and checks
//  - the excitation number of every cell against the 10 x 10 table printed
//    with the measurement (1..32, the serpentine search visiting the segments
//    in the order A B C D E F G H I),
//  - the search/growth clock count, sum over segments of (numbers + 1) + 1,
//  - the per-row excitation outputs at every clock,
//  - the labels read out through the weight chains after copy_label.
module tb_cell_network;
  import seg_pkg::*;

  localparam int N = 10, M = 10;

  logic [3:0] acc_step = '0;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift_en = 1'b0, copy_label = 1'b0;
  chunk_t chunk_in [M+1];
  chunk_t chunk_out [M+1];
  logic p_shift = 1'b0;
  logic p_in [M];
  logic start = 1'b0, seed_en = 1'b0, grow_en = 1'b0, labelw = 1'b0;
  label_t label_in;
  sum_t phi_z;
  logic finish, any_excitable;
  logic row_x [M];
  logic x_map [N][M];
  logic l_map [N][M];

  cell_network #(.N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Printed excitation numbers, one string per row.
  string fig_rows [M] = '{
    "1 2 3 4 5 6 7 8 9 10",
    "2 2 3 4 6 6 7 9 9 10",
    "3 3 3 4 7 7 7 10 10 10",
    "17 18 19 20 14 15 16 11 12 13",
    "18 18 19 20 15 15 16 12 12 13",
    "19 19 19 20 16 16 16 13 13 13",
    "21 22 23 24 25 26 27 29 30 31",
    "22 22 23 24 26 26 27 30 30 31",
    "23 23 23 24 27 27 27 31 31 31",
    "24 24 24 24 28 28 28 32 32 32"};
  // Label order of the segments: A B C / F E D / G H I
  int seg_label_of [3][3] = '{'{1, 2, 3}, '{6, 5, 4}, '{7, 8, 9}};

  int fig_num [N][M];
  int order [N][M];
  int region [N][M];

  function automatic int reg_of(int x, int y);
    int bx, by;
    bx = (x < 4) ? 0 : (x < 7) ? 1 : 2;
    by = (y < 3) ? 0 : (y < 6) ? 1 : 2;
    return by * 3 + bx;
  endfunction

  function automatic code_t lc(int x1, int y1, int x2, int y2);
    if (x1 < 0 || x1 >= N || x2 < 0 || x2 >= N || y1 < 0 || y1 >= M || y2 < 0 || y2 >= M)
      return '0;
    return (reg_of(x1, y1) == reg_of(x2, y2)) ? code_t'(7) : code_t'(0);
  endfunction

  function automatic code_t bc(int a, int b, int idx);
    bit h;
    h = ((a + b) % 2) == 1;
    case (idx)
      0: return lc(a-1, b-1, a, b);
      1: return lc(a, b-1, a-1, b);
      2: return h ? lc(a-1, b-1, a, b-1) : lc(a-1, b-1, a-1, b);
      default: return h ? lc(a-1, b, a, b) : lc(a, b-1, a, b);
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int num, cycles, segs, nseg_e, v, pos;
    bit any_new, saw_finish;
    string s;
    logic prev_x [N][M];
    label_t got_label;
    chunk_t hi [M];

    // parse the printed table
    for (int y = 0; y < M; y++) begin
      s = fig_rows[y];
      pos = 0;
      for (int x = 0; x < N; x++) begin
        v = 0;
        while (pos < s.len() && s[pos] == " ") pos++;
        while (pos < s.len() && s[pos] != " ") begin v = v * 10 + (s[pos] - "0"); pos++; end
        fig_num[x][y] = v;
      end
    end

    phi_z = sum_t'(100);
    label_in = '0;
    for (int b = 0; b <= M; b++) chunk_in[b] = '0;
    for (int y = 0; y < M; y++) p_in[y] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clr = 1'b1;
    @(negedge clk) clr = 1'b0;

    // load weights: block columns N..0, {w3,w2} then {w1,w0}
    shift_en = 1'b1;
    for (int a = N; a >= 0; a--) begin
      for (int b = 0; b <= M; b++) chunk_in[b] = {bc(a, b, 3), bc(a, b, 2)};
      @(negedge clk);
      for (int b = 0; b <= M; b++) chunk_in[b] = {bc(a, b, 1), bc(a, b, 0)};
      @(negedge clk);
    end
    shift_en = 1'b0;
    // load leader bits: upper-left cell of every segment, column N-1 first
    p_shift = 1'b1;
    for (int x = N - 1; x >= 0; x--) begin
      for (int y = 0; y < M; y++)
        p_in[y] = ((x == 0 || x == 4 || x == 7) && (y == 0 || y == 3 || y == 6));
      @(negedge clk);
    end
    p_shift = 1'b0;

    for (int x = 0; x < N; x++) for (int y = 0; y < M; y++) order[x][y] = 0;
    num = 0; cycles = 0; segs = 0; saw_finish = 1'b0;
    label_in = label_t'(1);
    start = 1'b1;
    forever begin
      // search clock
      seed_en = 1'b1; grow_en = 1'b0; labelw = 1'b0;
      #1;
      cycles++;
      if (finish) begin saw_finish = 1'b1; break; end
      for (int x = 0; x < N; x++) for (int y = 0; y < M; y++) prev_x[x][y] = x_map[x][y];
      @(negedge clk);
      seed_en = 1'b0;
      nseg_e = 0;
      forever begin
        any_new = 1'b0;
        for (int x = 0; x < N; x++)
          for (int y = 0; y < M; y++)
            if (x_map[x][y] && !prev_x[x][y]) begin
              if (!any_new) num++;
              any_new = 1'b1;
              order[x][y] = num;
            end
        // row outputs follow the excitation map
        for (int y = 0; y < M; y++) begin
          v = 0;
          for (int x = 0; x < N; x++) if (x_map[x][y]) v = 1;
          check(row_x[y] == 1'(v), $sformatf("row_x[%0d] at excitation %0d", y, num));
        end
        for (int x = 0; x < N; x++) for (int y = 0; y < M; y++) prev_x[x][y] = x_map[x][y];
        grow_en = any_excitable;
        labelw  = !any_excitable;
        cycles++;
        @(negedge clk);
        if (labelw) break;
      end
      labelw = 1'b0; grow_en = 1'b0;
      segs++;
      label_in = label_in + label_t'(1);
    end
    start = 1'b0;

    check(saw_finish, "finish never raised");
    check(segs == 9, $sformatf("%0d segments instead of 9", segs));
    check(cycles == 32 + 9 + 1, $sformatf("%0d search/growth clocks instead of 42", cycles));
    for (int x = 0; x < N; x++)
      for (int y = 0; y < M; y++) begin
        check(order[x][y] == fig_num[x][y],
              $sformatf("cell (%0d,%0d) excited as number %0d, table says %0d", x, y, order[x][y], fig_num[x][y]));
        check(l_map[x][y] && !x_map[x][y], $sformatf("cell (%0d,%0d) not inhibited/labelled", x, y));
      end

    // read-out
    copy_label = 1'b1;
    @(negedge clk) copy_label = 1'b0;
    shift_en = 1'b1;
    for (int a = N; a >= 0; a--) begin
      for (int y = 0; y < M; y++) hi[y] = chunk_out[y];
      @(negedge clk);
      if (a < N)
        for (int y = 0; y < M; y++) begin
          got_label = {hi[y], chunk_out[y]};
          check(int'(got_label) == seg_label_of[(y < 3) ? 0 : (y < 6) ? 1 : 2][(a < 4) ? 0 : (a < 7) ? 1 : 2],
                $sformatf("label of (%0d,%0d) = %0d", a, y, got_label));
        end
      @(negedge clk);
    end
    shift_en = 1'b0;
    $display("segments=%0d clocks=%0d", segs, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
