// tb_seg_controller: the sequencer against a scripted network. For random
// frames of S segments, each growing for a random number of clocks, it checks
// the column requests (N-1 first, then one per step in phase 1, none for the
// empty step), the step/phase pattern and a_odd, 2(N+1) load shifts, N
// leader-bit shifts, one inhibition per segment, the search/growth clock count
// sum(g_s + 2) + 1, one copy, 2(N+1) read-out clocks with rd_first once, and
// the total frame time.
module tb_seg_controller;
  import seg_pkg::*;
  localparam int N = 10, COL_W = $clog2(N + 1);
  logic [3:0] acc_step;
  logic clk = 1'b0, rst_n = 1'b0, go = 1'b0, finish, any_excitable;
  state_t state;
  logic clr, img_rd_en, step_en, phase, new_valid, a_odd, shift_en, p_shift;
  logic start, seed_en, grow_en, labelw, copy_label, rd_en, rd_first, busy, done;
  logic [COL_W-1:0] img_rd_col;
  logic [31:0] seg_cycles;
  int checks = 0, failures = 0;

  seg_controller #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // scripted network
  int segs_left, grow_left, grow_len [$];
  always_comb begin
    finish = start && segs_left == 0 && grow_left < 0;
    any_excitable = state == ST_GROW && grow_left > 0;
  end
  always @(posedge clk) begin
    if (seed_en && !finish) grow_left <= grow_len.pop_front();
    else if (grow_en) grow_left <= grow_left - 1;
    else if (labelw) begin grow_left <= -1; segs_left <= segs_left - 1; end
  end

  // counters
  int n_rd, n_step, n_load_shift, n_p, n_labelw, n_copy, n_read, n_first, n_clr, exp_col;
  always @(posedge clk) if (rst_n) begin
    check(acc_step == '0, "acc_step stays 0 with weight-parallel cells");
    if (img_rd_en) begin
      check(int'(img_rd_col) == exp_col, $sformatf("read column %0d expected %0d", img_rd_col, exp_col));
      exp_col--; n_rd++;
    end
    if (step_en) begin
      n_step++;
      check(phase == 1'((n_step - 1) % 2), "phase pattern");
      check(a_odd == 1'((N - (n_step - 1) / 2) % 2), "a_odd");
      check(new_valid == ((n_step - 1) / 2 < N), "new_valid");
      if (shift_en) n_load_shift++;
    end
    if (p_shift) n_p++;
    if (labelw) n_labelw++;
    if (copy_label) n_copy++;
    if (rd_en) n_read++;
    if (rd_first) n_first++;
    if (clr) n_clr++;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, g, exp_seg, cyc;
    grow_left = -1; segs_left = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 20; f++) begin
      s = $urandom_range(0, 6);
      exp_seg = 1;
      grow_len.delete();
      for (int i = 0; i < s; i++) begin
        g = $urandom_range(0, 9);
        grow_len.push_back(g);
        exp_seg += g + 2;
      end
      segs_left = s;
      n_rd = 0; n_step = 0; n_load_shift = 0; n_p = 0; n_labelw = 0; n_copy = 0;
      n_read = 0; n_first = 0; n_clr = 0; exp_col = N - 1;
      @(negedge clk) go = 1'b1;
      @(negedge clk) go = 1'b0;
      cyc = 1;
      while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
      check(n_clr == 1, "clr once");
      check(n_rd == N, $sformatf("%0d column reads", n_rd));
      check(n_step == 2 * (N + 1) && n_load_shift == 2 * (N + 1), "load steps");
      check(n_p == N, $sformatf("%0d leader shifts", n_p));
      check(n_labelw == s, $sformatf("%0d inhibitions for %0d segments", n_labelw, s));
      check(int'(seg_cycles) == exp_seg, $sformatf("seg_cycles %0d expected %0d", seg_cycles, exp_seg));
      check(n_copy == 1 && n_read == 2 * (N + 1) && n_first == 1, "read-out");
      check(cyc == 2 + 2 * (N + 1) + exp_seg + 1 + 2 * (N + 1), $sformatf("frame took %0d", cyc));
      check(!busy, "still busy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
