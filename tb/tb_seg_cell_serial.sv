// tb_seg_cell_serial: one weight-serial network cell. Each round drives the
// nine accumulation steps (acc_step 0..8). The link-weight code w[k] holds the
// test value only in its own step k+1 and random codes in all other clocks,
// so a cell that picks a weight in the wrong step or adds one twice gets a
// wrong sum. After the round, excitable must equal (sum of the eight decoded
// weights > phi_z), using the testbench's own decoder. The round is then
// closed with grow_en, seed_en or labelw at acc_step 0 as the controller does.
// The test also covers the leader-bit chain, the token rule, seeding, growth,
// inhibition and clr.
module tb_seg_cell_serial;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, p_shift = 1'b0, p_in = 1'b0, p_out;
  logic pre = 1'b0, next, seed_en = 1'b0, grow_en = 1'b0, labelw = 1'b0;
  logic [3:0] acc_step = '0;
  code_t w [8];
  sum_t phi_z;
  logic x, excitable, l;
  int checks = 0, failures = 0;

  seg_cell_serial dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One round of nine clocks; on return acc_step is 0 again and excitable
  // reflects the sum just formed.
  task automatic round(input code_t wv [8], input sum_t th);
    for (int st = 0; st <= 8; st++) begin
      acc_step = 4'(st);
      phi_z = (st == 0) ? th : sum_t'($urandom_range(0, 2047));
      for (int k = 0; k < 8; k++)
        w[k] = (st == k + 1) ? wv[k] : code_t'($urandom_range(0, 7));
      @(negedge clk);
    end
    acc_step = '0;
    phi_z = th;
  endtask

  task automatic load_p(bit v);
    @(negedge clk); p_shift = 1'b1; p_in = v;
    @(negedge clk); p_shift = 1'b0; p_in = ~v;
    check(p_out == v, "p chain");
  endtask

  initial begin
    int s;
    code_t wv [8];
    sum_t th;
    for (int k = 0; k < 8; k++) w[k] = '0;
    phi_z = sum_t'(100);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk) clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      check(!x && !l, "clr");
      load_p(it % 2);
      pre = 1'b0; #1 check(!next, "no token in");
      pre = 1'b1; #1 check(next == !(it % 2), "token rule on an unlabelled cell");
      s = 0;
      for (int k = 0; k < 8; k++) begin
        wv[k] = code_t'($urandom_range(0, 7));
        s += ref_dec(wv[k]);
      end
      th = sum_t'((it % 3 == 0) ? s : (it % 3 == 1) ? s - 1 : int'($urandom_range(0, 1100)));
      round(wv, th);
      #1 check(excitable == (s > int'(th)),
               $sformatf("excitable after nine clocks: sum %0d phi_z %0d", s, th));
      if (it % 4 == 0) begin
        // growth of a non-leader cell at acc_step 0
        grow_en = 1'b1; @(negedge clk); grow_en = 1'b0;
        check(x == (s > int'(th)), "growth");
        if (x) begin
          round(wv, th);
          #1 check(!excitable, "an excited cell is not excitable");
          check(next, "a grown non-leader passes the token");
        end
      end else if (it % 2 == 1) begin
        seed_en = 1'b1; @(negedge clk); seed_en = 1'b0;
        check(x, "seed self-excitation");
        #1 check(!next, "seed holds the token");
      end
      if (x) begin
        labelw = 1'b1; @(negedge clk); labelw = 1'b0;
        check(!x && l, "inhibition");
        #1 check(next, "labelled cell passes the token");
        round(wv, sum_t'(0));
        #1 check(!excitable, "labelled cell not excitable");
        seed_en = 1'b1; @(negedge clk); seed_en = 1'b0;
        check(!x, "labelled cell seeded again");
      end
      pre = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
