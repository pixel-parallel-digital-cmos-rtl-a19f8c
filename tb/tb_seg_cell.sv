// tb_seg_cell: one network cell. Checks the leader-bit shift chain, the
// token rule (pass unless an unlabelled leader or the current seed), seeding
// (x and n set, token held), the excitation test against the sum of the eight
// decoded link weights (random weights and thresholds, sum > phi_z), growth,
// inhibition with labelw (x, n cleared, l set, token passed afterwards) and clr.
module tb_seg_cell;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, p_shift = 1'b0, p_in = 1'b0, p_out;
  logic pre = 1'b0, next, seed_en = 1'b0, grow_en = 1'b0, labelw = 1'b0;
  code_t w [8];
  sum_t phi_z;
  logic x, excitable, l;
  int checks = 0, failures = 0;

  seg_cell dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_p(bit v);
    @(negedge clk); p_shift = 1'b1; p_in = v;
    @(negedge clk); p_shift = 1'b0; p_in = ~v;
    check(p_out == v, "p chain");
  endtask

  initial begin
    int s;
    for (int k = 0; k < 8; k++) w[k] = '0;
    phi_z = sum_t'(100);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 400; it++) begin
      @(negedge clk) clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      check(!x && !l, "clr");
      load_p(it % 2);
      // token passing before anything happens
      pre = 1'b0; #1 check(!next, "no token in");
      pre = 1'b1; #1 check(next == !(it % 2), "token rule on an unlabelled cell");
      // excitation test
      s = 0;
      for (int k = 0; k < 8; k++) begin w[k] = code_t'($urandom_range(0, 7)); s += ref_dec(w[k]); end
      phi_z = sum_t'((it % 3 == 0) ? s : (it % 3 == 1) ? s - 1 : int'($urandom_range(0, 1100)));
      #1 check(excitable == (s > int'(phi_z)), $sformatf("excitable sum %0d phi_z %0d", s, phi_z));
      if (it % 4 == 0 && (it % 2) == 0) begin
        // growth of a non-leader cell
        grow_en = 1'b1; @(negedge clk); grow_en = 1'b0;
        check(x == (s > int'(phi_z)), "growth");
        if (x) begin
          #1 check(!excitable, "an excited cell is not excitable");
          check(next, "a grown non-leader passes the token");
        end
      end else if (it % 2 == 1) begin
        // leader: seed
        seed_en = 1'b1; @(negedge clk); seed_en = 1'b0;
        check(x, "seed self-excitation");
        #1 check(!next, "seed holds the token");
        seed_en = 1'b1; #1 check(!next, "seed holds the token while searching");
        seed_en = 1'b0;
      end
      if (x) begin
        labelw = 1'b1; @(negedge clk); labelw = 1'b0;
        check(!x && l, "inhibition");
        #1 check(next, "labelled cell passes the token");
        check(!excitable, "labelled cell not excitable");
        // a labelled leader is never seeded again
        seed_en = 1'b1; @(negedge clk); seed_en = 1'b0;
        check(!x, "labelled cell seeded again");
      end
      pre = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
