// tb_wr_block: one vertical and one horizontal weight-register block chained
// together. Random weights are shifted in (two chunks per block); for all 16
// combinations of the four corner cells' excitation states every one of the
// eight outputs is compared with the link it should carry (diagonals UL-LR and
// UR-LL, straights UL-LL/UR-LR for a vertical block, UL-UR/LL-LR for a
// horizontal one), gated by the partner cell's x. Then labels are written
// (only with labelw and the LR cell excited), copied into the chain and
// shifted out, high half first.
module tb_wr_block;
  import seg_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift_en = 1'b0, copy_label = 1'b0, labelw = 1'b0;
  chunk_t cin, mid, cout;
  label_t label_in;
  logic xul, xur, xll, xlr;
  code_t wv [4][2], wh [4][2];
  int checks = 0, failures = 0;

  // chain: cin -> vertical block -> horizontal block -> cout
  wr_block #(.IS_H(1'b0)) u_v (.clk(clk), .rst_n(rst_n), .clr(clr), .shift_en(shift_en),
    .chunk_in(cin), .chunk_out(mid), .copy_label(copy_label), .labelw(labelw), .label_in(label_in),
    .x_ul(xul), .x_ur(xur), .x_ll(xll), .x_lr(xlr), .wout(wv));
  wr_block #(.IS_H(1'b1)) u_h (.clk(clk), .rst_n(rst_n), .clr(clr), .shift_en(shift_en),
    .chunk_in(mid), .chunk_out(cout), .copy_label(copy_label), .labelw(labelw), .label_in(label_in),
    .x_ul(xul), .x_ur(xur), .x_ll(xll), .x_lr(xlr), .wout(wh));
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

  // expected output for corner c, kind k (0 diag, 1 straight), given w and x
  function automatic code_t expect_out(bit h, code_t w [4], int c, int k, logic xs [4]);
    // partner corner and register of each link: corners 0 UL, 1 UR, 2 LL, 3 LR
    int partner, r;
    if (k == 0) begin
      partner = 3 - c;
      r = (c == 0 || c == 3) ? 0 : 1;
    end else if (!h) begin
      partner = (c == 0) ? 2 : (c == 2) ? 0 : (c == 1) ? 3 : 1;
      r = (c == 0 || c == 2) ? 2 : 3;
    end else begin
      partner = (c == 0) ? 1 : (c == 1) ? 0 : (c == 2) ? 3 : 2;
      r = (c == 0 || c == 1) ? 2 : 3;
    end
    return xs[partner] ? w[r] : code_t'(0);
  endfunction

  initial begin
    code_t w_v [4], w_h [4];
    logic xs [4];
    label_t lv, lh;
    chunk_t got_hi;
    xul = 0; xur = 0; xll = 0; xlr = 0; label_in = '0; cin = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 50; it++) begin
      for (int r = 0; r < 4; r++) begin w_v[r] = code_t'($urandom_range(1, 7)); w_h[r] = code_t'($urandom_range(1, 7)); end
      shift_en = 1'b1;
      cin = {w_h[3], w_h[2]}; @(negedge clk);
      cin = {w_h[1], w_h[0]}; @(negedge clk);
      cin = {w_v[3], w_v[2]}; @(negedge clk);
      cin = {w_v[1], w_v[0]}; @(negedge clk);
      shift_en = 1'b0;
      cin = $urandom;
      for (int m = 0; m < 16; m++) begin
        {xlr, xll, xur, xul} = 4'(m);
        xs[0] = xul; xs[1] = xur; xs[2] = xll; xs[3] = xlr;
        #1;
        for (int c = 0; c < 4; c++)
          for (int k = 0; k < 2; k++) begin
            check(wv[c][k] == expect_out(1'b0, w_v, c, k, xs), $sformatf("V corner %0d kind %0d x=%b", c, k, m));
            check(wh[c][k] == expect_out(1'b1, w_h, c, k, xs), $sformatf("H corner %0d kind %0d x=%b", c, k, m));
          end
      end
      // labels
      @(negedge clk);
      clr = 1'b1; @(negedge clk); clr = 1'b0;
      lv = label_t'($urandom); lh = label_t'($urandom);
      xlr = 1'b0; labelw = 1'b1; label_in = lv; @(negedge clk);   // no LR cell excited: nothing stored
      xlr = 1'b1; labelw = 1'b0; label_in = lh; @(negedge clk);   // no labelw: nothing stored
      labelw = 1'b0; xlr = 1'b0;
      if (it % 2 == 1) begin
        xlr = 1'b1; labelw = 1'b1; label_in = lv; @(negedge clk);
        labelw = 1'b0; xlr = 1'b0;
      end
      copy_label = 1'b1; @(negedge clk); copy_label = 1'b0;
      shift_en = 1'b1;
      // out: high half of the H block, low half, then the V block
      got_hi = cout; @(negedge clk);
      check({got_hi, cout} == ((it % 2 == 1) ? lv : label_t'(0)), $sformatf("it %0d H label %h lv %h lh %h", it, {got_hi, cout}, lv, lh));
      @(negedge clk);
      got_hi = cout; @(negedge clk);
      check({got_hi, cout} == ((it % 2 == 1) ? lv : label_t'(0)), $sformatf("V label %h", {got_hi, cout}));
      shift_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
