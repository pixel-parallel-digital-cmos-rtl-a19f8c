// tb_weight_calc_circuit: feeds random 6-row colour images (with flat areas so
// that all codes occur) column by column, right to left, plus the empty final
// step, in colour and grey mode, and compares both chunks of every step with
// the four codes of each weight-register block worked out by seg_ref_pkg
// (block (a,b): w0 = UL-LR, w1 = UR-LL, w2/w3 the straight links of a
// vertical or horizontal block).
module tb_weight_calc_circuit;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  localparam int N = 7, M = 6, CH = 3;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, step_en = 1'b0, phase = 1'b0;
  logic new_valid = 1'b0, a_odd = 1'b0, grey_mode = 1'b0;
  pix_t pix_in [M][CH];
  chunk_t chunk [M+1];
  int checks = 0, failures = 0;

  weight_calc_circuit #(.M(M), .CH(CH)) dut (.*);
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

  initial begin
    for (int y = 0; y < M; y++) for (int c = 0; c < CH; c++) pix_in[y][c] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 20; frame++) begin
      bit grey;
      grey = frame % 2;
      for (int x = 0; x < N; x++)
        for (int y = 0; y < M; y++)
          for (int c = 0; c < 3; c++)
            g_img[x][y][c] = (frame % 4 < 2) ? int'($urandom_range(0, 255))
                                             : 100 + int'($urandom_range(0, 1 << (frame % 8)));
      grey_mode = grey;
      clr = 1'b1;
      @(negedge clk) clr = 1'b0;
      for (int k = 0; k <= N; k++) begin
        int a;
        a = N - k;
        step_en = 1'b1; a_odd = 1'(a % 2); new_valid = k < N;
        for (int y = 0; y < M; y++)
          for (int c = 0; c < CH; c++) pix_in[y][c] = (k < N) ? pix_t'(g_img[a-1][y][c]) : pix_t'(8'hA5);
        phase = 1'b0;
        #1;
        for (int b = 0; b <= M; b++)
          check(chunk[b] == {code_t'(block_code(N, M, grey, a, b, 3)), code_t'(block_code(N, M, grey, a, b, 2))},
                $sformatf("frame %0d block (%0d,%0d) chunk0 %h", frame, a, b, chunk[b]));
        @(negedge clk);
        for (int y = 0; y < M; y++) for (int c = 0; c < CH; c++) pix_in[y][c] = pix_t'($urandom_range(0, 255));
        phase = 1'b1;
        #1;
        for (int b = 0; b <= M; b++)
          check(chunk[b] == {code_t'(block_code(N, M, grey, a, b, 1)), code_t'(block_code(N, M, grey, a, b, 0))},
                $sformatf("frame %0d block (%0d,%0d) chunk1 %h", frame, a, b, chunk[b]));
        @(negedge clk);
      end
      step_en = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
