// tb_leader_cell_selection: shifts the weight chunks of random images (block
// columns N..0, as the weight pipeline delivers them) into the leader cell
// selection circuit and checks p for every cell column against the sum of the
// eight decoded link weights computed directly from the image by seg_ref_pkg
// (p = sum > phi_p), for several thresholds.
module tb_leader_cell_selection;
  import seg_pkg::*;
  import seg_ref_pkg::*;

  localparam int N = 8, M = 7;
  logic clk = 1'b0, step_en = 1'b0, phase = 1'b0, a_odd = 1'b0;
  chunk_t chunk [M+1];
  sum_t phi_p;
  logic p [M];
  int checks = 0, failures = 0, ones = 0;

  leader_cell_selection #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int frame = 0; frame < 30; frame++) begin
      int pp;
      for (int x = 0; x < N; x++)
        for (int y = 0; y < M; y++)
          for (int c = 0; c < 3; c++)
            g_img[x][y][c] = 90 + int'($urandom_range(0, 2 << (frame % 7)));
      pp = 100 + int'($urandom_range(0, 900));
      phi_p = sum_t'(pp);
      for (int k = 0; k <= N; k++) begin
        int a;
        a = N - k;
        @(negedge clk);
        step_en = 1'b1; a_odd = 1'(a % 2); phase = 1'b0;
        for (int b = 0; b <= M; b++)
          chunk[b] = {code_t'(block_code(N, M, 1'b0, a, b, 3)), code_t'(block_code(N, M, 1'b0, a, b, 2))};
        @(negedge clk);
        phase = 1'b1;
        for (int b = 0; b <= M; b++)
          chunk[b] = {code_t'(block_code(N, M, 1'b0, a, b, 1)), code_t'(block_code(N, M, 1'b0, a, b, 0))};
        #1;
        if (k >= 1)
          for (int y = 0; y < M; y++) begin
            bit e;
            e = nb_sum(N, M, 1'b0, a, y) > pp;
            checks++;
            if (e) ones++;
            if (p[y] != e) begin
              failures++;
              $display("FAIL: frame %0d cell (%0d,%0d) p=%0b sum=%0d phi_p=%0d", frame, a, y, p[y], nb_sum(N, M, 1'b0, a, y), pp);
            end
          end
      end
      @(negedge clk) step_en = 1'b0;
    end
    checks++;
    if (ones == 0 || ones == checks - 1) begin failures++; $display("FAIL: p never varied"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
