// tb_segmentation_restore: plays the label read-out of a 6 x 5 network
// (two 6-bit halves per block, high half first, block column N first) with
// random labels and checks that columns N-1 .. 0 are written once each, in
// that order, with the joined labels of every row; block column N and block
// row M are ignored.
module tb_segmentation_restore;
  import seg_pkg::*;
  localparam int N = 6, M = 5, COL_W = $clog2(N + 1);
  logic clk = 1'b0, rst_n = 1'b0, rd_en = 1'b0, rd_first = 1'b0;
  chunk_t chunk_in [M+1];
  logic seg_we;
  logic [COL_W-1:0] seg_col;
  label_t seg_label [M];
  int checks = 0, failures = 0;
  label_t lab [N+1][M+1];
  int writes, expect_col;

  segmentation_restore #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && seg_we) begin
    check(int'(seg_col) == expect_col, $sformatf("column %0d expected %0d", seg_col, expect_col));
    for (int y = 0; y < M; y++)
      check(seg_label[y] == lab[seg_col][y], $sformatf("label col %0d row %0d", seg_col, y));
    expect_col--;
    writes++;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b <= M; b++) chunk_in[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 10; f++) begin
      for (int a = 0; a <= N; a++) for (int b = 0; b <= M; b++) lab[a][b] = label_t'($urandom);
      writes = 0; expect_col = N - 1;
      repeat (f % 3) @(negedge clk);
      for (int a = N; a >= 0; a--) begin
        rd_en = 1'b1; rd_first = (a == N);
        for (int b = 0; b <= M; b++) chunk_in[b] = lab[a][b][LABEL_W-1:CHUNK_W];
        @(negedge clk);
        rd_first = 1'b0;
        for (int b = 0; b <= M; b++) chunk_in[b] = lab[a][b][CHUNK_W-1:0];
        @(negedge clk);
      end
      rd_en = 1'b0;
      for (int b = 0; b <= M; b++) chunk_in[b] = chunk_t'($urandom);
      repeat (3) @(negedge clk);
      check(writes == N, $sformatf("%0d writes", writes));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
