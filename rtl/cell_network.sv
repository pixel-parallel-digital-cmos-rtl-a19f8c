// cell_network: the pixel-parallel region-growing network.
//
// N x M cells (column x, row y) and (N+1) x (M+1) connection-weight-register
// blocks. Block (a,b) sits at the upper-left corner of cell (a,b); it is a
// vertical block when a+b is even and a horizontal block when a+b is odd, so
// the block types alternate in both directions. Each cell takes its eight link
// weights from its four corner blocks and drives its x into all four.
//
// Loading: every block row b is a 6-bit shift chain entered from the left
// (chunk_in[b]); 2*(N+1) shifts fill a row, the first chunk ending in the
// rightmost block. Leader bits enter each cell row from the left (p_in[y])
// through a one-bit chain; N shifts fill a row.
//
// Search: the token chain runs through all cells in serpentine order, row 0
// left to right, row 1 right to left, and so on. start enters the first cell;
// finish is the token leaving the last cell, i.e. no unlabelled leader cell is
// left. With seed_en the cell holding the token self-excites.
//
// Growth and inhibition: with grow_en every excitable cell is excited in the
// same clock; any_excitable is the OR of all cells' excitable outputs. With
// labelw all excited cells are inhibited and labelled and their upper-left
// blocks store label_in.
//
// Readout: copy_label puts every block's label into its weight registers;
// 2*(N+1) further shifts push them out on chunk_out[b] (label of cell (a,b) in
// block (a,b), high half first, rightmost block first).
//
// WEIGHT_SERIAL selects the cell form: 0 builds weight-parallel cells
// (seg_cell, one clock per sum), 1 builds weight-serial cells
// (seg_cell_serial, nine clocks per sum, paced by acc_step; any_excitable is
// then only valid at acc_step 0 after a full round). acc_step is ignored by
// weight-parallel cells.
//
// row_x[y] is the OR of x over row y, the row-excitation outputs of the test
// chip. The arrangement follows the source's structure diagrams; the
// serpentine direction of each row follows its search-path figure.
module cell_network
  import seg_pkg::*;
#(
  parameter int N = 10,   // columns
  parameter int M = 10,   // rows
  parameter bit WEIGHT_SERIAL = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,
  input  logic   shift_en,
  input  chunk_t chunk_in  [M+1],
  output chunk_t chunk_out [M+1],
  input  logic   copy_label,
  input  logic   p_shift,
  input  logic   p_in [M],
  input  logic   start,
  input  logic   seed_en,
  input  logic   grow_en,
  input  logic   labelw,
  input  logic [3:0] acc_step,
  input  label_t label_in,
  input  sum_t   phi_z,
  output logic   finish,
  output logic   any_excitable,
  output logic   row_x [M],
  output logic   x_map [N][M],
  output logic   l_map [N][M]
);

  code_t  wo    [N+1][M+1][4][2];
  chunk_t chain [N+2][M+1];
  logic   ps    [N][M];
  logic   exc   [N][M];

  // Weight-register blocks.
  for (genvar b = 0; b <= M; b++) begin : g_wr_row
    assign chain[0][b] = chunk_in[b];
    assign chunk_out[b] = chain[N+1][b];
    for (genvar a = 0; a <= N; a++) begin : g_wr
      logic xul, xur, xll, xlr;
      assign xul = (a >= 1 && b >= 1) ? x_map[(a >= 1) ? a-1 : 0][(b >= 1) ? b-1 : 0] : 1'b0;
      assign xur = (a <= N-1 && b >= 1) ? x_map[(a <= N-1) ? a : 0][(b >= 1) ? b-1 : 0] : 1'b0;
      assign xll = (a >= 1 && b <= M-1) ? x_map[(a >= 1) ? a-1 : 0][(b <= M-1) ? b : 0] : 1'b0;
      assign xlr = (a <= N-1 && b <= M-1) ? x_map[(a <= N-1) ? a : 0][(b <= M-1) ? b : 0] : 1'b0;
      wr_block #(.IS_H(1'((a + b) % 2))) u_wr (
        .clk(clk), .rst_n(rst_n), .clr(clr),
        .shift_en(shift_en), .chunk_in(chain[a][b]), .chunk_out(chain[a+1][b]),
        .copy_label(copy_label), .labelw(labelw), .label_in(label_in),
        .x_ul(xul), .x_ur(xur), .x_ll(xll), .x_lr(xlr),
        .wout(wo[a][b]));
    end
  end

  // Cells, generated in token-chain order k = 0 .. N*M-1.
  for (genvar k = 0; k < N * M; k++) begin : g_pos
    localparam int Y = k / N;
    localparam int X = (Y % 2 == 0) ? (k % N) : (N - 1 - k % N);
    logic  nxt, pre;
    code_t w [8];

    if (k == 0) begin : g_first
      assign pre = start;
    end else begin : g_rest
      assign pre = g_pos[k-1].nxt;
    end

    assign w[0] = wo[X][Y][3][0];
    assign w[1] = wo[X][Y][3][1];
    assign w[2] = wo[X+1][Y][2][0];
    assign w[3] = wo[X+1][Y][2][1];
    assign w[4] = wo[X][Y+1][1][0];
    assign w[5] = wo[X][Y+1][1][1];
    assign w[6] = wo[X+1][Y+1][0][0];
    assign w[7] = wo[X+1][Y+1][0][1];

    if (WEIGHT_SERIAL) begin : g_ws
      seg_cell_serial u_cell (
        .clk(clk), .rst_n(rst_n), .clr(clr),
        .p_shift(p_shift), .p_in((X == 0) ? p_in[Y] : ps[(X == 0) ? 0 : X-1][Y]),
        .p_out(ps[X][Y]),
        .pre(pre), .next(nxt),
        .seed_en(seed_en), .grow_en(grow_en), .labelw(labelw),
        .acc_step(acc_step), .w(w), .phi_z(phi_z),
        .x(x_map[X][Y]), .excitable(exc[X][Y]), .l(l_map[X][Y]));
    end else begin : g_wp
      seg_cell u_cell (
        .clk(clk), .rst_n(rst_n), .clr(clr),
        .p_shift(p_shift), .p_in((X == 0) ? p_in[Y] : ps[(X == 0) ? 0 : X-1][Y]),
        .p_out(ps[X][Y]),
        .pre(pre), .next(nxt),
        .seed_en(seed_en), .grow_en(grow_en), .labelw(labelw),
        .w(w), .phi_z(phi_z),
        .x(x_map[X][Y]), .excitable(exc[X][Y]), .l(l_map[X][Y]));
    end
  end

  assign finish = g_pos[N*M-1].nxt;

  always_comb begin
    any_excitable = 1'b0;
    for (int y = 0; y < M; y++) begin
      row_x[y] = 1'b0;
      for (int x = 0; x < N; x++) begin
        row_x[y]      = row_x[y] | x_map[x][y];
        any_excitable = any_excitable | exc[x][y];
      end
    end
  end

endmodule
