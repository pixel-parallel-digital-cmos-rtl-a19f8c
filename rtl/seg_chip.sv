// seg_chip: pixel-parallel image segmentation by region growing.
//
// One frame is processed per go pulse:
//  1. The image is read from an external input image memory one pixel column
//     per two clocks, right to left (img_rd_en/img_rd_col request a column,
//     img_col must present it on the following clock and hold it one clock).
//     The connection-weight calculation circuit turns adjacent columns into
//     3-bit link weights (grey-scale or colour, grey_mode), which are shifted
//     into the weight-register blocks of the cell network; the leader cell
//     selection circuit decides from the same weights which cells are leader
//     cells (sum of link weights > phi_p) and shifts those bits in.
//  2. The cell network segments the image: token search for the next leader
//     cell, growth of its region (a cell joins when the sum of its links to
//     already excited neighbours exceeds phi_z), inhibition and labelling,
//     until no unlabelled leader cell is left (finish).
//  3. The labels are read out column-parallel and written to an external
//     image segmentation memory (seg_we, seg_col, seg_label per row); label 0
//     marks a pixel that belongs to no segment.
// row_x are the per-row OR of the excitation states; seg_count is the number
// of segments found, seg_cycles the clocks spent in search and growth.
//
// WEIGHT_SERIAL = 1 builds the network from weight-serial cells: less adder
// hardware per cell, nine clocks per growth step instead of one.
//
// Defaults are the 10 x 10 cell network of the source's test chip, with the
// colour-capable weight calculation circuit. The split into blocks follows the
// source's architecture; the interface to the two external memories is this
// design's own.
module seg_chip
  import seg_pkg::*;
#(
  parameter int N  = 10,   // image columns
  parameter int M  = 10,   // image rows
  parameter int CH = 3,    // colour channels of the input data
  parameter bit WEIGHT_SERIAL = 1'b0,  // 1: weight-serial cells (9 clocks per growth step)
  localparam int COL_W = (N > 1) ? $clog2(N + 1) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic             grey_mode,
  input  sum_t             phi_z,
  input  sum_t             phi_p,
  // input image memory
  output logic             img_rd_en,
  output logic [COL_W-1:0] img_rd_col,
  input  pix_t             img_col [M][CH],
  // image segmentation memory
  output logic             seg_we,
  output logic [COL_W-1:0] seg_col,
  output label_t           seg_label [M],
  // status
  output logic             busy,
  output logic             done,
  output logic             finish,
  output logic             row_x [M],
  output label_t           seg_count,
  output logic [31:0]      seg_cycles
);

  logic   clr, step_en, phase, new_valid, a_odd, shift_en, p_shift;
  logic   start, seed_en, grow_en, labelw, copy_label, rd_en, rd_first;
  logic   any_excitable;
  logic [3:0] acc_step;
  label_t label;
  chunk_t wchunk [M+1];
  chunk_t net_out [M+1];
  logic   p_col [M];

  seg_controller #(.N(N), .WEIGHT_SERIAL(WEIGHT_SERIAL)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .go(go), .finish(finish), .any_excitable(any_excitable),
    .state(), .clr(clr), .img_rd_en(img_rd_en), .img_rd_col(img_rd_col),
    .step_en(step_en), .phase(phase), .new_valid(new_valid), .a_odd(a_odd),
    .shift_en(shift_en), .p_shift(p_shift), .start(start), .seed_en(seed_en),
    .grow_en(grow_en), .labelw(labelw), .acc_step(acc_step), .copy_label(copy_label),
    .rd_en(rd_en), .rd_first(rd_first), .busy(busy), .done(done),
    .seg_cycles(seg_cycles));

  weight_calc_circuit #(.M(M), .CH(CH)) u_wcalc (
    .clk(clk), .rst_n(rst_n), .clr(clr), .step_en(step_en), .phase(phase),
    .new_valid(new_valid), .a_odd(a_odd), .pix_in(img_col), .grey_mode(grey_mode),
    .chunk(wchunk));

  leader_cell_selection #(.M(M)) u_leader (
    .clk(clk), .step_en(step_en), .phase(phase), .a_odd(a_odd),
    .chunk(wchunk), .phi_p(phi_p), .p(p_col));

  cell_network #(.N(N), .M(M), .WEIGHT_SERIAL(WEIGHT_SERIAL)) u_net (
    .clk(clk), .rst_n(rst_n), .clr(clr),
    .shift_en(shift_en), .chunk_in(wchunk), .chunk_out(net_out),
    .copy_label(copy_label), .p_shift(p_shift), .p_in(p_col),
    .start(start), .seed_en(seed_en), .grow_en(grow_en), .labelw(labelw),
    .acc_step(acc_step), .label_in(label), .phi_z(phi_z),
    .finish(finish), .any_excitable(any_excitable), .row_x(row_x),
    .x_map(), .l_map());

  label_generator u_label (
    .clk(clk), .rst_n(rst_n), .clr(clr), .labelw(labelw),
    .label(label), .seg_count(seg_count));

  segmentation_restore #(.N(N), .M(M)) u_restore (
    .clk(clk), .rst_n(rst_n), .rd_en(rd_en), .rd_first(rd_first),
    .chunk_in(net_out), .seg_we(seg_we), .seg_col(seg_col), .seg_label(seg_label));

endmodule
