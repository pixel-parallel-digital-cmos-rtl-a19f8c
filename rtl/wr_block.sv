// wr_block: connection-weight-register block of the cell network.
//
// A block sits at the shared corner of four cells UL, UR, LL, LR and stores
// the four links among them as 3-bit codes:
//   w0 = UL-LR, w1 = UR-LL (the two diagonals)
//   vertical block   (IS_H = 0): w2 = UL-LL, w3 = UR-LR
//   horizontal block (IS_H = 1): w2 = UL-UR, w3 = LL-LR
// Blocks alternate vertical/horizontal like a checkerboard, so every cell
// finds all eight of its links in its four corner blocks and no link is
// stored twice.
//
// Output selection: each of the eight outputs carries a link code to one
// corner cell, gated by the excitation x of the partner cell at the other end
// of the link (code 0 when the partner is not excited). wout[c][0] is the
// diagonal and wout[c][1] the straight link to corner c (0 UL, 1 UR, 2 LL,
// 3 LR).
//
// Switch and chain: the registers form two 6-bit stages, A = {w1,w0} and
// B = {w3,w2}; with shift_en the block takes chunk_in into A, moves A into B
// and offers B on chunk_out to its right-hand neighbour. The same chain
// carries the labels out after segmentation: copy_label loads the label into
// the four registers (high half into B), after which two shifts move it on.
//
// Label: with labelw, a block whose LR cell (the cell whose upper-left block
// this is) is excited stores label_in. The source reuses the weight registers
// themselves for the label; here a separate label register is kept, because
// the weight registers still hold links between other unlabelled cells while
// segmentation goes on. Everything is synchronous to clk.
module wr_block
  import seg_pkg::*;
#(
  parameter bit IS_H = 1'b0
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,          // start of a frame: clear the label
  input  logic   shift_en,
  input  chunk_t chunk_in,
  output chunk_t chunk_out,
  input  logic   copy_label,
  input  logic   labelw,
  input  label_t label_in,
  input  logic   x_ul, x_ur, x_ll, x_lr,
  output code_t  wout [4][2]
);

  chunk_t stage_a, stage_b;
  label_t label_q;
  code_t  w0, w1, w2, w3;

  always_ff @(posedge clk) begin
    if (copy_label) begin
      stage_a <= label_q[CHUNK_W-1:0];
      stage_b <= label_q[LABEL_W-1:CHUNK_W];
    end else if (shift_en) begin
      stage_a <= chunk_in;
      stage_b <= stage_a;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                label_q <= '0;
    else if (clr)              label_q <= '0;
    else if (labelw && x_lr)   label_q <= label_in;
  end

  assign chunk_out = stage_b;
  assign {w1, w0} = stage_a;
  assign {w3, w2} = stage_b;

  // Output selection circuit.
  always_comb begin
    wout[0][0] = x_lr ? w0 : '0;   // UL <- LR
    wout[3][0] = x_ul ? w0 : '0;   // LR <- UL
    wout[1][0] = x_ll ? w1 : '0;   // UR <- LL
    wout[2][0] = x_ur ? w1 : '0;   // LL <- UR
    if (!IS_H) begin
      wout[0][1] = x_ll ? w2 : '0; // UL <- LL
      wout[2][1] = x_ul ? w2 : '0; // LL <- UL
      wout[1][1] = x_lr ? w3 : '0; // UR <- LR
      wout[3][1] = x_ur ? w3 : '0; // LR <- UR
    end else begin
      wout[0][1] = x_ur ? w2 : '0; // UL <- UR
      wout[1][1] = x_ul ? w2 : '0; // UR <- UL
      wout[2][1] = x_lr ? w3 : '0; // LL <- LR
      wout[3][1] = x_ll ? w3 : '0; // LR <- LL
    end
  end

endmodule
