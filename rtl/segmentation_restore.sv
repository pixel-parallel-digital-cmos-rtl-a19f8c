// segmentation_restore: label read-out into the image segmentation memory.
//
// After segmentation every weight-register block holds the label of the cell
// to its lower right. The cell network copies the labels into its weight
// chains and shifts them out of the right-hand end of every block row, two
// 6-bit halves per block (high half first), the rightmost block column first.
// This circuit counts the read-out clocks, joins the two halves and writes one
// whole pixel column of labels (one per row, column-parallel) per two clocks
// to the segmentation memory: column N-1 first, column 0 last. Block column N
// and block row M lie beyond the last cell and are skipped.
//
// Interface: rd_first marks the first read-out clock (the high half of block
// column N is then on chunk_in); rd_en is high for 2*(N+1) clocks. seg_we,
// seg_col and seg_label are registered, valid one clock after the low half
// was seen. The source places the label store in the register blocks and an
// external read-out; the sequencing here is this design's own.
module segmentation_restore
  import seg_pkg::*;
#(
  parameter int N = 10,
  parameter int M = 10,
  localparam int COL_W = (N > 1) ? $clog2(N + 1) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  input  logic             rd_first,
  input  chunk_t           chunk_in [M+1],
  output logic             seg_we,
  output logic [COL_W-1:0] seg_col,
  output label_t           seg_label [M]
);

  logic [COL_W-1:0] col;    // block column now on the chain output
  logic             half;   // 0: high half, 1: low half
  chunk_t           hi [M];

  logic [COL_W-1:0] col_now;
  logic             half_now;
  always_comb begin
    col_now  = rd_first ? COL_W'(N) : col;
    half_now = rd_first ? 1'b0 : half;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col     <= '0;
      half    <= 1'b0;
      seg_we  <= 1'b0;
      seg_col <= '0;
    end else begin
      seg_we <= 1'b0;
      if (rd_en) begin
        half <= !half_now;
        col  <= half_now ? col_now - COL_W'(1) : col_now;
        if (half_now && col_now < COL_W'(N)) begin
          seg_we  <= 1'b1;
          seg_col <= col_now;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int y = 0; y < M; y++) begin
        if (!half_now) hi[y] <= chunk_in[y];
        else           seg_label[y] <= {hi[y], chunk_in[y]};
      end
    end
  end

endmodule
