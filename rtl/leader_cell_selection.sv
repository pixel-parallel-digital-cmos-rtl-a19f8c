// leader_cell_selection: leader-cell state p for a whole cell column per step.
//
// It listens to the same 6-bit chunks that the connection-weight pipeline
// shifts into the cell network ({w3,w2} in phase 0, {w1,w0} in phase 1 of
// each step, one chunk per weight-register block row). While block column a
// is delivered it decides p for cell column a, whose eight links are held by
// blocks (a,y), (a,y+1) (left side, current step) and (a+1,y), (a+1,y+1)
// (right side, previous step, kept in registers). As in the source's transfer
// order, the four right-side weights go to the calculation unit first
// (phase 0) and the four left-side weights second (phase 1). Which register of
// a block carries the top, bottom, left or right link depends on the parity of
// the block, so the selectors swap on (a+y) parity.
//
// p[y] is valid in phase 1 of every step except the first (a = N, which has no
// cell column). One leader calculation unit per row.
module leader_cell_selection
  import seg_pkg::*;
#(
  parameter int M = 10
) (
  input  logic   clk,
  input  logic   step_en,
  input  logic   phase,
  input  logic   a_odd,           // parity of the block/cell column a
  input  chunk_t chunk [M+1],     // current chunks of block column a
  input  sum_t   phi_p,
  output logic   p [M]
);

  // Registers: block column a+1 (complete) and the phase-0 chunk of column a.
  code_t prev_w [M+1][4];
  chunk_t cur_hi [M+1];

  always_ff @(posedge clk) begin
    if (step_en) begin
      if (!phase) cur_hi <= chunk;
      else
        for (int b = 0; b <= M; b++) begin
          prev_w[b][0] <= chunk[b][CODE_W-1:0];
          prev_w[b][1] <= chunk[b][CHUNK_W-1:CODE_W];
          prev_w[b][2] <= cur_hi[b][CODE_W-1:0];
          prev_w[b][3] <= cur_hi[b][CHUNK_W-1:CODE_W];
        end
    end
  end

  for (genvar y = 0; y < M; y++) begin : g_row
    localparam logic Y_ODD = 1'(y % 2);
    code_t sel [4];
    logic  even;

    always_comb begin
      even = !(a_odd ^ Y_ODD);
      if (!phase) begin
        // right side: upper-right, lower-right, and right/top/bottom straights
        sel[0] = prev_w[y][1];                        // upper-right diagonal
        sel[1] = prev_w[y+1][0];                      // lower-right diagonal
        sel[2] = even ? prev_w[y][3] : prev_w[y][2];  // right (even) / top (odd)
        sel[3] = prev_w[y+1][2];                      // bottom (even) / right (odd)
      end else begin
        // left side from the current block column
        sel[0] = chunk[y][CODE_W-1:0];                // upper-left diagonal (w0)
        sel[1] = chunk[y+1][CHUNK_W-1:CODE_W];        // lower-left diagonal (w1)
        sel[2] = cur_hi[y][CHUNK_W-1:CODE_W];         // top (even) / left (odd): w3
        sel[3] = even ? cur_hi[y+1][CODE_W-1:0]       // left (even): w2
                      : cur_hi[y+1][CHUNK_W-1:CODE_W];// bottom (odd): w3
      end
    end

    leader_calc_unit u_unit (
      .clk(clk), .en(step_en), .phase(phase), .w(sel), .phi_p(phi_p), .p(p[y]));
  end

endmodule
