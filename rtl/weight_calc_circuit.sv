// weight_calc_circuit: column-parallel connection-weight pipeline.
//
// The image is fed one pixel column per step, from the rightmost column to the
// leftmost, followed by one empty step. A step takes two clocks (phase 0 and
// phase 1): four weights are needed per weight-register block and two
// weight calculation units per block row produce two weights per clock.
//
// Geometry. Weight-register block WR(a,b), a = 0..N, b = 0..M, sits at the
// upper-left corner of cell (a,b) and holds the four links among cells
// UL=(a-1,b-1), UR=(a,b-1), LL=(a-1,b), LR=(a,b):
//   w0 = UL-LR (diagonal), w1 = UR-LL (anti-diagonal),
//   vertical block ((a+b) even): w2 = UL-LL, w3 = UR-LR
//   horizontal block ((a+b) odd): w2 = UL-UR, w3 = LL-LR
// A step delivers block column a while pixel column a-1 arrives ("new") and
// pixel column a is held in a delay register ("prev"). Phase 0 outputs the
// chunk {w3,w2} and phase 1 the chunk {w1,w0}; shifted into a chain they end
// up in the right registers (see wr_block).
//
// Interface: pix_in / new_valid are sampled in phase 0 and must hold the new
// column (new_valid = 0 in the final empty step). chunk[b] is combinational
// and valid in every step cycle. The arrangement of the delay registers and
// selectors is this design's own; the source shows only the data flow.
module weight_calc_circuit
  import seg_pkg::*;
#(
  parameter int M  = 10,  // pixel rows
  parameter int CH = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,        // start of a frame: forget the held column
  input  logic   step_en,    // a step cycle
  input  logic   phase,      // 0: first clock of a step, 1: second
  input  logic   new_valid,  // pixel column a-1 exists
  input  logic   a_odd,      // block column a of this step is odd
  input  pix_t   pix_in [M][CH],
  input  logic   grey_mode,
  output chunk_t chunk [M+1]
);

  // Delay registers: column a-1 captured in phase 0, column a held from the
  // previous step.
  pix_t cur_pix  [M][CH];
  pix_t prev_pix [M][CH];
  logic cur_valid, prev_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_valid  <= 1'b0;
      prev_valid <= 1'b0;
    end else if (clr) begin
      cur_valid  <= 1'b0;
      prev_valid <= 1'b0;
    end else if (step_en) begin
      if (!phase) cur_valid <= new_valid;
      else        prev_valid <= cur_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (step_en) begin
      if (!phase) cur_pix  <= pix_in;
      else        prev_pix <= cur_pix;
    end
  end

  // Selector: left column is the live input in phase 0, the register in phase 1.
  pix_t left_pix [M][CH];
  logic left_valid;
  always_comb begin
    left_pix   = phase ? cur_pix : pix_in;
    left_valid = phase ? cur_valid : new_valid;
  end

  for (genvar b = 0; b <= M; b++) begin : g_row
    localparam logic B_ODD = 1'(b % 2);
    localparam int   RU = (b >= 1) ? b - 1 : 0;   // pixel row above the block
    localparam int   RL = (b <= M - 1) ? b : 0;   // pixel row below the block
    // Two weight calculation units per block row.
    pix_t  ua_a [CH], ua_b [CH], ub_a [CH], ub_b [CH];
    logic  ua_v, ub_v;
    code_t wa, wb;   // wa -> low code of the chunk, wb -> high code

    always_comb begin
      for (int c = 0; c < CH; c++) begin
        ua_a[c] = '0; ua_b[c] = '0; ub_a[c] = '0; ub_b[c] = '0;
      end
      ua_v = 1'b0;
      ub_v = 1'b0;
      if (!phase) begin
        // chunk {w3, w2}; the block is horizontal when (a+b) is odd
        if (!(a_odd ^ B_ODD)) begin
          // vertical: w2 = UL-LL (left column), w3 = UR-LR (right column)
          if (b >= 1 && b <= M-1) begin
            ua_a = left_pix[RU]; ua_b = left_pix[RL]; ua_v = left_valid;
            ub_a = prev_pix[RU]; ub_b = prev_pix[RL]; ub_v = prev_valid;
          end
        end else begin
          // horizontal: w2 = UL-UR (row b-1), w3 = LL-LR (row b)
          if (b >= 1) begin
            ua_a = left_pix[RU]; ua_b = prev_pix[RU]; ua_v = left_valid & prev_valid;
          end
          if (b <= M-1) begin
            ub_a = left_pix[RL]; ub_b = prev_pix[RL]; ub_v = left_valid & prev_valid;
          end
        end
      end else begin
        // chunk {w1, w0}: w0 = UL-LR, w1 = UR-LL
        if (b >= 1 && b <= M-1) begin
          ua_a = left_pix[RU]; ua_b = prev_pix[RL];   ua_v = left_valid & prev_valid;
          ub_a = prev_pix[RU]; ub_b = left_pix[RL];   ub_v = left_valid & prev_valid;
        end
      end
    end

    weight_calc_unit #(.CH(CH)) u_wa (
      .pix_a(ua_a), .pix_b(ua_b), .link_valid(ua_v), .grey_mode(grey_mode), .weight(wa));
    weight_calc_unit #(.CH(CH)) u_wb (
      .pix_a(ub_a), .pix_b(ub_b), .link_valid(ub_v), .grey_mode(grey_mode), .weight(wb));

    assign chunk[b] = {wb, wa};
  end

endmodule
