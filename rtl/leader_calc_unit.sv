// leader_calc_unit: decides whether one cell is a leader (seed) cell.
//
// A cell is a leader cell when the sum of the connection weights to its eight
// neighbours is larger than the threshold phi_p. The eight 3-bit weights
// arrive in two groups of four on consecutive clocks (phase 0, then phase 1).
// Four decoders and a two-level adder tree add a group; in phase 0 the partial
// sum is stored in a register, in phase 1 a second adder adds it to the live
// partial sum and a comparator produces p. p is combinational and valid in
// phase 1 only.
//
// The structure follows the source's block diagram of the leader cell
// calculation unit; the strict "greater than" follows its wording ("bigger
// than the pre-defined threshold").
module leader_calc_unit
  import seg_pkg::*;
(
  input  logic  clk,
  input  logic  en,        // a step cycle
  input  logic  phase,     // 0: first group of four, 1: second group
  input  code_t w [4],
  input  sum_t  phi_p,
  output logic  p
);

  dec_t d [4];
  logic [DEC_W:0]   s01, s23;
  logic [DEC_W+1:0] s4;
  logic [DEC_W+1:0] part_q;
  sum_t             total;

  always_comb begin
    for (int k = 0; k < 4; k++) d[k] = decode_weight(w[k]);
    s01   = {1'b0, d[0]} + {1'b0, d[1]};
    s23   = {1'b0, d[2]} + {1'b0, d[3]};
    s4    = {1'b0, s01} + {1'b0, s23};
    total = sum_t'(s4) + sum_t'(part_q);
    p     = total > phi_p;
  end

  always_ff @(posedge clk)
    if (en && !phase) part_q <= s4;

endmodule
