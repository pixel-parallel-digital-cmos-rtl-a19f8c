// seg_cell_serial: one pixel cell of the segmentation network (weight-serial
// form).
//
// Same state, token chain and control as seg_cell: x (excited), p (leader
// cell), n (seed of the segment now growing), l (labelled); next = pre & ~n &
// (~p | l); with seed_en the cell holding the token self-excites; with
// grow_en an excitable cell is excited; with labelw every excited cell is
// inhibited and labelled.
//
// Only the way the sum of link weights is formed differs. Instead of eight
// decoders and an adder tree, a switch picks one input per clock, one decoder
// turns the 3-bit code into an 8-bit weight, and one adder/subtractor with a
// register accumulates. acc_step is broadcast to all cells and counts 0..8:
//   acc_step = 0   the register is loaded with phi_z,
//   acc_step = k   the decoded link weight w[k-1] is subtracted (k = 1..8).
// After the step-8 clock the register holds phi_z - S, and its sign bit is set
// exactly when S > phi_z. The cell is then excitable (if it is neither excited
// nor labelled), and excitable is valid for the following acc_step = 0 clock,
// when the controller applies grow_en or labelw. A growth step therefore takes
// nine clocks instead of one. excitable is meaningless at other steps.
//
// The switch, the single decoder, the adder/subtractor with its register and
// the nine clocks per sum follow the original weight-serial cell. Passing
// phi_z through the switch unencoded (11 bits, bypassing the decoder), loading
// it first and subtracting the weights, and the acc_step schedule are this
// design's own reading of it.
module seg_cell_serial
  import seg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clr,        // start of a frame: clear x, n, l
  input  logic       p_shift,
  input  logic       p_in,
  output logic       p_out,
  input  logic       pre,
  output logic       next,
  input  logic       seed_en,
  input  logic       grow_en,
  input  logic       labelw,
  input  logic [3:0] acc_step,   // 0: load phi_z, 1..8: subtract w[acc_step-1]
  input  code_t      w [8],
  input  sum_t       phi_z,
  output logic       x,
  output logic       excitable,
  output logic       l
);

  logic p, n;

  // Switch, decoder and adder/subtractor with its register (signed, one bit
  // wider than the sum so that phi_z - S never overflows).
  code_t          sel;
  logic [SUM_W:0] acc;

  always_comb begin
    sel = '0;
    for (int k = 0; k < 8; k++)
      if (acc_step == 4'(k + 1)) sel = w[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              acc <= '0;
    else if (acc_step == '0) acc <= {1'b0, phi_z};
    else                     acc <= acc - {{(SUM_W + 1 - DEC_W){1'b0}}, decode_weight(sel)};
  end

  assign excitable = !x && !l && acc[SUM_W];
  assign next      = pre && !n && (!p || l);
  assign p_out     = p;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= 1'b0;
      n <= 1'b0;
      l <= 1'b0;
    end else if (clr) begin
      x <= 1'b0;
      n <= 1'b0;
      l <= 1'b0;
    end else if (labelw) begin
      if (x) begin
        x <= 1'b0;
        n <= 1'b0;
        l <= 1'b1;
      end
    end else if (seed_en && pre && p && !l && !n) begin
      x <= 1'b1;
      n <= 1'b1;
    end else if (grow_en && excitable) begin
      x <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       p <= 1'b0;
    else if (p_shift) p <= p_in;
  end

endmodule
