// seg_cell: one pixel cell of the segmentation network (weight-parallel form).
//
// State: x (excited), p (leader cell), n (token flag: this cell is the seed of
// the segment now growing), l (labelled, i.e. inhibited for good).
//
// Leader search: the cells form one token chain (pre -> next). A cell passes
// the token on combinationally unless it is an unlabelled leader cell or is the
// seed of the growing segment: next = pre & ~n & (~p | l). The first cell on
// the chain with pre = 1, p = 1, l = 0 is the new seed; with seed_en it sets
// n = 1 and x = 1 (self-excitation) on the next clock.
//
// Growth: eight decoders and a three-stage adder tree form S, the 11-bit sum of
// the link weights to excited neighbours (the wr_block output selection has
// already zeroed the links to cells that are not excited). A subtractor
// compares S with phi_z; an unexcited, unlabelled cell with S > phi_z is
// excitable and is excited on the next clock when grow_en is set.
//
// Inhibition: with labelw every excited cell clears x and n and sets l; its
// upper-left wr_block stores the label in the same clock.
//
// Leader data: p is loaded through a per-row shift chain (p_in -> p_out).
// The registers, decoders, adder tree, subtractor and the pre/next token
// scheme follow the source; the control inputs (clr, seed_en, grow_en,
// p_shift) and the "greater than" test are this design's choices.
module seg_cell
  import seg_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clr,        // start of a frame: clear x, n, l
  input  logic  p_shift,
  input  logic  p_in,
  output logic  p_out,
  input  logic  pre,
  output logic  next,
  input  logic  seed_en,
  input  logic  grow_en,
  input  logic  labelw,
  input  code_t w [8],
  input  sum_t  phi_z,
  output logic  x,
  output logic  excitable,
  output logic  l
);

  logic p, n;

  // Decoders and three-stage adder tree.
  dec_t             d  [8];
  logic [DEC_W:0]   s1 [4];
  logic [DEC_W+1:0] s2 [2];
  sum_t             s;
  logic [SUM_W:0]   diff;

  always_comb begin
    for (int k = 0; k < 8; k++) d[k] = decode_weight(w[k]);
    for (int k = 0; k < 4; k++) s1[k] = {1'b0, d[2*k]} + {1'b0, d[2*k+1]};
    for (int k = 0; k < 2; k++) s2[k] = {1'b0, s1[2*k]} + {1'b0, s1[2*k+1]};
    s = {1'b0, s2[0]} + {1'b0, s2[1]};
    // Subtractor: sign bit of phi_z - S is set when S > phi_z.
    diff = {1'b0, phi_z} - {1'b0, s};
    excitable = !x && !l && diff[SUM_W];
  end

  assign next  = pre && !n && (!p || l);
  assign p_out = p;

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
