// label_generator: external label generation circuit.
//
// Holds the segment number that is broadcast to the cell network. It starts
// at 1 for every frame (label 0 therefore means "not labelled") and advances
// by one after each inhibition, i.e. after each finished segment. It stops at
// the largest label instead of wrapping. seg_count reports how many segments
// have been labelled. The source only says this circuit generates one label
// per segment; counting from 1 follows its worked example, the saturation is
// this design's choice.
module label_generator
  import seg_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clr,       // start of a frame
  input  logic   labelw,    // a segment is being labelled this clock
  output label_t label,
  output label_t seg_count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      label <= label_t'(1);
    else if (clr)    label <= label_t'(1);
    else if (labelw && label != '1) label <= label + label_t'(1);
  end

  assign seg_count = label - label_t'(1);

endmodule
