// weight_calc_unit: connection weight between two neighbouring pixels.
//
// For each colour channel an absolute-difference circuit forms |Ia - Ib| and an
// encoder turns it into the 3-bit code of Imax / (1 + |Ia - Ib|) (see seg_pkg
// for the code table). For a colour image the smallest of the channel codes is
// the connection weight, W = min(W_R, W_G, W_B); because the encoder is
// monotonic this equals the code of the smallest channel weight. With
// grey_mode = 1 only channel 0 (luminance) is used, which is the grey-scale
// unit. CH = 1 builds the grey-scale unit only.
//
// link_valid = 0 marks a link to a pixel outside the image; its weight is
// code 0 (no connection). Purely combinational; the column pipeline around it
// runs it twice per input column.
//
// The structure (difference, encoder, minimum) follows the source's block
// diagrams; the code table and the grey_mode input are this design's choice.
module weight_calc_unit
  import seg_pkg::*;
#(
  parameter int CH = 3
) (
  input  pix_t  pix_a [CH],
  input  pix_t  pix_b [CH],
  input  logic  link_valid,
  input  logic  grey_mode,
  output code_t weight
);

  code_t ch_code [CH];

  for (genvar c = 0; c < CH; c++) begin : g_ch
    pix_t diff;
    always_comb begin
      diff = (pix_a[c] >= pix_b[c]) ? pix_a[c] - pix_b[c] : pix_b[c] - pix_a[c];
      ch_code[c] = encode_diff(diff);
    end
  end

  // Minimum value determination.
  always_comb begin
    code_t m;
    m = ch_code[0];
    if (!grey_mode)
      for (int c = 1; c < CH; c++)
        if (ch_code[c] < m) m = ch_code[c];
    weight = link_valid ? m : '0;
  end

endmodule
