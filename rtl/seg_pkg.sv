// seg_pkg: types, widths and the two weight coding functions shared by the
// region-growing segmentation design.
//
// Connection weights W = Imax / (1 + |Ia - Ib|) travel through the design as
// 3-bit codes and are expanded to 8-bit values by a decoder wherever they are
// summed. The 3-bit code, the 8-bit decoded value and the 11-bit sum of eight
// decoded weights follow the widths printed in the design's block diagrams.
// The actual code table is this design's own choice (the source only says a
// look-up table is used): code k (1..7) stands for the weight 2^k and is
// chosen as floor(log2(W)); code 0 stands for weight 0 and is also used for
// every link to a pixel outside the image. With Imax = 255 the encoder
// therefore reduces to seven comparisons of |d| with (255 >> k) - 1.
package seg_pkg;

  localparam int PIX_W   = 8;   // bits per colour component / luminance
  localparam int CODE_W  = 3;   // encoded connection weight
  localparam int DEC_W   = 8;   // decoded connection weight
  localparam int SUM_W   = 11;  // sum of eight decoded weights
  localparam int CHUNK_W = 2 * CODE_W;  // width of a weight-register load chain
  localparam int LABEL_W = 4 * CODE_W;  // a label fills the four weight registers
  localparam int IMAX    = (1 << PIX_W) - 1;

  typedef logic [PIX_W-1:0]   pix_t;
  typedef logic [CODE_W-1:0]  code_t;
  typedef logic [DEC_W-1:0]   dec_t;
  typedef logic [SUM_W-1:0]   sum_t;
  typedef logic [CHUNK_W-1:0] chunk_t;
  typedef logic [LABEL_W-1:0] label_t;

  // Largest |d| for which floor(IMAX / (1 + |d|)) >= 2^k.
  function automatic int enc_limit(int k);
    return (IMAX >> k) - 1;
  endfunction

  // Encoder: 3-bit code of IMAX / (1 + d).
  function automatic code_t encode_diff(pix_t d);
    code_t c;
    c = '0;
    for (int k = 1; k < (1 << CODE_W); k++)
      if (int'(d) <= enc_limit(k)) c = code_t'(k);
    return c;
  endfunction

  // Decoder: 3-bit code to 8-bit weight value.
  function automatic dec_t decode_weight(code_t c);
    return (c == '0) ? dec_t'(0) : dec_t'(1) << c;
  endfunction

  // Phases of the sequencer (see seg_controller).
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,
    ST_PRE    = 3'd1,
    ST_LOAD   = 3'd2,
    ST_SEARCH = 3'd3,
    ST_GROW   = 3'd4,
    ST_COPY   = 3'd5,
    ST_READ   = 3'd6,
    ST_DONE   = 3'd7
  } state_t;

endpackage
