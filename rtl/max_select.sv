// max_select -- the selection half of max pooling.
//
// DrAcc compares two rows of pooling candidates by subtracting them in DRAM;
// the sign of each word of the difference a - b then tells which candidate is
// larger.  This unit takes the two candidate rows and the difference row and
// returns, word by word, a where a - b >= 0 and b where a - b < 0.  Repeating
// it over the members of a pooling window yields their maximum.  LANES words
// side by side, combinational.  The subtraction follows the document; doing
// the selection as a row-wide multiplexer next to the logic layer is this
// design's choice.  The caller must keep a - b inside the word range.
module max_select #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned LANES  = 32
) (
  input  logic [LANES*WORD_W-1:0] a,
  input  logic [LANES*WORD_W-1:0] b,
  input  logic [LANES*WORD_W-1:0] diff,   // a - b, computed in DRAM
  output logic [LANES*WORD_W-1:0] dout
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign dout[l*WORD_W +: WORD_W] = diff[l*WORD_W + WORD_W-1] ? b[l*WORD_W +: WORD_W]
                                                                : a[l*WORD_W +: WORD_W];
  end

endmodule
