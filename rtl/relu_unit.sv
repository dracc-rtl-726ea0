// relu_unit -- the activation step, rectified linear unit.
//
// Each WORD_W-bit two's-complement word of a row is passed on unchanged when
// its sign bit is 0 and replaced by 0 when its sign bit is 1, which is how the
// document describes DrAcc's ReLU.  LANES words are handled side by side.
// Combinational.  Applying it to whole rows on their way between the
// subarray and the logic layer is this design's choice.
module relu_unit #(
  parameter int unsigned WORD_W = 16,
  parameter int unsigned LANES  = 32    // one 512-bit row of 16-bit words
) (
  input  logic [LANES*WORD_W-1:0] din,
  output logic [LANES*WORD_W-1:0] dout
);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign dout[l*WORD_W +: WORD_W] = din[l*WORD_W + WORD_W-1] ? '0 : din[l*WORD_W +: WORD_W];
  end

endmodule
