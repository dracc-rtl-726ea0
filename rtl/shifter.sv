// shifter -- logic-layer shifter for the post-conv step.
//
// The ternary network scales each filter's result by a factor alpha.  The DRAM
// subarrays have no multiplier, so alpha is applied as a sum of powers of
// two: each term is one pass through this shifter, and the shifted copies go
// back to DRAM where the next layer's pre-conv step adds them up.  Because
// scaling is linear it is applied after pooling, on fewer values.
//
// LANES independent WORD_W-bit two's-complement words are shifted by the same
// signed amount: shamt >= 0 shifts left (bits fall off the top), shamt < 0
// shifts right arithmetically (truncating towards minus infinity).
// Combinational.  The per-lane word layout, the signed shift amount and the
// truncation are this design's choices; the document gives the shifter's
// role and its count of about 5K shifters.
module shifter #(
  parameter int unsigned WORD_W  = 16,
  parameter int unsigned LANES   = 5120,  // "5K shifters"
  parameter int unsigned SHAMT_W = 5
) (
  input  logic [LANES*WORD_W-1:0]  din,
  input  logic signed [SHAMT_W-1:0] shamt,
  output logic [LANES*WORD_W-1:0]  dout
);

  logic [SHAMT_W-1:0] mag;
  assign mag = shamt[SHAMT_W-1] ? SHAMT_W'(-shamt) : SHAMT_W'(shamt);

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic signed [WORD_W-1:0] w;
    assign w = din[l*WORD_W +: WORD_W];
    assign dout[l*WORD_W +: WORD_W] = shamt[SHAMT_W-1] ? WORD_W'(w >>> mag)
                                                       : WORD_W'(w <<  mag);
  end

endmodule
