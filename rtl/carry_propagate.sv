// carry_propagate -- the bit-line carry chain of the in-DRAM carry
// look-ahead adder.
//
// In the subarray every column holds one bit of a word.  After G = A & B has
// been sensed, the sense amplifier of column i stays driven only where G is 1,
// and P = A ^ B (held in the NOT row) switches a pass transistor that links
// column i to the column of the next lower bit.  Charge therefore flows from
// every generating column up through an unbroken run of propagating columns.
// Logically each column ends at
//     cout[i] = G[i] | (P[i] & cout[i-1]),   with cout[-1] = C0 = 0,
// i.e. cout[i] is the carry into bit i+1 (the row that is later read through
// the shift row to align it as C[i]).  The chain is cut at every word
// boundary, so a row of COLS bits holds COLS/WORD_W independent words.
//
// Purely combinational.  The chain equation and the precharged C0 = 0 follow
// the document; cutting the chain at word boundaries is this design's choice
// for packing several words in one row.
module carry_propagate #(
  parameter int unsigned COLS   = 512,  // bit lines in a row
  parameter int unsigned WORD_W = 16    // bits per word (16-bit adds)
) (
  input  logic [COLS-1:0] g,     // generate, one bit per column
  input  logic [COLS-1:0] p,     // propagate, one bit per column
  output logic [COLS-1:0] cout   // carry out of each column
);

  initial assert (COLS % WORD_W == 0)
    else $error("COLS must be a multiple of WORD_W");

  always_comb begin
    logic c;
    c = 1'b0;
    for (int unsigned i = 0; i < COLS; i++) begin
      if (i % WORD_W == 0) c = 1'b0;   // C0 precharged to 0 in every word
      c       = g[i] | (p[i] & c);
      cout[i] = c;
    end
  end

endmodule
