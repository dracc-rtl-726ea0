// flag_buffer -- instruction store of the DrAcc logic layer.
//
// Holds the PIM instructions (ternary-weight add/subtract, copy, activation,
// pooling and scaling steps) together with their operand row addresses.  The
// host writes it before a layer runs; the controller reads one entry per
// fetch.  The document sizes the logic-layer weight buffer at 5 Kb; with
// 40-bit instructions that is DEPTH = 128 entries.
//
// A simple one-write, one-read synchronous RAM: a write with we=1 lands at
// the clock edge; rdata shows the entry at raddr one clock after raddr is
// presented (re=1).  The instruction format and the single-port timing are
// this design's choices; the document gives only the buffer's purpose and
// capacity.
module flag_buffer
  import dracc_pkg::*;
#(
  parameter int unsigned DEPTH = 128,   // 5 Kb / 40-bit instructions
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  pim_instr_t    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output pim_instr_t    rdata
);

  pim_instr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
