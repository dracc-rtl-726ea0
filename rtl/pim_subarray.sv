// pim_subarray -- bit-level functional model of one DrAcc DRAM subarray with
// its reserved compute rows.
//
// The array holds DATA_ROWS x COLS ordinary cells plus the reserved rows used
// for in-memory computing: R0..R9, the NOT row (a dual-contact row: what is
// written through it is the complement of the sense amplifier), the SHF row
// (wired one column over, so that reading it delivers its content shifted by
// one bit towards the MSB of each word), and the fixed rows E0 (zeros) and E1
// (ones).  A reserved address B0..B17 opens the row set of the adder's
// address table; opening three rows together resolves, by charge sharing, to
// the bitwise majority of the three, i.e. AND when the third row is 0 and OR
// when it is 1.
//
// Commands (one per clock, always accepted):
//   AAP src,dst : the value sensed on src (a single row, a row pair, or the
//                 majority of a triple, which is also restored into all three)
//                 is written into every row of dst.  dst = NOT stores its
//                 complement.  dst = SHF performs the carry propagation: the
//                 sensed value is taken as G, the NOT row supplies P, and the
//                 per-column carries are restored into the SHF row.
//   AP  src     : activate and precharge; a triple resolves to its majority.
//   RD  src     : the sensed row appears on rdata on the next clock.
//   WR  dst     : wdata is written into dst (complemented for NOT).
//
// The row sets, the majority behaviour, the NOT and SHF rows and the carry
// propagation follow the document.  Reading a row pair returns its first row,
// reading E0/E1 returns the constants, and one command per clock are this
// model's choices; DRAM timing (tRAS, tRP) is not modelled.  The data rows
// have no reset, like a DRAM.
module pim_subarray
  import dracc_pkg::*;
#(
  parameter int unsigned DATA_ROWS = 512,  // Table 1: subarray 512 x 512
  parameter int unsigned COLS      = 512,
  parameter int unsigned WORD_W    = 16
) (
  input  logic            clk,
  input  dram_req_t       req,
  input  logic [COLS-1:0] wdata,
  output logic [COLS-1:0] rdata
);

  typedef logic [COLS-1:0] row_t;

  row_t data_q [DATA_ROWS];
  row_t r_q [10];           // reserved rows R0..R9
  row_t not_q;              // NOT row (stores what it holds, reads as stored)
  row_t shf_q;              // SHF row (holds carry-out per column)

  // ---------------------------------------------------------------------
  // Sensed value of the first activation, and whether it is a triple that
  // must be restored with the majority.
  // ---------------------------------------------------------------------
  function automatic row_t maj3(row_t a, row_t b, row_t c);
    return (a & b) | (a & c) | (b & c);
  endfunction

  function automatic row_t shf_read(row_t s);
    row_t o;
    for (int unsigned i = 0; i < COLS; i++)
      o[i] = (i % WORD_W == 0) ? 1'b0 : s[i-1];
    return o;
  endfunction

  row_t sensed;
  logic triple;
  logic [3:0] t0, t1;   // reserved row numbers of a triple (10 = NOT row)
  logic [3:0] t2;

  function automatic row_t rsel(logic [3:0] n);
    return (n == 4'd10) ? not_q : r_q[n];
  endfunction

  always_comb begin
    triple = 1'b0;
    t0 = '0; t1 = '0; t2 = '0;
    sensed = '0;
    if (!req.src.special) begin
      sensed = (32'(req.src.idx) < DATA_ROWS) ? data_q[req.src.idx] : '0;
    end else begin
      unique case (req.src.idx)
        B0:  sensed = r_q[0];
        B1:  sensed = r_q[1];
        B2:  sensed = r_q[2];
        B3:  sensed = r_q[3];
        B4:  sensed = r_q[4];
        B5:  sensed = r_q[5];
        B6:  sensed = r_q[6];
        B7:  sensed = not_q;
        B8:  sensed = r_q[0];
        B9:  sensed = r_q[1];
        B10: begin triple = 1'b1; t0 = 4'd5; t1 = 4'd6; t2 = 4'd8;  end
        B11: begin triple = 1'b1; t0 = 4'd0; t1 = 4'd1; t2 = 4'd2;  end
        B12: begin triple = 1'b1; t0 = 4'd3; t1 = 4'd4; t2 = 4'd5;  end
        B13: begin triple = 1'b1; t0 = 4'd1; t1 = 4'd6; t2 = 4'd10; end
        B14: begin triple = 1'b1; t0 = 4'd0; t1 = 4'd1; t2 = 4'd7;  end
        B15: begin triple = 1'b1; t0 = 4'd3; t1 = 4'd4; t2 = 4'd8;  end
        B16: sensed = shf_read(shf_q);
        B17: begin triple = 1'b1; t0 = 4'd1; t1 = 4'd9; t2 = 4'd10; end
        E0:  sensed = '0;
        E1:  sensed = '1;
        BR9: sensed = r_q[9];
        default: sensed = '0;
      endcase
      if (triple) sensed = maj3(rsel(t0), rsel(t1), rsel(t2));
    end
  end

  // Carry chain used when the destination of an AAP is the SHF row.
  row_t carry;
  carry_propagate #(.COLS(COLS), .WORD_W(WORD_W)) u_carry (
    .g    (sensed),
    .p    (not_q),
    .cout (carry)
  );

  logic activate_src;   // the command opens src (AAP, AP, RD)
  logic write_dst;      // the command writes dst (AAP, WR)
  row_t dval;           // value written into dst
  assign activate_src = (req.cmd == CMD_AAP) || (req.cmd == CMD_AP) || (req.cmd == CMD_RD);
  assign write_dst    = (req.cmd == CMD_AAP) || (req.cmd == CMD_WR);
  assign dval         = (req.cmd == CMD_WR) ? wdata : sensed;

  always_ff @(posedge clk) begin
    // Restore of a triple-row activation: all three rows take the majority.
    if (activate_src && req.src.special && triple) begin
      for (int unsigned n = 0; n < 11; n++)
        if (4'(n) == t0 || 4'(n) == t1 || 4'(n) == t2) begin
          if (n == 10) not_q <= sensed;
          else         r_q[n] <= sensed;
        end
    end
    // Second activation: write into the destination row set.
    if (write_dst) begin
      if (!req.dst.special) begin
        if (32'(req.dst.idx) < DATA_ROWS) data_q[req.dst.idx] <= dval;
      end else begin
        unique case (req.dst.idx)
          B0:  r_q[0] <= dval;
          B1:  r_q[1] <= dval;
          B2:  begin r_q[2] <= dval; r_q[7] <= dval; end
          B3:  r_q[3] <= dval;
          B4:  r_q[4] <= dval;
          B5:  r_q[5] <= dval;
          B6:  r_q[6] <= dval;
          B7:  not_q <= ~dval;
          B8:  begin r_q[0] <= dval; r_q[3] <= dval; end
          B9:  begin r_q[1] <= dval; r_q[4] <= dval; end
          B10: begin r_q[5] <= dval; r_q[6] <= dval; r_q[8] <= dval; end
          B11: begin r_q[0] <= dval; r_q[1] <= dval; r_q[2] <= dval; end
          B12: begin r_q[3] <= dval; r_q[4] <= dval; r_q[5] <= dval; end
          B13: begin r_q[1] <= dval; r_q[6] <= dval; not_q <= dval; end
          B14: begin r_q[0] <= dval; r_q[1] <= dval; r_q[7] <= dval; end
          B15: begin r_q[3] <= dval; r_q[4] <= dval; r_q[8] <= dval; end
          B16: shf_q <= (req.cmd == CMD_WR) ? dval : carry;
          B17: begin r_q[1] <= dval; r_q[9] <= dval; not_q <= dval; end
          BR9: r_q[9] <= dval;
          default: ;  // E0/E1 are fixed
        endcase
      end
    end
    if (req.cmd == CMD_RD) rdata <= sensed;
  end

endmodule
