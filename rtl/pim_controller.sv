// pim_controller -- the enhanced memory controller that runs DrAcc programs.
//
// After start it fetches PIM instructions from the flag buffer, one after
// another from entry 0, until it meets HALT, and expands each into a fixed
// sequence of subarray commands, one per clock:
//
//   ADD  dst,a,b  15 commands: restore R9 to ones (AAP E1,R9), the 13-command
//                 carry look-ahead add of the document (copy a, b, E0, E1 into
//                 the reserved rows; G = a&b by majority; M0 = ~(a|b); P = a^b;
//                 propagate the carries into SHF; read SHF back shifted;
//                 M1 = P&C; M2 = ~(P|C); S = P^C into the NOT row), then
//                 AAP NOT,dst to copy S out.
//   SUB  dst,a,b  18 commands: a - b = ~(~a + b); NOT row <- ~a, the 13-command
//                 add with the NOT row as first operand, then complement the
//                 sum through R0 and the NOT row and copy it out.
//   COPY dst,a    1 command (AAP a,dst: in-DRAM row copy).
//   SHIFT dst,a,k 3 commands: read a to the logic layer, capture it, write
//                 the shifter's output to dst.
//   RELU dst,a    3 commands, as SHIFT but through the ReLU unit.
//   MAX  dst,a,b  22 commands: the subtraction a - b, left in the NOT row;
//                 read the NOT row, a and b into the logic layer; write the
//                 word-wise selection back to dst.
//
// Every instruction costs two more clocks for fetch and decode.  A ternary
// weight of +1 becomes ADD, -1 becomes SUB and 0 no instruction at all.
// The 13-command add sequence and its row sets are the document's; the R9
// restore, the copy-out, the form of SUB and MAX, the instruction set and the
// fetch timing are this design's choices.
//
// Interface: start (pulse, while idle) begins the program at entry 0; busy is
// high while it runs; done pulses for one clock after HALT is decoded.
// req/wsel/shamt/cap go to the subarray and the logic layer; cap[n] tells
// the logic layer to latch the subarray's read data into its register Ln.
module pim_controller
  import dracc_pkg::*;
#(
  parameter int unsigned FB_DEPTH = 128,
  parameter int unsigned FB_AW    = $clog2(FB_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  output logic                      busy,
  output logic                      done,
  // flag buffer read port
  output logic                      fb_re,
  output logic [FB_AW-1:0]          fb_raddr,
  input  pim_instr_t                fb_rdata,
  // subarray and logic layer
  output dram_req_t                 req,
  output wsel_e                     wsel,
  output logic signed [SHAMT_W-1:0] shamt,
  output logic [2:0]                cap
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_DECODE, S_EXEC} state_e;

  typedef struct packed {
    dram_req_t  req;
    wsel_e      wsel;
    logic [2:0] cap;
    logic       last;
  } uop_t;

  state_e           state_q;
  logic [FB_AW-1:0] pc_q;
  pim_instr_t       ins_q;
  logic [4:0]       step_q;
  uop_t             u;

  function automatic dram_req_t aap(row_addr_t s, row_addr_t d);
    return '{cmd: CMD_AAP, src: s, dst: d};
  endfunction
  function automatic dram_req_t ap(row_addr_t s);
    return '{cmd: CMD_AP, src: s, dst: s};
  endfunction
  function automatic dram_req_t rd(row_addr_t s);
    return '{cmd: CMD_RD, src: s, dst: s};
  endfunction
  function automatic dram_req_t wr(row_addr_t d);
    return '{cmd: CMD_WR, src: d, dst: d};
  endfunction
  function automatic dram_req_t nop();
    return '{cmd: CMD_NOP, src: '0, dst: '0};
  endfunction

  // The 13 AAP/AP commands of one in-DRAM accumulation, S = a + b, with the
  // sum left in the NOT row.
  function automatic dram_req_t cla_step(logic [4:0] k, row_addr_t a, row_addr_t b);
    unique case (k)
      5'd0:    return aap(a,        rsv(B8));   // copy a
      5'd1:    return aap(b,        rsv(B9));   // copy b
      5'd2:    return aap(rsv(E0),  rsv(B2));   // copy E0
      5'd3:    return aap(rsv(E1),  rsv(B10));  // copy E1
      5'd4:    return ap (rsv(B11));            // G = a & b
      5'd5:    return aap(rsv(B12), rsv(B7));   // M0 = ~(a | b)
      5'd6:    return aap(rsv(B13), rsv(B7));   // P = a ^ b
      5'd7:    return aap(rsv(B0),  rsv(B16));  // propagate C
      5'd8:    return aap(rsv(B16), rsv(B9));   // shift C
      5'd9:    return aap(rsv(B7),  rsv(B8));   // copy P
      5'd10:   return ap (rsv(B14));            // M1 = P & C
      5'd11:   return aap(rsv(B15), rsv(B7));   // M2 = ~(P | C)
      default: return aap(rsv(B17), rsv(B7));   // S = P ^ C
    endcase
  endfunction

  function automatic uop_t decode_step(pim_op_e op, row_addr_t dst, row_addr_t a,
                                       row_addr_t b, logic [4:0] s);
    uop_t o;
    o = '{req: nop(), wsel: WSEL_SHIFT, cap: 3'b000, last: 1'b0};
    unique case (op)
      OP_ADD: begin
        if (s == 5'd0)       o.req = aap(rsv(E1), rsv(BR9));
        else if (s <= 5'd13) o.req = cla_step(s - 5'd1, a, b);
        else begin           o.req = aap(rsv(B7), dst); o.last = 1'b1; end
      end
      OP_SUB, OP_MAX: begin
        if (s == 5'd0)       o.req = aap(rsv(E1), rsv(BR9));
        else if (s == 5'd1)  o.req = aap(a, rsv(B7));               // NOT <- ~a
        else if (s <= 5'd14) o.req = cla_step(s - 5'd2, rsv(B7), b); // NOT <- ~a + b
        else if (s == 5'd15) o.req = aap(rsv(B7), rsv(B0));
        else if (s == 5'd16) o.req = aap(rsv(B0), rsv(B7));             // NOT <- a - b
        else if (op == OP_SUB) begin
          o.req = aap(rsv(B7), dst); o.last = 1'b1;
        end else begin
          unique case (s)
            5'd17:   o.req = rd(rsv(B7));
            5'd18:   begin o.req = rd(a); o.cap = 3'b100; end
            5'd19:   begin o.req = rd(b); o.cap = 3'b001; end
            5'd20:   o.cap = 3'b010;
            default: begin o.req = wr(dst); o.wsel = WSEL_MAX; o.last = 1'b1; end
          endcase
        end
      end
      OP_COPY: begin
        o.req = aap(a, dst); o.last = 1'b1;
      end
      OP_SHIFT, OP_RELU: begin
        o.wsel = (op == OP_SHIFT) ? WSEL_SHIFT : WSEL_RELU;
        unique case (s)
          5'd0:    o.req = rd(a);
          5'd1:    o.cap = 3'b001;
          default: begin o.req = wr(dst); o.last = 1'b1; end
        endcase
      end
      default: o.last = 1'b1;   // HALT never reaches S_EXEC
    endcase
    return o;
  endfunction

  assign u = decode_step(ins_q.op, ins_q.dst, ins_q.a, ins_q.b, step_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      pc_q    <= '0;
      ins_q   <= '0;
      step_q  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          pc_q    <= '0;
          state_q <= S_FETCH;
        end
        S_FETCH: state_q <= S_DECODE;
        S_DECODE: begin
          ins_q  <= fb_rdata;
          step_q <= '0;
          pc_q   <= pc_q + 1'b1;
          if (fb_rdata.op == OP_HALT) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else begin
            state_q <= S_EXEC;
          end
        end
        S_EXEC: begin
          step_q <= step_q + 1'b1;
          if (u.last) state_q <= S_FETCH;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state_q != S_IDLE);
  assign fb_re    = (state_q == S_FETCH);
  assign fb_raddr = pc_q;
  assign req      = (state_q == S_EXEC) ? u.req  : nop();
  assign cap      = (state_q == S_EXEC) ? u.cap  : 3'b000;
  assign wsel     = u.wsel;
  assign shamt    = ins_q.shamt;

endmodule
