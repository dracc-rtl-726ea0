// pim_controller_tb -- runs a small program (ADD, SUB, COPY, SHIFT, RELU, MAX,
// HALT) from a behavioural instruction store and records every command the
// controller issues.  Each instruction's command list is compared, entry by
// entry, with the list written out here from the adder's AAP table (B8 <- A,
// B9 <- D, B2 <- E0, B10 <- E1, AP B11, B12 -> NOT, B13 -> NOT, B0 -> SHF,
// SHF -> B9, NOT -> B8, AP B14, B15 -> NOT, B17 -> NOT), which also checks
// the command counts: 15 for ADD, 18 for SUB, 1 for COPY, 3 for SHIFT and
// RELU, 22 for MAX, each after a 2-clock fetch.  Logic-layer captures, the
// write-back select and done/busy are checked too.
module pim_controller_tb;
  import dracc_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic busy, done, fb_re;
  logic [6:0] fb_raddr;
  pim_instr_t fb_rdata;
  dram_req_t req;
  wsel_e wsel;
  logic signed [SHAMT_W-1:0] shamt;
  logic [2:0] cap;
  int checks = 0, failures = 0;

  pim_instr_t prog [8];

  pim_controller #(.FB_DEPTH(128)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (fb_re) fb_rdata <= prog[fb_raddr[2:0]];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    dram_req_t                 r;
    logic [2:0]                cap;
    wsel_e                     ws;  // write-back select, on CMD_WR only
    logic signed [SHAMT_W-1:0] k;   // shift amount, on shifter write-backs only
  } ev_t;

  ev_t got [$];
  ev_t exp [$];
  int  cycles = 0;
  int  done_seen = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) cycles++;
    if (done) done_seen++;
    if (req.cmd != CMD_NOP || cap != 0)
      got.push_back('{r: req, cap: cap,
                      ws: (req.cmd == CMD_WR) ? wsel : WSEL_SHIFT,
                      k:  (req.cmd == CMD_WR && wsel == WSEL_SHIFT) ? shamt : '0});
  end

  function automatic row_addr_t R(logic [ROW_IDX_W-1:0] c); return rsv(c); endfunction
  function automatic void e(dram_cmd_e c, row_addr_t s, row_addr_t d, logic [2:0] cp = 3'b000,
                            wsel_e ws = WSEL_SHIFT, int k = 0);
    exp.push_back('{r: '{cmd: c, src: s, dst: d}, cap: cp, ws: ws, k: SHAMT_W'(k)});
  endfunction
  function automatic void e_add_core(row_addr_t a, row_addr_t b);
    e(CMD_AAP, a,      R(B8));
    e(CMD_AAP, b,      R(B9));
    e(CMD_AAP, R(E0),  R(B2));
    e(CMD_AAP, R(E1),  R(B10));
    e(CMD_AP,  R(B11), R(B11));
    e(CMD_AAP, R(B12), R(B7));
    e(CMD_AAP, R(B13), R(B7));
    e(CMD_AAP, R(B0),  R(B16));
    e(CMD_AAP, R(B16), R(B9));
    e(CMD_AAP, R(B7),  R(B8));
    e(CMD_AP,  R(B14), R(B14));
    e(CMD_AAP, R(B15), R(B7));
    e(CMD_AAP, R(B17), R(B7));
  endfunction

  function automatic pim_instr_t mk(pim_op_e op, int d, int a, int b, int k = 0);
    return '{op: op, dst: drow(9'(d)), a: drow(9'(a)), b: drow(9'(b)), shamt: SHAMT_W'(k), rsvd: '0};
  endfunction

  task automatic run_one(pim_instr_t ins, int n_expected);
    int c0;
    prog[0] = ins;
    prog[1] = '0;   // HALT
    got.delete();
    c0 = cycles;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done_seen > 0);
    @(negedge clk);
    done_seen = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    // fetch+decode of the instruction, its commands, fetch+decode of HALT
    checks++;
    if (cycles - c0 != n_expected + 4) begin
      failures++;
      $display("FAIL %s took %0d busy cycles, expected %0d", ins.op.name(), cycles - c0, n_expected + 4);
    end
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL %s issued %0d events, expected %0d", ins.op.name(), got.size(), exp.size());
    end
    for (int i = 0; i < exp.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s event %0d: got %s %h->%h cap %b, expected %s %h->%h cap %b", ins.op.name(), i,
                 got[i].r.cmd.name(), got[i].r.src, got[i].r.dst, got[i].cap,
                 exp[i].r.cmd.name(), exp[i].r.src, exp[i].r.dst, exp[i].cap);
      end
    end
    exp.delete();
  endtask

  initial begin
    pim_instr_t ins;
    fb_rdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    checks++;
    if (busy || done) begin failures++; $display("FAIL busy/done out of reset"); end

    // ADD d=20, a=3, b=4
    ins = mk(OP_ADD, 20, 3, 4);
    e(CMD_AAP, R(E1), R(BR9));
    e_add_core(drow(3), drow(4));
    e(CMD_AAP, R(B7), drow(20));
    run_one(ins, 15);

    // SUB d=21, a=5, b=6
    ins = mk(OP_SUB, 21, 5, 6);
    e(CMD_AAP, R(E1), R(BR9));
    e(CMD_AAP, drow(5), R(B7));
    e_add_core(R(B7), drow(6));
    e(CMD_AAP, R(B7), R(B0));
    e(CMD_AAP, R(B0), R(B7));
    e(CMD_AAP, R(B7), drow(21));
    run_one(ins, 18);

    // COPY d=7, a=8
    ins = mk(OP_COPY, 7, 8, 0);
    e(CMD_AAP, drow(8), drow(7));
    run_one(ins, 1);

    // SHIFT d=9, a=10, k=-2
    ins = mk(OP_SHIFT, 9, 10, 0, -2);
    e(CMD_RD, drow(10), drow(10));
    e(CMD_NOP, '0, '0, 3'b001);
    e(CMD_WR, drow(9), drow(9), 3'b000, WSEL_SHIFT, -2);
    run_one(ins, 3);

    // RELU d=11, a=12
    ins = mk(OP_RELU, 11, 12, 0);
    e(CMD_RD, drow(12), drow(12));
    e(CMD_NOP, '0, '0, 3'b001);
    e(CMD_WR, drow(11), drow(11), 3'b000, WSEL_RELU);
    run_one(ins, 3);

    // MAX d=13, a=14, b=15
    ins = mk(OP_MAX, 13, 14, 15);
    e(CMD_AAP, R(E1), R(BR9));
    e(CMD_AAP, drow(14), R(B7));
    e_add_core(R(B7), drow(15));
    e(CMD_AAP, R(B7), R(B0));
    e(CMD_AAP, R(B0), R(B7));
    e(CMD_RD, R(B7), R(B7));
    e(CMD_RD, drow(14), drow(14), 3'b100);
    e(CMD_RD, drow(15), drow(15), 3'b001);
    e(CMD_NOP, '0, '0, 3'b010);
    e(CMD_WR, drow(13), drow(13), 3'b000, WSEL_MAX);
    run_one(ins, 22);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
