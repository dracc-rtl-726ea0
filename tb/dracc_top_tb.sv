// dracc_top_tb -- end-to-end run of one ternary-weight CNN layer on the full
// 512 x 512 subarray (all top parameters at their defaults).
//
// Each row holds 32 16-bit lanes; lane n of every row belongs to pooling
// window n, so one program computes 32 windows at once.  For window position
// p (0..3 of a 2x2 pool) and kernel tap j (0..8 of a 3x3 kernel) input row
// X[p][j] holds the input value that meets weight w[j].  The program does
//   pre-conv  acc[p] = sum_j w[j] * X[p][j]   (COPY / ADD / SUB, zero weights
//                                              skipped, first term taken
//                                              from a row of zeros)
//   act       r[p]   = ReLU(acc[p])
//   pool      m      = max(max(r0, r1), max(r2, r3))
//   post-conv t[i]   = m shifted by the terms of alpha (one left, one right)
//   next pre-conv    out = t[0] + t[1]
// and the testbench compares every intermediate and final row with its own
// integer model.  It also checks the busy time against the command counts
// (15 per ADD, 18 per SUB, 1 per COPY, 3 per SHIFT/RELU, 22 per MAX, plus 2
// per fetched instruction) and counts, from the design's own signals, that
// each mechanism occurred: ADD, SUB, COPY, skipped zero weight, a ReLU that
// zeroes and one that passes, a max that picks each side, left and right
// shifts, a carry chain longer than 8 bits, and a host request ignored while
// busy.  A mechanism that never occurred is a failure.
module dracc_top_tb;
  import dracc_pkg::*;
  localparam int unsigned COLS = 512, WORD_W = 16, LANES = COLS / WORD_W;
  localparam int TRIALS = 4;
  typedef logic [COLS-1:0] row_t;
  typedef int lanes_t [LANES];

  logic clk = 0, rst_n = 0;
  logic fb_we = 0, start = 0, busy, done;
  logic [6:0] fb_waddr = '0;
  pim_instr_t fb_wdata = '0;
  dram_req_t host_req = '{cmd: CMD_NOP, src: '0, dst: '0};
  row_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  dracc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------
  // mechanism counters, taken from the design's signals
  // ------------------------------------------------------------------
  typedef enum int {M_ADD, M_SUB, M_COPY, M_SKIP, M_RELU_ZERO, M_RELU_PASS, M_MAX_A, M_MAX_B,
                    M_SHL, M_SHR, M_LONG_CARRY, M_HOST_IGNORED, M_N} mech_e;
  int mech [M_N];
  int busy_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (busy) busy_cycles++;
    if (dut.u_ctrl.state_q == 2'd2) begin  // decode
      case (dut.fb_rdata.op)
        OP_ADD:  mech[M_ADD]++;
        OP_SUB:  mech[M_SUB]++;
        OP_COPY: mech[M_COPY]++;
        default: ;
      endcase
    end
    if (dut.sub_req.cmd == CMD_WR && busy) begin
      for (int l = 0; l < LANES; l++) begin
        if (dut.wsel == WSEL_RELU) begin
          if (dut.l_q[0][l*WORD_W + WORD_W-1]) mech[M_RELU_ZERO]++;
          else if (dut.l_q[0][l*WORD_W +: WORD_W] != 0) mech[M_RELU_PASS]++;
        end
        if (dut.wsel == WSEL_MAX && dut.l_q[0][l*WORD_W +: WORD_W] != dut.l_q[1][l*WORD_W +: WORD_W]) begin
          if (dut.l_q[2][l*WORD_W + WORD_W-1]) mech[M_MAX_B]++;
          else                                  mech[M_MAX_A]++;
        end
      end
      if (dut.wsel == WSEL_SHIFT) begin
        if (dut.shamt > 0) mech[M_SHL]++;
        if (dut.shamt < 0) mech[M_SHR]++;
      end
    end
    // a carry run of more than 8 columns in the SHF row write
    if (dut.sub_req.cmd == CMD_AAP && dut.sub_req.dst == rsv(B16)) begin
      for (int l = 0; l < LANES; l++)
        if (dut.u_sub.carry[l*WORD_W +: 9] == 9'h1FF && !dut.u_sub.sensed[l*WORD_W + 8])
          mech[M_LONG_CARRY]++;
    end
    if (busy && host_req.cmd != CMD_NOP) mech[M_HOST_IGNORED]++;
  end

  // ------------------------------------------------------------------
  // helpers
  // ------------------------------------------------------------------
  task automatic host(dram_cmd_e c, row_addr_t a, row_t d = '0);
    @(negedge clk);
    host_req = '{cmd: c, src: a, dst: a};
    host_wdata = d;
    @(negedge clk);
    host_req = '{cmd: CMD_NOP, src: '0, dst: '0};
  endtask

  function automatic row_t pack(lanes_t v);
    row_t r;
    for (int l = 0; l < LANES; l++) r[l*WORD_W +: WORD_W] = WORD_W'(v[l]);
    return r;
  endfunction

  task automatic check_row(row_addr_t a, lanes_t v, string what);
    row_t exp_r;
    exp_r = pack(v);
    host(CMD_RD, a);
    checks++;
    if (host_rdata !== exp_r) begin
      failures++;
      $display("FAIL %s: row %h", what, a);
      for (int l = 0; l < LANES; l++)
        if (host_rdata[l*WORD_W +: WORD_W] !== exp_r[l*WORD_W +: WORD_W])
          $display("   lane %0d got %0d expected %0d", l,
                   $signed(host_rdata[l*WORD_W +: WORD_W]), $signed(exp_r[l*WORD_W +: WORD_W]));
    end
  endtask

  pim_instr_t prog [$];
  int expect_cycles;

  function automatic void emit(pim_op_e op, int d, int a, int b = 0, int k = 0);
    prog.push_back('{op: op, dst: drow(9'(d)), a: drow(9'(a)), b: drow(9'(b)),
                     shamt: SHAMT_W'(k), rsvd: '0});
    case (op)
      OP_ADD:   expect_cycles += 15 + 2;
      OP_SUB:   expect_cycles += 18 + 2;
      OP_COPY:  expect_cycles += 1 + 2;
      OP_SHIFT, OP_RELU: expect_cycles += 3 + 2;
      OP_MAX:   expect_cycles += 22 + 2;
      default:  expect_cycles += 2;
    endcase
  endfunction

  function automatic int sx16(int v);   // wrap to a signed 16-bit value
    return int'($signed(16'(v)));
  endfunction

  // row numbers
  localparam int ROW_X = 0, ROW_ZERO = 100, ROW_ACC = 300, ROW_RELU = 310,
                 ROW_M01 = 320, ROW_M23 = 321, ROW_M = 322, ROW_T0 = 330, ROW_T1 = 331,
                 ROW_OUT = 511;

  initial begin
    lanes_t x [4][9];
    lanes_t acc [4], rl [4], m01, m23, m, t0, t1, out, zero;
    int w [9];
    int k0, k1;
    bit first;
    int c0;

    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (zero[l]) zero[l] = 0;

    for (int trial = 0; trial < TRIALS; trial++) begin
      // ---- data and weights ----
      for (int p = 0; p < 4; p++)
        for (int j = 0; j < 9; j++)
          for (int l = 0; l < LANES; l++)
            x[p][j][l] = int'($urandom % 1001) - 500;
      for (int j = 0; j < 9; j++) w[j] = int'($urandom % 3) - 1;
      w[trial % 9] = 0;                         // at least one zero weight
      w[(trial + 1) % 9] = 1;
      w[(trial + 2) % 9] = -1;
      if (trial == 0) w[0] = -1;                // first term from a subtraction
      k0 = 1 + trial % 2;                       // alpha = 2^k0 + 2^-k1
      k1 = -(1 + trial % 3);

      for (int p = 0; p < 4; p++)
        for (int j = 0; j < 9; j++)
          host(CMD_WR, drow(9'(ROW_X + p * 9 + j)), pack(x[p][j]));
      host(CMD_WR, drow(9'(ROW_ZERO)), '0);

      // ---- program ----
      prog.delete();
      expect_cycles = 0;
      for (int p = 0; p < 4; p++) begin
        first = 1;
        for (int j = 0; j < 9; j++) begin
          if (w[j] == 0) begin
            if (p == 0) mech[M_SKIP]++;
            continue;
          end
          if (first) begin
            if (w[j] > 0) emit(OP_COPY, ROW_ACC + p, ROW_X + p * 9 + j);
            else          emit(OP_SUB,  ROW_ACC + p, ROW_ZERO, ROW_X + p * 9 + j);
            first = 0;
          end else begin
            emit(w[j] > 0 ? OP_ADD : OP_SUB, ROW_ACC + p, ROW_ACC + p, ROW_X + p * 9 + j);
          end
        end
        emit(OP_RELU, ROW_RELU + p, ROW_ACC + p);
      end
      emit(OP_MAX, ROW_M01, ROW_RELU + 0, ROW_RELU + 1);
      emit(OP_MAX, ROW_M23, ROW_RELU + 2, ROW_RELU + 3);
      emit(OP_MAX, ROW_M, ROW_M01, ROW_M23);
      emit(OP_SHIFT, ROW_T0, ROW_M, 0, k0);
      emit(OP_SHIFT, ROW_T1, ROW_M, 0, k1);
      emit(OP_ADD, ROW_OUT, ROW_T0, ROW_T1);
      emit(OP_HALT, 0, 0);

      for (int i = 0; i < prog.size(); i++) begin
        @(negedge clk); fb_we = 1; fb_waddr = 7'(i); fb_wdata = prog[i];
      end
      @(negedge clk); fb_we = 0;

      // ---- reference ----
      for (int p = 0; p < 4; p++)
        for (int l = 0; l < LANES; l++) begin
          acc[p][l] = 0;
          for (int j = 0; j < 9; j++) acc[p][l] += w[j] * x[p][j][l];
          rl[p][l] = acc[p][l] > 0 ? acc[p][l] : 0;
        end
      for (int l = 0; l < LANES; l++) begin
        m01[l] = rl[0][l] > rl[1][l] ? rl[0][l] : rl[1][l];
        m23[l] = rl[2][l] > rl[3][l] ? rl[2][l] : rl[3][l];
        m[l]   = m01[l] > m23[l] ? m01[l] : m23[l];
        t0[l]  = sx16(m[l] << k0);
        t1[l]  = m[l] >>> -k1;
        out[l] = sx16(t0[l] + t1[l]);
      end

      // ---- run ----
      c0 = busy_cycles;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      repeat (5) @(negedge clk);
      host_req = '{cmd: CMD_WR, src: drow(9'(ROW_ZERO)), dst: drow(9'(ROW_ZERO))};  // must be ignored
      host_wdata = '1;
      @(negedge clk);
      host_req = '{cmd: CMD_NOP, src: '0, dst: '0};
      wait (done);
      @(negedge clk);
      checks++;
      if (busy_cycles - c0 != expect_cycles) begin
        failures++;
        $display("FAIL trial %0d busy %0d cycles, expected %0d", trial, busy_cycles - c0, expect_cycles);
      end

      // ---- results ----
      for (int p = 0; p < 4; p++) begin
        check_row(drow(9'(ROW_ACC + p)), acc[p], "pre-conv accumulation");
        check_row(drow(9'(ROW_RELU + p)), rl[p], "ReLU");
      end
      check_row(drow(9'(ROW_M01)), m01, "max pool 0/1");
      check_row(drow(9'(ROW_M23)), m23, "max pool 2/3");
      check_row(drow(9'(ROW_M)), m, "max pool");
      check_row(drow(9'(ROW_T0)), t0, "post-conv left shift");
      check_row(drow(9'(ROW_T1)), t1, "post-conv right shift");
      check_row(drow(9'(ROW_OUT)), out, "scaled sum");
      check_row(drow(9'(ROW_ZERO)), zero, "host write while busy ignored");
      check_row(drow(9'(ROW_X + 13)), x[1][4], "input row untouched");
      $display("trial %0d: %0d instructions, %0d cycles", trial, prog.size(), busy_cycles - c0);
    end

    for (int i = 0; i < M_N; i++) begin
      automatic mech_e mi = mech_e'(i);
      $display("mechanism %-16s %0d", mi.name(), mech[i]);
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mi.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
