// lenet_conv1_tb -- the first layer of a LeNet-5-class MNIST network on one
// full-size DrAcc unit: a 28x28 image with 8-bit pixels, six 5x5 ternary
// filters, ReLU, 2x2 max pooling (24x24 -> 12x12 per filter) and scaling by
// alpha = 2^k0 + 2^k1 in the logic layer.  Image and weights are random.
//
// The 144 pooling windows of a filter are spread over 5 row groups of 32
// lanes (the last one partly used).  For group g, window position p (0..3)
// and tap j (0..24), input row 100*g' + 25*p + j holds, in lane n, the pixel
// that tap j meets for window 32*g + n; the host writes those 100 rows once
// per group and then runs one program per filter.  Every program's pooled
// and scaled output row is read back and compared with a direct integer
// evaluation of the layer, and the busy time of each program with its
// command count.
module lenet_conv1_tb;
  import dracc_pkg::*;
  localparam int unsigned COLS = 512, WORD_W = 16, LANES = COLS / WORD_W;
  localparam int IMG = 28, K = 5, OUT = IMG - K + 1, POOL = OUT / 2, NWIN = POOL * POOL;
  localparam int FILTERS = 6, GROUPS = (NWIN + LANES - 1) / LANES;
  typedef logic [COLS-1:0] row_t;

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
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int busy_cycles = 0;
  always @(posedge clk) if (busy) busy_cycles++;

  task automatic host(dram_cmd_e c, row_addr_t a, row_t d = '0);
    @(negedge clk);
    host_req = '{cmd: c, src: a, dst: a};
    host_wdata = d;
    @(negedge clk);
    host_req = '{cmd: CMD_NOP, src: '0, dst: '0};
  endtask

  pim_instr_t prog [$];
  int expect_cycles;

  function automatic void emit(pim_op_e op, int d, int a, int b = 0, int k = 0);
    prog.push_back('{op: op, dst: drow(9'(d)), a: drow(9'(a)), b: drow(9'(b)),
                     shamt: SHAMT_W'(k), rsvd: '0});
    case (op)
      OP_ADD:   expect_cycles += 17;
      OP_SUB:   expect_cycles += 20;
      OP_COPY:  expect_cycles += 3;
      OP_SHIFT, OP_RELU: expect_cycles += 5;
      OP_MAX:   expect_cycles += 24;
      default:  expect_cycles += 2;
    endcase
  endfunction

  localparam int ROW_ZERO = 400, ROW_ACC = 410, ROW_RELU = 420, ROW_M01 = 430, ROW_M23 = 431,
                 ROW_M = 432, ROW_T0 = 433, ROW_T1 = 434, ROW_OUT = 440;

  int img [IMG][IMG];
  int w [FILTERS][K*K];
  int k0 [FILTERS], k1 [FILTERS];

  function automatic int ref_out(int f, int win);
    int wy = win / POOL, wx = win % POOL, best = 0, v, m;
    for (int p = 0; p < 4; p++) begin
      int y = 2 * wy + p / 2, x = 2 * wx + p % 2;
      v = 0;
      for (int j = 0; j < K * K; j++) v += w[f][j] * img[y + j / K][x + j % K];
      if (v > best) best = v;          // ReLU then max
    end
    m = best;
    return int'($signed(16'((m << k0[f]) + (m >>> -k1[f]))));
  endfunction

  initial begin
    row_t r;
    int win, y, x, c0, progs = 0;
    bit first;

    for (int i = 0; i < IMG; i++) for (int j = 0; j < IMG; j++) img[i][j] = int'($urandom % 256);
    for (int f = 0; f < FILTERS; f++) begin
      for (int j = 0; j < K * K; j++) w[f][j] = int'($urandom % 3) - 1;
      k0[f] = int'($urandom % 2);           // alpha = 2^k0 + 2^k1, k1 < 0
      k1[f] = -1 - int'($urandom % 3);
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    host(CMD_WR, drow(9'(ROW_ZERO)), '0);

    for (int g = 0; g < GROUPS; g++) begin
      // input rows of this group
      for (int p = 0; p < 4; p++)
        for (int j = 0; j < K * K; j++) begin
          r = '0;
          for (int n = 0; n < LANES; n++) begin
            win = g * LANES + n;
            if (win < NWIN) begin
              y = 2 * (win / POOL) + p / 2 + j / K;
              x = 2 * (win % POOL) + p % 2 + j % K;
              r[n*WORD_W +: WORD_W] = WORD_W'(img[y][x]);
            end
          end
          host(CMD_WR, drow(9'(25 * p + j)), r);
        end

      for (int f = 0; f < FILTERS; f++) begin
        prog.delete();
        expect_cycles = 0;
        for (int p = 0; p < 4; p++) begin
          first = 1;
          for (int j = 0; j < K * K; j++) begin
            if (w[f][j] == 0) continue;
            if (first) begin
              if (w[f][j] > 0) emit(OP_COPY, ROW_ACC + p, 25 * p + j);
              else             emit(OP_SUB,  ROW_ACC + p, ROW_ZERO, 25 * p + j);
              first = 0;
            end else
              emit(w[f][j] > 0 ? OP_ADD : OP_SUB, ROW_ACC + p, ROW_ACC + p, 25 * p + j);
          end
          if (first) emit(OP_COPY, ROW_ACC + p, ROW_ZERO);   // all-zero filter
          emit(OP_RELU, ROW_RELU + p, ROW_ACC + p);
        end
        emit(OP_MAX, ROW_M01, ROW_RELU + 0, ROW_RELU + 1);
        emit(OP_MAX, ROW_M23, ROW_RELU + 2, ROW_RELU + 3);
        emit(OP_MAX, ROW_M, ROW_M01, ROW_M23);
        emit(OP_SHIFT, ROW_T0, ROW_M, 0, k0[f]);
        emit(OP_SHIFT, ROW_T1, ROW_M, 0, k1[f]);
        emit(OP_ADD, ROW_OUT + f, ROW_T0, ROW_T1);
        emit(OP_HALT, 0, 0);
        if (prog.size() > 128) $fatal(1, "program too long");
        for (int i = 0; i < prog.size(); i++) begin
          @(negedge clk); fb_we = 1; fb_waddr = 7'(i); fb_wdata = prog[i];
        end
        @(negedge clk); fb_we = 0;

        c0 = busy_cycles;
        @(negedge clk); start = 1;
        @(negedge clk); start = 0;
        wait (done);
        @(negedge clk);
        progs++;
        checks++;
        if (busy_cycles - c0 != expect_cycles) begin
          failures++;
          $display("FAIL group %0d filter %0d: %0d cycles, expected %0d", g, f, busy_cycles - c0, expect_cycles);
        end
      end

      // pooled, scaled outputs of all filters for this group
      for (int f = 0; f < FILTERS; f++) begin
        host(CMD_RD, drow(9'(ROW_OUT + f)));
        for (int n = 0; n < LANES; n++) begin
          win = g * LANES + n;
          if (win >= NWIN) continue;
          checks++;
          if (int'($signed(host_rdata[n*WORD_W +: WORD_W])) != ref_out(f, win)) begin
            failures++;
            if (failures < 10)
              $display("FAIL filter %0d window %0d: got %0d expected %0d", f, win,
                       $signed(host_rdata[n*WORD_W +: WORD_W]), ref_out(f, win));
          end
        end
      end
    end
    $display("%0d programs, %0d busy cycles for the layer (one unit, one command per clock)",
             progs, busy_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
