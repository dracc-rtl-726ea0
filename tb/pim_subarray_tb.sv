// pim_subarray_tb -- drives the subarray with the 13-command in-DRAM
// accumulation sequence (plus an R9 restore before and a copy-out after) on
// random rows and checks every intermediate row it can read against values
// computed with ordinary operators: G = a & d, P = a ^ d, the shifted carry
// row C, and the sum a + d per 16-bit word.  Also checks plain row
// write/read, row copy, the NOT row, AND/OR by triple-row majority, and that
// the fixed rows E0/E1 cannot be overwritten.
module pim_subarray_tb;
  import dracc_pkg::*;
  localparam int unsigned DATA_ROWS = 16, COLS = 64, WORD_W = 16, NW = COLS / WORD_W;
  typedef logic [COLS-1:0] row_t;

  logic clk = 0;
  dram_req_t req;
  row_t wdata, rdata;
  int checks = 0, failures = 0;

  pim_subarray #(.DATA_ROWS(DATA_ROWS), .COLS(COLS), .WORD_W(WORD_W)) dut (
    .clk(clk), .req(req), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(dram_cmd_e c, row_addr_t s, row_addr_t d, row_t wd = '0);
    req   <= '{cmd: c, src: s, dst: d};
    wdata <= wd;
    @(posedge clk);
    req   <= '{cmd: CMD_NOP, src: '0, dst: '0};
  endtask

  task automatic expect_row(row_addr_t s, row_t exp, string what);
    issue(CMD_RD, s, s);
    @(posedge clk);  // rdata registered
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp);
    end
  endtask

  function automatic row_t wsum(row_t a, row_t b, bit sub);
    row_t o;
    for (int w = 0; w < NW; w++)
      o[w*WORD_W +: WORD_W] = sub ? a[w*WORD_W +: WORD_W] - b[w*WORD_W +: WORD_W]
                                  : a[w*WORD_W +: WORD_W] + b[w*WORD_W +: WORD_W];
    return o;
  endfunction

  function automatic row_t wcarry(row_t a, row_t b);  // carry into each bit
    return wsum(a, b, 0) ^ a ^ b;
  endfunction

  function automatic row_t rnd();
    return {$urandom, $urandom};
  endfunction

  initial begin
    row_t a, d, x, y, z;
    req = '{cmd: CMD_NOP, src: '0, dst: '0};
    wdata = '0;
    repeat (2) @(posedge clk);

    // plain write / read and RowClone copy
    x = rnd(); y = rnd();
    issue(CMD_WR, drow(3), drow(3), x);
    issue(CMD_WR, drow(4), drow(4), y);
    expect_row(drow(3), x, "write/read");
    issue(CMD_AAP, drow(3), drow(5));
    expect_row(drow(5), x, "AAP copy");
    expect_row(drow(3), x, "AAP source kept");
    // NOT row stores the complement
    issue(CMD_AAP, drow(4), rsv(B7));
    expect_row(rsv(B7), ~y, "NOT row");
    // fixed rows
    issue(CMD_WR, rsv(E0), rsv(E0), rnd());
    expect_row(rsv(E0), '0, "E0 fixed");
    expect_row(rsv(E1), '1, "E1 fixed");
    // triple-row majority: AND with E0, OR with E1, restored into all three
    x = rnd(); y = rnd(); z = rnd();
    issue(CMD_WR, drow(0), drow(0), x);
    issue(CMD_WR, drow(1), drow(1), y);
    issue(CMD_WR, drow(2), drow(2), z);
    issue(CMD_AAP, drow(0), rsv(B0));
    issue(CMD_AAP, drow(1), rsv(B1));
    issue(CMD_AAP, drow(2), rsv(B2));
    issue(CMD_AP, rsv(B11), rsv(B11));
    expect_row(rsv(B0), (x & y) | (x & z) | (y & z), "majority R0");
    expect_row(rsv(B1), (x & y) | (x & z) | (y & z), "majority R1");
    expect_row(rsv(B2), (x & y) | (x & z) | (y & z), "majority R2");
    issue(CMD_AAP, drow(0), rsv(B8));
    issue(CMD_AAP, drow(1), rsv(B9));
    issue(CMD_AAP, rsv(E1), rsv(B5));
    issue(CMD_AP, rsv(B12), rsv(B12));
    expect_row(rsv(B3), x | y, "OR by majority");

    // the in-DRAM accumulation, many random operand pairs
    for (int t = 0; t < 60; t++) begin
      a = rnd(); d = rnd();
      if (t % 3 == 0) d = ~a ^ COLS'(t);     // long carry chains
      if (t == 1) begin a = {NW{16'h0007}}; d = {NW{16'h000D}}; end  // 0111 + 1101
      issue(CMD_WR, drow(8), drow(8), a);
      issue(CMD_WR, drow(9), drow(9), d);
      issue(CMD_AAP, rsv(E1), rsv(BR9));             // R9 <- ones
      issue(CMD_AAP, drow(8), rsv(B8));              // 1  copy A
      issue(CMD_AAP, drow(9), rsv(B9));              // 2  copy D
      issue(CMD_AAP, rsv(E0), rsv(B2));              // 3  copy E0
      issue(CMD_AAP, rsv(E1), rsv(B10));             // 4  copy E1
      issue(CMD_AP,  rsv(B11), rsv(B11));            // 5  G = A & D
      expect_row(rsv(B0), a & d, "G");
      issue(CMD_AAP, rsv(B12), rsv(B7));             // 6  M0 = ~(A | D)
      expect_row(rsv(B7), ~(a | d), "M0");
      issue(CMD_AAP, rsv(B13), rsv(B7));             // 7  P = A ^ D
      expect_row(rsv(B7), a ^ d, "P");
      issue(CMD_AAP, rsv(B0), rsv(B16));             // 8  propagate
      issue(CMD_AAP, rsv(B16), rsv(B9));             // 9  shift C
      expect_row(rsv(B1), wcarry(a, d), "C");
      issue(CMD_AAP, rsv(B7), rsv(B8));              // 10 copy P
      issue(CMD_AP,  rsv(B14), rsv(B14));            // 11 M1 = P & C
      issue(CMD_AAP, rsv(B15), rsv(B7));             // 12 M2 = ~(P | C)
      issue(CMD_AAP, rsv(B17), rsv(B7));             // 13 S = P ^ C
      issue(CMD_AAP, rsv(B7), drow(10));             // copy out
      expect_row(drow(10), wsum(a, d, 0), "sum");
      if (t == 1) begin
        checks++;
        if (rdata[4:0] !== 5'b10100) begin
          failures++;
          $display("FAIL worked example 0111+1101: %b", rdata[4:0]);
        end
      end
      expect_row(drow(8), a, "operand A untouched");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
