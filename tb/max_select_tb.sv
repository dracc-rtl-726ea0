// max_select_tb -- random candidate rows a and b in the range where a - b
// fits in a word; the difference row is formed as the DRAM would form it and
// each output lane must equal max(a, b).
module max_select_tb;
  localparam int unsigned WORD_W = 16, LANES = 32;

  logic [LANES*WORD_W-1:0] a, b, diff, dout;
  int checks = 0, failures = 0;

  max_select #(.WORD_W(WORD_W), .LANES(LANES)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int l = 0; l < LANES; l++) begin
        automatic int x = int'($urandom % 32768) - 16384;
        automatic int y = (l % 5 == 0) ? x : int'($urandom % 32768) - 16384;
        a[l*WORD_W +: WORD_W]    = WORD_W'(x);
        b[l*WORD_W +: WORD_W]    = WORD_W'(y);
        diff[l*WORD_W +: WORD_W] = WORD_W'(x - y);
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        automatic int x = int'($signed(a[l*WORD_W +: WORD_W]));
        automatic int y = int'($signed(b[l*WORD_W +: WORD_W]));
        checks++;
        if (int'($signed(dout[l*WORD_W +: WORD_W])) != (x > y ? x : y)) begin
          failures++;
          $display("FAIL lane %0d max(%0d,%0d) got %h", l, x, y, dout[l*WORD_W +: WORD_W]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
