// carry_propagate_tb -- checks the carry chain against carries derived from
// ordinary integer addition: for words a and b, the carry out of bit i is bit
// i+1 of (a + b) ^ a ^ b.  Also replays the two worked examples of the adder:
// G=0101, P=1010 gives carries 1111 (C = 11110 with C0 = 0), and the 16-bit
// propagation G=0x0002, P=0xFFFC gives C = 0xFFFE.  A second instance with
// 32-bit words checks the wider word size the adder also serves.
module carry_propagate_tb;
  localparam int unsigned COLS = 64, WORD_W = 16, NW = COLS / WORD_W;

  logic [COLS-1:0] g, p, cout;
  int checks = 0, failures = 0;

  carry_propagate #(.COLS(COLS), .WORD_W(WORD_W)) dut (.g(g), .p(p), .cout(cout));

  logic [COLS-1:0] cout32;
  carry_propagate #(.COLS(COLS), .WORD_W(32)) dut32 (.g(g), .p(p), .cout(cout32));

  task automatic check(input logic [COLS-1:0] exp, input string what);
    checks++;
    if (cout !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, cout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [COLS-1:0] a, b, exp;
    logic [WORD_W:0] s;
    // worked example of the 4-bit adder (in the low bits of every word)
    g = {NW{16'h0005}}; p = {NW{16'h000A}}; #1;
    check({NW{16'h000F}}, "4-bit example");
    // 16-bit propagation example
    g = {NW{16'h0002}}; p = {NW{16'hFFFC}}; #1;
    check({NW{16'hFFFE}}, "16-bit propagation example");
    // random words: chains must stop at word boundaries
    for (int t = 0; t < 2000; t++) begin
      for (int k = 0; k < COLS / 32; k++) begin
        a[k*32 +: 32] = $urandom;
        b[k*32 +: 32] = $urandom;
      end
      if (t % 4 == 0) b = ~a;              // long propagate runs
      if (t % 8 == 1) a = '1;
      for (int w = 0; w < NW; w++) begin
        s = {1'b0, a[w*WORD_W +: WORD_W]} + {1'b0, b[w*WORD_W +: WORD_W]};
        exp[w*WORD_W +: WORD_W] = WORD_W'((s ^ {1'b0, a[w*WORD_W +: WORD_W]}
                                             ^ {1'b0, b[w*WORD_W +: WORD_W]}) >> 1);
      end
      g = a & b; p = a ^ b; #1;
      check(exp, "random");
      // the same operands as 32-bit words
      for (int w = 0; w < COLS / 32; w++) begin
        logic [32:0] s32;
        s32 = {1'b0, a[w*32 +: 32]} + {1'b0, b[w*32 +: 32]};
        exp[w*32 +: 32] = 32'((s32 ^ {1'b0, a[w*32 +: 32]} ^ {1'b0, b[w*32 +: 32]}) >> 1);
      end
      checks++;
      if (cout32 !== exp) begin
        failures++;
        $display("FAIL 32-bit words: got %h expected %h", cout32, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
