// relu_unit_tb -- random rows, with the edge values 0, -1, the most negative
// and the most positive word mixed in; each lane must equal max(x, 0).
module relu_unit_tb;
  localparam int unsigned WORD_W = 16, LANES = 32;

  logic [LANES*WORD_W-1:0] din, dout;
  int checks = 0, failures = 0;

  relu_unit #(.WORD_W(WORD_W), .LANES(LANES)) dut (.*);

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
        automatic int unsigned pick = $urandom % 6;
        unique case (pick)
          0: din[l*WORD_W +: WORD_W] = '0;
          1: din[l*WORD_W +: WORD_W] = '1;
          2: din[l*WORD_W +: WORD_W] = 16'h8000;
          3: din[l*WORD_W +: WORD_W] = 16'h7FFF;
          default: din[l*WORD_W +: WORD_W] = WORD_W'($urandom);
        endcase
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        automatic int v = int'($signed(din[l*WORD_W +: WORD_W]));
        checks++;
        if (int'($signed(dout[l*WORD_W +: WORD_W])) != (v > 0 ? v : 0)) begin
          failures++;
          $display("FAIL lane %0d in %0d out %h", l, v, dout[l*WORD_W +: WORD_W]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
