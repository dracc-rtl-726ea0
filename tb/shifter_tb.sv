// shifter_tb -- random words and every shift amount from -16 to +15; each
// lane is compared with a multiplication by 2^k (k >= 0) or a floor division
// by 2^-k (k < 0), both computed on wide integers.
module shifter_tb;
  localparam int unsigned WORD_W = 16, LANES = 8, SHAMT_W = 5;

  logic [LANES*WORD_W-1:0] din, dout;
  logic signed [SHAMT_W-1:0] shamt;
  int checks = 0, failures = 0;

  shifter #(.WORD_W(WORD_W), .LANES(LANES), .SHAMT_W(SHAMT_W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int l = 0; l < LANES; l++) din[l*WORD_W +: WORD_W] = WORD_W'($urandom);
      for (int k = -16; k <= 15; k++) begin
        shamt = SHAMT_W'(k);
        #1;
        for (int l = 0; l < LANES; l++) begin
          longint v, e;
          v = longint'($signed(din[l*WORD_W +: WORD_W]));
          if (k >= 0) e = v * (longint'(1) << k);
          else begin
            e = v / (longint'(1) << -k);
            if (v < 0 && e * (longint'(1) << -k) != v) e = e - 1;  // floor
          end
          checks++;
          if (dout[l*WORD_W +: WORD_W] !== WORD_W'(e)) begin
            failures++;
            if (failures < 10)
              $display("FAIL lane %0d v=%0d k=%0d got %h expected %h", l, v, k,
                       dout[l*WORD_W +: WORD_W], WORD_W'(e));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
