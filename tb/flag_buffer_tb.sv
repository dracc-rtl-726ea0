// flag_buffer_tb -- fills every entry of the instruction buffer with random
// 40-bit instructions, reads them back in a shuffled order and checks each
// against a copy kept in the testbench, including the one-clock read latency
// and that rdata holds while re is low.
module flag_buffer_tb;
  import dracc_pkg::*;
  localparam int unsigned DEPTH = 128, AW = 7;

  logic clk = 0, we = 0, re = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  pim_instr_t wdata = '0, rdata;
  pim_instr_t model [DEPTH];
  int checks = 0, failures = 0;

  flag_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pim_instr_t held;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = pim_instr_t'({$urandom, 8'($urandom)});
      @(negedge clk); we = 1; waddr = AW'(i); wdata = model[i];
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 3 * DEPTH; k++) begin
      automatic int i = (k * 37 + 11) % DEPTH;
      @(negedge clk); re = 1; raddr = AW'(i);
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== model[i]) begin
        failures++;
        $display("FAIL entry %0d: got %h expected %h", i, rdata, model[i]);
      end
      // rdata must hold while re is low
      held = rdata;
      raddr = AW'(i + 1);
      @(negedge clk);
      checks++;
      if (rdata !== held) begin
        failures++;
        $display("FAIL rdata changed without re");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
