// dracc_top -- one DrAcc processing-in-memory unit: a compute subarray, the
// enhanced controller with its flag buffer, and the logic-layer datapath.
//
// A CNN layer runs in four steps.  Pre-conv, activation and pooling happen in
// the DRAM layer: the ternary-weight dot products become in-DRAM additions
// (weight +1) and subtractions (weight -1) of whole rows, each row holding
// COLS/WORD_W words that are processed side by side; max pooling compares
// rows by an in-DRAM subtraction.  Post-conv scales the pooled results by the
// filter's factor alpha in the logic layer, as shifts whose copies the next
// layer's pre-conv adds up.  The host writes a program of PIM instructions
// into the flag buffer, the input rows into the subarray, pulses start and
// waits for done.
//
// The logic layer has three row registers L0..L2 that latch the subarray's
// read data when the controller says so, and writes back, on the controller's
// CMD_WR, either the shifter's output (L0 shifted), the ReLU of L0, or the
// max selection between L0 and L1 driven by the sign of L2.
//
// Host port: while busy is low, host_req (CMD_RD or CMD_WR on any row) goes to
// the subarray; read data appears on host_rdata one clock after CMD_RD.
// Requests made while busy is high are ignored.  The fb_* port writes the
// flag buffer at any time the controller is idle.
//
// The model is one subarray of the device; how many subarrays run the same
// program in lockstep, and how the layer is split over them, is decided when
// the program and data are laid out.  ReLU and the max selection sit at the
// subarray's row interface here, where the document places them in the DRAM
// layer without detailing the circuit.
module dracc_top
  import dracc_pkg::*;
#(
  parameter int unsigned DATA_ROWS = 512,
  parameter int unsigned COLS      = 512,
  parameter int unsigned WORD_W    = 16,
  parameter int unsigned FB_DEPTH  = 128,
  parameter int unsigned FB_AW     = $clog2(FB_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // program load
  input  logic             fb_we,
  input  logic [FB_AW-1:0] fb_waddr,
  input  pim_instr_t       fb_wdata,
  // run control
  input  logic             start,
  output logic             busy,
  output logic             done,
  // host row access
  input  dram_req_t        host_req,
  input  logic [COLS-1:0]  host_wdata,
  output logic [COLS-1:0]  host_rdata
);

  localparam int unsigned LANES = COLS / WORD_W;

  logic                      fb_re;
  logic [FB_AW-1:0]          fb_raddr;
  pim_instr_t                fb_rdata;
  dram_req_t                 ctrl_req, sub_req;
  wsel_e                     wsel;
  logic signed [SHAMT_W-1:0] shamt;
  logic [2:0]                cap;
  logic [COLS-1:0]           sub_rdata, sub_wdata;
  logic [COLS-1:0]           l_q [3];
  logic [COLS-1:0]           shf_out, relu_out, max_out, ll_out;

  flag_buffer #(.DEPTH(FB_DEPTH)) u_fb (
    .clk   (clk),
    .we    (fb_we),
    .waddr (fb_waddr),
    .wdata (fb_wdata),
    .re    (fb_re),
    .raddr (fb_raddr),
    .rdata (fb_rdata)
  );

  pim_controller #(.FB_DEPTH(FB_DEPTH)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .busy     (busy),
    .done     (done),
    .fb_re    (fb_re),
    .fb_raddr (fb_raddr),
    .fb_rdata (fb_rdata),
    .req      (ctrl_req),
    .wsel     (wsel),
    .shamt    (shamt),
    .cap      (cap)
  );

  assign sub_req   = busy ? ctrl_req : host_req;
  assign sub_wdata = busy ? ll_out   : host_wdata;

  pim_subarray #(.DATA_ROWS(DATA_ROWS), .COLS(COLS), .WORD_W(WORD_W)) u_sub (
    .clk   (clk),
    .req   (sub_req),
    .wdata (sub_wdata),
    .rdata (sub_rdata)
  );

  assign host_rdata = sub_rdata;

  // Logic-layer row registers.
  always_ff @(posedge clk) begin
    for (int n = 0; n < 3; n++)
      if (cap[n]) l_q[n] <= sub_rdata;
  end

  shifter #(.WORD_W(WORD_W), .LANES(LANES), .SHAMT_W(SHAMT_W)) u_shift (
    .din   (l_q[0]),
    .shamt (shamt),
    .dout  (shf_out)
  );

  relu_unit #(.WORD_W(WORD_W), .LANES(LANES)) u_relu (
    .din  (l_q[0]),
    .dout (relu_out)
  );

  max_select #(.WORD_W(WORD_W), .LANES(LANES)) u_max (
    .a    (l_q[0]),
    .b    (l_q[1]),
    .diff (l_q[2]),
    .dout (max_out)
  );

  always_comb begin
    unique case (wsel)
      WSEL_RELU: ll_out = relu_out;
      WSEL_MAX:  ll_out = max_out;
      default:   ll_out = shf_out;
    endcase
  end

  // The flag buffer is only loaded while no program runs.
  a_fb_idle: assert property (@(posedge clk) !(fb_we && busy))
    else $error("flag buffer written while busy");

endmodule
