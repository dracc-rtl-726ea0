// dracc_pkg -- types and constants shared by the DrAcc blocks.
//
// A row address names either one of the subarray's ordinary data rows or one
// of the reserved compute addresses B0..B17 (each of which opens one, two or
// three reserved rows at once, following the address table of the in-DRAM
// adder), the two fixed-data rows E0 (all zeros) and E1 (all ones), and one
// extra address that opens reserved row R9 on its own.  The B0..B17 row sets
// follow the design's address table; E0/E1 encodings and the extra R9
// address are this design's own choices.
//
// The controller drives the subarray with DRAM-style commands: AAP (two
// back-to-back activations then a precharge, i.e. copy/compute src -> dst),
// AP (one activation then a precharge, e.g. a triple-row majority), and the
// ordinary row read/write used to move a row to and from the logic layer.
//
// A PIM instruction, as held in the flag buffer, is 40 bits: an opcode, a
// destination and two operand row addresses, and a signed shift amount for
// the logic-layer shifter.  128 such entries fill a 5 Kb buffer.
package dracc_pkg;

  // Width of a row index; 9 bits cover the 512 data rows of a subarray.
  localparam int unsigned ROW_IDX_W = 9;

  typedef struct packed {
    logic                 special;  // 1: reserved/compute address, 0: data row
    logic [ROW_IDX_W-1:0] idx;      // data row number, or one of the codes below
  } row_addr_t;

  // Reserved compute addresses (idx when special = 1).
  localparam logic [ROW_IDX_W-1:0] B0  = 9'd0;   // R0
  localparam logic [ROW_IDX_W-1:0] B1  = 9'd1;   // R1
  localparam logic [ROW_IDX_W-1:0] B2  = 9'd2;   // R2, R7
  localparam logic [ROW_IDX_W-1:0] B3  = 9'd3;   // R3
  localparam logic [ROW_IDX_W-1:0] B4  = 9'd4;   // R4
  localparam logic [ROW_IDX_W-1:0] B5  = 9'd5;   // R5
  localparam logic [ROW_IDX_W-1:0] B6  = 9'd6;   // R6
  localparam logic [ROW_IDX_W-1:0] B7  = 9'd7;   // NOT row
  localparam logic [ROW_IDX_W-1:0] B8  = 9'd8;   // R0, R3
  localparam logic [ROW_IDX_W-1:0] B9  = 9'd9;   // R1, R4
  localparam logic [ROW_IDX_W-1:0] B10 = 9'd10;  // R5, R6, R8
  localparam logic [ROW_IDX_W-1:0] B11 = 9'd11;  // R0, R1, R2
  localparam logic [ROW_IDX_W-1:0] B12 = 9'd12;  // R3, R4, R5
  localparam logic [ROW_IDX_W-1:0] B13 = 9'd13;  // R1, R6, NOT
  localparam logic [ROW_IDX_W-1:0] B14 = 9'd14;  // R0, R1, R7
  localparam logic [ROW_IDX_W-1:0] B15 = 9'd15;  // R3, R4, R8
  localparam logic [ROW_IDX_W-1:0] B16 = 9'd16;  // SHF row
  localparam logic [ROW_IDX_W-1:0] B17 = 9'd17;  // R1, R9, NOT
  localparam logic [ROW_IDX_W-1:0] E0  = 9'd18;  // fixed all-zero row
  localparam logic [ROW_IDX_W-1:0] E1  = 9'd19;  // fixed all-one row
  localparam logic [ROW_IDX_W-1:0] BR9 = 9'd20;  // R9 alone

  function automatic row_addr_t rsv(input logic [ROW_IDX_W-1:0] code);
    return '{special: 1'b1, idx: code};
  endfunction

  function automatic row_addr_t drow(input logic [ROW_IDX_W-1:0] n);
    return '{special: 1'b0, idx: n};
  endfunction

  // Subarray commands.
  typedef enum logic [2:0] {
    CMD_NOP = 3'd0,
    CMD_AAP = 3'd1,  // activate src, activate dst, precharge
    CMD_AP  = 3'd2,  // activate src, precharge
    CMD_RD  = 3'd3,  // read row src out to the logic layer
    CMD_WR  = 3'd4   // write a row from the logic layer into dst
  } dram_cmd_e;

  typedef struct packed {
    dram_cmd_e cmd;
    row_addr_t src;
    row_addr_t dst;
  } dram_req_t;

  // PIM instructions.
  typedef enum logic [2:0] {
    OP_HALT  = 3'd0,  // end of program
    OP_ADD   = 3'd1,  // dst = a + b        (in DRAM, weight +1)
    OP_SUB   = 3'd2,  // dst = a - b        (in DRAM, weight -1)
    OP_COPY  = 3'd3,  // dst = a            (in DRAM, row copy)
    OP_SHIFT = 3'd4,  // dst = a << shamt   (logic-layer shifter, shamt < 0: arithmetic right)
    OP_RELU  = 3'd5,  // dst = max(a, 0)
    OP_MAX   = 3'd6   // dst = max(a, b)    (in-DRAM subtraction, then select)
  } pim_op_e;

  localparam int unsigned SHAMT_W = 5;

  typedef struct packed {
    pim_op_e                     op;
    row_addr_t                   dst;
    row_addr_t                   a;
    row_addr_t                   b;
    logic signed [SHAMT_W-1:0]   shamt;
    logic [1:0]                  rsvd;
  } pim_instr_t;

  localparam int unsigned INSTR_W = $bits(pim_instr_t);  // 40

  // What the logic layer writes back on a CMD_WR issued by the controller.
  typedef enum logic [1:0] {
    WSEL_SHIFT = 2'd0,
    WSEL_RELU  = 2'd1,
    WSEL_MAX   = 2'd2
  } wsel_e;

endpackage
