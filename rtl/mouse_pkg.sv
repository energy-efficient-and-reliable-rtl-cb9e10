// mouse_pkg -- shared constants and types of the MOUSE processing-in-memory
// accelerator.
//
// MOUSE executes 64-bit instructions. Each instruction is fetched from an
// array of nonvolatile memory, decoded by the memory controller and broadcast
// to the CRAM arrays. The instruction field widths follow the instruction
// format of the design: 5-bit opcode, 9-bit array ("tile") address, 10-bit
// row addresses and a 20-bit branch offset. Tile address 9'h1FF is reserved
// and addresses every array at once.
//
// Own choices, where the design leaves them open: the opcode numbering, the
// bit positions of the fields (MSB first, in the order of the format), the
// 32 immediate bits that are used, and the 32-bit width of BR1/BR2.
//
//   Logic     : opc[63:59] tile[58:50] row1[49:40] row2[39:30] row3[29:20]
//   Memory/AC : opc[63:59] tile[58:50] row [49:40] imm [39:0] (imm[31:0] used)
//   BR write  : opc[63:59]                         imm [39:0] (imm[31:0] used)
//   Branch    : opc[63:59] offset[58:39] (signed, in instructions, PC-relative)
//
// Logic gates: row1/row2 are the inputs (row2 unused by NOT), row3 the output.
package mouse_pkg;

  localparam int unsigned INSTR_W = 64;
  localparam int unsigned OPC_W   = 5;
  localparam int unsigned TILE_W  = 9;
  localparam int unsigned ROW_W   = 10;
  localparam int unsigned OFFS_W  = 20;
  localparam int unsigned IMM_W   = 32;
  localparam int unsigned BR_W    = 32;

  // Bulk address: every array takes part.
  localparam logic [TILE_W-1:0] TILE_ALL = '1;

  typedef enum logic [OPC_W-1:0] {
    OP_NOP       = 5'h00,
    OP_READ      = 5'h01,  // array row -> DR
    OP_WRITE     = 5'h02,  // DR -> array row (active columns)
    OP_WRITE_IMM = 5'h03,  // immediate pattern -> array row (active columns)
    OP_NOT       = 5'h04,
    OP_AND       = 5'h05,
    OP_NAND      = 5'h06,
    OP_OR        = 5'h07,
    OP_NOR       = 5'h08,
    OP_AC_REACT  = 5'h09,  // activate columns from the existing CBR value
    OP_AC_SET_DR = 5'h0A,  // CBR <- DR, then activate
    OP_AC_SET_IM = 5'h0B,  // CBR <- immediate pattern, then activate
    OP_BR1_DR    = 5'h0C,
    OP_BR1_IMM   = 5'h0D,
    OP_BR2_DR    = 5'h0E,
    OP_BR2_IMM   = 5'h0F,
    OP_BEQ       = 5'h10,  // branch if BR1 == BR2
    OP_BGE       = 5'h11,  // branch if BR1 >= BR2 (unsigned)
    OP_BEQZ      = 5'h12   // branch if BR1 == 0
  } opcode_e;

  // In-memory gates. "up" gates can only switch their output 0 -> 1
  // (preset 0), the others only 1 -> 0 (preset 1).
  typedef enum logic [2:0] {
    G_NOT  = 3'd0,
    G_AND  = 3'd1,
    G_NAND = 3'd2,
    G_OR   = 3'd3,
    G_NOR  = 3'd4
  } gate_e;

  typedef enum logic [1:0] {
    BC_EQ  = 2'd0,
    BC_GE  = 2'd1,
    BC_EQZ = 2'd2
  } br_cond_e;

  // Decoded instruction.
  typedef struct packed {
    opcode_e                  opc;
    logic [TILE_W-1:0]        tile;
    logic [ROW_W-1:0]         row1;
    logic [ROW_W-1:0]         row2;
    logic [ROW_W-1:0]         row3;
    logic [IMM_W-1:0]         imm;
    logic signed [OFFS_W-1:0] offset;
    logic                     is_mem;     // READ / WRITE / WRITE_IMM
    logic                     is_logic;   // one of the five gates
    logic                     is_ac;      // activate columns
    logic                     is_brw;     // write BR1 or BR2
    logic                     is_branch;  // conditional branch
    logic                     illegal;    // unused opcode (executed as NOP)
    gate_e                    gate;
    logic [1:0]               n_rows;     // rows the gate latches (2 or 3)
    br_cond_e                 cond;
  } dec_t;

  // Commands broadcast from the controller to the arrays.
  typedef enum logic [2:0] {
    C_NONE    = 3'd0,
    C_ROW_ACT = 3'd1,  // latch one more wordline
    C_ROW_CLR = 3'd2,  // release all latched wordlines
    C_READ    = 3'd3,  // read row -> sense amplifiers
    C_WRITE   = 3'd4,  // write cmd_data into row, active columns only
    C_LOGIC   = 3'd5,  // gate between latched rows, active columns only
    C_COL     = 3'd6   // optional CBR set, then column activation
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e           op;
    logic [TILE_W-1:0] tile;
    logic [ROW_W-1:0]  row;
    gate_e             gate;
    logic              in_par;   // parity of the input rows (bitline choice)
    logic              cbr_set;  // C_COL: load CBR from cmd_data first
  } arr_cmd_t;

  localparam arr_cmd_t CMD_IDLE = '{op: C_NONE, tile: '0, row: '0, gate: G_NOT,
                                    in_par: 1'b0, cbr_set: 1'b0};

endpackage
