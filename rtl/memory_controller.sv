// memory_controller -- instruction sequencer of MOUSE.
//
// The controller is the only CMOS logic outside the arrays. It repeatedly
// fetches a 64-bit instruction from an instruction array at the program
// counter, decodes it and broadcasts it to the data arrays; apart from
// branches and its own registers it computes nothing. All of its
// architectural state is nonvolatile: the 1,024-bit data register (DR) that
// carries rows between arrays, the branch registers BR1/BR2 (branch_unit)
// and the duplicated program counter with its parity bit (pc_checkpoint).
//
// Every instruction occupies the same fixed cycle of STEPS = 9 clocks,
// whatever it does, so the longest instruction always has time to finish:
//   FETCH   read the instruction row at {pc.tile, pc.row}
//   DECODE  capture the 64-bit slot pc.slot of the returned row
//   ACT1-3  latch the gate's rows one at a time (inputs, then output);
//           idle for other instructions
//   EXEC    broadcast the operation (read, write, gate, column activation)
//   RESOLVE DR <- read data, BR1/BR2 writes, branch target; release rows
//   COMMIT  write the next PC into the invalid PC copy
//   FLIP    flip the parity bit: the instruction is committed
// The PC is {tile, row, slot} counted as one binary number, so execution runs
// from slot to slot, row to row and array to array. Splitting the cycle into
// these nine clocks is this design's choice; the design fixes only that all
// instructions take the same, worst-case time.
//
// Power loss (pwr_good low) asynchronously resets the sequencer, which is
// volatile. Because nothing but FLIP commits, power lost anywhere before
// FLIP re-runs the same instruction, which is safe as every instruction is
// idempotent and none reads a register it writes. Whenever power returns the
// controller first broadcasts a column re-activation to every array (RESTART,
// one clock), restoring the active columns from each nonvolatile CBR, and
// then fetches from the valid PC.
//
// Immediate forms (write immediate, set columns from immediate) write the
// 32-bit immediate repeated across the whole row; this is this design's
// choice. COLS must be a multiple of 64 and at least 128.
//
// pwr_good is used both as the asynchronous clear of the sequencer and as a
// synchronous enable of the nonvolatile register writes; that is intended.
module memory_controller
  import mouse_pkg::*;
#(
  parameter int unsigned COLS = 1024
) (
  input  logic                clk,
  input  logic                pwr_good,
  input  logic                nv_init,
  // Broadcast to the arrays.
  output arr_cmd_t            cmd,
  output logic [COLS-1:0]     cmd_data,
  input  logic [COLS-1:0]     rdata,
  // Architectural state and events, for observation.
  output logic [TILE_W+ROW_W+$clog2(COLS/64)-1:0] pc,
  output logic                parity,
  output logic [COLS-1:0]     dr,
  output logic [BR_W-1:0]     br1,
  output logic [BR_W-1:0]     br2,
  output logic                commit,      // pulse: instruction committed
  output logic                restart,     // pulse: restart re-activation
  output logic                exec,        // pulse: operation broadcast
  output opcode_e             exec_opc,    // opcode of the executing instr.
  output logic                br_taken     // pulse with commit: branch taken
);

  localparam int unsigned SLOT_W = $clog2(COLS / 64);
  localparam int unsigned PC_W   = TILE_W + ROW_W + SLOT_W;

  typedef enum logic [3:0] {
    S_RESTART, S_FETCH, S_DECODE, S_ACT1, S_ACT2, S_ACT3,
    S_EXEC, S_RESOLVE, S_COMMIT, S_FLIP
  } state_e;

  state_e               state;
  logic [INSTR_W-1:0]   ir;
  dec_t                 dec;
  logic [PC_W-1:0]      next_pc, next_pc_q, pc_shadow;
  logic                 taken, taken_q;
  logic [COLS-1:0]      imm_row;

  logic [TILE_W-1:0] pc_tile;
  logic [ROW_W-1:0]  pc_row;
  logic [SLOT_W-1:0] pc_slot;
  assign {pc_tile, pc_row, pc_slot} = pc;

  instr_decoder u_dec (.instr(ir), .dec(dec));

  // Immediate pattern repeated over the row.
  always_comb
    for (int i = 0; i < int'(COLS); i++) imm_row[i] = dec.imm[i % IMM_W];

  // ----------------------------------------------------------- sequencer
  always_ff @(posedge clk or negedge pwr_good) begin
    if (!pwr_good) state <= S_RESTART;
    else begin
      unique case (state)
        S_RESTART: state <= S_FETCH;
        S_FETCH:   state <= S_DECODE;
        S_DECODE:  state <= S_ACT1;
        S_ACT1:    state <= S_ACT2;
        S_ACT2:    state <= S_ACT3;
        S_ACT3:    state <= S_EXEC;
        S_EXEC:    state <= S_RESOLVE;
        S_RESOLVE: state <= S_COMMIT;
        S_COMMIT:  state <= S_FLIP;
        default:   state <= S_FETCH;
      endcase
    end
  end

  // Instruction register (volatile; refilled by every fetch).
  always_ff @(posedge clk) begin
    if (state == S_DECODE) ir <= rdata[64*pc_slot +: 64];
  end

  // ------------------------------------------------------------- command
  always_comb begin
    cmd      = CMD_IDLE;
    cmd_data = '0;
    cmd.gate = dec.gate;
    cmd.in_par = dec.row1[0];
    unique case (state)
      S_RESTART: begin
        cmd.op   = C_COL;
        cmd.tile = TILE_ALL;
      end
      S_FETCH: begin
        cmd.op   = C_READ;
        cmd.tile = pc_tile;
        cmd.row  = pc_row;
      end
      S_ACT1: if (dec.is_logic) begin
        cmd.op = C_ROW_ACT; cmd.tile = dec.tile; cmd.row = dec.row1;
      end
      S_ACT2: if (dec.is_logic && dec.n_rows == 2'd3) begin
        cmd.op = C_ROW_ACT; cmd.tile = dec.tile; cmd.row = dec.row2;
      end
      S_ACT3: if (dec.is_logic) begin
        cmd.op = C_ROW_ACT; cmd.tile = dec.tile; cmd.row = dec.row3;
      end
      S_EXEC: begin
        cmd.tile = dec.tile;
        cmd.row  = dec.row1;
        if (dec.is_logic) cmd.op = C_LOGIC;
        else if (dec.opc == OP_READ) cmd.op = C_READ;
        else if (dec.opc == OP_WRITE) begin
          cmd.op = C_WRITE; cmd_data = dr;
        end else if (dec.opc == OP_WRITE_IMM) begin
          cmd.op = C_WRITE; cmd_data = imm_row;
        end else if (dec.is_ac) begin
          cmd.op      = C_COL;
          cmd.cbr_set = (dec.opc != OP_AC_REACT);
          cmd_data    = (dec.opc == OP_AC_SET_DR) ? dr : imm_row;
        end
      end
      S_RESOLVE: begin
        cmd.op   = C_ROW_CLR;
        cmd.tile = TILE_ALL;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------- data register
  always_ff @(posedge clk) begin
    if (nv_init) dr <= '0;
    else if (pwr_good && state == S_RESOLVE && dec.opc == OP_READ) dr <= rdata;
  end

  // ---------------------------------------------------- branch registers
  logic            br_we_any;
  logic [BR_W-1:0] br_wdata;
  assign br_we_any = pwr_good && state == S_RESOLVE && dec.is_brw;
  assign br_wdata  = (dec.opc == OP_BR1_DR || dec.opc == OP_BR2_DR) ? dr[BR_W-1:0]
                                                                     : dec.imm[BR_W-1:0];

  branch_unit #(.BR_W(BR_W), .PC_W(PC_W), .OFFS_W(OFFS_W)) u_br (
    .clk      (clk),
    .nv_init  (nv_init),
    .br1_we   (br_we_any && (dec.opc == OP_BR1_DR || dec.opc == OP_BR1_IMM)),
    .br2_we   (br_we_any && (dec.opc == OP_BR2_DR || dec.opc == OP_BR2_IMM)),
    .wdata    (br_wdata),
    .is_branch(dec.is_branch),
    .cond     (dec.cond),
    .pc       (pc),
    .offset   (dec.offset),
    .taken    (taken),
    .next_pc  (next_pc),
    .br1      (br1),
    .br2      (br2)
  );

  // Target is captured before COMMIT so that the BR registers may change in
  // RESOLVE without affecting it.
  always_ff @(posedge clk) begin
    if (state == S_RESOLVE) begin
      next_pc_q <= next_pc;
      taken_q   <= taken;
    end
  end

  // ------------------------------------------------ program counter
  pc_checkpoint #(.PC_W(PC_W)) u_pc (
    .clk      (clk),
    .nv_init  (nv_init),
    .wr_en    (pwr_good && state == S_COMMIT),
    .wr_pc    (next_pc_q),
    .flip     (pwr_good && state == S_FLIP),
    .pc       (pc),
    .parity   (parity),
    .pc_shadow(pc_shadow)
  );

  assign commit   = pwr_good && state == S_FLIP;
  assign restart  = pwr_good && state == S_RESTART;
  assign exec     = pwr_good && state == S_EXEC;
  assign exec_opc = dec.opc;
  assign br_taken = commit && taken_q;

endmodule
