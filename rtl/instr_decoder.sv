// instr_decoder -- splits a 64-bit MOUSE instruction into its fields.
//
// The instruction set has four families: memory instructions (read a row
// into the data register, write the data register or an immediate into a
// row), logic instructions (one in-memory gate between rows of an array),
// activate-columns instructions (re-activate, set from DR, set from an
// immediate) and branch instructions with the writes to BR1/BR2 they need.
// The decoder is purely combinational: the fields sit at fixed positions
// (see mouse_pkg) and the family is a compare on the 5-bit opcode.
// Unknown opcodes are flagged `illegal` and run as a no-operation, which is
// this design's choice.
//
// Interface: instr (64 bits) in, dec (mouse_pkg::dec_t) out. No clock.
module instr_decoder
  import mouse_pkg::*;
(
  input  logic [INSTR_W-1:0] instr,
  output dec_t               dec
);

  logic [OPC_W-1:0] opc_raw;
  assign opc_raw = instr[63:59];

  always_comb begin
    dec           = '0;
    dec.tile      = instr[58:50];
    dec.row1      = instr[49:40];
    dec.row2      = instr[39:30];
    dec.row3      = instr[29:20];
    dec.imm       = instr[IMM_W-1:0];
    dec.offset    = instr[58:39];
    dec.gate      = G_NOT;
    dec.cond      = BC_EQ;
    dec.n_rows    = 2'd3;
    dec.opc       = OP_NOP;
    unique case (opc_raw)
      OP_NOP:       dec.opc = OP_NOP;
      OP_READ, OP_WRITE, OP_WRITE_IMM: begin
        dec.opc    = opcode_e'(opc_raw);
        dec.is_mem = 1'b1;
      end
      OP_NOT, OP_AND, OP_NAND, OP_OR, OP_NOR: begin
        dec.opc      = opcode_e'(opc_raw);
        dec.is_logic = 1'b1;
        unique case (opc_raw)
          OP_NOT:  begin dec.gate = G_NOT; dec.n_rows = 2'd2; end
          OP_AND:  dec.gate = G_AND;
          OP_NAND: dec.gate = G_NAND;
          OP_OR:   dec.gate = G_OR;
          default: dec.gate = G_NOR;
        endcase
      end
      OP_AC_REACT, OP_AC_SET_DR, OP_AC_SET_IM: begin
        dec.opc   = opcode_e'(opc_raw);
        dec.is_ac = 1'b1;
      end
      OP_BR1_DR, OP_BR1_IMM, OP_BR2_DR, OP_BR2_IMM: begin
        dec.opc    = opcode_e'(opc_raw);
        dec.is_brw = 1'b1;
      end
      OP_BEQ, OP_BGE, OP_BEQZ: begin
        dec.opc       = opcode_e'(opc_raw);
        dec.is_branch = 1'b1;
        dec.cond      = (opc_raw == OP_BEQ) ? BC_EQ :
                        (opc_raw == OP_BGE) ? BC_GE : BC_EQZ;
      end
      default: dec.illegal = 1'b1;
    endcase
  end

endmodule
