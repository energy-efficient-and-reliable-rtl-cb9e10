// cram_array -- one computational-RAM (CRAM) array of MOUSE.
//
// An array of ROWS x COLS nonvolatile magnetic cells that is also a SIMD
// machine: every column is a lane, and one command performs the same Boolean
// gate in every active column, reading two input rows and switching one
// output row in place. The peripheral logic is the row decoder with wordline
// latches (row_latch), the one-hot column decoder with its nonvolatile
// bitmask register (column_decoder) and the sense amplifiers used by reads.
//
// Gate model. A gate passes a current from the input cells through the
// output cell; the output cell switches if the current is high enough and
// can only switch in one direction, so the output row must be preset first:
//   NAND, NOR, NOT : preset 0, out <= out | f(in)   (can only go 0 -> 1)
//   AND,  OR       : preset 1, out <= out & f(in)   (can only go 1 -> 0)
// With the right preset this yields f(in); repeating a gate, even after an
// interruption half way, gives the same result (the gates are idempotent).
// NAND and AND follow the design's description; the directions of OR, NOR
// and NOT are this design's choice.
//
// Rows for a gate are latched one by one (C_ROW_ACT). Inputs and output sit
// on opposite bitlines, so the inputs must share a row parity and the output
// must have the other parity; the command's in_par says which bitline drives
// the inputs. If the latched rows do not fit (not exactly one output row, or
// a wrong number of input rows) nothing is switched and logic_err pulses.
// Reads and writes address their row directly through the decoder. Writes
// and gate outputs touch only active columns; reads return the whole row.
// The electrical cell (STT or spin-Hall) is not modelled, only its logic.
//
// Commands (mouse_pkg::arr_cmd_t) act when cmd.tile is TILE_ID or the bulk
// address 9'h1FF; a read with the bulk address is ignored. The host port
// writes or reads whole rows for programming before deployment.
//
// Timing: every command takes effect at the next clock edge; read data
// (rdata) is valid the clock after C_READ or host_re and holds until the next
// read. The cell array and the CBR are nonvolatile; latched rows and active
// columns are cleared whenever pwr_good is low.
//
// pwr_good is used both as an asynchronous clear of volatile state and as a
// synchronous enable of commands (no cell may change without power); that is
// intended.
module cram_array
  import mouse_pkg::*;
#(
  parameter int unsigned ROWS    = 1024,
  parameter int unsigned COLS    = 1024,
  parameter int unsigned TILE_ID = 0
) (
  input  logic             clk,
  input  logic             pwr_good,
  input  logic             nv_init,
  input  arr_cmd_t         cmd,
  input  logic [COLS-1:0]  cmd_data,
  input  logic             host_we,
  input  logic             host_re,
  input  logic [ROW_W-1:0] host_row,
  input  logic [COLS-1:0]  host_wdata,
  output logic [COLS-1:0]  rdata,
  output logic             logic_err
);

  localparam int unsigned RA_W = (ROWS > 1) ? $clog2(ROWS) : 1;

  logic [COLS-1:0] mem [ROWS];

  logic sel, sel_single;
  assign sel        = pwr_good && ((cmd.tile == TILE_W'(TILE_ID)) || (cmd.tile == TILE_ALL));
  assign sel_single = pwr_good && (cmd.tile == TILE_W'(TILE_ID));

  // ---------------------------------------------------------------- rows
  logic [2:0][ROW_W-1:0] slot_row;
  logic [2:0]            slot_vld;

  row_latch #(.ROW_W(ROW_W), .SLOTS(3)) u_rows (
    .clk     (clk),
    .pwr_good(pwr_good),
    .act     (sel && cmd.op == C_ROW_ACT),
    .act_row (cmd.row),
    .clr     (sel && cmd.op == C_ROW_CLR),
    .slot_row(slot_row),
    .slot_vld(slot_vld)
  );

  // ------------------------------------------------------------- columns
  logic [COLS-1:0] cbr, active;

  column_decoder #(.COLS(COLS)) u_cols (
    .clk     (clk),
    .pwr_good(pwr_good),
    .nv_init (nv_init),
    .set_en  (sel && cmd.op == C_COL && cmd.cbr_set),
    .set_data(cmd_data),
    .activate(sel && cmd.op == C_COL),
    .cbr     (cbr),
    .active  (active)
  );

  // --------------------------------------------- classify latched rows
  logic [ROW_W-1:0] in_a, in_b, out_r;
  logic [1:0]       n_in, n_out;

  always_comb begin
    in_a  = '0;
    in_b  = '0;
    out_r = '0;
    n_in  = '0;
    n_out = '0;
    for (int i = 0; i < 3; i++) begin
      if (slot_vld[i]) begin
        if (slot_row[i][0] == cmd.in_par) begin
          if (n_in == 2'd0) in_a = slot_row[i];
          else              in_b = slot_row[i];
          n_in = n_in + 2'd1;
        end else begin
          out_r = slot_row[i];
          n_out = n_out + 2'd1;
        end
      end
    end
  end

  logic gate_ok;
  assign gate_ok = (n_out == 2'd1) &&
                   (n_in == ((cmd.gate == G_NOT) ? 2'd1 : 2'd2));

  // ------------------------------------------------------- gate function
  logic [COLS-1:0] a_v, b_v, o_v, f_v, gate_v;
  logic            up;

  assign a_v = mem[RA_W'(in_a)];
  assign b_v = mem[RA_W'(in_b)];
  assign o_v = mem[RA_W'(out_r)];

  always_comb begin
    unique case (cmd.gate)
      G_NOT:   begin f_v = ~a_v;          up = 1'b1; end
      G_AND:   begin f_v = a_v & b_v;     up = 1'b0; end
      G_NAND:  begin f_v = ~(a_v & b_v);  up = 1'b1; end
      G_OR:    begin f_v = a_v | b_v;     up = 1'b0; end
      default: begin f_v = ~(a_v | b_v);  up = 1'b1; end
    endcase
    gate_v = up ? (o_v | f_v) : (o_v & f_v);
  end

  // ------------------------------------------------------ cell updates
  logic            do_logic, do_write;
  logic [COLS-1:0] wr_row_old;

  assign do_logic   = sel && cmd.op == C_LOGIC && gate_ok;
  assign do_write   = sel && cmd.op == C_WRITE;
  assign wr_row_old = mem[RA_W'(cmd.row)];

  always_ff @(posedge clk) begin
    if (host_we)
      mem[RA_W'(host_row)] <= host_wdata;
    else if (do_write)
      mem[RA_W'(cmd.row)] <= (cmd_data & active) | (wr_row_old & ~active);
    else if (do_logic)
      mem[RA_W'(out_r)] <= (gate_v & active) | (o_v & ~active);
  end

  // Sense amplifiers.
  always_ff @(posedge clk) begin
    if (host_re)
      rdata <= mem[RA_W'(host_row)];
    else if (sel_single && cmd.op == C_READ)
      rdata <= mem[RA_W'(cmd.row)];
  end

  always_ff @(posedge clk or negedge pwr_good) begin
    if (!pwr_good) logic_err <= 1'b0;
    else           logic_err <= sel && cmd.op == C_LOGIC && !gate_ok;
  end

endmodule
