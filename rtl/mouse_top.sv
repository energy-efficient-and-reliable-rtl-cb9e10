// mouse_top -- MOUSE, a nonvolatile processing-in-memory accelerator for
// devices that run from harvested energy.
//
// The accelerator is a bank of CRAM arrays (array_bank) that store both the
// program and the data and compute in place with Boolean gates across all
// active columns, plus a small memory controller (memory_controller) that
// fetches, decodes and broadcasts one instruction per fixed-length cycle and
// checkpoints its program counter after every instruction. All architectural
// state is nonvolatile, so the device may lose power at any instant and
// continue where it stopped: on power-up it re-activates the columns of
// every array and re-runs at most the one instruction that had not yet
// committed.
//
// Interface:
//   pwr_good   from the voltage sensing of the energy buffer (not part of
//              this RTL); low = no power. Volatile state is cleared at once.
//   nv_init    factory initialisation of the nonvolatile registers (PC,
//              parity, DR, BR1/BR2, every CBR); use with pwr_good low.
//   host_*     row-wide programming port of the arrays; use with pwr_good
//              low.
//   ext_*      memory-mapped window (tiles N_ARRAYS .. 9'h1FE) to the
//              sensor input buffer and the transmitter output buffer.
//   status     PC, parity, DR, BR1/BR2 and event pulses.
//
// Timing: one instruction every 9 clocks (see memory_controller), plus one
// clock after every power-up for the column re-activation.
//
// pwr_good is used both for asynchronous clears of volatile state and as a
// synchronous enable of every state change; that is intended.
module mouse_top
  import mouse_pkg::*;
#(
  parameter int unsigned N_ARRAYS = 509,
  parameter int unsigned ROWS     = 1024,
  parameter int unsigned COLS     = 1024
) (
  input  logic              clk,
  input  logic              pwr_good,
  input  logic              nv_init,
  // Host programming port.
  input  logic              host_we,
  input  logic              host_re,
  input  logic [TILE_W-1:0] host_tile,
  input  logic [ROW_W-1:0]  host_row,
  input  logic [COLS-1:0]   host_wdata,
  output logic [COLS-1:0]   host_rdata,
  // Sensor / transmitter window.
  output logic              ext_rd,
  output logic              ext_wr,
  output logic [TILE_W-1:0] ext_tile,
  output logic [ROW_W-1:0]  ext_row,
  output logic [COLS-1:0]   ext_wdata,
  input  logic [COLS-1:0]   ext_rdata,
  // Status.
  output logic [TILE_W+ROW_W+$clog2(COLS/64)-1:0] pc,
  output logic              parity,
  output logic [COLS-1:0]   dr,
  output logic [BR_W-1:0]   br1,
  output logic [BR_W-1:0]   br2,
  output logic              commit,
  output logic              restart,
  output logic              exec,
  output opcode_e           exec_opc,
  output logic              br_taken,
  output logic              logic_err
);

  arr_cmd_t        cmd;
  logic [COLS-1:0] cmd_data, rdata;

  memory_controller #(.COLS(COLS)) u_ctrl (
    .clk     (clk),
    .pwr_good(pwr_good),
    .nv_init (nv_init),
    .cmd     (cmd),
    .cmd_data(cmd_data),
    .rdata   (rdata),
    .pc      (pc),
    .parity  (parity),
    .dr      (dr),
    .br1     (br1),
    .br2     (br2),
    .commit  (commit),
    .restart (restart),
    .exec    (exec),
    .exec_opc(exec_opc),
    .br_taken(br_taken)
  );

  array_bank #(.N_ARRAYS(N_ARRAYS), .ROWS(ROWS), .COLS(COLS)) u_bank (
    .clk       (clk),
    .pwr_good  (pwr_good),
    .nv_init   (nv_init),
    .cmd       (cmd),
    .cmd_data  (cmd_data),
    .rdata     (rdata),
    .logic_err (logic_err),
    .ext_rd    (ext_rd),
    .ext_wr    (ext_wr),
    .ext_tile  (ext_tile),
    .ext_row   (ext_row),
    .ext_wdata (ext_wdata),
    .ext_rdata (ext_rdata),
    .host_we   (host_we),
    .host_re   (host_re),
    .host_tile (host_tile),
    .host_row  (host_row),
    .host_wdata(host_wdata),
    .host_rdata(host_rdata)
  );

endmodule
