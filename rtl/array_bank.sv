// array_bank -- the CRAM arrays of MOUSE and the bus that joins them.
//
// Nearly all of MOUSE is memory: N_ARRAYS identical CRAM arrays, each of
// which may hold instructions or data. The controller drives one command bus
// that reaches every array; an array acts on a command addressed to its own
// tile number or to the bulk address 9'h1FF, so one instruction can run the
// same gate in every array at once. Read data returns through a multiplexer
// selected by the tile of the last read.
//
// Tile addresses from N_ARRAYS up to 9'h1FE are not arrays: they form a
// window to memory-mapped peripherals outside the accelerator (the sensor's
// input buffer and the transmitter's output buffer), which answer reads like
// an array, one clock later, on ext_rdata. Routing the unused addresses this
// way is this design's choice. The default N_ARRAYS = 509 uses every 9-bit
// tile address except the bulk address and two peripheral addresses, about
// 64 MB of cells, the largest memory the design is evaluated with.
//
// The host port reads and writes whole rows of one array (programming before
// deployment and inspection afterwards); it bypasses the controller.
//
// Timing: writes act at the next clock edge; rdata and host_rdata are valid
// one clock after the read was issued.
//
// pwr_good is used both for asynchronous clears inside the arrays and as a
// synchronous enable of commands and peripheral strobes; that is intended.
module array_bank
  import mouse_pkg::*;
#(
  parameter int unsigned N_ARRAYS = 509,
  parameter int unsigned ROWS     = 1024,
  parameter int unsigned COLS     = 1024
) (
  input  logic              clk,
  input  logic              pwr_good,
  input  logic              nv_init,
  input  arr_cmd_t          cmd,
  input  logic [COLS-1:0]   cmd_data,
  output logic [COLS-1:0]   rdata,
  output logic              logic_err,
  // Memory-mapped peripherals (tile >= N_ARRAYS).
  output logic              ext_rd,
  output logic              ext_wr,
  output logic [TILE_W-1:0] ext_tile,
  output logic [ROW_W-1:0]  ext_row,
  output logic [COLS-1:0]   ext_wdata,
  input  logic [COLS-1:0]   ext_rdata,
  // Host programming port.
  input  logic              host_we,
  input  logic              host_re,
  input  logic [TILE_W-1:0] host_tile,
  input  logic [ROW_W-1:0]  host_row,
  input  logic [COLS-1:0]   host_wdata,
  output logic [COLS-1:0]   host_rdata
);

  localparam int unsigned IDX_W = (N_ARRAYS > 1) ? $clog2(N_ARRAYS) : 1;

  logic [COLS-1:0] arr_rdata [N_ARRAYS];
  logic [N_ARRAYS-1:0] arr_err;

  for (genvar g = 0; g < int'(N_ARRAYS); g++) begin : g_arr
    cram_array #(.ROWS(ROWS), .COLS(COLS), .TILE_ID(g)) u_arr (
      .clk       (clk),
      .pwr_good  (pwr_good),
      .nv_init   (nv_init),
      .cmd       (cmd),
      .cmd_data  (cmd_data),
      .host_we   (host_we && host_tile == TILE_W'(g)),
      .host_re   (host_re && host_tile == TILE_W'(g)),
      .host_row  (host_row),
      .host_wdata(host_wdata),
      .rdata     (arr_rdata[g]),
      .logic_err (arr_err[g])
    );
  end

  assign logic_err = |arr_err;

  logic is_ext;
  assign is_ext = (cmd.tile >= TILE_W'(N_ARRAYS)) && (cmd.tile != TILE_ALL);

  assign ext_rd    = pwr_good && is_ext && cmd.op == C_READ;
  assign ext_wr    = pwr_good && is_ext && cmd.op == C_WRITE;
  assign ext_tile  = cmd.tile;
  assign ext_row   = cmd.row;
  assign ext_wdata = cmd_data;

  // Source of the read data: the tile read in the previous clock.
  logic [TILE_W-1:0] rd_tile, host_rd_tile;
  always_ff @(posedge clk) begin
    if (cmd.op == C_READ)   rd_tile      <= cmd.tile;
    if (host_re)            host_rd_tile <= host_tile;
  end

  always_comb begin
    rdata = ext_rdata;
    if (rd_tile < TILE_W'(N_ARRAYS)) rdata = arr_rdata[IDX_W'(rd_tile)];
    host_rdata = '0;
    if (host_rd_tile < TILE_W'(N_ARRAYS)) host_rdata = arr_rdata[IDX_W'(host_rd_tile)];
  end

endmodule
