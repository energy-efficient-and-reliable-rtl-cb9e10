// tb_array_bank -- self-checking test of the array bank and its bus.
//
// Four small arrays (16 x 128) plus a behavioural peripheral at the tile
// addresses above them. Checks host programming and read-back of each
// array, that a command reaches only its tile, that the bulk address reaches
// every array, that reads return the addressed array one clock later, that
// peripheral tiles are routed to the external port, and that a gate error
// in any array shows on logic_err.
module tb_array_bank;
  import mouse_pkg::*;
  localparam int N = 4, ROWS = 16, COLS = 128;

  logic clk = 0, pwr_good = 0, nv_init = 0;
  arr_cmd_t cmd = CMD_IDLE;
  logic [COLS-1:0] cmd_data = '0, rdata, ext_wdata, ext_rdata, host_wdata = '0, host_rdata;
  logic logic_err, ext_rd, ext_wr, host_we = 0, host_re = 0;
  logic [TILE_W-1:0] ext_tile, host_tile = '0;
  logic [ROW_W-1:0] ext_row, host_row = '0;
  int checks = 0, failures = 0;

  array_bank #(.N_ARRAYS(N), .ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  // Peripheral: one row per tile address, answers one clock later.
  logic [COLS-1:0] periph [512];
  int n_ext_wr = 0;
  always_ff @(posedge clk) begin
    if (ext_rd) ext_rdata <= periph[ext_tile];
    if (ext_wr) begin periph[ext_tile] <= ext_wdata; n_ext_wr++; end
  end

  logic [COLS-1:0] ref_mem [N][ROWS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [COLS-1:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic issue(input cmd_op_e op, input int tile, input int row, input logic cset,
                       input logic [COLS-1:0] d);
    @(negedge clk);
    cmd = '{op: op, tile: 9'(tile), row: 10'(row), gate: G_NAND, in_par: 1'b0, cbr_set: cset};
    cmd_data = d;
    @(negedge clk);
    cmd = CMD_IDLE;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) periph[i] = rnd();
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0;
    for (int a = 0; a < N; a++)
      for (int r = 0; r < ROWS; r++) begin
        @(negedge clk); host_we = 1; host_tile = 9'(a); host_row = 10'(r);
        host_wdata = rnd(); ref_mem[a][r] = host_wdata;
      end
    @(negedge clk); host_we = 0;
    for (int it = 0; it < 20; it++) begin
      automatic int a = $urandom_range(0, N - 1);
      automatic int r = $urandom_range(0, ROWS - 1);
      @(negedge clk); host_re = 1; host_tile = 9'(a); host_row = 10'(r);
      @(negedge clk); host_re = 0;
      check(host_rdata == ref_mem[a][r], "host read");
    end
    pwr_good = 1;
    // Bulk: activate all columns everywhere, then a bulk write of row 3.
    issue(C_COL, 511, 0, 1'b1, '1);
    begin
      automatic logic [COLS-1:0] d = rnd();
      issue(C_WRITE, 511, 3, 1'b0, d);
      for (int a = 0; a < N; a++) ref_mem[a][3] = d;
    end
    // Single-tile writes.
    for (int it = 0; it < 40; it++) begin
      automatic int a = $urandom_range(0, N - 1);
      automatic int r = $urandom_range(0, ROWS - 1);
      automatic logic [COLS-1:0] d = rnd();
      issue(C_WRITE, a, r, 1'b0, d);
      ref_mem[a][r] = d;
    end
    // Read everything back through the controller path.
    for (int a = 0; a < N; a++)
      for (int r = 0; r < ROWS; r++) begin
        issue(C_READ, a, r, 1'b0, '0);
        check(rdata == ref_mem[a][r], "read");
      end
    // Peripheral window.
    for (int it = 0; it < 10; it++) begin
      automatic int t = $urandom_range(N, 510);
      automatic logic [COLS-1:0] d = rnd();
      issue(C_READ, t, 0, 1'b0, '0);
      check(rdata == periph[t], "peripheral read");
      issue(C_WRITE, t, 0, 1'b0, d);
      check(periph[t] == d, "peripheral write");
    end
    check(n_ext_wr == 10, "bulk and array writes stay off the window");
    // Gate error in array 2 (three even rows).
    issue(C_ROW_ACT, 2, 0, 1'b0, '0);
    issue(C_ROW_ACT, 2, 2, 1'b0, '0);
    issue(C_ROW_ACT, 2, 4, 1'b0, '0);
    @(negedge clk);
    cmd = '{op: C_LOGIC, tile: 9'd2, row: '0, gate: G_NAND, in_par: 1'b0, cbr_set: 1'b0};
    @(negedge clk); cmd = CMD_IDLE;
    check(logic_err, "logic_err from array 2");
    @(negedge clk);
    check(!logic_err, "logic_err is a pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
