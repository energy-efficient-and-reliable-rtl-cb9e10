// tb_cram_array -- self-checking test of one CRAM array.
//
// A small array (16 rows x 128 columns, tile 3) is driven with random
// writes, reads and in-memory gates under random column masks. A reference
// model in the testbench applies the threshold behaviour of each gate
// column by column (the output switches only in its one direction, only in
// active columns). Also checked: the row-parity rule (bad row sets do
// nothing and raise logic_err), commands to other tiles are ignored, the
// bulk address is obeyed, reads return data one clock later, and a power
// loss clears the active columns and latches but not the cells or the CBR.
module tb_cram_array;
  import mouse_pkg::*;
  localparam int ROWS = 16, COLS = 128, ID = 3;

  logic clk = 0, pwr_good = 0, nv_init = 0;
  arr_cmd_t cmd = CMD_IDLE;
  logic [COLS-1:0] cmd_data = '0, host_wdata = '0, rdata;
  logic host_we = 0, host_re = 0, logic_err;
  logic [ROW_W-1:0] host_row = '0;
  int checks = 0, failures = 0, n_gates = 0, n_err = 0;

  cram_array #(.ROWS(ROWS), .COLS(COLS), .TILE_ID(ID)) dut (.*);

  always #5 clk = ~clk;

  logic [COLS-1:0] ref_mem [ROWS];
  logic [COLS-1:0] ref_act, ref_cbr;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [COLS-1:0] rnd();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic issue(input cmd_op_e op, input logic [8:0] tile, input logic [9:0] row,
                       input gate_e g, input logic par, input logic cset, input logic [COLS-1:0] d);
    @(negedge clk);
    cmd = '{op: op, tile: tile, row: row, gate: g, in_par: par, cbr_set: cset};
    cmd_data = d;
    @(negedge clk);
    cmd = CMD_IDLE;
  endtask

  task automatic read_check(input int r, input logic [8:0] tile);
    issue(C_READ, tile, 10'(r), G_NOT, 0, 0, '0);
    check(rdata == ref_mem[r], "read data");
  endtask

  // Reference gate, column by column.
  function automatic logic [COLS-1:0] ref_gate(gate_e g, logic [COLS-1:0] a, logic [COLS-1:0] b,
                                               logic [COLS-1:0] o, logic [COLS-1:0] act);
    logic [COLS-1:0] r = o;
    for (int c = 0; c < COLS; c++) begin
      if (!act[c]) continue;
      case (g)
        G_NAND: if (!(a[c] && b[c])) r[c] = 1'b1;
        G_AND:  if (!(a[c] && b[c])) r[c] = 1'b0;
        G_NOR:  if (!a[c] && !b[c])  r[c] = 1'b1;
        G_OR:   if (!a[c] && !b[c])  r[c] = 1'b0;
        default: if (!a[c])          r[c] = 1'b1;
      endcase
    end
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Factory initialisation and programming with power off.
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); host_we = 1; host_row = 10'(r); host_wdata = rnd(); ref_mem[r] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    // Host read back.
    @(negedge clk); host_re = 1; host_row = 5;
    @(negedge clk); host_re = 0;
    check(rdata == ref_mem[5], "host read");
    pwr_good = 1;
    ref_cbr = '0; ref_act = '0;

    for (int it = 0; it < 600; it++) begin
      automatic int kind = $urandom_range(0, 9);
      case (kind)
        0: begin  // set and activate a new mask (own tile or bulk)
          automatic logic [COLS-1:0] m = ($urandom_range(0, 2) == 0) ? '1 : rnd();
          issue(C_COL, ($urandom_range(0, 1) != 0) ? 9'(ID) : TILE_ALL, '0, G_NOT, 0, 1, m);
          ref_cbr = m; ref_act = m;
        end
        1: begin  // write
          automatic int r = $urandom_range(0, ROWS - 1);
          automatic logic [COLS-1:0] d = rnd();
          issue(C_WRITE, 9'(ID), 10'(r), G_NOT, 0, 0, d);
          ref_mem[r] = (d & ref_act) | (ref_mem[r] & ~ref_act);
        end
        2: begin  // command for another tile: ignored
          automatic int r = $urandom_range(0, ROWS - 1);
          issue(C_WRITE, 9'(ID + 1), 10'(r), G_NOT, 0, 0, rnd());
          issue(C_COL, 9'(ID + 2), '0, G_NOT, 0, 1, rnd());
        end
        3: read_check($urandom_range(0, ROWS - 1), 9'(ID));
        4: begin  // power loss: actives lost, re-activate from CBR
          automatic int r = $urandom_range(0, ROWS - 1);
          @(negedge clk); pwr_good = 0;
          @(negedge clk); pwr_good = 1;
          ref_act = '0;
          issue(C_WRITE, 9'(ID), 10'(r), G_NOT, 0, 0, rnd());  // no column active
          read_check(r, 9'(ID));
          issue(C_COL, 9'(ID), '0, G_NOT, 0, 0, '0);  // re-activate
          ref_act = ref_cbr;
        end
        5: begin  // bad parity: output row with the inputs' parity
          automatic int a = 2 * $urandom_range(0, ROWS / 2 - 1);
          automatic int b = 2 * $urandom_range(0, ROWS / 2 - 1);
          automatic int o = 2 * $urandom_range(0, ROWS / 2 - 1);
          issue(C_ROW_ACT, 9'(ID), 10'(a), G_NOT, 0, 0, '0);
          issue(C_ROW_ACT, 9'(ID), 10'(b), G_NOT, 0, 0, '0);
          issue(C_ROW_ACT, 9'(ID), 10'(o), G_NOT, 0, 0, '0);
          @(negedge clk);
          cmd = '{op: C_LOGIC, tile: 9'(ID), row: '0, gate: G_NAND, in_par: 1'b0, cbr_set: 1'b0};
          @(negedge clk);
          cmd = CMD_IDLE;
          check(logic_err == 1'b1, "parity error flagged");
          n_err++;
          issue(C_ROW_CLR, 9'(ID), '0, G_NOT, 0, 0, '0);
          for (int r = 0; r < ROWS; r++) read_check(r, 9'(ID));
        end
        default: begin  // a gate, possibly with a wrong preset, on tile or bulk
          automatic gate_e g = gate_e'($urandom_range(0, 4));
          automatic logic par = 1'($urandom);
          automatic int a = 2 * $urandom_range(0, ROWS / 2 - 1) + int'(par);
          automatic int b = 2 * $urandom_range(0, ROWS / 2 - 1) + int'(par);
          automatic int o = 2 * $urandom_range(0, ROWS / 2 - 1) + int'(!par);
          automatic logic [8:0] t = ($urandom_range(0, 1) != 0) ? 9'(ID) : TILE_ALL;
          if ($urandom_range(0, 3) != 0) begin  // preset the output
            automatic logic [COLS-1:0] p = (g == G_AND || g == G_OR) ? '1 : '0;
            issue(C_WRITE, t, 10'(o), G_NOT, 0, 0, p);
            ref_mem[o] = (p & ref_act) | (ref_mem[o] & ~ref_act);
          end
          issue(C_ROW_ACT, t, 10'(a), G_NOT, 0, 0, '0);
          if (g != G_NOT) issue(C_ROW_ACT, t, 10'(b), G_NOT, 0, 0, '0);
          issue(C_ROW_ACT, t, 10'(o), G_NOT, 0, 0, '0);
          issue(C_LOGIC, t, '0, g, par, 0, '0);
          check(logic_err == 1'b0, "no error on legal gate");
          ref_mem[o] = ref_gate(g, ref_mem[a], (g == G_NOT) ? '0 : ref_mem[b], ref_mem[o], ref_act);
          // Repeat: idempotent.
          if ($urandom_range(0, 3) == 0) issue(C_LOGIC, t, '0, g, par, 0, '0);
          issue(C_ROW_CLR, t, '0, G_NOT, 0, 0, '0);
          n_gates++;
          read_check(o, 9'(ID));
        end
      endcase
    end
    // Read with the bulk address is ignored: data stays from the last read.
    read_check(1, 9'(ID));
    issue(C_READ, TILE_ALL, 10'd2, G_NOT, 0, 0, '0);
    check(rdata == ref_mem[1], "bulk read ignored");
    for (int r = 0; r < ROWS; r++) read_check(r, 9'(ID));
    check(n_gates > 50 && n_err > 5, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
