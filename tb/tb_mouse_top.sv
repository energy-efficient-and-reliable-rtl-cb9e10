// tb_mouse_top -- end-to-end test of the MOUSE accelerator.
//
// The top runs with full-size arrays (1,024 x 1,024 cells) but only four
// of them, to keep the simulator build short. The testbench programs an instruction array (tile 0) and a weight
// row in array 2 through the host port, then powers the device up. The
// program:
//   - polls the sensor's valid word (memory-mapped at tile 509) with
//     read / BR1 <- DR / beqz until the sensor says data is ready,
//   - reads the 1,024-bit binary input from the sensor and the weights from
//     array 2 into array 1 through the data register,
//   - activates all columns of every array with one bulk instruction,
//   - computes the binarized-network product XNOR(input, weight) in memory
//     in all 1,024 columns: NAND and OR into preset rows, then NAND of the
//     two (each gate respects the row-parity rule),
//   - sends the result row to the transmitter buffer (tile 510),
//   - narrows the active columns with a mask and writes through it,
//   - issues one gate whose rows break the parity rule (must do nothing),
//   - branches with bge / beq and ends in a branch-to-self.
// Power is cut twice while it runs, once between EXEC and commit and once
// during row activation. The testbench checks the transmitted result
// against its own XNOR, the masked write, the untouched rows, BR1/BR2, the
// 9-clock instruction cycle, and counts each mechanism: restart, re-executed
// instruction, sensor poll loop, taken branch, not-taken branch, bulk
// activation, partial column mask, parity error, peripheral read and write.
module tb_mouse_top;
  import mouse_pkg::*;
  localparam int COLS = 1024;
  localparam int SENSOR = 509, XMIT = 510;

  logic clk = 0, pwr_good = 0, nv_init = 0;
  logic host_we = 0, host_re = 0;
  logic [TILE_W-1:0] host_tile = '0;
  logic [ROW_W-1:0] host_row = '0;
  logic [COLS-1:0] host_wdata = '0, host_rdata;
  logic ext_rd, ext_wr;
  logic [TILE_W-1:0] ext_tile;
  logic [ROW_W-1:0] ext_row;
  logic [COLS-1:0] ext_wdata, ext_rdata, dr;
  logic [22:0] pc;
  logic parity, commit, restart, exec, br_taken, logic_err;
  logic [31:0] br1, br2;
  opcode_e exec_opc;
  int checks = 0, failures = 0;

  mouse_top #(.N_ARRAYS(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t pc=%0d", what, $time, pc); end
  endtask

  function automatic logic [COLS-1:0] rnd();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // ------------------------------------------- sensor and transmitter
  logic [COLS-1:0] sensor_data, sensor_valid, xmit_row0;
  int n_sensor_rd = 0, n_xmit_wr = 0;
  always_ff @(posedge clk) begin
    if (ext_rd) begin
      n_sensor_rd++;
      ext_rdata <= (ext_tile == 9'(SENSOR)) ? ((ext_row == 0) ? sensor_data : sensor_valid) : '0;
    end
    if (ext_wr && ext_tile == 9'(XMIT) && ext_row == 0) begin
      xmit_row0 <= ext_wdata;
      n_xmit_wr++;
    end
  end

  // ------------------------------------------------------- program
  function automatic logic [63:0] enc_l(opcode_e o, int t, int a, int b, int c);
    return {o, 9'(t), 10'(a), 10'(b), 10'(c), 20'd0};
  endfunction
  function automatic logic [63:0] enc_m(opcode_e o, int t, int r, logic [31:0] imm);
    return {o, 9'(t), 10'(r), 8'd0, imm};
  endfunction
  function automatic logic [63:0] enc_b(opcode_e o, int off);
    return {o, 20'(off), 39'd0};
  endfunction

  localparam int NPROG = 28;
  logic [63:0] prog [NPROG];
  initial begin
    prog[0]  = enc_m(OP_NOP, 0, 0, 0);
    prog[1]  = enc_m(OP_READ, SENSOR, 1, 0);          // valid word -> DR
    prog[2]  = enc_m(OP_BR1_DR, 0, 0, 0);
    prog[3]  = enc_b(OP_BEQZ, -2);                    // poll
    prog[4]  = enc_m(OP_READ, SENSOR, 0, 0);          // input bits -> DR
    prog[5]  = enc_m(OP_AC_SET_IM, 511, 0, '1);       // all columns, all arrays
    prog[6]  = enc_m(OP_WRITE, 1, 0, 0);              // a (row 0, even)
    prog[7]  = enc_m(OP_READ, 2, 8, 0);               // weights -> DR
    prog[8]  = enc_m(OP_WRITE, 1, 2, 0);              // b (row 2, even)
    prog[9]  = enc_m(OP_WRITE_IMM, 1, 1, 32'h0);      // preset NAND out
    prog[10] = enc_m(OP_WRITE_IMM, 1, 3, '1);         // preset OR out
    prog[11] = enc_m(OP_WRITE_IMM, 1, 4, 32'h0);      // preset final NAND out
    prog[12] = enc_l(OP_NAND, 1, 0, 2, 1);
    prog[13] = enc_l(OP_OR, 1, 0, 2, 3);
    prog[14] = enc_l(OP_NAND, 1, 1, 3, 4);            // row 4 = XNOR(a, b)
    prog[15] = enc_m(OP_READ, 1, 4, 0);
    prog[16] = enc_m(OP_WRITE, XMIT, 0, 0);           // to transmitter
    prog[17] = enc_m(OP_AC_SET_IM, 1, 0, 32'h0000_FFFF);
    prog[18] = enc_m(OP_WRITE_IMM, 1, 5, '1);         // masked write
    prog[19] = enc_m(OP_AC_REACT, 1, 0, 0);
    prog[20] = enc_l(OP_NOT, 1, 5, 0, 7);             // parity violation
    prog[21] = enc_m(OP_BR1_IMM, 0, 0, 32'd3);
    prog[22] = enc_m(OP_BR2_IMM, 0, 0, 32'd2);
    prog[23] = enc_b(OP_BGE, 2);                      // taken -> 25
    prog[24] = enc_m(OP_WRITE_IMM, 1, 6, '1);         // skipped
    prog[25] = enc_b(OP_BEQ, 5);                      // 3 != 2: not taken
    prog[26] = enc_m(OP_BR2_IMM, 0, 0, 32'd3);
    prog[27] = enc_b(OP_BEQ, 0);                      // halt: branch to self
  end

  // --------------------------------------------------------- monitors
  int n_commit = 0, n_exec = 0, n_restart = 0, n_taken = 0, n_not_taken = 0, n_err = 0;
  int n_poll = 0, n_bulk = 0, n_mask = 0, last_commit = -1, cyc = 0, halt_seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (exec) n_exec++;
    if (restart) begin n_restart++; last_commit = -1; end
    if (logic_err) n_err++;
    if (exec && dut.u_ctrl.cmd.op == C_COL && dut.u_ctrl.cmd.tile == TILE_ALL) n_bulk++;
    if (exec && dut.u_ctrl.cmd.op == C_COL && dut.u_ctrl.cmd.cbr_set &&
        dut.u_ctrl.cmd_data != '1 && dut.u_ctrl.cmd_data != '0) n_mask++;
    if (commit) begin
      n_commit++;
      if (last_commit >= 0) check(cyc - last_commit == 9, "9-clock cycle");
      last_commit = cyc;
      if (int'(pc) == 3 && br_taken) n_poll++;
      if (int'(pc) == 27) halt_seen++;
      if (dut.u_ctrl.dec.is_branch) begin
        if (br_taken) n_taken++;
        else n_not_taken++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input int t, input int r, input logic [COLS-1:0] d);
    @(negedge clk); host_we = 1; host_tile = 9'(t); host_row = 10'(r); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask
  task automatic host_read(input int t, input int r, output logic [COLS-1:0] d);
    @(negedge clk); host_re = 1; host_tile = 9'(t); host_row = 10'(r);
    @(negedge clk); host_re = 0; d = host_rdata;
  endtask

  initial begin
    logic [COLS-1:0] weights, r5_init, r6_init, r7_init, v, exp_r5;
    sensor_data  = rnd();
    sensor_valid = '0;
    weights = rnd(); r5_init = rnd(); r6_init = rnd(); r7_init = rnd();
    // Factory state and programming, power off.
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0;
    for (int r = 0; r < 2; r++) begin
      automatic logic [COLS-1:0] row = '0;
      for (int s = 0; s < 16; s++) if (16 * r + s < NPROG) row[64*s +: 64] = prog[16 * r + s];
      host_write(0, r, row);
    end
    host_write(2, 8, weights);
    host_write(1, 5, r5_init);
    host_write(1, 6, r6_init);
    host_write(1, 7, r7_init);
    pwr_good = 1;

    // Sensor becomes valid after a few polls.
    repeat (150) @(posedge clk);
    sensor_valid = {{(COLS-1){1'b0}}, 1'b1};

    // Power cut between EXEC and commit of the final NAND (pc 14).
    wait (int'(pc) == 14 && int'(dut.u_ctrl.state) == 7);
    @(negedge clk); pwr_good = 0;
    repeat (5) @(negedge clk); pwr_good = 1;
    // Power cut during row activation of the parity-violating NOT (pc 20).
    wait (int'(pc) == 20 && int'(dut.u_ctrl.state) == 4);
    #1 pwr_good = 0;
    repeat (4) @(negedge clk); pwr_good = 1;

    wait (halt_seen >= 2);
    @(negedge clk); pwr_good = 0;

    check(xmit_row0 == ~(sensor_data ^ weights), "transmitted XNOR result");
    host_read(1, 4, v);
    check(v == ~(sensor_data ^ weights), "XNOR row in array 1");
    host_read(1, 0, v);
    check(v == sensor_data, "input copied into array 1");
    for (int i = 0; i < COLS; i++) exp_r5[i] = ((i % 32) < 16) ? 1'b1 : r5_init[i];
    host_read(1, 5, v);
    check(v == exp_r5, "masked write");
    host_read(1, 6, v);
    check(v == r6_init, "skipped instruction left row 6");
    host_read(1, 7, v);
    check(v == r7_init, "parity-violating gate left row 7");
    check(br1 == 3 && br2 == 3, "BR1/BR2");
    check(dut.u_bank.g_arr[3].u_arr.u_cols.cbr == '1, "bulk CBR set in array 3");

    $display("restarts=%0d reexec=%0d polls=%0d taken=%0d not_taken=%0d bulk=%0d mask=%0d err=%0d ext_rd=%0d ext_wr=%0d",
             n_restart, n_exec - n_commit, n_poll, n_taken, n_not_taken, n_bulk, n_mask, n_err,
             n_sensor_rd, n_xmit_wr);
    check(n_restart == 3, "restart after each power-up");
    check(n_exec - n_commit >= 1, "interrupted instruction re-executed");
    check(n_poll >= 2, "sensor poll loop");
    check(n_taken >= 3 && n_not_taken >= 2, "branches taken and not taken");
    check(n_bulk >= 1, "bulk activation");
    check(n_mask >= 1, "partial column mask");
    check(n_err == 1, "one parity error");
    check(n_sensor_rd >= 3 && n_xmit_wr == 1, "peripheral window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
