// tb_memory_controller -- self-checking test of the MOUSE controller.
//
// The arrays are replaced by a behavioural row store (reads answer one clock
// later). A short program exercises every instruction family; the testbench
// checks the command broadcast in the EXEC step of each instruction, the
// row activations of the gates, the data register, BR1/BR2, branch targets,
// the fixed 9-clock instruction cycle, the PC commit order, and the restart
// after a power loss: column re-activation to all arrays, then the
// interrupted instruction again.
module tb_memory_controller;
  import mouse_pkg::*;
  localparam int COLS = 128;
  localparam int PC_W = TILE_W + ROW_W + 1;

  logic clk = 0, pwr_good = 0, nv_init = 0;
  arr_cmd_t cmd;
  logic [COLS-1:0] cmd_data, rdata, dr;
  logic [PC_W-1:0] pc;
  logic parity, commit, restart, exec, br_taken;
  logic [31:0] br1, br2;
  opcode_e exec_opc;
  int checks = 0, failures = 0;

  memory_controller #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  // Behavioural row store for tiles 0..7, rows 0..31.
  logic [COLS-1:0] store [256];
  initial for (int i = 0; i < 256; i++) store[i] = '0;
  always_ff @(posedge clk)
    if (cmd.op == C_READ) rdata <= store[{cmd.tile[2:0], cmd.row[4:0]}];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t pc=%0d", what, $time, pc); end
  endtask

  function automatic logic [63:0] enc_l(opcode_e o, int t, int a, int b, int c);
    return {o, 9'(t), 10'(a), 10'(b), 10'(c), 20'd0};
  endfunction
  function automatic logic [63:0] enc_m(opcode_e o, int t, int r, logic [31:0] imm);
    return {o, 9'(t), 10'(r), 8'd0, imm};
  endfunction
  function automatic logic [63:0] enc_b(opcode_e o, int off);
    return {o, 20'(off), 39'd0};
  endfunction

  logic [63:0] prog [18];
  logic [COLS-1:0] row27;
  function automatic logic [COLS-1:0] rep(logic [31:0] v);
    return {(COLS/32){v}};
  endfunction

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: cycle length, commit trace, row activations, EXEC commands.
  int trace[$];
  int last_commit = -1, cyc = 0, n_write_exec = 0, n_restart = 0;
  logic [9:0] acts[$];
  always @(posedge clk) begin
    cyc++;
    if (pwr_good && cmd.op == C_ROW_ACT) acts.push_back(cmd.row);
    if (restart) begin
      check(cmd.op == C_COL && cmd.tile == TILE_ALL && !cmd.cbr_set, "restart re-activation");
      last_commit = -2;
    end
    if (exec) check_exec();
    if (exec && exec_opc == OP_WRITE) n_write_exec++;
    if (restart) n_restart++;
    if (commit) begin
      if (last_commit >= 0) check(cyc - last_commit == 9, "9-clock instruction cycle");
      if (last_commit == -2) check(1, "restart");
      last_commit = cyc;
      trace.push_back(int'(pc));
      acts.delete();
    end
  end

  task automatic check_exec();
    logic [63:0] w = prog[5'(pc)];
    case (opcode_e'(w[63:59]))
      OP_READ:  check(cmd.op == C_READ && cmd.tile == w[58:50] && cmd.row == w[49:40], "read cmd");
      OP_WRITE: check(cmd.op == C_WRITE && cmd.tile == w[58:50] && cmd.row == w[49:40] && cmd_data == dr, "write cmd");
      OP_WRITE_IMM: check(cmd.op == C_WRITE && cmd_data == rep(w[31:0]), "write imm cmd");
      OP_NAND: begin
        check(cmd.op == C_LOGIC && cmd.gate == G_NAND && cmd.in_par == w[40], "nand cmd");
        check(acts.size() == 3 && acts[0] == w[49:40] && acts[1] == w[39:30] && acts[2] == w[29:20], "nand rows");
      end
      OP_NOT: begin
        check(cmd.op == C_LOGIC && cmd.gate == G_NOT, "not cmd");
        check(acts.size() == 2 && acts[0] == w[49:40] && acts[1] == w[29:20], "not rows");
      end
      OP_AC_SET_IM: check(cmd.op == C_COL && cmd.cbr_set && cmd.tile == w[58:50] && cmd_data == rep(w[31:0]), "ac imm");
      OP_AC_SET_DR: check(cmd.op == C_COL && cmd.cbr_set && cmd_data == dr, "ac dr");
      OP_AC_REACT:  check(cmd.op == C_COL && !cmd.cbr_set, "ac react");
      default: check(cmd.op == C_NONE, "no array op");
    endcase
  endtask

  initial begin
    int exp_trace[$];
    row27 = {$urandom, $urandom, $urandom, 32'h0000_0005};
    prog[0]  = enc_m(OP_BR1_IMM, 0, 0, 32'd7);
    prog[1]  = enc_m(OP_BR2_IMM, 0, 0, 32'd5);
    prog[2]  = enc_m(OP_READ, 2, 27, 0);
    prog[3]  = enc_m(OP_WRITE, 4, 9, 0);
    prog[4]  = enc_m(OP_WRITE_IMM, 4, 10, 32'hA5A5_0F0F);
    prog[5]  = enc_l(OP_NAND, 5, 2, 4, 7);
    prog[6]  = enc_l(OP_NOT, 5, 3, 0, 6);
    prog[7]  = enc_m(OP_AC_SET_IM, 511, 0, 32'hFFFF_0000);
    prog[8]  = enc_m(OP_AC_SET_DR, 3, 0, 0);
    prog[9]  = enc_m(OP_AC_REACT, 3, 0, 0);
    prog[10] = enc_b(OP_BGE, 3);              // 7 >= 5: taken -> 13
    prog[11] = enc_m(OP_WRITE_IMM, 9, 1, 1);  // skipped
    prog[12] = enc_m(OP_WRITE_IMM, 9, 1, 1);  // skipped
    prog[13] = enc_m(OP_BR1_DR, 0, 0, 0);     // BR1 = 5
    prog[14] = enc_b(OP_BEQZ, 3);             // not taken
    prog[15] = enc_b(OP_BEQ, -15);            // 5 == 5: taken -> 0
    prog[16] = enc_b(OP_BEQ, 0);
    prog[17] = 0;
    // Instructions: tile 0, row r holds pcs 2r and 2r+1 (slot 0 = bits 63:0).
    for (int r = 0; r < 9; r++) store[8'(r)] = {prog[2*r+1], prog[2*r]};
    store[{3'd2, 5'd27}] = row27;

    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0; pwr_good = 1;
    // First pass through the program, then one more after the loop-back.
    wait (trace.size() == 14);
    exp_trace = '{0,1,2,3,4,5,6,7,8,9,10,13,14,15};
    for (int i = 0; i < 14; i++) check(trace[i] == exp_trace[i], "commit order with branches");
    check(dr == row27, "DR loaded by read");
    check(br1 == 32'd5 && br2 == 32'd5, "BR1/BR2");
    check(pc == 0 && dut.parity == (14 % 2 == 1), "PC back at 0, parity");
    // Power loss during the WRITE at pc 3, after its EXEC, before commit.
    wait (pc == 3 && int'(dut.state) == 7);
    @(negedge clk); pwr_good = 0;
    repeat (3) @(negedge clk);
    pwr_good = 1;
    wait (trace.size() == 14 + 4);
    check(trace[14] == 0 && trace[15] == 1 && trace[16] == 2 && trace[17] == 3, "interrupted instr re-run");
    check(last_commit > 0, "committed after restart");
    check(n_write_exec == 3, "interrupted WRITE executed twice");
    check(n_restart == 2, "two restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
