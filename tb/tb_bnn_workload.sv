// tb_bnn_workload -- binarized-neural-network kernel on MOUSE, with power
// failures.
//
// The core of a binarized network layer is popcount(XNOR(x, w)) per
// neuron. This testbench compiles that kernel into MOUSE gate instructions
// and runs it bit-serially: every column of every data array is one neuron
// with its own 16 input bits and 16 weight bits, so arrays 1..3 compute
// 3 x 1,024 neurons at once through the bulk address. Array 0 holds the
// program; its columns are deactivated with a zero mask so that the bulk
// instructions cannot disturb it.
//
// Compilation respects the row-parity rule by keeping every value in an
// even row and every temporary in an odd row:
//   XNOR(a,b):  t1 = NAND(a,b), t2 = OR(a,b), p = NAND(t1,t2)
//   half adder: t1 = NAND(a,c), t2 = OR(a,c), s = AND(t1,t2), c' = NOT(t1)
// and every gate is preceded by a write-immediate preset of its output
// (0 for NAND/NOT, 1 for AND/OR). The 5-bit counter is kept in two row sets
// used alternately.
//
// While the program runs, power is cut for a few clocks at pseudo-random
// moments. The testbench checks each counter against its own popcount for
// all 3,072 neurons, that every cut led to a restart, and that at least one
// interrupted instruction was executed a second time.
module tb_bnn_workload;
  import mouse_pkg::*;
  localparam int COLS = 1024, NIN = 16, K = 5, NARR = 4;

  logic clk = 0, pwr_good = 0, nv_init = 0;
  logic host_we = 0, host_re = 0;
  logic [TILE_W-1:0] host_tile = '0;
  logic [ROW_W-1:0] host_row = '0;
  logic [COLS-1:0] host_wdata = '0, host_rdata;
  logic ext_rd, ext_wr;
  logic [TILE_W-1:0] ext_tile;
  logic [ROW_W-1:0] ext_row;
  logic [COLS-1:0] ext_wdata, dr;
  logic [COLS-1:0] ext_rdata = '0;
  logic [22:0] pc;
  logic parity, commit, restart, exec, br_taken, logic_err;
  logic [31:0] br1, br2;
  opcode_e exec_opc;
  int checks = 0, failures = 0;

  mouse_top #(.N_ARRAYS(NARR)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s @%0t", what, $time); end
  endtask

  function automatic logic [COLS-1:0] rnd();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // ------------------------------------------------------ compiler
  localparam int TX = 0, TW = 32, TP = 64, CA = 66, CB = 76, C0 = 86, C1 = 88;
  localparam int T1 = 101, T2 = 103;
  logic [63:0] prog [$];

  function automatic void emit_m(opcode_e o, int t, int r, logic [31:0] imm);
    prog.push_back({o, 9'(t), 10'(r), 8'd0, imm});
  endfunction
  function automatic void gate(opcode_e o, int a, int b, int out);
    emit_m(OP_WRITE_IMM, 511, out, (o == OP_AND || o == OP_OR) ? '1 : '0);
    prog.push_back({o, 9'd511, 10'(a), 10'(b), 10'(out), 20'd0});
  endfunction

  function automatic void compile();
    int cur = CA, nxt = CB, carry, ncarry;
    emit_m(OP_AC_SET_IM, 511, 0, '1);   // all columns of all arrays ...
    emit_m(OP_AC_SET_IM, 0, 0, '0);     // ... except the program array
    for (int j = 0; j < K; j++) emit_m(OP_WRITE_IMM, 511, CA + 2 * j, '0);
    for (int i = 0; i < NIN; i++) begin
      gate(OP_NAND, TX + 2 * i, TW + 2 * i, T1);
      gate(OP_OR,   TX + 2 * i, TW + 2 * i, T2);
      gate(OP_NAND, T1, T2, TP);
      carry = TP;
      for (int j = 0; j < K; j++) begin
        ncarry = (carry == C0) ? C1 : C0;
        gate(OP_NAND, cur + 2 * j, carry, T1);
        gate(OP_OR,   cur + 2 * j, carry, T2);
        gate(OP_AND,  T1, T2, nxt + 2 * j);
        gate(OP_NOT,  T1, 0, ncarry);
        carry = ncarry;
      end
      {cur, nxt} = {nxt, cur};
    end
    prog.push_back({OP_BEQ, 20'd0, 39'd0});   // BR1 == BR2 == 0: stop here
  endfunction

  // ------------------------------------------------------ monitors
  int n_restart = 0, n_exec = 0, n_commit = 0, n_cuts = 0, n_err = 0;
  always @(posedge clk) begin
    if (restart) n_restart++;
    if (exec) n_exec++;
    if (commit) n_commit++;
    if (logic_err) n_err++;
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  logic [COLS-1:0] xin [NARR][NIN];
  logic [COLS-1:0] win [NARR][NIN];

  initial begin
    int nrows, end_pc, final_res;
    logic [COLS-1:0] row, v;
    compile();
    end_pc = prog.size() - 1;
    final_res = (NIN % 2 == 0) ? CA : CB;
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0;
    nrows = (prog.size() + 15) / 16;
    for (int r = 0; r < nrows; r++) begin
      row = '0;
      for (int s = 0; s < 16; s++) if (16 * r + s < prog.size()) row[64*s +: 64] = prog[16 * r + s];
      host_write(0, r, row);
    end
    for (int a = 1; a < NARR; a++)
      for (int i = 0; i < NIN; i++) begin
        xin[a][i] = rnd(); win[a][i] = rnd();
        host_write(a, TX + 2 * i, xin[a][i]);
        host_write(a, TW + 2 * i, win[a][i]);
      end
    $display("program: %0d instructions in %0d rows", prog.size(), nrows);
    pwr_good = 1;
    // Run with power cuts until the program reaches its final branch.
    while (!(int'(pc) == end_pc && commit)) begin
      @(negedge clk);
      if ($urandom_range(0, 599) == 0) begin
        pwr_good = 0; n_cuts++;
        repeat ($urandom_range(1, 6)) @(negedge clk);
        pwr_good = 1;
      end
    end
    @(negedge clk); pwr_good = 0;
    // Check every neuron.
    for (int a = 1; a < NARR; a++) begin
      logic [K-1:0] cnt [COLS];
      for (int c = 0; c < COLS; c++) cnt[c] = '0;
      for (int j = 0; j < K; j++) begin
        host_read(a, final_res + 2 * j, v);
        for (int c = 0; c < COLS; c++) cnt[c][j] = v[c];
      end
      for (int c = 0; c < COLS; c++) begin
        automatic int pop = 0;
        for (int i = 0; i < NIN; i++) pop += int'(xin[a][i][c] == win[a][i][c]);
        check(int'(cnt[c]) == pop, "popcount of XNOR");
      end
    end
    // The program array is untouched.
    for (int r = 0; r < nrows; r++) begin
      row = '0;
      for (int s = 0; s < 16; s++) if (16 * r + s < prog.size()) row[64*s +: 64] = prog[16 * r + s];
      host_read(0, r, v);
      check(v == row, "program rows unchanged");
    end
    $display("cuts=%0d restarts=%0d reexecuted=%0d commits=%0d", n_cuts, n_restart, n_exec - n_commit, n_commit);
    check(n_cuts >= 3 && n_restart == n_cuts + 1, "restart after every power cut");
    check(n_exec > n_commit, "interrupted instructions re-executed");
    check(n_err == 0, "no parity errors in compiled code");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
