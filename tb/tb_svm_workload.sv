// tb_svm_workload -- the arithmetic of an SVM kernel on MOUSE, with power
// failures.
//
// SVM inference is dominated by the dot product of the input with each
// support vector, and a polynomial kernel then squares that product. This
// testbench compiles both steps into MOUSE gate instructions and runs them
// bit-serially, one column per independent problem, on three data arrays at
// once through the bulk address (3 x 1,024 problems). Each problem is a dot
// product of three pairs of 4-bit unsigned integers (10-bit result),
// followed by the square of that result (20 bits). Array 0 holds the
// program; its columns are masked off with a zero column mask.
//
// Every value is kept in an even row and every temporary in an odd row, so
// each gate has inputs of one parity and an output of the other:
//   partial product:  t = NAND(a,b), p = NOT(t)
//   full adder:       t1 = NAND(a,b), t2 = OR(a,b), x = AND(t1,t2),
//                     t3 = NAND(x,c), t4 = OR(x,c), s = AND(t3,t4),
//                     c' = NAND(t1,t3)
// Every gate is preceded by a write-immediate preset of its output row.
// Multiplication is shift-and-add: for each bit of the multiplier, the
// partial products are added into a fresh accumulator row set by a ripple of
// full adders (the adder's intermediate, the carries and the partial
// products reuse a few fixed rows; accumulators get fresh rows). Missing addend bits read one zero row, the first carry-in
// another, and each accumulator starts in rows of its own that are cleared
// first, so that no gate ever names the same row twice.
//
// While the program runs, power is cut for a few clocks at pseudo-random
// moments. The testbench checks the dot product and its square in every
// column against its own arithmetic, that every cut led to a restart, and
// that interrupted instructions were executed a second time.
module tb_svm_workload;
  import mouse_pkg::*;
  localparam int COLS = 1024, NT = 3, NB = 4, DW = 10, SW = 20, NARR = 4;

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
  localparam int ZERO = 0, PP = 970, XS = 990, C0 = 992, C1 = 994, ZERO_C = 1000, T1 = 1001, T2 = 1003, T3 = 1005, T4 = 1007;
  logic [63:0] prog [$];
  int next_row = 2;            // next free even row

  function automatic int alloc();
    alloc = next_row;
    next_row += 2;
  endfunction

  function automatic void emit_m(opcode_e o, int t, int r, logic [31:0] imm);
    prog.push_back({o, 9'(t), 10'(r), 8'd0, imm});
  endfunction
  function automatic void gate(opcode_e o, int a, int b, int out);
    emit_m(OP_WRITE_IMM, 511, out, (o == OP_AND || o == OP_OR) ? '1 : '0);
    prog.push_back({o, 9'd511, 10'(a), 10'(b), 10'(out), 20'd0});
  endfunction

  // {c_out, s} = a + b + c, all in even rows.
  function automatic void full_add(int a, int b, int c, int s, int c_out);
    int x = XS;
    gate(OP_NAND, a, b, T1);
    gate(OP_OR,   a, b, T2);
    gate(OP_AND,  T1, T2, x);
    gate(OP_NAND, x, c, T3);
    gate(OP_OR,   x, c, T4);
    gate(OP_AND,  T3, T4, s);
    gate(OP_NAND, T1, T3, c_out);
  endfunction

  // acc (W rows) += a (NA rows) * b (NB rows); returns the new row set.
  typedef int rows_t [$];
  function automatic rows_t mac(rows_t acc, rows_t a, rows_t b);
    rows_t cur = acc;
    for (int j = 0; j < b.size(); j++) begin
      rows_t pp, nxt;
      int carry = ZERO_C;
      pp.delete();
      nxt.delete();
      for (int i = 0; i < a.size(); i++) begin
        pp.push_back(PP + 2 * i);
        gate(OP_NAND, a[i], b[j], T1);
        gate(OP_NOT,  T1, 0, pp[i]);
      end
      for (int k = 0; k < cur.size(); k++) begin
        int add = (k >= j && k - j < a.size()) ? pp[k - j] : ZERO;
        int co = (carry == C0) ? C1 : C0;
        nxt.push_back(alloc());
        full_add(cur[k], add, carry, nxt[k], co);
        carry = co;
      end
      cur = nxt;
    end
    return cur;
  endfunction

  // Row map of the inputs, and the rows holding the results.
  rows_t xr [NT], wr [NT], dot_rows, sq_rows;

  function automatic rows_t zeros(int n);
    rows_t r;
    for (int k = 0; k < n; k++) begin
      r.push_back(alloc());
      emit_m(OP_WRITE_IMM, 511, r[k], '0);
    end
    return r;
  endfunction

  function automatic void compile();
    rows_t dcopy;
    emit_m(OP_AC_SET_IM, 511, 0, '1);   // all columns of all arrays ...
    emit_m(OP_AC_SET_IM, 0, 0, '0);     // ... except the program array
    emit_m(OP_WRITE_IMM, 511, ZERO, '0);
    emit_m(OP_WRITE_IMM, 511, ZERO_C, '0);
    for (int t = 0; t < NT; t++)
      for (int b = 0; b < NB; b++) begin
        xr[t].push_back(alloc());
        wr[t].push_back(alloc());
      end
    dot_rows = zeros(DW);
    for (int t = 0; t < NT; t++) dot_rows = mac(dot_rows, xr[t], wr[t]);
    // Copy the dot product (NOT twice) so the square reads two row sets.
    for (int k = 0; k < DW; k++) begin
      dcopy.push_back(alloc());
      gate(OP_NOT, dot_rows[k], 0, T1);
      gate(OP_NOT, T1, 0, dcopy[k]);
    end
    sq_rows = mac(zeros(SW), dot_rows, dcopy);
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
    repeat (2000000) @(posedge clk);
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

  logic [NB-1:0] xv [NARR][COLS][NT];
  logic [NB-1:0] wv [NARR][COLS][NT];

  initial begin
    int nrows, end_pc;
    logic [COLS-1:0] row, v;
    compile();
    end_pc = prog.size() - 1;
    if (next_row > PP) begin
      failures++;
      $display("row map overflows into the temporaries");
    end
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0;
    nrows = (prog.size() + 15) / 16;
    for (int r = 0; r < nrows; r++) begin
      row = '0;
      for (int s = 0; s < 16; s++) if (16 * r + s < prog.size()) row[64*s +: 64] = prog[16 * r + s];
      host_write(0, r, row);
    end
    for (int a = 1; a < NARR; a++) begin
      for (int c = 0; c < COLS; c++)
        for (int t = 0; t < NT; t++) begin
          xv[a][c][t] = NB'($urandom);
          wv[a][c][t] = NB'($urandom);
        end
      for (int t = 0; t < NT; t++)
        for (int b = 0; b < NB; b++) begin
          for (int c = 0; c < COLS; c++) row[c] = xv[a][c][t][b];
          host_write(a, xr[t][b], row);
          for (int c = 0; c < COLS; c++) row[c] = wv[a][c][t][b];
          host_write(a, wr[t][b], row);
        end
    end
    $display("program: %0d instructions in %0d rows, %0d data rows", prog.size(), nrows, next_row / 2);
    pwr_good = 1;
    while (!(int'(pc) == end_pc && commit)) begin
      @(negedge clk);
      if ($urandom_range(0, 1999) == 0) begin
        pwr_good = 0; n_cuts++;
        repeat ($urandom_range(1, 6)) @(negedge clk);
        pwr_good = 1;
      end
    end
    @(negedge clk); pwr_good = 0;
    for (int a = 1; a < NARR; a++) begin
      logic [DW-1:0] dot [COLS];
      logic [SW-1:0] sq [COLS];
      for (int k = 0; k < DW; k++) begin
        host_read(a, dot_rows[k], v);
        for (int c = 0; c < COLS; c++) dot[c][k] = v[c];
      end
      for (int k = 0; k < SW; k++) begin
        host_read(a, sq_rows[k], v);
        for (int c = 0; c < COLS; c++) sq[c][k] = v[c];
      end
      for (int c = 0; c < COLS; c++) begin
        automatic int ref_dot = 0;
        for (int t = 0; t < NT; t++) ref_dot += int'(xv[a][c][t]) * int'(wv[a][c][t]);
        check(int'(dot[c]) == ref_dot, "dot product");
        check(int'(sq[c]) == ref_dot * ref_dot, "square of dot product");
      end
    end
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
