// tb_branch_unit -- self-checking test of BR1/BR2 and branch resolution.
//
// Writes random (and often equal) values into BR1/BR2 and checks taken and
// next_pc for beq, bge and beqz and for non-branches against a reference.
module tb_branch_unit;
  import mouse_pkg::*;
  localparam int PC_W = 23;
  logic clk = 0, nv_init = 0, br1_we = 0, br2_we = 0, is_branch = 0, taken;
  logic [31:0] wdata = '0, br1, br2;
  br_cond_e cond = BC_EQ;
  logic [PC_W-1:0] pc = '0, next_pc;
  logic [19:0] offset = '0;
  int checks = 0, failures = 0;

  branch_unit #(.BR_W(32), .PC_W(PC_W), .OFFS_W(20)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s br1=%h br2=%h", what, br1, br2); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] a, b;
    longint tgt;
    bit t;
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0;
    check(br1 == 0 && br2 == 0, "init");
    for (int it = 0; it < 400; it++) begin
      a = $urandom_range(0, 3) == 0 ? 0 : $urandom;
      b = $urandom_range(0, 2) == 0 ? a : (($urandom_range(0, 1) != 0) ? $urandom : a + 1);
      @(negedge clk); br1_we = 1; wdata = a;
      @(negedge clk); br1_we = 0; br2_we = 1; wdata = b;
      @(negedge clk); br2_we = 0;
      check(br1 == a && br2 == b, "registers");
      for (int c = 0; c < 4; c++) begin
        is_branch = (c != 3);
        cond = br_cond_e'(c == 3 ? 0 : c);
        pc = PC_W'($urandom);
        offset = 20'($urandom);
        #1;
        t = (c == 0) ? (a == b) : (c == 1) ? (a >= b) : (c == 2) ? (a == 0) : 0;
        tgt = t ? (longint'(pc) + longint'($signed(offset))) : (longint'(pc) + 1);
        check(taken == t, "taken");
        check(next_pc == PC_W'(tgt), "next_pc");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
