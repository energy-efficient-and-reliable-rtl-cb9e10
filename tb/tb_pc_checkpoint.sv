// tb_pc_checkpoint -- self-checking test of the duplicated program counter.
//
// Steps the PC through write/flip pairs and checks that the valid copy is
// never written, that the valid PC only changes on the flip, and that a
// write without a flip (an interrupted update) leaves the valid PC alone.
module tb_pc_checkpoint;
  localparam int PC_W = 23;
  logic clk = 0, nv_init = 0, wr_en = 0, flip = 0;
  logic [PC_W-1:0] wr_pc = '0, pc, pc_shadow;
  logic parity;
  int checks = 0, failures = 0;

  pc_checkpoint #(.PC_W(PC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s pc=%h par=%b", what, pc, parity); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PC_W-1:0] ref_pc, nxt;
    logic ref_par;
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0;
    ref_pc = '0; ref_par = 0;
    check(pc == 0 && parity == 0, "init");
    for (int it = 0; it < 300; it++) begin
      nxt = PC_W'($urandom);
      @(negedge clk); wr_en = 1; wr_pc = nxt;
      @(negedge clk); wr_en = 0;
      check(pc == ref_pc && parity == ref_par, "valid untouched by write");
      check(pc_shadow == nxt, "shadow written");
      if ($urandom_range(0, 3) != 0) begin
        @(negedge clk); flip = 1;
        @(negedge clk); flip = 0;
        ref_pc = nxt; ref_par = ~ref_par;
        check(pc == ref_pc && parity == ref_par, "commit");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
