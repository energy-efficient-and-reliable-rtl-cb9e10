// tb_row_latch -- self-checking test of the wordline latches.
//
// Activates rows one per clock and checks that each lands in the next free
// slot one clock later, that clr releases all slots, and that a power loss
// releases them asynchronously.
module tb_row_latch;
  logic clk = 0, pwr_good = 0, act = 0, clr = 0;
  logic [9:0] act_row = '0;
  logic [2:0][9:0] slot_row;
  logic [2:0] slot_vld;
  int checks = 0, failures = 0;

  row_latch #(.ROW_W(10), .SLOTS(3)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s vld=%b", what, slot_vld); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] r [3];
    #12 pwr_good = 1;
    for (int it = 0; it < 20; it++) begin
      for (int i = 0; i < 3; i++) begin
        r[i] = 10'($urandom);
        @(negedge clk); act = 1; act_row = r[i];
        @(negedge clk); act = 0;
        check(slot_vld == 3'((1 << (i + 1)) - 1), "fill order");
        check(slot_row[i] == r[i], "slot value");
      end
      for (int i = 0; i < 3; i++) check(slot_row[i] == r[i], "held");
      if (it % 2 == 0) begin
        @(negedge clk); clr = 1;
        @(negedge clk); clr = 0;
        check(slot_vld == 3'b000, "clr");
      end else begin
        #2 pwr_good = 0;
        #1 check(slot_vld == 3'b000, "power loss");
        @(negedge clk); pwr_good = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
