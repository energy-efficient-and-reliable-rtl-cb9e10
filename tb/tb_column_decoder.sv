// tb_column_decoder -- self-checking test of the CBR and one-hot column
// decoder.
//
// Sets random masks, with and without activation, re-activates after a
// power loss and checks CBR and active columns against a reference copy.
module tb_column_decoder;
  localparam int COLS = 1024;
  logic clk = 0, pwr_good = 0, nv_init = 0, set_en = 0, activate = 0;
  logic [COLS-1:0] set_data = '0, cbr, active;
  logic [COLS-1:0] ref_cbr, ref_act;
  int checks = 0, failures = 0;

  column_decoder #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [COLS-1:0] rnd();
    logic [COLS-1:0] v;
    for (int i = 0; i < COLS / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); nv_init = 1;
    @(negedge clk); nv_init = 0; pwr_good = 1;
    ref_cbr = '0; ref_act = '0;
    check(cbr == '0 && active == '0, "init");
    for (int it = 0; it < 200; it++) begin
      automatic int kind = $urandom_range(0, 3);
      @(negedge clk);
      set_data = rnd();
      case (kind)
        0: begin set_en = 1; activate = 1; ref_cbr = set_data; ref_act = set_data; end
        1: begin set_en = 1; activate = 0; ref_cbr = set_data; end
        2: begin set_en = 0; activate = 1; ref_act = ref_cbr; end
        default: begin
          pwr_good = 0; ref_act = '0;
          #1 check(active == '0, "power loss clears");
          check(cbr == ref_cbr, "cbr survives");
        end
      endcase
      @(negedge clk);
      set_en = 0; activate = 0; pwr_good = 1;
      check(cbr == ref_cbr, "cbr");
      check(active == ref_act, "active");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
