// tb_instr_decoder -- self-checking test of the MOUSE instruction decoder.
//
// Builds instructions field by field at the documented bit positions and
// checks every decoded field and the instruction family against an
// independent table of opcodes, for every 5-bit opcode and random fields.
module tb_instr_decoder;
  import mouse_pkg::*;

  logic [63:0] instr;
  dec_t        dec;
  int checks = 0, failures = 0;

  instr_decoder dut (.instr(instr), .dec(dec));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s instr=%h", what, instr);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 32; o++) begin
      for (int k = 0; k < 20; k++) begin
        logic [8:0]  t;
        logic [9:0]  r1, r2, r3;
        logic [19:0] low;
        int fam;  // 0 nop 1 mem 2 logic 3 ac 4 brw 5 branch 6 illegal
        t = 9'($urandom); r1 = 10'($urandom); r2 = 10'($urandom); r3 = 10'($urandom);
        low = 20'($urandom);
        instr = {o[4:0], t, r1, r2, r3, low};
        #1;
        fam = (o == 0) ? 0 : (o <= 3) ? 1 : (o <= 8) ? 2 : (o <= 11) ? 3 :
              (o <= 15) ? 4 : (o <= 18) ? 5 : 6;
        check(dec.tile == t && dec.row1 == r1 && dec.row2 == r2 && dec.row3 == r3, "fields");
        check(dec.imm == {r2[1:0], r3, low}, "imm");
        check(dec.offset == {t, r1, r2[9]}, "offset");
        check(dec.is_mem == (fam == 1) && dec.is_logic == (fam == 2) && dec.is_ac == (fam == 3) &&
              dec.is_brw == (fam == 4) && dec.is_branch == (fam == 5) && dec.illegal == (fam == 6),
              "family");
        if (fam != 6) check(int'(dec.opc) == o, "opcode");
        if (o == 4) check(dec.gate == G_NOT && dec.n_rows == 2, "not");
        if (o == 5) check(dec.gate == G_AND && dec.n_rows == 3, "and");
        if (o == 6) check(dec.gate == G_NAND, "nand");
        if (o == 7) check(dec.gate == G_OR, "or");
        if (o == 8) check(dec.gate == G_NOR, "nor");
        if (o == 16) check(dec.cond == BC_EQ, "beq");
        if (o == 17) check(dec.cond == BC_GE, "bge");
        if (o == 18) check(dec.cond == BC_EQZ, "beqz");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
