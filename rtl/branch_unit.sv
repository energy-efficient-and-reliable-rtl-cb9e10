// branch_unit -- branch registers and branch resolution of the controller.
//
// Branches are resolved next to the memory controller, not in the arrays.
// Two nonvolatile registers, BR1 and BR2, hold the operands; they are written
// by dedicated instructions from the data register or from an immediate
// (the caller selects the source and presents it on wdata). Three conditions
// are supported: beq (BR1 == BR2), bge (BR1 >= BR2) and beqz (BR1 == 0).
// A taken branch moves the PC by a signed offset counted in instructions
// from the branch itself; otherwise the PC advances by one. Treating the
// offset as signed and PC-relative, and comparing unsigned in bge, are this
// design's choices.
//
// Timing: BR writes act at the clock edge; taken/next_pc are combinational
// from the current registers, pc, cond, offset. nv_init clears BR1/BR2;
// losing power does not.
module branch_unit
  import mouse_pkg::br_cond_e, mouse_pkg::BC_EQ, mouse_pkg::BC_GE;
#(
  parameter int unsigned BR_W   = 32,
  parameter int unsigned PC_W   = 23,
  parameter int unsigned OFFS_W = 20
) (
  input  logic              clk,
  input  logic              nv_init,
  input  logic              br1_we,
  input  logic              br2_we,
  input  logic [BR_W-1:0]   wdata,
  input  logic              is_branch,
  input  br_cond_e          cond,
  input  logic [PC_W-1:0]   pc,
  input  logic [OFFS_W-1:0] offset,
  output logic              taken,
  output logic [PC_W-1:0]   next_pc,
  output logic [BR_W-1:0]   br1,
  output logic [BR_W-1:0]   br2
);

  always_ff @(posedge clk) begin
    if (nv_init) begin
      br1 <= '0;
      br2 <= '0;
    end else begin
      if (br1_we) br1 <= wdata;
      if (br2_we) br2 <= wdata;
    end
  end

  always_comb begin
    unique case (cond)
      BC_EQ:   taken = is_branch && (br1 == br2);
      BC_GE:   taken = is_branch && (br1 >= br2);
      default: taken = is_branch && (br1 == '0);
    endcase
  end

  logic [PC_W-1:0] offs_ext;
  assign offs_ext = PC_W'($signed(offset));
  assign next_pc  = taken ? (pc + offs_ext) : (pc + PC_W'(1));

endmodule
