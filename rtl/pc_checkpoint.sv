// pc_checkpoint -- power-fail safe program counter.
//
// The program counter must survive a loss of power at any instant, including
// in the middle of its own update. Two nonvolatile copies, PC0 and PC1, are
// kept together with a nonvolatile parity bit: parity 0 means PC0 is valid,
// parity 1 means PC1 is valid. An update writes the new value only into the
// invalid copy (wr_en) and then flips the parity (flip). The valid copy is
// never written, and the single-bit flip is the atomic commit point of an
// instruction: power lost before the flip re-runs the same instruction, power
// lost after it continues with the next one.
//
// Interface: nv_init clears both copies and the parity (factory
// initialisation). wr_en and flip must not be high in the same clock (an
// assertion checks); both act at the clock edge. None of the state is reset
// by a loss of power.
module pc_checkpoint #(
  parameter int unsigned PC_W = 23
) (
  input  logic            clk,
  input  logic            nv_init,
  input  logic            wr_en,
  input  logic [PC_W-1:0] wr_pc,
  input  logic            flip,
  output logic [PC_W-1:0] pc,
  output logic            parity,
  output logic [PC_W-1:0] pc_shadow
);

  logic [PC_W-1:0] pc0, pc1;

  always_ff @(posedge clk) begin
    if (nv_init) begin
      pc0    <= '0;
      pc1    <= '0;
      parity <= 1'b0;
    end else begin
      if (wr_en) begin
        if (parity) pc0 <= wr_pc;
        else        pc1 <= wr_pc;
      end
      if (flip) parity <= ~parity;
    end
  end

  assign pc        = parity ? pc1 : pc0;
  assign pc_shadow = parity ? pc0 : pc1;

  a_write_before_flip: assert property (@(posedge clk) disable iff (nv_init)
                                        !(wr_en && flip));

endmodule
