// row_latch -- wordline latches of one CRAM array.
//
// A logic gate needs up to three wordlines open at the same time (two input
// rows and one output row). Instead of a row decoder that can select three
// rows at once, the normal one-row decoder is used three times in a row and
// every activated wordline is held high by a latch until it is released.
// Functionally the latches are modelled as SLOTS latched row addresses:
// each `act` fills the next free slot, `clr` releases them all. Activating a
// fourth row is ignored (the controller never does it; an assertion checks).
//
// The latches are volatile: losing power (pwr_good low) releases every
// wordline, asynchronously.
//
// Timing: a row activated at clock edge n is visible on slot_row/slot_vld
// after edge n, so three activations take three clocks.
//
// pwr_good is used both as an asynchronous clear (the latched rows vanish
// the moment power fails) and in synchronous logic; that is intended.
module row_latch #(
  parameter int unsigned ROW_W = 10,
  parameter int unsigned SLOTS = 3
) (
  input  logic                        clk,
  input  logic                        pwr_good,
  input  logic                        act,
  input  logic [ROW_W-1:0]            act_row,
  input  logic                        clr,
  output logic [SLOTS-1:0][ROW_W-1:0] slot_row,
  output logic [SLOTS-1:0]            slot_vld
);

  logic [SLOTS-1:0] free_onehot;

  // Lowest free slot, one-hot.
  always_comb begin
    free_onehot = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (!slot_vld[i]) free_onehot = SLOTS'(1) << i;
  end

  always_ff @(posedge clk or negedge pwr_good) begin
    if (!pwr_good) begin
      slot_vld <= '0;
      slot_row <= '0;
    end else if (clr) begin
      slot_vld <= '0;
    end else if (act) begin
      for (int i = 0; i < SLOTS; i++)
        if (free_onehot[i]) begin
          slot_vld[i] <= 1'b1;
          slot_row[i] <= act_row;
        end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!pwr_good)
                                  (act && !clr) |-> (free_onehot != '0));

endmodule
