// column_decoder -- one-hot column decoder with its column bitmask register.
//
// Which columns of an array take part in writes and logic gates is chosen by
// a bitmask, one bit per column, instead of by column addresses. The mask is
// kept in the column bitmask register (CBR), which is nonvolatile and is
// written like an ordinary memory row. Activating the columns copies the CBR
// into the column enables, which are volatile and are lost with power; after
// a restart a re-activate restores them from the CBR without rewriting it.
//
//   set_en   : CBR <= set_data                          (nonvolatile)
//   activate : active <= CBR (or set_data if set_en is also high)
//   pwr_good low : active <= 0, asynchronously; the CBR keeps its value
//   nv_init  : CBR <= 0 (factory initialisation; this design's choice)
//
// Timing: both take effect at the next clock edge.
module column_decoder #(
  parameter int unsigned COLS = 1024
) (
  input  logic            clk,
  input  logic            pwr_good,
  input  logic            nv_init,
  input  logic            set_en,
  input  logic [COLS-1:0] set_data,
  input  logic            activate,
  output logic [COLS-1:0] cbr,
  output logic [COLS-1:0] active
);

  // Nonvolatile: not cleared by loss of power.
  always_ff @(posedge clk) begin
    if (nv_init)     cbr <= '0;
    else if (set_en) cbr <= set_data;
  end

  // Volatile column enables.
  always_ff @(posedge clk or negedge pwr_good) begin
    if (!pwr_good)     active <= '0;
    else if (activate) active <= set_en ? set_data : cbr;
  end

endmodule
