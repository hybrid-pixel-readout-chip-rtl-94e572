// time_counter: BCO time counter of one sub-matrix readout.
//
// The BCO clock (0.25-2 us period) sets the time granularity of the events.
// It is asynchronous to the read clock, so it passes a two-flop synchroniser;
// each rising edge gives a one-cycle bc_tick_o in the read-clock domain and
// advances the TS_W-bit time stamp, which wraps around. In the cycle of
// bc_tick_o, ts_o still holds the number of the BC period that just ended;
// that is the stamp the sweep logic gives to the MPs it freezes then.
// Synchroniser, wrap-around and reset to zero are this design's choices.
module time_counter #(
  parameter int TS_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bc_clk_i,
  output logic            bc_tick_o,
  output logic [TS_W-1:0] ts_o
);
  logic [2:0] bc_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_sync <= '0;
      ts_o    <= '0;
    end else begin
      bc_sync <= {bc_sync[1:0], bc_clk_i};
      if (bc_tick_o) ts_o <= ts_o + 1'b1;
    end
  end

  assign bc_tick_o = bc_sync[1] & ~bc_sync[2];
endmodule
