// macro_pixel: one row of N macro pixels (MPs), each of 2 columns x 8 rows
// of binary pixels, side by side and sharing the 8 row lines of the
// column-wide data bus.
//
// Each pixel has a hit latch that is set by its discriminator output while
// its MP is neither frozen nor masked. The fast-OR output of an MP is the OR
// of its 16 latches. The freeze input (a one-cycle request from the sweep
// logic at a BC edge) stops an MP from taking new hits, so hits that arrive
// while it waits for readout are lost. During readout the sweep enables one
// pixel column per clock (col_en_i, col_i); when out_en_i is set the latches
// of that column are put on bus_o. The clear input resets the latches and
// the freeze flag of an MP after it has been read; clear wins over a hit in
// the same cycle.
//
// Interface: hit_i and the latches are [row][column] inside the MP row, so
// MP m owns columns 2m and 2m+1; mask, freeze, clear, fast-OR and frozen
// are one bit per MP. bus_o is combinational from col_i/col_en_i/out_en_i.
//
// Timing: latches sample hit_i on the rising edge of clk (the read clock),
// so a hit pulse must last at least one clock period; the analog latch of
// the real pixel is asynchronous. The 2x8 MP with fast-OR and freeze, and
// the one-column-per-clock bus, follow the chip's architecture. Modelling a
// whole MP row in one module with vector operations (instead of one module
// per MP), the tri-state bus as a column multiplexer, and the mask input
// (how the MP masks held by the slow control are applied) are this design's
// choices.
module macro_pixel
  import fe4d_pkg::*;
#(
  parameter  int N    = 40,              // MPs in the row (80 columns / 2)
  localparam int COLS = N * MP_W,
  localparam int XW   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [MP_H-1:0][COLS-1:0]  hit_i,     // discriminator outputs [row][col]
  input  logic [N-1:0]               mask_i,    // 1: MP ignores hits
  input  logic [N-1:0]               freeze_i,  // freeze request (BC edge)
  input  logic [N-1:0]               clear_i,   // reset after readout
  input  logic                       col_en_i,  // a column is being read
  input  logic [XW-1:0]              col_i,     // which pixel column
  input  logic                       out_en_i,  // this MP row is read in this scan
  output logic [N-1:0]               fast_or_o,
  output logic [N-1:0]               frozen_o,
  output logic [MP_H-1:0]            bus_o      // column bus, one line per row
);
  logic [MP_H-1:0][COLS-1:0] pix_q;
  logic [N-1:0]              frozen_q;
  logic [COLS-1:0]           take_c, clear_c, any_c;

  // per-MP controls spread to its two columns, and the column-wise OR back
  always_comb begin
    any_c = '0;
    for (int r = 0; r < MP_H; r++) any_c |= pix_q[r];
    for (int m = 0; m < N; m++) begin
      take_c[m*MP_W +: MP_W]  = {MP_W{~frozen_q[m] & ~mask_i[m]}};
      clear_c[m*MP_W +: MP_W] = {MP_W{clear_i[m]}};
      fast_or_o[m]            = |any_c[m*MP_W +: MP_W];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix_q    <= '0;
      frozen_q <= '0;
    end else begin
      for (int r = 0; r < MP_H; r++)
        pix_q[r] <= (pix_q[r] | (hit_i[r] & take_c)) & ~clear_c;
      frozen_q <= (frozen_q | freeze_i) & ~clear_i;
    end
  end

  always_comb begin
    for (int r = 0; r < MP_H; r++)
      bus_o[r] = col_en_i && out_en_i && (int'(col_i) < COLS) && pix_q[r][col_i];
  end

  assign frozen_o = frozen_q;
endmodule
