// pixel_matrix: one sub-matrix of binary pixels organised in macro pixels.
//
// COLS x ROWS pixels are grouped into (COLS/2) x (ROWS/8) macro pixels. All
// pixels of a row share one column-wide data bus: the sweep logic enables
// one column per clock (col_en_i, col_i) and, through out_en_i, the MP rows
// that belong to the scan in progress; those pixels put their latches on
// bus_o in the same cycle (combinational path, sampled by the sparsifiers at
// the next clock edge). Per-MP fast-OR and frozen flags go to the sweep
// logic; per-MP freeze and clear requests come back from it. The matrix is
// built from one macro_pixel row (NMPX macro pixels) per 8 pixel rows.
//
// The shared bus, the fast-OR and freeze lines and the one-column-per-clock
// readout follow the chip's architecture; modelling the tri-state bus as a
// column multiplexer is this design's choice.
module pixel_matrix
  import fe4d_pkg::*;
#(
  parameter int COLS = 80,
  parameter int ROWS = 256,
  localparam int NMPX = COLS / MP_W,
  localparam int NMPY = ROWS / MP_H,
  localparam int XW   = $clog2(COLS)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [ROWS-1:0][COLS-1:0]  hit_i,      // [row][column]
  input  logic [NMPY-1:0][NMPX-1:0]  mask_i,
  input  logic [NMPY-1:0][NMPX-1:0]  freeze_i,
  input  logic [NMPY-1:0][NMPX-1:0]  clear_i,
  input  logic                       col_en_i,
  input  logic [XW-1:0]              col_i,
  input  logic [NMPY-1:0]            out_en_i,
  output logic [NMPY-1:0][NMPX-1:0]  fast_or_o,
  output logic [NMPY-1:0][NMPX-1:0]  frozen_o,
  output logic [ROWS-1:0]            bus_o
);
  for (genvar my = 0; my < NMPY; my++) begin : g_row
    macro_pixel #(.N(NMPX)) u_mp (
      .clk       (clk),
      .rst_n     (rst_n),
      .hit_i     (hit_i[my*MP_H +: MP_H]),
      .mask_i    (mask_i[my]),
      .freeze_i  (freeze_i[my]),
      .clear_i   (clear_i[my]),
      .col_en_i  (col_en_i),
      .col_i     (col_i),
      .out_en_i  (out_en_i[my]),
      .fast_or_o (fast_or_o[my]),
      .frozen_o  (frozen_o[my]),
      .bus_o     (bus_o[my*MP_H +: MP_H])
    );
  end
endmodule
