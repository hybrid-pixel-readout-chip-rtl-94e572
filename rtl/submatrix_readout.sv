// submatrix_readout: one sub-matrix of pixels with its own sweep readout.
//
// Chain, all on the read clock except the output side of the level-1
// barrel:
//   pixel_matrix -> (fast-OR) -> sweep_logic, with time_counter and
//   scan_buffer; the sweep enables one column per clock; the column bus is
//   cut into N_SPARS slices of ZPS zones, each read by a zone_sparsifier
//   into its barrel_l2; the concentrator merges the level-2 barrels into
//   the barrel_l1, which is read on the fast clock by the output stage.
// Each sub-matrix readout works in parallel with the others. Rows are
// N_SPARS*ZPS*8: 256 for the full matrix (ZPS = 8 zones per sparsifier).
//
// Status outputs (read clock, one-cycle pulses unless noted) feed the slow
// control's flags and rate counters: sb_ovf_o (an edge found the scan buffer
// full), b2_drop_o (hits lost in a level-2 barrel), b1_drop_o (hit lost at
// the level-1 barrel), hit_wr_o (hit word written to the level-1 barrel),
// busy_o and fast_or_o (levels).
module submatrix_readout
  import fe4d_pkg::*;
#(
  parameter int COLS     = 80,
  parameter int ZPS      = 8,
  parameter int SB_DEPTH = 8,
  parameter int B2_DEPTH = 8,
  parameter int B1_DEPTH = 128,
  localparam int ROWS = N_SPARS * ZPS * ZONE_H,
  localparam int NMPX = COLS / MP_W,
  localparam int NMPY = ROWS / MP_H,
  localparam int XW   = $clog2(COLS),
  localparam int W    = 1 + SPW + YW + XW + ZONE_H,
  localparam int NW   = $clog2(ZPS + 1),
  localparam int SBW  = TS_W + NMPX * NMPY
) (
  input  logic                       rd_clk,
  input  logic                       fast_clk,
  input  logic                       rst_n,
  input  logic                       bc_clk,
  input  logic [SUBW-1:0]            sub_addr_i,
  input  logic [ROWS-1:0][COLS-1:0]  hit_i,
  input  logic [NMPY-1:0][NMPX-1:0]  mask_i,
  // fast-clock side of the level-1 barrel
  input  logic                       rd_i,
  output logic [W-1:0]               dout_o,
  output logic                       empty_o,
  // status, read clock
  output logic                       fast_or_o,
  output logic                       busy_o,
  output logic                       sb_ovf_o,
  output logic                       b2_drop_o,
  output logic                       b1_drop_o,
  output logic                       hit_wr_o
);
  logic [NMPY-1:0][NMPX-1:0] fast_or, frozen, freeze, clear;
  logic                      col_en, mark, bc_tick;
  logic [XW-1:0]             col;
  logic [NMPY-1:0]           out_en;
  logic [ROWS-1:0]           bus;
  logic [TS_W-1:0]           ts, mark_ts;
  logic                      sb_push, sb_pop, sb_full, sb_empty;
  logic [SBW-1:0]            sb_din, sb_head;

  logic [N_SPARS-1:0][W-1:0]          b2_head;
  logic [N_SPARS-1:0]                 b2_empty, b2_rd, b2_ok, b2_dropped;
  logic                               l1_wr, l1_full, ts_wr;
  logic [W-1:0]                       l1_data;

  pixel_matrix #(.COLS(COLS), .ROWS(ROWS)) u_matrix (
    .clk(rd_clk), .rst_n(rst_n), .hit_i(hit_i), .mask_i(mask_i),
    .freeze_i(freeze), .clear_i(clear), .col_en_i(col_en), .col_i(col),
    .out_en_i(out_en), .fast_or_o(fast_or), .frozen_o(frozen), .bus_o(bus)
  );

  time_counter #(.TS_W(TS_W)) u_tc (
    .clk(rd_clk), .rst_n(rst_n), .bc_clk_i(bc_clk), .bc_tick_o(bc_tick), .ts_o(ts)
  );

  scan_buffer #(.DEPTH(SB_DEPTH), .W(SBW)) u_sb (
    .clk(rd_clk), .rst_n(rst_n), .push_i(sb_push), .din_i(sb_din),
    .pop_i(sb_pop), .dout_o(sb_head), .full_o(sb_full), .empty_o(sb_empty)
  );

  sweep_logic #(.NMPX(NMPX), .NMPY(NMPY)) u_sweep (
    .clk(rd_clk), .rst_n(rst_n), .bc_tick_i(bc_tick), .ts_i(ts),
    .fast_or_i(fast_or), .frozen_i(frozen), .freeze_o(freeze), .clear_o(clear),
    .sb_push_o(sb_push), .sb_din_o(sb_din), .sb_full_i(sb_full),
    .sb_empty_i(sb_empty), .sb_head_i(sb_head), .sb_pop_o(sb_pop),
    .col_en_o(col_en), .col_o(col), .out_en_o(out_en),
    .b2_ready_i(&b2_ok), .mark_o(mark), .mark_ts_o(mark_ts),
    .sb_ovf_o(sb_ovf_o), .busy_o(busy_o)
  );

  for (genvar s = 0; s < N_SPARS; s++) begin : g_spars
    logic [NW-1:0]           n;
    logic [ZPS-1:0][W-1:0]   words;
    logic [$clog2(B2_DEPTH):0] free;
    logic [NW-1:0]           drop;

    zone_sparsifier #(.COLS(COLS), .ZONES(ZPS)) u_spars (
      .valid_i(col_en), .pix_i(bus[s*ZPS*ZONE_H +: ZPS*ZONE_H]), .col_i(col),
      .spars_addr_i(SPW'(s)), .mark_i(mark), .ts_i(mark_ts),
      .sub_addr_i(sub_addr_i), .n_o(n), .words_o(words)
    );

    barrel_l2 #(.DEPTH(B2_DEPTH), .NIN(ZPS), .W(W)) u_b2 (
      .clk(rd_clk), .rst_n(rst_n), .n_i(n), .wdata_i(words),
      .rd_i(b2_rd[s]), .dout_o(b2_head[s]), .empty_o(b2_empty[s]),
      .free_o(free), .drop_o(drop)
    );

    assign b2_ok[s]      = (free != '0);
    assign b2_dropped[s] = (drop != '0);
  end

  concentrator #(.N(N_SPARS), .W(W)) u_conc (
    .clk(rd_clk), .rst_n(rst_n), .head_i(b2_head), .empty_i(b2_empty),
    .rd_o(b2_rd), .l1_full_i(l1_full), .l1_wr_o(l1_wr), .l1_data_o(l1_data),
    .drop_o(b1_drop_o), .ts_o(ts_wr)
  );

  barrel_l1 #(.DEPTH(B1_DEPTH), .W(W)) u_b1 (
    .rst_n(rst_n), .wclk(rd_clk), .wr_i(l1_wr), .din_i(l1_data), .full_o(l1_full),
    .rclk(fast_clk), .rd_i(rd_i), .dout_o(dout_o), .empty_o(empty_o)
  );

  assign fast_or_o = |fast_or;
  assign b2_drop_o = |b2_dropped;
  assign hit_wr_o  = l1_wr && !ts_wr;
endmodule
