// fe4d_top: readout chip for a hybrid matrix of binary pixels.
//
// The matrix of N_SUB*COLS x ROWS pixels (320 x 256 by default) is split
// into N_SUB vertical sub-matrices, each with its own sweep readout working
// in parallel (submatrix_readout). At each edge of the BCO clock the macro
// pixels that saw a hit are frozen and time-stamped; the sweep reads their
// columns, one per read clock, through zone sparsifiers and two levels of
// barrels into a dual-clock level-1 FIFO. The common output stage then
// queues the N_SUB time-sorted streams onto one word-wide output bus on the
// fast clock. An I2C-like slave with a 3-bit hard-wired chip address gives
// access to the settings, the macro-pixel masks and the status registers.
//
// Clocks: rd_clk (read clock, 60-100 MHz: matrix scan, sparsifiers,
// barrels, slow control), fast_clk (200 MHz: output bus), bc_clk (BCO clock,
// 0.25-2 us period, sampled by rd_clk). rst_n is asserted asynchronously.
// hit_i are the discriminator outputs of the pixels, [sub][row][column];
// the analog front end and the pads are outside this RTL, so SDA comes in
// as sda_i with sda_oe_o to pull it low. data_out_o / data_valid_o carry the
// time-stamp and hit words described in fe4d_pkg.
module fe4d_top
  import fe4d_pkg::*;
#(
  parameter int N_SUB    = 4,
  parameter int COLS     = 80,
  parameter int ZPS      = 8,
  parameter int SB_DEPTH = 8,
  parameter int B2_DEPTH = 8,
  parameter int B1_DEPTH = 128,
  localparam int ROWS = N_SPARS * ZPS * ZONE_H,
  localparam int NMPX = COLS / MP_W,
  localparam int NMPY = ROWS / MP_H,
  localparam int NMP  = NMPX * NMPY,
  localparam int W    = 1 + SPW + YW + $clog2(COLS) + ZONE_H
) (
  input  logic                                 rd_clk,
  input  logic                                 fast_clk,
  input  logic                                 bc_clk,
  input  logic                                 rst_n,
  input  logic [N_SUB-1:0][ROWS-1:0][COLS-1:0] hit_i,
  input  logic                                 scl_i,
  input  logic                                 sda_i,
  output logic                                 sda_oe_o,
  input  logic [2:0]                           chip_addr_i,
  output logic [W-1:0]                         data_out_o,
  output logic                                 data_valid_o,
  output logic                                 global_fast_or_o
);
  logic [15:0]             reg_addr;
  logic                    reg_wr;
  logic [7:0]              reg_wdata, reg_rdata;
  logic                    acq_en;
  logic [N_SUB*NMP-1:0]    mp_mask;
  logic [N_SUB-1:0]        busy, fast_or, sb_ovf, b2_drop, b1_drop, hit_wr;
  logic [N_SUB-1:0][W-1:0] l1_head;
  logic [N_SUB-1:0]        l1_empty, l1_rd;
  logic                    ts_repeat;

  for (genvar s = 0; s < N_SUB; s++) begin : g_sub
    logic [NMPY-1:0][NMPX-1:0] mask;
    assign mask = mp_mask[s*NMP +: NMP] | {NMP{~acq_en}};

    submatrix_readout #(
      .COLS(COLS), .ZPS(ZPS), .SB_DEPTH(SB_DEPTH),
      .B2_DEPTH(B2_DEPTH), .B1_DEPTH(B1_DEPTH)
    ) u_sub (
      .rd_clk(rd_clk), .fast_clk(fast_clk), .rst_n(rst_n), .bc_clk(bc_clk),
      .sub_addr_i(SUBW'(s)), .hit_i(hit_i[s]), .mask_i(mask),
      .rd_i(l1_rd[s]), .dout_o(l1_head[s]), .empty_o(l1_empty[s]),
      .fast_or_o(fast_or[s]), .busy_o(busy[s]), .sb_ovf_o(sb_ovf[s]),
      .b2_drop_o(b2_drop[s]), .b1_drop_o(b1_drop[s]), .hit_wr_o(hit_wr[s])
    );
  end

  output_stage #(.N(N_SUB), .W(W)) u_out (
    .clk(fast_clk), .rst_n(rst_n), .head_i(l1_head), .empty_i(l1_empty),
    .rd_o(l1_rd), .data_out_o(data_out_o), .data_valid_o(data_valid_o),
    .ts_repeat_o(ts_repeat)
  );

  i2c_slave u_i2c (
    .clk(rd_clk), .rst_n(rst_n), .scl_i(scl_i), .sda_i(sda_i),
    .sda_oe_o(sda_oe_o), .chip_addr_i(chip_addr_i), .reg_addr_o(reg_addr),
    .reg_wr_o(reg_wr), .reg_wdata_o(reg_wdata), .reg_rdata_i(reg_rdata)
  );

  slow_control_regs #(.N_SUB(N_SUB), .NMP(NMP)) u_regs (
    .clk(rd_clk), .rst_n(rst_n), .reg_addr_i(reg_addr), .reg_wr_i(reg_wr),
    .reg_wdata_i(reg_wdata), .reg_rdata_o(reg_rdata), .acq_en_o(acq_en),
    .mp_mask_o(mp_mask), .busy_i(busy), .fast_or_i(fast_or),
    .sb_ovf_i(sb_ovf), .b2_drop_i(b2_drop), .b1_drop_i(b1_drop),
    .hit_wr_i(hit_wr)
  );

  assign global_fast_or_o = |fast_or;
endmodule
