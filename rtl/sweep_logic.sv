// sweep_logic: freezes, time-stamps, scans and resets the macro pixels of
// one sub-matrix.
//
// At each BC edge (bc_tick_i) every MP with an active fast-OR that is not
// already frozen is frozen, and one scan-buffer entry {time stamp, bitmap of
// the frozen MPs} is pushed. If the scan buffer is full, nothing is frozen
// at that edge and sb_ovf_o pulses; those MPs go on collecting hits and are
// frozen at a later edge.
//
// The sweep takes the oldest entry. In its first cycle (mark_o) it has a
// time-stamp word written into every level-2 barrel, which marks the start
// of the hit sequence of that time stamp; it waits in idle until every
// barrel has room for it (b2_ready_i). Then it reads only the MP columns
// that hold frozen MPs of the entry, skipping the others: each MP column is
// two pixel columns, one column per clock, with out_en_o selecting the MP
// rows of the entry. In the cycle of the second column the MPs of that MP
// column are cleared (clear_o), so they take hits again from the next cycle.
// After the last column the entry is popped.
//
// Timing: a scan of an entry with k MP columns lasts 1 + 2k cycles. The
// freeze-at-BC-edge rule, time-sorted column scans and reset after readout
// follow the chip's architecture; the entry format, the marker cycle and the
// lowest-column-first order are this design's choices.
module sweep_logic
  import fe4d_pkg::*;
#(
  parameter int NMPX = 40,
  parameter int NMPY = 32,
  localparam int COLS = NMPX * MP_W,
  localparam int XW   = $clog2(COLS),
  localparam int SBW  = TS_W + NMPX * NMPY
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       bc_tick_i,
  input  logic [TS_W-1:0]            ts_i,
  input  logic [NMPY-1:0][NMPX-1:0]  fast_or_i,
  input  logic [NMPY-1:0][NMPX-1:0]  frozen_i,
  output logic [NMPY-1:0][NMPX-1:0]  freeze_o,
  output logic [NMPY-1:0][NMPX-1:0]  clear_o,
  // scan buffer
  output logic                       sb_push_o,
  output logic [SBW-1:0]             sb_din_o,
  input  logic                       sb_full_i,
  input  logic                       sb_empty_i,
  input  logic [SBW-1:0]             sb_head_i,
  output logic                       sb_pop_o,
  // column scan
  output logic                       col_en_o,
  output logic [XW-1:0]              col_o,
  output logic [NMPY-1:0]            out_en_o,
  // barrels
  input  logic                       b2_ready_i,
  output logic                       mark_o,
  output logic [TS_W-1:0]            mark_ts_o,
  // status
  output logic                       sb_ovf_o,
  output logic                       busy_o
);
  logic                      scanning_q, half_q;
  logic [NMPX-1:0]           colmask_q;
  logic [NMPY-1:0][NMPX-1:0] newly, head_map;
  logic [TS_W-1:0]           head_ts;
  logic [NMPX-1:0]           head_cols, colmask_next;
  logic                      any_new;
  int                        k;

  assign newly    = fast_or_i & ~frozen_i;
  assign any_new  = |newly;
  assign head_ts  = sb_head_i[SBW-1 -: TS_W];
  assign head_map = sb_head_i[NMPX*NMPY-1:0];

  always_comb begin
    head_cols = '0;
    for (int my = 0; my < NMPY; my++) head_cols |= head_map[my];
  end

  // Lowest MP column still to read.
  always_comb begin
    k = 0;
    for (int i = NMPX-1; i >= 0; i--) if (colmask_q[i]) k = i;
  end

  always_comb begin
    sb_push_o    = bc_tick_i && any_new && !sb_full_i;
    sb_din_o     = {ts_i, newly};
    freeze_o     = sb_push_o ? newly : '0;
    sb_ovf_o     = bc_tick_i && any_new && sb_full_i;

    mark_o       = !scanning_q && !sb_empty_i && b2_ready_i;
    mark_ts_o    = head_ts;

    col_en_o     = scanning_q;
    col_o        = XW'(k * MP_W + int'(half_q));
    out_en_o     = '0;
    clear_o      = '0;
    colmask_next = colmask_q;
    sb_pop_o     = 1'b0;
    if (scanning_q) begin
      for (int my = 0; my < NMPY; my++) begin
        out_en_o[my] = head_map[my][k];
        if (half_q) clear_o[my][k] = head_map[my][k];
      end
      if (half_q) begin
        colmask_next[k] = 1'b0;
        sb_pop_o = (colmask_next == '0);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning_q <= 1'b0;
      half_q     <= 1'b0;
      colmask_q  <= '0;
    end else if (mark_o) begin
      scanning_q <= 1'b1;
      half_q     <= 1'b0;
      colmask_q  <= head_cols;
    end else if (scanning_q) begin
      half_q    <= ~half_q;
      colmask_q <= colmask_next;
      if (sb_pop_o) scanning_q <= 1'b0;
    end
  end

  assign busy_o = scanning_q || !sb_empty_i;

  a_scan_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
                                    scanning_q |-> (colmask_q != '0 && !sb_empty_i));
endmodule
