// barrel_l2: level-2 barrel, an asymmetric FIFO with dynamic input width.
//
// In one clock it stores from 0 to NIN words (the n_i words at the bottom
// of wdata_i, in order) and it gives out one word per clock (first-word
// fall-through on dout_o, removed by rd_i). When fewer than n_i places are
// free, the words that fit are stored and the rest are lost; drop_o gives
// how many were lost in that clock, which is the barrel overflow
// inefficiency. Writes see the free space at the start of the clock, so a
// read in the same clock does not make room for them.
//
// The 1-to-8-words-in, 1-word-out behaviour and depth 8 follow the chip;
// storing what fits and losing the rest is this design's reading of the
// overflow. DEPTH must be a power of two.
module barrel_l2 #(
  parameter int DEPTH = 8,
  parameter int NIN   = 8,
  parameter int W     = 21,
  localparam int NW   = $clog2(NIN + 1),
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NW-1:0]         n_i,
  input  logic [NIN-1:0][W-1:0] wdata_i,
  input  logic                  rd_i,
  output logic [W-1:0]          dout_o,
  output logic                  empty_o,
  output logic [AW:0]           free_o,
  output logic [NW-1:0]         drop_o
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;
  int            n_acc;

  always_comb begin
    free_o = (AW+1)'(DEPTH) - count;
    n_acc  = (int'(n_i) > int'(free_o)) ? int'(free_o) : int'(n_i);
    drop_o = NW'(int'(n_i) - n_acc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      wr_ptr <= wr_ptr + AW'(n_acc);
      if (rd_i && !empty_o) rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(n_acc) - (AW+1)'(rd_i && !empty_o);
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NIN; i++)
      if (i < n_acc) mem[wr_ptr + AW'(i)] <= wdata_i[i];
  end

  assign dout_o  = mem[rd_ptr];
  assign empty_o = (count == '0);

  initial assert ((1 << AW) == DEPTH) else $error("barrel_l2: DEPTH must be a power of two");
  a_no_rd_empty: assert property (@(posedge clk) disable iff (!rst_n) !(rd_i && empty_o));
endmodule
