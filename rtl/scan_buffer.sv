// scan_buffer: queue of frozen macro-pixel sets waiting to be swept.
//
// At every BC edge at which some MPs have an active fast-OR, the sweep
// logic pushes one entry: the time stamp and the bitmap of the MPs it froze.
// The sweep reads the oldest entry (first-word fall-through on dout) and pops
// it when all its MPs have been read out. When the buffer is full no entry
// can be pushed; the sweep then leaves those MPs unfrozen, so they are
// frozen at a later edge, which lengthens their dead time. Depth 8 is the
// main configuration of the efficiency runs (16 was also studied). The entry
// contents and the flop-based storage are this design's choices.
module scan_buffer #(
  parameter int DEPTH = 8,
  parameter int W     = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push_i,
  input  logic [W-1:0] din_i,
  input  logic         pop_i,
  output logic [W-1:0] dout_o,
  output logic         full_o,
  output logic         empty_o
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic [AW:0]   count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push_i && !full_o) wr_ptr <= (int'(wr_ptr) == DEPTH-1) ? '0 : wr_ptr + 1'b1;
      if (pop_i && !empty_o) rd_ptr <= (int'(rd_ptr) == DEPTH-1) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(push_i && !full_o) - (AW+1)'(pop_i && !empty_o);
    end
  end

  always_ff @(posedge clk) begin
    if (push_i && !full_o) mem[wr_ptr] <= din_i;
  end

  assign dout_o  = mem[rd_ptr];
  assign full_o  = (int'(count) == DEPTH);
  assign empty_o = (count == '0);

  a_no_push_full: assert property (@(posedge clk) disable iff (!rst_n) !(push_i && full_o));
  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) !(pop_i && empty_o));
endmodule
