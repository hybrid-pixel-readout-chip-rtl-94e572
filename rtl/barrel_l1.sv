// barrel_l1: level-1 barrel, the FIFO between a sub-matrix readout (read
// clock, 60-100 MHz) and the common output stage (fast clock, 200 MHz).
//
// A dual-clock FIFO: binary pointers with one extra wrap bit, crossed to the
// other domain as Gray code through two-flop synchronisers. full_o is seen
// in the write domain and empty_o in the read domain; both are pessimistic
// by the synchroniser delay, never wrong. Reads are first-word fall-through
// (dout_o shows the head while !empty_o). Depth 128 follows the efficiency
// runs; the dual-clock construction is this design's choice for the two
// clocks the chip uses. DEPTH must be a power of two. One reset, asserted
// asynchronously, serves both domains.
module barrel_l1 #(
  parameter int DEPTH = 128,
  parameter int W     = 21,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic         rst_n,
  // write side
  input  logic         wclk,
  input  logic         wr_i,
  input  logic [W-1:0] din_i,
  output logic         full_o,
  // read side
  input  logic         rclk,
  input  logic         rd_i,
  output logic [W-1:0] dout_o,
  output logic         empty_o
);
  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wbin, rbin, wgray, rgray;
  logic [AW:0]  rgray_w1, rgray_w2;   // read pointer in write domain
  logic [AW:0]  wgray_r1, wgray_r2;   // write pointer in read domain
  logic [AW:0]  wbin_nx, rbin_nx;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  assign wbin_nx = wbin + (AW+1)'(wr_i && !full_o);
  assign rbin_nx = rbin + (AW+1)'(rd_i && !empty_o);

  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nx;
      wgray    <= bin2gray(wbin_nx);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_i && !full_o) mem[wbin[AW-1:0]] <= din_i;
  end

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nx;
      rgray    <= bin2gray(rbin_nx);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  // Full: Gray pointers differ only in the two top bits.
  assign full_o  = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign empty_o = (rgray == wgray_r2);
  assign dout_o  = mem[rbin[AW-1:0]];

  initial assert ((1 << AW) == DEPTH && AW >= 2) else $error("barrel_l1: DEPTH must be a power of two >= 4");
endmodule
