// zone_sparsifier: zone sparsification of 64 pixels of the active column.
//
// The slice of the column bus served by one sparsifier is cut into ZONES
// zones of 8 pixels. Every zone with at least one hit becomes one hit word
// {0, sparsifier address, Y zone address, X column address, 8-bit pattern};
// the pattern is the raw zone, not coded. The words of the non-empty zones
// are packed, lowest zone first, onto an 8-hit-wide bus with their count
// n_o, for the level-2 barrel to store in the same clock. When mark_i is set
// (first cycle of a scan) the sparsifier instead emits one time-stamp word
// {1, 0..., sub-matrix address, time stamp}.
//
// Purely combinational: the barrel registers the result. Zone size, field
// widths and the 8-hit bus follow the chip; bit i of a pattern being row
// 8*zone+i and the lowest-zone-first packing are this design's choices.
module zone_sparsifier
  import fe4d_pkg::*;
#(
  parameter int COLS  = 80,
  parameter int ZONES = 8,
  localparam int XW   = $clog2(COLS),
  localparam int W    = 1 + SPW + YW + XW + ZONE_H,
  localparam int NW   = $clog2(ZONES + 1)
) (
  input  logic                        valid_i,   // a column is on the bus
  input  logic [ZONES*ZONE_H-1:0]     pix_i,
  input  logic [XW-1:0]               col_i,
  input  logic [SPW-1:0]              spars_addr_i,
  input  logic                        mark_i,
  input  logic [TS_W-1:0]             ts_i,
  input  logic [SUBW-1:0]             sub_addr_i,
  output logic [NW-1:0]               n_o,
  output logic [ZONES-1:0][W-1:0]     words_o
);
  int                n;
  logic [ZONE_H-1:0] pat;

  always_comb begin
    n       = 0;
    pat     = '0;
    words_o = '0;
    if (mark_i) begin
      words_o[0]                    = '0;
      words_o[0][W-1]               = 1'b1;
      words_o[0][TS_W +: SUBW]      = sub_addr_i;
      words_o[0][TS_W-1:0]          = ts_i;
      n = 1;
    end else if (valid_i) begin
      for (int z = 0; z < ZONES; z++) begin
        pat = pix_i[z*ZONE_H +: ZONE_H];
        if (pat != '0) begin
          words_o[n] = {1'b0, spars_addr_i, YW'(z), col_i, pat};
          n++;
        end
      end
    end
    n_o = NW'(n);
  end
endmodule
