// fe4d_pkg: constants shared by the FE4D pixel readout.
//
// The pixel matrix is split into macro pixels (MPs) of 2 columns x 8 rows.
// The active column is cut into zones of 8 pixels; each sparsifier serves
// 8 zones (64 pixels). Output words have the two formats of the readout:
//   time stamp word: [MSB]=1, [9:8]=sub-matrix address, [7:0]=time stamp
//   hit word       : [MSB]=0, then sparsifier address (2 bit), Y zone address
//                    (3 bit), X column address, 8-bit zone pattern (not coded).
// The X field is $clog2(COLS) bits wide: 6 bits for a 64-column sub-matrix,
// which gives exactly the 20-bit word, and 7 bits for the 80-column
// sub-matrix of the full 320x256 matrix (a 21-bit word).
package fe4d_pkg;
  localparam int MP_W     = 2;   // macro pixel width in columns
  localparam int MP_H     = 8;   // macro pixel height in rows
  localparam int ZONE_H   = 8;   // pixels per zone (zone pattern width)
  localparam int N_SPARS  = 4;   // zone sparsifiers per sub-matrix readout
  localparam int TS_W     = 8;   // time stamp width
  localparam int SPW      = 2;   // sparsifier address field
  localparam int YW       = 3;   // Y zone address field
  localparam int SUBW     = 2;   // sub-matrix address field

  // Width of an output word for a sub-matrix of `cols` columns.
  function automatic int word_w(int cols);
    return 1 + SPW + YW + $clog2(cols) + ZONE_H;
  endfunction
endpackage
