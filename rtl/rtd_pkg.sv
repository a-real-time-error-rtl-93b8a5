// rtd_pkg: types and helpers shared by the RTD (real-time error detection)
// array blocks.
//
// Column layout used everywhere: a stored row has COLS = DATA_W + H bits.
// Bits [DATA_W-1:0] hold data, bits [DATA_W+H-1:DATA_W] hold the H
// horizontally interleaved row parity bits. Data column j belongs to
// interleave partition j % H; parity bit k (column DATA_W+k) covers
// partition k and belongs to it. The partition map is this design's choice;
// the document only says even/odd bit positions get separate parity bits.
package rtd_pkg;

  // Outcome of the 2D ECC decoder (Tables 1 and 2 of the scheme):
  // no error, correctable error, detected unrecoverable error.
  typedef enum logic [1:0] {
    DEC_NE  = 2'd0,
    DEC_CE  = 2'd1,
    DEC_DUE = 2'd2
  } dec_e;

  // Partition (0..H-1) that column c belongs to.
  function automatic int unsigned col_part(int unsigned c, int unsigned data_w,
                                           int unsigned h);
    return (c < data_w) ? (c % h) : (c - data_w);
  endfunction

endpackage
