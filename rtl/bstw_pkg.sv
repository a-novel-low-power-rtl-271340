// bstw_pkg: sizes shared by the move-to-front (BSTW) compressor and its
// matching decompressor.
//
// The default table is the one the design is built and evaluated at: four
// entries of four-bit tuples, so a table position (the transmitted code,
// $clog2(N_ENTRIES) bits) is two bits wide and a hit halves the number of bits sent for a tuple.
package bstw_pkg;
  // Number of records in the move-to-front table.
  localparam int unsigned N_ENTRIES = 4;
  // Width of one tuple (the source symbol compared against the table).
  localparam int unsigned TUPLE_W = 4;
endpackage
