// mult_pkg: sizes and types shared by the 32x32 compressor-tree multiplier.
// N is the operand width and W the product width. The row counts of the
// reduction stages are fixed by the tree in wallace_tree32, which is laid out
// for N = 32 only. pp_rows_t holds the unshifted partial-product rows.
package mult_pkg;
  localparam int unsigned N = 32;
  localparam int unsigned W = 2 * N;

  typedef logic [N-1:0] operand_t;
  typedef logic [W-1:0] product_t;
  typedef logic [N-1:0] pp_rows_t [N];
endpackage
