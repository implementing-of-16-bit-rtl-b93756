// pyramid_pkg: constants shared by the pyramidal adder and its top level.
//
// PYR_WIDTH is the operand width of the main configuration, 16 bits, as in
// the 16x16-bit pyramidal adder this RTL implements. pyr_rows() gives the
// number of half-adder blocks a pyramid of a given width contains: row k
// (k = 0 .. N-1) holds k+1 blocks, so the triangle has N(N+1)/2 of them,
// N of type 2.2 (the most significant column) and the rest of type 2.1.
package pyramid_pkg;

  localparam int unsigned PYR_WIDTH = 16;

  function automatic int unsigned pyr_block_count(int unsigned n);
    return n * (n + 1) / 2;
  endfunction

endpackage
