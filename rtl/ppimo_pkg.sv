// ppimo_pkg: constants shared by the PPI-MO matrix multiplier.
//
// PPI-MO (parallel-parallel input, multiple output) multiplies two n x n
// matrices with an n x n array of multipliers: matrix A sits fixed on n^2
// input ports, matrix B streams in one column per cycle on n ports, and one
// column of C = A x B leaves per cycle on n output ports.
//
// MAT_N = 4 is the matrix order the design is evaluated at. The element
// width, the signed number format and the result growth rule are this
// design's own choices: 8-bit two's-complement elements, full-precision
// products and sums, so no result can overflow.
package ppimo_pkg;

  // Matrix order n.
  localparam int unsigned MAT_N  = 4;
  // Width of one element of A and B (two's complement).
  localparam int unsigned DATA_W = 8;

  // Width of a full-precision product of two DATA_W-bit numbers.
  function automatic int unsigned prod_w(int unsigned data_w);
    return 2 * data_w;
  endfunction

  // Width of a full-precision sum of n terms of width w.
  function automatic int unsigned sum_w(int unsigned w, int unsigned n);
    return w + ((n > 1) ? $clog2(n) : 0);
  endfunction

endpackage
