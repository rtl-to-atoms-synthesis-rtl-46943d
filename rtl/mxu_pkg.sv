// mxu_pkg: types and constants shared by the matrix multiply unit.
//
// The PE operating mode travels with every weight word down a column as part
// of the weight control word c_w. PRELOAD = 0 and COMPUTE = 1 are the
// encodings of the reference algorithm for the PE forward pass. The 24-bit
// accumulator width is the sign-extension width of that algorithm.
package mxu_pkg;

  typedef enum logic {
    PRELOAD = 1'b0,
    COMPUTE = 1'b1
  } mode_e;

  localparam int unsigned ACC_BITS_DEFAULT = 24;

  // Width of a row index for an array with n rows (at least one bit).
  function automatic int unsigned idx_bits(int unsigned n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

endpackage
