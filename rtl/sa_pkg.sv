// sa_pkg: types and functions shared by the systolic-array GEMM engines.
//
// Holds the buffer-select encoding of the engines' host write port and the
// partial-sum width rule of the weight- and input-stationary arrays.
// Operands are two's-complement signed throughout; that choice is this
// design's own.
package sa_pkg;
  // Which buffer a host write goes to.
  typedef enum logic {
    BUF_IFMAP  = 1'b0,
    BUF_FILTER = 1'b1
  } buf_sel_e;

  // Width of the partial sum leaving row r of a WS/IS column: the sum of
  // r+1 signed products of two DW-bit operands.
  function automatic int unsigned psum_w(int unsigned dw, int unsigned r);
    return 2 * dw + $clog2(r + 1);
  endfunction
endpackage
