// Shared types and constants of the Krylov subspace pipeline.
//
// The pipeline streams a banded sparse matrix in row-major order, one nonzero
// entry per element.  An element carries the single-precision value and the
// 32-bit column index of the entry, as in a CSR store, plus a flag that marks
// the last entry of a row.  The flag stands in for the CSR row pointers: the
// CSR reader derives it from them once, and every matrix buffer after that
// holds the flag in place of a pointer.  Vectors travel as single-precision
// words.
package krylov_pkg;

  // IEEE 754 single-precision word.
  typedef logic [31:0] fp32_t;

  // Width of a column index and of row counters (32-bit CSR indices).
  localparam int unsigned IDX_W = 32;

  // One matrix nonzero in flight between processing elements.
  typedef struct packed {
    fp32_t             val;   // matrix value a_ij
    logic [IDX_W-1:0]  col;   // column index j
    logic              last;  // 1 on the last stored entry of row i
  } mat_elem_t;

endpackage
