// Shared constants and programming matrices for the many-valued circuit S.
//
// A K-valued signal carries one of the values 0 .. K-1. In this RTL every
// K-valued line is a binary-coded unsigned integer of $clog2(K) bits; the
// physical multi-level signalling of a real K-valued gate is not modelled.
//
// A K-PLA is programmed by two matrices, one entry per crossing of an
// intermediate (product) line with an input or output line:
//   AND matrix, entry [row][i]  : value j of the cell GATE(K-1, j) on input vi,
//                                 or K when the crossing has no cell;
//   OR matrix,  entry [row][k]  : value A of the cell GATE(A, K-1) on output fk,
//                                 or K when the crossing has no cell.
// Using K as the "no cell" mark follows the published 8-valued matrices, where
// the digit 8 marks an empty crossing.
//
// Each matrix is a packed array of 8-bit entries that reads, as written, line 1
// first and, within a line, v1 (or f1) first. With Q lines and N inputs the
// entry of line r+1 and input v(i+1) is therefore MAT[Q-1-r][N-1-i].
//
// Two programmings of an 8-PLA for the example system of partial Boolean
// functions (18,6,20) are held here:
//   S18_AND_FULL / S18_OR_FULL : 8-PLA(6,2,20), one product line per row of the
//                                function table (no minimization);
//   S18_AND_MIN  / S18_OR_MIN  : 8-PLA(6,2,21), the minimized sum-of-products.
// The minimized matrix differs from the published one in a single cell: its
// product line 14 tests v6 = 0 instead of v5 = 0. With v5 = 0 that line would
// duplicate line 8 and force f1 = 5 on three table rows whose f1 is 3 or 2, and
// the table row (4,6,1,5,6,0) would lose its f1 = 5; with v6 = 0 all twenty
// rows of the table are reproduced.
package mvl_pkg;

  // Value set of the example circuit.
  localparam int unsigned K8 = 8;

  // Sizes of the example system (m,r,q) and of its 8-valued image (n,s,q).
  localparam int unsigned S18_M      = 18;
  localparam int unsigned S18_R      = 6;
  localparam int unsigned S18_N      = 6;
  localparam int unsigned S18_S      = 2;
  localparam int unsigned S18_Q_FULL = 20;
  localparam int unsigned S18_Q_MIN  = 21;

  // 8-PLA(6,2,20): each product line matches one row (v1..v6) of the table.
  localparam logic [S18_Q_FULL-1:0][S18_N-1:0][7:0] S18_AND_FULL = '{
    '{4,3,0,6,3,4}, '{4,2,7,4,4,5}, '{7,5,4,3,2,2}, '{0,4,4,3,4,7},
    '{5,4,5,3,0,5}, '{4,3,4,6,2,3}, '{0,2,6,4,7,1}, '{4,6,1,5,6,0},
    '{0,6,4,7,1,1}, '{7,6,1,0,6,5}, '{4,2,6,7,2,2}, '{4,3,4,6,6,4},
    '{0,6,1,5,1,3}, '{4,3,4,1,4,7}, '{7,0,6,6,0,7}, '{7,3,0,6,6,4},
    '{4,3,4,7,1,1}, '{1,1,6,2,0,7}, '{4,7,1,1,0,7}, '{5,4,4,7,0,6}
  };
  localparam logic [S18_Q_FULL-1:0][S18_S-1:0][7:0] S18_OR_FULL = '{
    '{3,4}, '{6,6}, '{2,3}, '{0,6}, '{5,5}, '{2,1}, '{2,5}, '{5,5},
    '{6,6}, '{7,7}, '{0,5}, '{3,5}, '{6,4}, '{0,1}, '{3,3}, '{7,7},
    '{4,4}, '{7,3}, '{6,1}, '{3,2}
  };

  // 8-PLA(6,2,21): minimized sum-of-products (8 = no cell).
  localparam logic [S18_Q_MIN-1:0][S18_N-1:0][7:0] S18_AND_MIN = '{
    '{4,8,8,8,8,8}, '{8,8,4,8,2,8}, '{8,8,8,8,7,8}, '{8,8,8,7,8,8},
    '{8,8,8,8,8,4}, '{7,8,8,8,8,8}, '{8,8,6,8,8,8}, '{8,8,8,8,0,8},
    '{8,8,0,8,8,8}, '{8,8,8,8,1,8}, '{8,8,8,8,8,5}, '{8,2,6,8,8,8},
    '{8,8,8,8,6,8}, '{8,8,8,8,8,0}, '{8,8,7,8,8,8}, '{0,4,8,8,8,8},
    '{0,6,8,8,8,8}, '{8,7,8,8,8,8}, '{0,8,4,8,8,8}, '{7,8,8,8,6,8},
    '{1,8,8,8,8,8}
  };
  localparam logic [S18_Q_MIN-1:0][S18_S-1:0][7:0] S18_OR_MIN = '{
    '{8,1}, '{2,8}, '{2,8}, '{8,2}, '{3,8}, '{8,3}, '{8,3}, '{3,8},
    '{8,4}, '{4,4}, '{5,5}, '{8,5}, '{8,5}, '{5,8}, '{6,6}, '{8,6},
    '{6,8}, '{6,8}, '{8,6}, '{7,7}, '{7,8}
  };

endpackage
