// vp_prog_pkg: the two test programs run end to end on a vector processor,
// written with the vp_asm_pkg encoder, and their parameter block layout.
//
// Dense matrix multiply C = A * B (n x n, n <= 64, row-major): for each row i
// of this processor's share, acc = B[0] * A[i][0], then acc += B[k] * A[i][k]
// for k = 1..n-1 (vector-scalar multiply and vector add over whole rows of B).
//
// Sparse matrix-vector multiply y = M * x in a padded diagonal (ELL) layout:
// row r has K slots; slot d holds val[d*R + r] and column col[d*R + r]
// (padding: value 0, column 0). Rows are processed in strips of 64: for each
// slot d, the column indices are loaded, x is gathered with an indexed load,
// multiplied by the values and accumulated.
//
// Both programs read their arguments from the data memory at PARAM.
package vp_prog_pkg;
  import vp_pkg::*;
  import vp_asm_pkg::*;

  localparam int PARAM = 16000;

  // params: PARAM+0 n, +1 rows, +2 B base, +3 address of A[first row][0],
  //         +4 address of C[first row][0]
  function automatic void matmul(ref logic [31:0] p[$]);
    p = {};
    p.push_back(enc(OP_LW, 1, 0, 0, PARAM + 0));
    p.push_back(enc(OP_SETVL, 0, 1));            // load-use on r1
    p.push_back(enc(OP_LW, 2, 0, 0, PARAM + 1));
    p.push_back(enc(OP_LW, 5, 0, 0, PARAM + 2));
    p.push_back(enc(OP_LW, 7, 0, 0, PARAM + 3));
    p.push_back(enc(OP_LW, 8, 0, 0, PARAM + 4));
    // 6: ROW
    p.push_back(enc(OP_BEQ, 0, 2, 0, 21));       // -> 27 END
    p.push_back(enc(OP_ADD, 9, 5, 0));
    p.push_back(enc(OP_LW, 10, 7, 0, 0));
    p.push_back(enc(OP_VLD, 2, 9, 0, 0));
    p.push_back(enc(OP_VSMUL, 1, 2, 10));
    p.push_back(enc(OP_ADDI, 11, 0, 0, 1));
    p.push_back(enc(OP_ADD, 9, 9, 1));
    // 13: KLOOP
    p.push_back(enc(OP_BEQ, 0, 11, 1, 9));       // -> 22 KEND
    p.push_back(enc(OP_ADD, 12, 7, 11));
    p.push_back(enc(OP_LW, 10, 12, 0, 0));
    p.push_back(enc(OP_VLD, 2, 9, 0, 0));
    p.push_back(enc(OP_VSMUL, 3, 2, 10));
    p.push_back(enc(OP_VADD, 1, 1, 3));
    p.push_back(enc(OP_ADD, 9, 9, 1));
    p.push_back(enc(OP_ADDI, 11, 11, 0, 1));
    p.push_back(enc(OP_JMP, 0, 0, 0, 13));
    // 22: KEND
    p.push_back(enc(OP_VST, 1, 8, 0, 0));
    p.push_back(enc(OP_ADD, 7, 7, 1));
    p.push_back(enc(OP_ADD, 8, 8, 1));
    p.push_back(enc(OP_ADDI, 2, 2, 0, -1));
    p.push_back(enc(OP_JMP, 0, 0, 0, 6));
    // 27: END
    p.push_back(enc(OP_HALT));
  endfunction

  // params: PARAM+0 rows R, +1 slots K, +2 val base, +3 col base, +4 x base,
  //         +5 y base, +6 R (slot stride)
  function automatic void spmv(ref logic [31:0] p[$]);
    p = {};
    p.push_back(enc(OP_LW, 1, 0, 0, PARAM + 0));
    p.push_back(enc(OP_LW, 2, 0, 0, PARAM + 1));
    p.push_back(enc(OP_LW, 3, 0, 0, PARAM + 2));
    p.push_back(enc(OP_LW, 4, 0, 0, PARAM + 3));
    p.push_back(enc(OP_LW, 5, 0, 0, PARAM + 4));
    p.push_back(enc(OP_LW, 6, 0, 0, PARAM + 5));
    p.push_back(enc(OP_LW, 13, 0, 0, PARAM + 6));
    p.push_back(enc(OP_ADDI, 14, 0, 0, 64));
    // 8: STRIP
    p.push_back(enc(OP_SETVL, 0, 1));
    p.push_back(enc(OP_VLD, 4, 4, 0, 0));        // column indices, slot 0
    p.push_back(enc(OP_VLDX, 5, 5, 4, 0));       // gather x
    p.push_back(enc(OP_LW, 2, 0, 0, PARAM + 1)); // K again: waits for the gather
    p.push_back(enc(OP_VLD, 6, 3, 0, 0));        // values, slot 0
    p.push_back(enc(OP_VMUL, 1, 6, 5));
    p.push_back(enc(OP_ADDI, 9, 3, 0, 0));
    p.push_back(enc(OP_ADDI, 10, 4, 0, 0));
    p.push_back(enc(OP_ADDI, 11, 0, 0, 1));
    // 17: SLOT
    p.push_back(enc(OP_BEQ, 0, 11, 2, 10));      // -> 27 SEND
    p.push_back(enc(OP_ADD, 9, 9, 13));
    p.push_back(enc(OP_ADD, 10, 10, 13));
    p.push_back(enc(OP_VLD, 4, 10, 0, 0));
    p.push_back(enc(OP_VLDX, 5, 5, 4, 0));
    p.push_back(enc(OP_VLD, 6, 9, 0, 0));
    p.push_back(enc(OP_VMUL, 7, 6, 5));
    p.push_back(enc(OP_VADD, 1, 1, 7));
    p.push_back(enc(OP_ADDI, 11, 11, 0, 1));
    p.push_back(enc(OP_JMP, 0, 0, 0, 17));
    // 27: SEND
    p.push_back(enc(OP_VST, 1, 6, 0, 0));
    p.push_back(enc(OP_ADD, 3, 3, 14));
    p.push_back(enc(OP_ADD, 4, 4, 14));
    p.push_back(enc(OP_ADD, 6, 6, 14));
    p.push_back(enc(OP_SUB, 1, 1, 14));
    p.push_back(enc(OP_SLT, 12, 0, 1));
    p.push_back(enc(OP_BNE, 0, 12, 0, -25));     // -> 8 STRIP
    p.push_back(enc(OP_HALT));
  endfunction
  // Blocked form for matrices wider than one vector: computes rows of
  // C_blk = A * B_blk where B_blk is a column block of width w (w <= 64)
  // stored with row stride w, and C_blk is stored with row stride w.
  // params: PARAM+0 n (inner dimension), +1 rows, +2 B_blk base,
  //         +3 address of A[first row][0], +4 address of C_blk[first row][0],
  //         +5 w, +6 row stride of A
  function automatic void matmul_blk(ref logic [31:0] p[$]);
    p = {};
    p.push_back(enc(OP_LW, 1, 0, 0, PARAM + 5));
    p.push_back(enc(OP_SETVL, 0, 1));
    p.push_back(enc(OP_LW, 2, 0, 0, PARAM + 1));
    p.push_back(enc(OP_LW, 5, 0, 0, PARAM + 2));
    p.push_back(enc(OP_LW, 7, 0, 0, PARAM + 3));
    p.push_back(enc(OP_LW, 8, 0, 0, PARAM + 4));
    p.push_back(enc(OP_LW, 13, 0, 0, PARAM + 0));
    p.push_back(enc(OP_LW, 14, 0, 0, PARAM + 6));
    // 8: ROW
    p.push_back(enc(OP_BEQ, 0, 2, 0, 21));       // -> 29 END
    p.push_back(enc(OP_ADD, 9, 5, 0));
    p.push_back(enc(OP_LW, 10, 7, 0, 0));
    p.push_back(enc(OP_VLD, 2, 9, 0, 0));
    p.push_back(enc(OP_VSMUL, 1, 2, 10));
    p.push_back(enc(OP_ADDI, 11, 0, 0, 1));
    p.push_back(enc(OP_ADD, 9, 9, 1));
    // 15: KLOOP
    p.push_back(enc(OP_BEQ, 0, 11, 13, 9));      // -> 24 KEND
    p.push_back(enc(OP_ADD, 12, 7, 11));
    p.push_back(enc(OP_LW, 10, 12, 0, 0));
    p.push_back(enc(OP_VLD, 2, 9, 0, 0));
    p.push_back(enc(OP_VSMUL, 3, 2, 10));
    p.push_back(enc(OP_VADD, 1, 1, 3));
    p.push_back(enc(OP_ADD, 9, 9, 1));
    p.push_back(enc(OP_ADDI, 11, 11, 0, 1));
    p.push_back(enc(OP_JMP, 0, 0, 0, 15));
    // 24: KEND
    p.push_back(enc(OP_VST, 1, 8, 0, 0));
    p.push_back(enc(OP_ADD, 7, 7, 14));
    p.push_back(enc(OP_ADD, 8, 8, 1));
    p.push_back(enc(OP_ADDI, 2, 2, 0, -1));
    p.push_back(enc(OP_JMP, 0, 0, 0, 8));
    // 29: END
    p.push_back(enc(OP_HALT));
  endfunction
endpackage
