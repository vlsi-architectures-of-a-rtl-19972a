// wf_pkg -- shared types, constants and helpers of the separable symmetric
// Wiener filter solver.
//
// All arithmetic is 64-bit two's complement, the word width of the
// restoring divider. Filter taps are integers scaled by S = 2^16, so the
// seven taps of a normalised filter sum to S. A 7x7 block of the
// autocovariance matrix H (one H_ij) and the 7x7 cross-correlation M arrive
// as arrays of 64-bit words. The 4x4 statistics B (matrix) and A (vector)
// are kept in folded form: tap index t of the 7-tap window maps to
// min(t, 6 - t), so taps 0/6, 1/5, 2/4 and 3 share a slot.
//
// The 3x3 linear system after enforcement is held in lin_sys_t. Its matrix
// is indexed [row][col]; the flat element names A0..A10 used in the block
// descriptions are A[4*row + col] (row stride 4, as in the 4x4 layout), so
// A0, A4, A8 is column 0 and A5, A9 column 1 below the diagonal.
package wf_pkg;

  localparam int unsigned WORD_W    = 64;         // datapath and divider width
  localparam int unsigned WIN       = 7;          // w = 2r + 1
  localparam int unsigned RAD       = 3;          // r
  localparam int unsigned HALF1     = RAD + 1;    // folded length, 4
  localparam int unsigned S_LOG2    = 16;         // S = 2^16
  localparam int unsigned FE_SHIFT  = 8;          // operand pre-scale in forward elimination

  typedef logic signed [WORD_W-1:0] word_t;

  typedef word_t win_vec_t  [WIN];                // 7-tap filter
  typedef word_t win_mat_t  [WIN][WIN];           // one H_ij block, or M
  typedef word_t half_vec_t [HALF1];              // folded A (4)
  typedef word_t half_mat_t [HALF1][HALF1];       // folded B (4x4)

  // 3x3 system A x = b after enforcement (matrix naming of the solver).
  typedef struct packed {
    logic [2:0][2:0][WORD_W-1:0] a;               // a[row][col]
    logic [2:0][WORD_W-1:0]      b;
  } lin_sys_t;

  typedef logic [2:0][WORD_W-1:0] sol_t;          // X(0..2)

  // Fold a window index 0..6 onto 0..3.
  function automatic int unsigned wrap_idx(int unsigned t);
    return (t >= HALF1) ? (WIN - 1 - t) : t;
  endfunction

  // Absolute value of a word (the most negative value maps to itself,
  // read as unsigned that is still its magnitude).
  function automatic logic [WORD_W-1:0] abs_w(word_t v);
    return v[WORD_W-1] ? WORD_W'(-v) : WORD_W'(v);
  endfunction

  // Divide by S: arithmetic right shift by S_LOG2.
  function automatic word_t descale(word_t v);
    return v >>> S_LOG2;
  endfunction

endpackage
