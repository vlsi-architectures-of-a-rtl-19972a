// enforcement -- folds the 4x4 statistics into the 3x3 system that already
// contains the normalisation constraint (taps sum to S).
//
// The centre tap of a symmetric 7-tap filter is S - 2*(x0 + x1 + x2).
// Substituting it into the 4x4 normal equations  B x = A  leaves three
// unknowns:
//   b_enf[i]    = A[i]    - (2*A[3] + B[i][3] - 2*B[3][3])
//   a_enf[i][j] = B[i][j] - (2*B[i][3] + 2*B[3][j] - 4*B[3][3])
// for i, j in 0..2. The vector path is the one drawn for this block: a left
// shift of A(3), an adder with B3/B7/B11, a subtraction of the shifted B15
// and a final subtraction from A(i). The matrix path uses the same flow for
// each of the nine kept elements, as the design describes; its exact terms
// are derived from the same substitution.
//
// Naming: inputs use the statistics names (A = 4-vector, B = 4x4 matrix);
// the output system uses the solver names (matrix a, vector b).
// Purely combinational; the caller registers the result.
module enforcement
  import wf_pkg::*;
(
  input  word_t    vec_a [HALF1],
  input  word_t    mat_b [HALF1][HALF1],
  output lin_sys_t sys
);

  always_comb begin
    word_t t;
    for (int i = 0; i < 3; i++) begin
      t = (vec_a[3] <<< 1) + mat_b[i][3];
      t = t - (mat_b[3][3] <<< 1);
      sys.b[i] = vec_a[i] - t;
      for (int j = 0; j < 3; j++) begin
        t = (mat_b[i][3] + mat_b[3][j]) <<< 1;
        t = t - (mat_b[3][3] <<< 2);
        sys.a[i][j] = mat_b[i][j] - t;
      end
    end
  end

endmodule
