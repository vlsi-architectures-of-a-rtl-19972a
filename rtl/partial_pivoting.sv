// partial_pivoting -- row interchange ahead of each elimination stage.
//
// K = 0 (first stage): the magnitudes of the column-0 elements A0, A4, A8
// are compared two by two by three comparators (A0/A8, A8/A4, A4/A0) and
// the SWAP ROWS network brings the row with the largest magnitude to the
// top. The order of the two remaining rows is that of an adjacent-swap
// pass run from the bottom row upward, where a row moves up only when its
// magnitude is strictly larger:
//   |A4| <  |A8| and |A0| <  |A8|  ->  rows 2,0,1
//   |A4| <  |A8| and |A0| >= |A8|  ->  rows 0,2,1
//   |A4| >= |A8| and |A0| <  |A4|  ->  rows 1,0,2
//   otherwise                      ->  rows 0,1,2
// K = 1 (second stage): rows 1 and 2 are swapped when |A5| < |A9|.
// The vector b is permuted with the matrix rows.
// Purely combinational.
module partial_pivoting
  import wf_pkg::*;
#(
  parameter int unsigned K = 0
) (
  input  lin_sys_t sys_in,
  output lin_sys_t sys_out
);

  if (K == 0) begin : g_stage0
    logic [WORD_W-1:0] m0, m1, m2;
    logic c08, c84, c40;   // comparator outputs
    assign m0  = abs_w(sys_in.a[0][0]);
    assign m1  = abs_w(sys_in.a[1][0]);
    assign m2  = abs_w(sys_in.a[2][0]);
    assign c08 = m0 < m2;  // |A0| < |A8|
    assign c84 = m1 < m2;  // |A4| < |A8|
    assign c40 = m0 < m1;  // |A0| < |A4|

    logic [1:0] r0, r1, r2;  // source row of each output row
    always_comb begin
      if (c84) begin
        if (c08) begin r0 = 2'd2; r1 = 2'd0; r2 = 2'd1; end
        else     begin r0 = 2'd0; r1 = 2'd2; r2 = 2'd1; end
      end else begin
        if (c40) begin r0 = 2'd1; r1 = 2'd0; r2 = 2'd2; end
        else     begin r0 = 2'd0; r1 = 2'd1; r2 = 2'd2; end
      end
      sys_out.a[0] = sys_in.a[r0];
      sys_out.a[1] = sys_in.a[r1];
      sys_out.a[2] = sys_in.a[r2];
      sys_out.b[0] = sys_in.b[r0];
      sys_out.b[1] = sys_in.b[r1];
      sys_out.b[2] = sys_in.b[r2];
    end
  end else begin : g_stage1
    logic c59;             // |A5| < |A9|
    assign c59 = abs_w(sys_in.a[1][1]) < abs_w(sys_in.a[2][1]);
    always_comb begin
      sys_out = sys_in;
      if (c59) begin
        sys_out.a[1] = sys_in.a[2];
        sys_out.a[2] = sys_in.a[1];
        sys_out.b[1] = sys_in.b[2];
        sys_out.b[2] = sys_in.b[1];
      end
    end
  end

endmodule
