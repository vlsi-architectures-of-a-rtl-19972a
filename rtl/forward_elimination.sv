// forward_elimination -- one stage of Gaussian forward elimination on the
// 3x3 system, built from multipliers, restoring dividers, left shifters and
// subtractors.
//
// Stage K eliminates column K below the pivot A[K][K]. For every row r > K
// the elements A[r][j] (j > K) and b[r] are updated with
//   x_new = x - ((((c >>> FE_SHIFT) * x_k) / A[K][K]) <<< FE_SHIFT)
// where c = A[r][K] and x_k is the element of the pivot row in the same
// column (b[K] for the vector). The left shift after the divider is the one
// of the drawn datapath; the matching right shift of the multiplier operand
// c by FE_SHIFT (8) is this design's choice, made to keep the product inside
// 64 bits. The eliminated column entries A[r][K] are written as zero.
// Division truncates toward zero.
//   K = 0: rows 1 and 2, six quotients (A5, A6, b1, A9, A10, b2)
//   K = 1: row 2, two quotients (A10, b2)
// All quotients of a stage share the pivot as divisor and run on parallel
// dividers.
//
// Pipeline (one operator per stage): start -> register the products ->
// start the dividers -> W+1 cycles of division -> register shifted
// differences. `done` pulses W+3 cycles after the `start` edge; `sys_out`
// then holds until the next start. `singular` is raised with `done` when
// the pivot is zero (the stage's result is then meaningless).
module forward_elimination
  import wf_pkg::*;
#(
  parameter int unsigned K = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  lin_sys_t sys_in,
  output logic     done,
  output logic     singular,
  output lin_sys_t sys_out
);

  localparam int unsigned NR = 2 - K;     // rows below the pivot
  localparam int unsigned NC = 3 - K;     // columns right of the pivot, plus b
  localparam int unsigned NT = NR * NC;   // quotients in this stage

  typedef enum logic [1:0] {IDLE, GO, WAIT} state_t;
  state_t state;

  lin_sys_t sys_r;
  word_t    prod  [NT];
  word_t    quo   [NT];
  logic     dv_done [NT];
  logic     dv_zero [NT];
  logic     dv_busy [NT];
  word_t    dv_rem  [NT];

  // element of the system addressed by (row, column); column 3 is b
  function automatic word_t elem(lin_sys_t s, int unsigned r, int unsigned c);
    return (c == 3) ? $signed(s.b[r]) : $signed(s.a[r][c]);
  endfunction

  // target t -> row and column
  function automatic int unsigned t_row(int unsigned t);
    return K + 1 + t / NC;
  endfunction
  function automatic int unsigned t_col(int unsigned t);
    return (t % NC == NC - 1) ? 3 : K + 1 + t % NC;
  endfunction

  for (genvar t = 0; t < NT; t++) begin : g_div
    restoring_divider #(.W(WORD_W)) u_div (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (state == GO),
      .dividend    (prod[t]),
      .divisor     ($signed(sys_r.a[K][K])),
      .busy        (dv_busy[t]),
      .done        (dv_done[t]),
      .quotient    (quo[t]),
      .remainder   (dv_rem[t]),
      .div_by_zero (dv_zero[t])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      sys_r    <= '0;
      sys_out  <= '0;
      done     <= 1'b0;
      singular <= 1'b0;
      for (int t = 0; t < NT; t++) prod[t] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sys_r <= sys_in;
          for (int t = 0; t < NT; t++)
            prod[t] <= (elem(sys_in, t_row(t), K) >>> FE_SHIFT)
                       * elem(sys_in, K, t_col(t));
          state <= GO;
        end
        GO: state <= WAIT;
        WAIT: if (dv_done[0]) begin
          sys_out <= sys_r;
          for (int r = K + 1; r < 3; r++) sys_out.a[r][K] <= '0;
          for (int t = 0; t < NT; t++) begin
            if (t_col(t) == 3)
              sys_out.b[t_row(t)] <= elem(sys_r, t_row(t), 3) - (quo[t] <<< FE_SHIFT);
            else
              sys_out.a[t_row(t)][t_col(t)] <=
                elem(sys_r, t_row(t), t_col(t)) - (quo[t] <<< FE_SHIFT);
          end
          singular <= dv_zero[0];
          done     <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
