// back_substitution -- solves the upper-triangular 3x3 system left by
// forward elimination and stores the solution.
//
//   A0*X0 + A1*X1 + A2*X2 = b0
//           A5*X1 + A6*X2 = b1
//                  A10*X2 = b2
// Solutions are taps scaled by S = 2^16, so every quotient has its dividend
// shifted left by 16 bits and every product with a solution is shifted
// right by 16 bits:
//   X2 = (b2 << 16) / A10
//   C1 = (A6*X2) >> 16,           X1 = ((b1 - C1) << 16) / A5
//   C2 = (A1*X1) >> 16, C3 = (A2*X2) >> 16,
//                                 X0 = ((b0 - (C2 + C3)) << 16) / A0
// Three restoring dividers, three multipliers with right shifters, the
// subtractors and the adder follow the drawn datapath. Pipeline registers
// after every multiplier, adder and subtractor keep one operator per clock
// stage (this design's schedule).
//
// `done` pulses 3*(W+1) + 11 cycles after the `start` edge with `x` valid
// until the next start; `singular` is raised with it when a diagonal
// element is zero.
module back_substitution
  import wf_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  lin_sys_t sys_in,
  output logic     done,
  output logic     singular,
  output sol_t     x
);

  typedef enum logic [3:0] {
    IDLE, D2_GO, D2_WAIT, M1, S1, D1_GO, D1_WAIT, M0, A0, S0, D0_GO, D0_WAIT
  } state_t;
  state_t state;

  lin_sys_t s;
  word_t    x2, x1, c1, c2, c3, t1, t0, sum23;
  word_t    q2, q1, q0, r2, r1, r0;
  logic     dn2, dn1, dn0, z2, z1, z0, bz2, bz1, bz0;
  logic     zero_seen;

  restoring_divider #(.W(WORD_W)) u_div2 (
    .clk(clk), .rst_n(rst_n), .start(state == D2_GO),
    .dividend($signed(s.b[2]) <<< S_LOG2), .divisor($signed(s.a[2][2])),
    .busy(bz2), .done(dn2), .quotient(q2), .remainder(r2), .div_by_zero(z2));

  restoring_divider #(.W(WORD_W)) u_div1 (
    .clk(clk), .rst_n(rst_n), .start(state == D1_GO),
    .dividend(t1 <<< S_LOG2), .divisor($signed(s.a[1][1])),
    .busy(bz1), .done(dn1), .quotient(q1), .remainder(r1), .div_by_zero(z1));

  restoring_divider #(.W(WORD_W)) u_div0 (
    .clk(clk), .rst_n(rst_n), .start(state == D0_GO),
    .dividend(t0 <<< S_LOG2), .divisor($signed(s.a[0][0])),
    .busy(bz0), .done(dn0), .quotient(q0), .remainder(r0), .div_by_zero(z0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      s         <= '0;
      {x2, x1, c1, c2, c3, t1, t0, sum23} <= '0;
      x         <= '0;
      done      <= 1'b0;
      singular  <= 1'b0;
      zero_seen <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          s         <= sys_in;
          zero_seen <= 1'b0;
          state     <= D2_GO;
        end
        D2_GO:   state <= D2_WAIT;
        D2_WAIT: if (dn2) begin
          x2        <= q2;
          zero_seen <= z2;
          state     <= M1;
        end
        M1: begin
          c1    <= ($signed(s.a[1][2]) * x2) >>> S_LOG2;
          c3    <= ($signed(s.a[0][2]) * x2) >>> S_LOG2;
          state <= S1;
        end
        S1: begin
          t1    <= $signed(s.b[1]) - c1;
          state <= D1_GO;
        end
        D1_GO:   state <= D1_WAIT;
        D1_WAIT: if (dn1) begin
          x1        <= q1;
          zero_seen <= zero_seen | z1;
          state     <= M0;
        end
        M0: begin
          c2    <= ($signed(s.a[0][1]) * x1) >>> S_LOG2;
          state <= A0;
        end
        A0: begin
          sum23 <= c2 + c3;
          state <= S0;
        end
        S0: begin
          t0    <= $signed(s.b[0]) - sum23;
          state <= D0_GO;
        end
        D0_GO:   state <= D0_WAIT;
        D0_WAIT: if (dn0) begin
          x        <= {x2, x1, q0};   // x[i] = X(i)
          singular <= zero_seen | z0;
          done     <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
