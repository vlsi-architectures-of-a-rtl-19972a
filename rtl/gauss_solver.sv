// gauss_solver -- the solving half of an update block: enforcement, two
// pivoting / forward-elimination stages, back-substitution and
// symmetrization, in the order of the update data path.
//
//   start: register enforcement(vec_a, mat_b)            (A_enf, b_enf)
//   +1   : register partial_pivoting K=0                 (A_pivot, b_pivot)
//   +2   : forward_elimination K=0 (W+3 cycles)
//   then : register partial_pivoting K=1 of its result
//   then : forward_elimination K=1 (W+3 cycles)
//   then : back_substitution (3*(W+1)+11 cycles)
//   then : symmetrization, registered into `taps` with the `done` pulse.
// `done` pulses 5*(W+1) + 22 cycles after the `start` edge (347 cycles for
// W = 64). `singular` reports a zero pivot in any stage; `taps` is then not
// a solution and the caller decides what to keep. Inputs must be stable
// only on the start edge.
//
// The stage order and the registers between stages follow the update data
// path; the singular-pivot reporting is this design's addition.
module gauss_solver
  import wf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t vec_a [HALF1],
  input  word_t mat_b [HALF1][HALF1],
  output logic  done,
  output logic  singular,
  output word_t taps [WIN]
);

  typedef enum logic [2:0] {IDLE, PIV0, FE0_GO, FE0_WAIT, FE1_GO, FE1_WAIT, BS_GO, BS_WAIT} state_t;
  state_t state;

  lin_sys_t sys_enf_c, sys_enf, sys_p0_c, sys_p0, sys_fe0, sys_p1_c, sys_p1, sys_fe1;
  logic     fe0_done, fe0_sing, fe1_done, fe1_sing, bs_done, bs_sing;
  logic     sing_acc;
  sol_t     x;
  word_t    taps_c [WIN];

  enforcement u_enf (.vec_a(vec_a), .mat_b(mat_b), .sys(sys_enf_c));

  partial_pivoting #(.K(0)) u_piv0 (.sys_in(sys_enf), .sys_out(sys_p0_c));

  forward_elimination #(.K(0)) u_fe0 (
    .clk(clk), .rst_n(rst_n), .start(state == FE0_GO), .sys_in(sys_p0),
    .done(fe0_done), .singular(fe0_sing), .sys_out(sys_fe0));

  partial_pivoting #(.K(1)) u_piv1 (.sys_in(sys_fe0), .sys_out(sys_p1_c));

  forward_elimination #(.K(1)) u_fe1 (
    .clk(clk), .rst_n(rst_n), .start(state == FE1_GO), .sys_in(sys_p1),
    .done(fe1_done), .singular(fe1_sing), .sys_out(sys_fe1));

  back_substitution u_bs (
    .clk(clk), .rst_n(rst_n), .start(state == BS_GO), .sys_in(sys_fe1),
    .done(bs_done), .singular(bs_sing), .x(x));

  symmetrization u_sym (.x(x), .taps(taps_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      sys_enf  <= '0;
      sys_p0   <= '0;
      sys_p1   <= '0;
      sing_acc <= 1'b0;
      done     <= 1'b0;
      singular <= 1'b0;
      for (int t = 0; t < WIN; t++) taps[t] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          sys_enf <= sys_enf_c;
          state   <= PIV0;
        end
        PIV0: begin
          sys_p0 <= sys_p0_c;
          state  <= FE0_GO;
        end
        FE0_GO:   state <= FE0_WAIT;
        FE0_WAIT: if (fe0_done) begin
          sys_p1   <= sys_p1_c;
          sing_acc <= fe0_sing;
          state    <= FE1_GO;
        end
        FE1_GO:   state <= FE1_WAIT;
        FE1_WAIT: if (fe1_done) begin
          sing_acc <= sing_acc | fe1_sing;
          state    <= BS_GO;
        end
        BS_GO:   state <= BS_WAIT;
        BS_WAIT: if (bs_done) begin
          taps     <= taps_c;
          singular <= sing_acc | bs_sing;
          done     <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
