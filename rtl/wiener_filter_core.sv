// wiener_filter_core -- one iteration of the separable symmetric normalised
// Wiener filter estimation of AV1 loop restoration.
//
// From the autocovariance H (49 blocks H_ij of 7x7), the cross-correlation
// M (7x7) and a starting horizontal filter b_in (7 taps, sum S = 2^16) it
// computes a new vertical filter a (update_a, b fixed, with its
// reconstruction) and then a new horizontal filter b (update_b, a fixed,
// with its reconstruction). Both results are symmetric 7-tap filters whose
// taps sum to S.
//
// Interface:
//   start      one-cycle request while idle; b_in and m_in are sampled on
//              this edge (M is registered here and shared by both updates)
//   h_req      high while H blocks are wanted; (h_i, h_j) names the block
//              H_{h_i,h_j}; a block is taken on every clock with h_valid
//              high and the indices then advance (j fastest). The 49 blocks
//              are read twice, once per update. h_valid may drop at any
//              time; the accumulation simply waits.
//   done       one-cycle pulse; a_out, b_out, a_singular, b_singular valid
//              from then until the next done. A singular system leaves the
//              fixed vector of that update unchanged (a_out = b_in, or
//              b_out = a_out) and raises its flag.
// Latency with h_valid always high: 2 * 403 + 2 cycles from start to done
// (808 for the 64-bit datapath).
//
// The chaining of the two updates and reconstructions follows the described
// filter process. The H request/valid port, registering M here, running the
// two updates strictly one after the other and the singular fallback are
// this design's choices.
module wiener_filter_core
  import wf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  word_t      b_in  [WIN],
  input  word_t      m_in  [WIN][WIN],
  output logic       h_req,
  output logic [2:0] h_i,
  output logic [2:0] h_j,
  input  logic       h_valid,
  input  word_t      h_blk [WIN][WIN],
  output logic       busy,
  output logic       done,
  output word_t      a_out [WIN],
  output word_t      b_out [WIN],
  output logic       a_singular,
  output logic       b_singular
);

  typedef enum logic [1:0] {IDLE, UPD_A, UPD_B} state_t;
  state_t state;

  word_t      m_r [WIN][WIN];
  logic       ua_req, ub_req, ua_busy, ub_busy, ua_done, ub_done, ua_sing, ub_sing;
  logic [2:0] ua_i, ua_j, ub_i, ub_j;
  word_t      ua_taps [WIN];
  word_t      ub_taps [WIN];

  update_a u_update_a (
    .clk(clk), .rst_n(rst_n), .start(state == IDLE && start),
    .fixed_in(b_in), .m_in(m_r),
    .h_req(ua_req), .h_i(ua_i), .h_j(ua_j), .h_valid(h_valid), .h_blk(h_blk),
    .busy(ua_busy), .done(ua_done), .singular(ua_sing), .taps(ua_taps));

  update_b u_update_b (
    .clk(clk), .rst_n(rst_n), .start(ua_done),
    .fixed_in(ua_taps), .m_in(m_r),
    .h_req(ub_req), .h_i(ub_i), .h_j(ub_j), .h_valid(h_valid), .h_blk(h_blk),
    .busy(ub_busy), .done(ub_done), .singular(ub_sing), .taps(ub_taps));

  assign h_req = ua_req | ub_req;
  assign h_i   = ub_req ? ub_i : ua_i;
  assign h_j   = ub_req ? ub_j : ua_j;
  assign busy  = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      done       <= 1'b0;
      a_singular <= 1'b0;
      b_singular <= 1'b0;
      for (int k = 0; k < WIN; k++) begin
        a_out[k] <= '0;
        b_out[k] <= '0;
        for (int l = 0; l < WIN; l++) m_r[k][l] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          m_r   <= m_in;
          state <= UPD_A;
        end
        UPD_A: if (ua_done) state <= UPD_B;
        UPD_B: if (ub_done) begin
          a_out      <= ua_taps;
          b_out      <= ub_taps;
          a_singular <= ua_sing;
          b_singular <= ub_sing;
          done       <= 1'b1;
          state      <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // the two updates never request H at the same time
  assert property (@(posedge clk) disable iff (!rst_n) !(ua_req && ub_req));

endmodule
