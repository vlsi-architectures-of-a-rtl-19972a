// wiener_filter_top -- the complete filter-estimation process: statistics
// from pixels, then one iteration of update a / update b.
//
// pre_processing accumulates H and M from the degraded-frame windows and
// source pixels streamed in; wiener_filter_core then computes the new
// vertical filter a with b_in fixed and the new horizontal filter b with
// that a fixed, reading the H blocks straight from the statistics
// registers (one block per clock, never stalled).
//
// Interface:
//   clear                 empties the statistics (start of a region);
//                         a window in flight is discarded
//   win_valid, win_x, win_y  one 7x7 degraded window and its source pixel
//                         per clock; ignored while `busy`
//   start, b_in           begin an iteration on the statistics gathered so
//                         far; b_in sampled on this edge. Accepted while
//                         `busy` is low, which includes the `done` cycle. The core starts
//                         once the last window has been added (at most one
//                         clock later).
//   done, a_out, b_out, a_singular, b_singular  as in wiener_filter_core
// Latency: 808 cycles from the core's start, plus 1 or 2 cycles.
//
// The process order (pre-processing, update a, reconstruction, update b,
// reconstruction) follows the described filter process; the pixel
// interface and the busy gating are this design's choices.
module wiener_filter_top
  import wf_pkg::*;
#(
  parameter int unsigned PIX_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    win_valid,
  input  logic signed [PIX_W-1:0] win_x [WIN][WIN],
  input  logic signed [PIX_W-1:0] win_y,
  input  logic                    start,
  input  word_t                   b_in  [WIN],
  output logic                    busy,
  output logic                    done,
  output word_t                   a_out [WIN],
  output word_t                   b_out [WIN],
  output logic                    a_singular,
  output logic                    b_singular
);

  typedef enum logic [1:0] {IDLE, WAIT_STATS, RUN} state_t;
  state_t state;

  word_t      b_r   [WIN];
  word_t      h_blk [WIN][WIN];
  word_t      m_st  [WIN][WIN];
  logic       pp_pending, core_busy, core_start, h_req;
  logic [2:0] h_i, h_j;

  // free again in the done cycle: the core has finished reading H and M
  assign busy       = (state == WAIT_STATS) || (state == RUN && !done);
  assign core_start = (state == WAIT_STATS) && !pp_pending;

  pre_processing #(.PIX_W(PIX_W)) u_pre (
    .clk(clk), .rst_n(rst_n),
    .clear(clear && !busy), .win_valid(win_valid && !busy),
    .win_x(win_x), .win_y(win_y), .pending(pp_pending),
    .h_i(h_i), .h_j(h_j), .h_blk(h_blk), .m_out(m_st));

  wiener_filter_core u_core (
    .clk(clk), .rst_n(rst_n), .start(core_start),
    .b_in(b_r), .m_in(m_st),
    .h_req(h_req), .h_i(h_i), .h_j(h_j), .h_valid(1'b1), .h_blk(h_blk),
    .busy(core_busy), .done(done),
    .a_out(a_out), .b_out(b_out), .a_singular(a_singular), .b_singular(b_singular));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      for (int k = 0; k < WIN; k++) b_r[k] <= '0;
    end else begin
      unique case (state)
        IDLE: if (start) begin
          b_r   <= b_in;
          state <= WAIT_STATS;
        end
        WAIT_STATS: if (!pp_pending) state <= RUN;
        RUN: if (done) begin
          if (start) b_r <= b_in;
          state <= start ? WAIT_STATS : IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // the core runs only while the statistics are frozen
  assert property (@(posedge clk) disable iff (!rst_n) core_busy |-> busy);

endmodule
