// update_a -- computes the vertical filter a with the horizontal filter b
// held fixed.
//
// Accumulation (feedback form): two counters i, j step through the 49
// 7x7 blocks H_ij of the autocovariance matrix, j fastest. For each block
//   B[wrap(k)][wrap(l)] += ((H_ij[k][l] * b(i)) >> 16) * b(j) >> 16
//   A[wrap(j)]          +=  (M[i][j] * b(i)) >> 16        (M SELECTION)
// where wrap folds the window index onto 0..3. All 49 products of a block
// are formed in parallel; the folded 4x4 matrix is fed back into its own
// accumulator every block. After the last block the solver
// (gauss_solver: enforcement, pivoting, elimination, back-substitution,
// symmetrization) turns (B, A) into the 7-tap filter a.
//
// Interface: `start` latches b and clears the accumulators. While
// `h_req` is high the block wants H_{h_i,h_j}; it takes `h_blk` on every
// clock with `h_valid` high, then advances (h_i, h_j). `m_in` must be
// held stable from start until the last block has been taken. `done`
// pulses with `taps` (the updated a) and `singular`. On a singular
// system `taps` returns the fixed input vector unchanged.
//
// Pipeline: product with b(i) -> product with b(j) -> fold along l ->
// fold along k -> accumulate, one operator per stage. With h_valid held
// high `done` comes 49 + 6 + (5*(W+1) + 22) + 1 cycles after start (403 for
// W = 64).
//
// The counters, the parallel H x b x b products, M selection, feedback
// accumulators and the order of the solver stages follow the described
// update data path; the index roles, the >> 16 rescaling, the fold pipeline
// and the request/valid port are this design's choices.
module update_a
  import wf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  word_t      fixed_in [WIN],       // b_in
  input  word_t      m_in     [WIN][WIN],
  output logic       h_req,
  output logic [2:0] h_i,
  output logic [2:0] h_j,
  input  logic       h_valid,
  input  word_t      h_blk    [WIN][WIN],
  output logic       busy,
  output logic       done,
  output logic       singular,
  output word_t      taps     [WIN]
);

  typedef enum logic [1:0] {IDLE, ACC, DRAIN, SOLVE} state_t;
  state_t state;

  word_t      fix [WIN];
  word_t      p1 [WIN][WIN];
  word_t      p2 [WIN][WIN];
  word_t      g  [WIN][HALF1];
  word_t      f  [HALF1][HALF1];
  word_t      acc_b [HALF1][HALF1];
  word_t      acc_a [HALF1];
  word_t      ma1, ma2;
  word_t      bj1;
  logic [2:0] j1, j2;
  logic [4:0] vld;                         // pipeline stage valid bits
  logic       take;
  logic       slv_done, slv_sing;
  word_t      slv_taps [WIN];

  assign take  = (state == ACC) && h_valid;
  assign h_req = (state == ACC);
  assign busy  = (state != IDLE);

  gauss_solver u_solver (
    .clk(clk), .rst_n(rst_n), .start(state == DRAIN && vld == '0),
    .vec_a(acc_a), .mat_b(acc_b),
    .done(slv_done), .singular(slv_sing), .taps(slv_taps));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      h_i <= '0; h_j <= '0;
      vld <= '0;
      ma1 <= '0; ma2 <= '0; bj1 <= '0; j1 <= '0; j2 <= '0;
      done <= 1'b0; singular <= 1'b0;
      for (int k = 0; k < WIN; k++) begin
        fix[k]  <= '0;
        taps[k] <= '0;
        for (int l = 0; l < WIN; l++) begin p1[k][l] <= '0; p2[k][l] <= '0; end
        for (int l = 0; l < HALF1; l++) g[k][l] <= '0;
      end
      for (int k = 0; k < HALF1; k++) begin
        acc_a[k] <= '0;
        for (int l = 0; l < HALF1; l++) begin f[k][l] <= '0; acc_b[k][l] <= '0; end
      end
    end else begin
      done <= 1'b0;
      vld  <= {vld[3:0], take};

      // stage 1: H_ij * b(i), M_ij * b(i)
      if (take) begin
        for (int k = 0; k < WIN; k++)
          for (int l = 0; l < WIN; l++)
            p1[k][l] <= h_blk[k][l] * fix[h_i];
        ma1 <= m_in[h_i][h_j] * fix[h_i];
        bj1 <= fix[h_j];
        j1  <= h_j;
      end
      // stage 2: (. >> 16) * b(j)
      if (vld[0]) begin
        for (int k = 0; k < WIN; k++)
          for (int l = 0; l < WIN; l++)
            p2[k][l] <= descale(p1[k][l]) * bj1;
        ma2 <= descale(ma1);
        j2  <= j1;
      end
      // stage 3: fold along l; vector accumulation
      if (vld[1]) begin
        for (int k = 0; k < WIN; k++) begin
          for (int l = 0; l < 3; l++)
            g[k][l] <= descale(p2[k][l]) + descale(p2[k][WIN-1-l]);
          g[k][3] <= descale(p2[k][3]);
        end
        acc_a[wrap_idx(32'(j2))] <= acc_a[wrap_idx(32'(j2))] + ma2;
      end
      // stage 4: fold along k
      if (vld[2]) begin
        for (int l = 0; l < HALF1; l++) begin
          for (int k = 0; k < 3; k++) f[k][l] <= g[k][l] + g[WIN-1-k][l];
          f[3][l] <= g[3][l];
        end
      end
      // stage 5: feedback accumulation of the folded block
      if (vld[3]) begin
        for (int k = 0; k < HALF1; k++)
          for (int l = 0; l < HALF1; l++)
            acc_b[k][l] <= acc_b[k][l] + f[k][l];
      end

      unique case (state)
        IDLE: if (start) begin
          fix <= fixed_in;
          h_i <= '0;
          h_j <= '0;
          for (int k = 0; k < HALF1; k++) begin
            acc_a[k] <= '0;
            for (int l = 0; l < HALF1; l++) acc_b[k][l] <= '0;
          end
          state <= ACC;
        end
        ACC: if (take) begin
          if (h_j == 3'(WIN - 1)) begin
            h_j <= '0;
            if (h_i == 3'(WIN - 1)) begin
              h_i   <= '0;
              state <= DRAIN;
            end else begin
              h_i <= h_i + 3'd1;
            end
          end else begin
            h_j <= h_j + 3'd1;
          end
        end
        DRAIN: if (vld == '0) state <= SOLVE;
        SOLVE: if (slv_done) begin
          taps     <= slv_sing ? fix : slv_taps;
          singular <= slv_sing;
          done     <= 1'b1;
          state    <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
