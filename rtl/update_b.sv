// update_b -- computes the horizontal filter b with the vertical filter a
// (the output of update_a) held fixed.
//
// Accumulation (storing form): the same counters i, j step through the 49
// blocks H_ij, j fastest. Each block is contracted with a on both of its
// own indices into one scalar, which is stored (added) into the matrix
// element that the block's position folds onto:
//   B[wrap(i)][wrap(j)] += sum_k sum_l ((H_ij[k][l] * a(k)) >> 16) * a(l) >> 16
//   A[wrap(i)]          +=  (M[i][j] * a(j)) >> 16
// Unlike update_a, whose whole 4x4 matrix is fed back every block, here
// one matrix element is written per block. The same solver chain as in
// update_a then produces the 7-tap filter b.
//
// Interface and handshake are those of update_a (`fixed_in` is a).
// Pipeline: product with a(k) -> product with a(l) -> 7-input row sums ->
// 7-input total -> store; the two sums are adder trees, the only stages
// with more than one operator. With h_valid held high `done` comes
// 49 + 6 + (5*(W+1) + 22) + 1 cycles after start (403 for W = 64).
//
// The storing form of the matrix is the design's stated difference from
// update_a; how the block is contracted and where the scalar is stored is
// this implementation's reading of the update-b equations.
module update_b
  import wf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  word_t      fixed_in [WIN],       // a_updated
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
  word_t      rs [WIN];
  word_t      tot;
  word_t      acc_b [HALF1][HALF1];
  word_t      acc_a [HALF1];
  word_t      ma1, ma2;
  logic [2:0] i1, j1, i2, j2, i3, j3, i4, j4;
  logic [4:0] vld;
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
      ma1 <= '0; ma2 <= '0; tot <= '0;
      {i1, j1, i2, j2, i3, j3, i4, j4} <= '0;
      done <= 1'b0; singular <= 1'b0;
      for (int k = 0; k < WIN; k++) begin
        fix[k]  <= '0;
        taps[k] <= '0;
        rs[k]   <= '0;
        for (int l = 0; l < WIN; l++) begin p1[k][l] <= '0; p2[k][l] <= '0; end
      end
      for (int k = 0; k < HALF1; k++) begin
        acc_a[k] <= '0;
        for (int l = 0; l < HALF1; l++) acc_b[k][l] <= '0;
      end
    end else begin
      done <= 1'b0;
      vld  <= {vld[3:0], take};

      // stage 1: H_ij[k][l] * a(k), M_ij * a(j)
      if (take) begin
        for (int k = 0; k < WIN; k++)
          for (int l = 0; l < WIN; l++)
            p1[k][l] <= h_blk[k][l] * fix[k];
        ma1 <= m_in[h_i][h_j] * fix[h_j];
        i1 <= h_i; j1 <= h_j;
      end
      // stage 2: (. >> 16) * a(l)
      if (vld[0]) begin
        for (int k = 0; k < WIN; k++)
          for (int l = 0; l < WIN; l++)
            p2[k][l] <= descale(p1[k][l]) * fix[l];
        ma2 <= descale(ma1);
        i2 <= i1; j2 <= j1;
      end
      // stage 3: row sums; vector accumulation
      if (vld[1]) begin
        for (int k = 0; k < WIN; k++) begin
          word_t s;
          s = '0;
          for (int l = 0; l < WIN; l++) s = s + descale(p2[k][l]);
          rs[k] <= s;
        end
        acc_a[wrap_idx(32'(i2))] <= acc_a[wrap_idx(32'(i2))] + ma2;
        i3 <= i2; j3 <= j2;
      end
      // stage 4: total
      if (vld[2]) begin
        word_t s;
        s = '0;
        for (int k = 0; k < WIN; k++) s = s + rs[k];
        tot <= s;
        i4 <= i3; j4 <= j3;
      end
      // stage 5: store into the folded matrix position
      if (vld[3])
        acc_b[wrap_idx(32'(i4))][wrap_idx(32'(j4))] <=
          acc_b[wrap_idx(32'(i4))][wrap_idx(32'(j4))] + tot;

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
