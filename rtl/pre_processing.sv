// pre_processing -- gathers the second-order statistics of a region of the
// frame: the autocovariance H of the 7x7 degraded-pixel window and the
// cross-correlation M between that window and the source pixel.
//
// For every pixel p of the region the caller presents its window
// X_p[r][c] (r = row, c = column, 0..6, centred on p) of the degraded frame
// and the source pixel Y_p, one window per clock with `win_valid`. The block
// keeps running sums, the expectation taken as a plain sum over the region:
//   H_ij[k][l] += X_p[k][i] * X_p[l][j]     (49 blocks of 7x7, i,j = columns)
//   M[i][j]    += Y_p * X_p[j][i]
// All 2401 + 49 products of a window are formed in parallel (one register
// stage) and added on the next clock, so a window is accepted every clock
// and its contribution is visible two clocks later; `pending` is high while
// a window is still in flight. `clear` empties all sums (start of a new
// region). H is read one block at a time through (h_i, h_j) -> h_blk,
// combinationally, in the block layout the update stages expect; M is
// read whole on m_out.
//
// The definitions of H and M are the design's; that they are sums over a
// region, the pixel width, the absence of mean removal (the caller
// supplies samples with the mean already taken off if an autocovariance
// proper is wanted) and the fully parallel structure are this
// implementation's choices.
module pre_processing
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
  output logic                    pending,
  input  logic [2:0]              h_i,
  input  logic [2:0]              h_j,
  output word_t                   h_blk [WIN][WIN],
  output word_t                   m_out [WIN][WIN]
);

  localparam int unsigned PW = 2 * PIX_W;   // product width
  localparam int unsigned NH = WIN * WIN * WIN * WIN;

  logic  vld1;
  word_t h_flat [NH];                         // H_ij[k][l] at ((i*7+j)*7+k)*7+l

  assign pending = vld1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld1 <= 1'b0;
    else        vld1 <= win_valid && !clear;
  end

  // one multiply-accumulate cell per H element: product register, sum register
  for (genvar i = 0; i < WIN; i++) begin : g_i
    for (genvar j = 0; j < WIN; j++) begin : g_j
      for (genvar k = 0; k < WIN; k++) begin : g_k
        for (genvar l = 0; l < WIN; l++) begin : g_l
          logic signed [PW-1:0] prod;
          word_t                acc;
          always_ff @(posedge clk or negedge rst_n) begin
            if (!rst_n) begin
              prod <= '0;
              acc  <= '0;
            end else begin
              if (win_valid) prod <= win_x[k][i] * win_x[l][j];
              if (clear)     acc  <= '0;
              else if (vld1) acc  <= acc + WORD_W'(prod);
            end
          end
          assign h_flat[((i * WIN + j) * WIN + k) * WIN + l] = acc;
        end
      end
      // M cell
      logic signed [PW-1:0] mprod;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          mprod       <= '0;
          m_out[i][j] <= '0;
        end else begin
          if (win_valid) mprod <= win_y * win_x[j][i];
          if (clear)     m_out[i][j] <= '0;
          else if (vld1) m_out[i][j] <= m_out[i][j] + WORD_W'(mprod);
        end
      end
    end
  end

  // block read port
  always_comb begin
    for (int k = 0; k < WIN; k++)
      for (int l = 0; l < WIN; l++)
        h_blk[k][l] = h_flat[((int'(h_i) * WIN + int'(h_j)) * WIN + k) * WIN + l];
  end

endmodule
