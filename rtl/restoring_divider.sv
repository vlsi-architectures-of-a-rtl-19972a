// restoring_divider -- sequential signed divider, one shift-and-subtract
// step per clock (restoring division).
//
// On `start` the magnitudes of dividend and divisor are loaded into the
// FIRST DIVIDEND and DIVISOR registers, the PARTIAL REMAINDER is cleared and
// the step counter is set to W. Each following clock shifts the pair
// {partial remainder, dividend} left by one bit and subtracts the divisor
// from the partial remainder. When the difference is not negative it
// replaces the partial remainder; the complement of the difference's sign
// bit is shifted into the QUOTIENT register. When the counter reaches zero
// one more clock applies the signs, so the result equals C integer division
// (quotient truncated toward zero, remainder with the dividend's sign).
//
// Timing: `start` is taken on a rising edge while the unit is idle; `done`
// is a one-cycle pulse W+1 cycles later, with `quotient` and `remainder`
// valid from then until the next start. `busy` is high in between.
// A zero divisor raises `div_by_zero` with `done`; the quotient is then
// all ones in magnitude, as the plain algorithm gives.
//
// The register structure (counter, quotient, remainder/dividend pair,
// divisor, one subtractor) follows the optimised divider of the design;
// handling signed operands by magnitude and a final sign step is this
// implementation's choice.
module restoring_divider #(
  parameter int unsigned W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic signed [W-1:0] dividend,
  input  logic signed [W-1:0] divisor,
  output logic                busy,
  output logic                done,
  output logic signed [W-1:0] quotient,
  output logic signed [W-1:0] remainder,
  output logic                div_by_zero
);

  localparam int unsigned CW = $clog2(W + 1);

  typedef enum logic [1:0] {IDLE, STEP, SIGN} state_t;

  state_t         state;
  logic [CW-1:0]  count;
  logic [W-1:0]   prem;       // partial remainder
  logic [W-1:0]   dvd;        // remaining dividend bits
  logic [W-1:0]   dvs;        // divisor magnitude
  logic [W-1:0]   quo;
  logic           q_neg, r_neg;

  // One step: shift, then trial subtraction on W+1 bits.
  logic [W:0]     shifted;
  logic [W:0]     diff;
  assign shifted = {prem, dvd[W-1]};
  assign diff    = shifted - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      count       <= '0;
      prem        <= '0;
      dvd         <= '0;
      dvs         <= '0;
      quo         <= '0;
      q_neg       <= 1'b0;
      r_neg       <= 1'b0;
      done        <= 1'b0;
      quotient    <= '0;
      remainder   <= '0;
      div_by_zero <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          prem        <= '0;
          dvd         <= dividend[W-1] ? W'(-dividend) : W'(dividend);
          dvs         <= divisor[W-1]  ? W'(-divisor)  : W'(divisor);
          q_neg       <= dividend[W-1] ^ divisor[W-1];
          r_neg       <= dividend[W-1];
          div_by_zero <= (divisor == '0);
          quo         <= '0;
          count       <= CW'(W);
          state       <= STEP;
        end
        STEP: begin
          dvd <= {dvd[W-2:0], 1'b0};
          quo <= {quo[W-2:0], ~diff[W]};
          prem <= diff[W] ? shifted[W-1:0] : diff[W-1:0];
          count <= count - 1'b1;
          if (count == CW'(1)) state <= SIGN;
        end
        SIGN: begin
          quotient  <= q_neg ? -$signed(quo)  : $signed(quo);
          remainder <= r_neg ? -$signed(prem) : $signed(prem);
          done      <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

endmodule
