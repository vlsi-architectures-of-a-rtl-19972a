// symmetrization -- rebuilds the full 7-tap symmetric filter from the three
// solved taps (the reconstruction step after each update).
//   f[i] = f[6 - i] = x[i]           for i = 0..2
//   f[3] = S - 2*(x[0] + x[1] + x[2])
// so the taps sum to S = 2^16. Purely combinational.
module symmetrization
  import wf_pkg::*;
(
  input  sol_t  x,
  output word_t taps [WIN]
);

  always_comb begin
    word_t sum;
    sum = $signed(x[0]) + $signed(x[1]) + $signed(x[2]);
    for (int i = 0; i < 3; i++) begin
      taps[i]         = $signed(x[i]);
      taps[WIN-1-i]   = $signed(x[i]);
    end
    taps[3] = (word_t'(1) <<< S_LOG2) - (sum <<< 1);
  end

endmodule
