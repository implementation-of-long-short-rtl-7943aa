// sigmoid_act: recurrent activation g of the LSTM gates, y = sigma(x).
//
// The logistic function is approximated piecewise-linearly with slopes that
// are powers of two, so the unit needs only shifts, adds and compares
// (the PLAN approximation):
//   |x| >= 5          : y = 1
//   2.375 <= |x| < 5  : y = |x|/32 + 0.84375
//   1 <= |x| < 2.375  : y = |x|/8  + 0.625
//   |x| < 1           : y = |x|/4  + 0.5
//   and y = 1 - y(|x|) for negative x.
// Input and output are fx_t (ap_fixed<16,6>); the output lies in [0, 1].
// Largest error against the true sigmoid is about 0.019. The approximation
// is this design's choice: the model only names the function. Combinational.
module sigmoid_act
  import lstm_pkg::*;
(
  input  fx_t x,
  output fx_t y
);

  localparam int unsigned ONE = 1 << W_FRAC;                // 1024
  localparam logic [W_TOT:0] BP1 = 17'(ONE);                // 1.0
  localparam logic [W_TOT:0] BP2 = 17'((ONE * 19) / 8);     // 2.375
  localparam logic [W_TOT:0] BP3 = 17'(ONE * 5);            // 5.0

  logic [W_TOT:0] a;     // |x|, one bit wider so that |-32| fits
  logic [W_TOT:0] p;     // y(|x|), in [0.5, 1]

  always_comb begin
    a = x[W_TOT-1] ? 17'(-$signed({x[W_TOT-1], x})) : 17'({1'b0, x});
    if (a >= BP3)      p = 17'(ONE);
    else if (a >= BP2) p = (a >> 5) + 17'((ONE * 27) / 32);  // 0.84375
    else if (a >= BP1) p = (a >> 3) + 17'((ONE * 5) / 8);    // 0.625
    else               p = (a >> 2) + 17'(ONE / 2);          // 0.5
    y = x[W_TOT-1] ? fx_t'(17'(ONE) - p) : fx_t'(p);
  end

endmodule
