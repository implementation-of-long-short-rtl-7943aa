// exp_neg: e^d for d <= 0, the exponential used by the softmax.
//
// d is a signed number with W_FRAC (10) fractional bits and W_TOT+1 bits in
// total, so that the difference of two fx_t values fits. The unit rewrites
// e^d as 2^-(k+f), with k + f = -d * log2(e), k an integer and 0 <= f < 1:
// 2^-f comes from linear interpolation between the nine points
// 2^(-j/8), j = 0..8 (Q1.15 constants below), and the shift by k does the
// rest. The result e is unsigned with 15 fractional bits, in [0, 1]
// (32768 = 1.0); it is exact for d = 0 and within about 0.001 elsewhere.
// Positive d is treated as 0. Combinational. The method is this design's
// choice; the model only names the softmax.
module exp_neg
  import lstm_pkg::*;
(
  input  logic signed [W_TOT:0] d,
  output logic        [W_TOT:0] e
);

  // round(2^(-j/8) * 2^15), j = 0..8
  localparam logic [15:0] T [9] = '{16'd32768, 16'd30048, 16'd27554, 16'd25268,
                                    16'd23170, 16'd21247, 16'd19484, 16'd17867,
                                    16'd16384};
  localparam logic [15:0] LOG2E_Q14 = 16'd23637;   // log2(e) * 2^14

  logic [W_TOT:0]  u;        // -d, W_FRAC fraction bits
  logic [33:0]     prod;
  logic [23:0]     tq;       // -d*log2(e), W_FRAC fraction bits
  logic [13:0]     k;
  logic [2:0]      seg;
  logic [6:0]      r;
  logic [15:0]     lo, hi;
  logic [23:0]     step;
  logic [16:0]     y;        // 2^-f, Q1.15

  always_comb begin
    u    = d[W_TOT] ? 17'(-d) : '0;
    prod = 34'(u) * 34'(LOG2E_Q14);
    tq   = 24'(prod >> 14);
    k    = tq[23:10];
    seg  = tq[9:7];
    r    = tq[6:0];
    hi   = T[{1'b0, seg}];
    lo   = T[{1'b0, seg} + 4'd1];
    step = (24'(hi - lo) * 24'(r)) >> 7;
    y    = 17'(hi) - 17'(step);
    e    = (k > 14'd16) ? '0 : (y >> k);
  end

endmodule
