// dense_mvm: fully parallel vector-matrix product with bias, y = x * W + b.
//
// This is the one "dense multiplication" building block of the engine. The
// LSTM cell uses it twice per timestep (input x_t against the kernel weights
// with the kernel bias, and h_{t-1} against the recurrent weights with an
// all-zero recurrent bias), and the dense layer uses it once for the
// flattened [1 x 320] LSTM output against the [320 x 5] dense weights.
//
// All N_IN * N_OUT multiplications happen in parallel (reuse factor 1: every
// multiplier is used once per result), and each output is the exact sum of
// its products plus the bias, aligned to 2*W_FRAC fractional bits. The
// caller casts it back to fx_t. Purely combinational: y follows x, w and b in
// the same cycle.
module dense_mvm
  import lstm_pkg::*;
#(
  parameter int unsigned N_IN  = 6,
  parameter int unsigned N_OUT = 64
) (
  input  fx_t  x [N_IN],            // input row vector
  input  fx_t  w [N_IN][N_OUT],     // weight matrix, row = input index
  input  fx_t  b [N_OUT],           // bias row vector
  output acc_t y [N_OUT]            // exact x*W + b, 2*W_FRAC fraction bits
);

  always_comb begin
    for (int n = 0; n < N_OUT; n++) begin
      acc_t s;
      s = fx_align(b[n]);
      for (int k = 0; k < N_IN; k++) s += fx_mul(x[k], w[k][n]);
      y[n] = s;
    end
  end

endmodule
