// dense_layer: the output Dense layer of the tagger.
//
// The LSTM output of shape [STEPS x N_UNITS] is flattened row by row
// (element k = t*N_UNITS + u) to a [1 x STEPS*N_UNITS] vector, multiplied
// with the [STEPS*N_UNITS x N_CLASS] dense weights in one fully parallel
// dense_mvm, offset by the dense bias and cast to fx_t. The result is one
// logit per class, which the softmax turns into probabilities.
//
// Timing: in the cycle start is high, seq_in, w_d and b_d must be valid; the
// logits are registered on that clock edge, and done is high in the next
// cycle. logits hold their value until the next start. The dense bias is
// this design's assumption (a Keras Dense layer has one by default).
module dense_layer
  import lstm_pkg::*;
#(
  parameter int unsigned STEPS = N_STEPS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  seq_in [STEPS][N_UNITS],
  input  fx_t  w_d    [STEPS*N_UNITS][N_CLASS],
  input  fx_t  b_d    [N_CLASS],
  output logic done,
  output fx_t  logits [N_CLASS]
);

  localparam int unsigned NF = STEPS * N_UNITS;

  fx_t  flat [NF];
  acc_t y    [N_CLASS];

  always_comb
    for (int s = 0; s < int'(STEPS); s++)
      for (int u = 0; u < int'(N_UNITS); u++)
        flat[s * N_UNITS + u] = seq_in[s][u];

  dense_mvm #(.N_IN(NF), .N_OUT(N_CLASS)) u_mvm (.x(flat), .w(w_d), .b(b_d), .y(y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int n = 0; n < int'(N_CLASS); n++) logits[n] <= '0;
    end else begin
      done <= start;
      if (start)
        for (int n = 0; n < int'(N_CLASS); n++) logits[n] <= fx_cast(y[n]);
    end
  end

endmodule
