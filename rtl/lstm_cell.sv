// lstm_cell: one LSTM cell with its state held in static registers, reused
// for every timestep of a sequence.
//
// For input x_t (6 features) and the stored state h_{t-1}, C_{t-1}
// (16 values each) it computes, for every unit u:
//   i  = g(x_t W_i + b_i + h_{t-1} U_i)     input gate
//   f  = g(x_t W_f + b_f + h_{t-1} U_f)     forget gate
//   o  = g(x_t W_o + b_o + h_{t-1} U_o)     output gate
//   C~ = p(x_t W_c + b_c + h_{t-1} U_c)     candidate cell values
//   C_t = i * C~ + f * C_{t-1}              (element-wise products)
//   h_t = o * p(C_t)
// with g the sigmoid recurrent activation and p the ReLU kernel activation.
// The 64 pre-activation columns are stored gate by gate in the order i, f,
// o, c. The recurrent product uses the same dense_mvm block as the kernel
// product, with an all-zero bias.
//
// Because h and C live in registers inside the cell, one cell's logic serves
// all timesteps: a layer issues one step per timestep. Timing: a step takes
// two cycles. In the cycle start is high, the pre-activations of x and the
// stored h are registered (x need only be valid in that cycle). In the next
// cycle done is high, h_new/c_new show the new state, and on the clock edge
// that ends it h and c take those values. clear zeroes the state (h_0 =
// C_0 = 0) and takes priority over a step; start must not be raised while a
// step is in progress (busy). Reset is asynchronous and active low.
module lstm_cell
  import lstm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,                       // zero h and C
  input  logic start,                       // begin one timestep
  input  fx_t  x      [N_FEAT],             // x_t, valid while start is high
  input  fx_t  w_k    [N_FEAT][N_COLS],     // kernel weights
  input  fx_t  w_r    [N_UNITS][N_COLS],    // recurrent kernel weights
  input  fx_t  b_k    [N_COLS],             // kernel bias
  output logic busy,                        // a step is in progress
  output logic done,                        // new state shown on h_new/c_new
  output fx_t  h_new  [N_UNITS],            // h_t (valid while done)
  output fx_t  c_new  [N_UNITS],            // C_t (valid while done)
  output fx_t  h      [N_UNITS],            // stored h
  output fx_t  c      [N_UNITS]             // stored C
);

  fx_t  zero_b [N_COLS];
  acc_t y_k    [N_COLS];
  acc_t y_r    [N_COLS];
  fx_t  z_q    [N_COLS];                    // registered pre-activations
  fx_t  sig    [N_COLS];
  logic phase;                              // 1: update cycle

  always_comb for (int n = 0; n < N_COLS; n++) zero_b[n] = '0;

  dense_mvm #(.N_IN(N_FEAT),  .N_OUT(N_COLS)) u_kernel
    (.x(x), .w(w_k), .b(b_k),    .y(y_k));
  dense_mvm #(.N_IN(N_UNITS), .N_OUT(N_COLS)) u_recurrent
    (.x(h), .w(w_r), .b(zero_b), .y(y_r));

  // Sigmoid units on the three gate blocks (i, f, o); the candidate block
  // uses ReLU, so its sigmoid outputs are not used.
  for (genvar n = 0; n < N_COLS; n++) begin : g_sig
    if (n < 3 * N_UNITS) begin : g_on
      sigmoid_act u_sig (.x(z_q[n]), .y(sig[n]));
    end else begin : g_off
      assign sig[n] = '0;
    end
  end

  always_comb begin
    for (int u = 0; u < N_UNITS; u++) begin
      fx_t g_i, g_f, g_o, c_t;
      g_i = sig[GATE_I * N_UNITS + u];
      g_f = sig[GATE_F * N_UNITS + u];
      g_o = sig[GATE_O * N_UNITS + u];
      c_t = fx_relu(z_q[GATE_C * N_UNITS + u]);
      c_new[u] = fx_cast(fx_mul(g_i, c_t) + fx_mul(g_f, c[u]));
      h_new[u] = fx_cast(fx_mul(g_o, fx_relu(c_new[u])));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0;
      for (int n = 0; n < N_COLS; n++) z_q[n] <= '0;
      for (int u = 0; u < N_UNITS; u++) begin
        h[u] <= '0;
        c[u] <= '0;
      end
    end else if (clear) begin
      phase <= 1'b0;
      for (int u = 0; u < N_UNITS; u++) begin
        h[u] <= '0;
        c[u] <= '0;
      end
    end else if (phase) begin
      phase <= 1'b0;
      h     <= h_new;
      c     <= c_new;
    end else if (start) begin
      phase <= 1'b1;
      for (int n = 0; n < N_COLS; n++) z_q[n] <= fx_cast(y_k[n] + y_r[n]);
    end
  end

  assign busy = phase;
  assign done = phase;

  // Handshake rule: no new step while one is in progress.
  always_ff @(posedge clk) begin
    if (rst_n && !clear) begin
      a_no_start_busy: assert (!(start && phase))
        else $error("lstm_cell: start raised during a step");
    end
  end

endmodule
