// softmax: turns the N_CLASS logits into class probabilities,
// p_n = e^(z_n - m) / sum_k e^(z_k - m), with m the largest logit.
//
// Subtracting the largest logit keeps every exponent argument <= 0, so the
// exp_neg units only ever produce values in [0, 1] and the largest term is
// exactly 1, which makes the sum at least 1 and never zero. The N_CLASS
// divisions then run in parallel as restoring long divisions, one quotient
// bit per cycle. Since p_n <= 1, a quotient has W_FRAC+1 bits and each
// division takes W_FRAC+1 cycles. Probabilities come out as fx_t
// (ap_fixed<16,6>, 1.0 = 1024), truncated.
//
// Timing: in the cycle start is high (busy low), z must be valid and the
// exponentials and their sum are registered. done is high for one cycle
// W_FRAC+2 cycles after the start cycle (12 cycles), and prob holds its value
// until the next done. busy is high from the cycle after start through the
// cycle before done. The max-subtraction, exp method and divider are this
// design's choices; the model names only the softmax function.
module softmax
  import lstm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  z    [N_CLASS],
  output logic busy,
  output logic done,
  output fx_t  prob [N_CLASS]
);

  localparam int unsigned EW = W_TOT + 1;        // exp width, Q1.15
  localparam int unsigned SW = EW + 3;           // sum of 5 exps
  localparam int unsigned QW = W_FRAC + 1;       // quotient bits

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_DONE} state_e;

  state_e                  state;
  logic [$clog2(QW)-1:0]   cnt;
  fx_t                     zmax;
  logic signed [W_TOT:0]   d    [N_CLASS];
  logic [EW-1:0]           e    [N_CLASS];
  logic [SW-1:0]           esum;
  logic [EW-1:0]           e_q  [N_CLASS];
  logic [SW-1:0]           sum_q;
  logic [SW-1:0]           rem  [N_CLASS];
  logic [QW-1:0]           quo  [N_CLASS];

  always_comb begin
    zmax = z[0];
    for (int n = 1; n < int'(N_CLASS); n++) if (z[n] > zmax) zmax = z[n];
    esum = '0;
    for (int n = 0; n < int'(N_CLASS); n++) begin
      d[n] = (W_TOT+1)'(z[n]) - (W_TOT+1)'(zmax);
      esum += SW'(e[n]);
    end
  end

  for (genvar n = 0; n < N_CLASS; n++) begin : g_exp
    exp_neg u_exp (.d(d[n]), .e(e[n]));
  end

  // Dividend of class n is e_q[n] << W_FRAC; bit i of it:
  function automatic logic div_bit(input logic [EW-1:0] ev, input int i);
    return (i >= int'(W_FRAC)) ? ev[i - W_FRAC] : 1'b0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      sum_q <= '0;
      for (int n = 0; n < int'(N_CLASS); n++) begin
        e_q[n]  <= '0;
        rem[n]  <= '0;
        quo[n]  <= '0;
        prob[n] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          sum_q <= esum;
          e_q   <= e;
          for (int n = 0; n < int'(N_CLASS); n++) begin
            rem[n] <= SW'(e[n] >> (QW - W_FRAC));  // dividend >> QW, < sum
            quo[n] <= '0;
          end
          cnt   <= ($clog2(QW))'(QW - 1);
          state <= S_DIV;
        end
        S_DIV: begin
          for (int n = 0; n < int'(N_CLASS); n++) begin
            logic [SW:0] r;
            r = {rem[n], div_bit(e_q[n], int'(cnt))};
            if (r >= (SW+1)'(sum_q)) begin
              rem[n]      <= SW'(r - (SW+1)'(sum_q));
              quo[n][cnt] <= 1'b1;
            end else begin
              rem[n]      <= SW'(r);
            end
          end
          if (cnt == '0) state <= S_DONE;
          else           cnt   <= cnt - 1'b1;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
      if (state == S_DIV && cnt == '0) begin
        // the last quotient bit is decided in this cycle
        for (int n = 0; n < int'(N_CLASS); n++) begin
          logic [SW:0] r;
          r = {rem[n], div_bit(e_q[n], 0)};
          prob[n] <= fx_t'({quo[n][QW-1:1], (r >= (SW+1)'(sum_q))});
        end
      end
    end
  end

  assign busy = (state == S_DIV);
  assign done = (state == S_DONE);

endmodule
