// lstm_top_tagger: LSTM jet classifier (top tagging) for 20 particles of 6
// features, producing probabilities for the 5 jet classes q, g, W, Z, t.
//
// Dataflow: input [20 x 6] -> LSTM layer (16 units, sigmoid recurrent
// activation, ReLU activation) -> [20 x 16] -> flatten [1 x 320] -> Dense
// [320 x 5] -> softmax -> [1 x 5]. All numbers are ap_fixed<16,6> (fx_t).
// The LSTM layer uses a single cell whose state is held in registers and
// which is reused for each particle in turn; within a timestep every
// multiplication has its own multiplier (reuse factor 1). The layers run one
// after the other, so a new jet is accepted only when the previous one has
// left (the initiation interval equals the latency).
//
// Interface:
//  * parameter load: wr_en/wr_addr/wr_data write one word per cycle, using
//    the address map in lstm_pkg; rd_addr/rd_data read a word back. Write
//    only while busy is low.
//  * jet input: in_x holds all 20 particles in parallel; it is taken in the
//    cycle in_valid and in_ready are both high.
//  * result: out_valid pulses for one cycle; out_logits (dense layer output)
//    and out_prob (softmax output, 1.0 = 1024) hold until the next result.
// Timing: out_valid rises 2*STEPS + 15 cycles after the accepting cycle
// (55 cycles for 20 particles, 275 ns at the 5 ns clock of the model), and
// in_ready rises in the same cycle. Reset is asynchronous and active low.
module lstm_top_tagger
  import lstm_pkg::*;
#(
  parameter int unsigned STEPS = N_STEPS
) (
  input  logic              clk,
  input  logic              rst_n,
  // parameter load
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  fx_t               wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output fx_t               rd_data,
  // jet input
  input  logic              in_valid,
  output logic              in_ready,
  input  fx_t               in_x [STEPS][N_FEAT],
  // result
  output logic              out_valid,
  output fx_t               out_logits [N_CLASS],
  output fx_t               out_prob   [N_CLASS],
  output logic              busy
);

  typedef enum logic [1:0] {T_IDLE, T_LSTM, T_DENSE, T_SMAX} tstate_e;

  tstate_e state;

  fx_t  w_k [N_FEAT][N_COLS];
  fx_t  w_r [N_UNITS][N_COLS];
  fx_t  b_k [N_COLS];
  fx_t  w_d [STEPS*N_UNITS][N_CLASS];
  fx_t  b_d [N_CLASS];
  fx_t  seq [STEPS][N_UNITS];
  fx_t  logits [N_CLASS];

  logic accept;
  logic l_done, l_step;
  logic d_done;
  logic s_busy, s_done;

  assign in_ready = (state == T_IDLE);
  assign accept   = in_valid && in_ready;
  assign busy     = (state != T_IDLE);

  weight_store #(.STEPS(STEPS)) u_weights (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data,
    .w_k, .w_r, .b_k, .w_d, .b_d
  );

  lstm_layer #(.STEPS(STEPS)) u_lstm (
    .clk, .rst_n,
    .start      (accept),
    .x_seq      (in_x),
    .w_k, .w_r, .b_k,
    .busy       (),
    .done       (l_done),
    .step_pulse (l_step),
    .seq_out    (seq)
  );

  dense_layer #(.STEPS(STEPS)) u_dense (
    .clk, .rst_n,
    .start  (l_done),
    .seq_in (seq),
    .w_d, .b_d,
    .done   (d_done),
    .logits (logits)
  );

  softmax u_softmax (
    .clk, .rst_n,
    .start (d_done),
    .z     (logits),
    .busy  (s_busy),
    .done  (s_done),
    .prob  (out_prob)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= T_IDLE;
      out_valid <= 1'b0;
      for (int n = 0; n < int'(N_CLASS); n++) out_logits[n] <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        T_IDLE:  if (accept) state <= T_LSTM;
        T_LSTM:  if (l_done) state <= T_DENSE;
        T_DENSE: if (d_done) state <= T_SMAX;
        T_SMAX:  if (s_done) begin
          state      <= T_IDLE;
          out_valid  <= 1'b1;
          out_logits <= logits;
        end
        default: state <= T_IDLE;
      endcase
      // Handshake rule: parameters change only between jets.
      a_no_load_busy: assert (!(wr_en && state != T_IDLE))
        else $error("lstm_top_tagger: parameter write while busy");
      a_stage_order: assert (!(l_step && state != T_LSTM) && !(s_busy && state != T_SMAX))
        else $error("lstm_top_tagger: stage active out of order");
    end
  end

endmodule
