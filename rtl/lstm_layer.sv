// lstm_layer: the LSTM layer of the tagger, one lstm_cell looped over the
// particles of a jet.
//
// On start the layer copies the whole input sequence (N_STEPS particles of
// N_FEAT features, presented in parallel) into its input buffer, zeroes the
// cell state and then runs the cell once per particle, in order t = 0 ..
// N_STEPS-1. After each step it writes h_t into row t of the output buffer,
// so that when done is raised the buffer holds the layer output of shape
// [N_STEPS x N_UNITS], which seq_out shows, and last_h the final hidden
// state. seq_out holds its value until the next start.
//
// Timing: start is accepted while busy is low. The cycle after start issues
// step 0; each step takes 2 cycles, so done pulses for one cycle
// 2*N_STEPS + 1 cycles after the start cycle, and busy is high from the cycle
// after start up to and including the done cycle. Looping over the particles
// with one cell whose state is held in registers is the "static" form of the
// layer; the 2-cycle step and the buffer layout are this design's choices.
module lstm_layer
  import lstm_pkg::*;
#(
  parameter int unsigned STEPS = N_STEPS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  fx_t  x_seq   [STEPS][N_FEAT],
  input  fx_t  w_k     [N_FEAT][N_COLS],
  input  fx_t  w_r     [N_UNITS][N_COLS],
  input  fx_t  b_k     [N_COLS],
  output logic busy,
  output logic done,
  output logic step_pulse,                  // high in the cycle a step is issued
  output fx_t  seq_out [STEPS][N_UNITS]
);

  localparam int unsigned TW = (STEPS > 1) ? $clog2(STEPS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DONE} state_e;

  state_e        state;
  logic [TW-1:0] t;
  fx_t           x_buf [STEPS][N_FEAT];
  fx_t           x_cur [N_FEAT];
  logic          cell_busy, cell_done;
  fx_t           h_new [N_UNITS];
  fx_t           c_new [N_UNITS];
  fx_t           h_st  [N_UNITS];
  fx_t           c_st  [N_UNITS];
  logic          cell_clear, cell_start;

  assign x_cur      = x_buf[t];
  assign cell_clear = (state == S_IDLE) && start;
  assign cell_start = (state == S_ISSUE);
  assign step_pulse = cell_start;

  lstm_cell u_cell (
    .clk, .rst_n,
    .clear (cell_clear),
    .start (cell_start),
    .x     (x_cur),
    .w_k, .w_r, .b_k,
    .busy  (cell_busy),
    .done  (cell_done),
    .h_new (h_new),
    .c_new (c_new),
    .h     (h_st),
    .c     (c_st)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      t     <= '0;
      for (int s = 0; s < int'(STEPS); s++) begin
        for (int k = 0; k < int'(N_FEAT); k++)  x_buf[s][k]   <= '0;
        for (int u = 0; u < int'(N_UNITS); u++) seq_out[s][u] <= '0;
      end
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          x_buf <= x_seq;
          t     <= '0;
          state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (cell_done) begin
          seq_out[t] <= h_new;
          if (int'(t) == int'(STEPS) - 1) begin
            state <= S_DONE;
          end else begin
            t     <= t + 1'b1;
            state <= S_ISSUE;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);

endmodule
