// weight_store: holds every trained parameter of the tagger in registers and
// presents all of them in parallel.
//
// With a reuse factor of 1 every multiplier has its own weight, so the
// parameters cannot sit behind a narrow memory port: they are kept as
// register arrays whose full contents drive the LSTM cell and the dense
// layer directly. They are loaded one 16-bit word per cycle through a write
// port, using the address map of lstm_pkg (kernel weights, recurrent
// weights, kernel bias, dense weights, dense bias). A read port returns the
// word at rd_addr combinationally, 0 outside the map. Contents are not
// reset; they must be loaded before the first inference. In the source
// model the parameters are constants fixed at build time; loading them
// through a port is this design's choice, so that one netlist can run any
// trained model of this shape.
module weight_store
  import lstm_pkg::*;
#(
  parameter int unsigned STEPS = N_STEPS
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  fx_t               wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output fx_t               rd_data,
  output fx_t               w_k [N_FEAT][N_COLS],
  output fx_t               w_r [N_UNITS][N_COLS],
  output fx_t               b_k [N_COLS],
  output fx_t               w_d [STEPS*N_UNITS][N_CLASS],
  output fx_t               b_d [N_CLASS]
);

  localparam int unsigned NF   = STEPS * N_UNITS;
  localparam int unsigned A_WK = 0;
  localparam int unsigned A_WR = A_WK + N_FEAT  * N_COLS;
  localparam int unsigned A_BK = A_WR + N_UNITS * N_COLS;
  localparam int unsigned A_WD = A_BK + N_COLS;
  localparam int unsigned A_BD = A_WD + NF * N_CLASS;
  localparam int unsigned A_END = A_BD + N_CLASS;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      int a;
      a = int'(wr_addr);
      if (a < int'(A_WR))       w_k[(a - A_WK) / N_COLS][(a - A_WK) % N_COLS] <= wr_data;
      else if (a < int'(A_BK))  w_r[(a - A_WR) / N_COLS][(a - A_WR) % N_COLS] <= wr_data;
      else if (a < int'(A_WD))  b_k[a - A_BK] <= wr_data;
      else if (a < int'(A_BD))  w_d[(a - A_WD) / N_CLASS][(a - A_WD) % N_CLASS] <= wr_data;
      else if (a < int'(A_END)) b_d[a - A_BD] <= wr_data;
    end
  end

  always_comb begin
    int a;
    a = int'(rd_addr);
    if (a < int'(A_WR))       rd_data = w_k[(a - A_WK) / N_COLS][(a - A_WK) % N_COLS];
    else if (a < int'(A_BK))  rd_data = w_r[(a - A_WR) / N_COLS][(a - A_WR) % N_COLS];
    else if (a < int'(A_WD))  rd_data = b_k[a - A_BK];
    else if (a < int'(A_BD))  rd_data = w_d[(a - A_WD) / N_CLASS][(a - A_WD) % N_CLASS];
    else if (a < int'(A_END)) rd_data = b_d[a - A_BD];
    else                      rd_data = '0;
  end

endmodule
