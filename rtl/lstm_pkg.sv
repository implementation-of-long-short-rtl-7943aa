// lstm_pkg: types, sizes and number-format helpers shared by the LSTM
// top-tagging inference engine.
//
// Every value that travels between layers (input features, weights, biases,
// gate outputs, cell state, hidden state, logits and probabilities) is a
// signed fixed-point number with 16 bits in total and 6 integer bits
// (sign included), i.e. 10 fractional bits: the ap_fixed<16,6> format of the
// model. Products of two such numbers carry 20 fractional bits; sums of
// products are kept exact in a wide accumulator and are brought back to the
// 16-bit format once, by fx_cast(), which truncates towards minus infinity and
// wraps on overflow (the default quantisation and overflow modes of
// ap_fixed). Keeping the accumulator exact, and casting once per result, is a
// choice of this design.
//
// Model sizes follow the top-tagging network: 20 particles per jet, 6
// features per particle, 16 LSTM units, 5 output classes (q, g, W, Z, t).
// The four gate blocks of the 64 weight columns are stored in the order
// input, forget, output, cell-candidate ("state") gate.
//
// Weight address map of the load port (one 16-bit word per address):
//   ADDR_WK  .. : kernel weights    W[f][c], f < 6,   c < 64, addr = f*64 + c
//   ADDR_WR  .. : recurrent weights U[u][c], u < 16,  c < 64, addr = u*64 + c
//   ADDR_BK  .. : kernel bias       b[c],    c < 64
//   ADDR_WD  .. : dense weights     D[k][n], k < 320, n < 5,  addr = k*5 + n
//   ADDR_BD  .. : dense bias        e[n],    n < 5
package lstm_pkg;

  // ---- number format -----------------------------------------------------
  localparam int unsigned W_TOT  = 16;               // total bits
  localparam int unsigned W_INT  = 6;                // integer bits incl. sign
  localparam int unsigned W_FRAC = W_TOT - W_INT;    // 10 fractional bits

  typedef logic signed [W_TOT-1:0] fx_t;

  // Wide accumulator for exact sums of products (2*W_FRAC fraction bits).
  localparam int unsigned ACC_W = 48;
  typedef logic signed [ACC_W-1:0] acc_t;

  localparam fx_t FX_ONE = fx_t'(1 << W_FRAC);       // 1.0

  // ---- model sizes ---------------------------------------------------------
  localparam int unsigned N_STEPS = 20;              // particles per jet
  localparam int unsigned N_FEAT  = 6;               // features per particle
  localparam int unsigned N_UNITS = 16;              // LSTM state size
  localparam int unsigned N_GATES = 4;               // i, f, o, c~
  localparam int unsigned N_COLS  = N_GATES * N_UNITS;   // 64
  localparam int unsigned N_FLAT  = N_STEPS * N_UNITS;   // 320
  localparam int unsigned N_CLASS = 5;               // q, g, W, Z, t

  // Gate block index inside the 64 columns of the LSTM weight matrices.
  typedef enum logic [1:0] {
    GATE_I = 2'd0,   // input gate
    GATE_F = 2'd1,   // forget gate
    GATE_O = 2'd2,   // output gate
    GATE_C = 2'd3    // candidate cell values ("state gate")
  } gate_e;

  // ---- weight load address map ------------------------------------------------
  localparam int unsigned ADDR_W  = 12;
  localparam int unsigned ADDR_WK = 0;
  localparam int unsigned ADDR_WR = ADDR_WK + N_FEAT  * N_COLS;   // 384
  localparam int unsigned ADDR_BK = ADDR_WR + N_UNITS * N_COLS;   // 1408
  localparam int unsigned ADDR_WD = ADDR_BK + N_COLS;             // 1472
  localparam int unsigned ADDR_BD = ADDR_WD + N_FLAT  * N_CLASS;  // 3072
  localparam int unsigned N_WORDS = ADDR_BD + N_CLASS;            // 3077

  // ---- helpers -----------------------------------------------------------------
  // Bring an exact value with 2*W_FRAC fractional bits back to fx_t:
  // drop W_FRAC low bits (truncation towards minus infinity), keep the low
  // W_TOT bits of what is left (wrap-around on overflow).
  function automatic fx_t fx_cast(input acc_t v);
    acc_t s;
    s = v >>> W_FRAC;
    return fx_t'(s[W_TOT-1:0]);
  endfunction

  // Product of two fx_t values, exact, with 2*W_FRAC fractional bits.
  function automatic acc_t fx_mul(input fx_t a, input fx_t b);
    return acc_t'(a) * acc_t'(b);
  endfunction

  // An fx_t value aligned to 2*W_FRAC fractional bits (for bias addition).
  function automatic acc_t fx_align(input fx_t a);
    return acc_t'(a) <<< W_FRAC;
  endfunction

  // Kernel activation of the LSTM layer: ReLU.
  function automatic fx_t fx_relu(input fx_t a);
    return a[W_TOT-1] ? '0 : a;
  endfunction

endpackage
