// tb_ref_pkg: bit-exact reference model of the LSTM tagger for the
// testbenches, written in plain integer arithmetic independent of the RTL.
//
// Numbers are ap_fixed<16,6> held in an int (value * 1024). A sum of
// products is formed exactly in a longint with 20 fractional bits and cast
// back by dropping 10 bits (floor) and wrapping to 16 bits. The sigmoid is
// the PLAN piecewise-linear curve, the kernel activation is ReLU, and the
// softmax reference uses the true exponential in real arithmetic. The
// package also holds the random model used by several testbenches.
package tb_ref_pkg;

  localparam int FEAT = 6, UNITS = 16, COLS = 64, CLASS = 5;

  typedef int xvec_t [FEAT];     // one particle
  typedef int hvec_t [UNITS];    // one hidden or cell state
  typedef int lvec_t [CLASS];    // logits
  typedef real pvec_t [CLASS];   // probabilities

  // floor(v / 1024), then wrap to a signed 16-bit value
  function automatic int q_cast(input longint v);
    longint f;
    int     w;
    f = v >>> 10;                       // floor division by 1024
    w = int'(f % 65536);
    if (w < 0) w += 65536;              // 0 .. 65535
    if (w >= 32768) w -= 65536;         // -32768 .. 32767
    return w;
  endfunction

  function automatic int q_sigmoid(input int x);
    int a, p;
    a = (x < 0) ? -x : x;
    if (a >= 5 * 1024)      p = 1024;
    else if (a >= 2432)     p = a / 32 + 864;
    else if (a >= 1024)     p = a / 8 + 640;
    else                    p = a / 4 + 512;
    return (x < 0) ? 1024 - p : p;
  endfunction

  function automatic int q_relu(input int x);
    return (x > 0) ? x : 0;
  endfunction

  // random value in [-lim, lim] (units of 1/1024)
  function automatic int q_rand(input int lim);
    return int'($urandom_range(2 * lim)) - lim;
  endfunction

  // A model: kernel weights, recurrent weights, kernel bias, dense weights
  // and bias, stored as ints.
  class model_c;
    int steps;
    int wk [FEAT][COLS];
    int wr [UNITS][COLS];
    int bk [COLS];
    int wd [][CLASS];
    int bd [CLASS];

    function new(input int n_steps);
      steps = n_steps;
      wd = new[n_steps * UNITS];
    endfunction

    function void randomise_all(input int lim_k, input int lim_r, input int lim_d);
      foreach (wk[i, j]) wk[i][j] = q_rand(lim_k);
      foreach (wr[i, j]) wr[i][j] = q_rand(lim_r);
      foreach (bk[j])    bk[j]    = q_rand(lim_k);
      foreach (wd[i, j]) wd[i][j] = q_rand(lim_d);
      foreach (bd[j])    bd[j]    = q_rand(lim_d);
    endfunction

    // One LSTM step: h, c updated in place. Column order i, f, o, c.
    function void step(input xvec_t x, inout hvec_t h, inout hvec_t c);
      int z [COLS];
      hvec_t hn, cn;
      for (int j = 0; j < COLS; j++) begin
        longint s;
        s = longint'(bk[j]) * 1024;
        for (int k = 0; k < FEAT; k++)  s += longint'(x[k]) * longint'(wk[k][j]);
        for (int k = 0; k < UNITS; k++) s += longint'(h[k]) * longint'(wr[k][j]);
        z[j] = q_cast(s);
      end
      for (int u = 0; u < UNITS; u++) begin
        int gi, gf, go, cc;
        gi = q_sigmoid(z[u]);
        gf = q_sigmoid(z[UNITS + u]);
        go = q_sigmoid(z[2 * UNITS + u]);
        cc = q_relu(z[3 * UNITS + u]);
        cn[u] = q_cast(longint'(gi) * cc + longint'(gf) * c[u]);
        hn[u] = q_cast(longint'(go) * q_relu(cn[u]));
      end
      h = hn;
      c = cn;
    endfunction

    // Whole LSTM layer: seq[t][u] = h_t
    function void layer(input xvec_t x [], inout hvec_t seq []);
      hvec_t h, c;
      foreach (h[u]) begin h[u] = 0; c[u] = 0; end
      seq = new[steps];
      for (int t = 0; t < steps; t++) begin
        step(x[t], h, c);
        for (int u = 0; u < UNITS; u++) seq[t][u] = h[u];
      end
    endfunction

    function void dense(input hvec_t seq [], output lvec_t lg);
      for (int n = 0; n < CLASS; n++) begin
        longint s;
        s = longint'(bd[n]) * 1024;
        for (int t = 0; t < steps; t++)
          for (int u = 0; u < UNITS; u++)
            s += longint'(seq[t][u]) * longint'(wd[t * UNITS + u][n]);
        lg[n] = q_cast(s);
      end
    endfunction

    // flat load-port address of each parameter, same map as the RTL
    function int addr_wk(int f, int j); return f * COLS + j;                          endfunction
    function int addr_wr(int u, int j); return FEAT * COLS + u * COLS + j;            endfunction
    function int addr_bk(int j);        return (FEAT + UNITS) * COLS + j;             endfunction
    function int addr_wd(int k, int n); return (FEAT + UNITS + 1) * COLS + k * CLASS + n; endfunction
    function int addr_bd(int n);        return (FEAT + UNITS + 1) * COLS + steps * UNITS * CLASS + n; endfunction
  endclass

  // Softmax in real arithmetic on fixed-point logits.
  function automatic void real_softmax(input lvec_t lg, output pvec_t p);
    real m, s;
    m = lg[0];
    for (int n = 1; n < CLASS; n++) if (lg[n] > m) m = lg[n];
    s = 0.0;
    for (int n = 0; n < CLASS; n++) begin
      p[n] = $exp((lg[n] - m) / 1024.0);
      s += p[n];
    end
    for (int n = 0; n < CLASS; n++) p[n] = p[n] / s;
  endfunction

endpackage
