// tb_workload_10p: a 10-particle LSTM model run on the default 20-particle
// engine. The 10 particles go into slots 0..9, slots 10..19 hold zeros, and
// the dense weights of rows 160..319 (the hidden states of slots 10..19)
// are loaded as zeros. The result must then be exactly that of a
// 10-particle model (dense 160 x 5), which the reference computes with its
// own 10-step loop. Several jets and two models are run; latency stays at
// the 20-slot value of 55 cycles.
module tb_workload_10p;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  localparam int S = N_STEPS;
  localparam int P = 10;

  logic              clk = 0, rst_n = 0;
  logic              wr_en = 0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  fx_t               wr_data = '0, rd_data;
  logic              in_valid = 0, in_ready;
  fx_t               in_x [S][N_FEAT];
  logic              out_valid, busy;
  fx_t               out_logits [N_CLASS];
  fx_t               out_prob   [N_CLASS];
  int                checks = 0, failures = 0;

  lstm_top_tagger dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic put(input int a, input int v);
    @(negedge clk);
    wr_en = 1; wr_addr = ADDR_W'(a); wr_data = fx_t'(v);
  endtask

  initial begin
    model_c m10, m20;
    xvec_t  xs [];
    hvec_t  sq [];
    lvec_t  lg;
    pvec_t  p;
    int     lat;
    m10 = new(P);
    m20 = new(S);               // only for its address map
    xs  = new[P];
    foreach (in_x[t, k]) in_x[t][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mdl = 0; mdl < 2; mdl++) begin
      m10.randomise_all(600, 400, 300);
      for (int f = 0; f < N_FEAT; f++) for (int j = 0; j < N_COLS; j++) put(m20.addr_wk(f, j), m10.wk[f][j]);
      for (int u = 0; u < N_UNITS; u++) for (int j = 0; j < N_COLS; j++) put(m20.addr_wr(u, j), m10.wr[u][j]);
      for (int j = 0; j < N_COLS; j++) put(m20.addr_bk(j), m10.bk[j]);
      for (int k = 0; k < S * N_UNITS; k++)
        for (int n = 0; n < N_CLASS; n++) put(m20.addr_wd(k, n), (k < P * N_UNITS) ? m10.wd[k][n] : 0);
      for (int n = 0; n < N_CLASS; n++) put(m20.addr_bd(n), m10.bd[n]);
      @(negedge clk);
      wr_en = 0;
      for (int j = 0; j < 5; j++) begin
        foreach (xs[t]) foreach (xs[t][k]) xs[t][k] = q_rand(4000);
        m10.layer(xs, sq);
        m10.dense(sq, lg);
        real_softmax(lg, p);
        for (int t = 0; t < S; t++)
          for (int k = 0; k < N_FEAT; k++) in_x[t][k] = (t < P) ? fx_t'(xs[t][k]) : '0;
        in_valid = 1;
        while (!in_ready) @(negedge clk);
        @(negedge clk);
        in_valid = 0;
        lat = 1;
        while (!out_valid && lat < 1000) begin @(negedge clk); lat++; end
        check(lat == 2 * S + 15, $sformatf("latency %0d", lat));
        for (int n = 0; n < N_CLASS; n++) begin
          real err;
          check(int'(out_logits[n]) == lg[n], $sformatf("model %0d jet %0d logit %0d = %0d ref %0d", mdl, j, n, out_logits[n], lg[n]));
          err = out_prob[n] / 1024.0 - p[n];
          if (err < 0) err = -err;
          check(err <= 4.0 / 1024, "probability");
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
