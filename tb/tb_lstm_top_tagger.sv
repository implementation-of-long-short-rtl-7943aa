// tb_lstm_top_tagger: end-to-end test of the tagger at its default size
// (20 particles x 6 features, 16 LSTM units, 5 classes).
//
// For each of two random models the testbench loads all 3077 parameter words
// through the load port and reads some back, then streams jets: a new jet is
// offered as soon as the previous one is accepted, so it waits (in_valid high,
// in_ready low) for the whole inference, since the initiation interval equals
// the latency. A checker matches each result with the jets in order.
// Every result is compared with the reference model: the dense logits bit for
// bit, the probabilities within 4/1024 of the true softmax of those logits.
// The latency from the accepting cycle to out_valid must be 55 cycles (and
// within the 270 cycles of 1.35 us at a 5 ns clock). A jet is repeated after
// a different one to show the LSTM state restarts from zero. The counts of
// each mechanism (parameter loads, LSTM steps, waiting cycles, state
// restarts, model reloads) are printed and each must be non-zero.
module tb_lstm_top_tagger;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  localparam int S = N_STEPS;
  localparam int LAT = 2 * S + 15;

  logic              clk = 0, rst_n = 0;
  logic              wr_en = 0;
  logic [ADDR_W-1:0] wr_addr = '0, rd_addr = '0;
  fx_t               wr_data = '0, rd_data;
  logic              in_valid = 0, in_ready;
  fx_t               in_x [S][N_FEAT];
  logic              out_valid, busy;
  fx_t               out_logits [N_CLASS];
  fx_t               out_prob   [N_CLASS];

  int checks = 0, failures = 0;
  int n_loads = 0, n_steps = 0, n_wait = 0, n_jets = 0, n_restart = 0, n_reload = 0;
  int cycle = 0;

  lstm_top_tagger dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycle++;
    if (wr_en) n_loads++;
    if (dut.u_lstm.step_pulse) n_steps++;
    if (in_valid && !in_ready) n_wait++;
  end

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

  task automatic load(input model_c m);
    for (int f = 0; f < N_FEAT; f++) for (int j = 0; j < N_COLS; j++) put(m.addr_wk(f, j), m.wk[f][j]);
    for (int u = 0; u < N_UNITS; u++) for (int j = 0; j < N_COLS; j++) put(m.addr_wr(u, j), m.wr[u][j]);
    for (int j = 0; j < N_COLS; j++) put(m.addr_bk(j), m.bk[j]);
    for (int k = 0; k < S * N_UNITS; k++) for (int n = 0; n < N_CLASS; n++) put(m.addr_wd(k, n), m.wd[k][n]);
    for (int n = 0; n < N_CLASS; n++) put(m.addr_bd(n), m.bd[n]);
    @(negedge clk);
    wr_en = 0;
    // spot-check the read-back port
    for (int i = 0; i < 20; i++) begin
      int u, j;
      u = int'($urandom_range(N_UNITS - 1)); j = int'($urandom_range(N_COLS - 1));
      rd_addr = ADDR_W'(m.addr_wr(u, j)); #1;
      check(int'(rd_data) == m.wr[u][j], "read-back of a recurrent weight");
    end
  endtask

  task automatic put(input int a, input int v);
    @(negedge clk);
    wr_en = 1; wr_addr = ADDR_W'(a); wr_data = fx_t'(v);
  endtask

  // Expected results, in order of acceptance.
  localparam int MAXJ = 64;
  int    exp_lg  [MAXJ][N_CLASS];
  real   exp_p   [MAXJ][N_CLASS];
  int    got_lg  [MAXJ][N_CLASS];
  int    acc_cyc [MAXJ];
  int    n_off = 0, n_acc = 0;

  always @(posedge clk) if (rst_n && in_valid && in_ready) begin acc_cyc[n_acc] = cycle; n_acc++; end

  // Checker: every result against the next expected one.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int t_acc, psum;
      t_acc = acc_cyc[n_jets];
      check(cycle - t_acc == LAT, $sformatf("latency %0d cycles, expected %0d", cycle - t_acc, LAT));
      check(cycle - t_acc <= 270, "within 1.35 us at 5 ns");
      check(in_ready, "ready again with the result");
      psum = 0;
      for (int n = 0; n < N_CLASS; n++) begin
        real err;
        check(int'(out_logits[n]) == exp_lg[n_jets][n], $sformatf("jet %0d logit %0d = %0d ref %0d", n_jets, n, out_logits[n], exp_lg[n_jets][n]));
        err = out_prob[n] / 1024.0 - exp_p[n_jets][n];
        if (err < 0) err = -err;
        check(err <= 4.0 / 1024, $sformatf("jet %0d prob %0d = %0d ref %f", n_jets, n, out_prob[n], exp_p[n_jets][n] * 1024));
        psum += int'(out_prob[n]);
      end
      check(psum <= 1024 && psum >= 1016, "probabilities sum to 1");
      for (int n = 0; n < N_CLASS; n++) got_lg[n_jets][n] = int'(out_logits[n]);
      n_jets++;
    end
  end

  // Driver: offer a jet (held until accepted); returns after the accepting
  // clock edge, with in_valid still high.
  task automatic offer(input model_c m, input xvec_t xs []);
    hvec_t sq [];
    lvec_t lg;
    pvec_t p;
    m.layer(xs, sq);
    m.dense(sq, lg);
    real_softmax(lg, p);
    for (int n = 0; n < N_CLASS; n++) begin
      exp_lg[n_off][n] = lg[n];
      exp_p[n_off][n]  = p[n];
    end
    n_off++;
    foreach (in_x[t, k]) in_x[t][k] = fx_t'(xs[t][k]);
    in_valid = 1;
    while (!in_ready) @(negedge clk);
    @(negedge clk);                       // accepted on the edge just passed
    check(busy && !in_ready, "busy after accept");
  endtask

  task automatic drain();
    in_valid = 0;
    foreach (in_x[t, k]) in_x[t][k] = fx_t'(q_rand(30000));   // must be ignored
    while (n_jets != n_off) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    model_c m;
    xvec_t  xs [], first [];
    m = new(S);
    xs = new[S];
    foreach (in_x[t, k]) in_x[t][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int mdl = 0; mdl < 2; mdl++) begin
      int base;
      m.randomise_all(mdl == 0 ? 500 : 1500, mdl == 0 ? 300 : 900, mdl == 0 ? 200 : 600);
      load(m);
      if (mdl > 0) n_reload++;
      base = n_off;
      for (int j = 0; j < 6; j++) begin
        foreach (xs[t]) foreach (xs[t][k]) xs[t][k] = q_rand(4000);
        if (j == 0) first = xs;
        offer(m, xs);                     // the next one is offered at once
        if (j == 2) drain();              // one gap, jets 3.. offered back to back
      end
      // the first jet again, after others: same answer, state restarted
      offer(m, first);
      drain();
      check(got_lg[base] == got_lg[n_off - 1], "repeated jet gives the same result");
      if (got_lg[base] == got_lg[n_off - 1]) n_restart++;
    end
    $display("mechanisms: parameter words loaded %0d, jets %0d, LSTM steps %0d, cycles a jet waited %0d, state restarts %0d, model reloads %0d",
             n_loads, n_jets, n_steps, n_wait, n_restart, n_reload);
    check(n_jets == 14, "every offered jet came back");
    check(n_loads == 2 * N_WORDS, "all parameter words loaded");
    check(n_steps == n_jets * S, "one LSTM step per particle");
    check(n_wait > 0, "a jet waited while busy");
    check(n_restart > 0, "state restarted between jets");
    check(n_reload > 0, "model reloaded between jets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
