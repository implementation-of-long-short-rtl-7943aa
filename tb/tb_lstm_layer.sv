// tb_lstm_layer: runs whole 20-particle sequences through the LSTM layer at
// its default size and compares the complete [20 x 16] output buffer with
// the reference model. Checks the latency (done 2*20+1 cycles after start),
// that busy covers the run, that exactly 20 steps are issued per sequence,
// that the input is sampled only in the start cycle, and that the state is
// zeroed between sequences (the same jet run twice gives the same output).
module tb_lstm_layer;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  localparam int S = N_STEPS;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  x_seq   [S][N_FEAT];
  fx_t  w_k     [N_FEAT][N_COLS];
  fx_t  w_r     [N_UNITS][N_COLS];
  fx_t  b_k     [N_COLS];
  logic busy, done, step_pulse;
  fx_t  seq_out [S][N_UNITS];
  int   checks = 0, failures = 0;
  int   steps_seen = 0;

  lstm_layer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (step_pulse) steps_seen++;

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 8) $display("FAIL %s", what);
    end
  endtask

  initial begin
    model_c m;
    xvec_t  xs [];
    hvec_t  ref_seq [];
    int     cyc;
    m  = new(S);
    xs = new[S];
    foreach (x_seq[t, k]) x_seq[t][k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 8; run++) begin
      if (run % 2 == 0) begin
        m.randomise_all(500, 300, 100);
        foreach (w_k[i, j]) w_k[i][j] = fx_t'(m.wk[i][j]);
        foreach (w_r[i, j]) w_r[i][j] = fx_t'(m.wr[i][j]);
        foreach (b_k[j])    b_k[j]    = fx_t'(m.bk[j]);
        foreach (xs[t]) foreach (xs[t][k]) xs[t][k] = q_rand(3000);
      end
      // odd runs repeat the previous jet: the state must start from zero again
      foreach (x_seq[t, k]) x_seq[t][k] = fx_t'(xs[t][k]);
      m.layer(xs, ref_seq);
      steps_seen = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (x_seq[t, k]) x_seq[t][k] = fx_t'(q_rand(30000));  // must be ignored
      cyc = 1;
      while (!done && cyc < 1000) begin
        check(busy, "busy during the run");
        @(negedge clk);
        cyc++;
      end
      check(cyc == 2 * S + 1, $sformatf("latency %0d cycles, expected %0d", cyc, 2 * S + 1));
      for (int t = 0; t < S; t++)
        for (int u = 0; u < int'(N_UNITS); u++)
          check(int'(seq_out[t][u]) == ref_seq[t][u],
                $sformatf("run %0d h[%0d][%0d]=%0d ref %0d", run, t, u, seq_out[t][u], ref_seq[t][u]));
      @(negedge clk);
      check(!busy && !done, "idle after done");
      check(steps_seen == S, $sformatf("%0d steps issued", steps_seen));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
