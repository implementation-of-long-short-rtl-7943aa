// tb_lstm_cell: drives the cell through sequences of random timesteps with
// random weights and compares every new state (h_new, c_new, and the stored
// h, c after the step) with the integer reference model. It also checks the
// two-cycle step timing (done exactly one cycle after start), that clear
// zeroes the state, and that a step after clear starts from zero state.
module tb_lstm_cell;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, start = 0;
  fx_t  x     [N_FEAT];
  fx_t  w_k   [N_FEAT][N_COLS];
  fx_t  w_r   [N_UNITS][N_COLS];
  fx_t  b_k   [N_COLS];
  logic busy, done;
  fx_t  h_new [N_UNITS];
  fx_t  c_new [N_UNITS];
  fx_t  h     [N_UNITS];
  fx_t  c     [N_UNITS];
  int   checks = 0, failures = 0;

  lstm_cell dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2_000_000;
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
    xvec_t xi;
    hvec_t hr, cr;
    m = new(N_STEPS);
    foreach (x[k]) x[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int seq = 0; seq < 12; seq++) begin
      // larger weights in later sequences drive values into wrap-around
      m.randomise_all(seq < 8 ? 400 : 3000, seq < 8 ? 300 : 3000, 100);
      foreach (w_k[i, j]) w_k[i][j] = fx_t'(m.wk[i][j]);
      foreach (w_r[i, j]) w_r[i][j] = fx_t'(m.wr[i][j]);
      foreach (b_k[j])    b_k[j]    = fx_t'(m.bk[j]);
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      foreach (hr[u]) begin
        hr[u] = 0; cr[u] = 0;
        check(h[u] == '0 && c[u] == '0, "clear zeroes state");
      end
      for (int t = 0; t < 20; t++) begin
        foreach (xi[k]) begin xi[k] = q_rand(2048); x[k] = fx_t'(xi[k]); end
        start = 1;
        check(!busy && !done, "idle before start");
        @(negedge clk);
        start = 0;
        foreach (x[k]) x[k] = fx_t'(q_rand(30000));   // x only matters in the start cycle
        m.step(xi, hr, cr);
        check(done && busy, "done one cycle after start");
        for (int u = 0; u < int'(N_UNITS); u++) begin
          check(int'(h_new[u]) == hr[u], $sformatf("seq %0d t %0d h_new[%0d]=%0d ref %0d", seq, t, u, h_new[u], hr[u]));
          check(int'(c_new[u]) == cr[u], $sformatf("seq %0d t %0d c_new[%0d]=%0d ref %0d", seq, t, u, c_new[u], cr[u]));
        end
        @(negedge clk);
        check(!done, "done lasts one cycle");
        for (int u = 0; u < int'(N_UNITS); u++)
          check(int'(h[u]) == hr[u] && int'(c[u]) == cr[u], "stored state");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
