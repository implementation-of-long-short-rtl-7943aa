// tb_dense_layer: random [20 x 16] inputs, [320 x 5] weights and biases
// through the dense layer; the five logits are compared with the reference
// (row-major flatten, exact sum, one truncating cast). Checks that done
// follows start by one cycle and that the logits hold without start.
module tb_dense_layer;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  localparam int S = N_STEPS;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  seq_in [S][N_UNITS];
  fx_t  w_d    [S*N_UNITS][N_CLASS];
  fx_t  b_d    [N_CLASS];
  logic done;
  fx_t  logits [N_CLASS];
  int   checks = 0, failures = 0;

  dense_layer dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1_000_000;
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
    hvec_t  sq [];
    lvec_t  lg;
    m  = new(S);
    sq = new[S];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 50; trial++) begin
      m.randomise_all(100, 100, trial < 40 ? 400 : 20000);
      foreach (sq[t]) foreach (sq[t][u]) sq[t][u] = q_rand(trial < 40 ? 2000 : 30000);
      foreach (seq_in[t, u]) seq_in[t][u] = fx_t'(sq[t][u]);
      foreach (w_d[k, n]) w_d[k][n] = fx_t'(m.wd[k][n]);
      foreach (b_d[n]) b_d[n] = fx_t'(m.bd[n]);
      m.dense(sq, lg);
      start = 1;
      @(negedge clk);
      start = 0;
      check(done, "done one cycle after start");
      for (int n = 0; n < int'(N_CLASS); n++)
        check(int'(logits[n]) == lg[n], $sformatf("trial %0d logit %0d = %0d ref %0d", trial, n, logits[n], lg[n]));
      foreach (seq_in[t, u]) seq_in[t][u] = fx_t'(q_rand(30000));
      @(negedge clk);
      check(!done, "done lasts one cycle");
      for (int n = 0; n < int'(N_CLASS); n++) check(int'(logits[n]) == lg[n], "logits hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
