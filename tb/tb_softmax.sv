// tb_softmax: random and corner-case logit vectors through the softmax.
// Each probability must lie within 4/1024 of the true softmax of the same
// logits, the five must sum to at most 1.0 and to at least 1.0 - 8/1024,
// the largest logit must get the largest probability, and done must come
// exactly 12 cycles after start. Corner cases: all equal, one dominant
// logit, extreme logits (+-32) and ties.
module tb_softmax;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  fx_t  z    [N_CLASS];
  logic busy, done;
  fx_t  prob [N_CLASS];
  int   checks = 0, failures = 0;

  softmax dut (.*);

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
    lvec_t lg;
    pvec_t p;
    real   worst;
    int    cyc, sum, imax;
    worst = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 400; trial++) begin
      for (int n = 0; n < int'(N_CLASS); n++) begin
        case (trial)
          0: lg[n] = 0;
          1: lg[n] = (n == 2) ? 20000 : -20000;
          2: lg[n] = (n == 4) ? 32767 : -32768;
          3: lg[n] = (n < 2) ? 1500 : -700;
          default: lg[n] = q_rand(trial < 200 ? 3000 : 32767);
        endcase
        z[n] = fx_t'(lg[n]);
      end
      real_softmax(lg, p);
      start = 1;
      @(negedge clk);
      start = 0;
      foreach (z[n]) z[n] = fx_t'(q_rand(32767));   // sampled only at start
      cyc = 1;
      while (!done && cyc < 100) begin
        @(negedge clk);
        cyc++;
      end
      check(cyc == 12, $sformatf("latency %0d", cyc));
      sum = 0; imax = 0;
      for (int n = 0; n < int'(N_CLASS); n++) begin
        real err;
        err = prob[n] / 1024.0 - p[n];
        if (err < 0) err = -err;
        if (err > worst) worst = err;
        check(err <= 4.0 / 1024, $sformatf("trial %0d p[%0d]=%0d ref %f", trial, n, prob[n], p[n] * 1024));
        sum += int'(prob[n]);
        if (lg[n] > lg[imax]) imax = n;
      end
      for (int n = 0; n < int'(N_CLASS); n++) check(prob[n] <= prob[imax], "largest logit wins");
      check(sum <= 1024 && sum >= 1024 - 8, $sformatf("trial %0d sum %0d", trial, sum));
      @(negedge clk);
    end
    $display("softmax worst error %f", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
