// tb_sigmoid_act: exhaustive test of the sigmoid unit.
// Every one of the 65536 input codes is applied; the output must equal the
// PLAN reference curve bit for bit and stay within 0.02 of the true
// logistic function, and must never fall by more than the 3 LSB by which
// the PLAN curve itself steps down at its |x| = 2.375 breakpoint.
module tb_sigmoid_act;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  fx_t x, y;
  int  checks = 0, failures = 0;

  sigmoid_act dut (.x(x), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  prev, bad_exact, bad_close, bad_mono;
    real t, err, worst;
    prev = -1; bad_exact = 0; bad_close = 0; bad_mono = 0; worst = 0.0;
    for (int v = -32768; v < 32768; v++) begin
      x = fx_t'(v);
      #1;
      checks += 2;
      if (int'(y) != q_sigmoid(v)) begin
        if (bad_exact < 5) $display("mismatch x=%0d y=%0d ref=%0d", v, y, q_sigmoid(v));
        bad_exact++;
        failures++;
      end
      t   = 1.0 / (1.0 + $exp(-v / 1024.0));
      err = (y / 1024.0) - t;
      if (err < 0) err = -err;
      if (err > worst) worst = err;
      if (err > 0.02 + 1.0 / 1024) begin bad_close++; failures++; end
      if (int'(y) < prev - 3) bad_mono++;   // the curve dips 3 LSB at 2.375
      prev = int'(y);
    end
    checks++;
    if (bad_mono  != 0) failures++;
    // a few fixed points of the curve
    x = 16'sd0;      #1; checks++; if (y != 16'sd512)  failures++;
    x = 16'sd6000;   #1; checks++; if (y != 16'sd1024) failures++;
    x = -16'sd6000;  #1; checks++; if (y != 16'sd0)    failures++;
    $display("sigmoid: exact mismatches %0d, far from logistic %0d, non-monotonic %0d, worst error %f",
             bad_exact, bad_close, bad_mono, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
