// tb_dense_mvm: random vectors, matrices and biases through the
// vector-matrix unit (default size 6 x 64, the LSTM kernel product); each of
// the 64 exact outputs is compared with a sum of products formed in the
// testbench. Includes extreme operands (+-32, -32*-32) to exercise the
// accumulator width.
module tb_dense_mvm;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  localparam int NI = 6, NO = 64;

  fx_t  x [NI];
  fx_t  w [NI][NO];
  fx_t  b [NO];
  acc_t y [NO];
  int   checks = 0, failures = 0;

  dense_mvm dut (.x(x), .w(w), .b(b), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 200; trial++) begin
      for (int k = 0; k < NI; k++) begin
        x[k] = fx_t'(trial < 2 ? -32768 : q_rand(32767));
        for (int n = 0; n < NO; n++) w[k][n] = fx_t'(trial == 0 ? -32768 : trial == 1 ? 32767 : q_rand(32767));
      end
      for (int n = 0; n < NO; n++) b[n] = fx_t'(q_rand(32767));
      #1;
      for (int n = 0; n < NO; n++) begin
        longint s;
        s = longint'(b[n]) * 1024;
        for (int k = 0; k < NI; k++) s += longint'(x[k]) * longint'(w[k][n]);
        checks++;
        if (longint'(y[n]) != s) begin
          failures++;
          if (failures < 5) $display("trial %0d col %0d: y=%0d ref=%0d", trial, n, y[n], s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
