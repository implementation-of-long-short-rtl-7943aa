// tb_weight_store: writes a distinct random word to every address of the
// parameter map, then checks each word both through the read port and at
// its place in the parallel outputs (kernel, recurrent, bias, dense, dense
// bias). Also checks that an address past the map reads 0 and changes
// nothing, and that a word is stored only while wr_en is high.
module tb_weight_store;
  import lstm_pkg::*;
  import tb_ref_pkg::*;

  logic              clk = 0;
  logic              wr_en;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  fx_t               wr_data, rd_data;
  fx_t               w_k [N_FEAT][N_COLS];
  fx_t               w_r [N_UNITS][N_COLS];
  fx_t               b_k [N_COLS];
  fx_t               w_d [N_FLAT][N_CLASS];
  fx_t               b_d [N_CLASS];
  int                checks = 0, failures = 0;
  int                mem [N_WORDS];

  weight_store dut (.*);

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
    m = new(N_STEPS);
    wr_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int a = 0; a < int'(N_WORDS); a++) begin
      mem[a] = q_rand(32767);
      @(negedge clk);
      wr_en = 1; wr_addr = ADDR_W'(a); wr_data = fx_t'(mem[a]);
    end
    @(negedge clk);
    // out-of-map write and a disabled write must not disturb anything
    wr_en = 1; wr_addr = ADDR_W'(N_WORDS); wr_data = 16'h5a5a;
    @(negedge clk);
    wr_en = 0; wr_addr = '0; wr_data = ~fx_t'(mem[0]);
    @(negedge clk);
    for (int a = 0; a < int'(N_WORDS); a++) begin
      rd_addr = ADDR_W'(a);
      #1;
      check(int'(rd_data) == mem[a], $sformatf("read-back addr %0d", a));
    end
    rd_addr = ADDR_W'(N_WORDS); #1;
    check(rd_data == '0, "read past the map");
    for (int f = 0; f < int'(N_FEAT); f++)
      for (int j = 0; j < int'(N_COLS); j++) check(int'(w_k[f][j]) == mem[m.addr_wk(f, j)], "w_k");
    for (int u = 0; u < int'(N_UNITS); u++)
      for (int j = 0; j < int'(N_COLS); j++) check(int'(w_r[u][j]) == mem[m.addr_wr(u, j)], "w_r");
    for (int j = 0; j < int'(N_COLS); j++) check(int'(b_k[j]) == mem[m.addr_bk(j)], "b_k");
    for (int k = 0; k < int'(N_FLAT); k++)
      for (int n = 0; n < int'(N_CLASS); n++) check(int'(w_d[k][n]) == mem[m.addr_wd(k, n)], "w_d");
    for (int n = 0; n < int'(N_CLASS); n++) check(int'(b_d[n]) == mem[m.addr_bd(n)], "b_d");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
