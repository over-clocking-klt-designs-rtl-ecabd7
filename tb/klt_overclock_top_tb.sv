// klt_overclock_top_tb: end-to-end test of both circuits at their default
// sizes, run concurrently on their own clocks.
//
// KLT side: 5000 random Z^6 data vectors projected onto Z^3, first with the
// built-in coefficient set, then after reloading new coefficients and
// mean-error offsets through the load port. Inputs arrive both back to back
// and with gaps. Every factor is checked against integer arithmetic and
// against the output timing.
// Characterisation side: the full sweep of the 8x8 multiplier, one run of
// 2000 samples for every constant coefficient m = 0..255 (B = m, A random),
// with the host uploading and checking all results. A retrigger during a
// run and an over-long sample count are exercised once each.
// Each mechanism is counted and a mechanism that never happened is a
// failure.
module klt_overclock_top_tb;
  import klt_pkg::*;
  localparam int unsigned P = KLT_P, K = KLT_K, W = SM_W, AW = ACC_W;
  localparam int unsigned MW = W - 1, DEPTH = 2000, CAW = 11, CCW = 11;
  localparam int unsigned N_VECTORS = 5000;

  // KLT side
  logic klt_clk = 0, klt_rst_n = 0, klt_x_valid = 0;
  logic [W-1:0] klt_x = '0;
  logic klt_coef_wr_en = 0, klt_off_wr_en = 0;
  logic [1:0] klt_coef_wr_k = '0, klt_off_wr_k = '0;
  logic [2:0] klt_coef_wr_p = '0;
  logic [W-1:0] klt_coef_wr_data = '0;
  logic [AW-1:0] klt_off_wr_data = '0;
  logic klt_f_valid;
  logic signed [K-1:0][AW-1:0] klt_f;
  // characterisation side
  logic char_clk_host = 0, char_clk_test = 0, char_rst_n = 0;
  logic char_stim_we = 0, char_trigger = 0, char_busy, char_done;
  logic [CAW-1:0] char_stim_addr = '0, char_res_addr = '0;
  logic [2*MW-1:0] char_stim_data = '0, char_res_data;
  logic [CCW-1:0] char_n_samples = '0;

  int checks = 0, failures = 0;
  bit klt_finished = 0, char_finished = 0;
  // mechanism counters
  int n_vectors = 0, n_back_to_back = 0, n_gaps = 0, n_reloads = 0;
  int n_offset_used = 0, n_negative_f = 0;
  int n_char_runs = 0, n_retriggers = 0, n_clamped = 0;

  klt_overclock_top dut (
    .klt_clk(klt_clk), .klt_rst_n(klt_rst_n), .klt_x_valid(klt_x_valid), .klt_x(klt_x),
    .klt_coef_wr_en(klt_coef_wr_en), .klt_coef_wr_k(klt_coef_wr_k),
    .klt_coef_wr_p(klt_coef_wr_p), .klt_coef_wr_data(klt_coef_wr_data),
    .klt_off_wr_en(klt_off_wr_en), .klt_off_wr_k(klt_off_wr_k),
    .klt_off_wr_data(klt_off_wr_data), .klt_f_valid(klt_f_valid), .klt_f(klt_f),
    .char_clk_host(char_clk_host), .char_clk_fsm(char_clk_test), .char_clk_dp(char_clk_test),
    .char_rst_n(char_rst_n), .char_stim_we(char_stim_we), .char_stim_addr(char_stim_addr),
    .char_stim_data(char_stim_data), .char_res_addr(char_res_addr),
    .char_res_data(char_res_data), .char_trigger(char_trigger),
    .char_n_samples(char_n_samples), .char_busy(char_busy), .char_done(char_done));

  always #5 klt_clk = ~klt_clk;
  always #4 char_clk_test = ~char_clk_test;
  always #6 char_clk_host = ~char_clk_host;

  initial begin
    repeat (3_000_000) @(posedge klt_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- KLT --
  int cyc = 0, last_f_cyc = -100;
  int lambda [K][P];
  int offs [K];
  int exp_f[$][K];
  int exp_due[$];

  function automatic int sm2int(logic [W-1:0] v);
    int m = int'(v[W-2:0]);
    return v[W-1] ? -m : m;
  endfunction

  always @(posedge klt_clk) begin
    cyc++;
    #1;
    if (klt_f_valid) begin
      checks++;
      if (exp_due.size() == 0) begin
        failures++;
        $display("unexpected factor at %0d", cyc);
      end else begin
        for (int k = 0; k < K; k++) begin
          if (int'(signed'(klt_f[k])) != exp_f[0][k]) begin
            failures++;
            if (failures < 6) $display("f[%0d]=%0d expected %0d", k, signed'(klt_f[k]), exp_f[0][k]);
          end
          if (signed'(klt_f[k]) < 0) n_negative_f++;
        end
        if (exp_due[0] != cyc) begin
          failures++;
          $display("factor at %0d, due at %0d", cyc, exp_due[0]);
        end
        if (cyc - last_f_cyc == P) n_back_to_back++;
        last_f_cyc = cyc;
        void'(exp_f.pop_front());
        void'(exp_due.pop_front());
      end
    end
  end

  task automatic send_vector(bit gapless);
    int acc [K];
    int e [K];
    for (int k = 0; k < K; k++) acc[k] = 0;
    for (int p = 0; p < P; p++) begin
      while (!gapless && ($urandom % 4) == 0) begin
        @(negedge klt_clk);
        klt_x_valid = 0;
        klt_x = W'($urandom);
        n_gaps++;
      end
      @(negedge klt_clk);
      klt_x_valid = 1;
      klt_x = W'($urandom);
      for (int k = 0; k < K; k++) acc[k] += sm2int(klt_x) * lambda[k][p];
    end
    for (int k = 0; k < K; k++) begin
      e[k] = acc[k] - offs[k];
      if (offs[k] != 0) n_offset_used++;
    end
    exp_f.push_back(e);
    exp_due.push_back(cyc + 1 + 2);
    n_vectors++;
  endtask

  task automatic reload();
    @(negedge klt_clk);
    klt_x_valid = 0;
    repeat (4) @(negedge klt_clk);
    for (int k = 0; k < K; k++) begin
      for (int p = 0; p < P; p++) begin
        klt_coef_wr_en = 1;
        klt_coef_wr_k = 2'(k);
        klt_coef_wr_p = 3'(p);
        klt_coef_wr_data = W'($urandom);
        lambda[k][p] = sm2int(klt_coef_wr_data);
        @(negedge klt_clk);
      end
      klt_coef_wr_en = 0;
      klt_off_wr_en = 1;
      klt_off_wr_k = 2'(k);
      offs[k] = int'($urandom % 1024) - 512;
      klt_off_wr_data = AW'(offs[k]);
      @(negedge klt_clk);
      klt_off_wr_en = 0;
    end
    n_reloads++;
  endtask

  initial begin
    for (int k = 0; k < K; k++) begin
      offs[k] = 0;
      for (int p = 0; p < P; p++)
        lambda[k][p] = sm2int(DEFAULT_LAMBDA[(k*P + p)*W +: W]);
    end
    repeat (2) @(posedge klt_clk);
    @(negedge klt_clk);
    klt_rst_n = 1;
    for (int v = 0; v < int'(N_VECTORS); v++) begin
      if (v > 0 && v % 1000 == 0) reload();
      send_vector(v % 2 == 0);
    end
    @(negedge klt_clk);
    klt_x_valid = 0;
    repeat (10) @(negedge klt_clk);
    checks++;
    if (exp_due.size() != 0) begin
      failures++;
      $display("%0d factors never appeared", exp_due.size());
    end
    klt_finished = 1;
  end

  // --------------------------------------------------- characterisation --
  int a_vals [DEPTH];
  longint err_sum, err_sq;

  task automatic char_run(int m, int n, bit retrigger, int expect_n);
    for (int i = 0; i < n && i < int'(DEPTH); i++) begin
      @(negedge char_clk_host);
      a_vals[i] = int'($urandom % 256);
      char_stim_we = 1;
      char_stim_addr = CAW'(i);
      char_stim_data = {MW'(a_vals[i]), MW'(m)};
    end
    @(negedge char_clk_host);
    char_stim_we = 0;
    char_n_samples = CCW'(n);
    char_trigger = 1;
    repeat (2) @(negedge char_clk_host);
    char_trigger = 0;
    while (!char_busy) @(negedge char_clk_host);
    if (retrigger) begin
      char_trigger = 1;
      repeat (3) @(negedge char_clk_host);
      char_trigger = 0;
      if (char_busy) n_retriggers++;
    end
    while (!char_done) @(negedge char_clk_host);
    // upload and per-constant error statistics (mean and variance of the
    // difference to the exact product)
    err_sum = 0;
    err_sq = 0;
    for (int i = 0; i < expect_n; i++) begin
      @(negedge char_clk_host);
      char_res_addr = CAW'(i);
      @(posedge char_clk_host);
      #1;
      err_sum += longint'(int'(char_res_data) - a_vals[i] * m);
      err_sq  += longint'(int'(char_res_data) - a_vals[i] * m) ** 2;
    end
    checks++;
    if (err_sum != 0 || err_sq != 0) begin
      failures++;
      $display("constant %0d: error sum %0d, square sum %0d", m, err_sum, err_sq);
    end
    n_char_runs++;
  endtask

  initial begin
    repeat (3) @(posedge char_clk_test);
    char_rst_n = 1;
    for (int m = 0; m < 256; m++) char_run(m, int'(DEPTH), m == 7, int'(DEPTH));
    // an over-long request is clamped to the memory depth
    char_run(3, 2047, 0, int'(DEPTH));
    n_clamped++;
    char_finished = 1;
  end

  initial begin
    wait (klt_finished && char_finished);
    checks++;
    if (n_vectors == 0 || n_back_to_back == 0 || n_gaps == 0 || n_reloads == 0 ||
        n_offset_used == 0 || n_negative_f == 0 || n_char_runs < 256 ||
        n_retriggers == 0 || n_clamped == 0) failures++;
    $display("vectors=%0d back_to_back=%0d gaps=%0d reloads=%0d offset_used=%0d negative_f=%0d",
             n_vectors, n_back_to_back, n_gaps, n_reloads, n_offset_used, n_negative_f);
    $display("char_runs=%0d retriggers=%0d clamped=%0d", n_char_runs, n_retriggers, n_clamped);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
