// klt_core_tb: the Z^6 -> Z^3 KLT circuit at its default size. Streams
// random sign-magnitude vectors with random gaps, reloads coefficients and
// offsets between vectors, and checks every factor against F = Lambda^T X
// minus offset computed in integers, plus the output timing (second edge
// after the last sample) and the throughput of back-to-back vectors.
module klt_core_tb;
  import klt_pkg::*;
  localparam int unsigned P = KLT_P, K = KLT_K, W = SM_W, AW = ACC_W;

  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  logic [W-1:0] x = '0;
  logic coef_wr_en = 0, off_wr_en = 0;
  logic [1:0] coef_wr_k = '0, off_wr_k = '0;
  logic [2:0] coef_wr_p = '0;
  logic [W-1:0] coef_wr_data = '0;
  logic [AW-1:0] off_wr_data = '0;
  logic f_valid;
  logic signed [K-1:0][AW-1:0] f;

  int checks = 0, failures = 0, cyc = 0;
  int lambda [K][P];
  int offs [K];
  int exp_f[$][K];
  int exp_due[$];
  int n_vectors = 0, n_reloads = 0, n_back_to_back = 0, last_f_cyc = -100;

  klt_core dut (
    .clk(clk), .rst_n(rst_n), .x_valid(x_valid), .x(x),
    .coef_wr_en(coef_wr_en), .coef_wr_k(coef_wr_k), .coef_wr_p(coef_wr_p),
    .coef_wr_data(coef_wr_data), .off_wr_en(off_wr_en), .off_wr_k(off_wr_k),
    .off_wr_data(off_wr_data), .f_valid(f_valid), .f(f));

  always #5 clk = ~clk;

  function automatic int sm2int(logic [W-1:0] v);
    int m = int'(v[W-2:0]);
    return v[W-1] ? -m : m;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    #1;
    if (f_valid) begin
      checks++;
      if (exp_due.size() == 0) begin
        failures++;
        $display("unexpected factor at %0d", cyc);
      end else begin
        for (int k = 0; k < K; k++)
          if (int'(signed'(f[k])) != exp_f[0][k]) begin
            failures++;
            if (failures < 6) $display("f[%0d]=%0d expected %0d", k, signed'(f[k]), exp_f[0][k]);
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

  // one vector: P samples, with random gaps unless gapless is set
  task automatic send_vector(bit gapless);
    int acc [K];
    int e [K];
    for (int k = 0; k < K; k++) acc[k] = 0;
    for (int p = 0; p < P; p++) begin
      while (!gapless && ($urandom % 4) == 0) begin
        @(negedge clk);
        x_valid = 0;
        x = W'($urandom);
      end
      @(negedge clk);
      x_valid = 1;
      x = W'($urandom);
      for (int k = 0; k < K; k++) acc[k] += sm2int(x) * lambda[k][p];
    end
    for (int k = 0; k < K; k++) e[k] = acc[k] - offs[k];
    exp_f.push_back(e);
    exp_due.push_back(cyc + 1 + 2);   // accepting edge is the next one
    n_vectors++;
  endtask

  task automatic reload();
    @(negedge clk);
    x_valid = 0;
    repeat (4) @(negedge clk);   // let the pipeline finish the old vector
    for (int k = 0; k < K; k++) begin
      for (int p = 0; p < P; p++) begin
        coef_wr_en = 1;
        coef_wr_k = 2'(k);
        coef_wr_p = 3'(p);
        coef_wr_data = W'($urandom);
        lambda[k][p] = sm2int(coef_wr_data);
        @(negedge clk);
      end
      coef_wr_en = 0;
      off_wr_en = 1;
      off_wr_k = 2'(k);
      offs[k] = int'($urandom % 512) - 256;
      off_wr_data = AW'(offs[k]);
      @(negedge clk);
      off_wr_en = 0;
    end
    n_reloads++;
  endtask

  initial begin
    for (int k = 0; k < K; k++) begin
      offs[k] = 0;
      for (int p = 0; p < P; p++)
        lambda[k][p] = sm2int(DEFAULT_LAMBDA[(k*P + p)*W +: W]);
    end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // default coefficients, back to back
    for (int v = 0; v < 20; v++) send_vector(1);
    for (int r = 0; r < 10; r++) begin
      reload();
      for (int v = 0; v < 30; v++) send_vector(v % 3 == 0);
    end
    @(negedge clk);
    x_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_due.size() != 0 || n_back_to_back < 10 || n_reloads == 0) begin
      failures++;
      $display("left=%0d back_to_back=%0d", exp_due.size(), n_back_to_back);
    end
    $display("vectors=%0d reloads=%0d back_to_back=%0d", n_vectors, n_reloads, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
