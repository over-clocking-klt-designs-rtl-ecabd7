// klt_fig3_workload_tb: the KLT circuit sized for a Z^6 -> Z^4 projection
// (K = 4) processing 5000 data points, the size of the processing-time
// comparison of the method. The points stream back to back; the test checks
// every factor and that the whole set takes 5000 * 6 cycles plus the
// pipeline latency, i.e. one sample per clock.
module klt_fig3_workload_tb;
  localparam int unsigned P = 6, K = 4, W = 9, AW = 20, N_POINTS = 5000;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic [W-1:0] x = '0;
  logic coef_wr_en = 0, off_wr_en = 0;
  logic [1:0] coef_wr_k = '0, off_wr_k = '0;
  logic [2:0] coef_wr_p = '0;
  logic [W-1:0] coef_wr_data = '0;
  logic [AW-1:0] off_wr_data = '0;
  logic f_valid;
  logic signed [K-1:0][AW-1:0] f;
  int checks = 0, failures = 0, cyc = 0, first_cyc = 0, last_f_cyc = 0, seen = 0;
  int lambda [K][P];
  int exp_f[$][K];

  klt_core #(.P(P), .K(K), .W(W), .ACC_W(AW), .LAMBDA('0), .OFFSETS('0)) dut (
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    #1;
    if (f_valid) begin
      checks++;
      seen++;
      last_f_cyc = cyc;
      if (exp_f.size() == 0) failures++;
      else begin
        for (int k = 0; k < K; k++)
          if (int'(signed'(f[k])) != exp_f[0][k]) failures++;
        void'(exp_f.pop_front());
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < K; k++)
      for (int p = 0; p < P; p++) begin
        coef_wr_en = 1;
        coef_wr_k = 2'(k);
        coef_wr_p = 3'(p);
        coef_wr_data = W'($urandom);
        lambda[k][p] = sm2int(coef_wr_data);
        @(negedge clk);
      end
    coef_wr_en = 0;
    first_cyc = cyc + 1;   // edge that accepts the first sample
    for (int n = 0; n < int'(N_POINTS); n++) begin
      int acc [K];
      for (int k = 0; k < K; k++) acc[k] = 0;
      for (int p = 0; p < P; p++) begin
        x_valid = 1;
        x = W'($urandom);
        for (int k = 0; k < K; k++) acc[k] += sm2int(x) * lambda[k][p];
        @(negedge clk);
      end
      exp_f.push_back(acc);
    end
    x_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    // last sample accepted at first_cyc + 5000*6 - 1, factor 2 edges later
    if (seen != int'(N_POINTS) || last_f_cyc - first_cyc != int'(N_POINTS * P) + 1) begin
      failures++;
      $display("points=%0d cycles=%0d", seen, last_f_cyc - first_cyc);
    end
    $display("points=%0d, cycles from first sample to last factor=%0d", seen, last_f_cyc - first_cyc + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
