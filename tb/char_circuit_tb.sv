// char_circuit_tb: a characterisation session as the host would run it.
// For several constant coefficients m the host loads a random stream of A
// operands with B = m, triggers a run, waits for done, uploads the results
// and compares them with A*m. Without gate delays the captured products are
// exact, so every error must be zero. The host clock is unrelated to the
// test clock.
module char_circuit_tb;
  localparam int unsigned W = 8, DEPTH = 2000, AW = 11, CW = 11;
  logic clk_host = 0, clk_test = 0, rst_n = 0;
  logic stim_we = 0, trigger = 0, busy, done;
  logic [AW-1:0] stim_addr = '0, res_addr = '0;
  logic [2*W-1:0] stim_data = '0, res_data;
  logic [CW-1:0] n_samples = '0;
  int checks = 0, failures = 0, runs = 0;
  int a_vals [DEPTH];

  char_circuit #(.W(W), .DEPTH(DEPTH)) dut (
    .clk_host(clk_host), .clk_fsm(clk_test), .clk_dp(clk_test), .rst_n(rst_n),
    .stim_we(stim_we), .stim_addr(stim_addr), .stim_data(stim_data),
    .res_addr(res_addr), .res_data(res_data), .trigger(trigger),
    .n_samples(n_samples), .busy(busy), .done(done));

  always #7 clk_host = ~clk_host;
  always #5 clk_test = ~clk_test;

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic characterise(int m, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk_host);
      a_vals[i] = int'($urandom % 256);
      stim_we = 1; stim_addr = AW'(i); stim_data = {W'(a_vals[i]), W'(m)};
    end
    @(negedge clk_host);
    stim_we = 0;
    n_samples = CW'(n);
    trigger = 1;
    repeat (2) @(negedge clk_host);
    trigger = 0;
    while (!busy) @(negedge clk_host);
    while (!done) @(negedge clk_host);
    for (int i = 0; i < n; i++) begin
      @(negedge clk_host);
      res_addr = AW'(i);
      @(posedge clk_host);
      #1;
      checks++;
      if (int'(res_data) != a_vals[i] * m) begin
        failures++;
        if (failures < 5) $display("m=%0d i=%0d: %0d expected %0d", m, i, res_data, a_vals[i] * m);
      end
    end
    runs++;
  endtask

  initial begin
    repeat (3) @(posedge clk_test);
    rst_n = 1;
    characterise(255, 2000);
    characterise(1, 100);
    characterise(128, 333);
    for (int i = 0; i < 5; i++) characterise(int'($urandom % 256), 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
