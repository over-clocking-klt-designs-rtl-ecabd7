// klt_dot_product_tb: random vectors of P sign-magnitude samples and
// coefficients, with random gaps and a new random offset per vector. Each factor is checked
// against an integer dot product, and it must appear exactly at the second
// clock edge after the last sample was accepted.
module klt_dot_product_tb;
  localparam int unsigned P = 6, W = 9, ACC_W = 20;
  localparam int unsigned LATENCY = 2;   // edges from accepting the last sample

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, first = 0, last = 0;
  logic [W-1:0] x = '0, coef = '0;
  logic signed [ACC_W-1:0] offset = '0, f;
  logic f_valid;
  int checks = 0, failures = 0, cyc = 0, gaps = 0, pos = 0;
  int sum = 0, vec_off = 0;
  int exp_val[$], exp_due[$];

  klt_dot_product #(.W(W), .ACC_W(ACC_W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .first(first), .last(last),
    .x(x), .coef(coef), .offset(offset), .f(f), .f_valid(f_valid));

  always #5 clk = ~clk;

  function automatic int sm2int(logic [W-1:0] v);
    int m = int'(v[W-2:0]);
    return v[W-1] ? -m : m;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  always @(posedge clk) begin
    cyc++;
    if (rst_n && in_valid) begin
      if (first) vec_off = int'(offset);
      sum = (first ? 0 : sum) + sm2int(x) * sm2int(coef);
      if (last) begin
        exp_val.push_back(sum - vec_off);
        exp_due.push_back(cyc + LATENCY);
      end
    end
    #1;
    if (f_valid) begin
      checks++;
      if (exp_val.size() == 0) begin
        failures++;
        $display("unexpected f_valid at cycle %0d", cyc);
      end else begin
        if (int'(f) != exp_val[0] || exp_due[0] != cyc) begin
          failures++;
          if (failures < 5)
            $display("f=%0d at %0d, expected %0d at %0d", f, cyc, exp_val[0], exp_due[0]);
        end
        void'(exp_val.pop_front());
        void'(exp_due.pop_front());
      end
    end else if (exp_due.size() != 0 && exp_due[0] < cyc) begin
      failures++;
      $display("missing factor due at %0d", exp_due[0]);
      void'(exp_val.pop_front());
      void'(exp_due.pop_front());
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      if (!in_valid) gaps++;
      x    = W'($urandom);
      coef = (n % 97 == 0) ? 9'h0FF : W'($urandom);
      if (n % 31 == 0) x = 9'h1FF;
      first = in_valid && (pos == 0);
      last  = in_valid && (pos == P - 1);
      if (first) offset = ACC_W'(signed'(($urandom % 2001) - 1000));
      if (in_valid) pos = (pos + 1) % P;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_val.size() != 0 || gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
