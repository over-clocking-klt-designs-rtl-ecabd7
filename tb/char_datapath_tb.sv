// char_datapath_tb: a new random operand pair on every data-path clock
// edge; R must hold the exact product of the pair launched one edge earlier
// (the data path is simulated without delays, i.e. below its critical
// frequency).
module char_datapath_tb;
  localparam int unsigned W = 8;
  logic clk_dp = 0;
  logic [W-1:0] a_in = '0, b_in = '0;
  logic [2*W-1:0] r;
  int checks = 0, failures = 0;
  int hist_a[$], hist_b[$];

  char_datapath #(.W(W)) dut (.clk_dp(clk_dp), .a_in(a_in), .b_in(b_in), .r(r));

  always #5 clk_dp = ~clk_dp;

  initial begin
    repeat (20000) @(posedge clk_dp);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk_dp);
      a_in = W'($urandom);
      b_in = (n % 7 == 0) ? 8'hFF : W'($urandom);
      hist_a.push_back(int'(a_in));
      hist_b.push_back(int'(b_in));
      @(posedge clk_dp);
      #1;
      // after this edge R holds the pair presented before the previous edge
      if (hist_a.size() == 2) begin
        checks++;
        if (int'(r) != hist_a[0] * hist_b[0]) begin
          failures++;
          if (failures < 5) $display("r=%0d expected %0d", r, hist_a[0] * hist_b[0]);
        end
        void'(hist_a.pop_front());
        void'(hist_b.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
