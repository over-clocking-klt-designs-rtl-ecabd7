// klt_ctrl_tb: the dimension index follows a reference count of accepted
// samples modulo P, with random gaps in x_valid; first/last mark 0 and P-1.
module klt_ctrl_tb;
  localparam int unsigned P = 6, AW = 3;
  logic clk = 0, rst_n = 0, x_valid = 0;
  logic [AW-1:0] idx;
  logic first, last;
  int checks = 0, failures = 0, accepted = 0, vectors = 0;

  klt_ctrl #(.P(P)) dut (.clk(clk), .rst_n(rst_n), .x_valid(x_valid), .idx(idx),
                         .first(first), .last(last));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      x_valid = ($urandom % 4) != 0;
      #1;
      checks++;
      if (int'(idx) != accepted % P || first != (accepted % P == 0) ||
          last != (accepted % P == P - 1)) begin
        failures++;
        if (failures < 5) $display("idx=%0d first=%0b last=%0b, expected idx %0d", idx, first, last, accepted % P);
      end
      @(posedge clk);
      if (x_valid) begin
        if (accepted % P == P - 1) vectors++;
        accepted++;
      end
    end
    checks++;
    if (vectors < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
