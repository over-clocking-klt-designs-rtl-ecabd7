// emb_mult_tb: exhaustive check of the 8x8 unsigned multiplier against a
// shift-and-add reference computed in the testbench.
module emb_mult_tb;
  localparam int unsigned W = 8;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  emb_mult #(.W(W)) dut (.a(a), .b(b), .p(p));

  function automatic int unsigned shift_add(int unsigned x, int unsigned y);
    int unsigned s = 0;
    for (int i = 0; i < W; i++) if (y[i]) s += x << i;
    return s;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << W); i++) begin
      for (int j = 0; j < (1 << W); j++) begin
        a = W'(i); b = W'(j);
        #1;
        checks++;
        if (32'(p) != shift_add(i, j)) begin
          failures++;
          if (failures < 5) $display("mismatch %0d*%0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
