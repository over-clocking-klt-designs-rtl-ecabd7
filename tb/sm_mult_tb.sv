// sm_mult_tb: sign-magnitude multiplier against integer arithmetic.
// Covers all sign combinations, zero operands and random magnitudes.
module sm_mult_tb;
  localparam int unsigned W = 9;
  logic [W-1:0]   a, b;
  logic [2*W-2:0] p;
  int checks = 0, failures = 0;

  sm_mult #(.W(W)) dut (.a(a), .b(b), .p(p));

  function automatic int sm2int(logic [W-1:0] v);
    int m = int'(v[W-2:0]);
    return v[W-1] ? -m : m;
  endfunction

  function automatic int prod2int(logic [2*W-2:0] v);
    int m = int'(v[2*W-3:0]);
    return v[2*W-2] ? -m : m;
  endfunction

  task automatic check_one(logic [W-1:0] x, logic [W-1:0] y);
    int expect_v;
    a = x; b = y;
    #1;
    expect_v = sm2int(x) * sm2int(y);
    checks++;
    if (prod2int(p) != expect_v || (expect_v == 0 && p[2*W-2])) begin
      failures++;
      if (failures < 5) $display("mismatch %h*%h -> %h, expected %0d", x, y, p, expect_v);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(9'h000, 9'h1FF);   // +0 * -255: zero keeps sign 0
    check_one(9'h100, 9'h0FF);   // -0 * +255
    check_one(9'h1FF, 9'h1FF);   // -255 * -255
    check_one(9'h0FF, 9'h1FF);
    for (int i = 0; i < 20000; i++) check_one(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
