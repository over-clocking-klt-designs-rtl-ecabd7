// char_fsm_tb: runs of random length (including 0, 1, the full depth and an
// over-long request that must be clamped). For each run it checks that the
// results are written exactly once each, in order, to addresses 0..n-1,
// every write LAT cycles after the matching stimulus address was presented,
// that reads are gapless, that a trigger during a run is ignored and that
// busy/done behave.
module char_fsm_tb;
  localparam int unsigned DEPTH = 2000, LAT = 3, AW = 11, CW = 11;
  logic clk = 0, rst_n = 0, trigger = 0;
  logic [CW-1:0] n_samples = '0;
  logic [AW-1:0] stim_raddr, res_waddr;
  logic res_we, busy, done;
  int checks = 0, failures = 0, cyc = 0;
  int raddr_hist [int];
  int writes, next_addr;

  char_fsm #(.DEPTH(DEPTH), .LAT(LAT)) dut (
    .clk(clk), .rst_n(rst_n), .trigger(trigger), .n_samples(n_samples),
    .stim_raddr(stim_raddr), .res_we(res_we), .res_waddr(res_waddr),
    .busy(busy), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    raddr_hist[cyc] = int'(stim_raddr);
    if (res_we) begin
      checks++;
      if (int'(res_waddr) != next_addr || raddr_hist[cyc - LAT] != next_addr) begin
        failures++;
        if (failures < 5) $display("write to %0d (expected %0d), read LAT earlier %0d",
                                   res_waddr, next_addr, raddr_hist[cyc - LAT]);
      end
      next_addr++;
      writes++;
    end
  end

  task automatic run(int n, bit retrigger);
    int expect_n = (n > int'(DEPTH)) ? int'(DEPTH) : n;
    int t0;
    writes = 0;
    next_addr = 0;
    @(negedge clk);
    n_samples = CW'(n);
    trigger = 1;
    repeat (3) @(negedge clk);
    trigger = 0;
    t0 = cyc;
    if (retrigger) begin
      repeat (5) @(negedge clk);
      trigger = 1;
      repeat (4) @(negedge clk);
      trigger = 0;
    end
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    checks++;
    if (writes != expect_n || busy || !done) begin
      failures++;
      $display("run n=%0d: %0d writes, busy=%0b done=%0b", n, writes, busy, done);
    end
    // gapless streaming: the run takes n + LAT + a few cycles
    checks++;
    if (cyc - t0 > expect_n + int'(LAT) + 12) begin
      failures++;
      $display("run n=%0d took %0d cycles", n, cyc - t0);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    checks++;
    if (busy || done) failures++;
    run(1, 0);
    run(0, 0);
    run(17, 1);
    run(2000, 0);
    run(2047, 0);
    for (int i = 0; i < 10; i++) run(int'($urandom % 300) + 1, i % 2 == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
