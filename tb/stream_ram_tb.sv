// stream_ram_tb: fills the whole memory (default depth) from the write
// clock, reads it back from a second, slower clock, and checks each word and
// the one-edge read latency; then mixes random writes and reads.
module stream_ram_tb;
  localparam int unsigned DW = 16, DEPTH = 2000, AW = 11;
  logic wclk = 0, rclk = 0;
  logic we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  stream_ram #(.DW(DW), .DEPTH(DEPTH)) dut (
    .wclk(wclk), .we(we), .waddr(waddr), .wdata(wdata),
    .rclk(rclk), .raddr(raddr), .rdata(rdata));

  always #5 wclk = ~wclk;
  always #7 rclk = ~rclk;

  initial begin
    #2_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a);
    @(negedge rclk);
    raddr = AW'(a);
    @(posedge rclk);
    #1;
    checks++;
    if (rdata !== model[a]) begin
      failures++;
      if (failures < 5) $display("addr %0d: %h expected %h", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge wclk);
      we = 1; waddr = AW'(a); wdata = DW'($urandom);
      model[a] = wdata;
    end
    @(negedge wclk);
    we = 0;
    for (int a = 0; a < DEPTH; a++) read_check(a);
    // writes with we low must not land
    for (int n = 0; n < 500; n++) begin
      @(negedge wclk);
      we = ($urandom % 2) == 1;
      waddr = AW'($urandom % DEPTH);
      wdata = DW'($urandom);
      @(posedge wclk);
      if (we) model[waddr] = wdata;
      @(negedge wclk);
      we = 0;
      read_check(int'($urandom % DEPTH));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
