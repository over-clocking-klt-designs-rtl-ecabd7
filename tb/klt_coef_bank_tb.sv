// klt_coef_bank_tb: reset contents come from the parameters, writes land at
// the addressed entry only, the offset register loads independently.
module klt_coef_bank_tb;
  localparam int unsigned P = 6, W = 9, ACC_W = 20, AW = 3;
  localparam logic [P*W-1:0]   INIT = {9'h105, 9'h004, 9'h1F3, 9'h002, 9'h181, 9'h0AA};
  localparam logic [ACC_W-1:0] INIT_OFF = 20'h00123;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_off_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0, rd_coef;
  logic [ACC_W-1:0] wr_offset = '0, offset;
  logic [W-1:0] model [P];
  logic [ACC_W-1:0] model_off;
  int checks = 0, failures = 0;

  klt_coef_bank #(.P(P), .W(W), .ACC_W(ACC_W), .INIT_COEF(INIT), .INIT_OFFSET(INIT_OFF)) dut (
    .clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .wr_off_en(wr_off_en), .wr_offset(wr_offset), .rd_addr(rd_addr), .rd_coef(rd_coef),
    .offset(offset));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int i = 0; i < P; i++) begin
      rd_addr = AW'(i);
      #1;
      checks++;
      if (rd_coef !== model[i]) begin
        failures++;
        $display("coef %0d = %h, expected %h", i, rd_coef, model[i]);
      end
    end
    checks++;
    if (offset !== model_off) begin
      failures++;
      $display("offset = %h, expected %h", offset, model_off);
    end
  endtask

  initial begin
    model = '{9'h0AA, 9'h181, 9'h002, 9'h1F3, 9'h004, 9'h105};
    model_off = INIT_OFF;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_en     = ($urandom % 2) == 1;
      wr_addr   = AW'($urandom % P);
      wr_data   = W'($urandom);
      wr_off_en = ($urandom % 5) == 0;
      wr_offset = ACC_W'($urandom);
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      if (wr_off_en) model_off = wr_offset;
      @(negedge clk);
      wr_en = 0; wr_off_en = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
