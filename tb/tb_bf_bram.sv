// tb_bf_bram: the on-chip filter memory starts all zero, returns a read
// exactly one cycle after the request, acknowledges writes one cycle later,
// and reads back what was written (read and write in the same cycle to
// different words included).
module tb_bf_bram;
  localparam int AW = 8;
  logic clk = 0, rst_n = 1;
  logic rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, wr_ack;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [31:0] rsp_data, wr_data;
  logic [31:0] model [1 << AW];
  int checks = 0, failures = 0;

  bf_bram #(.WORD_AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_d;
    logic        exp_v, exp_a;
    rd_valid = 0; wr_valid = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < (1 << AW); i++) model[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_v = 0; exp_a = 0; exp_d = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (rsp_valid != exp_v || (exp_v && rsp_data != exp_d) || wr_ack != exp_a) begin
        failures++;
        $display("cycle %0d: rsp %b %h ack %b, exp %b %h %b", i, rsp_valid, rsp_data, wr_ack, exp_v, exp_d, exp_a);
      end
      rd_valid = ($urandom % 2) == 1;
      rd_addr  = AW'($urandom);
      wr_valid = i > 300 && ($urandom % 3) == 0;
      wr_addr  = AW'($urandom);
      if (wr_addr == rd_addr) wr_addr = wr_addr + 1'b1;
      wr_data  = $urandom;
      checks++;
      if (!rd_ready || !wr_ready) begin failures++; $display("not ready"); end
      exp_v = rd_valid; exp_d = model[rd_addr]; exp_a = wr_valid;
      if (wr_valid) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
