// tb_bf_bloom_axi: the DDR filter port against a behavioural AXI memory
// with 20-cycle read latency and random ARREADY stalls: random reads and
// writes through the port must return what a word array model holds, reads
// must overlap (several in flight), and each write must be acknowledged.
module tb_bf_bloom_axi;
  localparam int AW = 8;
  logic clk = 0, rst_n = 1;
  logic rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, wr_ack;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [31:0] rsp_data, wr_data;
  logic [31:0] m_araddr, m_rdata, m_awaddr, m_wdata;
  logic m_arvalid, m_arready, m_rvalid, m_rready, m_awvalid, m_awready;
  logic m_wvalid, m_wready, m_bvalid, m_bready;
  logic [1:0] m_rresp, m_bresp;
  logic [3:0] m_wstrb;
  logic [31:0] model [1 << AW];
  logic [31:0] exp_q[$];
  int checks = 0, failures = 0, maxout = 0, acks = 0, writes = 0;

  bf_bloom_axi #(.WORD_AW(AW), .BASE(32'h0)) dut (.*);
  tb_axil_mem #(.AW(AW), .LAT(20), .STALL(25)) mem (
    .clk, .rst_n, .araddr(m_araddr), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata),
    .wstrb(m_wstrb), .wvalid(m_wvalid), .wready(m_wready), .bresp(m_bresp),
    .bvalid(m_bvalid), .bready(m_bready));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (rsp_valid) begin
      checks++;
      if (rsp_data != exp_q[0]) begin failures++; $display("read %h exp %h", rsp_data, exp_q[0]); end
      void'(exp_q.pop_front());
    end
    if (rd_valid && rd_ready) exp_q.push_back(model[rd_addr]);
    if (exp_q.size() > maxout) maxout = exp_q.size();
    if (wr_ack) acks++;
  end

  initial begin
    rd_valid = 0; wr_valid = 0; rd_addr = 0; wr_addr = 0; wr_data = 0;
    for (int i = 0; i < (1 << AW); i++) begin model[i] = $urandom; mem.mem[i] = model[i]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // burst of reads
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      rd_valid = 1; rd_addr = AW'($urandom);
      do @(posedge clk); while (!rd_ready);
    end
    @(negedge clk); rd_valid = 0;
    while (exp_q.size() > 0) @(negedge clk);
    // writes, each read back
    for (int i = 0; i < 50; i++) begin
      int a0;
      @(negedge clk);
      wr_valid = 1; wr_addr = AW'($urandom); wr_data = $urandom;
      do @(posedge clk); while (!wr_ready);
      model[wr_addr] = wr_data; writes++;
      @(negedge clk); wr_valid = 0;
      a0 = acks;
      while (acks == a0) @(negedge clk);
      rd_valid = 1; rd_addr = wr_addr;
      do @(posedge clk); while (!rd_ready);
      @(negedge clk); rd_valid = 0;
      while (exp_q.size() > 0) @(negedge clk);
    end
    checks++;
    if (maxout < 4) begin failures++; $display("reads did not overlap (%0d)", maxout); end
    checks++;
    if (acks != writes) begin failures++; $display("acks %0d writes %0d", acks, writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
