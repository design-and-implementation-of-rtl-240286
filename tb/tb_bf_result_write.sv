// tb_bf_result_write: feeds check entries (word and slot, keys in random
// order, several hash functions) and compares the bitmap written over AXI
// with one built from the entries: a key's bit is 1 only when all its
// counters are non-zero; bits past the last key are 0. Also checks that the
// write waits for the update logic to go idle and that done pulses once.
module tb_bf_result_write;
  import bf_pkg::*;
  logic clk = 0, rst_n = 1;
  logic start, in_empty, in_pop, upd_idle, done, push, full;
  bf_cfg_t cfg;
  check_ent_t in_ent, din;
  logic [4:0] count;
  logic [31:0] m_awaddr, m_wdata;
  logic m_awvalid, m_awready, m_wvalid, m_wready, m_bvalid, m_bready;
  logic [3:0] m_wstrb;
  logic [1:0] m_bresp;
  int checks = 0, failures = 0, dones = 0;

  bf_fifo #(.WIDTH($bits(check_ent_t)), .DEPTH(16)) u_f (
    .clk, .rst_n, .push, .din, .full, .pop(in_pop), .dout(in_ent), .empty(in_empty), .count);
  bf_result_write dut (.*);
  tb_axil_mem #(.AW(10), .LAT(1), .STALL(0)) mem (
    .clk, .rst_n, .araddr('0), .arvalid(1'b0), .arready(), .rdata(), .rresp(), .rvalid(),
    .rready(1'b0), .awaddr(m_awaddr), .awvalid(m_awvalid), .awready(m_awready),
    .wdata(m_wdata), .wstrb(m_wstrb), .wvalid(m_wvalid), .wready(m_wready),
    .bresp(m_bresp), .bvalid(m_bvalid), .bready(m_bready));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock
  always @(posedge clk) if (done) dones++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; din = '0; start = 0; cfg = '0; upd_idle = 1;
    for (int i = 0; i < 1024; i++) mem.mem[i] = 32'hDEADBEEF;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 4; run++) begin
      int n, k, d0;
      logic [MAX_KEYS-1:0] exp;
      int order[$];
      n = (run == 0) ? 256 : (run == 1) ? 45 : (run == 2) ? 1 : 100;
      k = 1 + run;
      @(negedge clk);
      cfg.num_keys = 9'(n); cfg.num_hash = 3'(k); cfg.result_addr = 32'h200 + 32'(run * 64);
      start = 1; @(negedge clk); start = 0;
      exp = '0;
      order.delete();
      for (int i = 0; i < n; i++) exp[i] = 1'b1;
      for (int h = 0; h < k; h++) for (int i = 0; i < n; i++) order.push_back(i);
      order.shuffle();
      upd_idle = (run != 3);
      d0 = dones;
      foreach (order[j]) begin
        logic [31:0] w; logic [2:0] s;
        w = $urandom; s = 3'($urandom);
        if (($urandom % 6) == 0) w[s*4 +: 4] = 4'h0;
        if (w[s*4 +: 4] == 4'h0) exp[order[j]] = 1'b0;
        din.idx = IDX_W'(order[j]); din.slot = s; din.word = w;
        while (full) @(negedge clk);
        push = 1;
        @(negedge clk);
        push = 0;
      end
      push = 0;
      if (run == 3) begin
        repeat (40) @(negedge clk);
        checks++;
        if (m_awvalid || dones != d0) begin failures++; $display("wrote while update busy"); end
        upd_idle = 1;
      end
      while (dones == d0) @(negedge clk);
      repeat (3) @(negedge clk);
      checks++;
      if (dones != d0 + 1) begin failures++; $display("done count"); end
      for (int w = 0; w < (n + 31) / 32; w++) begin
        checks++;
        if (mem.mem[(32'h200 + run * 64) / 4 + w] != exp[w*32 +: 32]) begin
          failures++;
          $display("run %0d word %0d: %h exp %h", run, w, mem.mem[(32'h200 + run * 64) / 4 + w], exp[w*32 +: 32]);
        end
      end
      checks++;
      if (mem.mem[(32'h200 + run * 64) / 4 + (n + 31) / 32] != 32'hDEADBEEF && n < 256) begin
        failures++; $display("wrote past the bitmap");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
