// tb_bf_bloom_update: entries {address, slot, word} with random counter
// values (full counters included) go through the update FIFO; checks each
// write-back increments only the selected counter, saturates at 15, waits
// for the write acknowledgement (random delay) and reports saturation.
module tb_bf_bloom_update;
  import bf_pkg::*;
  localparam int AW = 10;
  localparam int UW = AW + SLOT_W + 32;
  logic clk = 0, rst_n = 1;
  logic [UW-1:0] in_ent, din;
  logic in_empty, in_pop, push, full;
  logic [2:0] count;
  logic wr_valid, wr_ready, wr_ack, busy, saturated;
  logic [AW-1:0] wr_addr;
  logic [31:0] wr_data;
  int checks = 0, failures = 0, sent = 0, sats = 0, exp_sats = 0, ack_wait = 0;
  logic [AW-1:0] qa[$];
  logic [31:0]   qd[$];

  bf_fifo #(.WIDTH(UW), .DEPTH(4)) u_f (
    .clk, .rst_n, .push, .din, .full, .pop(in_pop), .dout(in_ent), .empty(in_empty), .count);
  bf_bloom_update #(.WORD_AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock
  always @(posedge clk) if (rst_n && saturated) sats++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Memory write port: random ready, acknowledgement 1..4 cycles later.
  initial begin
    wr_ready = 0; wr_ack = 0;
    forever begin
      @(negedge clk);
      wr_ack = 0;
      wr_ready = ($urandom % 2) == 1;
      if (wr_valid && wr_ready) begin
        int d;
        checks++;
        if (wr_addr != qa[0] || wr_data != qd[0]) begin
          failures++; $display("write %0d %h exp %0d %h", wr_addr, wr_data, qa[0], qd[0]);
        end
        void'(qa.pop_front()); void'(qd.pop_front());
        d = 1 + $urandom % 4;
        @(negedge clk); wr_ready = 0;
        repeat (d - 1) begin @(negedge clk); ack_wait++; end
        checks++;
        if (!busy || wr_valid) begin failures++; $display("not waiting for ack"); end
        wr_ack = 1;
      end
    end
  end

  initial begin
    push = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < 400) begin
      @(negedge clk);
      push = 0;
      if (!full && ($urandom % 2) == 1) begin
        logic [AW-1:0] a; logic [SLOT_W-1:0] s; logic [31:0] w, n; logic [3:0] c;
        a = AW'($urandom); s = SLOT_W'($urandom); w = $urandom;
        if (sent % 5 == 0) w[s*4 +: 4] = 4'hF;
        c = w[s*4 +: 4];
        n = w;
        if (c != 4'hF) n[s*4 +: 4] = c + 1; else exp_sats++;
        din = {a, s, w}; push = 1; sent++;
        qa.push_back(a); qd.push_back(n);
      end
    end
    @(negedge clk); push = 0;
    while (qa.size() > 0 || busy) @(negedge clk);
    checks++;
    if (sats != exp_sats) begin failures++; $display("saturations %0d exp %0d", sats, exp_sats); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
