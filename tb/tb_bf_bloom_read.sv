// tb_bf_bloom_read: bloom read logic against a filter memory model with
// random request stalls and 1..4 cycle in-order read latency, a Bloom Read
// FIFO drained at random and a Bloom Update FIFO drained by a slow update
// model. Checks every returned word reaches the read FIFO with its index
// and slot, reaches the update FIFO with its address in update runs only,
// that the read FIFO never overflows, and that in update runs a read is
// issued only after the previous read-modify-write has finished.
module tb_bf_bloom_read;
  import bf_pkg::*;
  localparam int AW = 10, RD = 8;
  localparam int UW = AW + SLOT_W + 32;
  logic clk = 0, rst_n = 1;
  logic update;
  logic in_valid, in_ready;
  logic [IDX_W-1:0] in_idx;
  logic [AW-1:0] in_addr;
  logic [SLOT_W-1:0] in_slot;
  logic rd_valid, rd_ready, rsp_valid;
  logic [AW-1:0] rd_addr;
  logic [31:0] rsp_data;
  logic chk_push, upd_push, upd_empty, upd_busy, upd_wait;
  check_ent_t chk_ent, chk_dout;
  logic [$clog2(RD+1)-1:0] chk_count;
  logic [UW-1:0] upd_ent, upd_dout;
  logic chk_full, chk_empty, chk_pop, upd_full, upd_pop;
  logic [2:0] upd_count;
  int checks = 0, failures = 0, waits = 0, outstanding = 0;

  typedef struct { logic [IDX_W-1:0] idx; logic [AW-1:0] addr; logic [SLOT_W-1:0] slot; } req_t;
  req_t src[$], exp_chk[$], exp_upd[$];
  typedef struct { logic [31:0] d; longint due; } rsp_t;
  rsp_t mq[$];
  longint cyc = 0;

  function automatic logic [31:0] memval(logic [AW-1:0] a);
    return 32'(a) * 32'h9E3779B1;
  endfunction

  bf_bloom_read #(.WORD_AW(AW), .RD_DEPTH(RD), .OUTS(4)) dut (.*);
  bf_fifo #(.WIDTH($bits(check_ent_t)), .DEPTH(RD)) u_chk (
    .clk, .rst_n, .push(chk_push), .din(chk_ent), .full(chk_full), .pop(chk_pop),
    .dout(chk_dout), .empty(chk_empty), .count(chk_count));
  bf_fifo #(.WIDTH(UW), .DEPTH(4)) u_upd (
    .clk, .rst_n, .push(upd_push), .din(upd_ent), .full(upd_full), .pop(upd_pop),
    .dout(upd_dout), .empty(upd_empty), .count(upd_count));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Source, memory and sinks sampled on the rising edge.
  int upd_timer = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (upd_wait) waits++;
    if (in_valid && in_ready) begin
      exp_chk.push_back(src[0]);
      if (update) exp_upd.push_back(src[0]);
      void'(src.pop_front());
    end
    if (rd_valid && rd_ready) begin
      checks++;
      if (update && (outstanding != 0 || !upd_empty || upd_busy)) begin
        failures++; $display("read issued during a read-modify-write");
      end
      mq.push_back('{d: memval(rd_addr), due: cyc + 1 + longint'(int'($urandom % 4))});
    end
    outstanding <= outstanding + ((rd_valid && rd_ready) ? 1 : 0) - (rsp_valid ? 1 : 0);
    if (rsp_valid) void'(mq.pop_front());
    if (chk_pop) begin
      checks++;
      if (chk_dout.idx != exp_chk[0].idx || chk_dout.slot != exp_chk[0].slot
          || chk_dout.word != memval(exp_chk[0].addr)) begin
        failures++; $display("check entry wrong idx %0d", chk_dout.idx);
      end
      void'(exp_chk.pop_front());
    end
    if (upd_pop) begin
      checks++;
      if (upd_dout != {exp_upd[0].addr, exp_upd[0].slot, memval(exp_upd[0].addr)}) begin
        failures++; $display("update entry wrong");
      end
      void'(exp_upd.pop_front());
    end
    if (chk_full && chk_push && !chk_pop) begin failures++; $display("read FIFO overflow"); end
    if (upd_pop) upd_timer <= 3;
    else if (upd_timer > 0) upd_timer <= upd_timer - 1;
  end

  always_comb begin
    rsp_valid = mq.size() > 0 && mq[0].due <= cyc;
    rsp_data  = rsp_valid ? mq[0].d : '0;
    upd_busy  = upd_timer != 0;
    upd_pop   = !upd_empty && upd_timer == 0;
    in_valid  = src.size() > 0;
    in_idx    = src.size() > 0 ? src[0].idx : '0;
    in_addr   = src.size() > 0 ? src[0].addr : '0;
    in_slot   = src.size() > 0 ? src[0].slot : '0;
  end

  always @(negedge clk) begin
    rd_ready = ($urandom % 100) < 70;
    chk_pop  = !chk_empty && ($urandom % 100) < 40;
  end

  initial begin
    update = 0; rd_ready = 0; chk_pop = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk);
      update = run == 1;
      for (int i = 0; i < 300; i++)
        src.push_back('{idx: IDX_W'(i), addr: AW'($urandom), slot: SLOT_W'($urandom)});
      while (src.size() > 0 || exp_chk.size() > 0 || exp_upd.size() > 0) @(negedge clk);
      repeat (5) @(negedge clk);
    end
    checks++;
    if (waits == 0) begin failures++; $display("update ordering stall never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
