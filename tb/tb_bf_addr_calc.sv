// tb_bf_addr_calc: random hashes from a real FIFO into the address
// calculator with a randomly stalling consumer; checks every word address
// and counter slot against the modulo mapping, in order, none lost.
module tb_bf_addr_calc;
  import bf_pkg::*;
  import tb_bf_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 1;
  hash_ent_t in_ent, din;
  logic in_empty, in_pop, push, full;
  logic [4:0] count;
  logic out_valid, out_ready;
  logic [IDX_W-1:0] out_idx;
  logic [AW-1:0] out_addr;
  logic [SLOT_W-1:0] out_slot;
  int checks = 0, failures = 0, sent = 0;
  hash_ent_t q[$];

  bf_fifo #(.WIDTH($bits(hash_ent_t)), .DEPTH(16)) u_f (
    .clk, .rst_n, .push, .din, .full, .pop(in_pop), .dout(in_ent), .empty(in_empty), .count);
  bf_addr_calc #(.WORD_AW(AW)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      int unsigned ci;
      checks++;
      ci = cnt_index(q[0].hash, AW + 3);
      if (out_addr != AW'(ci / 8) || out_slot != SLOT_W'(ci % 8) || out_idx != q[0].idx) begin
        failures++;
        $display("hash %h -> %0d/%0d, exp %0d/%0d", q[0].hash, out_addr, out_slot, ci / 8, ci % 8);
      end
      void'(q.pop_front());
    end
  end

  always @(negedge clk) if (rst_n) begin
    out_ready = ($urandom % 100) < 60;
    push = !full && sent < 1000 && ($urandom % 100) < 70;
    din.hash = $urandom; din.idx = IDX_W'(sent);
    if (push) begin q.push_back(din); sent++; end
  end

  initial begin
    push = 0; din = '0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (sent < 1000 || q.size() > 0) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
