// tb_bf_fifo: random push/pop traffic against a queue model; checks the
// head word, the fill count and the empty/full flags every cycle.
module tb_bf_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 1;
  logic push, pop, full, empty;
  logic [W-1:0] din, dout;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  bf_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != q.size() || empty != (q.size() == 0) || full != (q.size() == D)) begin
        failures++;
        $display("flags wrong: count=%0d model=%0d", count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout != q[0]) begin failures++; $display("dout %h exp %h", dout, q[0]); end
      end
      // bias phases towards filling and draining
      pop  = (q.size() > 0) && ($urandom % 100 < ((i / 300) % 2 == 1 ? 70 : 30));
      push = (q.size() < D || pop) && ($urandom % 100 < ((i / 300) % 2 == 1 ? 30 : 70));
      din  = W'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
