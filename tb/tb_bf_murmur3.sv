// tb_bf_murmur3: MurmurHash3 against published vectors and against the
// sequential reference function for random keys and seeds, fed one per
// cycle with gaps; checks each hash leaves exactly five cycles after its key.
module tb_bf_murmur3;
  import tb_bf_pkg::*;
  logic clk = 0, rst_n = 1;
  logic in_valid, out_valid;
  logic [31:0] in_key, in_seed, out_hash;
  logic [7:0] in_tag, out_tag;
  int checks = 0, failures = 0;
  typedef struct { logic [31:0] h; logic [7:0] t; longint c; } exp_t;
  exp_t q[$];
  longint cyc = 0;

  bf_murmur3 #(.TAG_W(8)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        if (out_hash != q[0].h || out_tag != q[0].t || cyc - q[0].c != 5) begin
          failures++;
          $display("hash %h tag %0d after %0d, exp %h tag %0d after 5",
                   out_hash, out_tag, cyc - q[0].c, q[0].h, q[0].t);
        end
        void'(q.pop_front());
      end
    end
  end

  task automatic send(logic [31:0] k, logic [31:0] s, logic [31:0] exp_h);
    @(negedge clk);
    in_valid = 1; in_key = k; in_seed = s; in_tag = 8'($urandom);
    q.push_back('{h: exp_h, t: in_tag, c: cyc});
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    in_valid = 0; in_key = 0; in_seed = 0; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Published MurmurHash3_x86_32 values for the 4 bytes "test".
    send(32'h74736574, 32'h0, 32'hba6bd213);
    send(32'h74736574, 32'h9747b28c, 32'h704b81dc);
    // Back-to-back random keys.
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      logic [31:0] k, s;
      k = $urandom; s = (i % 4 == 0) ? 32'd0 : $urandom;
      in_valid = ($urandom % 4) != 0;
      in_key = k; in_seed = s; in_tag = 8'(i);
      if (in_valid) q.push_back('{h: murmur3_ref(k, s), t: 8'(i), c: cyc});
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d hashes missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
