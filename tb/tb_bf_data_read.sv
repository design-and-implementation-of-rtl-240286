// tb_bf_data_read: data read logic against a behavioural AXI memory with
// read latency and random ARREADY stalls. MURMUR3 is modelled as a 5-cycle
// delay into a Hash Out FIFO that is drained at random. Checks the key,
// seed and index stream (every key once per hash function, in order), that
// the FIFO can never overflow, and that reading stalls when it is full.
module tb_bf_data_read;
  import bf_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 1;
  logic start;
  bf_cfg_t cfg;
  logic [31:0] m_araddr, m_rdata;
  logic m_arvalid, m_arready, m_rvalid, m_rready;
  logic [1:0] m_rresp;
  logic mm_valid;
  logic [31:0] mm_key, mm_seed;
  logic [IDX_W-1:0] mm_tag;
  logic hash_push, stalled;
  logic [$clog2(DEPTH+1)-1:0] fifo_count;
  logic [4:0] dly;
  int checks = 0, failures = 0, got = 0, stalls = 0, inflight = 0;
  int exp_k, exp_i;

  bf_data_read #(.FIFO_DEPTH(DEPTH)) dut (.*);

  tb_axil_mem #(.AW(10), .LAT(3), .STALL(30)) mem (
    .clk, .rst_n, .araddr(m_araddr), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr('0), .awvalid(1'b0), .awready(), .wdata('0), .wstrb('0), .wvalid(1'b0),
    .wready(), .bresp(), .bvalid(), .bready(1'b0)
  );

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  assign hash_push = dly[4];
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly <= '0; fifo_count <= '0;
    end else begin
      logic pop;
      dly <= {dly[3:0], mm_valid};
      pop = fifo_count != 0 && ($urandom % 100 < 20);
      fifo_count <= fifo_count + (hash_push ? 1 : 0) - (pop ? 1 : 0);
      inflight <= inflight + ((m_arvalid && m_arready) ? 1 : 0) - (hash_push ? 1 : 0);
      if (stalled) stalls++;
      if (int'(fifo_count) + inflight > DEPTH) begin
        failures++; $display("credit overrun");
      end
    end
  end

  always @(negedge clk) if (rst_n && mm_valid) begin
    checks++;
    if (mm_key != 32'h1000_0000 + 32'(exp_i) || mm_seed != 32'h5EED_0000 + 32'(exp_k)
        || mm_tag != IDX_W'(exp_i)) begin
      failures++;
      $display("got key %h seed %h tag %0d, exp index %0d pass %0d", mm_key, mm_seed, mm_tag, exp_i, exp_k);
    end
    got++;
    if (exp_i == int'(cfg.num_keys) - 1) begin exp_i = 0; exp_k++; end else exp_i++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cfg = '0;
    for (int i = 0; i < 1024; i++) mem.mem[i] = 32'h1000_0000 + 32'(i - 64);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      cfg.data_addr = 32'h100;             // word 64 holds key index 0
      cfg.num_keys  = (run == 0) ? 9'd37 : (run == 1) ? 9'd256 : 9'd1;
      cfg.num_hash  = (run == 0) ? 3'd3 : (run == 1) ? 3'd1 : 3'd4;
      for (int k = 0; k < MAX_HASH; k++) cfg.seeds[k] = 32'h5EED_0000 + 32'(k);
      exp_i = 0; exp_k = 0; got = 0;
      start = 1; @(negedge clk); start = 0;
      while (got < int'(cfg.num_keys) * int'(cfg.num_hash)) @(negedge clk);
      repeat (20) @(negedge clk);
      checks++;
      if (got != int'(cfg.num_keys) * int'(cfg.num_hash) || m_arvalid) begin
        failures++; $display("run %0d: %0d keys", run, got);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("credit stall never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
