// tb_bf_system: end-to-end test of the accelerator with its on-chip filter,
// every parameter at its default. A behavioural AXI memory plays the data
// BRAM (keys in, result bitmaps out); the testbench plays the processor on
// the AXI-Lite command port and waits for the interrupt. A sequential model
// of the counting filter (MurmurHash3 reference, counters, saturation)
// predicts every result bitmap and the final filter contents.
// Runs: insert 256 keys with k = 4, check them (all members), check 256 new
// keys (non-members apart from false positives), check with k = 1..4 and
// sweep chunk sizes 16..256 (the rate must not fall as chunks grow),
// measure the cycle count against the document's on-chip rates, a partial
// chunk, a chunk of one repeated key (counter saturation) and refused
// starts. Each mechanism must occur at least once.
module tb_bf_system;
  import bf_pkg::*;
  import tb_bf_pkg::*;

  localparam int WORD_AW = 13;                 // bf_system default
  localparam int CBITS   = WORD_AW + 3;
  localparam int NCNT    = 1 << CBITS;
  localparam logic [31:0] KEYS = 32'h0000_0000, RES = 32'h0000_3000;

  logic clk = 0, rst_n = 1;
  logic [7:0]  s_awaddr, s_araddr;
  logic        s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic        s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0]  s_wstrb;
  logic [1:0]  s_bresp, s_rresp;
  logic [31:0] m_araddr, m_rdata, m_awaddr, m_wdata;
  logic        m_arvalid, m_arready, m_rvalid, m_rready, m_awvalid, m_awready;
  logic        m_wvalid, m_wready, m_bvalid, m_bready;
  logic [1:0]  m_rresp, m_bresp;
  logic [3:0]  m_wstrb;
  logic [31:0] m_bf_araddr, m_bf_awaddr, m_bf_wdata;
  logic        m_bf_arvalid, m_bf_rready, m_bf_awvalid, m_bf_wvalid, m_bf_bready;
  logic [3:0]  m_bf_wstrb;
  logic        irq, busy;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_update = 0, n_check = 0, n_multipass = 0, n_credit_stall = 0, n_rmw_wait = 0;
  int n_saturate = 0, n_irq = 0, n_refused = 0, n_partial = 0, n_false_pos = 0;

  logic [3:0]  model [NCNT];
  logic [31:0] keys [MAX_KEYS];
  logic [31:0] seeds [MAX_HASH];
  logic [MAX_KEYS-1:0] exp_bits;

  bf_system dut (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .m_araddr, .m_arvalid, .m_arready, .m_rdata, .m_rresp, .m_rvalid, .m_rready,
    .m_awaddr, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .m_bf_araddr, .m_bf_arvalid, .m_bf_arready(1'b0), .m_bf_rdata('0), .m_bf_rresp('0),
    .m_bf_rvalid(1'b0), .m_bf_rready, .m_bf_awaddr, .m_bf_awvalid, .m_bf_awready(1'b0),
    .m_bf_wdata, .m_bf_wstrb, .m_bf_wvalid, .m_bf_wready(1'b0), .m_bf_bresp('0),
    .m_bf_bvalid(1'b0), .m_bf_bready,
    .irq, .busy
  );

  tb_axil_mem #(.AW(12), .LAT(1), .STALL(0)) data_mem (
    .clk, .rst_n, .araddr(m_araddr), .arvalid(m_arvalid), .arready(m_arready),
    .rdata(m_rdata), .rresp(m_rresp), .rvalid(m_rvalid), .rready(m_rready),
    .awaddr(m_awaddr), .awvalid(m_awvalid), .awready(m_awready), .wdata(m_wdata),
    .wstrb(m_wstrb), .wvalid(m_wvalid), .wready(m_wready), .bresp(m_bresp),
    .bvalid(m_bvalid), .bready(m_bready));

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock

  always @(posedge clk) if (rst_n) begin
    if (dut.u_accel.dr_stalled) n_credit_stall++;
    if (dut.u_accel.upd_wait)   n_rmw_wait++;
    if (dut.u_accel.upd_sat)    n_saturate++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk);
    s_awaddr = a; s_wdata = d; s_awvalid = 1; s_wvalid = 1; s_wstrb = 4'hF;
    do @(posedge clk); while (!(s_awready && s_wready));
    @(negedge clk);
    s_awvalid = 0; s_wvalid = 0;
    while (!s_bvalid) @(negedge clk);
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
  endtask

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  // Sequential model of one run; fills exp_bits.
  task automatic model_run(int n, int k, bit upd);
    exp_bits = '0;
    for (int i = 0; i < n; i++) exp_bits[i] = 1'b1;
    for (int h = 0; h < k; h++)
      for (int i = 0; i < n; i++) begin
        int unsigned c;
        c = cnt_index(murmur3_ref(keys[i], seeds[h]), CBITS);
        if (model[c] == 0) exp_bits[i] = 1'b0;
        if (upd && model[c] != 4'hF) model[c] = model[c] + 1;
      end
  endtask

  // Load keys, program the accelerator, start, wait for the interrupt,
  // compare the bitmap. Returns the cycle count register.
  task automatic run(int n, int k, bit upd, output int cycles);
    logic [31:0] d;
    for (int i = 0; i < n; i++) data_mem.mem[(KEYS >> 2) + i] = keys[i];
    for (int w = 0; w < 9; w++) data_mem.mem[(RES >> 2) + w] = 32'hDEADBEEF;
    wr(REG_DATA, KEYS); wr(REG_RESULT, RES);
    wr(REG_NKEYS, n);   wr(REG_NHASH, k);
    for (int h = 0; h < MAX_HASH; h++) wr(REG_SEED0 + 8'(4*h), seeds[h]);
    wr(REG_CTRL, 32'h5 | (upd ? 32'h2 : 32'h0));
    while (!irq) @(negedge clk);
    n_irq++;
    rd(REG_STATUS, d); check("status done", 32'(d), 32'h2);
    rd(REG_CYCLES, d); cycles = int'(d);
    wr(REG_STATUS, 32'h2);
    check("irq cleared", 32'(irq), 32'(0));
    model_run(n, k, upd);
    for (int w = 0; w < (n + 31) / 32; w++)
      check($sformatf("result word %0d (n=%0d k=%0d upd=%0d)", w, n, k, upd), 32'(data_mem.mem[(RES >> 2) + w]), 32'(exp_bits[w*32 +: 32]));
    if (n < 256) begin
      check("no write past bitmap", 32'(data_mem.mem[(RES >> 2) + (n + 31) / 32]), 32'hDEADBEEF);
      n_partial++;
    end
    if (upd) n_update++; else n_check++;
    if (k > 1) n_multipass++;
  endtask

  // On-chip rates of the document (MChecks/s at 100 MHz, 256-key chunks).
  real paper_rate [4] = '{46.29, 23.21, 15.49, 11.62};

  initial begin
    int cyc, cyc1;
    logic [31:0] d;
    s_awaddr = 0; s_araddr = 0; s_awvalid = 0; s_wvalid = 0; s_wdata = 0; s_wstrb = 0;
    s_arvalid = 0; s_bready = 1; s_rready = 1;
    for (int i = 0; i < NCNT; i++) model[i] = '0;
    for (int h = 0; h < MAX_HASH; h++) seeds[h] = 32'h9747b28c + 32'(h * 32'h1234567);
    repeat (5) @(posedge clk);
    rst_n = 1;

    // 1. insert 256 keys with four hash functions
    for (int i = 0; i < 256; i++) keys[i] = $urandom;
    run(256, 4, 1, cyc);
    // 2. the same keys are members
    run(256, 4, 0, cyc);
    check("all inserted keys hit", 32'(exp_bits == '1), 32'(1));
    // 3. check with k = 1..4, measure the rate
    for (int k = 1; k <= 4; k++) begin
      run(256, k, 0, cyc);
      if (k == 1) cyc1 = cyc;
      $display("k=%0d: %0d cycles for 256 keys = %0.2f MChecks/s at 100 MHz (document: %0.2f)",
               k, cyc, 256.0 * 100.0 / cyc, paper_rate[k-1]);
      checks++;
      if (256.0 * 100.0 / cyc < paper_rate[k-1] || cyc < 256 * k) begin
        failures++; $display("rate out of range");
      end
    end
    // 3b. chunk sizes 16..256 with k = 1..4: the rate must not fall as the
    // chunk grows (fixed start and finish overheads are spread over more keys)
    for (int k = 1; k <= 4; k++) begin
      real prev;
      prev = 0.0;
      for (int n = 16; n <= 256; n = n * 2) begin
        real r;
        run(n, k, 0, cyc);
        r = real'(n) * 100.0 / real'(cyc);
        $display("chunk %0d keys, k=%0d: %0d cycles = %0.2f MChecks/s", n, k, cyc, r);
        checks++;
        if (r < prev) begin failures++; $display("rate fell with a larger chunk"); end
        prev = r;
      end
    end
    // 4. new keys: non-members except false positives
    for (int i = 0; i < 256; i++) keys[i] = $urandom;
    run(256, 4, 0, cyc);
    for (int i = 0; i < 256; i++) if (exp_bits[i]) n_false_pos++;
    $display("false positives among 256 new keys: %0d", n_false_pos);
    // 5. partial chunk with an update
    run(45, 2, 1, cyc);
    // 6. one key repeated: its counter saturates at 15
    for (int i = 0; i < 20; i++) keys[i] = 32'hC0FFEE;
    run(20, 1, 1, cyc);
    check("saturated counter", 32'(dut.g_ocm.u_bram.mem[cnt_index(murmur3_ref(32'hC0FFEE, seeds[0]), CBITS) / 8]
          [(cnt_index(murmur3_ref(32'hC0FFEE, seeds[0]), CBITS) % 8) * 4 +: 4]), 32'(4'hF));
    // 7. refused start
    wr(REG_NKEYS, 0);
    wr(REG_CTRL, 32'h1);
    rd(REG_STATUS, d);
    check("refused start", 32'(d), 32'h4);
    if (d == 32'h4) n_refused++;
    wr(REG_STATUS, 32'h4);
    // whole filter against the model
    for (int w = 0; w < NCNT / 8; w++) begin
      logic [31:0] e;
      for (int s = 0; s < 8; s++) e[s*4 +: 4] = model[w*8 + s];
      checks++;
      if (dut.g_ocm.u_bram.mem[w] != e) begin
        failures++;
        if (failures < 10) $display("filter word %0d: %h exp %h", w, dut.g_ocm.u_bram.mem[w], e);
      end
    end

    $display("mechanisms: update=%0d check=%0d multipass=%0d credit_stall=%0d rmw_wait=%0d saturate=%0d irq=%0d refused=%0d partial=%0d",
             n_update, n_check, n_multipass, n_credit_stall, n_rmw_wait, n_saturate, n_irq, n_refused, n_partial);
    checks++; if (n_update == 0)       begin failures++; $display("no update run"); end
    checks++; if (n_check == 0)        begin failures++; $display("no check run"); end
    checks++; if (n_multipass == 0)    begin failures++; $display("no multi-hash run"); end
    checks++; if (n_credit_stall == 0) begin failures++; $display("no credit stall"); end
    checks++; if (n_rmw_wait == 0)     begin failures++; $display("no read-modify-write wait"); end
    checks++; if (n_saturate == 0)     begin failures++; $display("no counter saturation"); end
    checks++; if (n_irq == 0)          begin failures++; $display("no interrupt"); end
    checks++; if (n_refused == 0)      begin failures++; $display("no refused start"); end
    checks++; if (n_partial == 0)      begin failures++; $display("no partial chunk"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
