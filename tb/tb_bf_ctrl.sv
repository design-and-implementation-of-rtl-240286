// tb_bf_ctrl: drives the control logic's AXI-Lite port like the processor:
// register write/read-back, a start that latches the configuration and
// pulses start, completion setting done and the interrupt, clearing done by
// writing 1, refused starts (bad counts, start while busy) and the cycle
// counter.
module tb_bf_ctrl;
  import bf_pkg::*;
  logic clk = 0, rst_n = 1;
  logic [7:0] s_awaddr, s_araddr;
  logic s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic s_arvalid, s_arready, s_rvalid, s_rready;
  logic [31:0] s_wdata, s_rdata;
  logic [3:0] s_wstrb;
  logic [1:0] s_bresp, s_rresp;
  bf_cfg_t cfg;
  logic start, done, busy, irq;
  int checks = 0, failures = 0, starts = 0;

  bf_ctrl dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 0;  // reset edge before the first clock
  always @(posedge clk) if (start) starts++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
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
    @(negedge clk);
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    s_araddr = a; s_arvalid = 1;
    do @(posedge clk); while (!s_arready);
    @(negedge clk);
    s_arvalid = 0;
    while (!s_rvalid) @(negedge clk);
    d = s_rdata;
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  logic [31:0] d;
  int s0;

  initial begin
    s_awaddr = 0; s_araddr = 0; s_awvalid = 0; s_wvalid = 0; s_wdata = 0; s_wstrb = 0;
    s_arvalid = 0; s_bready = 1; s_rready = 1; done = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(REG_DATA, 32'h1000); wr(REG_RESULT, 32'h2000);
    wr(REG_NKEYS, 256); wr(REG_NHASH, 3);
    for (int i = 0; i < MAX_HASH; i++) wr(REG_SEED0 + 8'(4*i), 32'hA5A50000 + i);
    rd(REG_DATA, d);   expect_eq("data", 32'(d), 32'h1000);
    rd(REG_RESULT, d); expect_eq("result", 32'(d), 32'h2000);
    rd(REG_NKEYS, d);  expect_eq("nkeys", 32'(d), 32'(256));
    rd(REG_NHASH, d);  expect_eq("nhash", 32'(d), 32'(3));
    for (int i = 0; i < MAX_HASH; i++) begin
      rd(REG_SEED0 + 8'(4*i), d); expect_eq("seed", 32'(d), 32'(32'hA5A50000 + i));
    end
    // start with update and irq enable
    s0 = starts;
    wr(REG_CTRL, 32'h7);
    expect_eq("one start pulse", 32'(starts - s0), 32'(1));
    expect_eq("busy", 32'(busy), 32'(1));
    expect_eq("cfg.data", 32'(cfg.data_addr), 32'h1000);
    expect_eq("cfg.result", 32'(cfg.result_addr), 32'h2000);
    expect_eq("cfg.nkeys", 32'(cfg.num_keys), 32'(256));
    expect_eq("cfg.nhash", 32'(cfg.num_hash), 32'(3));
    expect_eq("cfg.update", 32'(cfg.update), 32'(1));
    expect_eq("cfg.seed3", 32'(cfg.seeds[3]), 32'hA5A50003);
    // start while busy is refused
    wr(REG_CTRL, 32'h5);
    expect_eq("no start while busy", 32'(starts - s0), 32'(1));
    rd(REG_STATUS, d); expect_eq("status busy+err", 32'(d), 32'h5);
    wr(REG_STATUS, 32'h4);
    repeat (20) @(negedge clk);
    expect_eq("irq low while busy", 32'(irq), 32'(0));
    done = 1; @(negedge clk); done = 0;
    expect_eq("irq", 32'(irq), 32'(1));
    rd(REG_STATUS, d); expect_eq("status done", 32'(d), 32'h2);
    rd(REG_CYCLES, d);
    checks++;
    if (d < 30 || d > 80) begin failures++; $display("cycles %0d", d); end
    wr(REG_STATUS, 32'h2);
    expect_eq("irq cleared", 32'(irq), 32'(0));
    // invalid key count
    wr(REG_NKEYS, 0);
    wr(REG_CTRL, 32'h1);
    expect_eq("refused nkeys 0", 32'(starts - s0), 32'(1));
    wr(REG_NKEYS, 257);
    wr(REG_CTRL, 32'h1);
    expect_eq("refused nkeys 257", 32'(starts - s0), 32'(1));
    wr(REG_NKEYS, 16); wr(REG_NHASH, 5);
    wr(REG_CTRL, 32'h1);
    expect_eq("refused nhash 5", 32'(starts - s0), 32'(1));
    rd(REG_STATUS, d); expect_eq("status err", 32'(d), 32'h4);
    wr(REG_STATUS, 32'h4);
    wr(REG_NHASH, 1);
    wr(REG_CTRL, 32'h1);
    expect_eq("check start", 32'(starts - s0), 32'(2));
    expect_eq("cfg.update 0", 32'(cfg.update), 32'(0));
    expect_eq("cfg.nkeys 16", 32'(cfg.num_keys), 32'(16));
    done = 1; @(negedge clk); done = 0;
    expect_eq("irq disabled", 32'(irq), 32'(0));
    rd(REG_STATUS, d); expect_eq("status done2", 32'(d), 32'h2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
