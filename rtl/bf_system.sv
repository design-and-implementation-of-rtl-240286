// bf_system: the Bloom filter accelerator with its filter memory. With
// BLOOM_ON_CHIP = 1 (default, the on-chip memory design) the filter is a
// 2**WORD_AW-word block RAM wired straight to the accelerator's filter
// ports, and the m_bf_* AXI master is idle. With BLOOM_ON_CHIP = 0 (the DDR
// design) the filter ports go through an AXI4-Lite master, m_bf_*, meant
// for a DDR memory controller at address BF_BASE. Everything else of the
// IoT system (processor, interconnect, data BRAM, DDR controller, Ethernet,
// UART, QSPI) is outside: the command slave s_*, the data master m_* and irq
// connect to it. Both configurations come from the document; the filter
// size (65536 4-bit counters in 8192 words) is this design's choice.
module bf_system #(
  parameter bit          BLOOM_ON_CHIP = 1'b1,
  parameter int unsigned WORD_AW       = 13,
  parameter logic [31:0] BF_BASE       = 32'h8000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // command port, AXI4-Lite slave
  input  logic [7:0]  s_awaddr,
  input  logic        s_awvalid,
  output logic        s_awready,
  input  logic [31:0] s_wdata,
  input  logic [3:0]  s_wstrb,
  input  logic        s_wvalid,
  output logic        s_wready,
  output logic [1:0]  s_bresp,
  output logic        s_bvalid,
  input  logic        s_bready,
  input  logic [7:0]  s_araddr,
  input  logic        s_arvalid,
  output logic        s_arready,
  output logic [31:0] s_rdata,
  output logic [1:0]  s_rresp,
  output logic        s_rvalid,
  input  logic        s_rready,
  // data request port, AXI4-Lite master (keys in, results out)
  output logic [31:0] m_araddr,
  output logic        m_arvalid,
  input  logic        m_arready,
  input  logic [31:0] m_rdata,
  input  logic [1:0]  m_rresp,
  input  logic        m_rvalid,
  output logic        m_rready,
  output logic [31:0] m_awaddr,
  output logic        m_awvalid,
  input  logic        m_awready,
  output logic [31:0] m_wdata,
  output logic [3:0]  m_wstrb,
  output logic        m_wvalid,
  input  logic        m_wready,
  input  logic [1:0]  m_bresp,
  input  logic        m_bvalid,
  output logic        m_bready,
  // bloom filter port, AXI4-Lite master towards DDR (BLOOM_ON_CHIP = 0)
  output logic [31:0] m_bf_araddr,
  output logic        m_bf_arvalid,
  input  logic        m_bf_arready,
  input  logic [31:0] m_bf_rdata,
  input  logic [1:0]  m_bf_rresp,
  input  logic        m_bf_rvalid,
  output logic        m_bf_rready,
  output logic [31:0] m_bf_awaddr,
  output logic        m_bf_awvalid,
  input  logic        m_bf_awready,
  output logic [31:0] m_bf_wdata,
  output logic [3:0]  m_bf_wstrb,
  output logic        m_bf_wvalid,
  input  logic        m_bf_wready,
  input  logic [1:0]  m_bf_bresp,
  input  logic        m_bf_bvalid,
  output logic        m_bf_bready,
  // interrupt and status
  output logic        irq,
  output logic        busy
);
  logic               rd_valid, rd_ready, rsp_valid, wr_valid, wr_ready, wr_ack;
  logic [WORD_AW-1:0] rd_addr, wr_addr;
  logic [31:0]        rsp_data, wr_data;

  bf_accel #(.WORD_AW(WORD_AW)) u_accel (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .m_araddr, .m_arvalid, .m_arready, .m_rdata, .m_rresp, .m_rvalid, .m_rready,
    .m_awaddr, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready,
    .bf_rd_valid(rd_valid), .bf_rd_ready(rd_ready), .bf_rd_addr(rd_addr),
    .bf_rsp_valid(rsp_valid), .bf_rsp_data(rsp_data),
    .bf_wr_valid(wr_valid), .bf_wr_ready(wr_ready), .bf_wr_addr(wr_addr),
    .bf_wr_data(wr_data), .bf_wr_ack(wr_ack),
    .irq, .busy
  );

  if (BLOOM_ON_CHIP) begin : g_ocm
    bf_bram #(.WORD_AW(WORD_AW)) u_bram (
      .clk, .rst_n,
      .rd_valid, .rd_ready, .rd_addr, .rsp_valid, .rsp_data,
      .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_ack
    );
    assign m_bf_araddr  = '0;
    assign m_bf_arvalid = 1'b0;
    assign m_bf_rready  = 1'b0;
    assign m_bf_awaddr  = '0;
    assign m_bf_awvalid = 1'b0;
    assign m_bf_wdata   = '0;
    assign m_bf_wstrb   = '0;
    assign m_bf_wvalid  = 1'b0;
    assign m_bf_bready  = 1'b0;
  end else begin : g_ddr
    bf_bloom_axi #(.WORD_AW(WORD_AW), .BASE(BF_BASE)) u_bloom_axi (
      .clk, .rst_n,
      .rd_valid, .rd_ready, .rd_addr, .rsp_valid, .rsp_data,
      .wr_valid, .wr_ready, .wr_addr, .wr_data, .wr_ack,
      .m_araddr(m_bf_araddr), .m_arvalid(m_bf_arvalid), .m_arready(m_bf_arready),
      .m_rdata(m_bf_rdata), .m_rresp(m_bf_rresp), .m_rvalid(m_bf_rvalid),
      .m_rready(m_bf_rready), .m_awaddr(m_bf_awaddr), .m_awvalid(m_bf_awvalid),
      .m_awready(m_bf_awready), .m_wdata(m_bf_wdata), .m_wstrb(m_bf_wstrb),
      .m_wvalid(m_bf_wvalid), .m_wready(m_bf_wready), .m_bresp(m_bf_bresp),
      .m_bvalid(m_bf_bvalid), .m_bready(m_bf_bready)
    );
  end
endmodule
