// bf_bloom_axi: bloom filter master port for a filter kept in external DDR
// memory behind a memory controller. It turns the accelerator's filter read
// port into AXI4-Lite read transactions and its write port into write
// transactions at byte address BASE + 4 * word address. Reads may be
// outstanding in any number the slave accepts; responses return in order
// and are passed on as rsp_valid/rsp_data (rready is always high, the
// accelerator reserves room before it reads). A write offers address and
// data together, is accepted once both channels have taken it, and is
// acknowledged by the write response. The document gives the AXI master
// towards the DDR filter; the mapping details are this design's.
module bf_bloom_axi #(
  parameter int unsigned WORD_AW = 13,
  parameter logic [31:0] BASE    = 32'h8000_0000
) (
  input  logic               clk,
  input  logic               rst_n,
  // accelerator side
  input  logic               rd_valid,
  output logic               rd_ready,
  input  logic [WORD_AW-1:0] rd_addr,
  output logic               rsp_valid,
  output logic [31:0]        rsp_data,
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [WORD_AW-1:0] wr_addr,
  input  logic [31:0]        wr_data,
  output logic               wr_ack,
  // AXI4-Lite master
  output logic [31:0]        m_araddr,
  output logic               m_arvalid,
  input  logic               m_arready,
  input  logic [31:0]        m_rdata,
  input  logic [1:0]         m_rresp,
  input  logic               m_rvalid,
  output logic               m_rready,
  output logic [31:0]        m_awaddr,
  output logic               m_awvalid,
  input  logic               m_awready,
  output logic [31:0]        m_wdata,
  output logic [3:0]         m_wstrb,
  output logic               m_wvalid,
  input  logic               m_wready,
  input  logic [1:0]         m_bresp,
  input  logic               m_bvalid,
  output logic               m_bready
);
  logic aw_done, w_done;

  assign m_araddr  = BASE + {{(30-WORD_AW){1'b0}}, rd_addr, 2'b00};
  assign m_arvalid = rd_valid;
  assign rd_ready  = m_arready;
  assign m_rready  = 1'b1;
  assign rsp_valid = m_rvalid;
  assign rsp_data  = m_rdata;

  assign m_awaddr  = BASE + {{(30-WORD_AW){1'b0}}, wr_addr, 2'b00};
  assign m_wdata   = wr_data;
  assign m_wstrb   = 4'hF;
  assign m_awvalid = wr_valid && !aw_done;
  assign m_wvalid  = wr_valid && !w_done;
  assign wr_ready  = wr_valid && (aw_done || m_awready) && (w_done || m_wready);
  assign m_bready  = 1'b1;
  assign wr_ack    = m_bvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else if (wr_ready) begin
      aw_done <= 1'b0;
      w_done  <= 1'b0;
    end else begin
      if (m_awvalid && m_awready) aw_done <= 1'b1;
      if (m_wvalid && m_wready)   w_done  <= 1'b1;
    end
  end
endmodule
