// bf_bram: on-chip bloom filter memory, 2**WORD_AW words of 32 bits, each
// holding CNT_PER_WORD counters. It is a simple dual-port RAM wired straight
// to the accelerator (no bus in between): port A reads, port B writes. A
// read request is always accepted and its word appears on rsp_data with
// rsp_valid one cycle later. A write is always accepted and acknowledged
// one cycle later. The filter starts empty (all counters zero), as a block
// RAM's initial contents. The document places the filter in on-chip BRAM
// connected directly to the IP; its size here is this design's choice.
module bf_bram #(
  parameter int unsigned WORD_AW = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  // read port
  input  logic               rd_valid,
  output logic               rd_ready,
  input  logic [WORD_AW-1:0] rd_addr,
  output logic               rsp_valid,
  output logic [31:0]        rsp_data,
  // write port
  input  logic               wr_valid,
  output logic               wr_ready,
  input  logic [WORD_AW-1:0] wr_addr,
  input  logic [31:0]        wr_data,
  output logic               wr_ack
);
  localparam int unsigned WORDS = 1 << WORD_AW;

  logic [31:0] mem [WORDS];

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
  end

  assign rd_ready = 1'b1;
  assign wr_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rd_valid) rsp_data <= mem[rd_addr];
    if (wr_valid) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsp_valid <= 1'b0;
      wr_ack    <= 1'b0;
    end else begin
      rsp_valid <= rd_valid;
      wr_ack    <= wr_valid;
    end
  end
endmodule
