// bf_accel: the Bloom filter accelerator IP. It checks a chunk of up to 256
// 32-bit keys against a counting Bloom filter with k = 1..4 MURMUR3 hash
// functions, and optionally inserts them (update command), then writes a
// membership bitmap back to memory and interrupts the processor.
// Dataflow, one key per cycle when nothing stalls:
//   control (AXI-Lite) -> data read (AXI master reads) -> MURMUR3 (5 cycles)
//   -> Hash Out FIFO -> address calculator -> bloom read (filter read port)
//   -> Bloom Read FIFO -> result write (AXI master writes) -> done / irq
//                      -> Bloom Update FIFO -> bloom update (filter write port)
// The data master carries the key reads (read channels) and the result
// writes (write channels). The filter memory is outside this module: an
// on-chip RAM wired directly to the two filter ports, or an AXI master
// towards DDR. Each hash function is one pass over the chunk.
// The unit list, the three FIFOs and the ports follow the document; FIFO
// depths and flow control are this design's.
module bf_accel
  import bf_pkg::*;
#(
  parameter int unsigned WORD_AW         = 13,
  parameter int unsigned HASH_FIFO_DEPTH = 16,
  parameter int unsigned READ_FIFO_DEPTH = 16,
  parameter int unsigned UPD_FIFO_DEPTH  = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // command port, AXI4-Lite slave
  input  logic [7:0]         s_awaddr,
  input  logic               s_awvalid,
  output logic               s_awready,
  input  logic [31:0]        s_wdata,
  input  logic [3:0]         s_wstrb,
  input  logic               s_wvalid,
  output logic               s_wready,
  output logic [1:0]         s_bresp,
  output logic               s_bvalid,
  input  logic               s_bready,
  input  logic [7:0]         s_araddr,
  input  logic               s_arvalid,
  output logic               s_arready,
  output logic [31:0]        s_rdata,
  output logic [1:0]         s_rresp,
  output logic               s_rvalid,
  input  logic               s_rready,
  // data request port, AXI4-Lite master
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
  output logic               m_bready,
  // bloom filter memory
  output logic               bf_rd_valid,
  input  logic               bf_rd_ready,
  output logic [WORD_AW-1:0] bf_rd_addr,
  input  logic               bf_rsp_valid,
  input  logic [31:0]        bf_rsp_data,
  output logic               bf_wr_valid,
  input  logic               bf_wr_ready,
  output logic [WORD_AW-1:0] bf_wr_addr,
  output logic [31:0]        bf_wr_data,
  input  logic               bf_wr_ack,
  // interrupt and status
  output logic               irq,
  output logic               busy
);
  localparam int unsigned UW = WORD_AW + SLOT_W + 32;

  bf_cfg_t cfg;
  logic    start, done;

  // MURMUR3 input/output
  logic             mm_in_valid, mm_out_valid;
  logic [31:0]      mm_key, mm_seed, mm_hash;
  logic [IDX_W-1:0] mm_in_tag, mm_out_tag;

  // Hash Out FIFO
  hash_ent_t                            hf_din, hf_dout;
  logic                                 hf_full, hf_empty, hf_pop;
  logic [$clog2(HASH_FIFO_DEPTH+1)-1:0] hf_count;

  // address calculator -> bloom read
  logic               ac_valid, ac_ready;
  logic [IDX_W-1:0]   ac_idx;
  logic [WORD_AW-1:0] ac_addr;
  logic [SLOT_W-1:0]  ac_slot;

  // Bloom Read FIFO
  check_ent_t                           rf_din, rf_dout;
  logic                                 rf_push, rf_full, rf_empty, rf_pop;
  logic [$clog2(READ_FIFO_DEPTH+1)-1:0] rf_count;

  // Bloom Update FIFO
  logic [UW-1:0]                       uf_din, uf_dout;
  logic                                uf_push, uf_full, uf_empty, uf_pop;
  logic [$clog2(UPD_FIFO_DEPTH+1)-1:0] uf_count;

  logic upd_busy, upd_wait, upd_sat, dr_stalled;

  bf_ctrl u_ctrl (
    .clk, .rst_n,
    .s_awaddr, .s_awvalid, .s_awready, .s_wdata, .s_wstrb, .s_wvalid, .s_wready,
    .s_bresp, .s_bvalid, .s_bready, .s_araddr, .s_arvalid, .s_arready,
    .s_rdata, .s_rresp, .s_rvalid, .s_rready,
    .cfg, .start, .done, .busy, .irq
  );

  bf_data_read #(.FIFO_DEPTH(HASH_FIFO_DEPTH)) u_data_read (
    .clk, .rst_n, .start, .cfg,
    .m_araddr, .m_arvalid, .m_arready, .m_rdata, .m_rresp, .m_rvalid, .m_rready,
    .mm_valid(mm_in_valid), .mm_key, .mm_seed, .mm_tag(mm_in_tag),
    .hash_push(mm_out_valid), .fifo_count(hf_count), .stalled(dr_stalled)
  );

  bf_murmur3 #(.TAG_W(IDX_W)) u_murmur3 (
    .clk, .rst_n,
    .in_valid(mm_in_valid), .in_key(mm_key), .in_seed(mm_seed), .in_tag(mm_in_tag),
    .out_valid(mm_out_valid), .out_hash(mm_hash), .out_tag(mm_out_tag)
  );

  assign hf_din.idx  = mm_out_tag;
  assign hf_din.hash = mm_hash;

  bf_fifo #(.WIDTH($bits(hash_ent_t)), .DEPTH(HASH_FIFO_DEPTH)) u_hash_fifo (
    .clk, .rst_n, .push(mm_out_valid), .din(hf_din), .full(hf_full),
    .pop(hf_pop), .dout(hf_dout), .empty(hf_empty), .count(hf_count)
  );

  bf_addr_calc #(.WORD_AW(WORD_AW)) u_addr_calc (
    .clk, .rst_n,
    .in_ent(hf_dout), .in_empty(hf_empty), .in_pop(hf_pop),
    .out_valid(ac_valid), .out_ready(ac_ready),
    .out_idx(ac_idx), .out_addr(ac_addr), .out_slot(ac_slot)
  );

  bf_bloom_read #(.WORD_AW(WORD_AW), .RD_DEPTH(READ_FIFO_DEPTH)) u_bloom_read (
    .clk, .rst_n, .update(cfg.update),
    .in_valid(ac_valid), .in_ready(ac_ready),
    .in_idx(ac_idx), .in_addr(ac_addr), .in_slot(ac_slot),
    .rd_valid(bf_rd_valid), .rd_ready(bf_rd_ready), .rd_addr(bf_rd_addr),
    .rsp_valid(bf_rsp_valid), .rsp_data(bf_rsp_data),
    .chk_push(rf_push), .chk_ent(rf_din), .chk_count(rf_count),
    .upd_push(uf_push), .upd_ent(uf_din), .upd_empty(uf_empty),
    .upd_busy, .upd_wait
  );

  bf_fifo #(.WIDTH($bits(check_ent_t)), .DEPTH(READ_FIFO_DEPTH)) u_read_fifo (
    .clk, .rst_n, .push(rf_push), .din(rf_din), .full(rf_full),
    .pop(rf_pop), .dout(rf_dout), .empty(rf_empty), .count(rf_count)
  );

  bf_fifo #(.WIDTH(UW), .DEPTH(UPD_FIFO_DEPTH)) u_update_fifo (
    .clk, .rst_n, .push(uf_push), .din(uf_din), .full(uf_full),
    .pop(uf_pop), .dout(uf_dout), .empty(uf_empty), .count(uf_count)
  );

  bf_bloom_update #(.WORD_AW(WORD_AW)) u_bloom_update (
    .clk, .rst_n,
    .in_ent(uf_dout), .in_empty(uf_empty), .in_pop(uf_pop),
    .wr_valid(bf_wr_valid), .wr_ready(bf_wr_ready), .wr_addr(bf_wr_addr),
    .wr_data(bf_wr_data), .wr_ack(bf_wr_ack), .busy(upd_busy), .saturated(upd_sat)
  );

  bf_result_write u_result_write (
    .clk, .rst_n, .start, .cfg,
    .in_ent(rf_dout), .in_empty(rf_empty), .in_pop(rf_pop),
    .upd_idle(uf_empty && !upd_busy),
    .m_awaddr, .m_awvalid, .m_awready, .m_wdata, .m_wstrb, .m_wvalid, .m_wready,
    .m_bresp, .m_bvalid, .m_bready, .done
  );
endmodule
