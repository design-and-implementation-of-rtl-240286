// bf_data_read: data read logic. After start it reads the key chunk
// (num_keys 32-bit words from data_addr) over the read channels of the AXI4
// data master, once for every hash function, so that hash function j sees
// every key in turn with seed j (the whole chunk is hashed k times, as in
// the document's timing model t = k * (... + data_size * t_read)). Every
// read beat goes straight into the MURMUR3 pipeline with its key index as
// tag. Since MURMUR3 cannot stall, reads are issued only while the keys in
// flight (address accepted, hash not yet in the Hash Out FIFO) plus the
// FIFO fill stay below the FIFO depth; rready is then always high. Several
// reads may be outstanding; responses are assumed in order (AXI4-Lite, one
// ID). The pass structure and the credit scheme are this design's choices.
module bf_data_read
  import bf_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  bf_cfg_t                         cfg,
  // AXI4-Lite read channels of the data master
  output logic [AXI_AW-1:0]               m_araddr,
  output logic                            m_arvalid,
  input  logic                            m_arready,
  input  logic [AXI_DW-1:0]               m_rdata,
  input  logic [1:0]                      m_rresp,
  input  logic                            m_rvalid,
  output logic                            m_rready,
  // to MURMUR3
  output logic                            mm_valid,
  output logic [31:0]                     mm_key,
  output logic [31:0]                     mm_seed,
  output logic [IDX_W-1:0]                mm_tag,
  // credit information from MURMUR3 output and the Hash Out FIFO
  input  logic                            hash_push,
  input  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count,
  output logic                            stalled
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH+1) + 1;

  logic               issuing;
  logic [NKEYS_W-1:0] ar_cnt, r_cnt;
  logic [NHASH_W-1:0] ar_pass, r_pass;
  logic [CW-1:0]      inflight;
  logic               credit_ok, ar_hs, r_hs;

  assign credit_ok = (inflight + CW'(fifo_count)) < CW'(FIFO_DEPTH);
  assign m_arvalid = issuing && credit_ok;
  assign m_araddr  = cfg.data_addr + AXI_AW'({ar_cnt, 2'b00});
  assign m_rready  = 1'b1;
  assign ar_hs     = m_arvalid && m_arready;
  assign r_hs      = m_rvalid && m_rready;
  assign stalled   = issuing && !credit_ok;

  assign mm_valid = r_hs;
  assign mm_key   = m_rdata;
  assign mm_seed  = cfg.seeds[r_pass[HSEL_W-1:0]];
  assign mm_tag   = r_cnt[IDX_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing  <= 1'b0;
      ar_cnt   <= '0;
      ar_pass  <= '0;
      r_cnt    <= '0;
      r_pass   <= '0;
      inflight <= '0;
    end else begin
      inflight <= inflight + CW'(ar_hs) - CW'(hash_push);
      if (start) begin
        issuing <= 1'b1;
        ar_cnt  <= '0;
        ar_pass <= '0;
        r_cnt   <= '0;
        r_pass  <= '0;
      end else begin
        if (ar_hs) begin
          if (ar_cnt == cfg.num_keys - 1'b1) begin
            ar_cnt  <= '0;
            ar_pass <= ar_pass + 1'b1;
            if (ar_pass == cfg.num_hash - 1'b1) issuing <= 1'b0;
          end else begin
            ar_cnt <= ar_cnt + 1'b1;
          end
        end
        if (r_hs) begin
          if (r_cnt == cfg.num_keys - 1'b1) begin
            r_cnt  <= '0;
            r_pass <= r_pass + 1'b1;
          end else begin
            r_cnt <= r_cnt + 1'b1;
          end
        end
      end
    end
  end

  // AXI: an address once offered stays until accepted.
  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
                 m_arvalid && !m_arready |=> m_arvalid && $stable(m_araddr));
endmodule
