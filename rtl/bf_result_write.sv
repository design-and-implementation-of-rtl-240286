// bf_result_write: result write logic. It drains the Bloom Read FIFO, one
// entry per cycle, and keeps a membership bitmap of the chunk: all bits are
// set at start, and a key's bit is cleared when any of its k counters is
// zero (a key is a member only if every hash function hits). When all
// num_keys * num_hash entries have arrived and the update logic is idle, the
// bitmap is written to result_addr over the write channels of the AXI4 data
// master, 32 keys per word (bit j of word w is key 32*w + j, unused bits 0),
// one word at a time; after the last write response done pulses.
// The document says the unit fetches the results and writes them to the
// address set by the control logic; the bitmap format is this design's.
module bf_result_write
  import bf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  bf_cfg_t           cfg,
  // Bloom Read FIFO head
  input  check_ent_t        in_ent,
  input  logic              in_empty,
  output logic              in_pop,
  input  logic              upd_idle,
  // AXI4-Lite write channels of the data master
  output logic [AXI_AW-1:0] m_awaddr,
  output logic              m_awvalid,
  input  logic              m_awready,
  output logic [AXI_DW-1:0] m_wdata,
  output logic [3:0]        m_wstrb,
  output logic              m_wvalid,
  input  logic              m_wready,
  input  logic [1:0]        m_bresp,
  input  logic              m_bvalid,
  output logic              m_bready,
  output logic              done
);
  localparam int unsigned TW = NKEYS_W + NHASH_W;
  localparam int unsigned WW = $clog2(RES_WORDS + 1);

  typedef enum logic [1:0] {IDLE, COLLECT, WRITE, WAIT_B} state_t;
  state_t state;

  logic [MAX_KEYS-1:0]           bitmap;
  logic [RES_WORDS-1:0][31:0]    bm_words;
  logic [TW-1:0]                 got, total;
  logic [WW-1:0]                 wcnt, nwords;
  logic                          aw_done, w_done;
  logic                          hit;

  assign total    = TW'(cfg.num_keys) * TW'(cfg.num_hash);
  assign nwords   = WW'((cfg.num_keys + NKEYS_W'(31)) >> 5);
  assign hit      = get_cnt(in_ent.word, in_ent.slot) != '0;
  assign in_pop   = (state == COLLECT) && !in_empty && got != total;

  // Bits of keys beyond num_keys read as 0.
  always_comb begin
    for (int i = 0; i < MAX_KEYS; i++)
      bm_words[i/32][i%32] = bitmap[i] && (i < int'(cfg.num_keys));
  end

  assign m_awaddr  = cfg.result_addr + AXI_AW'({wcnt, 2'b00});
  assign m_wdata   = bm_words[wcnt[$clog2(RES_WORDS)-1:0]];
  assign m_wstrb   = 4'hF;
  assign m_awvalid = (state == WRITE) && !aw_done;
  assign m_wvalid  = (state == WRITE) && !w_done;
  assign m_bready  = (state == WAIT_B);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      bitmap  <= '0;
      got     <= '0;
      wcnt    <= '0;
      aw_done <= 1'b0;
      w_done  <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: ;
        COLLECT: begin
          if (in_pop) begin
            got <= got + 1'b1;
            if (!hit) bitmap[in_ent.idx] <= 1'b0;
          end
          if (got == total && upd_idle) state <= WRITE;
        end
        WRITE: begin
          if (m_awvalid && m_awready) aw_done <= 1'b1;
          if (m_wvalid && m_wready)   w_done  <= 1'b1;
          if ((aw_done || m_awready) && (w_done || m_wready)) begin
            aw_done <= 1'b0;
            w_done  <= 1'b0;
            state   <= WAIT_B;
          end
        end
        WAIT_B: if (m_bvalid) begin
          if (wcnt == nwords - 1'b1) begin
            state <= IDLE;
            done  <= 1'b1;
          end else begin
            wcnt  <= wcnt + 1'b1;
            state <= WRITE;
          end
        end
        default: state <= IDLE;
      endcase
      if (start) begin
        state  <= COLLECT;
        bitmap <= '1;
        got    <= '0;
        wcnt   <= '0;
      end
    end
  end

  a_no_early_data: assert property (@(posedge clk) disable iff (!rst_n) !in_empty |-> state == COLLECT);
endmodule
