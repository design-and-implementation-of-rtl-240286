// bf_bloom_update: bloom update logic of the counting Bloom filter. It takes
// one {address, slot, word} entry from the Bloom Update FIFO, increments the
// selected CNT_W-bit counter of the word (saturating at its maximum, so a
// counter never wraps back to zero), offers the new word on the filter
// memory's write port and waits for the write acknowledgement before taking
// the next entry. busy is high from taking an entry until its write is
// acknowledged. The document gives the unit's role and the counting filter;
// counter width, saturation and the write handshake are this design's.
module bf_bloom_update
  import bf_pkg::*;
#(
  parameter int unsigned WORD_AW = 13
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // Bloom Update FIFO head
  input  logic [WORD_AW+SLOT_W+31:0] in_ent,   // {addr, slot, word}
  input  logic                       in_empty,
  output logic                       in_pop,
  // filter memory write port
  output logic                       wr_valid,
  input  logic                       wr_ready,
  output logic [WORD_AW-1:0]         wr_addr,
  output logic [31:0]                wr_data,
  input  logic                       wr_ack,
  output logic                       busy,
  output logic                       saturated  // pulse: a counter was already full
);
  typedef enum logic [1:0] {IDLE, WRITE, WAIT_ACK} state_t;
  state_t state;

  logic [WORD_AW-1:0] e_addr;
  logic [SLOT_W-1:0]  e_slot;
  logic [31:0]        e_word, new_word;
  logic [CNT_W-1:0]   cnt;

  assign {e_addr, e_slot, e_word} = in_ent;
  assign cnt = get_cnt(e_word, e_slot);

  always_comb begin
    new_word = e_word;
    if (cnt != '1) new_word[e_slot*CNT_W +: CNT_W] = cnt + 1'b1;
  end

  assign in_pop   = (state == IDLE) && !in_empty;
  assign wr_valid = (state == WRITE);
  assign busy     = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      wr_addr   <= '0;
      wr_data   <= '0;
      saturated <= 1'b0;
    end else begin
      saturated <= 1'b0;
      unique case (state)
        IDLE: if (!in_empty) begin
          wr_addr   <= e_addr;
          wr_data   <= new_word;
          saturated <= (cnt == '1);
          state     <= WRITE;
        end
        WRITE:    if (wr_ready) state <= wr_ack ? IDLE : WAIT_ACK;
        WAIT_ACK: if (wr_ack)   state <= IDLE;
        default:  state <= IDLE;
      endcase
    end
  end
endmodule
