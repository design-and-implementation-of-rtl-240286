// bf_addr_calc: address calculator. It takes the next hash from the Hash Out
// FIFO and maps it onto the filter: the filter has 2**(WORD_AW+SLOT_W)
// counters, so the hash is reduced modulo that power of two by keeping its
// low bits; the upper part of those bits is the memory word address, the
// lower SLOT_W bits select the counter in the word. The result is held in an
// output register with a valid/ready handshake (one entry per cycle). The
// document names the unit and says it computes the filter address; the
// modulo-by-bit-selection mapping is this design's choice.
module bf_addr_calc
  import bf_pkg::*;
#(
  parameter int unsigned WORD_AW = 13
) (
  input  logic               clk,
  input  logic               rst_n,
  // Hash Out FIFO head
  input  hash_ent_t          in_ent,
  input  logic               in_empty,
  output logic               in_pop,
  // to the bloom read logic
  output logic               out_valid,
  input  logic               out_ready,
  output logic [IDX_W-1:0]   out_idx,
  output logic [WORD_AW-1:0] out_addr,
  output logic [SLOT_W-1:0]  out_slot
);
  assign in_pop = !in_empty && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_addr  <= '0;
      out_slot  <= '0;
    end else if (!out_valid || out_ready) begin
      out_valid <= !in_empty;
      if (!in_empty) begin
        out_idx  <= in_ent.idx;
        out_slot <= in_ent.hash[SLOT_W-1:0];
        out_addr <= in_ent.hash[SLOT_W +: WORD_AW];
      end
    end
  end
endmodule
