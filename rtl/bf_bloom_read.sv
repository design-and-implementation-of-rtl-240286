// bf_bloom_read: bloom read logic. For each filter address from the address
// calculator it issues a read on the filter memory's read port. Responses
// come back in order, after any latency (one cycle for on-chip BRAM, many
// for DDR behind AXI); a small tracking FIFO pairs each returned word with
// its key index and counter slot. The word then goes to the Bloom Read FIFO
// (for the membership result) and, when the run is an update, together with
// its address to the Bloom Update FIFO (for the read-modify-write).
// Reads are issued only while the reads in flight plus the Bloom Read FIFO
// fill stay below its depth, so responses are always accepted. During an
// update run a read waits until the previous read-modify-write has been
// written back (nothing in flight, Bloom Update FIFO empty, update logic
// idle), so two keys hitting the same word never lose an increment. The
// document gives the unit's role and the two FIFOs; flow control and the
// update ordering rule are this design's.
module bf_bloom_read
  import bf_pkg::*;
#(
  parameter int unsigned WORD_AW   = 13,
  parameter int unsigned RD_DEPTH  = 16,  // Bloom Read FIFO depth
  parameter int unsigned OUTS      = 8    // reads in flight, power of two
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          update,
  // from the address calculator
  input  logic                          in_valid,
  output logic                          in_ready,
  input  logic [IDX_W-1:0]              in_idx,
  input  logic [WORD_AW-1:0]            in_addr,
  input  logic [SLOT_W-1:0]             in_slot,
  // filter memory read port
  output logic                          rd_valid,
  input  logic                          rd_ready,
  output logic [WORD_AW-1:0]            rd_addr,
  input  logic                          rsp_valid,
  input  logic [31:0]                   rsp_data,
  // Bloom Read FIFO
  output logic                          chk_push,
  output check_ent_t                    chk_ent,
  input  logic [$clog2(RD_DEPTH+1)-1:0] chk_count,
  // Bloom Update FIFO
  output logic                          upd_push,
  output logic [WORD_AW+SLOT_W+31:0]    upd_ent,   // {addr, slot, word}
  input  logic                          upd_empty,
  input  logic                          upd_busy,
  output logic                          upd_wait
);
  localparam int unsigned TW = IDX_W + WORD_AW + SLOT_W;
  localparam int unsigned OW = $clog2(OUTS+1);
  localparam int unsigned CW = $clog2(RD_DEPTH+1) + 1;

  logic [TW-1:0]      trk_in, trk_out;
  logic               trk_full, trk_empty;
  logic [OW-1:0]      trk_count;
  logic               can_issue, rmw_free;
  logic [IDX_W-1:0]   t_idx;
  logic [WORD_AW-1:0] t_addr;
  logic [SLOT_W-1:0]  t_slot;

  assign rmw_free  = trk_empty && upd_empty && !upd_busy;
  assign can_issue = !trk_full
                  && (CW'(trk_count) + CW'(chk_count)) < CW'(RD_DEPTH)
                  && (!update || rmw_free);
  assign rd_valid  = in_valid && can_issue;
  assign rd_addr   = in_addr;
  assign in_ready  = can_issue && rd_ready;
  assign upd_wait  = in_valid && update && !rmw_free;

  assign trk_in = {in_idx, in_addr, in_slot};
  assign {t_idx, t_addr, t_slot} = trk_out;

  bf_fifo #(.WIDTH(TW), .DEPTH(OUTS)) u_track (
    .clk, .rst_n,
    .push (rd_valid && rd_ready),
    .din  (trk_in),
    .full (trk_full),
    .pop  (rsp_valid),
    .dout (trk_out),
    .empty(trk_empty),
    .count(trk_count)
  );

  assign chk_push     = rsp_valid;
  assign chk_ent.idx  = t_idx;
  assign chk_ent.slot = t_slot;
  assign chk_ent.word = rsp_data;
  assign upd_push     = rsp_valid && update;
  assign upd_ent      = {t_addr, t_slot, rsp_data};

  a_rsp_expected: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> !trk_empty);
endmodule
