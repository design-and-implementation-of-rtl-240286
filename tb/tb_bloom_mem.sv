// tb_bloom_mem: behavioural filter memory for testbenches, with the filter
// ports of the accelerator. Read requests are accepted unless randomly
// stalled (STALL percent) and answered in order after 1..MAXLAT cycles;
// writes are accepted unless stalled and acknowledged 1..MAXLAT cycles
// later. It models a slow external memory with a variable access time.
module tb_bloom_mem #(
  parameter int unsigned AW     = 10,
  parameter int unsigned MAXLAT = 6,
  parameter int unsigned STALL  = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_valid,
  output logic          rd_ready,
  input  logic [AW-1:0] rd_addr,
  output logic          rsp_valid,
  output logic [31:0]   rsp_data,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  output logic          wr_ack
);
  logic [31:0] mem [1 << AW];
  typedef struct { logic [31:0] d; longint due; } rsp_t;
  rsp_t   rq[$];
  longint aq[$];
  longint now;

  initial for (int i = 0; i < (1 << AW); i++) mem[i] = '0;

  always_comb begin
    rsp_valid = rq.size() > 0 && rq[0].due <= now;
    rsp_data  = rsp_valid ? rq[0].d : '0;
    wr_ack    = aq.size() > 0 && aq[0] <= now;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= 0; rd_ready <= 1'b0; wr_ready <= 1'b0;
      rq.delete(); aq.delete();
    end else begin
      now      <= now + 1;
      rd_ready <= ($urandom % 100) >= STALL;
      wr_ready <= ($urandom % 100) >= STALL;
      if (rsp_valid) void'(rq.pop_front());
      if (wr_ack)    void'(aq.pop_front());
      if (rd_valid && rd_ready)
        rq.push_back('{d: mem[rd_addr], due: now + 1 + longint'(int'($urandom % MAXLAT))});
      if (wr_valid && wr_ready) begin
        mem[wr_addr] <= wr_data;
        aq.push_back(now + 1 + longint'(int'($urandom % MAXLAT)));
      end
    end
  end
endmodule
