// tb_axil_mem: behavioural AXI4-Lite memory for testbenches. It stands in
// for the data BRAM behind its AXI controller, or for a DDR controller with
// its memory. 2**AW 32-bit words, addressed by byte address bits [AW+1:2].
// Reads: ARREADY is high unless STALL (percent of cycles it is randomly
// dropped); each accepted read returns in order LAT cycles later (at least
// one). Writes: AW and W are accepted independently; the response follows
// one cycle after both have arrived. The testbench reads and writes mem
// directly to preload keys and to fetch results.
module tb_axil_mem #(
  parameter int unsigned AW    = 12,
  parameter int unsigned LAT   = 1,
  parameter int unsigned STALL = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] araddr,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rvalid,
  input  logic        rready,
  input  logic [31:0] awaddr,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready
);
  logic [31:0] mem [1 << AW];

  typedef struct { logic [31:0] data; longint due; } rd_t;
  rd_t         rq[$];
  longint      now;
  logic        have_aw, have_w;
  logic [31:0] aw_a, w_d;
  logic        stall_r;

  assign arready = !stall_r;
  assign rresp   = 2'b00;
  assign bresp   = 2'b00;
  assign awready = !have_aw;
  assign wready  = !have_w;

  always_comb begin
    rvalid = 1'b0;
    rdata  = '0;
    if (rq.size() > 0 && rq[0].due <= now) begin
      rvalid = 1'b1;
      rdata  = rq[0].data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now     <= 0;
      have_aw <= 1'b0;
      have_w  <= 1'b0;
      bvalid  <= 1'b0;
      stall_r <= 1'b0;
      rq.delete();
    end else begin
      now     <= now + 1;
      stall_r <= (STALL != 0) && (($urandom % 100) < STALL);
      if (rvalid && rready) void'(rq.pop_front());
      if (arvalid && arready)
        rq.push_back('{data: mem[araddr[AW+1:2]], due: now + longint'(LAT)});
      if (awvalid && awready) begin have_aw <= 1'b1; aw_a <= awaddr; end
      if (wvalid && wready)   begin have_w  <= 1'b1; w_d  <= wdata;  end
      if (bvalid && bready) bvalid <= 1'b0;
      if (have_aw && have_w && !bvalid) begin
        mem[aw_a[AW+1:2]] <= w_d;
        bvalid  <= 1'b1;
        have_aw <= 1'b0;
        have_w  <= 1'b0;
      end
    end
  end
endmodule
