// bf_murmur3: MurmurHash3 (x86, 32-bit result) of a single 32-bit key,
// fully pipelined. One key with its seed and a tag can enter every cycle;
// its hash leaves exactly five cycles later with the same tag. The key is
// one 4-byte block, so the tail step is empty and the length mixed in is 4.
// The five register stages split the algorithm around its five multiplies
// (the *5 of the body is a shift and add):
//   1: k = key * 0xcc9e2d51
//   2: k = rotl(k,15) * 0x1b873593
//   3: h = rotl(seed ^ k,13) * 5 + 0xe6546b64; h ^= 4; h ^= h >> 16
//   4: h = h * 0x85ebca6b; h ^= h >> 13
//   5: h = h * 0xc2b2ae35; h ^= h >> 16
// The document gives the function, one result per clock and the 5-cycle
// delay at 100 MHz; the stage split is this design's. There is no stall
// input: the caller must guarantee room for everything it sends in.
module bf_murmur3 #(
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [31:0]      in_key,
  input  logic [31:0]      in_seed,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      out_hash,
  output logic [TAG_W-1:0] out_tag
);
  localparam logic [31:0] C1 = 32'hcc9e2d51;
  localparam logic [31:0] C2 = 32'h1b873593;
  localparam logic [31:0] N  = 32'he6546b64;
  localparam logic [31:0] F1 = 32'h85ebca6b;
  localparam logic [31:0] F2 = 32'hc2b2ae35;

  localparam int unsigned STAGES = 5;

  logic [STAGES-1:0]            v;
  logic [STAGES-1:0][TAG_W-1:0] tag;
  logic [31:0] k1, k2, h3, h4, h5;
  logic [31:0] seed1, seed2;

  logic [31:0] k2_n, h3_a, h3_b, h3_c, h3_n, h4_a, h4_n, h5_a, h5_n;

  always_comb begin
    k2_n = {k1[16:0], k1[31:17]} * C2;
    h3_a = seed2 ^ k2;
    h3_b = {h3_a[18:0], h3_a[31:19]};
    h3_c = (h3_b + {h3_b[29:0], 2'b00} + N) ^ 32'd4;
    h3_n = h3_c ^ (h3_c >> 16);
    h4_a = h3 * F1;
    h4_n = h4_a ^ (h4_a >> 13);
    h5_a = h4 * F2;
    h5_n = h5_a ^ (h5_a >> 16);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[STAGES-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    tag   <= {tag[STAGES-2:0], in_tag};
    k1    <= in_key * C1;
    seed1 <= in_seed;
    k2    <= k2_n;
    seed2 <= seed1;
    h3    <= h3_n;
    h4    <= h4_n;
    h5    <= h5_n;
  end

  assign out_valid = v[STAGES-1];
  assign out_hash  = h5;
  assign out_tag   = tag[STAGES-1];
endmodule
