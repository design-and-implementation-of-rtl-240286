// tb_bf_pkg: reference models for the Bloom filter testbenches, written
// independently of the RTL: MurmurHash3 x86_32 of one 32-bit key as a plain
// sequential function, and the mapping of a hash onto a counting filter of
// 2**(word_aw+3) 4-bit counters (hash modulo the counter count; the word is
// the upper part, the counter within the word the lower three bits).
package tb_bf_pkg;

  function automatic logic [31:0] rotl32(logic [31:0] x, int r);
    return (x << r) | (x >> (32 - r));
  endfunction

  function automatic logic [31:0] murmur3_ref(logic [31:0] key, logic [31:0] seed);
    logic [31:0] k, h;
    k = key * 32'hcc9e2d51;
    k = rotl32(k, 15);
    k = k * 32'h1b873593;
    h = seed ^ k;
    h = rotl32(h, 13);
    h = h * 32'd5 + 32'he6546b64;
    h = h ^ 32'd4;
    h = h ^ (h >> 16);
    h = h * 32'h85ebca6b;
    h = h ^ (h >> 13);
    h = h * 32'hc2b2ae35;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Index of the counter a hash selects in a filter of 2**cbits counters.
  function automatic int unsigned cnt_index(logic [31:0] hash, int cbits);
    return int'(hash & ((32'd1 << cbits) - 1));
  endfunction

endpackage
