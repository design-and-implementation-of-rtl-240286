// bf_pkg: constants, register map and payload types shared by the Bloom
// filter accelerator. The accelerator is a counting Bloom filter: every
// filter location is a small saturating counter, and CNT_PER_WORD counters
// are packed into one 32-bit memory word. A membership check reads the
// counter a hash points at and reports a hit when it is non-zero; an update
// increments it. The 32-bit AXI data width and the limit of four hash
// functions (the largest k evaluated) follow the document; the counter
// width, the chunk limit of 256 keys (the largest chunk evaluated) and the
// register map are this design's choices.
package bf_pkg;

  parameter int unsigned AXI_AW      = 32;
  parameter int unsigned AXI_DW      = 32;
  parameter int unsigned MAX_KEYS    = 256;              // keys per chunk
  parameter int unsigned IDX_W       = $clog2(MAX_KEYS); // key index in a chunk
  parameter int unsigned NKEYS_W     = IDX_W + 1;        // holds 1..MAX_KEYS
  parameter int unsigned MAX_HASH    = 4;                // hash functions per key
  parameter int unsigned HSEL_W      = $clog2(MAX_HASH);
  parameter int unsigned NHASH_W     = HSEL_W + 1;       // holds 1..MAX_HASH
  parameter int unsigned CNT_W       = 4;                // counter bits
  parameter int unsigned CNT_PER_WORD = AXI_DW / CNT_W;  // counters per word
  parameter int unsigned SLOT_W      = $clog2(CNT_PER_WORD);
  parameter int unsigned RES_WORDS   = MAX_KEYS / 32;    // result bitmap words

  // Register map of the AXI-Lite command port (byte offsets).
  parameter logic [7:0] REG_CTRL     = 8'h00; // [0] start (W1), [1] update, [2] irq enable
  parameter logic [7:0] REG_STATUS   = 8'h04; // [0] busy, [1] done (W1C), [2] error (W1C)
  parameter logic [7:0] REG_DATA     = 8'h08; // byte address of the key chunk
  parameter logic [7:0] REG_RESULT   = 8'h0C; // byte address of the result bitmap
  parameter logic [7:0] REG_NKEYS    = 8'h10; // keys in the chunk, 1..MAX_KEYS
  parameter logic [7:0] REG_NHASH    = 8'h14; // hash functions k, 1..MAX_HASH
  parameter logic [7:0] REG_SEED0    = 8'h18; // MURMUR3 seed of hash 0; 0x1C,0x20,0x24 follow
  parameter logic [7:0] REG_CYCLES   = 8'h28; // clock cycles from start to done

  // Run configuration latched by the control logic at start.
  typedef struct packed {
    logic [AXI_AW-1:0]            data_addr;
    logic [AXI_AW-1:0]            result_addr;
    logic [NKEYS_W-1:0]           num_keys;
    logic [NHASH_W-1:0]           num_hash;
    logic                         update;
    logic [MAX_HASH-1:0][31:0]    seeds;
  } bf_cfg_t;

  // Hash Out FIFO entry.
  typedef struct packed {
    logic [IDX_W-1:0] idx;
    logic [31:0]      hash;
  } hash_ent_t;

  // Bloom Read FIFO entry: the word read and which counter of it to test.
  typedef struct packed {
    logic [IDX_W-1:0]  idx;
    logic [SLOT_W-1:0] slot;
    logic [31:0]       word;
  } check_ent_t;

  // Counter of a word selected by slot.
  function automatic logic [CNT_W-1:0] get_cnt(logic [31:0] w, logic [SLOT_W-1:0] s);
    return w[s*CNT_W +: CNT_W];
  endfunction

endpackage
