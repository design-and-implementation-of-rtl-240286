# Counting Bloom filter accelerator with MurmurHash3

A small IoT processor that also has to run a network function spends much of
its time on membership tests: "has this address, tag or packet signature been
seen before?". This accelerator takes that work off the processor. The
processor leaves a chunk of up to 256 32-bit keys in memory, programs a few
registers and starts the accelerator. The accelerator hashes every key with
k = 1..4 seeded MurmurHash3 functions, looks the hashes up in a counting Bloom
filter, optionally inserts the keys, writes one membership bit per key back to
memory and raises an interrupt.

A Bloom filter answers "definitely not a member" or "probably a member". Each
key sets k locations chosen by k hash functions. A key whose k locations are
all set is reported as a member; this can be a false positive, with
probability about (1 - e^(-kn/m))^k for n keys in m locations. In a
*counting* filter each location is a small counter instead of a bit: insertion
increments it, and "set" means "non-zero".

The accelerator is meant for an FPGA system bus (AXI) at 100 MHz. There are
two ways to hold the filter:

* **On-chip** (default, `BLOOM_ON_CHIP = 1`). The filter is a block RAM wired
  directly to the accelerator. Accesses take one cycle, so the accelerator
  checks about one key per hash function per clock. The filter's size is
  limited by the FPGA's RAM.
* **DDR** (`BLOOM_ON_CHIP = 0`). Filter reads and writes go out on an AXI
  master towards a DDR memory controller. The filter can be very large, but
  every lookup pays the DRAM's random-access latency.

## Programming model

The accelerator has three bus ports: an AXI4-Lite slave for commands (`s_*`),
an AXI4-Lite master for keys and results (`m_*`, called the data master below)
and, in the DDR configuration, an AXI4-Lite master for the filter (`m_bf_*`).
It also has a level interrupt `irq`. All buses are 32 bits wide.

| Offset | Register | Meaning |
|---|---|---|
| 0x00 | CTRL | write: bit 0 = start, bit 1 = update (insert the keys), bit 2 = interrupt enable |
| 0x04 | STATUS | bit 0 busy; bit 1 done and bit 2 error, both cleared by writing 1 |
| 0x08 | DATA | byte address of the key chunk (32-bit words) |
| 0x0C | RESULT | byte address of the result bitmap |
| 0x10 | NKEYS | number of keys, 1..256 |
| 0x14 | NHASH | number of hash functions k, 1..4 |
| 0x18..0x24 | SEED0..3 | MurmurHash3 seed of hash function 0..3 |
| 0x28 | CYCLES | clock cycles from the last start to done (read only) |

A run goes as follows:

1. Write DATA, RESULT, NKEYS, NHASH and the seeds. They keep their values
   across runs.
2. Write CTRL with bit 0 set. Bit 1 selects update (insert) or check only.
   Bit 2 enables the interrupt. At this moment the configuration is copied.
   A start is refused, setting STATUS.error, if the accelerator is busy or if
   NKEYS or NHASH is out of range.
3. Wait for `irq`, or poll STATUS.done.
4. Read the bitmap: ceil(NKEYS/32) words at RESULT. Bit j of word w belongs
   to key 32w + j. A 1 means every one of the key's k counters was non-zero.
   Bits past the last key are 0.
5. Write 1 to STATUS.done to clear it and the interrupt.

In an update run the bitmap reports what the filter held while the key was
being inserted: a key that was already present reads 1.

Filter geometry: the filter has 2^(WORD_AW+3) 4-bit counters, 8 to a 32-bit
word. The default WORD_AW = 13 gives 65,536 counters in 8,192 words
(32 KiB, eight 36-Kbit block RAMs). Hash h selects counter `h mod 2^(WORD_AW+3)`:
word `h[WORD_AW+2:3]`, nibble `h[2:0]`. Counters saturate at 15 and never
wrap back to zero. Keys cannot be removed. The on-chip filter starts empty
(RAM initial contents); nothing in the accelerator clears it.

## Dataflow

```
 s_* ──► bf_ctrl ──cfg,start──► bf_data_read ──► bf_murmur3 ──► Hash Out FIFO
                                   ▲  m_ar/m_r      (5 cycles)        │
                                   └──── credits ◄────────────────────┤
                                                                      ▼
         m_aw/m_w/m_b ◄── bf_result_write ◄── Bloom Read FIFO ◄── bf_bloom_read ◄── bf_addr_calc
               done ──► bf_ctrl ──► irq                                │  ▲ filter read port
                                      Bloom Update FIFO ◄──────────────┘  │
                                             │                            │
                                      bf_bloom_update ──► filter write port
```

* **bf_ctrl**: the register file and AXI-Lite slave. It produces a one-cycle
  `start` and the latched configuration `cfg`, and takes `done` back.
* **bf_data_read**: reads the chunk once per hash function, called a pass.
  Pass j sends every key into MurmurHash3 with seed j and the key's index as
  its tag. Several AXI reads can be in flight.
* **bf_murmur3**: MurmurHash3 x86_32 of a single 4-byte key, fully pipelined.
  It takes one key per clock and has exactly five cycles of latency. The
  stages are split at the five multiplies:
  `k*c1`, `rotl(k,15)*c2`, `rotl(seed^k,13)*5+0xe6546b64, ^4, ^>>16`,
  `*0x85ebca6b, ^>>13`, `*0xc2b2ae35, ^>>16`. On an FPGA these multiplies
  map to DSP blocks.
* **Hash Out FIFO** (16 entries) → **bf_addr_calc**: splits a hash into a
  word address and a counter slot.
* **bf_bloom_read**: issues the filter read. When the word returns it goes to
  the **Bloom Read FIFO** (16 entries), together with the key index and slot.
  In update runs it also goes, with its address, to the **Bloom Update FIFO**
  (4 entries).
* **bf_bloom_update**: increments the counter and writes the word back. It
  then waits for the write acknowledgement.
* **bf_result_write**: keeps a 256-bit bitmap that is all ones at start. It
  clears a key's bit when one of its counters is zero. After all
  NKEYS × NHASH lookups, and once the update logic is idle, it writes the
  bitmap out and signals done.

All FIFOs are `bf_fifo` (first-word fall-through, with a fill count).

### Flow control: why nothing overflows

Two units on the path cannot wait: MurmurHash3 has no stall input, and filter
read responses arrive whenever the memory sends them. Both problems are
solved the same way, with credits counted before the request is made:

* `bf_data_read` issues a key read only if
  (keys in flight between the AXI address handshake and the Hash Out FIFO)
  + (Hash Out FIFO fill) < FIFO depth.
  It counts a key from its AXI address handshake until its hash is pushed
  into the FIFO. Every key it reads therefore has a FIFO slot reserved, and
  `rready` can stay high.
* `bf_bloom_read` issues a filter read only if
  (filter reads in flight) + (Bloom Read FIFO fill) < FIFO depth.
  It also needs room in its 8-entry tracking FIFO. Responses are always
  accepted.

Responses on both masters must come back in request order (AXI4-Lite, a
single ID). A small tracking FIFO in `bf_bloom_read` pairs each returned
filter word with its key index, address and slot.

### Update ordering

An insert is a read-modify-write. Suppose two keys in the same run hit the
same word, and the second read overtakes the first write. Then one increment
is lost. To prevent this, in update runs `bf_bloom_read` issues the next read
only when all of these hold: no read is in flight, the Bloom Update FIFO is
empty, and the update logic is idle, meaning its last write has been
acknowledged. Update runs therefore proceed one key-hash at a time: about 4
cycles each on-chip, and two memory round trips each on DDR. Check runs
overlap freely. Because of this rule, an update run produces exactly the
counters and the bitmap that a sequential software model produces. The
testbenches rely on that.

### Timing

A check run of N keys with k hash functions takes about k·N cycles plus a
fixed pipeline fill of roughly 40 cycles. The fill comes from register
handshakes, the 5-cycle hash, FIFO and memory latency, and writing the
bitmap. Passes follow each other without a gap, so the fill is paid once per
run, not once per pass.

Simulated start-to-done times, 256 keys, 100 MHz clock:

| k | on-chip, data memory answering in 1 cycle | DDR model, 40-cycle read latency |
|---|---|---|
| 1 | 293 cycles (87 M checks/s) | 1355 cycles (18.9 M checks/s) |
| 2 | 549 (46.6) | 2667 (9.6) |
| 3 | 805 (31.8) | 3979 (6.4) |
| 4 | 1061 (24.1) | 5291 (4.8) |

Chunk size matters on-chip and hardly at all with DDR. With k = 1, the
on-chip rate rises from 50 M checks/s for 16-key chunks to 87 M checks/s for
256-key chunks, because the fixed overhead is spread over more keys. With the
DDR model it rises only from 15.4 to 18.9 M checks/s, because the memory
latency dominates at every size.

Measurements of a reference FPGA implementation of this architecture, with a
real AXI interconnect and DDR2 controller, gave 46.29 / 23.21 / 15.49 / 11.62
M checks/s on-chip and 1.82 / 0.92 / 0.61 / 0.46 M checks/s with DDR. They
fall with k in the same 1/k way. The absolute numbers in the table depend
mostly on the memory models used here: they answer faster than a real
interconnect. In the DDR case, up to 8 filter reads overlap in flight.

## Where this RTL makes its own choices

The following were fixed here because the reference description leaves them
open:

* the register map, interrupt clearing, the error flag and the cycle counter;
* the 4-bit counter width with saturation, and the filter size;
* the hash-to-address mapping (low bits of the hash);
* one pass per hash function, with one seed register per function;
* the result format (a bitmap);
* AXI4-Lite in place of full AXI with bursts;
* the FIFO depths, the credit scheme and the update ordering rule;
* the direct-BRAM port as a simple dual-port RAM, with reads on one port and
  writes on the other.

The reference also mentions options that are not built:

* a 250 MHz MurmurHash3 variant with 18 cycles of latency;
* several hash units running in parallel;
* a 128-bit bus.

## Limits and trust

* The design has been checked only in simulation: unit tests, end-to-end
  tests of both configurations against a sequential model, and reset at
  random register contents with many random seeds. It has not been placed
  and routed. Whether each MurmurHash3 stage (one 32×32 multiply plus some
  XOR and shift logic) meets 100 MHz depends on DSP mapping, and that is
  unverified.
* `rst_n` is an asynchronous, active-low reset. Assert it before the first
  clock edge. Memories are not reset.
* AXI error responses (`RRESP`, `BRESP`) are ignored. Both masters need
  their read responses in request order.
* Do not write the registers while a run is busy. The run uses the copy taken
  at start, so such writes only affect the next run. Start is refused while
  busy.
* In update runs, duplicate keys in one chunk are counted once per
  occurrence. This matches inserting them one after another.

The rest of the IoT system is outside this RTL: the soft processor, AXI
interconnect, data block RAM, DDR2 controller, Ethernet MAC, UART and QSPI.
The top module brings out the ports they would connect to.

## Files

`rtl/`:

| File | Contents |
|---|---|
| `bf_pkg.sv` | constants, register offsets, `bf_cfg_t` and FIFO entry structs |
| `bf_system.sv` | **top**: accelerator plus on-chip filter, or plus the DDR AXI port |
| `bf_accel.sv` | the accelerator IP: all units and the three FIFOs |
| `bf_ctrl.sv`, `bf_data_read.sv`, `bf_murmur3.sv`, `bf_addr_calc.sv`, `bf_bloom_read.sv`, `bf_bloom_update.sv`, `bf_result_write.sv` | the units above |
| `bf_fifo.sv` | FIFO |
| `bf_bram.sv` | on-chip filter memory |
| `bf_bloom_axi.sv` | filter port to AXI for a DDR-held filter |

Top parameters: `BLOOM_ON_CHIP` (1), `WORD_AW` (13, the log2 of the number of
filter words) and `BF_BASE` (the byte address of the filter in DDR). Chunk
and hash limits are in `bf_pkg` (`MAX_KEYS = 256`, `MAX_HASH = 4`).
`bf_accel` also has FIFO depth parameters.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus these:

* `tb_bf_system_ddr.sv`: the DDR configuration, end to end.
* `tb_bf_pkg.sv`: reference MurmurHash3 and the filter mapping.
* `tb_axil_mem.sv`: a behavioural AXI4-Lite memory, used as the data RAM
  and as the DDR.
* `tb_bloom_mem.sv`: a filter memory with random latency.

`tb_bf_system` runs the top at its default parameters. It inserts 256 keys
with k = 4, checks them, checks 256 new keys, measures k = 1..4, sweeps chunk
sizes 16..256, and runs a
partial chunk, a saturating counter and a refused start. It compares every
bitmap and, at the end, every filter word with a sequential model. It also
counts that each mechanism occurred: credit stalls, update-ordering waits,
saturation, multi-pass runs, interrupts, refused starts and partial chunks.

## Simulating

With Verilator 5:

```
verilator --binary --assert -Irtl -Itb -y rtl -y tb \
    rtl/bf_pkg.sv tb/tb_bf_pkg.sv tb/tb_bf_system.sv --top tb_bf_system
./obj_dir/Vtb_bf_system
```

Replace `tb_bf_system` with any other testbench name. Each testbench ends by
printing `TB_RESULT checks=N failures=M`. A watchdog ends a testbench that
hangs, and counts that as a failure. All of them finish in well under a
second. To lint the design, use
`verilator --lint-only -Wall -Irtl rtl/bf_pkg.sv rtl/bf_system.sv -y rtl`.
The lint warnings that remain are unused signals, such as the AXI response
codes, which are ignored, and the idle DDR port in the on-chip configuration.

To change the filter size, set `WORD_AW` on `bf_system`. For a DDR filter,
also set `BLOOM_ON_CHIP = 0` and `BF_BASE`. Keep `WORD_AW + 3 ≤ 32`, because
the address comes from a 32-bit hash. Changing the counter width `CNT_W`
in `bf_pkg` changes the number of counters per word, so `SLOT_W` and the
mapping change with it. Only 4 has been simulated.
