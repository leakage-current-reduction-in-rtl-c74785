# Zeros switch-off L1 data cache

Most words held in a data cache of an embedded processor are zero or small
positive integers, so most stored bits are 0 and they sit mostly at the top of
the word. This design uses that fact to cut leakage. It splits every 32-bit word
of the data array into a few *power segments*. Each segment has its own
gated-VDD transistor. A segment whose bits are all zero is switched off when the
word is written. A few extra bits stored with the word (the *switch-off vector*
S) record which segments are off, and on a read those segments are returned as
zeros. Nothing is lost, so the scheme causes no extra misses and does not change
timing. This scheme is called zeros switch-off (ZSO).

The cache can also run *cache decay*: a whole block that has not been used for
a long time is switched off and invalidated. This saves more, at the price of
extra misses. Decay is a run-time mode (`decay_en`), so the same RTL gives
full-ZSO alone or full-ZSO plus decay.

The RTL is a 16KB, 4-way, 64-byte-line L1 data cache with a 3-cycle hit. Its
data array stores words with full-ZSO at resolution 32+24+16, and it contains
the decay counters.

## How a word is stored

### Resolution

A *resolution* such as `32+24+16` lists how many of the most significant bits
can be switched off at once. The whole word (32), its top 24 bits or its top
16 bits can be cut. "Nothing switched off" is always possible too. Each number
X marks the start of a segment at bit `32 - X`, so 32+24+16 gives three
segments:

| S bit | bits of the word | switched off when |
|-------|------------------|-------------------|
| S_2   | 31..16           | these 16 bits are zero |
| S_1   | 15..8            | these 8 bits are zero (full-ZSO) |
| S_0   | 7..0             | these 8 bits are zero (full-ZSO) |

`S_j = 1` means segment j is powered. In the RTL a resolution is passed as a
32-bit parameter with one bit set at the start of each segment. For 32+24+16
that is `32'h0001_0101`; for the byte resolution 32+24+16+8 it is
`32'h0101_0101`. Every resolution must include 32, so that bit 0 is always set.
`zso_pkg` turns this parameter into segment masks.

### Write: full-ZSO against plain ZSO

`zso_write_encoder` computes S from the word being written, using one of two
rules:

* **plain ZSO** (`FULL_ZSO = 0`): S_j is the OR of every bit from bit 31 down
  to the bottom of segment j. This is an OR chain, so only a run of zeros
  that starts at the most significant end is cut. For example, `0x1200_0034`
  keeps all three segments on.
* **full-ZSO** (`FULL_ZSO = 1`, the default): S_j is the OR of segment j's own
  bits. Any all-zero segment is cut, including one inside the word, so
  `0x1200_0034` gives `S = 101` and bits 15..8 lose their supply. This rule
  needs less logic than the chain.

The encoder sits on the write path, where its delay does not reach the
processor.

### Read

`zso_read_decoder` ANDs each bit coming from the cells with its segment's S
bit. In silicon this is a tristate buffer that drives the ground line onto the
bit line. It is the only logic added to the read path: one gate level.

### The data array

`zso_data_array` holds `DEPTH` words of cells plus an `NSEG`-bit S entry per
word. On a write, the new S is stored, and only the cells of powered segments
are written. The RTL models a switched-off cell as one that keeps stale
contents, and the read decoder must mask them. A fault that lets those stale
bits through is caught by the tests. The array has one synchronous write port
and one asynchronous read port. The read port also returns the stored S (`rs`).

## The cache

### Organisation

With the defaults, a 32-bit byte address splits into a 20-bit tag, a 6-bit set
index (64 sets) and a 6-bit line offset: 16 words × 4 bytes. A word's place in
the data array is `{set, way, word}`, 12 bits for 4096 words. Tags and valid
bits are kept separately and are not ZSO-encoded.

| parameter | default | meaning |
|-----------|---------|---------|
| `CACHE_BYTES` | 16384 | capacity |
| `WAYS` | 4 | associativity |
| `LINE_BYTES` | 64 | block size |
| `HIT_LATENCY` | 3 | clock edges from request accepted to response (3 or more) |
| `RES` | `32'h0001_0101` | switch-off resolution, 32+24+16 |
| `FULL_ZSO` | 1 | full-ZSO write rule (0: plain ZSO) |
| `GLOBAL_PERIOD` | 8192 | global decay counter runs 8191..0 |
| `LOCAL_MAX` | 3 | per-block decay counter runs 3..0 |

### CPU port and timing

The processor side uses `req_valid`/`req_ready` with `req_we`, `req_addr`,
`req_be` and `req_wdata`. The cache answers with a one-cycle `resp_valid`
carrying `resp_rdata`, `resp_hit`, and `resp_s`, the stored S of the loaded
word. The cache is blocking: `req_ready` is high only when it is idle.

* **Load hit:** the request is accepted on edge 0, the lookup runs in the next
  cycle, and `resp_valid` is sampled high on edge 3.
* **Load miss:** the victim block is invalidated, and one line request
  (`mem_req_we = 0`, line-aligned address) goes to the next level. The cache
  then takes 16 beats on `mem_rvalid`/`mem_rdata`, lowest word first. Each
  word is ZSO-encoded as it is written. The tag and valid bit are set on the
  last beat, and the lookup repeats and hits.
* **Store:** write-through with no write-allocate. On a hit the word is
  updated in place: the old word is decoded, the enabled bytes are merged in,
  and the result is re-encoded, so S always matches the current value. Hit or
  miss, one word write (`mem_req_we = 1`, with byte enables) goes to the next
  level. The response follows once that write is accepted, and never before
  `HIT_LATENCY`.

Replacement takes an invalid way first and otherwise a per-set round-robin
pointer.

Two assertions in `zso_dcache` guard the next-level handshake:

* refill beats arrive only during a refill;
* a request stays up, with a stable address, until it is accepted.

### Cache decay

`decay_global_counter` counts down from 8191 once per clock and pulses `tick`
when it wraps. `decay_local_counters` holds a 2-bit counter per block:

* An access (a hit or a completed refill) reloads the block's counter to 3.
* Each tick decrements the counter of every valid block.
* A valid block whose counter is already 0 underflows on the next tick. It
  gets a one-cycle decay pulse, and the cache clears its valid bit; its
  supply would be cut.

An idle block therefore goes off between 3 × 8192 and 4 × 8192 cycles after
its last use. A block being decayed in the current cycle already counts as
absent for the lookup. If an access and a tick hit the same block in the same
cycle, the access wins. Write-through means a decayed block never holds the
only copy of data, so switching it off is only a matter of clearing valid.
With `decay_en = 0` the global counter is held and nothing decays.
`decay_event` pulses when a block is switched off.

## What the RTL does and does not model

The switch-off itself is analog: gated-VDD transistors in a 6T SRAM. The RTL
reproduces its logical effect:

* which segments are off (the stored S);
* that unpowered cells carry no information (they are never written, and they
  are masked on read).

It does not estimate power. The testbenches below count switched-off cells
as a proxy.

The processor core and the L2/main memory are outside the design.
`tb/l2_mem_model.sv` is a behavioural stand-in with an 18-cycle latency. Its
memory contents come from a hash of the address, which yields many zero and
small-integer words.

## Choices made in this design

The following were not fixed by the scheme and were chosen here:

* write-through, no write-allocate;
* an invalid way first, then round-robin replacement;
* a blocking single-request interface and a 16-beat in-order refill;
* an asynchronous-read data array;
* the decay counter advancing once per cache clock;
* access beating tick on the same block;
* only valid blocks counting down;
* decay as a run-time input.

Decay alone, without ZSO on the data array, is not a configuration of this
RTL.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it shows |
|-----------|---------------|
| `tb_zso_write_encoder` | S for full and plain ZSO at 32+24+16, 32+8 and 32+24+16+8, against hand-written OR reductions, over directed and random words |
| `tb_zso_read_decoder` | switched-off segments read as 0 and powered segments pass, for every S |
| `tb_zso_data_array` | read-back and stored S over 4096 words; stale cells never leak |
| `tb_decay_global_counter` | a tick exactly every 8192 cycles, none while disabled |
| `tb_decay_local_counters` | which block decays on which tick, including an access that lands on a tick |
| `tb_zso_dcache` | the whole cache at default size against the memory model (see below) |
| `tb_zso_resolution_sweep` | 12 data arrays (6 resolutions × ZSO/full-ZSO) on the same words |
| `tb_zso_cache_sizes` | 1KB, 4KB, 16KB and 64KB caches, with and without decay, under a synthetic stream with locality |

`tb_zso_dcache` checks every load against a reference memory, and every
loaded S against the data. It requires a hit latency of exactly 3 cycles. It
makes each mechanism happen and fails if one never does:

* load hit and load miss with refill;
* store hit, store miss without allocation, and a partial (byte-enable) store;
* replacement of a valid block;
* all 8 values of S;
* a block decaying within its 3–4 period window, and the miss that follows;
* a regularly used block surviving;
* decay turned off at run time.

The sweeps print the fraction of data cells switched off. The synthetic data
is not the embedded benchmarks the scheme was evaluated on, so these numbers
show trends only. On that data:

* full-ZSO never switches off less than plain ZSO, and the two are equal at
  resolution 32;
* the transistor estimate counts S bits and gated-VDD transistors as overhead.
  Going from three segments to four lowers it clearly for plain ZSO (46.1% to
  44.1%) but barely for full-ZSO (51.1% to 50.7%);
* decay adds the most in the larger caches.

### Running with Verilator

All RTL is in `rtl/`; testbench-only files are in `tb/`. Packages must come
first. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/zso_pkg.sv tb/tb_mem_pkg.sv tb/tb_zso_dcache.sv --top-module tb_zso_dcache
./obj_dir/Vtb_zso_dcache
```

Leaf testbenches need only `rtl/zso_pkg.sv` and the testbench file. For
linting, `verilator --lint-only -Wall -Irtl -y rtl rtl/zso_pkg.sv
rtl/zso_dcache.sv` must report only one warning: a reset used by both a
flop and an assertion.

## Files

| file | contents |
|------|----------|
| `rtl/zso_pkg.sv` | word width, resolution encoding, segment-mask functions, request struct |
| `rtl/zso_write_encoder.sv` | S computation (full or plain ZSO) |
| `rtl/zso_read_decoder.sv` | masking of switched-off segments on read |
| `rtl/zso_data_array.sv` | data cells plus S storage, with encoder and decoder |
| `rtl/decay_global_counter.sv` | 8191..0 global decay counter |
| `rtl/decay_local_counters.sv` | per-block 3..0 decay counters |
| `rtl/zso_dcache.sv` | the cache (top) |
| `tb/tb_mem_pkg.sv`, `tb/l2_mem_model.sv` | memory contents and next-level memory model |
| `tb/res_probe.sv`, `tb/cache_traffic.sv` | helpers of the two sweeps |
