# Way-interleaved subarrayed L1 data cache with cache decay

A large SRAM array is normally cut into subarrays so that wordlines and
bitlines stay short. In the usual arrangement a cache line, and therefore
every way of a set, sits across a whole row of subarrays, so every load or
store switches on that whole row. The row heats up, and it can only shed heat
to the idle rows above and below it. This design spreads each cache line over
the subarrays of a row *by subblock*. Each subarray then holds one slice of
every way of its sets, and each load or store switches on exactly **one**
subarray. Its idle neighbours on all four sides absorb its heat, and the
dynamic power per access drops to about a quarter. On top of that, a
cache-decay controller switches off the supply of lines that have not been
used for a decay interval, which cuts leakage.

The microarchitecture follows the way-interleaved scheme described in
"Thermal-Aware Subarrayed Data Cache Microarchitectures" (Hu, John, Wang). It
is built for the L1 data cache configuration used there: 64 KB, 2-way, 64-byte
lines, 2-cycle load hit, and the subarray parameters Ndwl = 4, Ndbl = 2,
Nspd = 1. The control logic around the array (write policy, miss handling,
interfaces) is this implementation's own. The "Design choices" section lists
those choices.

## The subarray map

With 512 sets, 2 ways and 64-byte lines, the data array is 2 rows × 4 columns
of subarrays. Each subarray is 256 sets × 2 ways × 16 bytes (8 KB).

| address bits (32-bit address) | use |
|---|---|
| `[31:15]` | tag (17 bits) |
| `[14]`    | **row predecoder**: which row of subarrays (upper index bit) |
| `[13:6]`  | subarray (post-)decoder: wordline inside the subarray |
| `[5:4]`   | **subblock predecoder**: which column of subarrays (upper block offset bits) |
| `[3]`     | word inside the 16-byte subblock (output multiplexer) |
| `[2:0]`   | byte in the 8-byte word |

```
              column 0      column 1      column 2      column 3
            bytes 0-15    bytes 16-31   bytes 32-47   bytes 48-63
 row 0     | sb00 W0|W1 | sb01 W0|W1 | sb02 W0|W1 | sb03 W0|W1 |   sets   0-255
 row 1     | sb10 W0|W1 | sb11 W0|W1 | sb12 W0|W1 | sb13 W0|W1 |   sets 256-511
```

Subarray (r, c) holds bytes 16c…16c+15 of both ways (W0, W1) of every line
whose set index has upper bit r. The row predecoder and the subblock
predecoder together enable the decoder of that one subarray. On a read, the
enabled subarray delivers the 16-byte subblock of *both* ways. The tag
comparison then picks the way in the output multiplexer, and bit 3 picks the
word. A line refill is the one operation that needs the whole line, so it
enables all four subarrays of the row and writes them in one cycle.

The tag array is 2 × 2 tag subarrays (Ntbl = 2, Ntwl = 2). Each one holds
256 tags of 17 bits. Address bit 14 selects the row, and the two tag
subarrays of that row (one per way) are read together.

## An access, cycle by cycle

*Load hit.* In cycle *n* the request is accepted. The tag row and the single
data subarray are read at the end of that cycle. In cycle *n*+1 the tags are
compared (`tag_match`) and the output multiplexer selects the word, which is
registered. The data is on `resp_rdata` with `resp_valid` in cycle *n*+2. A
load that hits lets the next load in during its compare cycle, so hits stream
at one per cycle.

*Store.* A store only reads the tags in its first cycle. No data subarray is
switched on. On a hit, the bytes are written into the one subarray that holds
them during the compare cycle. Every store is then passed to the next level
(`mem_req_write = 1`), and the store is answered once that request is
accepted. A store miss does not allocate a line.

*Load miss.* The controller sends one line read (line-aligned address). When
`mem_resp_valid` brings the 64-byte line, the controller does all of the
following in that cycle:

- writes the whole row of subarrays;
- writes the tag;
- switches the line on in the decay controller;
- marks the line most recently used.

The requested word follows on `resp_rdata` in the next cycle. The victim is
an invalid (never filled or decayed) way if there is one, otherwise the least
recently used way.

## Cache decay

Each of the 1024 lines has a supply switch and a 2-bit counter. A global
counter ticks every `DECAY_INTERVAL/4` = 2048 cycles. Each tick advances the
counter of every powered line. A line whose counter is already at 3 when a
tick comes is switched off. Any hit or refill of a line clears its counter.
As a result, an unused line is switched off between 6144 and 8192 cycles
after its last use.

A switched-off line loses its contents, so the power state is also the line's
valid bit: `line_powered` goes to the supply switches and into the tag match.
Because stores are written through, a line never holds the only copy of any
data, and switching it off needs no write-back. The `decay_en` input turns
decay on (lines decay) or off (lines stay on and the counters hold).
`decay_count` counts the lines switched off so far.

## Modules

| module | what it is |
|---|---|
| `dcache_top` | the cache; wires the blocks below |
| `cache_controller` | access sequencing, write-through, refill, LRU |
| `data_array` | 2 × 4 `data_subarray` with the two predecoders; selects each column's output by the row read last |
| `row_predecoder` | upper index bits → one-hot row enable |
| `subblock_predecoder` | upper offset bits → one column, or all columns on refill |
| `data_subarray` | one subarray: wordline decode, cells for 2 ways × 16 bytes per set, registered read of both ways |
| `output_mux` | column, way and word selection |
| `tag_array`, `tag_subarray` | 2 × 2 tag subarrays |
| `tag_match` | comparators, hit and hit way |
| `decay_controller` | per-line decay counters and supply control |
| `dcache_pkg` | default geometry and the controller state type |

The pre-charge circuits, sense amplifiers and output drivers of the subarrays
are circuits with no logic of their own, so they are not modelled. The same
holds for the gated-Vdd supply switches, which `line_powered` would drive. A
`data_subarray` read result stays on its output until the next read, which
is the logic effect of the sense amplifier latch.

## Top-level ports

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; synchronous active-low reset (all lines off, LRU cleared) |
| `decay_en` | in | cache decay on/off |
| `req_valid/ready`, `req_write`, `req_addr`, `req_wdata`, `req_be` | in/out | CPU request; `req_wdata` is the aligned 8-byte word, `req_be` its byte enables |
| `resp_valid`, `resp_rdata`, `resp_hit` | out | one-cycle response pulse per request; data for loads; hit flag |
| `mem_req_valid/ready`, `mem_req_write`, `mem_req_addr`, `mem_req_wdata`, `mem_req_be` | out/in | next level: word writes (write-through) and line reads; the request holds until `ready` |
| `mem_resp_valid`, `mem_resp_data` | in | refill line, byte *i* at bits `8i+7:8i`; one beat |
| `sub_active` | out | per data subarray (bit `4*row+column`): enabled this cycle |
| `line_powered` | out | per line (bit `2*set+way`): supply on / valid |
| `decay_count` | out | lines switched off by decay |

`sub_active` is the signal behind the thermal argument. While loads and
stores are served it has at most one bit set; during a refill it has the four
bits of one row. Assertions in `data_array` check this.

## Design choices

The cache geometry, the subarray organisation, the single-subarray access,
the whole-row refill, the 2-cycle hit and the 8K-cycle decay interval come
from the source description. The following are choices made here:

- 32-bit byte addresses and 8-byte words.
- Write-through with no write-allocate. This keeps decay simple, because a
  switched-off line never holds dirty data. A write-back variant would have
  to write dirty lines back before they decay.
- One access port. The processor modelled in the source has two memory ports;
  how the subarrays would be multiported is not described, so a single port
  is built.
- Next-level interface: valid/ready request, whole line returned in one beat.
- Replacement: an invalid way first, else LRU (exact for two ways; for more
  ways the code takes the way after the most recently used one).
- Decay counters: a global tick and 2-bit per-line counters (the usual
  hierarchical decay counter). The interval is the only given number.
- Tag subarrays: one way per wordline segment (Ntwl = ways).
- Valid bit = line power state; there is no separate valid array.
- Not built: the two comparison schemes (a conventional row-wide subarrayed
  cache, and one with the accessed subarrays moved to separate physical
  rows). Those differ only in physical placement or in enabling the whole row.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/dcache_pkg.sv tb/tb_dcache_top.sv --top-module tb_dcache_top -o sim
./obj_dir/sim
```

| testbench | what it covers |
|---|---|
| `tb_dcache_top` | whole cache at default size with a 12-cycle memory model that applies random back-pressure. It checks: every load's data, hit/miss against a reference model, the 2-cycle hit latency, one-subarray loads and store hits, row-wide refills, LRU eviction, store-miss write-through, streaming hits, decay with the miss that follows, and retention with decay off. |
| `tb_subarray_activity` | two synthetic streams: scattered over 256 KB, and unit-stride over three arrays. It counts subarray activations and checks them against one per load or store hit plus four per refill. It prints the per-subarray map and the saving over whole-row access: about 44 % for the miss-heavy stream and 71 % for the streaming one. |
| `tb_cache_controller` | controller alone, cycle-exact control outputs |
| `tb_data_array`, `tb_data_subarray` | storage, byte enables, subarray selection |
| `tb_tag_array`, `tb_tag_subarray`, `tb_tag_match` | tag storage and comparison |
| `tb_decay_controller` | decay timing bounds, touch/fill, enable/disable |
| `tb_row_predecoder`, `tb_subblock_predecoder`, `tb_output_mux` | exhaustive or random checks |

Each testbench runs in seconds. `tb_dcache_top` runs the cache with every
parameter at its default.

## Changing the geometry

`dcache_top` takes `CACHE_BYTES`, `WAYS`, `LINE_BYTES`, `NDWL`, `NDBL`,
`NSPD`, `WORD_BYTES`, `ADDR_W` and `DECAY_INTERVAL`. All widths are derived
from these. The sizes must be powers of two, and `LINE_BYTES/NDWL` must be at
least one word. With `NSPD > 1` the subarray stores several sets per wordline
as consecutive entries of the same array, so the organisation changes but the
behaviour does not. The tag array is fixed at two rows (`dcache_pkg::NTBL`)
and one tag subarray per way.
