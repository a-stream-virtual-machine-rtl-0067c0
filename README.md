# Stream tile: SystemVerilog for a Stream Virtual Machine on a configurable-memory CMP

A stream program runs as three cooperating threads of control: a **control
processor** that decides what to run, a **stream processor** that runs compute
kernels on blocks of data held in a small local *stream memory*, and a **DMA
engine** that moves the next block in (and the last result out) while the
current block is being processed. The Stream Virtual Machine (SVM) describes a
machine in just those terms (processors, memories, DMA engines, links) so that
one stream compiler can target many machines.

This RTL builds the hardware that lets an ordinary chip multiprocessor tile
with *configurable memory* behave as such a stream machine. The tile has two
processors and sixteen 4 kB memory mats; each mat can be a scratch SRAM, a
FIFO, or the tag or data array of a cache. Three small mechanisms make the SVM
cheap on it:

* **safe loads and stores**: a lock bit kept beside every word turns any
  scratch word into a single-word semaphore, so a processor can *sleep* on a
  word until a DMA completion or another processor writes it, without polling
  and without interrupts;
* **FIFO mats** that queue DMA requests from many processors and DMA
  completions back to the processor that manages the DMA engine;
* a deliberately **simple DMA engine**: no request queue, a few channels, three
  addressing modes, and a final *completion write* of programmable type,
  address and data that wakes whoever waits for the transfer.

`sm_stream_tile` is the top: one tile configured as the simplest SVM stream
system. The processor cores, the quad cache controller and main memory are not
part of the RTL; their ports are brought out.

## Tile configuration

| mats  | role                                        | built from |
|-------|---------------------------------------------|------------|
| 0-2   | control processor I-cache, 8 kB direct-mapped, 64-bit lines | 2 data + 1 tag mat |
| 3-6   | control processor D-cache, 8 kB two-way, 32-bit lines       | 2 data + 2 tag mats |
| 7     | sync SRAM (lock words, DMA index lists)     | scratch mat |
| 8-10  | stream processor I-cache, 8 kB direct-mapped | 2 data + 1 tag mat |
| 11-14 | stream SRAM, 16 kB: the SVM stream memory    | 4 scratch mats |
| 15    | stack SRAM, or one 1024-word / two 512-word FIFOs (`cfg_stack_mode`, `cfg_stack_two_fifo`) | scratch/FIFO mat |

Tile-local addresses are word addresses `{mat[3:0], word[9:0]}`. Mats that
belong to a cache are not reachable through local addresses. The stream
compiler sees the 16 kB stream SRAM as the machine's stream memory; the usual
mapping double-buffers it (2048 words per buffer).

The cache tag overhead is large by design: with 4- or 8-byte lines one tag mat
serves only one or two data mats, so 50-100 % of the cache area is tags.

## Safe operations and sleeping on a word

Every mat word carries meta-data bits; in a scratch mat bit 0 is the
**lock** (or "full") bit. Three operations use it (`mat_op_e` in `sm_pkg`):

| operation          | lock bit clear                     | lock bit set                          |
|--------------------|------------------------------------|---------------------------------------|
| `OP_SAFE_LD`       | fails: the processor stalls        | returns the word, clears the bit      |
| `OP_SAFE_ST`       | writes the word, sets the bit      | fails: the processor stalls           |
| `OP_ASAFE_ST` (always-safe store) | writes the word, sets the bit | dropped, but reported successful |

A mat answers every request one cycle later with `rsp_ok`; `rsp_ok=0` on a
safe operation means "stalled". The tile registers which processor stalled on
which word in `safe_wake_unit`. Every mat reports each successful safe
operation (`safe_evt`) and the unit pulses `cp_wake` / `sp_wake` for every
processor waiting on that word. The woken processor simply re-issues its
instruction; if somebody else got there first it stalls again. A stall and a
matching event in the same cycle wake at once, so no wake-up is lost.

The always-safe store is what producers use to signal "there is work":
since it never stalls, a producer never blocks on a consumer that is busy,
and because it is dropped when the bit is already set, several signals
collapse into one wake-up, which is all the sleeper needs: it drains the
queues completely each time it wakes.

## The DMA protocol these pieces support

The end-to-end testbench runs exactly this sequence, which is the intended
use:

1. A stream processor pushes a pointer or code for each DMA request into the
   request FIFO (a store to the FIFO mat's address), then issues an
   always-safe store to a **wake-up word** in the same tile. Within a tile
   operations are ordered, so the FIFO write is complete before the wake-up.
2. The processor that manages DMA sleeps with a safe-load on the wake-up
   word. When woken, it pops the request FIFO until a pop fails (`rsp_ok=0`
   = empty), programs a free channel for each request, drains the completion
   FIFO, and sleeps again.
3. Each transfer ends with its completion write: an always-safe store to a
   per-buffer **sync word** that the stream processor sleeps on before
   running its kernel, or a plain store of the channel's code into the
   completion FIFO (the FIFO mat turns stores into pushes).

Because the DMA engine has no queue, at most `NCH` transfers are in flight.
Two channels are enough to keep the network port busy while one is being
refilled, provided transfers are longer than the time to service them.

## DMA engine (`dma_engine`)

Registers per channel (`dma_reg_e`, word addresses throughout):

| reg | name        | meaning |
|-----|-------------|---------|
| 0 | `EXT_ADDR`  | outside base address |
| 1 | `LOC_ADDR`  | tile address; the tile side is always contiguous |
| 2 | `REC_WORDS` | words per record |
| 3 | `STRIDE`    | words between record starts (strided mode) |
| 4 | `NUM_RECS`  | records |
| 5 | `IDX_ADDR`  | tile address of the index list (indexed mode) |
| 6 | `DONE_ADDR` | tile address of the completion write |
| 7 | `DONE_DATA` | data of the completion write |
| 8 | `CTRL`      | `dma_ctrl_t`: `start` (bit 0), `mode` (5:4), `to_ext` (6), `done_en` (7), `done_op` (11:8) |

Record `r` of a transfer starts outside at `EXT + r*REC` (block), `EXT +
r*STRIDE` (strided, e.g. a matrix column or a decimating filter) or
`EXT + idx[r]` (indexed gather/scatter, `idx[]` read from tile memory, e.g.
FFT butterflies or mesh neighbours). Registers are written while the channel
is idle; writing `CTRL` with `start=1` launches it. A zero-length transfer goes
straight to its completion write.

Each channel moves one word at a time (read the source, then write the
destination). Channels share the tile port and the network port through
round-robin arbiters, so active channels interleave word by word. The network
port takes one message per cycle; reads carry the channel number in
`ext_req_id` and may be answered in any order, and writes are posted.

## Caches from mats (`mat_cache`)

A lookup sends the line index to all mats of all ways in the same cycle. Each
tag mat compares its stored tag with the request's tag and checks the valid
bit, and its `hit_out` gates the data mats of its way, so only the hitting
way drives data. A load hit answers 2 cycles after acceptance. On a miss the
line is requested on `mem_*` and written into an invalid way if the tag mats'
valid bits show one, otherwise the ways are replaced in turn. Stores are
written through and update the line only on a hit (no allocate).
`LINE_MATS=2` gives the 64-bit instruction port.

## Crossbar (`tile_xbar`)

The crossbar routes the control processor's and stream processor's local
load/store ports and the DMA engine's tile port (masters 0-2) to the mats.
Each mat takes one access per cycle. When masters collide, a round-robin
arbiter per mat picks one and the others see `req_ready` low and stall. Loads
and stores to a FIFO mat become pops and pushes.

## Where this RTL departs from, or goes beyond, the source design

Taken from the source design: the mat size and roles, the FIFO split, the
safe-operation rules, the tag/data mat cache organisation, the stream tile mat
allocation, and the DMA engine's modes, channels, register launch and
completion write.

Choices made here because the source does not give them:

* the operation encodings, the register map, word-granular DMA addresses,
  16-bit record size and count fields, and index entries as word offsets;
* one-cycle mat latency, round-robin arbitration, and a FIFO selected by
  address bit 9;
* 2 meta-data bits per word;
* a write-through, no-allocate D-cache with invalid-first/round-robin
  replacement, and no coherence (the quad cache controller outside decides
  that);
* the always-safe store drops its write when the lock bit is already set. One
  description of the operation says it always writes; the DMA-manager usage
  needs the dropping behaviour, which is followed;
* the wake-up tracking is one entry per processor with an exact word match.
  The unit's default is the 8 processors of a quad; the tile uses 2.

* the DMA engine sits inside the tile module. In the source it belongs to
  the quad's cache controller and is shared by the four tiles of a quad; the
  quad level (four tiles, cache controller, network interface) is not built.
* the lock bit is kept only in the scratch mats. The source also carries it
  through caches and main memory.

Not built: the processor cores (licensed configurable VLIW cores), the
software DMA manager, the quad cache controller and its coherence protocol,
the memory controllers, the inter-quad network and main memory.

## Files

| file | content |
|------|---------|
| `rtl/sm_pkg.sv` | widths, `mat_mode_e`, `mat_op_e`, DMA modes, register map, `dma_ctrl_t` |
| `rtl/mem_mat.sv` | configurable memory mat |
| `rtl/mat_cache.sv` | cache built from tag and data mats |
| `rtl/tile_xbar.sv` | tile crossbar |
| `rtl/rr_arbiter.sv` | round-robin arbiter (crossbar, DMA ports) |
| `rtl/dma_engine.sv` | DMA engine |
| `rtl/safe_wake_unit.sv` | stalled-processor tracking and wake-up |
| `rtl/sm_stream_tile.sv` | top: the stream-configured tile |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_gmti_tde.sv` | radar filter stage streamed through the tile |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself (each
has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sm_stream_tile \
  -y rtl -y tb +libext+.sv -Irtl rtl/sm_pkg.sv tb/tb_sm_stream_tile.sv -o sim
./obj_dir/sim
```

Replace `tb_sm_stream_tile` with `tb_mem_mat`, `tb_mat_cache`, `tb_tile_xbar`,
`tb_dma_engine` or `tb_safe_wake_unit` to test one block. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/sm_pkg.sv rtl/<module>.sv`.

`tb_sm_stream_tile` runs the top at its default parameters and goes through
one double-buffered SVM step: a strided load and an indexed gather on the
two channels, the kernel `y = 3x + 1` on both buffers, and two block stores.
It uses the request and completion FIFOs, the wake-up word and the sync words,
and fetches code and data through all three caches. It checks the results in
main memory and counts each mechanism; a mechanism that never occurred is a
failure. The mechanisms are the three DMA modes, both channels active with
interleaving on the network port, a safe-load stall and its wake-up, a dropped
always-safe store, a crossbar conflict, FIFO push, pop and empty-pop, and
hits and misses in every cache. The block testbenches add randomised traffic
against reference models.

## Radar workload

`tb_gmti_tde` streams the time-delay-equalisation stage of the GMTI radar
front end (an FIR filter along each range row of the data cube) through the
tile. It uses the small data set (6 channels x 15 pulses x 36 range gates,
12 taps) and the medium one (8 x 48 x 450, 32 taps). Rows are grouped into
blocks that fit one mat. The input is double-buffered in mats 11/12 and the
output in mats 13/14. The stream processor requests each store and the next
load through the request FIFO, and sleeps on sync words. Every output word is
checked against a reference filter, and DMA must overlap the kernel. The
medium set takes about 1.4 M cycles with the testbench standing in for the
processors, so the cycle count measures the protocol, not a real core. The
large data set has 2691-gate rows. These are longer than a 1024-word buffer
mat and than half the stream SRAM, so a compiler would have to split rows with
an overlap of taps-1 samples. That case is not simulated.

## Trust and limits

Every module passes Verilator's lint and elaborates with the slang front end.
The remaining lint warnings are about unused outputs of mats, unused package
constants, and the reset used inside assertions. Each testbench has also been run against a deliberately broken
copy of its module, and it catches the fault. Things not verified: timing
closure, behaviour with a real processor core's stall and re-issue interface
(the testbench plays the processors), and any coherence with other tiles. The
source gives no cycle counts for these blocks, so the latencies above are
properties of this design, not reproductions of measured numbers.

## Changing it

* `NCH` (top and DMA): number of DMA channels.
* `mat_cache` `WAYS` and `LINE_MATS`: associativity and line width. Each
  extra way costs one tag mat plus `LINE_MATS` data mats.
* `safe_wake_unit` `NREQ` and `NEVT`: processors tracked, and events
  accepted per cycle (one per lockable mat).
* The mat allocation is fixed in `sm_stream_tile` (`SCRATCH` mask and the
  cache instances). To add a second stream processor, replicate the I-cache,
  stream SRAM and stack mats: 8 mats per stream unit, so two fit in a tile.
