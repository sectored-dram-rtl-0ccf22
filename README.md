# Sectored DRAM

A DDR4 row activation opens an 8 KiB row in every chip of a rank. A read then moves a whole
64-byte cache block over the channel. Many programs use only one or two of the eight 64-bit
words in a block. The remaining words are still fetched, and the rest of the row is still
activated.

Sectored DRAM narrows both steps to the words that are needed. Each DRAM row is split into eight
*sectors*, one per MAT (the independently driven segment of a row). A block's word *s* sits in
sector *s* of every chip. The memory controller can:

* **open only the sectors it needs**, which saves activation energy. An activation that opens
  fewer sectors also draws less current, so more activations fit into a tFAW window;
* **transfer only the needed words**, in a burst one beat long per open sector. This saves
  channel energy and bus time.

Neither takes a new DRAM command or a new pin. The sector bits ride in unused address bits of
the PRECHARGE command that comes before the activation. The burst length is not sent at all:
both the chip and the controller derive it from the same sector bits.

A fine-grained memory is only useful if the processor asks for the right words. Asking for too
few causes *sector misses*: the block is cached but a word is not, and a second slow DRAM
access follows. The processor side therefore has three parts:

* a sectored L1 that tracks validity per word;
* a lookahead in the load/store queue that gathers the words later instructions will touch;
* a per-instruction Sector Predictor that remembers which words a block used last time.

This repository is a synthesizable SystemVerilog model of the whole path. It covers the core's
memory instructions, the L1, the memory controller, and four ranks of eight x8 Sectored DRAM
chips. The DRAM cell arrays are left outside: each chip has a port for them, and the
testbenches connect a behavioural model there.

## Where the words of a block live

A rank is eight x8 chips on a 64-bit channel. Chip *c* holds byte *c*, *c*+8, ..., *c*+56 of a
block, and each of those bytes is in a different MAT. Byte 8*s*+*c* of the block, which is byte
*c* of word *s*, is in MAT *s* of chip *c*. Opening sector *s* in all eight chips therefore makes
exactly word *s* available.

The address map, from the most significant bit, is:

```
row (15) | bank (4: bank group, bank) | rank (2) | column (7) | word (3) | byte (3)
```

That is 28 block-address bits (`BLK_ADDR_W`) for 16 GiB. `sdram_pkg` holds this map, the widths,
and the shared types:

* `ddr4_ca_t`: the command and address pins;
* `dram_dec_t`: a decoded command;
* `arr_req_t`: the chip-to-array interface;
* `mem_req_t` / `mem_rsp_t`: block requests between cache and controller;
* `mem_op_t`: a core's load or store.

## Sectored Activation: sector bits carried by PRECHARGE

`ddr4_cmd_decoder` decodes the DDR4 pins. ACT_n low is an ACTIVATE. Otherwise RAS_n/CAS_n/WE_n
(A16/A15/A14) select PRE (A10 low), PREA (A10 high), RD, WR or REF. A PRE leaves A9..A0 free;
this design carries the eight sector bits on **A7..A0**.

`sectored_activation` holds one 8-bit latch per bank:

* A PRE loads that bank's latch with the sector bits. A 1 sets a sector's latch, a 0 clears it.
* A PREA loads all banks.
* An ACTIVATE drives the local-wordline enables `lwl_en` of the addressed bank with that bank's
  latch. Only the enabled MATs see the master wordline; the latches stand in for the sector
  transistors.

The latches reset to all ones, so a chip that never receives sector bits behaves like a normal
DDR4 chip.

Every activation therefore needs a PRE just before it to set the sectors. The controller sends
one even when the bank is already closed. DRAM timing already requires tRP between a PRE and an
ACT to the same bank, and the sector bits reach the latches in that time.

## Variable Burst Length

A standard chip moves a column read into an 8-entry Read FIFO and sends entry 0..7 on
consecutive beats, selected by a burst counter. Here `vbl_encoder` (8x3) replaces the counter:
for beat *k* it returns the index of the *k*-th set sector bit. The burst sends only enabled
sectors, in ascending order, and is `popcount(sector bits)` beats long. `popcount8` is a
two-level adder tree.

`vbl_io` is that I/O path in one chip:

* **Read.** `rd_load` captures the eight bytes from the array and the bank's sector bits. The
  chip drives beats from the next cycle on, with `dq_valid` high for exactly BL cycles.
* **Write.** `wr_start` marks the cycle in which beat 0 is on `dq_in`. The same encoder places
  each beat into its Write FIFO entry. One cycle after the last beat, `wr_done` presents the
  FIFO and a byte mask equal to the sector bits.

`sectored_dram_chip` ties a chip together: decoder, sector latches, VBL I/O, and two column
pipelines. A RD or WR command records the bank, the column, and the bank's sector bits at that
moment.

| Command at cycle *t* | Array access | Data beats on DQ |
|---|---|---|
| READ | column read at *t*+CL-1 | *t*+CL onwards |
| WRITE | array written once the burst is complete | taken from *t*+CWL onwards |

The burst length comes from the sector latches, which the controller set itself. The chip and
the controller therefore always agree on it, without a burst-length field.

## Memory controller

`sectored_mc` serves a single channel with four ranks.

**Queue.** The 64-entry request queue is kept in age order. A request carries a block address,
the sector bits, and, for a write, the data and the dirty-word mask.

**Bank state.** `bank_state_table` keeps one entry per bank (4 ranks x 16 banks): whether the
bank is open, the open row, and the sector bits last sent to it.

**What each request needs next:**

* **column command** if its row is open and the open sectors fit it. For a read, they must
  include the words it asks for. For a write, they must be exactly the words it carries, because
  every open sector receives a beat.
* **PRE** carrying the request's own sector bits, if the bank is open on another row, or on the
  right row but with the wrong sectors. The second case is a *re-open*, counted by
  `ev_sector_reopen`.
* **ACT** once that PRE has been sent.

**Timing.** The controller enforces tRCD, tRAS, tRP, tRC, CL, CWL, write recovery and
write-to-read turnaround. Bursts are booked on the shared data bus by their real length, so two
short bursts go out back to back.

**tFAW charged per sector.** `tfaw_window` keeps the sum of sectors activated in a rank over the
last tFAW cycles. The budget is 4 x 8 = 32: the four full-row activations DDR4 allows. An ACT
that opens *n* sectors is charged *n*. Sixteen two-sector activations therefore fit where four
full-row ones did, and the ACT waits only when the budget is spent (`ev_faw_stall`).

**Scheduling.** This is first-ready, first-come-first-served with a cap:

* Commands go out only on every second clock.
* The oldest request with a ready column command wins; otherwise the oldest ready PRE or ACT.
* Only the oldest request of a bank may precharge or activate it.
* A request waits for older requests to the same block.
* After CAP (16) column commands to the row a bank has open, younger row hits may no longer pass
  an older request to that bank, so the older request gets its precharge.

**Read data.** Beats are collected with the same encoder mapping: beat *k* is the word of the
*k*-th sector bit. `rsp.mask` tells the cache which words are valid.

**Dynamic on/off.** `sector_mode_ctrl` adds up the read-queue occupancy over each 1000-cycle
epoch. If the average exceeds 30, sectored operation is on for the next epoch; otherwise it is
off. The comparison is `sum > 30 x 1000`, with no divider. While off, reads ask for all eight
words, which is the coarse-grained DDR4 behaviour. Writes still carry only their dirty words.
With `dynamic_en` low, the mode is always on, which is the default configuration. The idea is
that an application with little memory-level parallelism gains nothing from the relaxed tFAW,
while it still pays for sector misses.

## Which words to ask for

**Sectored L1** (`sectored_cache`). The cache is direct-mapped, with 512 sets of 64 B (32 KiB).
Each line has a tag and, per word, a valid bit and a dirty bit. For the Sector Predictor it also
keeps the words used during this residency and the predictor index the line was allocated with.
A lookup ends in one of three ways:

* **hit:** tag and word present;
* **sector miss:** a load finds the tag present but its word missing. The missing words among
  the request's sector bits and the predicted words are fetched;
* **miss:** the victim writes back only its dirty words, with a write mask. Its used words are
  written into the predictor entry it was allocated with. The request's sector bits plus the
  prediction are fetched.

A store to a missing word of a present block needs no fetch. It writes the whole word, which
becomes valid and dirty, and counts as a hit.

A fill writes only words that are not already valid. A response can carry more words than were
asked for, for example all eight in coarse mode, and dirty words already in the line are kept.
After the fill the lookup is repeated. The cache is blocking, with one miss at a time, and
write-allocate.

**LSQ Lookahead** (`lsq_lookahead`, 128 entries). This is a queue of the core's loads and stores
in program order. Each entry carries eight sector bits, starting with its own word. When a new
instruction is allocated, its block address is compared with every entry already in the queue.
Each match gets the new word's bit ORed in. When the oldest entry reaches the L1, its sector
bits already name the words that younger instructions will want from the same block.

**Sector Predictor** (`sector_predictor`, 512 entries of 8 bits). The table index is
`pc[8:0] ^ pc[17:9] ^ word_offset`. On a miss, the entry at that index supplies the predicted
words, and the L1 stores the index in the newly allocated line. While the line is resident, the
L1 marks every word a load or store touches. On eviction, those used words overwrite the table
entry. The table is cleared at reset, so the first misses fetch only what the lookahead asked for.

## Top level: `sectored_dram_system`

Per core (`NCORES` = 8) there is an LSQ Lookahead, a sectored L1, and a Sector Predictor. A
round-robin arbiter merges the cores' block requests into the memory controller. The controller
drives four ranks of eight `sectored_dram_chip`s. Only the rank that is bursting drives the read
data bus.

Ports:

| Ports | Purpose |
|---|---|
| `op_*` | memory instructions in (pc, address, load/store, store data) |
| `ld_*` | load results out, in program order per core |
| `arr` / `arr_rdata` | each chip's cell-array interface, `[rank][chip]` |
| `ev_*`, `mc_req_*` | status: ACT, PRE, RD, WR, tFAW stall, re-open, epoch; per-core hit, sector miss, miss, write-back; each request entering the controller |
| `dynamic_en`, `sectored_on` | selects and reports the mode |

All parameters default to the intended configuration. Timing is expressed in clocks of
0.3125 ns, so one clock is one data beat at a 1600 MHz bus.

| Parameter | Default | Meaning |
|---|---|---|
| `NCORES` | 8 | cores |
| `LSQ_DEPTH` | 128 | lookahead entries |
| `SHT_ENTRIES` | 512 | predictor entries |
| `L1_SETS` | 512 | 32 KiB L1 |
| `RANKS` | 4 | ranks (16 banks each, 32K rows) |
| `QDEPTH` | 64 | controller queue |
| `TRCD` / `TRAS` / `TRC` / `TFAW` | 44 / 112 / 156 / 80 | 13.75 / 35 / 48.75 / 25 ns |
| `TRP` | 44 | about 13 ns |
| `CL` / `CWL` | 44 / 32 | this design's choice |
| `EPOCH` / `THRESH` | 1000 / 30 | dynamic on/off |

## What is this design's own, and what is missing

The following are choices made here, where the scheme leaves the detail open:

* sector bits on A7..A0;
* sector latches and the bank state reset to all-ones;
* CL, CWL, tWR, tWTR and the bypass cap of 16;
* commands on even clocks;
* a linear per-sector tFAW charge;
* reads may use a superset of open sectors, but a write needs exactly its own;
* a direct-mapped, blocking L1;
* loads and stores share one lookahead queue;
* the predictor index bits;
* which transfers dynamic-off mode makes coarse.

Not built:

* **The L2 and L3 caches.** L1 misses go straight to the memory controller.
* **Several outstanding misses per core.** Each core has one. With eight cores the read queue
  never holds more than eight reads, so in this top the dynamic controller can switch sectored
  mode off but never back on. Its on-switch is exercised in its own testbench.
* **Refresh.** REF decodes in the chip but the controller never issues it.
* **ECC.** There is no handling of per-block ECC when a single word is updated.
* **The cores themselves.** Memory instructions come in on the `op_*` ports.
* **The DRAM cell arrays.** The cells, sense amplifiers and wordline drivers are analog parts,
  reached only through each chip's `arr` port.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_sectored_dram_system \
    rtl/sdram_pkg.sv tb/dram_tb_pkg.sv tb/tb_sectored_dram_system.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. Modules are found through `-Irtl -Itb` by file
name.

**Cell-array model.** `tb/dram_array_model.sv` stands in for one chip's cell array. It stores
bytes sparsely and counts protocol errors: activating an open bank, accessing a closed bank, or
writing a sector that is not open. Unwritten locations hold a fixed function of their address (`dram_tb_pkg`), so
testbenches can predict any read.

**End-to-end test.** `tb_sectored_dram_system` runs the top with every parameter at its default:
8 cores, 4 x 8 chips, and 32 array models. It takes about a second of simulation after a short
build, in three phases:

1. All cores run random loads and stores in private regions, with sectored mode always on. Each
   instruction address mostly touches two fixed words of a block, so lookahead and prediction
   have something to find. Some accesses go to other words or to conflicting rows.
2. Dynamic control is enabled while one core runs lightly, and the mode must switch off.
3. All cores run again in coarse mode. Whole-row activations crowd one rank and run into tFAW.

Every load is compared with a reference memory. The test fails if any of these never happened:

* hit (not counting the repeated lookup after a fill), sector miss, miss, dirty write-back;
* a lookahead-widened request, a predictor-widened request;
* a partial activation, PRE to a closed bank, re-open;
* tFAW stall, short burst, coarse read, mode switch.

**Controller test.** `tb_sectored_mc` checks the controller on its own against the chips and
array models. A pin-level monitor checks tRP, tRCD, tRC and tRAS per bank and the
sector-weighted tFAW window per rank. It also checks that each ACT opens exactly the sectors of
the PRE before it, and that the number of data beats matches the open sectors.
