# Barrel Sector Logic firmware for the HL-LHC RPC muon trigger

For the HL-LHC, the barrel RPC chambers of the ATLAS muon spectrometer will
send their hits from on-detector DCT boards to 32 off-detector Sector Logic
(SL) boards. Each SL board has one large multi-die FPGA that takes up to 50
DCT links. It has two jobs that pull against each other:

* **Trigger.** Every bunch crossing (BC, 25 ns), it must find muon candidates
  with hits in at least three of the four RPC stations (BI, BM1, BM2, BO). It
  sends them to the MDT Trigger Processor (MDT-TP) for confirmation and then
  to MUCTPI, all at a fixed latency inside a 390 ns budget.
* **Readout.** It must keep every hit long enough (the L0 latency is 10 us,
  or 400 BCs) to send it to FELIX when an L0-Accept names its BC. Up to 1 MHz
  of L0-Accepts must be handled.

Hits do not arrive in time order. Each DCT link delivers them with a latency
that is not fixed, tagged with the BCID they belong to. The main idea of this
firmware is to turn that unordered stream into time order twice, both times
with circular buffers addressed by BC:

* a short one per link (16 BCs), which gives the trigger one hit map per BC
  at a fixed latency;
* a long one per link (512 BCs), which gives the readout random access to any
  recent BC.

This repository is a synthesizable SystemVerilog rendering of that
architecture. The division into regions, the link and RAM counts, the
coincidence rule, the MDT-TP round trip and the L0-Accept readout follow the
published description of the SL firmware. That description gives what each
block does but not how it does it. The algorithms inside, the data formats and
every latency and depth are this design's own choices. They are listed under
"What is taken and what is chosen" below.

## Floorplan: four dies, four regions

The FPGA (a Virtex UltraScale+ XCVU13P) is four dies, called Super Logic
Regions (SLRs). Signals between dies are slow, so the logic is split so that
few signals cross. The split works because the two half sectors (the two sides
of the barrel) trigger independently and share only the BI data:

| region | module | inputs | work | outputs |
|---|---|---|---|---|
| SLR0 | `slr0_bi` | 10 BI links, 6 Tile Calorimeter links | reorder by BC, merge | BI map and Tile map per BC, to SLR1 and SLR2 |
| SLR1 | `slr_bmbo` (half A) | 20 BM/BO links, BI map | reorder, L0 trigger, confirmation | MDT-TP, MUCTPI |
| SLR2 | `slr_bmbo` (half B) | 20 BM/BO links, BI map | same | MDT-TP, MUCTPI |
| SLR3 | `slr3_readout` | all 50 links' hits, L0-Accept | 50 readout RAMs, 3 event builders | 3 FELIX links |

Every signal that crosses dies goes through `slr_pipe`, which has one
register per boundary crossed:

| signal | from to | stages |
|---|---|---|
| BI map, Tile map | SLR0 to SLR1 / SLR2 | 1 / 2 |
| BI hits | SLR0 to SLR3 | 3 |
| half A hits | SLR1 to SLR3 | 2 |
| half B hits | SLR2 to SLR3 | 1 |
| L0-Accept (arrives with TTC in SLR0) | SLR0 to SLR3 | 3 |

The BI map reaches SLR2 one clock later than SLR1. Each `slr_bmbo` therefore
delays its own map by the same `BI_DELAY` (1 or 2 clocks) before the two
meet. An assertion checks that both carry the same BCID.

`sl_top` wires this together. Its ports are decoded hits per link, Tile flags,
the TTC bunch counter reset and L0-Accept, the MDT-TP and MUCTPI word streams,
three 32-bit FELIX streams, and drop and busy flags for monitoring.

## Time base: BCIDs, sequence numbers and ages

All logic runs on one 240 MHz clock, which is 6 clocks per BC. `bc_timer`
provides three signals:

* `tick`, high in the last clock of each BC;
* `bcid`, 0 to 3563, wrapping once per LHC orbit and reset by BCR;
* `seq`, a free-running 16-bit BC count.

Every buffer in the design works the same way, and this is the part worth
understanding first.

* **Age.** The age of a hit or word is `bc_age(bcid_now, its_bcid)`, which is
  the difference modulo 3564. The age, not the BCID, decides whether the item
  is accepted.
* **Slot.** An item goes into slot `(seq - age) mod DEPTH`. The slot comes
  from the sequence number, not from the BCID, because 3564 is not a power of
  two: `bcid mod DEPTH` would jump at the orbit wrap, while `seq` does not.
* **Release.** At each tick, the slot of the BC that has just reached the
  buffer's latency is read out and cleared.
* **Acceptance window.** Only items younger than that latency are accepted.
  So a write can never hit the slot being released in the same clock, and the
  buffers need no arbitration.

Hits from the future, and hits older than the window, are dropped and flagged.

## Reordering for the trigger (`bc_reorder`)

There is one instance per input link: 10 BI, 6 Tile, and 20 in each half
sector.

* Each entry is a bit map of one BC. For RPC links that is 4 stations x 64
  strips = 256 bits. For Tile links it is 64 flags.
* An incoming hit sets one bit, in the entry of its BC.
* With `LATENCY = 8`, the map of BC n leaves in the first clock of BC
  n + 9, which is one clock after the tick that ends BC n + 8.
* A hit that is 8 or more BCs old when it arrives is lost for the trigger and
  pulses `late_o`. It still reaches the readout, which has a wider window.

The maps of all links in a region are OR-ed together. BI links carry only
station 0 (BI), and BM/BO links carry stations 1 to 3.

## The coincidence (`rpc_trigger`)

The trigger runs on the merged 4 x 64 map of one BC:

* A station counts at strip p if it has a hit within p +/- `WIN` (1).
* A position where at least 3 stations count is a coincidence.
* Candidate 0 is the lowest coincidence position.
* Candidate 1 is the lowest coincidence position more than 2*`WIN` above
  candidate 0, so that one track is not reported twice.
* Each candidate has a flag that says whether all four stations took part.

The result is registered, one clock after the map. The published design
states only the rule of "at least three stations, up to two candidates per
BC". Real roads, momentum thresholds and the eta/phi geometry are not modelled
here. This block is the one to replace with a real algorithm. Its interface
(one map in, one `cand_word_t` out per BC) does not need to change.

## Confirmation and fixed latency (`cand_confirm`)

The candidates of a BC go to MDT-TP at once. They are also stored in a
16-entry circular buffer. MDT-TP answers with a BCID and one confirm bit per
candidate. The answer is OR-ed into the stored entry, and only onto valid
candidates.

At the tick when BC n is `CONF_LAT = 14` BCs old, the entry leaves for MUCTPI
and is cleared, whether it was confirmed or not. Answers that come later are
dropped and pulse `drop_o`.

Timing of one BC through the trigger path:

| step | when |
|---|---|
| map released | first clock of BC n + 9 |
| candidates to MDT-TP | a few clocks later, still in BC n + 9 (slr_pipe, trigger register, forward register) |
| confirmation must arrive | before BC n + 14 |
| MUCTPI word | first clock of BC n + 15, i.e. 14 BCs = 350 ns after BC n |

The 350 ns is counted from the BC at the SL inputs. The 390 ns trigger budget
also has to cover fibres and DCT, which this design does not see.

## Readout (`readout_buffer`, `readout_engine`, `slr3_readout`)

**RAMs.** Each of the 50 links has a `readout_buffer`:

* 512 BC slots of 8 hit words each, plus a hit counter and an overflow flag
  per slot;
* a hit up to 31 BCs old is written to the next free word of its slot;
* a 9th hit in one BC is dropped and sets the slot's overflow flag;
* at each tick the slot of the coming BC is emptied, so data that no
  L0-Accept asked for simply disappear after 512 BCs;
* the read port gives the count and overflow flag of any BC at once, and a
  hit word one clock after its address.

**Engines.** The RAMs form three groups of consecutive links: 0-16, 17-33
and 34-49. Link numbers are 0-9 BI, 10-29 half A, 30-49 half B. Each group
has a `readout_engine` and its own FELIX link, so all three groups build the
same event in parallel. An engine does the following:

1. It numbers every L0-Accept it sees, including lost ones, and queues it in
   a 16-entry FIFO. If the FIFO is full, the L0-Accept is lost and
   `l0a_drop_o` pulses.
2. It sends one event per queued L0-Accept, one 32-bit word per clock. 32 bits
   at 240 MHz is exactly the 7.68 Gb/s payload of a 9.6 Gb/s 8b/10b link.
   Idle clocks have `felix_valid_o` low.
3. If the accepted BC is more than `MAX_AGE = 448` BCs old when its event
   starts, its slots may already be reused. The event is then sent with the
   stale bit set and no hits.

Event format:

```
event header  [31:30]=11  [29:28]=group  [27:12]=L0 number  [11:0]=BCID
link header   [31:30]=10  [29:24]=link   [23]=overflow [22]=stale  [15:12]=hits  [11:0]=BCID
hit           [31:30]=01  [29:24]=link   [7:0]={station[1:0], strip[5:0]}
trailer       [31:30]=00  [15:0]=words in the event, trailer included
```

A link with n hits costs n + 2 clocks (header, hits, one turn-around), and an
empty link costs 1. An event of 17 links takes at most 172 clocks. At 1 MHz,
L0-Accepts come 240 clocks apart, so the queue only fills in bursts.

## Data types (`sl_pkg`)

* `rpc_hit_t`: `{bcid[11:0], station_e station, strip[5:0]}`.
* `tile_hit_t`: `{bcid, tower[5:0]}`.
* `cand_t`: `{valid, four, pos[5:0]}`.
* `cand_word_t` (to MDT-TP): `{bcid, cand[1:0]}`.
* `mdt_conf_t` (from MDT-TP): `{bcid, confirm[1:0]}`.
* `muctpi_word_t`: `{bcid, cand[1:0], confirmed[1:0]}`.
* `bc_age` and `bc_sub`: modulo-orbit arithmetic.

## What is taken and what is chosen

These follow the published design:

* the four-region floorplan, and 10 BI, 6 Tile and 2 x 20 BM/BO links;
* reordering by BC because DCT latency is not fixed;
* at least 3 of 4 stations, up to 2 candidates per BC per half sector;
* candidates to MDT-TP, confirmation back, then to MUCTPI;
* 50 readout RAMs that reorder by BC and drop old data;
* L0-Accept readout over 3 FELIX links;
* pipeline registers counted by SLR boundaries crossed;
* the rate and latency targets: 390 ns for the RPC trigger, and 1 MHz and
  10 us for L0.

These are this design's choices:

* one 240 MHz clock (the 320 MHz link domain and its clock crossings are left
  out);
* the hit, Tile and word formats;
* 64 strips per station on one common strip axis, and the +/-1 strip window;
* the candidate selection order;
* all depths and latencies: 16 and 8 for the reorder buffer, 16 and 14 for
  confirmation, 512, 8 hits, 32 and 448 for readout, a queue of 16;
* OR-merging of link maps;
* sending unconfirmed candidates with their bit clear;
* the 17/17/16 RAM grouping and the event format.

The Tile flags are reordered and delivered to both half-sector regions
(`tile_*_o` ports), as described. How the trigger would use them is not
described, so nothing consumes them.

Two published figures differ from the text: 4 FELIX links against 3, and 4
MDT-TP fibres each way against 2. The RTL follows the text. The MDT-TP side is
one word stream per half sector either way.

These are outside the RTL: the transceivers, the lpGBT and 8b/10b link
layers, TTC decoding, the EndCap SL link, clocking primitives, the SoC and
IPMC modules, and the monitoring logic that the firmware itself still lacked.

## Verification

Each block has a self-checking testbench. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_slr_pipe` | exact delay, reset value, 0-stage wire |
| `tb_bc_reorder` | per-BC maps against a model, late and future hits, orbit wrap, BCR |
| `tb_rpc_trigger` | 3-of-4 coincidence and the two-candidate choice against a model; 0/1/2 candidates and 4-station cases |
| `tb_cand_confirm` | MUCTPI words at exactly CONF_LAT, confirmations in time, late, same-clock, and masked by valid |
| `tb_readout_buffer` | counts, overflow, hit words, slot reuse discarding old data |
| `tb_readout_engine` | every event word and event length against a RAM model; stale events; queue overflow |
| `tb_slr0_bi`, `tb_slr_bmbo`, `tb_slr3_readout` | each region end to end at its default size |
| `tb_sl_top` | the whole firmware at default sizes |

`tb_sl_top` runs 3800 BCs, which crosses an orbit wrap. It includes tracks in
both half sectors, noise, late hits and slot-overflow bursts. A model MDT-TP
answers in time, late or never. L0-Accepts come at 1 MHz with 400 BC latency,
plus stale accepts and a burst of 20. The testbench checks every MDT-TP,
MUCTPI, Tile and FELIX word against `tb_model_pkg`. It fails if any mechanism
never happened: late hit, 3- and 4-station candidates, two candidates in one
BC, confirmed, unconfirmed, late confirmation, stale event, queue overflow,
slot overflow. It takes well under a second.

To simulate, for example the whole design:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/sl_pkg.sv tb/tb_model_pkg.sv rtl/*.sv tb/tb_sl_top.sv \
  --top-module tb_sl_top -Mdir obj_top
./obj_top/Vtb_sl_top
```

A block testbench needs only the package, the block's files and, where
used, `rtl/bc_timer.sv` and `tb/tb_model_pkg.sv`. Verilator has two states, so
every register that is read is reset.

## Changing it

* Depths and latencies are `sl_top` parameters. Keep these rules:
  * `REORDER_LATENCY` is below `REORDER_DEPTH`.
  * `CONF_LAT` is below `CONF_DEPTH`.
  * The reorder latency plus about one BC of processing, plus the MDT-TP
    round trip, fits in `CONF_LAT`.
  * `RO_MAX_AGE` plus the longest event-queue wait stays below
    `RO_DEPTH_BC`.
* Depths must be powers of two. Assertions check this at start.
* Geometry and formats (strips, stations, link counts, hit width) live in
  `sl_pkg`.
* To put in a real trigger algorithm, replace `rpc_trigger` and keep its
  ports.
