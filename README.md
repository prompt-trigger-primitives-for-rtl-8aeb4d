# Prompt cluster trigger primitives for a self-seeded strip track trigger

A first-level track trigger has to know, within a few beam crossings (BC, 25 ns),
where stiff (high transverse momentum) tracks crossed the outer strip layers.
This design produces that information in two steps, in two kinds of chip:

1. **Front-end chip, fast-cluster path.** Every crossing, each 128-strip bank of
   a 256-channel strip readout chip finds up to two *narrow* clusters (1 or 2
   strips wide; wider ones are vetoed, since stiff tracks ionise few strips) and
   sends them as one 16-bit word on its own serial line, at 640 Mbit/s one word
   per crossing.
2. **Correlator chip.** Two hybrids, one on each of two closely spaced strip
   layers, face each other. The correlator receives the 40 serial lines of the
   20 front-end chips of both hybrids, pairs inner and outer clusters of the
   same bank position (and the neighbouring cluster positions), and looks each
   pair up in a memory that was loaded beforehand with the pairs that belong to
   stiff tracks. A pair found in memory yields an 11-bit tag; one 16-bit *stub*
   (bank position + tag) per crossing goes out on a single 640 Mbit/s line.

The key idea is that two strip layers 4-5 mm apart, each measuring position to
half a strip (about 40 um), give an angle, and the pairs of positions that
correspond to a stiff track are few enough (about 2^11 per hybrid pair) to be
stored as tags and found by plain memory lookup.

All of it is synthesizable SystemVerilog in `rtl/`; self-checking testbenches
are in `tb/`.

## The cluster word

Everything is built around one 16-bit word per bank per crossing:

```
 15           9   8   7            1   0
+---------------+---+---------------+---+
| strip (lower) | 2 | strip (higher)| 2 |
+---------------+---+---------------+---+
   first cluster       second cluster
```

* Each 8-bit cluster is a 7-bit strip address (the lower strip of the cluster)
  followed by a bit that is 1 for a 2-strip cluster. Read as a number it is the
  cluster centre in half-strip units, `2*strip + two`, hence the 40 um
  resolution on a 75 um pitch.
* The first (upper, sent first) cluster is always the lowest-addressed cluster
  of the bank, the second the highest-addressed one. Clusters in between are
  not reported.
* `FF` means "no cluster" (it would be a 2-strip cluster starting at strip 127,
  which cannot exist). One cluster gives `xxFF`, none gives `FFFF`.

Examples: strips 36-37 and strip 100 hit give `49 C8`; strips 33-34 alone give
`43 FF`. Strips 5-7 (three wide, vetoed) plus strip 9 give `12 FF`.

`sstt_pkg` holds this format as `cluster_t` / `cluster_word_t`, together with
the tag-memory entry, the stub and the rate enum.

## Front-end fast-cluster path

```
hits_in[255:0] --> pipeline input register (rising BC)
                     |--[127:0]--> finder --> BC latch (falling BC) --> serializer --> sout[0]
                     '--[255:128]> finder --> BC latch (falling BC) --> serializer --> sout[1]
                                                   ^----- ready -----------'
```

`fast_cluster_feic` holds one 256-bit register and two `cluster_readout_block`s,
each a chain of `fast_cluster_finder`, `hit_location_latch` and
`cluster_serializer`. Bank 1 (strips 0-127) drives `sout[0]`, bank 2 drives
`sout[1]`.

**Cluster finder.** Pure combinational logic. For every strip it decides
whether a 1-strip or 2-strip run starts there (hit, lower neighbour empty, and
the strip after the run empty). Two priority searches over these start bits,
one from strip 0 up and one from strip 127 down, give the first and second
cluster. Runs of 3 or more strips never produce a start bit, so they vanish
without hiding the clusters beyond them. Bank edges close runs, so the two
banks are independent.

**Clocks and the hand-over between them.** This is the least obvious part.
Two clocks with aligned rising edges come in: `bc_clk` (40 MHz) and `fast_clk`
(160, 320 or 640 MHz, selected by `rate`).

```
BC edge k (rise)   : hits of crossing k registered; finder settles (~6 ns target)
BC edge k (fall)   : BC latch samples the finder word, if ready
BC edge k+1 (rise) : serializer takes the latched word
fast edges after   : word shifted out MSB first, first bit one fast clock after the BC edge
BC edge k+2 (rise) : at 640 MHz the last bit is on the line
```

At 640 MHz a word takes exactly one BC, so every crossing is sent, two BC
after it was registered. At 320 MHz a word takes 2 BC and at 160 MHz 4 BC. The
serializer then holds `ready` low until the last BC of the word it is sending;
the BC latch keeps its old content while `ready` is low, so newer crossings are
locked out instead of overwriting a word half sent. In the last BC `ready` goes
high, the latch takes the current crossing on the falling edge and the
serializer loads it on the next rising edge. At 160 MHz, one crossing in four
is sent.

Inside the serializer, the BC half (rising `bc_clk`) holds the word and the
BC count and flips a toggle bit on every load. The fast half (rising
`fast_clk`) copies the word into its shift register when it sees the toggle
change, one fast clock after the BC edge, and shifts one bit per fast clock.
Both halves use non-blocking assignments, so the fast half reads the old
toggle on the shared edge and the hand-over is deterministic.

**Training mode.** The lines carry no frame marker. With `training` high each
serializer sends, in place of data, ones while `bc_clk` is high and zeros while
it is low: `FF00` at 640 MHz, `F0F0` at 320, `CCCC` at 160. The receiver frames
its words on this copy of the BC clock.

## Correlator

### Receiving and framing

`cluster_deserializer` shifts one line in on `fast_clk` (640 MHz, 16 bits per
BC) and counts bits into 16-bit words. While `training` is high, every 0-to-1
step of the line restarts the counter at bit 1, so after a few BCs of training
the words are framed on the BC boundary as the transmitter sees it, whatever
the line delay. The counter then free-runs. Each line is framed on its own.

The correlator works in the fast clock domain only. It waits until every one
of its 40 lines has delivered a word and then takes them all in at once, so
lines skewed by less than one BC still land in the same crossing.

### Bank positions and the six lookups

`hybrid_correlator` has 20 bank positions. Position `p` pairs bank `p` of the
inner hybrid with bank `p` of the outer hybrid. In the top, chip `c` of a
hybrid feeds positions `2c` (strips 0-127) and `2c+1` (strips 128-255).

Clusters are numbered along the hybrid in strip order: position `p` holds
cluster `n = 2p` (its first cluster) and `n+1 = 2p+1` (its second). A stiff
track joins an inner cluster to the outer cluster of the same number or the
next one either side. So each position runs six lookups, one per fast clock,
in this fixed order:

| step | inner cluster | outer cluster | outer byte taken from            |
|------|---------------|---------------|----------------------------------|
| 0    | n+1           | n+2           | outer bank p+1, first cluster    |
| 1    | n+1           | n+1           | outer bank p, second cluster     |
| 2    | n+1           | n             | outer bank p, first cluster      |
| 3    | n             | n+1           | outer bank p, second cluster     |
| 4    | n             | n             | outer bank p, first cluster      |
| 5    | n             | n-1           | outer bank p-1, second cluster   |

The memory address is `{inner cluster byte, outer cluster byte}`. A step whose
inner or outer cluster is `FF` is ignored. The first tag found ends the search
of that position. Positions 0 and 19 have no neighbour on one side and treat
its cluster as missing.

Each position has its own `tag_memory`: 2^16 entries of `{valid, tag[10:0]}`,
one read port read combinationally and registered by the search. After reset
each memory clears itself, one entry per clock (65536 clocks, about 100 us at
640 MHz), then raises `init_done`. After that the memories are loaded through
`wr_en`, `wr_pos` (which position), `wr_addr` and `wr_data`.

### The stub

Six steps after the words are taken in, the lowest position that found a tag
becomes the crossing's stub:

```
 15      11 10                0
+----------+-------------------+
| position |        tag        |
+----------+-------------------+
```

It appears on `stub` / `stub_valid` and goes out MSB first on `stub_sout`, one
word per BC back to back. A crossing without a tag sends `FFFF`. If more than
one position found a tag, `stub_overflow` pulses and the others are dropped:
one 640 Mbit/s line carries one stub per crossing. That suits the low-rate
case, fewer than about 0.05 interesting coincidences per crossing per hybrid
pair; at about 0.1 a BCID-tagged FIFO would be needed (not included). With `training` high the
stub line also carries `FF00`, so the far end can frame it the same way.

### Latency

At 640 MHz the hits of a crossing are registered on BC edge k and sent during
BC k+1. The correlator has all 40 words just after edge k+2 and the stub
register holds the result within BC k+2, after the six lookup steps. The last
stub bit leaves early in BC k+3. That is about 3 BC from the front-end register to the last stub
bit; the target was about 5 BC for the correlator and about 200 ns in all.

### Two-line lookup

`correlator_lookup` is the first, smaller form of the correlator: two serial
lines, four candidate addresses and four read ports of one memory, all looked
up in parallel. With the words `P1` and `P2` of the two lines:

```
addr[0] = {P1[15:8], P2[15:8]}     addr[2] = {P2[15:8], P1[7:0]}
addr[1] = {P1[15:8], P2[7:0]}      addr[3] = {P2[15:8], P1[15:8]}
```

If any address holds a tag, `trig_flag` rises and `trig_id` carries the tag,
with `addr[0]` taking priority. Example: `7E00` on line 1 and `007E` on line 2
give the addresses `7E00 7E7E 0000 007E`; with tag `03D` stored at `7E7E` the
flag rises with ID `03D`. The pairing is kept exactly as in that worked
example, including its asymmetry (addr[2] and addr[3] both start with
`P2[15:8]`). In the top it stands beside the main chain with its own
`proto_*` ports.

## Top level

`sstt_top` (parameter `N_CHIPS = 10`) instantiates 10 inner and 10 outer
`fast_cluster_feic`, all at the 640 MHz rate, wires their 40 lines into
`hybrid_correlator`, and places `correlator_lookup` alongside. The serial lines
are plain single-bit signals where the real system has LVDS drivers and
receivers. `inner_hit_location` / `outer_hit_location` and `inner_latched` /
`outer_latched` expose every chip's finder and latched cluster words.

Operating sequence: reset; wait for `init_done` (and `proto_init_done`); load
the tag memories; hold `training` for a few BCs; release it and apply hits.

Size at the defaults: about 10,800 flip-flop bits and 16.5 Mbit of tag memory
(21 memories of 2^16 x 12 bits).

## What follows the original description and what was chosen here

Taken from the description this design is based on: 128-strip banks, two
clusters per bank, 1-2 strip clusters with wider ones vetoed, the search from
both ends, the 8-bit cluster format and the `FF` null code, the worked cluster
examples, latching on the falling BC edge, loading the serializer on the
rising edge only when the old word is out, the lockout and restart for slow
serializer clocks, the 160/320/640 MHz rates, the training pattern, 20
positions and 40 inputs, the six-step test order, 2^16-entry memories with
11-bit tags, the 5-bit position in a 16-bit stub, one stub per crossing at
640 Mbit/s, and the two-line lookup with its example.

Chosen here where the description says nothing:

* MSB-first bit order (it reproduces the serial example of the two-line lookup).
* Bank 1 = strips 0-127; chip `c` feeds positions `2c` and `2c+1`.
* Vetoed runs are skipped, not a stop for the search.
* The toggle hand-over between the BC and fast clock halves of the serializer.
* Edge-detect framing in training; taking the 40 words when all have arrived.
* Memory address byte order `{inner, outer}`; a valid bit per entry;
  self-clearing after reset; a plain write port for loading.
* Lookups with a missing cluster are skipped; the first tag of a position
  wins; the lowest position wins among positions; extra stubs are dropped
  and flagged.
* Stub field order, `FFFF` for no stub, `FF00` on the stub line in training.
* Asynchronous active-low reset everywhere; the BC latch resets to `FFFF`.

One discrepancy in the source material: its simulation traces show cluster
words such as `4D41` and `0505`, which do not follow the "lowest cluster first,
`FF` for a missing second cluster" rule that its worked examples state in
words. This design follows the stated rule.

## Not included

* Links between neighbouring correlator chips (drawn, but with no format
  given). Edge positions see an empty neighbour instead.
* A BCID-tagged FIFO for the higher-rate case (about 0.1 coincidences per BC
  per hybrid pair), which the description names as needed but does not
  specify. Here extra stubs are dropped and flagged.
* A smaller hashed tag memory (2^12 entries was suggested as enough, but no
  mapping was given). The memory is addressed directly.
* LVDS drivers and receivers, the source of the 640 MHz clock, the optical
  link that aggregates stubs, and the trigger processor.

## Files

| file | content |
|------|---------|
| `rtl/sstt_pkg.sv` | shared types, sizes, rate enum, training word |
| `rtl/fast_cluster_finder.sv` | combinational cluster finder, one bank |
| `rtl/hit_location_latch.sv` | BC latch with Ready enable |
| `rtl/cluster_serializer.sv` | 16-bit serializer, three rates, training |
| `rtl/cluster_readout_block.sv` | finder + latch + serializer |
| `rtl/fast_cluster_feic.sv` | 256-strip chip: input register + two banks |
| `rtl/cluster_deserializer.sv` | correlator line receiver with training framing |
| `rtl/tag_memory.sv` | 2^16 x {valid, 11-bit tag}, self-clearing |
| `rtl/correlator_lookup.sv` | two-line, four-address lookup |
| `rtl/hybrid_correlator.sv` | 40-line correlator, six-step search, stub output |
| `rtl/sstt_top.sv` | hybrid pair: 20 chips + correlator, two-line lookup beside |
| `tb/tb_ref_pkg.sv` | run-length reference model of the cluster word |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`; each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sstt_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sstt_pkg.sv tb/tb_ref_pkg.sv tb/tb_sstt_top.sv
./obj_dir/Vtb_sstt_top
```

Replace `tb_sstt_top` by any other `tb_<module>`. `--assert` turns on the
two handshake assertions in the RTL: the serializer must never load a word
before the previous one is fully shifted out, and outside training the
correlator must never receive a new set of words while a search is running. The testbenches clock
`fast_clk` and `bc_clk` from one counter so their rising edges coincide
(16 fast clocks per BC at 640 MHz). Time units are arbitrary.

What the testbenches check:

* `tb_fast_cluster_finder`: worked examples, vetoes, edges, 3000 random banks
  against the reference model.
* `tb_hit_location_latch`: falling-edge capture, hold while not ready, reset.
* `tb_cluster_serializer`: every word at 640/320/160 MHz with its exact
  arrival time, one load per 1/2/4 BC, the training words.
* `tb_cluster_readout_block`: hits to line at 640 MHz and at 160 MHz with
  lockout.
* `tb_fast_cluster_feic`: both lines, `hit_location` outputs, the 2-BC latency.
* `tb_cluster_deserializer`: locking at all 32 bit offsets, then exact data.
* `tb_tag_memory`: clearing time, writes ignored while clearing, two ports.
* `tb_correlator_lookup`: the worked example and 300 random pairs.
* `tb_hybrid_correlator`: 160 random crossings of 40 lines, with tags placed
  on random steps, including cross-bank steps and overflows.
* `tb_sstt_top`: the whole hybrid pair at default size, from strip hits to the
  serial stub line: 120 random crossings, finder and latched words of all 20 chips, stub
  sequence and latency, with a count of each mechanism (training lock, veto,
  empty/one/two-cluster banks, 2-strip clusters, tag match, cross-bank match,
  overflow, two-line trigger), each of which must occur. It runs in well
  under a second of CPU time.
