# Real-time software performance analysis chip

The chip watches a processor's address bus and answers two questions about
each of 16 programmable address ranges (for example, the code of one
procedure):

- **How much?** The *address/time count* (48 bits) works in one of two modes.
  In *count_addr* mode it counts the valid bus addresses that fell inside the
  range. In *time_a_range* mode it counts the clock cycles, gated by an
  external `en_timer` input, during which the range was *active*, meaning
  entered and not yet left.
- **How often?** The *entry/exit count* (32 bits) counts how often the range
  was left. It also counts a re-entry at the range's lower limit while the
  range is still active, so recursive calls of a procedure are counted.

The chip must take a new address every 10 ns (100 MHz). A 48-bit increment
per range per cycle is too slow and too large to build for 16 ranges. The
design therefore splits every count in two:

```
 low byte: a fast 8-bit counter inside each range recognizer, one per count
 upper bits: one small RAM word per recognizer (40 bits / 24 bits),
             updated by ONE shared incrementer at a quarter of the clock rate
```

A low byte can carry at most once every 256 cycles. A carry only has to reach
the RAM before the same counter carries again. So one slow incrementer can
serve all 16 recognizers, even when every range overlaps and all 16 carry in
the same cycle. There are two such carry paths, one for each count. Each has a
priority resolver, a RAM and an incrementer.

```
           a[31:0], valid, en_timer, chip_mode
                       |
   +-------------------+----------------------+
   | range recognizer 0 ... range recognizer 15 |   10 ns pipeline
   |  limits, comparator, active bit,          |
   |  8-bit address/time + entry/exit counters |
   +------+---------------------+--------------+
          | 16 carries          | 16 carries
   priority resolver     priority resolver          40 ns
   RAM 16 x 40 + inc     RAM 16 x 24 + inc          40 ns
          |                     |
          +------ output mux ---+---- low bytes ---> c[7:0]
```

## Range recognizer

Each recognizer (`range_recognizer`) has:

- a lower-limit register `ll` and an upper-limit register `ul`;
- an input register `b` for the bus address;
- two pipelined comparators;
- an *active* bit;
- the two low-byte counters.

The range is inclusive: `ll <= a <= ul`.

### The pipeline

A 32-bit magnitude compare does not fit in one 10 ns cycle. The comparator
(`gteq_cmp`) is therefore cut into two stages. Per bit it forms
`e = (a == b)` and `g = ~a & b`. A 4-bit group then gives

```
lt4 = g3 | e3 g2 | e3 e2 g1 | e3 e2 e1 g0        eq4 = e3 e2 e1 e0
```

The same formula, applied to the (lt4, eq4) pairs of the groups, gives the
16-bit and then the 32-bit result. Stage 1 registers the eight group results.
Stage 2 registers the final `lt`/`eq`. One comparator checks `ll` against the
address, the other checks the address against `ul`.

| clock edge | what is registered |
|---|---|
| 0 | address into `b`; `valid`, `en_timer`, `chip_mode` into the input-section flags |
| 1 | group compares against both limits |
| 2 | `ll<b`, `ll==b`, `b<ul`, `b==ul` |
| 3 | `active`, `exitrange`, `inc` (below) |
| 4 | low counters count |

An address applied at the pins shows in the low byte at the fifth rising
edge. One address is accepted on every clock, with no stall.

### Active bit and the two increments

```
inrange   = (ll <= b) & (b <= ul)
active    = valid & inrange  |  ~valid & active_prev
exitrange = valid & active_prev & (~inrange | b == ll)
inc       = chip_mode ? en_timer : valid
address/time counter += inc & active
entry/exit counter   += exitrange
```

An invalid address does not change the active bit. So, in time_a_range mode,
a range keeps being timed while the bus carries addresses that are not marked
valid. `valid` can, for example, select only instruction fetches.

### Low counters

Each low counter (`counter8`) is two 4-bit halves with the inter-nibble carry
in a flip-flop. Only a 4-bit increment has to fit in a cycle. As a result, the
high nibble follows one cycle behind the low nibble. `cout` pulses for one
cycle each time the high nibble wraps, which is once per 256 counts.

## Priority resolver

The 16 carry pulses of one count go to `priority_resolver`. Each carry is kept
in a hold flip-flop until it has been passed on:

```
pend <= cout | pend & ~rcc
```

Once per 40 ns slow cycle the held requests are sampled (`cc`). The resolver
forwards only the lowest-numbered request, so recognizer 0 has the highest
priority:

```
rcc_n = cc_n & ~cc_(n-1) & ... & ~cc_0
```

That one-hot word is registered half a slow cycle later. It addresses the
RAM, and it clears its own hold bit.

Worst case: all 16 recognizers carry together. The last one is served 16 slow
cycles (64 fast cycles) later. No counter can carry again within 256 fast
cycles, so no carry is ever lost. An assertion in the resolver checks that
`rcc` is at most one-hot.

## RAM circuit: the write-back timing trick

`ram_circuit` is the hardest part to understand. The RAM has a read port and a
write port, and the write port is **written on every clock, unconditionally**.
Whatever is on the data input goes into the word the write address register
points at. There is no write enable. Correctness comes entirely from when the
address and the data registers change.

The circuit has four registers:

- `ramff`: the word read, taken at the clk4 edge;
- `ffcin`: the carry-in, equal to `|rcc`, also taken at the clk4 edge;
- `incff`: `ramff + ffcin`, taken at the next clk4 edge;
- `wff`: a copy of `rcc`, taken slightly *after* the clk4 edge (the "clk4d"
  edge).

Take `t` as the slow-clock edge at which a request is sampled. In the 10 ns
clock cycles of this RTL (the original used 40 ns and an 8 ns delay line):

| time | event |
|---|---|
| t | the hold flip-flops are sampled into `cc` |
| t+20 | the resolver's choice `rcc` = word X drives the read port |
| t+40 | `ramff` <= RAM[X]; `ffcin` <= 1 |
| t+50 | `wff` <= X; the write port now addresses X |
| t+80 | `incff` <= RAM[X] + 1 |
| t+90 | last write into X, of `incff`; `wff` moves to the next request |

Between t+50 and t+80 word X is written with the previous increment's result
(for another word). That is harmless. X cannot be read again before t+80,
because its hold bit was cleared and it cannot carry again so soon. The final
write at t+90 puts the correct value back. A new increment starts every slow
cycle, so the two slow cycles of each increment overlap with the next one.

Two rules follow for users of the chip:

- **Read counts only when counting has stopped** and the last carries have
  drained (about 200 clocks is ample). During read-out the read port follows
  the `m` pins and the carry-in is forced to zero. A carry that is still in
  flight would then write the word being read into the carrying recognizer's
  word.
- **Test-write the RAM only while idle**, for the same reason.

The 24-bit RAM of the entry/exit count works in exactly the same way.

## Clocking

The original chip divides its clock by four with toggle flip-flops. It clocks
the RAM circuits with the slow clock, its inverse and a delayed copy. This RTL
keeps a **single clock**. `clk_div4` runs a 2-bit phase counter and gives
one-cycle enables that mark where each slow edge falls:

- `clk4_fall`: the slow falling edge, the RAM circuit's main edge;
- `nclk4_fall`: two cycles later, the inverted clock;
- `clk4d_fall`: one cycle after `clk4_fall`, the delayed clock.

`clk4` itself is brought out to a pin, so that external read-out logic can
synchronize to it.

## Using the pins

All inputs are sampled at the rising edge of `clk`.

| pin | meaning |
|---|---|
| `nr` | reset, active high. It is synchronized by four flip-flops into the internal active-low reset. The reset clears all counters, the RAMs, the active bits and the flags. The limits are not cleared. |
| `a[31:0]`, `valid` | bus address and whether it is counted or changes the active bit |
| `chip_mode`, `en_timer` | `0` = count_addr mode, `1` = time_a_range mode; `en_timer` gates timing |
| `prg_chip`, `d[3:0]`, `limit`, `strb` | programming the limits |
| `ren`, `eccnt`, `m[3:0]`, `enr[2:0]` → `c_out[7:0]`, `c_oe` | reading out the counts |
| `wen`, `strb2`, `c_in[7:0]` | RAM test write |
| `clk4` | the divided clock, for read-out timing |

The chip's bidirectional `c` pins appear here as `c_in`, `c_out` and
`c_oe` (`c_oe = ren`).

**Reset.** Hold `nr` high for a few cycles, then low. The chip runs four
cycles after `nr` falls.

**Programming a range.** Keep `valid` low. Set `prg_chip = 1`, put the
recognizer number on `d`, choose `limit` (0 = lower, 1 = upper), and put the
limit value on `a`. Then raise `strb` for one clock. Repeat for the other
limit.

**Counting.** Set `chip_mode` and drive one address per clock with `valid`
(and `en_timer` in time_a_range mode).

**Reading a count.**

1. Stop counting and wait for the carries to drain.
2. Just after a falling edge of `clk4`, set `ren = 1`, `eccnt`
   (0 = address/time, 1 = entry/exit), `m` = the recognizer, and `enr` = the
   byte number. The original allows 20 ns for this. In this RTL any time
   before the next falling edge works.
3. Hold these until the next falling edge of `clk4`. Then `c_out` carries
   the byte.

Byte numbers:

- byte 0 is the recognizer's low counter;
- bytes 1–3 come from the RAM chosen by `eccnt`;
- bytes 4–5 exist only for the 48-bit address/time count;
- byte numbers 6 and 7 give zero.

**RAM test write.** With `prg_chip = 1` and `wen = 1`, the RAM chosen by
`eccnt` takes its data from the pins:

- the address/time RAM takes `{c_in, a}` (40 bits);
- the entry/exit RAM takes `a[23:0]`.

Set `m` to the word, then raise `strb2` for at least one clock. The low bytes
cannot be written. Presetting the upper bits to all ones is a quick way to
see the wide increments wrap.

## Where this RTL departs from the original chip

- **Clocks.** The original uses separate divided and delayed clocks. This RTL
  uses one clock with enables, and models the roughly 8 ns delayed clock as
  one 10 ns cycle.
- **Clock edge.** All flip-flops use the rising edge of `clk`. The original
  uses falling-edge flip-flops.
- **Limit registers.** The limits are held in edge-triggered registers
  written while `strb` is high. The original uses level-sensitive latches.
- **Read bus.** The recognizers put their low bytes on an AND-OR bus. The
  original uses a shared tristate bus.
- **RAM reset.** The original starts from zeroed RAM but does not say how.
  Here the reset clears the RAM words.
- **Flag delays.** The original matches the `valid`/`en_timer` timing to the
  address path with delay cells in front of the flag flip-flops. Here the
  flags are registered at the same edge as the address, and delayed inside
  each recognizer to meet the comparator result.
- **Test-write address select.** The select follows the chip's gate list:
  `strb2 & prg_chip & eccnt-select`, with no `wen` term. A description
  elsewhere also includes `wen`. A normal test write raises both, so the
  difference matters only when `strb2` is raised without `wen`.
- **Not modelled:**
  - pads;
  - TTL/CMOS level shifters;
  - inverting input buffers;
  - the clock buffer tree;
  - delay cells.

  These have no logic function beyond what is listed above.

## Module hierarchy

```
rtspa_chip                 top level, pins as above
├── input_section          reset synchronizer, flag registers, programming decoder
│   ├── reset_sync         4-flip-flop reset chain
│   └── decoder_tree       4-to-16 tree of 2-to-4 decoders
├── clk_div4               phase counter and slow-edge enables
├── range_recognizer ×16
│   ├── gteq_cmp ×2        two-stage 32-bit comparator
│   └── counter8 ×2        split 8-bit low counter
├── priority_resolver ×2   hold flip-flops, lowest-index-first grant
├── ram_circuit ×2         16×40 and 16×24 RAM, shared incrementer
└── output_section         read/write enables, m decoder, byte multiplexer
    └── decoder_tree
rtspa_pkg                  sizes (16 ranges, 32-bit addresses, 48/32-bit counts)
```

All sizes are parameters with the chip's numbers as defaults:

- `N_RR` on the top;
- `AW` in `range_recognizer`;
- `W`/`N` in `ram_circuit` and `priority_resolver`;
- `WIDTH` in `gteq_cmp`.

The top's port widths are fixed to the package constants.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog. With
Verilator 5:

```
verilator --binary --assert -Irtl -Itb rtl/rtspa_pkg.sv tb/tb_rtspa_chip.sv \
    --top-module tb_rtspa_chip -Mdir obj_chip -o sim
obj_chip/sim +verilator+rand+reset+2
```

Replace `tb_rtspa_chip` with any testbench name. The testbenches are written
to pass with random power-up values (`+verilator+rand+reset+2`).

| testbench | what it checks |
|---|---|
| `tb_rtspa_chip` | The whole chip at full size, through the pins only, against a behavioural model of both counts. It covers: 16 identical ranges carrying together; latency (fifth edge); 16 random overlapping ranges in both modes; test writes with distinct patterns; 40- and 24-bit wrap; read-out of every byte. It counts each mechanism and fails if one never happened. |
| `tb_test_vector_run` | A full-size replay of the original chip's own test sequence in time_a_range mode, with the RAMs preset to all ones. Every count must wrap. Every byte is compared with the model. |
| `tb_range_recognizer` | One recognizer against a per-address model: limit edges, re-entry, latency, random ranges. |
| `tb_gteq_cmp` | `lt`/`eq` against `<` and `==`, two cycles late. |
| `tb_counter8` | Count modulo 256, and the exact cycle of `cout`. |
| `tb_priority_resolver` | Every carry served exactly once, in priority order. Waits stay within bounds under all-16 bursts. |
| `tb_ram_circuit` | Increments land eight clocks after the request. Covers wrap, test writes and read-out. |
| `tb_clk_div4`, `tb_reset_sync`, `tb_decoder_tree`, `tb_input_section`, `tb_output_section` | The small blocks, exhaustively or at random. |

## How far to trust it

- All blocks are written and compile cleanly with Verilator and a second
  SystemVerilog front end.
- Every testbench passes.
- Each block's testbench has been shown to fail against a deliberately broken
  copy of that block.
- The counting rules, the pipeline depth, the split counters, the resolver
  equations and the RAM register sequence follow the original design closely.
- The departures listed above are timing-level choices. None changes what is
  counted.
- No timing analysis or synthesis to a cell library has been done.
