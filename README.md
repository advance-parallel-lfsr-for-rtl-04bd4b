# Advance parallel LFSR pseudo-random number generator

A small, fully synchronous pseudo-random word generator. It combines two very
cheap sequence sources that share one clock:

* an **N-bit LFSR** with a two-tap feedback polynomial
  `F(X) = 1 + X^(N/2) + X^N`, whose N flip-flops are all read in parallel, and
* an **N-bit binary up counter**.

Every clock, the full LFSR word and the full counter word are XORed and the
result is registered as the output `number_o`. The LFSR supplies the
scrambling. The counter ensures the output cannot repeat before all 2^N
counter states have gone by. At the default width N = 32 the whole generator
has 96 flip-flops, one 1-bit XOR gate (the LFSR feedback), one 32-bit XOR
(the output) and one 32-bit incrementer.

```
            +-------------------+   32
 seed_i ---->  parallel_lfsr    |-------+
 loadseed_i >  1 + X^16 + X^32  |       |     +--------------+
            +-------------------+       +---->| prn_combiner |  32
                                              |  XOR + reg   |------> number_o
            +-------------------+   32  +---->|              |
            | parallel_counter  |-------+     +--------------+
            |  0,1,..,2^32-1,0  |
            +-------------------+
 clk, reset (synchronous) go to all three blocks
```

## The parallel LFSR

Flip-flops are numbered FF1 to FFN. FF1 is bit 0 (the LSB) and FFN is
bit N-1. On every rising edge:

* every bit moves one place towards the MSB: `FF(i+1) <= FF(i)`;
* FF1 takes `FF(N/2) XOR FF(N)`, computed by a single XOR gate that is
  wired to those two flip-flops for good.

The taps never move, so there are no tap-selection switches, no multi-phase
clocks and no control unit. The whole state is on `state_o` every clock. After
N clocks all N bits have been replaced.

### Worked example, N = 6, polynomial 1 + X^3 + X^6

Take the register just after a seed load and name its bits 1..6 after the
flip-flops that hold them. Over the next six clocks the bits written into FF1
are, in order:

| clock | 1     | 2     | 3     | 4                 | 5                 | 6                 |
|-------|-------|-------|-------|-------------------|-------------------|-------------------|
| FF1 gets | 6 ^ 3 | 5 ^ 2 | 4 ^ 1 | 3 ^ (bit of clock 1) | 2 ^ (bit of clock 2) | 1 ^ (bit of clock 3) |

Each new bit then moves up one place per clock. After six clocks FF6 holds
the clock-1 bit and FF1 holds the clock-6 bit. The first three results use
only seeded bits. The last three reuse results already fed back. The
testbench checks exactly this list, clock by clock.

### Odd N

For odd N the inner tap may be either `floor(N/2)` or `ceil(N/2)`. The
parameter `TAP` defaults to `N/2` (integer division, so the floor). Override
it to use the ceiling. Any `1 <= TAP < N` elaborates.

### Seed and reset

`loadseed_i` loads `seed_i` into the LFSR at the next rising edge, with bit i
going to FF(i+1). A 2:1 multiplexer sits in front of each flip-flop. Reset
clears the LFSR to all zeros. The all-zeros state of an XOR LFSR never
changes, so **a non-zero seed must be loaded after reset**. Until that
happens `number_o` is just the counter value. Priority is
reset > load > shift.

## How long the sequence is

This section matters most when deciding whether to trust the generator.

The default polynomial is not primitive. Over GF(2),
`1 + X^16 + X^32 = (1 + X + X^2)^16`, and `1 + X + X^2` has order 3, so the
order of the polynomial is `3 * 16 = 48`. **Every state of the 32-bit LFSR
recurs after 48 clocks, whatever the seed**, and random seeds show exactly
that period. In general, for `N = 4j` the polynomial `1 + X^(2j) + X^(4j)` is
the square of `1 + X^j + X^(2j)`, so every size whose width is a multiple of
four is far from maximal length. The 6-bit example `1 + X^3 + X^6` is
irreducible but divides `X^9 + 1`, so its period is 9, not 63.

The counter is what makes the output long. The output word at clock t is
`L(t) ^ C(t)`. It repeats only when both the LFSR and the counter repeat, so
the output period is `lcm(LFSR period, 2^N)`. That is at most `3 * 2^32`
words at N = 32, and never less than 2^N, whatever the seed. The output
is therefore a counter lightly scrambled by a short periodic mask, not a
cryptographically strong sequence. To get a long LFSR sequence by itself,
choose N and TAP so that `1 + X^TAP + X^N` is primitive (for example N = 7,
TAP = 3 or 4, period 127, which the LFSR testbench measures). The RTL
accepts any such pair.

## Counter and output stage

`parallel_counter` is a plain modulo-2^N up counter. It visits
0, 1, ..., 2^N-1, 0, ... and advances on every clock with no enable. Reset
returns it to 0. A seed load does not touch it.

`prn_combiner` registers `lfsr ^ count`. Both words are used in full: the
"select" stage between each source and the XOR passes all N bits, so it
exists only as wiring in the top level.

## Interface and timing of `advance_lfsr`

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | clock, rising edge |
| `reset`      | in  | 1     | synchronous, active high; clears LFSR, counter and output |
| `loadseed_i` | in  | 1     | synchronous seed load into the LFSR |
| `seed_i`     | in  | N     | seed |
| `number_o`   | out | N     | pseudo-random word, straight from flip-flops |

At N = 32 the generator has 67 I/O pins: 32 + 32 + 3.

The generator makes one new word per clock, with one clock of latency: the
value on `number_o` after edge k+1 is `LFSR ^ counter` as they stood after
edge k. Example, with N = 32 and seed `0x8000_0000` loaded right after reset:

| after edge | LFSR          | counter | number_o      |
|------------|---------------|---------|---------------|
| reset      | `0000_0000`   | 0       | `0000_0000`   |
| load       | `8000_0000`   | 1       | `0000_0000`   |
| +1         | `0000_0001`   | 2       | `8000_0001`   |
| +2         | `0000_0002`   | 3       | `0000_0003`   |
| +3         | `0000_0004`   | 4       | `0000_0001`   |

## Parameters

| module | parameter | default | notes |
|--------|-----------|---------|-------|
| all    | `N`       | `advance_lfsr_pkg::PRNG_WIDTH` = 32 | word width of LFSR, counter and output |
| `parallel_lfsr`, `advance_lfsr` | `TAP` | `N/2` | inner feedback tap; for odd N use `N/2` or `N/2+1` |

## What is specified and what is chosen here

Taken from the reference design:

* the block structure: LFSR plus counter, XORed, one clock;
* the polynomial form `1 + X^(N/2) + X^N` with one fixed XOR;
* the LSB-to-MSB shift direction;
* the 32-bit width and the port names;
* synchronous reset;
* the register budget: 32 + 32 + 32 flip-flops.

Chosen here, because the reference leaves them open:

* the reset values (all zeros);
* the reset > load > shift priority;
* the counter runs on during a seed load and is not reset by it;
* the one-clock output latency (output registered from the two register
  outputs);
* bit 0 is FF1;
* the floor as the default inner tap for odd N.

Not built: the two "select" stages between the sources and the XOR are
pure wiring, because both full words are combined.

## Files

| file | content |
|------|---------|
| `rtl/advance_lfsr_pkg.sv` | default width |
| `rtl/parallel_lfsr.sv` | the LFSR |
| `rtl/parallel_counter.sv` | the counter |
| `rtl/prn_combiner.sv` | XOR and output register |
| `rtl/advance_lfsr.sv` | top level |
| `tb/prng_ref_pkg.sv` | cycle model of the generator, used by the top-level testbenches |
| `tb/tb_parallel_lfsr.sv` | N = 6 worked example, N = 32 and N = 7 against a bit-sequence model, reset/load priority, N = 7 period |
| `tb/tb_parallel_counter.sv` | 4-bit wrap and 32-bit counting, reset |
| `tb/tb_prn_combiner.sv` | random words, one-clock latency, reset |
| `tb/tb_advance_lfsr.sv` | N = 8 end-to-end: reset, loads, reseed while running, reset over load, feedback, counter wrap; counts each event and fails if one never happens |
| `tb/tb_advance_lfsr_full.sv` | default N = 32: reset, seed `0x8000_0000`, 250,000 clocks against the model, 48-clock LFSR recurrence |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

## Simulating

With Verilator 5 (run from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  --top-module tb_advance_lfsr_full -y rtl -y tb +libext+.sv \
  rtl/advance_lfsr_pkg.sv tb/prng_ref_pkg.sv tb/tb_advance_lfsr_full.sv
./obj_dir/Vtb_advance_lfsr_full
```

For the other testbenches, change the top module and the last file.
`tb/prng_ref_pkg.sv` is needed only by the two `tb_advance_lfsr*` benches.
All of them run in well under a second. The RTL is plain synthesizable
SystemVerilog with no vendor primitives. It lints cleanly with Verilator
`-Wall` and elaborates in Yosys through the slang front end.
