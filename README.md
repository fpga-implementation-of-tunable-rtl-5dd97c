# Tunable arbitrary-sequencer key generator

This design produces a stream of 8-bit keys for a cipher. It does not rely on one
random-number generator. Eight small generators of different kinds run side by side,
and a 3-bit LFSR picks which one supplies the key in each clock cycle. An observer
who learns one generator's sequence still has to know which generator is being used
in each cycle.

The eight generators are:

- a true-random source from the jitter between two ring oscillators;
- a table of stored values in block memory;
- five 8-bit LFSR variants;
- a 4-bit LFSR whose feedback polynomial changes while it runs.

The structure follows the published paper "FPGA Implementation of Tunable Arbitrary
Sequencer for Key Generation Mechanism" (Tejeswi, Murali Krishna, Siva Kumar). The
choices made where that description is silent or inconsistent are listed under
*Departures and open points*.

**A word on security.** Seven of the eight generators are LFSRs or a fixed table, and
the select sequence is itself an LFSR with period 7. Once the seeds are known, every
key except the jitter source is fully predictable. The jitter source is never chosen
as the key (see below). Treat this design as a study of cheap key-stream structures
on an FPGA, not as a cryptographically secure generator.

## Block diagram

```
                 +-------------------+
  osc_en ------->| ring_oscillator A |--j1--+
          |      +-------------------+      |  +------------+
          |      +-------------------+      +->| jitter_rng |--[0]--+
          +----->| ring_oscillator B |--j2---->|            |       |
                 +-------------------+         +------------+       |
                                     bram_rng ---------------[1]--+ |
                                     lfsr_rng ---------------[2]--+ |   +---------+
                                  galois_lfsr ---------------[3]--+-+-->| key_mux |--> key
                               fibonacci_lfsr ---------------[4]--+     |  8:1    |
                            combined_lfsr_xor ---------------[5]--+     +----^----+
                                      lp_lfsr ---------------[6]--+          |
     lfsr_rng[1:0] --tap_sel--> rtp_lfsr (4 bit, zero-ext.) --[7]-+          | sel
                                                   sel_lfsr3 ----------------+
```

Every generator is clocked by `clk` and has a synchronous active-high reset that
reloads its seed. The two exceptions are the jitter generator's oscillator-domain
flops and the oscillators themselves.

## The generators and their method codes

The method code is the value on the multiplexer select (`keygen_pkg::method_e`).
"Flop k" means bit k-1 of the generator's output. Flop 1 always receives the
feedback, and flop k shifts into flop k+1.

| code | module | structure | default seed |
|---|---|---|---|
| 000 | `jitter_rng` | 8-bit counter clocked by oscillator B. It is cleared when oscillator A, sampled by B, reads 1. | reset to 0 |
| 001 | `bram_rng` | 16 x 8 ROM read out in order, one word per clock, with a registered read | table in `rtl/bram_rng_init.hex` |
| 010 | `lfsr_rng` | flop1 <= flop4 ^ flop5 ^ flop6 ^ flop8, built as a single XOR | 227 |
| 011 | `galois_lfsr` | flop1 <= flop8, and flops 5, 6, 7 <= left neighbour ^ flop8 | 255 |
| 100 | `fibonacci_lfsr` | flop1 <= ((flop8 ^ flop6) ^ flop5) ^ flop4, built as a chain of 2-input XORs | 255 |
| 101 | `combined_lfsr_xor` | 7-bit LFSR with flop1 <= flop1 ^ flop7. Bit 8 is the XOR of all seven flops. | 127 (7 bits) |
| 110 | `lp_lfsr` | flop1 <= flop7 ^ flop8. Each flop is clocked only when its value changes. | 255 |
| 111 | `rtp_lfsr` | 4-bit ring whose tap pair is chosen at run time | 15 |

The LFSR, Galois and Fibonacci generators all implement x^8+x^6+x^5+x^4+1, which is
primitive, so each has period 255. The LFSR and Fibonacci generators have the same
next-state function. They differ only in how the XOR is built and in their seeds,
which makes their outputs different sequences. The Galois generator started from
255 produces 255, 143, 111, 222, 205, 235, 167, 63, 126, 252, 137, 99, 198, 253, 139,
... This is exactly the sequence of the published simulation, and the tests check
it.

The combined generator's 7-bit LFSR is x^7+x+1 (period 127). The low-power LFSR's
x^8+x^7+1 is not primitive, so its period is shorter than 255. Both polynomials are
kept as published.

## How the select hops

`sel_lfsr3` holds three flops. Flop 1 receives flop2 ^ flop3, and
`sel = {flop1, flop2, flop3}`. From the seed 001 it runs 1, 4, 2, 5, 6, 7, 3 and then
repeats. The key sequence therefore cycles through methods BRAM, Fibonacci, LFSR,
combined, low-power, run-time polynomial and Galois. Each generator keeps running
whether or not it is selected. The value a method contributes therefore depends on
how many clocks have passed, not on how often it was chosen.

A 3-bit LFSR never produces 000, so **the jitter generator is never selected as the
key**. It still runs, and its value is visible on `method_rnd[0]`. The original
description assigns code 000 to the jitter method and also says the select comes from
a 3-bit LFSR. The two statements cannot both hold. This design keeps both, so the
limitation is visible.

## The jitter generator

This is the only part whose output cannot be predicted, and the only part with more
than one clock.

- **Ring oscillators.** `ring_oscillator` is a behavioural model of an odd inverter
  ring (three stages by default). While `en` is high it toggles every
  STAGES x STAGE_DELAY_PS picoseconds, plus 0 to JITTER_PS picoseconds of
  pseudo-random jitter per half period. In the top module, oscillator A uses
  480 ps per stage and oscillator B uses 500 ps per stage. A is therefore slightly
  faster, and the two drift past each other at a beat rate of about 1/25 of B's
  frequency. On an FPGA the rings are LUT chains kept from optimisation, and their
  frequencies come from placement. The model is simulation-only: it uses delays. A
  synthesis tool reports its toggle as a combinational loop, which is the oscillator
  itself.
- **Sampler and counter.** `jitter_rng` captures j1 in a flop clocked by j2. Its
  8-bit counter is also clocked by j2. The counter counts B periods while the sample
  is 0 and clears when the sample is 1. The counter value is the random number. It
  therefore measures how long the two oscillators stayed in phase, which shifts with
  every jitter event.
- **Crossing into `clk`.** Each counter bit passes through two `clk` flops
  (SYNC_STAGES). The counter bits are not Gray-coded, so a sample taken while bits
  change may mix the old and new values. That is acceptable for a random value but
  should be kept in mind before reusing the block for anything else.
- **Reset.** `rst` clears the j2-domain flops asynchronously, because j2 may be
  stopped while reset is applied. Everything else in the design resets
  synchronously. A simulation must give `rst` a rising edge, not just start it
  at 1.

## The low-power LFSR

`lp_lfsr` uses the gating condition of its published circuit: a flop receives a clock
edge only when its D input differs from its Q output, because an edge that would not
change the flop only costs power. This design does not build eight gated clock nets.
It gives each flop a clock enable `clk_en[k] = D[k] ^ Q[k]`, which FPGA tools map
onto the flop's enable pin. The sequence is identical to the ungated register.
`clk_en` is an output, so the saving can be measured. In the end-to-end test, nearly
every cycle holds at least one flop.

## The run-time polynomial LFSR

`rtp_lfsr` is a 4-bit ring 1 -> 2 -> 3 -> 4 -> 1. `tap_sel` names a pair of adjacent
flops. Their XOR replaces the plain shift into the flop that follows the pair:

| tap_sel | taps | changed input |
|---|---|---|
| 00 | 1 & 2 | flop3 <= flop1 ^ flop2 |
| 01 | 2 & 3 | flop4 <= flop2 ^ flop3 |
| 10 | 3 & 4 | flop1 <= flop3 ^ flop4 |
| 11 | 4 & 1 | flop2 <= flop4 ^ flop1 |

Each configuration is an invertible linear map, so a non-zero state can never fall
into the all-zero lock-up state, however the select changes. In the top module,
`tap_sel` is driven by the two low bits of `lfsr_rng`. The polynomial therefore
changes pseudo-randomly every clock. The 4-bit value is zero-extended to 8 bits at
the multiplexer.

## Top-level interface (`tunable_key_gen`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | system clock |
| `rst` | in | 1 | active high. Synchronous for the generators, asynchronous for the jitter counter. |
| `osc_en` | in | 1 | runs the two ring oscillators |
| `key` | out | 8 | the key, `method_rnd[sel]`, combinational from registered values |
| `sel` | out | 3 | current method code |
| `method_rnd` | out | 8 x 8 | every generator's current word, indexed by method code |
| `lp_clk_en` | out | 8 | per-flop clock enables of the low-power LFSR |
| `jitter_q` | out | 1 | sampling flop of the jitter generator |

Parameters: `ROSC_A_DELAY_PS = 480` and `ROSC_B_DELAY_PS = 500`, the stage delays of
the two oscillator models. The key changes every clock. After reset is released, the
first key comes from method 1 (BRAM), whose output register still holds 0 at that
point. The block memory has one clock of read latency, so table word 0 appears one
clock after reset.

## Departures and open points

- **Method codes.** The original text assigns 011 and 100 inconsistently. One list
  says 011 Fibonacci and 100 Galois. The sections on the two generators and the
  multiplexer drawing say 011 Galois and 100 Fibonacci, and this design follows
  them. One sentence also gives 010 to the block memory, but elsewhere 010 is the
  LFSR and 001 the block memory, which is followed here. The published top-level
  waveform matches neither list: there, for example, the jitter counter is chosen
  as the key in some cycles.
- **Published waveforms not reproduced.** The sequences shown for the LFSR,
  Fibonacci and combined generators do not match the structures drawn and described
  for them. For example, the Fibonacci waveform follows taps 4, 5, 7, 8. This design
  follows the drawn structures. The Galois sequence and the select sequence do
  match, and the tests check them.
- **Block-memory contents.** The original memory was produced by a vendor memory
  generator with unpublished contents and depth. This design uses 16 words: the
  legible values of a published simulation trace. `DEPTH` and `INIT_FILE` can be
  changed.
- **Run-time polynomial width.** A 4-bit LFSR, as described in the text. One
  published trace shows an 8-bit value for this method.
- **Jitter sampler.** One sentence of the original mentions an XOR of the two
  oscillator outputs. The drawing has none, and none is built.
- **Combined LFSR/XOR.** The original says this generator needs "at least two
  seeds". Only the 7-bit LFSR needs one, and that is the only seed held.
- **Not included.** The cipher that would consume the key, and any FPGA
  constraints needed to place the ring oscillators.

## Files

- `rtl/keygen_pkg.sv`: widths, `key_t`, and the method-code enum.
- `rtl/<module>.sv`: one module per file, as named above. `tunable_key_gen` is the
  top.
- `rtl/bram_rng_init.hex`: the 16 stored values, one hex byte per line.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Run from the repository root, because `bram_rng` loads `rtl/bram_rng_init.hex` by a
path relative to it:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/keygen_pkg.sv tb/tb_tunable_key_gen.sv --top-module tb_tunable_key_gen
./obj_dir/Vtb_tunable_key_gen
```

Replace the testbench name to run any other test. What the tests check:

- The end-to-end test runs the top at its default parameters for 3000 clocks. Every
  clock, it compares the select, every deterministic generator and the key with
  independent models.
- It also checks the first 15 clocks against the published select and Galois
  sequences.
- It counts the mechanisms and fails if any never occurs: each of the seven
  reachable methods chosen as the key, all four tap pairs, clock gating, memory
  wrap-around, and jitter activity.
- Each unit test checks its block against its own reference model, and checks the
  period where the polynomial is primitive.
- The jitter test drives j1 and j2 on interleaved picosecond grids, so a sample is
  never ambiguous.
