# LUT-SR uniform random number generator

This is a uniform random bit generator for FPGAs. It delivers R fresh random bits on every
clock, R = 8 by default, with a period of 2^127 - 1. It is a linear recurrence over GF(2),
built from three FPGA resources only:

- R output flip-flops;
- one XOR gate per flip-flop, small enough to fit a single LUT;
- one shift register per flip-flop. An FPGA LUT can be configured as a shift register 16 bits
  deep, so most of the state costs no flip-flops.

Software generators such as the Mersenne Twister work on whole words, which maps poorly onto
FPGA fabric. Earlier FPGA-specific generators have their own problems:

- An XOR network over flip-flops alone ("LUT-optimised") has a period limited to
  2^(flip-flops) - 1.
- Adding a block-RAM FIFO gives a long period but uses up block RAM.

The LUT-SR structure sits between the two. The shift registers lengthen the state, and hence the
period, without block RAM and without more flip-flops.

## The ring and the XOR taps

Number the lanes 0..R-1. Lane i has:

- a flip-flop `ff[i]`;
- behind it, a shift register of `LEN[i]` bits, where 0 <= LEN[i] <= K.

The whole state is N = R + sum(LEN) bits. Each clock:

```
shift register of lane i  <=  { ff[i], ... }                      (shifts by one)
ff[i]                     <=  end of shift register of lane CYC[i]
                              ^ (T-1 further taps: other ff outputs or shift-register ends)
dout[i]                    =  ff[OUTP[i]]
```

`CYC` is a single cycle over the lanes. Without the extra XOR taps, the N state bits therefore
form one ring: from a flip-flop, through its shift register, into the next lane's flip-flop,
and so on around all lanes. The extra taps turn this rotation into a linear recurrence of
degree N. `OUTP` is a fixed permutation of the flip-flops onto the output bits.

The critical path is a single XOR level. The output is registered: `dout` is the flip-flop
state itself.

## Choosing a generator: the tuple (N, R, T, K, S)

One generator of the family is selected by five numbers:

| parameter | meaning | default | where the default comes from |
|---|---|---|---|
| `N` | state bits | 127 | own choice (see below) |
| `R` | output bits per clock | 8 | the 8-bit generator of the reference design |
| `T` | XOR gate inputs | 4 | own choice, after the target's 4-input LUTs |
| `K` | maximum shift-register length | 16 | own choice, depth of a 4-input LUT as shift register |
| `S` | free parameter selecting a generator | 89 | found by search (see below) |

`lut_sr_rng` derives all connections from the tuple at elaboration time, in four stages
(function `construct()`):

1. **Initial cycle.** A random single cycle `CYC` over the lanes (Sattolo shuffle).
2. **Cycle extension.** The N-R shift-register bits are dealt out one at a time, each to a
   random lane still shorter than K. This lengthens the ring.
3. **Input taps.** Each XOR gets T-1 random extra inputs. They must be distinct signals, and none
   may be the gate's own cycle input. A zero-length lane's shift-register end is its flip-flop,
   and counts as the same signal.
4. **Output taps.** A random permutation `OUTP` maps the flip-flops onto `dout`.

All random choices come from a 32-bit LCG, x' = 1664525·x + 1013904223 mod 2^32, seeded with S.
A draw below m takes bits [31:8] of the new value, modulo m. The LCG is in `lut_sr_pkg`. The
four-stage outline follows the LUT-SR method. The exact random rules above are this design's
own, so its generators are not the published LUT-SR instances.

**Not every S gives a good generator.** The period is 2^N - 1 only when the characteristic
polynomial of the recurrence is primitive. N = 127 was chosen because it is a Mersenne
exponent (2^127 - 1 is prime). For a Mersenne exponent, primitivity follows from one test:
the sequence of an output bit must have linear complexity N, and its polynomial p must satisfy
x^(2^N) = x mod p. The benches run this test on every output bit. N = 127 is also above the
usual minimum period of 2^64 - 1, and within the limit R·(K+1) = 136 state bits for R = 8,
K = 16.

Tuples verified this way:

| N | R | T | K | S | period |
|---|---|---|---|---|---|
| 127 | 8 | 4 | 16 | 89 | 2^127 - 1 (default) |
| 1279 | 80 | 4 | 16 | 3427 | 2^1279 - 1 |
| 607 | 40 | 4 | 16 | 646 | 2^607 - 1 |
| 127 | 64 | 4 | 16 | 912 | 2^127 - 1 |
| 89 | 16 | 4 | 16 | 287 | 2^89 - 1 |
| 61 | 8 | 4 | 16 | 241 | 2^61 - 1 |

To use another tuple, keep N a Mersenne exponent (61, 89, 107, 127, 521, 607, 1279, ...) with
R < N <= R·(K+1). Then try values of S until the period test of `tb/lut_sr_rng_checks.svh`
passes. A bench like `tb/tb_lut_sr_rng_r64.sv` with your tuple does this. Wide generators with
many zero-length lanes fail more often, because their recurrence matrix tends to be singular.

Elaborating `construct()` runs about N·R + R·T loop iterations, all at compile time. Tuples
up to N = 1279 elaborate without any special tool options.

## Ports and timing

| port | dir | width | function |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous; sets the flip-flops to 0…01; has priority over `ld` |
| `ld` | in | 1 | load (seeding) mode |
| `din` | in | R | seed bits, one per lane, taken every clock while `ld` is high |
| `dout` | out | R | random word, a new one every clock |

**Seeding.** While `ld` is high:

- each flip-flop takes `din[i]` instead of its XOR output;
- the shift registers keep shifting.

Each lane is therefore filled serially from its own `din` bit. After K+1 = 17 load clocks, the
whole state is set by the last 17 `din` words, whatever was in it before. A loaded word shows
on `dout`, through the output permutation, one clock later. An assertion in the module checks
this. Drop `ld` and the generator runs.

**Reset.** `rst` does not touch the shift registers: LUT shift registers on FPGAs have no reset.
After `rst` alone the state is non-zero, so the generator never locks up. The stream is only
repeatable after a load. An all-zero seed gives an all-zero stream, like any linear generator,
so seed with a non-zero word.

## Evidence

`tb/tb_lut_sr_rng.sv` runs the default generator end to end. `tb/tb_lut_sr_rng_r64.sv` runs the
64-output member, and `tb/tb_lut_sr_rng_long.sv` the 1279-bit, 80-output member. All three
treat the generator as a black box and check:

- **reset**: one clock of `rst` leaves one output bit set, also while `ld` is high;
- **output permutation**: learned from one-hot loads; it must be a bijection;
- **load latency**: every loaded word is visible one clock later;
- **seeding depth**: K+1 load clocks fully determine the stream;
- **linearity**: stream(X ⊕ Y) = stream(X) ⊕ stream(Y), and the zero seed gives zero;
- **period**: Berlekamp–Massey finds linear complexity N on every output bit, and the
  polynomial is primitive;
- **balance**: each output bit is one 45–55 % of the time over 4096 clocks.

`tb/tb_lut_sr_shreg.sv` checks the delay of the shift register at lengths 16, 5 and 1.

These checks say nothing about statistical quality beyond the period and the balance. The
generator is linear, so it must not be used for cryptography.

## Departures and open points

- The connection rules of the construction are this design's own (see above). The stage names
  and the five parameters follow the LUT-SR method.
- The reference 8-bit generator reports 22 flip-flops and 22 4-input LUTs on its device, and
  shows its 8-bit generator as two sub-instances. How those numbers arise is not explained, and
  this RTL does not try to match them.
- Each lane's XOR, load multiplexer and seed input need T + 2 = 6 inputs. On a 4-input-LUT
  device that is more than one LUT per lane. Choose T = 2 if one LUT per lane matters more than
  mixing.
- The earlier generator styles (XOR network over flip-flops only, and the block-RAM FIFO
  variant) serve only as comparisons and are not included.

## Files and simulation

| file | content |
|---|---|
| `rtl/lut_sr_pkg.sv` | pseudo-random source of the construction |
| `rtl/lut_sr_shreg.sv` | fixed-length lane shift register (maps to a LUT shift register) |
| `rtl/lut_sr_rng.sv` | the generator; its construction; top level |
| `tb/lut_sr_rng_checks.svh` | shared checks of the generator benches |
| `tb/tb_lut_sr_rng.sv` | default generator, end to end |
| `tb/tb_lut_sr_rng_r64.sv` | 64-output member |
| `tb/tb_lut_sr_rng_long.sv` | 1279-bit, 80-output member (about 20 s) |
| `tb/tb_lut_sr_shreg.sv` | shift register |

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lut_sr_pkg.sv rtl/lut_sr_shreg.sv rtl/lut_sr_rng.sv tb/tb_lut_sr_rng.sv \
    --top tb_lut_sr_rng -Mdir obj
./obj/Vtb_lut_sr_rng
```

Each bench ends by printing `TB_RESULT checks=<n> failures=<m>`. The default bench finishes in
well under a second.
