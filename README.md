# Stochastic-bitstream Bayesian machine for robot obstacle avoidance

This RTL computes exact Bayesian inference with stochastic computing. A
probability is not stored as a binary number. It is carried as a stream of
bits, and the fraction of ones in the stream is the value. On independent
streams, one AND gate multiplies two probabilities, and an OR gate with a
small memory adds them. Evaluating the sums and products of a Bayesian
posterior then takes a few thousand gates, all working in parallel. The price is
time: the precision of the answer grows with the stream length, so a
better answer needs more clock cycles. No division is ever done. The machine
leaves the posterior unnormalised, and the reader of the result divides by
the sum.

The machine here solves an obstacle-avoidance problem for a mobile robot. Three
infrared and three ultrasonic sensors give uncertain readings of the distance
to obstacles. The machine returns a probability distribution over five
rotation velocities: full left, half left, none, half right and full right.

## The inference it computes

The variables are:
- `V`, the rotation velocity, with 5 values;
- `D0..D2`, the distance to an obstacle in each of three directions: close,
  medium or far;
- `IRj` and `USj`, the infrared and ultrasonic readings for direction `j`,
  each with 3 levels.

The joint model is

    P(V, D, IR, US) = P(D0) P(D1) P(D2) · P(V | D0 D1 D2) · Π_j P(IRj | Dj) P(USj | Dj)

The sensors are not observed exactly. Each one supplies *soft evidence*, a
distribution P~(IRj) or P~(USj) over its 3 levels. Each of the five outputs is
the unnormalised posterior

    q(m) = Σ_{d0,d1,d2} P(V=m | d0 d1 d2) · Π_j P(Dj=dj) · Eir_j(dj) · Eus_j(dj)
    Eir_j(d) = Σ_x P~(IRj=x) · P(IRj=x | Dj=d)        (Eus_j likewise)

and P(V=m | evidence) = q(m) / Σ q.

The model needs exactly 216 probabilities. Each one is a 32-bit word in the
input memory, at the addresses below (these constants are in `bm_pkg`):

| words     | contents               | address within the group |
|-----------|------------------------|--------------------------|
| 0–134     | P(V=m \| d0 d1 d2)     | m·27 + d0·9 + d1·3 + d2  |
| 135–143   | P(Dj=d)                | j·3 + d                  |
| 144–170   | P(IRj=x \| Dj=d)       | j·9 + d·3 + x            |
| 171–197   | P(USj=x \| Dj=d)       | j·9 + d·3 + x            |
| 198–206   | soft evidence P~(IRj=x)| j·3 + x                  |
| 207–215   | soft evidence P~(USj=x)| j·3 + x                  |

A word `w` stands for the probability `w / 2^32`.

The sizes follow the published design: 216 inputs, 5 outputs, 32-bit words,
3 + 3 sensors and 3 distance levels. The factorisation above is a
reconstruction. It is the natural model with these variables, and it needs
exactly 216 parameters. The original computation tree, however, was
generated by a Bayesian-programming toolchain and was not published. That
tree was reported as about 2500 components and 2665 operations. The tree
here is smaller, because it nests the sums as far as the factorisation
allows. Both give the same q(m). If you have the original model, only
`bm_branch` and the address constants in `bm_pkg` need to change.

## Stochastic arithmetic, and where it is approximate

**Encoding.** `bin2sto` compares a 32-bit LFSR state with the input word each
clock and emits `state < word`. The LFSR polynomial is x^32+x^22+x^2+x+1. Its
state runs through all nonzero values, so the density of ones is
(w−1)/(2^32−1), which is within 2^-32 of w/2^32. Every one of the 216 inputs
has its own LFSR. Products must multiply independent streams, and sharing a
random source would correlate them. The 216 seeds are the base seed XOR a
fixed hash of the converter index. Writing a new base seed therefore gives a
new set of streams, and writing the same seed again reproduces the same run
bit for bit.

**Multiplication** (`sc_mult`) is an AND gate. For independent streams it is
exact in expectation. In `bm_branch` every product combines streams from
different converters, or sums built from different converters, so the
streams are independent.

**Addition** (`sc_orplus`, "OR+") is the subtle part. An OR gate outputs
a + b − ab, not a + b: when two inputs are 1 in the same clock, one of the
ones is lost. A multiplexer adder avoids that loss but scales the result by
1/N. OR+ instead keeps a counter of surplus ones:

    total = popcount(inputs) + pend
    y     = (total != 0)
    pend <= min(total − y, 2^PEND_W − 1)

A surplus one is thus emitted later, in a clock where no input is 1. The sum
is exact as long as the counter does not saturate. That holds when the summed
densities are well below 1, and the unnormalised probabilities of a Bayesian
machine are small. With N = 2 and PEND_W = 1 this is the classic one-bit
OR+ cell. Inside the machine, the 3-term evidence sums use a 2-bit counter
and the 27-term marginal sum uses a 4-bit counter. These are this design's
choices, as is the N-input counter form itself. If the counter saturates,
ones are dropped and the sum reads low. The OR+ memories update only on
clocks in which the input bits are valid, and they are cleared at the start
of each run.

**Counting.** `sto2bin` is a 32-bit up-counter per output. After L bits,
count(m)/L estimates q(m). Its standard error is about √(q/L), so each
tenfold gain in precision costs a hundredfold longer stream.

## Datapath and run sequence

    in_mem 216×32 ──► bin2sto_bank (216 LFSR converters) ──216 streams──►
    bayes_machine (5 × bm_branch) ──5 streams──► 5 × sto2bin ──5×32──► out_mem 5×32
                       ▲                 ▲                ▲
                       └──────────── ctrl_reg ────────────┘

`bayes_machine` holds five identical copies of the circuit, one per
velocity value. Each copy has its own evidence sums. Between the converter
registers and the counters, the path is combinational apart from the OR+
memories.

`ctrl_reg` sequences a run:

| state | clocks | action                                                            |
|-------|--------|-------------------------------------------------------------------|
| LOAD  | 1      | seed all LFSRs, clear counters and OR+ memories                   |
| RUN   | LENGTH | converters produce one bit per stream per clock                   |
| DRAIN | 1      | the last bits leave the converter registers                       |
| STORE | 1      | the five counts are copied into `out_mem`, and `done` is set      |

The accumulate enable is the generate enable delayed by one clock, so
exactly LENGTH bits are counted. A run takes LENGTH + 3 clocks, counted
from the clock after the start write. At 25 MHz a 10^6-bit run takes 40 ms.
Because the length is set per run, a user can trade time for accuracy from
one inference to the next. Runs of up to 2^32−1 bits are possible, which
covers the 10^9-bit runs used to characterise the original design.

### Host bus (`bm_top` ports)

The bus transfers one word per clock. Writes are taken at the clock edge
while `we` is high, and `rdata` is combinational from `addr`.

| address       | register                                                  |
|---------------|-----------------------------------------------------------|
| 0x000–0x0D7   | input memory (read/write)                                 |
| 0x100 CTRL    | write bit 0 = 1 to start a run (ignored while busy)       |
| 0x101 SEED    | base seed of all LFSRs                                    |
| 0x102 LENGTH  | stream length in bits                                     |
| 0x103 STATUS  | bit 0 busy, bit 1 done                                    |
| 0x110–0x114   | output counts for V = 0..4 (read only)                    |

SEED and LENGTH are written only while the machine is idle. Input-memory
writes are accepted at any time, and a write during a run affects the
streams from the next clock on. The `busy` and `done` flags are also
brought out as ports.

To run an inference: write the 216 words, then SEED, then LENGTH, then
CTRL = 1. Wait for `done` and read the five counts. Normalise them in
software.

## Accuracy

`tb_bm_kl_sweep` loads one random model and measures the KL divergence of the
normalised output from the exact posterior:

| bits  | KL divergence |
|-------|---------------|
| 10^3  | 4.8e-3        |
| 10^4  | 2.5e-3        |
| 10^5  | 1.3e-4        |
| 10^6  | 1.7e-5        |
| 10^7  | 1.3e-7        |

The trend is close to the one reported for the original robot model, which
was about 1e-4 at 10^6 bits. Exact values depend on the model and on the seed.

## How far it can be trusted

- Every block has a self-checking testbench. The cycle-exact parts are
  checked against reference models written separately in the testbench: the
  LFSR, the converters, the OR+ counter, the counters, the memories and the
  sequencer.
- The machine and the whole system are checked statistically against the
  exact posterior, computed in real arithmetic. Each density must be within
  5σ plus 4 % of its exact value, and the KL divergence must be below 0.01.
  The system tests also check run timing, reproducibility from a seed and
  ignored starts.
- Not verified: the original robot model's parameters, and the published
  table of outputs, which cannot be reproduced without them. Also not
  verified: timing closure at 25 or 50 MHz, and the FPGA resource figures.
  The published design used about 68.8k logic elements, mostly in the 216
  converters. Here too the converters and the 216×32 input register array
  make up most of the flip-flops, about 14.7k in total.

## Departures and choices

- The model factorisation and the computation tree are reconstructed (see
  above).
- These are this design's choices: the LFSR polynomial, the comparator
  converter, the seed scheme, the OR+ counter form and widths, the register
  map, the run sequence and the input memory as a register array. The
  converters read every word on every clock, so the memory cannot be a RAM
  block.
- All 216 probabilities pass through converters, the fixed model parameters
  included. The published block diagram does this, although the text also
  describes the model parameters as hard-coded.

## Files and simulation

`rtl/`:
- `bm_pkg` holds the sizes, the memory layout, the register map and the seed hash.
- The leaf blocks are `sc_lfsr`, `bin2sto`, `bin2sto_bank`, `sc_mult`,
  `sc_orplus`, `bm_branch`, `bayes_machine`, `sto2bin`, `in_mem`, `out_mem`
  and `ctrl_reg`.
- `bm_top` is the top level.

`tb/` has one testbench per block, named `tb_<module>`, plus
`tb_bm_kl_sweep`. Each prints `TB_RESULT checks=N failures=M`. `tb_bm_top`
runs the whole machine at its default size, in a few seconds. The sweep
runs 11 million clocks, in about half a minute.

Run from the repository root:

    verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
        rtl/bm_pkg.sv tb/tb_bm_top.sv --top-module tb_bm_top -o sim
    ./obj_dir/sim

Replace `tb_bm_top` with any other testbench name to run that test.
