# FF-APUF: a flip-flop based arbiter PUF

A physical unclonable function (PUF) turns the random, chip-specific spread
of transistor and wire delays into a digital fingerprint: the same challenge
gives a different response on every chip, and the chip itself cannot be
copied. An arbiter PUF races one edge down two nominally identical delay paths
and lets an arbiter record which path won. The challenge bits choose, stage
by stage, which pieces of delay make up each path.

In a classic arbiter PUF each stage is a pair of 2:1 muxes that go straight
through or cross over. On an FPGA this works poorly: the routing cannot be
balanced by hand, and muxes built from LUTs differ little between chips. The
flip-flop arbiter PUF (FF-APUF) described here changes what a stage is. A
stage of one path is one FPGA slice. It holds four flip-flops that are all
clocked by the incoming edge, plus a 3-mux tree that forwards the output of
one of them as the clock of the next stage. A flip-flop's clock-to-Q delay
varies far more from chip to chip than a mux delay does. Each stage also
offers four delay choices per path instead of two. The design keeps the
classic cross-coupled NAND arbiter at the end.

This repository holds synthesizable SystemVerilog for the complete evaluation
design:

- the 64-bit, 64-stage PUF array;
- a controller that runs one evaluation from a 100 MHz clock;
- a 115,200 bit/s UART link that a host PC uses to send challenges and read
  responses.

It also holds a simulation delay model, so that the race can be simulated,
and self-checking testbenches.

## One response bit

```
            stage 1           stage 2                stage n
START --+-> [4 FF + 3 mux] -> [4 FF + 3 mux] -> ... -> [4 FF + 3 mux] --Q^U--> NAND latch --> R (Z0)
        |   C0 / C1           C2 / C3                C2n-2 / C2n-1           ^
        +-> [4 FF + 3 mux] -> [4 FF + 3 mux] -> ... -> [4 FF + 3 mux] --Q^L----+
            C2n-1 / C2n-2     C2n-3 / C2n-4          C1 / C0
CLEAR ----> every flip-flop
```

`ffapuf_cell` builds one bit from an upper and a lower chain of `N_STAGES`
slices (`ffapuf_slice`):

- **Slice.** Four flip-flops have D tied to 1 and an asynchronous clear from
  CLEAR. They share one clock: START for the first slice, the previous
  slice's output after that. One rising edge therefore sets all four, each
  after its own delay. Two first-level muxes pick within the pairs FF0/FF1
  and FF2/FF3; both are steered by the slice's low select bit. A
  second-level mux picks the pair with the high select bit. A select of 0
  takes the lower-numbered flip-flop.
- **Challenge wiring.** A challenge has `2*N_STAGES` bits (128 by default).
  Upper stage `s` (counting from 0) uses `C[2s]` for its first-level muxes
  and `C[2s+1]` for its second-level mux. The lower chain reads the challenge
  in the opposite order: stage `s` uses `C[2n-1-2s]` and `C[2n-2-2s]`. So the
  same bit sits near START in one path and near the arbiter in the other.
- **Arbiter.** `nand_arbiter` computes `Z0 = NAND(Q^U, Z1)` and
  `Z1 = NAND(Q^L, Z0)`. After CLEAR both path ends are low and both outputs
  are high. The first end to rise pulls its own output low, and that output
  then holds the other gate high. The response is `Z0`: **0 when the upper
  path is faster, 1 when the lower path is faster.**

So the path delay is additive. If `d(cell, chain, s, k)` is the delay of
flip-flop `k` of stage `s`, then

```
T^U = sum_s d(cell, upper, s, 2*C[2s+1]     + C[2s])
T^L = sum_s d(cell, lower, s, 2*C[2n-2-2s]  + C[2n-1-2s])
R   = (T^U < T^L) ? 0 : 1
```

A stage of one path has 4 delay choices and the pair of paths has 16 per
stage, against 2 for a classic arbiter stage. That is why the design is
harder to model than a classic arbiter PUF, but it stays an additive delay
model.

`ffapuf_array` repeats the cell `N_BITS` times (64 by default). All cells get
the same challenge, CLEAR and START. They share no delay path, so the
response bits do not depend on each other by design.

## Simulating process variation

The RTL has no way to know a chip's real delays. For simulation, each
flip-flop output passes through a `#` delay that stands for that flip-flop's
clock-to-Q delay plus the route behind it. These delays come from
`ffapuf_pkg::seg_delay_ps(seed, cell, stage, chain, ff)`. It hashes the
device seed and the position of the flip-flop into a delay of
400 ps ± 32 ps. Muxes have zero delay. Changing `DEVICE_SEED` on
`ffapuf_top` (or `ffapuf_array`) gives a different simulated chip; the same
seed always gives the same chip.

The numbers are made up. The model reproduces the mechanism (a race decided
by per-flip-flop delay spread). It does not reproduce measured uniqueness,
reliability or entropy: no noise, no systematic layout bias, no
temperature or voltage.

Two details matter for a two-state simulator:

- Every segment delay is an even number of picoseconds. The lower path gets
  one more picosecond (`TIE_SKEW_PS`) in front of the arbiter. The upper
  total is then always even and the lower total always odd, so an exact tie
  cannot happen. In a zero-delay latch a tie would oscillate and never
  settle. On silicon a near-tie is a metastable or noisy bit instead.
- Synthesis ignores all `#` delays. On an FPGA the delays are whatever
  placement and silicon give. The four flip-flops of a slice look identical
  to a synthesis tool. They must be kept apart and placed together in one
  slice with balanced routing. The flip-flops carry `keep`/`dont_touch`
  attributes so that synthesis does not merge them. The placement and
  routing constraints are vendor-specific and not part of this RTL.

The NAND latch is a deliberate combinational loop, and lint and synthesis
tools report it as one. The `clear` net is used as an asynchronous clear in
the array and is also read by an assertion in the controller; lint reports
that as a net used both ways.

## One evaluation

`puf_controller` runs from the 100 MHz clock:

| cycle after `go` | action |
|---|---|
| 1–2 | CLEAR high (`CLEAR_CYCLES` = 2): every PUF flip-flop cleared |
| 3 | CLEAR low, START still low |
| 4 | START rises: the race starts in all 64 cells |
| 4–19 | wait `SETTLE_CYCLES` = 16; a two-flop synchroniser follows the response |
| 20 | response captured, `done` pulses, START falls |

`done` comes `CLEAR_CYCLES + SETTLE_CYCLES + 2` cycles after `go`. A race
over 64 stages takes about 26 ns, under 3 cycles. The 16 cycles leave a wide
margin for the slowest cell and the synchroniser. The falling edge of START
does nothing: only rising clock edges matter to the PUF flip-flops. An
assertion checks that CLEAR and START are never high together.

## Host link

`uart_rx` and `uart_tx` run an 8N1 serial link. `CLKS_PER_BIT` is
`CLK_HZ/BAUD` rounded to the nearest integer: 868 cycles at 100 MHz and
115,200 bit/s. `host_if` uses a minimal protocol:

1. The host sends the challenge as 16 bytes, least significant byte first
   (byte 0 is `C[7:0]`).
2. After the 16th byte the design evaluates once.
3. It sends the 64-bit response as 8 bytes, least significant byte first.

There are no command bytes, no framing and no error reporting. Bytes that
arrive while a response is being evaluated or sent are dropped. One
challenge/response pair takes 24 UART frames, about 2.1 ms. Repeating a
challenge, averaging responses and computing metrics are left to the host.

## Files

| file | contents |
|---|---|
| `rtl/ffapuf_pkg.sv` | sizes, delay model, challenge-to-stage wiring |
| `rtl/ffapuf_slice.sv` | one stage: 4 flip-flops + 3 muxes |
| `rtl/nand_arbiter.sv` | cross-coupled NAND arbiter |
| `rtl/ffapuf_cell.sv` | one response bit: two chains + arbiter |
| `rtl/ffapuf_array.sv` | N-bit PUF |
| `rtl/puf_controller.sv` | CLEAR/START sequencing, response capture |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv` | serial link |
| `rtl/host_if.sv` | challenge/response byte protocol |
| `rtl/ffapuf_top.sv` | the whole design |
| `tb/ffapuf_ref_pkg.sv` | reference model of the race (the sums above) |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `ffapuf_population_tb` |

Top-level parameters: `N_BITS` (64), `N_STAGES` (64), `DEVICE_SEED` (1),
`CLK_HZ` (100,000,000), `BAUD` (115,200), `SETTLE_CYCLES` (16). If you
raise `N_STAGES` a lot, raise `SETTLE_CYCLES` as well: it must cover about
0.45 ns per stage plus two cycles.

## Simulating

All files use `timeunit 1ps`. The testbenches need Verilator's timing
support. For example:

```
verilator --binary --timing --assert -y rtl -y tb -Irtl -Itb \
    rtl/ffapuf_pkg.sv tb/ffapuf_top_tb.sv --top-module ffapuf_top_tb
./obj_dir/Vffapuf_top_tb
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself (it
also has a watchdog). What each one shows:

- `ffapuf_slice_tb`: with known delays, the edge leaves after exactly the
  selected flip-flop's delay, for all four selections. One edge sets all
  four flip-flops, and CLEAR clears them.
- `nand_arbiter_tb`: 200 random races; the first input to rise wins and the
  decision holds.
- `ffapuf_cell_tb`: a full 64-stage cell. `Q^U` and `Q^L` arrive at exactly
  the reference sums, and the response names the faster path. It uses random
  challenges and challenges one bit away from a base.
- `ffapuf_array_tb`: a 16 × 16 array matches the reference bit by bit.
- `puf_controller_tb`, `uart_rx_tb`, `uart_tx_tb`, `host_if_tb`: sequencing,
  latency, framing, byte order, handshakes.
- `ffapuf_top_tb`: end to end over the UART, with an 8-bit, 8-stage array and
  a fast link. It sends 29 challenges, including a subset at Hamming
  distance 1, and compares every response with the reference. It checks that
  every mechanism happened at least once: bytes in, CLEAR, START, bytes out,
  response bits of both values, and a response changed by one flipped
  challenge bit.
- `ffapuf_population_tb`: 22 simulated chips (4 bits × 2 stages each) get
  all 16 challenges. Each chip must match the reference. The test then
  computes uniqueness (mean pairwise Hamming distance) and per-bit
  min-entropy over the population and prints them. These figures describe
  the invented delay model, not silicon.

**Sizes simulated.** A single response cell runs at the full 64 stages.
The array runs at 16 × 16, and the whole design at 8 bits × 8 stages. The
full 64 × 64 design was not simulated. It has 8192 slices, each with its own
delay parameters, and Verilator spends far too long compiling a model of
that size. The slow part is the number of separately clocked flip-flops
and per-instance delays, not the design's logic. Build time grows faster
than linearly with the number of slices: 128 slices build in about half a
minute, 1408 slices in about ten minutes.

## Where this design makes its own choices

- **Challenge length.** Here a stage uses two challenge bits, and the two
  first-level muxes of a slice share one. That gives a 128-bit challenge for
  64 stages, following the slice's wiring and the delay-model equations. One
  statement of the original design instead counts three challenge bits per
  stage (192 bits for 64 stages, one per mux). That variant is not built.
  It would need a third select input per slice and a different wiring in
  `ffapuf_cell`.
- **Select order inside a slice.** Here the first-level muxes take the lower
  challenge bit of the stage. Written out term by term, the delay equation
  can also be read the other way round. The difference only relabels which
  flip-flop is which delay.
- **Mux polarity, pulse lengths, settling time, synchroniser, reset, UART
  format and host protocol** were not specified and are this design's
  choices, as listed above.
- **Delays** exist only for simulation and are invented (see above).
- **Four flip-flops per stage** is fixed in `ffapuf_slice`. A suggested way
  to resist modelling attacks further is to put more flip-flops in each
  stage. That would need a wider mux tree and more challenge bits per stage;
  it is not parameterised here. The XOR, feed-forward and challenge
  obfuscation extensions mentioned for arbiter PUFs are not built either.
- Only the proposed FF-APUF is built. The classic arbiter PUF that it is
  compared against is not included.
