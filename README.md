# PUF constructions as synthesizable arrival-time models

A physically unclonable function (PUF) turns tiny manufacturing differences between
otherwise identical gates into a chip-specific bit string. A challenge goes in, and the
response that comes out depends on the delays of that particular die. Most PUFs in use are
built from a few primitives: a delay chain of crossing switches, an arbiter deciding which
of two edges came first, a ring oscillator and a counter, XOR gates, multiplexers and
LFSRs. The PUF families used in practice (XOR arbiter PUFs, feed-forward PUFs, double
arbiter PUFs, RO PUFs, interpose PUFs, lightweight secure PUFs, composites of these) are
different wirings of those primitives.

This repository gives each of those wirings as a SystemVerilog module. The modules follow
one small set of primitive descriptions. Because the behaviour of a real PUF comes from
analog delays, the primitives are written as a **delay model** that both simulates and
synthesizes. Each module instance carries a `SEED` parameter that stands for "which chip
this is". Two instances with different seeds behave like two different dies. The same
instance always answers a challenge the same way: there is no noise model.

All constructions sit side by side in `puf_zoo_top`. Each one has its own ports, and they
share only the clock and reset.

## The arrival-time model

In silicon, the two lines of an arbiter chain carry one rising edge each, and the arbiter
latches whichever edge arrives first. Here a line does not carry a logic level. It carries
the arrival time of that edge, as a 20-bit unsigned integer (`puf_pkg::arr_t`).

- **Switch stage** (`puf_switch2x2`). Two 2:1 muxes share one challenge bit. With `c = 0`
  the top output takes the top input and the bottom output takes the bottom input. With
  `c = 1` the paths cross. Each of the four mux inputs adds its own delay. This is
  `out = in + d`, where `d = 100 + (hash(SEED, stage, path) mod 32)` (`puf_pkg::sw_delay`).
  Path numbering: 0 is top←top, 1 is top←bottom, 2 is bottom←bottom, 3 is bottom←top.
- **Delay chain** (`puf_delay_chain`). Both lines start at time 0 when `en` is high, and
  `N` switches follow in series. Challenge bit `c[0]` steers the first stage. There is one
  stage per challenge bit, so a 64-bit challenge means 64 stages.
- **Arbiter** (`puf_arbiter`). This is a D flip-flop whose D input is the top line and
  whose clock is the bottom line. Its output is 1 exactly when `en && t_arr < b_arr`. A
  tie resolves to 0, and so does a chain that was never launched.

So an arbiter PUF is a sum of seed-dependent delays, followed by one comparison. It is a
purely combinational circuit from `{en, c}` to `r`. In simulation the response is valid
in the same time step. In synthesis each stage becomes two 20-bit adders and a mux, so a
64-stage chain is a long adder cascade. That is the price of making the race explicit.
The switch, delay chain and arbiter are **behavioural models** in this sense: they are
logic, but they stand in for analog timing. So are the ring oscillators and the Pico-PUF
cell, which are modelled in the clock domain (below).

The hash (`puf_pkg::puf_hash`) is a 32-bit multiply/xor-shift mixer. A child
construction inside a parent uses `child_seed(SEED, i) = SEED*37 + i + 1`. The seed is
the only source of chip-to-chip variation. To model a different die, change it.

## Arbiter-based constructions

All of these are combinational in the arrival-time model. Their interface is `en`, a
challenge `c[N-1:0]` and a response `r`. The default is N = 64.

| module | what it computes | default sizes |
|---|---|---|
| `puf_apuf` | delay chain and arbiter | N = 64 |
| `puf_xor_apuf` | XOR of K APUFs on the same challenge | K = 3 |
| `puf_ff_apuf` | APUF whose stage `FF_OUT[k]` takes its challenge bit from an intermediate arbiter placed after stage `FF_IN[k]` | one loop, 32 → 48 |
| `puf_ff_xor_puf` | XOR of K single-loop FF-APUFs | K = 4, loops 16→48, 24→52, 32→56, 40→60 |
| `puf_dapuf` | double arbiter PUF (below) | K = 5 chains, M = 4 outputs |
| `puf_mux_puf` | 2^K data APUFs feed a mux tree, which K selector APUFs steer | K = 3 |
| `puf_ipuf` | interpose PUF: an upper K_U-XOR APUF bit is inserted at position T of the challenge to a lower (N+1)-stage K_L-XOR APUF | K_U = 1, K_L = 4, T = 33 |

**Feed-forward loops.** `puf_ff_apuf` accepts up to 8 loops, given as `FF_IN`/`FF_OUT`
arrays (stage numbers counted from 1). These arrays cover the single-loop form and the
nested, overlapping, cascaded and separate multi-loop forms. An intermediate arbiter
compares the two arrival times after stage `FF_IN`. Its decision replaces the external
challenge bit of stage `FF_OUT`. The model assumes that this decision is ready before the
race reaches `FF_OUT`, and ignores the intermediate arbiter's own delay.

**Double arbiter PUF.** K chains receive the same challenge. One arbiter sits between the
top lines of every pair of chains i < j, and one between the bottom lines of every pair.
That gives K(K-1) arbiters, numbered top pairs first. Consecutive groups of
`ceil(K(K-1)/M)` arbiters are XORed into the M response bits. The default 5-4 DAPUF
therefore has 20 arbiters in four groups of five.

## Ring-oscillator constructions and the measurement sequence

A ring oscillator is one NAND gate (its second input is the enable) followed by M-1
inverters. A ring-oscillator PUF selects one ring from each of two banks of 2^N rings
with the challenge. It counts the edges of both selected rings for the same time, and
answers 1 when the first ring counted strictly more.

Rings cannot be simulated by a two-state, cycle-based simulator as free-running loops. So
`puf_ring_osc` and `puf_conf_ring_osc` model the ring in the clock domain:

- The counter clock is the time base.
- Each gate has a seed-dependent delay of 4 to 7 clock cycles (`puf_pkg::ro_delay`).
- The output toggles every HALF cycles while `en` is high, where HALF is the sum of the
  gate delays.
- The output is held low while `en` is low, as the NAND forces it.

The configurable ring (`puf_conf_ring_osc`) has two alternative inverters per stage. Bit
`s[i]` picks which one is in the loop, so HALF depends on the configuration.

`puf_edge_counter` counts rising edges of the ring output. It is 16 bits wide and
saturates, and it has a synchronous clear.

**Handshake.** Every RO-based module shares one controller, `puf_ro_ctrl`, and the same
handshake (`clk`, `rst_n`, `start`, `busy`, `done`, `r`):

1. The challenge is captured on the `start` edge.
2. The counters are cleared for one cycle.
3. The selected rings run for `WINDOW` = 2048 cycles.
4. One drain cycle lets the last edge be counted.
5. `done` pulses high for one cycle. It rises `WINDOW + 2` clock edges after the edge that
   sampled `start`.

`r` holds its value from `done` until the next `start`. The window length, the counter
width and this handshake are this design's own choices. The published construction only
says that the rings run while enabled and that the counts are compared.

| module | what it computes |
|---|---|
| `puf_ropuf` | RO PUF, 2 × 2^N rings of M gates (N = 4, M = 5) |
| `puf_cropuf` | RO PUF of configurable rings. The configuration is `c[M-2:0]`, and the whole challenge also selects the rings |
| `puf_colpuf` | one Fibonacci-LFSR step of the seed challenge `cs` (x^4+x^3+1), then a configurable RO PUF |

## Composite PUFs

Composite PUFs cut the 64-bit challenge into consecutive slices, give each slice to a
small PUF, and combine the results. All of them answer with one bit.

| module | configuration | sizes |
|---|---|---|
| `puf_cpuf_ar` | (A) 4 APUFs of 16 stages. Their 4 bits are the challenge of an RO PUF | NA = 16 |
| `puf_cpuf_ax` | (B) 4 APUFs of 16 stages, XORed (combinational) | NA = 16 |
| `puf_cpuf_ra` | (C) 16 RO PUFs on 4-bit slices. Their 16 bits are the challenge of a 16-stage APUF | NR = 4 |
| `puf_cpuf_rx` | (D) 16 RO PUFs on 4-bit slices, XORed | NR = 4 |
| `puf_cpuf_e`  | (E) two layers, described below | A = 3, MR = 4 |

Configuration (E) has two layers:

- **Slicing.** The challenge is split into three groups. Each group is a 16-bit slice for
  an APUF followed by a 4-bit slice for an RO PUF. A last 4-bit slice goes to one extra
  RO PUF: 3·(16+4)+4 = 64.
- **Second-layer challenge.** Each group gives `APUF xor ROPUF`. Those three bits,
  together with the extra RO PUF's bit, form a 4-bit challenge for a second-layer RO PUF.
- **Timing.** The second layer starts when the first layer is done, so `done` comes
  `2·WINDOW + 5` edges after `start`.

The RO-based composites measure all of their RO PUFs at the same time, with one
handshake. The APUF parts must have `en` held high during the measurement.

## Lightweight secure PUF

`puf_ls_puf` has Q = 8 APUF rows and M = 4 outputs, built from three networks:

- **Interconnect network** (wiring inside `puf_ls_puf`). Row 1 gets the challenge. Row
  i+1 gets row i rotated by i-1 positions. Rotation is cumulative, so rows 1 and 2 are
  equal and row r is rotated by (r-1)(r-2)/2.
- **Input network** (`puf_ls_input_net`). It applies the usual LS-PUF challenge
  transform to each row:
  - `d[(n+2)/2] = x[1]`.
  - For odd j: `d[(j+1)/2] = x[j] ^ x[j+1]`.
  - For even j: `d[(n+j+2)/2] = x[j] ^ x[j+1]`.
  - `d[1]`, which these rules leave open, is `x[n]`.
- **Output network** (`puf_ls_output_net`). Output j is the XOR of Z = 3 row responses
  `r[(j+S+i) mod Q]`, for i = 1..Z, with S = 0.

## LFSR-based constructions

`puf_fibo_lfsr` is one step of a Fibonacci LFSR:

- The feedback is `^(c & G)`.
- The state shifts toward bit 0.
- The feedback enters the top bit.
- The default G = 0x1B is x^64 + x^4 + x^3 + x + 1.

`puf_crc_puf` applies M = 4 cascaded steps to the challenge. Each intermediate state
challenges its own APUF, so the response has 4 bits. `puf_colpuf` uses the same step in
front of its configurable RO PUF.

## Bent-function constructions

`puf_bent_func` computes `y1·y2 ^ y3·y4 ^ …`. `puf_bent_puf` applies it to K = 4 APUF
responses.

`puf_spuf` is the XOR of two APUFs. One receives the challenge. The other receives the
challenge with its two halves swapped: bit i takes c[(i + N/2) mod N]. `puf_sn_puf`
combines K = 4 such S-PUFs with the bent function.

## Pico-PUF and Multi-PUF

`puf_pico_puf` is a one-bit weak PUF. `en` clocks two arbiters whose D input is tied
high. Their outputs a1 and a2 drive a NAND latch with state `b = !a1 | (a2 & b)`:

- While both are low, the latch sits at 1.
- If a1 rises strictly first, the latch drops to 0 and stays there.
- Otherwise it stays at 1.

Like the rings, the cell is modelled in the clock domain:

- Each arbiter's clock-to-output delay is a seed-dependent 4 to 19 clock cycles
  (`puf_pkg::pico_delay`).
- Reset clears both arbiters and sets the latch.
- The bit has settled `PICO_SETTLE` = 22 cycles after `en` is first sampled high. It then
  holds until the next reset.

`puf_multi_puf` places one Pico-PUF cell per challenge bit, 64 in all. It XORs their
outputs into the challenge, and feeds the result to an APUF. The Pico-PUF bits act as a
hidden chip-specific mask. The module has `clk` and `rst_n` for the cell model. Its
response is valid once the key has settled, and from then on it follows `{en, c}`
combinationally.

## Recurrent double arbiter PUF

`puf_rec_dapuf` puts a 5-4 DAPUF in a loop, which makes it harder to model:

1. The DAPUF answers the 64-bit challenge with a 4-bit intermediate response.
2. Intermediate bit i inverts (XOR) challenge block i. The blocks are 16 bits each,
   `c[16i+15:16i]`.
3. The same DAPUF answers the modified challenge, and its 4-bit answer is `r`.

A small controller runs both evaluations on one DAPUF, using the `start`/`busy`/`done`
handshake. The response arrives 2 clock edges after `start`, and `r` stays valid until
the next `start`. The whole 4-bit response is brought out. An application that wants one
bit can pick one.

## Top level: `puf_zoo_top`

The top instantiates one of each full construction at its default parameters. The
primitives and the S-PUF and Pico-PUF cells appear inside the constructions that use
them. The ports are grouped per construction:

- `en_*`, `c_*`, `r_*` for the combinational constructions.
- `start_*`, `busy_*`, `done_*` for the clocked ones.

The constructions do not interact.

## How far the model can be trusted

- The structure of every construction is wired as published. The delay values, the
  hash, the seeds, the ring timing and all handshakes are this design's own.
- Many published constructions leave their sizes open, and these are this design's
  choices:
  - the number of XORed PUFs;
  - the loop positions;
  - the number of rows, composite slice widths and LFSR polynomials;
  - the insertion point of the interpose PUF.

  The sizes taken from the published material are: the 64-bit challenge of the
  composites, the 5-4 DAPUF, and the 16-bit blocks of the recurrent DAPUF.
- There is no noise, no temperature or voltage effect, and no metastability. Equal
  arrival times or equal counts always give 0.
- The response statistics (uniqueness, bias) are those of a 32-value uniform delay
  spread per mux input. They are plausible, not calibrated.
- The bistable-ring PUF and composite configuration (F) are not included.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench compares
against independent reference functions in `tb/puf_ref_pkg.sv`, and prints
`TB_RESULT checks=<n> failures=<n>`. Example with plain Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl --top-module tb_puf_ropuf \
    rtl/puf_pkg.sv tb/puf_ref_pkg.sv rtl/*.sv tb/tb_puf_ropuf.sv
./obj_dir/Vtb_puf_ropuf
```

- `tb_puf_zoo_top` runs the whole top at its default sizes. Every construction is driven
  concurrently with random challenges and checked against the reference models,
  including the latencies. It also counts the mechanisms that must occur:
  - both arbiter outcomes;
  - a feed-forward bit overriding the external bit;
  - both values of the interposed bit;
  - several MUX-PUF data paths;
  - a non-zero recurrent intermediate response;
  - both RO PUF outcomes, and so on.

  It runs in a few seconds.
- The RO testbenches run at the default `WINDOW`. Each finishes in well under a second.
- Synthesis with Yosys of the full top gives about 41 k cells and 26 k
  flip-flops. Most flip-flops are ring-oscillator counters and ring state.

To explore another chip instance, override `SEED`. To explore another configuration,
override the size parameters. The reference package takes the same numbers as arguments.
