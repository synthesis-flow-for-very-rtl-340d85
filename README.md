# AQFP circuits at the phase level: a pipelined Collatz processor, a Kogge-Stone adder and a 4-to-16 decoder

Adiabatic quantum-flux-parametron (AQFP) logic is a superconducting logic family. It is powered and
clocked by the same ac excitation current, and it spends very little energy per switching event.
Each AQFP gate behaves like a latch: it takes its inputs when its excitation current rises, holds the
result while the current is high, and hands the result to the next gate, which is excited one phase (a quarter
period, with 4-phase clocking) later. An AQFP circuit is therefore a deep pipeline. Every logic level is a row of gates that
works in its own excitation phase, and a new data item can enter once per ac cycle.

This repository models such circuits in synthesizable SystemVerilog at the level of excitation
phases. It contains:

- a small cell library: clocked logic gates with free input and output inversion, splitters and
  balancing buffers;
- a multi-phase excitation generator;
- three circuits built from those ideas: a **pipelined Collatz (3n+1) processor** (16 bits by default),
  an **8-bit Kogge-Stone adder** and a **4-to-16 decoder**;
- a finer **timing-window model** of one majority gate. It checks the timing that the phase-level
  circuits take for granted.

The top module `aqfp_top` puts the three circuits and the timing model side by side on one clock
generator.

## 1. Phases as clock ticks

The single most important convention in the RTL is how ac excitation is turned into a digital clock.

- `clk` has **one rising edge per excitation phase**. With the default 4-phase clocking, one ac
  cycle is four `clk` ticks.
- `aqfp_clkgen` produces `ex[NPHASE-1:0]`, a one-hot strobe that names the phase excited at the
  next edge. Every AQFP stage is a register that loads only on the edge where its own `ex` bit is
  high. A stage at logic level `L` of a circuit that starts in phase `P0` uses
  `ex[(P0+L) % NPHASE]`.
- A value is therefore produced once per ac cycle and held for a full cycle, exactly like the
  latch behaviour of an AQFP gate.
- **Latency** of a circuit is its logic depth in phases. **Throughput** is one input per ac cycle
  (every `NPHASE` ticks) per pipeline, regardless of depth.

The 4-phase scheme uses two ac clocks 90° apart plus a dc bias. A gate whose bias line runs with the
dc current is excited at the positive peak of its ac clock; one whose line runs against it is
excited at the negative peak. The phases are:

| phase | excited by |
|---|---|
| 0 | ac1 positive peak |
| 1 | ac2 negative peak |
| 2 | ac1 negative peak |
| 3 | ac2 positive peak |

`NPHASE = 3` gives the older three-clock scheme with 120° spacing instead. Every module takes
`NPHASE` as a parameter. The clock generator, the adder, the decoder and the Collatz processor are
simulated in both modes. `ac1`/`ac2` are brought out as the
digitised sign of the two ac currents.

**What this abstraction does not model.** In a real AQFP circuit a gate's inputs must all come
from the level directly before it. A path that skips a level must be padded with buffers, because the
data are gone one phase later. In this RTL a register holds its value for a whole ac cycle, so a
path that is short by fewer than `NPHASE` levels would still give the right answer in simulation. The
circuits here are nevertheless balanced level by level, as real AQFP netlists must be; every
balancing buffer is present. The testbenches check function and latency, not the absence of
unbalanced paths. The gate-level timing itself is the subject of `aqfp_maj_timing` (section 6).

Reset (`rst_n`, active low, synchronous) clears every stage. It stands for the dc-bias
initialisation of the cells.

## 2. Cell library

All circuits are built from four modules. They share the package `aqfp_pkg`, which holds the gate
function enumeration, the two-state signal struct of the timing model and two latency helper
functions.

| module | what it is | latency |
|---|---|---|
| `aqfp_gate` | One clocked cell. `FUNC` selects buffer, AND, OR, 3-input majority or constant 0/1. `INV[2:0]` inverts any input and `OUT_INV` the output, giving NOT, NAND, NOR and the inverted-input cells at no extra cost, as in AQFP, where inversion only flips a coupling transformer. | 1 phase |
| `aqfp_splitter` | A buffer followed by a 1-to-`FANOUT` branch (2, 3 or 4). Every net with more than one load needs one, because an AQFP gate can drive only one gate. | 1 phase |
| `aqfp_buf_chain` | `DEPTH` buffers in series for a bundle of `WIDTH` signals; stage `k` uses phase `PHASE0+k`. These are the path-balancing buffers. `DEPTH=0` is a plain wire. | `DEPTH` phases |
| `aqfp_clkgen` | Phase counter producing `ex`, `phase`, `ac1`, `ac2`. | — |

The decoder is written entirely as a netlist of these cells. The adder and the Collatz stages are
written as per-level register stages with the same timing; this keeps the wide datapaths readable.

## 3. The Collatz processor (`collatz_proc`)

### 3.1 What it computes

For a start value `n0` the processor repeats

    n ← n/2       if n is even
    n ← 3n + 1    if n is odd

until `n = 1`. It reports how many iterations that took. For 7 the sequence is
7 → 22 → 11 → 34 → 17 → 52 → 26 → 13 → 40 → 20 → 10 → 5 → 16 → 8 → 4 → 2 → 1, which is 16 iterations.

### 3.2 The ring

The processor is a ring of AQFP stages. Numbers circulate around it until they finish:

```
          in_valid/in_n                                    out_valid/out_n0/out_steps/out_err
               |                                                     ^
               v                                                     |
   +--> feedback control --> odd/even check --+--> odd unit: 3n+1 --+--> termination check --+
   |      (phase 0)           + path select   |   (Kogge-Stone)    |      (phase 2+LAT)      |
   |                           (phase 1)      +--> even unit: n/2 --+                         |
   |                                              (phases 2 .. 2+LAT-1)                       |
   +------------------------ feedback loop: 3 buffers (phases 3+LAT ..) <--------------------+
                                   loop_en
```

| stage | module | what it does |
|---|---|---|
| feedback control | `cz_feedback_ctrl` | Passes on the number returning from the feedback loop. If that slot is empty, it takes a new start value instead (iteration count 0). |
| odd/even check and path select | `cz_parity_sel` | Looks at bit 0 and sends `n` to the odd unit or the even unit. The unselected unit gets all zeros, so the two results can later be merged with OR. |
| odd unit | `cz_odd_unit` | `3n+1 = n + (n<<1) + 1` on a `ks_adder`. The `+1` enters as the adder's carry-in. Flags overflow when the result needs more than `WIDTH` bits. |
| even unit | `cz_even_unit` | `n >> 1`, followed by balancing buffers so that it takes exactly as many phases as the odd unit. |
| termination check | `cz_term_check` | Merges the two results and adds 1 to the iteration count. A number that reached 1 leaves with the end signal; every other number goes on to the feedback loop. |
| feedback loop | `cz_feedback_loop` | Three buffer stages back to the first stage, gated by the external `loop_en`. |

Each stage works one phase after the previous one. With `LAT = log2(WIDTH) + 2` (the adder depth)
the stages sit at these phases:

| stage | phase |
|---|---|
| control | 0 |
| select | 1 |
| units | 2 … 1+LAT |
| termination | 2+LAT |
| feedback | 3+LAT onwards |

The feedback loop is three buffers. It is padded with more only if needed to make the ring length
`RING` a whole number of ac cycles. At 16 bits, `LAT = 6` and the ring is exactly 12 phases = 3 ac
cycles with the three buffers, so no padding is needed. At 4 bits (`LAT = 4`) the loop grows to 5
buffers to reach 12 phases.

### 3.3 Slots: several numbers in flight

Because every stage of a ring of `RING` phases fires once per ac cycle, the ring holds
`RING / NPHASE` independent **slots**. At 16 bits there are 3 slots. Each slot carries:

- `valid`;
- the current value `n`;
- the start value `n0`;
- the iteration count `steps`.

All slots advance together, one iteration per trip around the ring. No number ever waits for
another, and nothing needs to be stored outside the pipeline. This is where AQFP's deep pipelining
pays off: with three numbers in flight the ring does three iterations every 12 phases.

The start value rides along in the slot. Numbers finish in an order that depends on their
trajectories, and `n0` on the output tells which number a result belongs to. The iteration count and
the start value pass through the processing units in a tag buffer chain (`u_tags`), in step with the
data.

### 3.4 Interface and timing

| signal | meaning |
|---|---|
| `in_valid`, `in_n`, `in_ready` | Valid/ready handshake. `in_ready` is high only in the tick where the control stage fires (`ex[0]`) and the slot arriving from the feedback loop is empty. A start value is taken on an edge with `in_valid && in_ready`. A returning number always has priority, so a full ring stalls the input. |
| `out_valid` | The end signal, high for exactly one tick. `out_n0`, `out_steps` and `out_err` hold until the next finished number. |
| `out_err` | The number left the ring without reaching 1. This happens when 3n+1 overflowed `WIDTH` bits, the start value was 0, or the iteration count reached its maximum `2^STEP_W - 1`. |
| `loop_en` | External control of the feedback loop. While it is low, slots entering the loop are emptied, so the ring drains within one trip. |

A start value that needs `k` iterations gives `out_valid` exactly

    (k - 1) * RING + LAT + 3  phases

after the edge that accepted it. For 7 at 16 bits that is 15·12 + 6 + 3 = 189 phases. The
processor testbench checks this latency for every number it runs.

### 3.5 Sizes

| parameter | default | notes |
|---|---|---|
| `WIDTH` | 16 | The 16-bit processor is the configuration used in the energy comparison. The hardware prototype was 4 bits; `WIDTH=4` builds it and is simulated. |
| `STEP_W` | 10 | Iteration counter width. The longest trajectory that stays within 16 bits takes 197 iterations, and within 30 bits 339. |
| `FB_STAGES` | 3 | Minimum feedback buffers. |
| `NPHASE` | 4 | 3 also works. At 16 bits the ring is then still 12 phases, but 4 ac cycles, so it holds 4 numbers. |

**A 16-bit datapath cannot run every trajectory.** Of the start values 1 … 65535, 39 637 climb
above 65535 at some point and end with `out_err`; 25 898 reach 1. Running all start values up to
2^16 to completion needs `WIDTH = 30`, because the highest value reached is 593 279 152, from start
value 60975. `tb_collatz_sweep` runs both cases (section 7).

## 4. Kogge-Stone adder (`ks_adder`)

A parallel-prefix carry-look-ahead adder, pipelined one register stage per logic level:

1. **Level 0.** Generate and propagate, `g = a & b`, `p = a ^ b`. Bit 0 takes the carry-in into its
   generate term as a single majority gate, `g0 = MAJ(a0, b0, cin)`; majority is the native AQFP
   gate.
2. **Levels 1 … log2(WIDTH).** Prefix combine at distance 1, 2, 4, …:
   `G = G_hi | (P_hi & G_lo)`, `P = P_hi & P_lo`.
3. **Last level.** `sum[i] = p[i] ^ G[i-1]`, `sum[0] = p[0] ^ cin`, and the carry out is `sum[WIDTH]`.

The raw propagate bits and the carry-in travel beside the prefix tree in balancing stages.

| property | value |
|---|---|
| latency | `log2(WIDTH) + 2` phases (5 at the default 8 bits) |
| throughput | one operand pair per ac cycle |
| result width | `WIDTH+1` bits, carry out on top |

The Collatz odd unit uses the same module at `WIDTH` bits with `b = n << 1` and `cin = 1`.

## 5. 4-to-16 decoder (`decoder16`)

`dec_out = en ? (1 << bin) : 0`. The decoder is written as a netlist of cells, in the form a logic
synthesis and AQFP post-processing step would leave it:

- every net with more than one load goes through a splitter;
- inversions are folded into the AND gates;
- buffers pad every path to the same depth.

| level | cells |
|---|---|
| 0 | 1-to-4 splitters on `bin[3:0]`, buffer on `en` |
| 1 | two 2-to-4 predecoders (`bin[1:0]`, `bin[3:2]`) made of AND gates with inverted inputs; 1-to-4 splitter on `en` |
| 2 | `he[k] = hi[k] & en`; buffers on the low predecoder outputs |
| 3 | 1-to-4 splitters on `he[k]` and on the low predecoder outputs |
| 4 | 16 AND gates, `out[4k+j] = he[k] & lo[j]` |

Latency is 5 phases, with one input per ac cycle. The predecode structure is one reasonable mapping;
a synthesis tool might choose another with the same function.

## 6. Timing-window model of a majority gate (`aqfp_maj_timing`)

The phase-level circuits assume that every gate meets its timing. Physically, an AQFP gate switches
correctly only if its input currents have arrived and settled inside a window before the excitation
current rises. `aqfp_maj_timing` models one majority gate with that check. It is sampled on a fine
time base `tclk`, for example 1 ps per tick; one phase at 5 GHz with 4-phase clocking is then 50
ticks.

- **Signals** use a two-state form of AQFP's three-valued current (`aqfp_sig_t`, 2 bits): `on = 0`
  means no current, and `on = 1` carries logic `val`.
- **Input-order state machine.**

  | state | meaning |
  |---|---|
  | IDLE | no input current |
  | PART | some inputs present |
  | DATA | all three inputs present; `dt` counts ticks since the last input arrived or changed |

- **Check at excitation.** On the first `tclk` edge that sees `xin` high:

  | condition | result | `viol` |
  |---|---|---|
  | `T_MINUS <= dt <= T_PLUS` | majority of the inputs | `TV_NONE` |
  | `dt < T_MINUS` | excitation too early | `TV_EARLY` |
  | `dt > T_PLUS` | excitation too late | `TV_LATE` |
  | state is not DATA | no data when excited | `TV_NODATA` |

  On a violation the output value is random (a 16-bit LFSR), as the real gate's would be, and `err`
  is raised.
- **Delays.** The output current follows the excitation by `T_DELAY` ticks. `xout` repeats `xin`
  `T_WIRE` ticks later, which models the excitation line running on to the next gate with a
  transport delay.

**Gates in a chain.** Take gates excited one phase apart: 50 ticks at 5 GHz with 4-phase clocking
and 1 ps per tick. A gate's input appears `T_DELAY` after its neighbour's excitation, so the nominal
distance between data and excitation is 50 − 5 = 45 ticks. The default window is
`T_MINUS=15` … `T_PLUS=70`, which tolerates roughly −30 … +25 ticks of clock skew between neighbours.
The testbench builds a four-buffer chain to show this:

| skew | result |
|---|---|
| none | the input passes through |
| 12 ticks per stage | the input passes through |
| 30 ticks per stage | the second gate is excited late, and the gates after it too |
| one gate pulled 35 ticks early | that gate fails early, and the gate after it late |

These defaults (`T_MINUS=15`, `T_PLUS=70`, `T_DELAY=5`, `T_WIRE=2`) are placeholders chosen to be
consistent with that example. They are not characterised values. For a real process they must come
from analog simulation of the gate, for each clocking mode and frequency.

## 7. Top level and verification

`aqfp_top` (parameter `NPHASE` only) instantiates:

- the clock generator;
- the 16-bit Collatz processor (`cz_*` ports);
- the decoder (`dec_*`);
- the 8-bit adder (`ks_*`);
- the timing model (`tm_*`, with its own `tm_tclk`).

The three phase-level circuits start in phase 0. They are independent demonstrations and are not
wired to each other.

Every module has a self-checking testbench in `tb/`. Each compares the outputs with a software
model, checks latency in phases where it is fixed, has a watchdog, and ends with a
`TB_RESULT checks=… failures=…` line.

| testbench | what it covers |
|---|---|
| `tb_aqfp_clkgen`, `tb_aqfp_gate`, `tb_aqfp_splitter`, `tb_aqfp_buf_chain` | The clock generator in 3- and 4-phase modes; every cell function and inversion, the phase of capture, and the hold for one cycle. |
| `tb_ks_adder` | All 65 536 operand pairs of the 8-bit adder in ascending order plus random ones with carry-in, with latency and one-per-cycle throughput checked; a 16-bit instance and a 3-phase instance too. |
| `tb_decoder16` | All 32 `(en, bin)` patterns, twice in order and then in random order, latency 5; again on a 3-phase instance. |
| `tb_cz_*` | Each Collatz stage on its own. |
| `tb_collatz_proc` | The processor end to end: exact latency per number, stalls, recirculation, both paths, overflow and zero exits, three numbers in flight, draining with `loop_en`; plus the 4-bit prototype size. |
| `tb_aqfp_maj_timing` | Correct, early, late and no-data excitation, random output on violation, output and wire delays; a four-buffer chain with clock skew. |
| `tb_aqfp_top` | The whole top at default parameters. It drives all four parts at once and counts each mechanism (stall, recirculation, odd and even step, normal, overflow and zero exits, several numbers in flight, drain, decoder enabled and disabled, adder carry out, timing pass and violation). A mechanism that never occurs counts as a failure. |
| `tb_collatz_sweep` | The iteration-count workload, on three processors at once. Lane 0 runs start values 1 … 65535 on the default 16-bit processor (144 phases per start value with the ring kept full). Lane 1 runs 1 … 65536 on a 30-bit build, where all reach 1; the longest is 339 iterations, for 52527, at 412 phases per start value. Lane 2 repeats lane 0 in 3-phase clocking, where the 12-phase ring holds 4 numbers (108 phases per start value). |

To run a testbench with Verilator (5.x):

```sh
verilator --binary --timing --assert -Irtl rtl/aqfp_pkg.sv tb/tb_aqfp_top.sv \
          --top-module tb_aqfp_top -Mdir obj_top
./obj_top/Vtb_aqfp_top
```

Replace the testbench name for any other one. `-Irtl` lets Verilator find the modules by file name.
The simulator is two-state; `+verilator+rand+reset+2` randomises all uninitialised state, and the
testbenches pass with it. The full sweep takes about half a minute; everything else takes a few
seconds.

To change a size, override the parameters (`WIDTH`, `STEP_W` and `NPHASE` on `collatz_proc`,
`WIDTH` on `ks_adder`). The RTL derives latencies and ring length from the sizes. The testbenches
hold the expected latency as local parameters, so change those along with a size.

## 8. Where this RTL departs from the AQFP circuits it models

**Abstraction.** One clock tick per phase, with registers that hold for a whole cycle (section 1).
Function and latency are exact, but an unbalanced path would not show up as an error. Energy,
junction counts, bias currents and layout are outside the scope of RTL.

**Choices made here where the circuit description leaves room:**

- the Collatz handshake and the feedback-over-input priority;
- the slot format carrying the start value and the iteration count;
- the error exits (overflow, zero, counter full) and the `out_err` flag;
- what `loop_en` does (empties the loop);
- the counter width `STEP_W = 10`;
- folding the `+1` of 3n+1 into the adder's carry-in with a majority gate;
- the choice of a Kogge-Stone adder for the odd unit, and its level assignment;
- the decoder's predecode netlist;
- the phase each circuit starts in.

**Timing model.** It is sampled on a fine clock rather than driven by events, and it encodes "no
current" and "random" as two-state signals plus an error flag. Its window numbers are placeholders.

**Not included:**

- the software synthesis flow that produces AQFP netlists (logic synthesis, splitter insertion,
  buffer insertion, routing);
- the energy-delay estimates;
- the RSFQ Collatz processor that AQFP is compared against;
- the analog AQFP-to-dc output interface and the pad cells;
- the interconnect wire as a separate cell (its delay appears only as `T_WIRE` in the timing model).
