# Selectively SET-hardened ZFNet inference circuit

A single-event transient (SET) is a short voltage pulse that a particle strike
causes in combinational logic. If the pulse reaches a flip-flop while the
flip-flop samples, the wrong value is stored. Radiation-tolerant FPGAs can put
a delay-based filter in front of every flip-flop. That filter also delays every
legitimate data change, so the clock must slow down, and a filter on every
flip-flop costs area.

This design applies the filter **selectively**:

- Only flip-flops that a SET analysis marks as *sensitive* get a filter. Sensitive
  means a pulse wider than the 450 ps capture threshold can reach the flip-flop.
- Each filter's delay is sized to the widest pulse expected at that flip-flop,
  capped at a maximum filtering capability. The preferred setting is 300 ps
  (600 ps is the alternative).

The circuit that carries the hardening is a ZFNet convolutional neural network:

- a 224x224x3 image in;
- five convolutional layers with ReLU, 3x3 stride-2 max pooling and
  normalisation across feature maps;
- three fully-connected layers and a 1000-class soft-max at the end.

It uses 16-bit fixed-point data and is meant to be clocked at 78.59 MHz.

The SystemVerilog has two kinds of code:

- **Timed behavioural models** (`set_filter`, `sel_hardened_reg`). A filter
  works through gate delays, so these use `#` delays and need a timing-aware
  simulator (`verilator --timing`).
- **Synthesizable RTL** (everything else).

## 1. The SET filter (`set_filter`)

The filter has one 3-input NAND, three 2-input NANDs and a chain of `N_INV`
inverters:

```
 d ──┬──────────────────────────────┐
     │                              ├─[ majority(d, dd, y) ]──┬── y  (to the flip-flop D pin)
     └─[inv]─[inv]─ … ─[inv]── dd ──┤   3 x NAND2 + NAND3     │
            N_INV inverters         └─────────────────────────┘ (y fed back)
```

- The inverter chain makes a delayed copy `dd` of `d`. The delay is
  `N_INV × T_INV_PS`, and `N_INV` is even so `dd` is not inverted.
- The four NANDs form a 2-of-3 majority of `d`, `dd` and the filter's own output
  `y`. The three NAND2s take the pairs; the NAND3 combines them.
- When `d` and `dd` agree, `y` follows them. While they disagree, the majority
  is decided by `y` itself, so `y` holds. The gate is therefore a guard gate
  (Muller C-element).

Behaviour for a transient of width `W` on `d`, with chain delay `D`:

| Case | `d` | `dd` | Result at `y` |
|---|---|---|---|
| `W ≤ D` | flips during `[t, t+W)` | flips during `[t+D, t+D+W)` | the two never hold the wrong value together: **nothing reaches `y`** |
| `W > D` | as above | as above | the pulse passes at full width, `D` late |
| real data change | changes once | follows after `D` | `y` changes `D` after `d` |

The last row is the cost of the filter: `D` is added to the setup path of the
flip-flop.

The feedback `y → majority` is a deliberate combinational loop: it is the
storage node of the guard gate. Lint tools report it as circular logic.

The source gives the gate list but not the wiring. Feeding the filter output
back, rather than the flip-flop's Q, is this design's reading. With Q as the
third input, a transient during a clock edge that loads a *new* value makes the
flip-flop keep its *old* value, so the filter would not protect writes. The
50 ps inverter delay is also an assumption; the NANDs are modelled without
delay.

## 2. Sizing rule and the hardened register (`set_pkg`, `sel_hardened_reg`, `stmr_ff`)

The per-bit rule lives in `set_pkg`:

```
filter_delay(pulse) = 0                          if pulse <= 450 ps   (no filter)
                    = min(pulse, MAX_FILTER_PS)  otherwise
N_INV               = ceil(filter_delay / T_INV_PS), rounded up to even
```

With `T_INV_PS = 50`:

| expected pulse at the flip-flop | cap 300 ps (default) | cap 600 ps |
|---|---|---|
| 0 – 450 ps (not or partially sensitive) | no filter | no filter |
| 460 ps | 6 inverters, 300 ps | 10 inverters, 500 ps |
| 500 ps | 6, 300 ps | 10, 500 ps |
| 620 ps | 6, 300 ps | 12, 600 ps |

With the 300 ps cap, transients of 200 and 300 ps are blocked, and 400 and
500 ps pass. This is the "slightly lower resiliency for the least frequency
loss" trade-off of the preferred configuration.

`sel_hardened_reg` is a `WIDTH`-bit register.

- `PULSE_PS[i]` is the widest transient expected at bit `i`. It stands for the
  report of the SET analysis, which is a software step outside this RTL.
- The rule is evaluated at elaboration, and a `set_filter` of the resulting
  length is generated in front of each bit that needs one.
- Every bit is an `stmr_ff`, the self-correcting TMR flip-flop of the
  radiation-tolerant fabric, modelled at register level:
  - three copies feed a 2-of-3 voter;
  - when `en` is low every copy reloads the voted value, so a single upset copy
    is scrubbed at the next edge.
- The `strike` input XORs a pulse onto each D line ahead of the filter. It lets
  a testbench inject transients exactly where the logic's transients would
  arrive. Tie it to zero otherwise.

In `zfnet_top` the hardened register is the 16-bit **write-back data register**.
Every result of every layer passes through it on its way into the feature
buffers. Its default sensitivity profile `WB_PULSE_PS` is an illustrative
assumption:

- bits 15..6 are sensitive (455–620 ps) and get 300 ps filters;
- bits 5..4 are partially sensitive (300/400 ps);
- bits 3..0 are not reached.

Everything else in the datapath uses plain flip-flops.

## 3. The CNN datapath (`zfnet_top`)

```
             ┌──────────────── layer_sequencer (stage table) ───────────────┐
             │ start/done per engine, source buffer select                  │
             ▼                                                              │
 image ─► fmap_ram 0 ◄─┐     conv_engine (16 lanes) ◄── weight store (16 weights/word)
                       ├──► maxpool_engine                                  
          fmap_ram 1 ◄─┘     lrn_engine         ──► sel_hardened_reg ──► other buffer
                             softmax_engine     ──► class_idx, class_score
```

### Stages and buffers

The network runs as a table of 14 stages, built by `zfnet_pkg::zfnet_stages()`:

| # | stage | input → output |
|---|---|---|
| 0 | conv 7x7/2, pad 1, 96 ch, ReLU | 3x224x224 → 96x110x110 |
| 1 | max pool 3x3/2 | → 96x55x55 |
| 2 | normalisation | → 96x55x55 |
| 3 | conv 5x5/2, 256 ch, ReLU | → 256x26x26 |
| 4 | max pool 3x3/2 | → 256x13x13 |
| 5 | normalisation | → 256x13x13 |
| 6–8 | conv 3x3/1, pad 1, 384/384/256 ch, ReLU | → 256x13x13 |
| 9 | max pool 3x3/2 | → 256x6x6 |
| 10–12 | fully connected 9216→4096→4096→1000 (ReLU on the first two) | → 1000 |
| 13 | soft-max | → 1000 probabilities, class |

The input, the 96 first-layer filters, the 3x3 stride-2 pooling and the 55x55
map come from the source description. The other shapes are those of the
published ZFNet.

Each stage reads one of two `fmap_ram` buffers and writes the other. The
sequencer flips the buffers after every stage, and waits two
clocks after each stage so the write-back register drains.

- Maps are stored channel-major: `addr = (c*H + y)*W + x`.
- Each buffer holds 1,161,600 words, the size of the largest map (the first
  convolution's output).

### Fixed-point format

Data is Q8.8, 16-bit signed. Products accumulate in 48 bits. A result is
shifted right by 8 and saturated to 16 bits.

### Engines

All engines read with one clock of latency. Every engine but `conv_engine`
handles one tap per clock.

**`conv_engine`** handles both convolutions and fully-connected layers.

- A fully-connected layer is a convolution whose kernel covers the whole input
  map.
- It computes 16 output channels (a *group*) at once. Each clock, one input
  value is read and multiplied by the 16 weights of one weight-store word.
- The loop order is group → (oy, ox) → (ci, ky, kx).
- Each position takes `K*K*Cin + 3` clocks: bias word, taps, pipeline drain,
  capture. Taps in the zero padding are skipped.
- The 16 results are saturated, rectified (`relu`) and captured into an output
  bank. A writer drains the bank one word per clock while the next position
  accumulates. If a position has fewer taps than lanes, the engine waits for
  the writer.

**`maxpool_engine`**: 3x3 stride-2 windows. A window is clipped at the bottom
and right edges, which gives 110→55, 26→13 and 13→6.

**`lrn_engine`**: for each element, `a / (2 + 2^-16 · Σ a²)`, where the sum runs
over 5 neighbouring maps. The exponent is 1; the published layer uses 0.75.

**`softmax_engine`** makes three passes over the 1000 scores, one per clock:

1. It finds the largest score `z_max`; its index and value are `class_idx` and
   `class_score`. A tie goes to the lower index.
2. It sums `e_i = exp(z_i - z_max)`. Subtracting the maximum keeps every term
   in (0, 1], so a 32-bit sum of Q0.16 terms cannot overflow.
3. It writes `p_i = e_i / S` as Q1.15, where 0x7FFF stands for 1. Q1.15 is
   used instead of Q8.8 so that small probabilities keep some resolution.

The exponential is `2^(x·log2 e)`:

- the integer part of the exponent becomes a right shift;
- the fractional power `2^f` is the quadratic `1 + f·(0.6565 + 0.3435·f)`,
  exact at both ends and within 0.3 % in between.

The division is combinational.

### Weight store

The weight store is external to the design. Per layer it holds:

- for each group of 16 output channels, one word per (ci, ky, kx);
- after those, one bias word per group.

A lane holds the weight of channel `group*16 + lane`. The whole network is
62.36 M weights and biases (124.7 MB) in 3,899,399 words.

### Throughput

One inference takes about 79 M clocks, about 1.0 s at 78.59 MHz:

- `conv_engine` stages: Σ groups · positions · (K·K·Cin + 3);
- pooling: 11 clocks per output;
- normalisation: 7 clocks per output;
- soft-max: 3n + 2 clocks for n classes;
- plus 4 clocks of control per stage.

## 4. Interfaces of `zfnet_top`

| port | dir | width | use |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `load_we`, `load_addr`, `load_data` | in | 1, 21, 16 | write the image into buffer 0 while idle |
| `start` / `busy` / `done` | in/out/out | 1 | run one inference; `done` pulses at the end |
| `w_raddr` → `w_rdata` | out/in | 26 → 16x16 | weight store word read, data one clock later |
| `rd_addr` → `rd_data` | in/out | 21 → 16 | while idle, read the buffer holding the last map (after an inference, the probabilities) |
| `class_idx`, `class_score` | out | 13, 16 | result, valid after `done` |
| `stage_idx` | out | 4 | stage being executed |
| `set_strike` | in | 16 | transient injection on the write-back D lines; tie to 0 |

Parameters:

- `STAGES`, `NUM_STAGES`: the network.
- `FMAP_WORDS`: buffer depth.
- `WB_PULSE_PS`: per-bit sensitivity of the write-back register.
- `MAX_FILTER_PS`: the filter cap, 300 or 600.
- `T_INV_PS`: inverter delay.

Any network that fits the stage format runs without RTL changes: build a
different table with `conv_stage`, `pool_stage`, `lrn_stage` and
`softmax_stage`.

## 5. How far to trust it, and where it departs from the source

**Follows the source:**

- the filter's gate set;
- the selective rule (450 ps sensitivity threshold; delay tuned per flip-flop
  and capped at 300 ps, or 600 ps);
- TMR flip-flops as the storage cell;
- ZFNet with 16-bit data, 5 conv + 3 FC layers, ReLU, 3x3/2 max pooling,
  cross-map normalisation and a final soft-max;
- the 78.59 MHz clock used in the testbenches.

**This design's own choices:**

- the filter's feedback node and gate delays;
- the `stmr_ff` internals;
- the whole accelerator organisation (one engine per stage type, 16 lanes,
  ping-pong buffers, sequencer);
- Q8.8 format and saturation;
- layer shapes after layer 1 (from the published ZFNet);
- the external weight store and its word layout;
- the example sensitivity profile;
- the soft-max arithmetic (three passes, exponential approximation, Q1.15
  probabilities).

**Missing or reduced:**

- Normalisation uses exponent 1 instead of 0.75.
- Only the write-back register is hardened. The SET analysis that would pick
  sensitive flip-flops across the whole circuit is a netlist-level software
  step with no RTL counterpart. Its result enters only as a parameter.
- Pruning changes weight values, not the circuit; the full layer shapes are
  run.
- The source's description of layers 2–5 as all repeating
  conv/ReLU/pool/normalise is not followed. The published ZFNet is followed
  instead: only layers 2 and 5 pool, and only layer 2 normalises.

## 6. Simulation

Each testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. The reference arithmetic for the network is
in `tb/tb_ref_pkg.sv`, written independently of the RTL.

| testbench | what it checks |
|---|---|
| `tb_set_filter` | 200/280/300 ps pulses blocked by a 300 ps filter; 400 and 500 ps pulses pass whole; data changes appear exactly 300 ps late |
| `tb_stmr_ff` | single-copy upsets on consecutive edges never reach `q` (needs scrubbing) |
| `tb_sel_hardened_reg` | 200, 250, 300, 400, 500 and 550 ps transients across a capturing edge with caps 300 and 600; per-bit outcome from the sizing rule |
| `tb_conv_engine` | four layers (padding, stride, partial lane group, FC, writer stalls) against the reference; exact cycle counts |
| `tb_maxpool_engine`, `tb_lrn_engine`, `tb_softmax_engine`, `tb_relu`, `tb_fmap_ram`, `tb_layer_sequencer` | each unit against the reference or a shadow model, with cycle counts |
| `tb_zfnet_top` | small 7-stage network end to end. Every write-back is compared (probabilities within 4 LSB + 1 %); class, read-back and cycle count are checked. Then all filtered bits are struck at every write (all must be blocked), and one unfiltered bit is struck once (exactly one word must be corrupted) |
| `tb_zfnet_full` | one full ZFNet inference at the default sizes. Each stage's output is sampled and compared with the reference. The class, all 1000 probabilities and the total cycle count are checked (a few minutes of simulation) |

Run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/set_pkg.sv rtl/zfnet_pkg.sv tb/tb_ref_pkg.sv -y rtl \
  tb/tb_zfnet_top.sv --top-module tb_zfnet_top -o sim
./obj_dir/sim
```

Swap in another `tb_*.sv` and its module name for the other testbenches.
`--timing` is needed because the filters and the testbench clocks use delays.
All files use `timescale 1ps/1ps`.
