# On-chip path delay measurement with signature registers and a latch-backed scan chain

Small-delay defects (resistive opens, shorts and vias) make a path slower than
its siblings on good chips, yet still fast enough to pass a test at the normal
clock. One way to catch them is to measure the delay of individual paths on
each chip and screen chips whose delays fall outside the normal spread. This
RTL implements the chip side of a scan-based measurement scheme for that.

The idea is to test the same path over and over, shortening the
launch-to-capture clock width by one step each time. The path passes while the
width is longer than its delay and fails from then on. The pass/fail sequence
is therefore a "thermometer code" of the delay. The scheme does not scan this
sequence out. A serial signature register (an LFSR) next to the scan chain
folds each response into a short signature. Only the signature goes back to
the tester, which looks it up in a precomputed table: one entry per possible
pass/fail run length. Two additions keep the repetitions cheap:

* **Test-vector latches.** Each scan flip-flop has an extra latch. After the
  test vector has been scanned in once, it is copied into the latches. Each
  later repetition reloads it in a single clock instead of a full scan-in.
* **Clusters with their own signature registers.** The scan chain is cut into
  clusters. Each cluster's tail flip-flop feeds one signature register. Paths
  ending in different clusters are measured in the same repetitions.

The double pulse of an on-chip variable clock generator sets the clock width.
Its step sets the resolution: 5.2 ps with the default generator model.

## Block diagram

```
 tester                                        chip (delay_meas_chip)
 ------                                        ----------------------
 sci ──► CL_0: (0,0) → (0,1) → … → (0,n-1) ─┬─► CL_1 … ─► CL_(m-1) ─┬─► sco
                                            │                       │
                                            ▼ in                    ▼ in
 sgo ◄─────────────── SIG_(m-1) ◄── … ◄── SIG_0 ◄── 0 (sgi)
                         ▲ sck_(m-1)        ▲ sck_0
 sc[L-1:0] ──► bcd_decoder ─────────────────┘
 cnt, trg ──► vcg (clock generator + 2-pulse generator) ─► 1 ┐
 tck ─────────────────────────────────────────────────────► 0 ┴ cs ─► clk of all
 se[1:0], lck, sge, rst_ff, rst_sig ─► all cells / signature registers
 each flip-flop (k,j): D ◄ d_func, Q ► q_func (circuit under test, outside)
```

## One measurement, step by step

Take a test vector that sensitises one path per cluster, each ending in
flip-flop (k, j_k). The tester runs:

1. **Load once.** Scan the vector in (`se = 11`, one `tck` per flip-flop).
   Pulse `lck` to copy it into the latches. Pulse `rst_sig` to clear the
   signature registers, and set `sge = 1` (signature mode).
2. **Repeat for width w_0 > w_1 > … > w_(T-1)** (`cnt = 0, 1, …`):
   1. *Reload:* `se = 01` (latch load) and one `tck`.
   2. *Launch and capture:* set `se = 00` (normal mode) and `cs = 1`, then
      raise `trg`. The generator sends exactly two pulses, one clock width
      apart. The first pulse captures the circuit's response to the reloaded
      vector; this launches the transitions. The second pulse captures the
      target flip-flops, and that capture passes or fails. Return `cs` to 0.
   3. *Shift:* `se = 11`, then `n` `tck` clocks. The response in flip-flop
      (k, j) reaches the cluster tail after `n - 1 - j` clocks. The signature
      register samples the tail on clock `n - j`. At that clock the tester puts
      code `k + 1` on `sc`, so register k captures exactly its target bit. At
      every other clock `sc` is 0.
3. **Unload.** Set `sge = 0` (shift mode) and `sc` to all ones. Then clock
   `m × SIG_W` times. `sgo` first gives the last stage of SIG_(m-1) and ends
   with stage 0 of SIG_0.
4. **Decode (tester software).** For each register, find the case c whose
   table signature matches. The path delay is then in (w_c, w_(c-1)]. Case 0
   means slower than the longest width, and case T means faster than the
   shortest width.

Only one signature register captures per shift clock. The target flip-flops
of one vector must therefore sit at different distances from their cluster
tails. The end-to-end testbench picks targets that way.

### The signature table

The register update in signature mode is `FF0 ← in ⊕ FF(W-1)`,
`FFi ← FF(i-1) ⊕ (FB_MASK[i] · FF(W-1))`, starting from zero. Case c is the
input sequence with c passes followed by T − c fails. For a rising transition
a pass captures 1 and a fail captures 0; for a falling transition the
opposite. The table is the set of T + 1 signatures these sequences give.
With 3 stages, `FB_MASK = 011`, five tests at 10/8/6/4/2 ns:

| case | tests #1–#5 | delay (ns) | rising (FF0 FF1 FF2) | falling |
|------|-------------|-----------|------|------|
| 0 | F F F F F | > 10  | 000 | 010 |
| 1 | P F F F F | 8–10  | 011 | 001 |
| 2 | P P F F F | 6–8   | 101 | 111 |
| 3 | P P P F F | 4–6   | 100 | 110 |
| 4 | P P P P F | 2–4   | 110 | 100 |
| 5 | P P P P P | 0–2   | 010 | 000 |

Two cases alias if the difference of their sequences, a run of ones of
length d, leaves the register at zero. For a primitive feedback polynomial of
degree W that can only happen when d is a multiple of 2^W − 1. The 8-bit
default (x^8 + x^4 + x^3 + x^2 + 1, primitive) therefore separates up to 254
tests per measurement. A full sweep of the default generator, 1000 ps down to
500.8 ps, is 97 tests.

## The blocks

### Measurement scan flip-flop (`scan_ff`)
This is a D flip-flop behind two cascaded 2:1 muxes. `se[1]` chooses between
the scan input and the latch bit. `se[0]` chooses between that result and
the functional D.

| se1 se0 | mode | captures |
|---------|------|----------|
| x 0 | normal | D |
| 1 1 | scan | si (previous flip-flop) |
| 0 1 | reload | bit held in the extra latch |

Q is also the scan output. `rst_ff` clears the flip-flop asynchronously
(active high).

### Test-vector latch (`tv_latch`)
This is a level-sensitive latch from the flip-flop's Q, transparent while
`lck = 1`. Pulse `lck` only while the clock line is low. There is one latch
per flip-flop. The original scheme also shares latches between flip-flops to
save area, but that rule is not specified, so it is not implemented.

### Scan cluster (`scan_cluster`)
This is N cells and their latches, chained head to tail. The tail output goes
to the next cluster and to the cluster's signature register. The top makes
`ceil(NUM_FF / N_CL)` clusters; the last one holds the remainder.

### Reconfigurable signature register (`sig_reg`)
This is the LFSR above in signature mode (`sge = 1`). In shift mode
(`sge = 0`) it is a plain shift register from `sgi` to `sgo`. `sck` is a
synchronous enable in both modes, so the register changes only on clocks
the decoder selects. Registers chain `sgo → sgi`. The first one's `sgi` is 0.

### Capture decoder (`bcd_decoder`)
This turns an L-bit code (L = clog2(m + 2)) into the m enables: 0 → none,
k → register k − 1, all ones → all registers (for unloading). This saves
tester channels: 3 lines instead of 6 for the default 6 registers.

### Variable clock generator (`vcg` = `pi_clk_gen` + `two_pulse_gen`)
* `pi_clk_gen` is a **behavioural model** of an analog phase-interpolator
  clock generator. Once its reference clock starts, it runs at period
  `T_MAX − cnt·STEP`, never below `T_MIN`. The defaults are 1000 ps, 500 ps
  and 5.2 ps: a 1–2 GHz output with 5.2 ps phase steps. The linear code
  mapping is this model's own. Jitter, duty-cycle and phase controls of a
  real generator are not modelled.
* `two_pulse_gen` is synthesizable. Three flip-flops synchronise the trigger
  and detect its rising edge. A 2-count and an enable flip-flop on the
  falling edge then gate the clock. The output is exactly two whole pulses,
  one period apart. The first rises 3–4 periods after `trg`.

### Clock select (`clk_sel`)
`cs = 1` routes the double pulse to the clock line and `cs = 0` routes `tck`.
It is a plain mux: switch `cs` only while both clocks are low.

## Parameters (top `delay_meas_chip`)

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_FF` | 179 | scan flip-flops (the flip-flop count of ISCAS'89 s5378) |
| `N_CL` | 32 | flip-flops per cluster (own choice) |
| `SIG_W` | 8 | signature register length |
| `SIG_FB_MASK` | `8'b0001_1101` | Galois feedback taps (own choice) |
| `CNT_W` | 7 | width-control bits |
| `T_MAX_FS`, `T_MIN_FS`, `STEP_FS` | 1 000 000, 500 000, 5 200 | generator period range and step, in fs |

Larger benchmark circuits need a larger `NUM_FF`: s9234 has 228 flip-flops
and s38584 has 1426. A test with a 10 ns normal clock (100 MHz) needs the
generator range set accordingly. Both are parameter changes only.

## How far to trust it, and where it departs from the original scheme

Taken from the original description:
* the scan cell's mux structure;
* one latch per flip-flop and reload in one clock;
* the cluster/scan-chain/signature-register topology;
* the signature register's feedback structure and its shift configuration;
* a decoder on the capture controls;
* the `cs` clock select;
* the generator's 1–2 GHz / 5.2 ps figures;
* the measurement sequence.

The signature register reproduces all twelve values of the published
example table, and so does the full chip with real path timing.

Choices made here:
* reset polarity, and the use of `rst_ff` for the pulse generator;
* `sge = 1` for signature mode, and `sck` gating both modes;
* the decoder codes;
* the 8-bit polynomial;
* launch-on-capture: both pulses in normal mode;
* `N_CL`;
* the VCG's code-to-period mapping.

Not implemented:
* latch sharing between flip-flops;
* a response-tracing mode for finding the lowest failing frequency, which
  the original only mentions;
* the tester and the circuit under test, which are modelled in testbenches
  only.

Lint notes:
* `tv_latch` is a deliberate latch. Verilator's NOLATCH message appears only
  when it is inlined into the cluster.
* The delays in `pi_clk_gen` depend on run-time values, so lint cannot prove
  them non-zero. The smallest is T_MIN / 2.
* `two_pulse_gen` gates a clock on purpose.

## Simulating

All files use `timescale 1ns/1fs`. The testbenches need Verilator's timing
support. Example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_delay_meas_chip rtl/dm_pkg.sv tb/tb_delay_meas_chip.sv
./obj_dir/Vtb_delay_meas_chip
```

Every testbench prints `TB_RESULT checks=N failures=F` and stops by itself.

* `tb_delay_meas_chip` runs the chip at its default size. It uses a
  ring-shaped model circuit in which path i has delay 300.5 + (53·i mod 900)
  ps. The testbench first does a scan flush. Then it checks the latches:
  it stores a pattern, overwrites the chain, reloads the pattern and scans it
  out through `sco`. It then measures 8 vectors × 6
  paths, rising and falling, with 97 widths each, and checks every decoded
  delay bracket against the true delay. It also counts each mechanism:
  * flush and latch-check bits;
  * latch reloads and double pulses;
  * selective captures and unloads;
  * passes and fails;
  * paths outside the range on both sides.

  About one minute.
* `tb_fig3_example` runs six 3-flip-flop chips with path delays of 11, 9, …,
  1 ns. It uses a 10 ns normal width and 2 ns steps, and compares the
  signatures with the table above.
* `tb_iscas_sizes` and `tb_s38584_size` both use the bench `meas_bench`.
  It runs the same measurement at other sizes. Its model circuit has 18
  distinct path delays (300.5 + 50·(7i mod 18) ps), which keeps large chips
  fast to simulate. Each run checks the tester-clock count of every
  measurement: `NUM_FF + 97·(1 + N_CL) + m·SIG_W`.
  * `tb_iscas_sizes`: 228 flip-flops (the size of s9234) in eight clusters,
    the last one 4 flip-flops long. It measures 32 paths in about 35 s.
  * `tb_s38584_size`: 1426 flip-flops (the size of s38584) in 45 clusters.
    One vector measures at most 30 paths, one per shift position, and the
    other signature registers must stay at zero. It takes about 2 min.
* One testbench per block: `tb_scan_ff`, `tb_tv_latch`, `tb_scan_cluster`,
  `tb_sig_reg`, `tb_bcd_decoder`, `tb_clk_sel`, `tb_two_pulse_gen`,
  `tb_pi_clk_gen`, `tb_vcg`.

## Files

`rtl/`: `dm_pkg` (mode enum, default polynomial), `scan_ff`, `tv_latch`,
`scan_cluster`, `sig_reg`, `bcd_decoder`, `clk_sel`, `two_pulse_gen`,
`pi_clk_gen` (behavioural), `vcg` (contains the behavioural model), and
`delay_meas_chip` (top). Everything except the clock generator model is
synthesizable.
