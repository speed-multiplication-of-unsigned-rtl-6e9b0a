# Serial radix-4 Booth multipliers: fixed-rate and two-speed

A serial-parallel multiplier builds a product one piece at a time. It adds a
multiple of the multiplicand to a running sum, then shifts. Radix-4
(modified) Booth recoding lets each step consume two multiplier bits. An
N-bit multiply then takes N/2 steps instead of N. Each step adds 0, ±M or ±2M,
where M is the multiplicand.

Many of those steps add zero. A Booth digit is zero whenever its three bits
are `000` or `111`. That is common in sparse data, and in small values held
in a wide register, whose upper bits are all copies of the sign. The
**two-speed multiplier (TSM)** exploits this. Its datapath has two parts:

* a **slow part**: encoder, partial product generator and adder. It is given
  K clocks.
* a **fast part**: the product register shifting by two places. It takes one
  clock.

A zero digit uses only the fast part. So the latency depends on the
multiplier's value, and sparse or low-precision data finish early.

This repository holds two multipliers and the blocks they share:

| module              | what it is |
|---------------------|------------|
| `boothrecodemul8`   | Fixed-rate sequential radix-4 Booth multiplier. 8 × 8 → 16 bits by default. One digit per clock, N/2 + 2 clocks per product. |
| `tsm_multiplier`    | Two-speed radix-4 Booth multiplier. 64 × 64 → 128 bits by default. A zero digit takes 1 clock, a nonzero digit takes K clocks. |
| `radix4_mul_top`    | Both multipliers side by side. They share the clock and reset and have separate ports. |
| `booth_encoder`     | Three bits → Booth digit, plus a `skip` flag for a zero digit. |
| `booth_ppg`         | Partial product generator: digit × M, N+2 bits wide. |
| `booth_product_reg` | The {A, Q, Q-1} product shift register with its adder. |
| `tsm_control`       | Two-speed controller: skip or wait K clocks, count digits. |
| `booth_pkg`         | Booth digit type and the recoding function. |

Operands are **two's complement** by default. Setting the parameter
`SIGNED = 0` makes them **unsigned**. The product is 2N bits wide and exact,
with no rounding or truncation.

## Radix-4 Booth recoding

Digit i is formed from multiplier bits {b(2i+1), b(2i), b(2i-1)}, with
b(-1) = 0. Its value is −2·b(2i+1) + b(2i) + b(2i−1):

| bits | digit | partial product |
|------|-------|-----------------|
| 000  |  0    | 0      |
| 001  | +1    | +M     |
| 010  | +1    | +M     |
| 011  | +2    | +2M    |
| 100  | −2    | −2M    |
| 101  | −1    | −M     |
| 110  | −1    | −M     |
| 111  |  0    | 0      |

An N-bit two's complement multiplier (N even) gives exactly N/2 digits. The
product is Σ digit_i · M · 4^i. The partial product needs N+2 bits, because
−2 · (−2^(N−1)) = 2^N.

## The product register: one register, three roles

The central piece is `booth_product_reg`, a single shift register of 2N+3
bits:

```
 bit 2N+2            N+1 N                1   0
 +----------------------+------------------+-----+
 |  A  (N+2 bits)       |  Q  (N bits)     | Q-1 |
 +----------------------+------------------+-----+
        running sum        multiplier,        last bit
                           shifted out        shifted out
```

* **Load** writes `{0, multiplier, 0}`.
* The **encoder** always reads the three lowest bits `{Q[1], Q[0], Q-1}`.
  Every shift by two therefore brings the next digit into place.
* **Add and shift**: A ← A + pp, then the whole register shifts right by two,
  arithmetically (the sign bit is copied in).
* **Shift only** (the TSM's skip): the register shifts right by two without
  adding.

After N/2 steps the multiplier has been shifted out, and bits [2N:1] hold the
2N-bit product. The `product` output shows bits [2N:1] at all times, so
partial values are visible while the multiply runs. A is N+2 bits wide: two
bits for ±2M and the sign. The register cannot overflow, because each step
divides the running sum by four.

### Worked example: 51 × (−61), N = 8

Here the register has 19 bits. The values below are the register read as a
signed number, and `product` = register / 2.

| clock      | register | low 3 bits | digit | A + pp      | `product` |
|------------|----------|------------|-------|-------------|-----------|
| after load |   102    | 110        | −1    | 0 + 61 = 61 |    51     |
| run 1      |  7833    | 001        | +1    | 15 − 61 = −46 | 3916    |
| run 2      | −5850    | 110        | −1    | −12 + 61 = 49 | −2925   |
| run 3      |  6345    | 001        | +1    | 12 − 61 = −49 | 3172    |
| run 4      | −6222    |  —         |  —    |  —          | **−3111** |

`tb_boothrecodemul8` replays this sequence clock by clock.

## Fixed-rate multiplier (`boothrecodemul8`)

A four-state controller drives the register:

| state | code | action |
|-------|------|--------|
| idle  | 0 | wait for `iGo` |
| load  | 1 | load the multiplier; shift counter ← N/2 − 1 |
| run   | 2 | add and shift every clock (also for zero digits); counter − 1; leave after the clock in which the counter is 0 |
| done  | 3 | `oDone` = 1; stay while `iGo` is high; go to idle when `iGo` is low |

Timing:

* Reset is synchronous and active low (`iReset_b`).
* `oDone` rises N/2 + 2 clocks after the clock that samples `iGo` in idle.
  For N = 8 that is 6 clocks: 1 idle→load, 1 load, 4 run.
* The multiplicand `iMand` is used combinationally. Hold it from the start
  until `oDone`.
* `oProduct` stays valid while `oDone` is high.
* At N = 8 the shift counter is 2 bits wide. In general it is
  ⌈log2(N/2)⌉ bits.

## Two-speed multiplier (`tsm_multiplier`)

### Datapath

Both operands are taken in the clock that sees `go` in idle. The multiplier
goes into the product register. The multiplicand goes into a holding
register, so the inputs are free again after the start.

From then on, the encoder looks at the register's three low bits:

* **`skip` = 1** (bits `000` or `111`): in the same clock the controller
  raises `ena` and `shift`, and the register shifts by two. This takes
  1 clock.
* **`skip` = 0**: the controller counts K clocks, then raises `ena` with
  `shift` low. The register takes A + pp and shifts. This takes K clocks.

Nothing else changes while the controller waits, because the register holds
still. The path from the register, through the encoder, partial product
generator and adder, back into the register is therefore a
**K-cycle multicycle path**. Only the shift path and the controller need to
close timing at the clock period. This is how one clock supports the two
speeds, τ and K·τ. When synthesizing for a real clock, constrain the add path
as a K-cycle multicycle path. Otherwise the tool will try to meet one cycle
for it, and the speed benefit is lost.

### Latency

For Z zero digits among the N/2 digits (N/2 + 1 in unsigned mode, where
N/2 below becomes N/2 + 1), `done` rises this many clocks after
the clock that saw `go`:

```
latency = 1 + Z + K·(N/2 − Z)
```

It ranges from 1 + N/2 (multiplier 0 or −1) to 1 + K·N/2 (no zero digits).
`busy` is high while digits are being processed. `done` stays high, and the
product stays valid, while `go` is held high. The controller returns to idle
once `go` is low, so a `go` that is held high does not restart it.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 64 | Operand width; must be even. Narrower data can run on a wide unit sign-extended: its upper digits all skip. |
| `SIGNED` | 1 | 1: two's complement operands. 0: unsigned operands, handled by zero-extending by two bits (one digit more). |
| `K` | 2  | Clocks given to the add path. K = 1 gives a single-speed multiplier that still skips zero digits. |

The defaults of `radix4_mul_top` are `N8 = 8`, `TSM_N = 64`, `TSM_K = 2`,
and `B8_SIGNED = TSM_SIGNED = 1`.

### Measured latency on typical data

`tb_tsm_workloads` reports the mean latency at K = 2 over 400 operations
per set. It compares each mean with the fixed-rate schedule, where every
digit takes K clocks (1 + K·N/2). The data distributions are the testbench's
own:

| input set (multiplier) | 64-bit unit | 32-bit unit |
|------------------------|-------------|-------------|
| uniform, full width    | 57.0 clocks (1.14×) | 28.9 clocks (1.14×) |
| 32-bit uniform, sign-extended | 44.9 (1.45×) | — |
| 8-bit Gaussian-like    | 35.6 (1.83×) | 19.7 (1.68×) |
| 8-bit, 70 % zeros      | 33.8 (1.92×) | 17.7 (1.86×) |

At K = 2 the speed-up cannot exceed about 2×. With a larger K the gap grows,
but the dense case gets slower in absolute time. These figures are clock
counts only. They are not area or time on any device.

## Verification

Every testbench checks its own results and ends with a
`TB_RESULT checks=… failures=…` line. Each has a watchdog.

| testbench | covers |
|-----------|--------|
| `tb_booth_encoder` | All 8 triplets, against −2·b2 + b1 + b0. |
| `tb_booth_ppg` | All 256 multiplicands × 5 digits at N = 8, plus random 64-bit cases. |
| `tb_booth_product_reg` | Random load / add / shift sequences against an integer model of the register. |
| `tb_boothrecodemul8` | The 51 × (−61) trace clock by clock, all 65 536 operand pairs with the exact 6-clock latency, and the done/idle handshake. The unsigned instance: all 65 536 pairs, 7 clocks each. |
| `tb_tsm_control` | All 16 zero/nonzero patterns of 4 digits at K = 3: when `ena` and `shift` fire, and the total latency. |
| `tb_tsm_multiplier` | 64-bit default: corner cases, plus uniform, small and sparse operands, each with exact latency. N = 8, K = 3: a third of all operand pairs. Unsigned instances at 64 and 8 bits. |
| `tb_radix4_mul_top` | Both multipliers at default parameters, running at once. Counts that every digit kind, skip, K-clock add, all-skip multiplier and held done occurred. |
| `tb_tsm_workloads` | The data sets above on 64- and 32-bit units, with products and latencies checked. |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/booth_pkg.sv tb/tb_radix4_mul_top.sv --top-module tb_radix4_mul_top
./obj_dir/Vtb_radix4_mul_top
```

Every testbench finishes in well under a second.

## What follows the published design, and what does not

These parts follow the published description of the design:

* the radix-4 recoding table;
* the 8-bit multiplier's ports, its four states and their codes, the 2-bit
  shift counter, and the 19-bit register with the product in bits [16:1];
* the 51 × (−61) trace;
* the two-speed idea itself: two sub-circuits with critical paths τ and K·τ,
  zero digits (`000`/`111`) skipped, operands taken in parallel, and the
  32- and 64-bit widths.

The description gives no value for K. It gives no handshake for the two-speed
unit. It does not say how many zero digits one skip covers. Those, and
everything listed below, are choices made here.

The source is titled as a multiplier of *unsigned* numbers. However, its
algorithm description and its worked example (51 × −61 = −3111) are two's
complement. The default here follows those. The unsigned mode is built on
top, as described below.

## Design choices and limits

* **Unsigned mode by extension.** With `SIGNED = 0`, both multipliers
  zero-extend their operands by two bits. They then run the same signed
  datapath at width N+2, which costs one more digit: N/2 + 1 digits, and a
  register 4 bits wider. The result is exact for all unsigned operands. The
  fixed-rate multiplier then takes N/2 + 3 clocks. In the two-speed
  multiplier the extra top digit is {0, 0, top bit}. It is `000`, costing
  one clock, whenever the operand's top bit is 0. Otherwise it is +1 and
  costs K clocks.
* **K = 2** is a free choice. Pick it from the ratio of the add-path delay to
  the shift-path delay in your technology.
* **One zero digit per clock.** A run of zero digits is skipped one digit per
  clock. The skip does not jump over several digits at once.
* **Handshakes are level-based**: start on `go`, hold `done` until `go`
  drops. The fixed-rate multiplier needs its multiplicand held; the two-speed
  one registers it.
* **Fixed-rate multiplier internals.** It keeps an explicit load state, and
  it adds zero for zero digits rather than skipping. This keeps its timing
  data-independent: always N/2 + 2 clocks.
* **One adder.** The ±M and ±2M cases are formed in the partial product
  generator, and one adder follows. A design with four separate add/subtract
  units and a selector has the same function.
* **23 flip-flops** at N = 8: 19 register bits, 2 state bits and 2 counter
  bits. A synthesis tool may merge duplicated sign bits.
* **No area or power claims.** No FPGA or ASIC results are reproduced. The
  RTL is plain synthesizable SystemVerilog with no vendor primitives.
