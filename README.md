# Reconfigurable distributed-arithmetic FIR filter

An N-tap FIR filter, y(n) = Σ h(k)·x(n−k), computed with no multipliers and
with coefficients that can be replaced while the filter runs. It uses
*distributed arithmetic* (DA): instead of multiplying each sample by its
coefficient, the filter looks at one bit of every stored sample at a time,
uses those bits as the address of a small table that holds precomputed sums
of coefficients, and adds the table outputs with the right powers of two.
Because the tables live in rewritable RAM (FPGA distributed RAM) rather than
ROM, new coefficients only mean new table contents.

Two decompositions keep it small and fast:

* **Taps into groups.** The N taps are split into P groups of M taps
  (N = P·M). Each group has its own table of 2^M words instead of one table
  of 2^N words.
* **Sample bits into sections.** The L bits of a sample are split into Q
  sections of R bits (L = Q·R). All sections work in parallel, each on its
  own bits, so one output needs R clock cycles instead of L.

Two sections read each table at once through the two read ports of a
dual-port RAM. This halves the number of tables.

## The arithmetic

With unsigned samples, x(n−k) = Σ_j 2^j·b_j(k), where b_j(k) is bit j of
x(n−k). Swapping the sums gives

    y = Σ_j 2^j · Σ_k h(k)·b_j(k)
      = Σ_q 2^(R·q) · Σ_{r<R} 2^r · Σ_p T_p[ address_p(bit qR+r) ]

Here T_p[a] = Σ_{m<M} a_m · h(pM+m) is the table of group p. Address bit m
of group p is bit qR+r of sample x(n−pM−m). The three sums map onto the
hardware like this:

| sum | hardware | where |
|---|---|---|
| Σ_p over the P tables | pipeline adder tree (PAT) | per section, every cycle |
| Σ_r 2^r over the R time slots | shift-accumulator | per section, over R cycles |
| Σ_q 2^(Rq) over the sections | pipeline shift-add tree (PSAT) | once per output |

Example at the defaults (M = 4): table p holds at address 0b0101 the value
h(4p) + h(4p+2).

The derivation above uses integer bit weights: bit j weighs 2^j. Written
with fractional bit weights (MSB weighs 1, bit i weighs 2^−i), the same
filter gives the same result scaled by 2^(L−1). Coefficients are signed
two's complement.

Samples are unsigned by default. With `X_SIGNED = 1` they are two's
complement. The sign bit then weighs −2^(L−1), so its table sum is
subtracted instead of added. The section that owns the top bits handles it
in its first time slot, because the MSB goes first. Nothing else changes,
and no offset correction is needed.

## Structure

```
             x_in[L-1:0]
     ┌───────────┴──────────────┐  R bits each
 section 0                 section Q-1
  sample register (N × R)   sample register (N × R)
   │ M bits per group         │
   ├─ addr ─► table p ◄─ addr ┤   one dual-port table per tap group p,
   │ ◄─ word ─┘ └─ word ─►    │   shared by sections 2j and 2j+1
  adder tree (P words)      adder tree
  shift-accumulator         shift-accumulator
     └───────────┬──────────────┘
       shift-add tree  ──►  y_out
```

| module | role |
|---|---|
| `da_fir_top` | wires everything; P × ⌈Q/2⌉ tables |
| `da_section` | sample register, table addressing, adder tree, shift-accumulator |
| `sipo_shift_register` | R-bit slices of the last N samples; outputs one chosen bit of all N |
| `dual_port_dram` | one 2^M-word table: one synchronous write port, two asynchronous read ports |
| `pipeline_adder_tree` | pairwise adder tree, one register per level, carries a tag with the data |
| `shift_accumulator` | `acc = (acc_rst ? 0 : 2·acc) ± sum`; minus only for a sign bit; result captured on the last slot |
| `pipeline_shift_add_tree` | pairwise tree; at level j the right operand is shifted by R·2^j |
| `da_controller` | slot counter, sample handshake, `acc_rst`/`last`, pipeline-idle flag |
| `lut_loader` | coefficient registers and the table rewrite sequencer |
| `da_fir_pkg` | width functions shared by the modules |

With an odd Q the last section gets a table to itself, and that table's
port B is unused.

## Schedule and timing

A sample is taken in its handshake cycle (`x_valid && x_ready`). Then R slot
cycles follow, slot r = 0 … R−1. In slot r every section reads bit R−1−r of
its slice of all N stored samples, so the most significant bit goes first.
The controller raises `acc_rst` in slot 0 and `last` in slot R−1. Both
signals travel through the adder tree with the data. The next sample can be
taken in the cycle of slot R−1. With `x_valid` held high the filter
therefore takes one sample, and gives one output, every R cycles.

Latency from the handshake cycle to `y_valid`:
R + clog2(P) + 1 + clog2(Q) cycles, each clog2 counting at least 1. That is
4 + 2 + 1 + 1 = 8 cycles at the defaults. `y_valid` pulses once per
accepted sample. Outputs come out in order and are exact: every width is
sized so that no sum can overflow. The output is
H_W + clog2(N) + L bits wide, 16 bits at the defaults.

## Changing the coefficients

1. Write coefficients with `coef_we`, `coef_idx` = k and `coef_data` = h(k),
   one per cycle, while `coef_ready` is high. They go into registers only.
   The filter keeps running on the old tables.
2. Pulse `cfg_start`. `cfg_busy` rises. The loader stops new samples
   (`x_ready` low) and waits until the sample in flight has left the
   pipeline.
3. It then writes address a = 0 … 2^M−1 of all P tables in parallel, one
   address per cycle, with the subset sums of each group's coefficients.
   `coef_ready` is low during these 2^M cycles.
4. `cfg_done` pulses and `cfg_busy` falls. Sample intake resumes.

The sample history is kept across a reload. The first output after it
applies the new coefficients to the old samples. Every output was computed
entirely with one coefficient set. After reset all coefficients are zero
and the tables are filled once on their own, so no table is ever read
before it is written.

## Interface (`da_fir_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `x_valid`, `x_ready`, `x_in` | in/out/in | 1/1/L | sample x(n), unsigned, or two's complement with `X_SIGNED` |
| `y_valid`, `y_out` | out | 1 / H_W+clog2(N)+L | signed output y(n) |
| `coef_we`, `coef_idx`, `coef_data`, `coef_ready` | in/in/in/out | 1/clog2(N)/H_W/1 | coefficient register write |
| `cfg_start`, `cfg_busy`, `cfg_done` | in/out/out | 1 | table reload |

Parameters: `N` = 16 taps, `M` = 4 taps per table, `L` = 8 sample bits,
`Q` = 2 sections, `H_W` = 4 coefficient bits, `X_SIGNED` = 0. The derived values are
P = N/M = 4 and R = L/Q = 4. N must be a multiple of M, and L a multiple
of Q.

## What follows the source design and what does not

Taken from the source design:

* Sections and time slots (L = Q·R), and tap groups (N = P·M).
* Unsigned samples by default. Two's-complement samples as an option,
  with the sign-bit sum subtracted.
* The table contents (all subset sums).
* The adder tree per section, the R-cycle shift-accumulator cleared by
  `acc_rst`, and the shift-add tree across sections.
* Dual-port tables shared by two sections.
* One output every R cycles.
* The 8-bit input width.
* The 4-bit coefficient width, taken from a simulation trace.

This design's own choices:

* Its tap count was not specified. **N = 16 and M = 4 were chosen here**:
  a 16-word table is exactly one 4-input FPGA LUT used as RAM. The number
  of sections was not specified either. Q = 2 was chosen because then every
  table is shared by exactly two sections.
* Signed coefficients.
* The most-significant-bit-first slot order.
* One register per tree level.
* The valid/ready sample handshake.
* The coefficient registers and the whole reload protocol: the source
  design only states that the tables are rewritable at run time.
* A full-precision output. The reference implementation appears to bring
  out a narrower output.
* A separate write address on each table. FPGA dual-port distributed RAM
  writes through read port A instead. With that primitive, the write
  address would be multiplexed with section 2j's read address, which is
  safe because reloads happen only while the filter is idle.

Not reproduced:

* The reported FPGA results: 91 MHz sample rate, 18 slices and 30 LUTs
  against 45 slices and 83 LUTs for a single-RAM structure, and 28
  flip-flops. They belong to a device and a configuration that are not
  fully specified. At the defaults this RTL has 320 flip-flop bits, most of
  them in the 2 × 16 × 4-bit sample registers and the 16 coefficient
  registers. For 91 MHz with R = 4 the clock would have to run at 364 MHz.
  Lower R, i.e. more sections, trades area for clock rate.
* The "single RAM" structure, which is only a baseline for comparison.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. Each one checks results against a model
written independently of the RTL, and has a watchdog.

* `tb_da_fir_top` is the end-to-end test at the default parameters. It
  checks every output value and its 8-cycle latency against a direct
  convolution. It covers:
  * back-to-back samples, with outputs exactly R cycles apart;
  * random input gaps;
  * ten table reloads, counting the one after reset; six of them happen
    while samples keep arriving, which stalls the input;
  * full-scale inputs (x = 255, with all coefficients −8 and then +7).

  It counts each of these events and fails if one never occurs.
* `tb_da_fir_top_odd` runs the same test with N = 12, M = 3, L = 9, Q = 3,
  H_W = 6 and signed samples. This covers an odd section count, a table
  without a partner, non-power-of-two groups and the sign-bit subtraction.
  Its full-scale phase uses x = −256.
* The unit testbenches cover the table ports, shift register, trees,
  accumulator, controller, loader and a section driven with random tables.

Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/da_fir_pkg.sv \
    tb/tb_da_fir_top.sv --top-module tb_da_fir_top -o sim
obj_dir/sim
```

Variables that are not reset start at random values in simulation. The
testbenches do not depend on them.
