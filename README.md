# Capacitor voltage balancing for a Modular Multilevel Converter

A Modular Multilevel Converter (MMC) builds each phase from two *arms*. Each arm is a
string of up to N half-bridge *sub-modules* (SMs), and each SM carries its own floating
capacitor. An SM is either *inserted* (its capacitor in the current path) or *bypassed*.
In every sampling period the controller decides how many SMs per arm to insert, which
sets the arm voltage. It also decides *which* SMs those are, which keeps the capacitors
balanced.

The usual rule for choosing is this. When the arm current charges the capacitors, insert
the SMs whose capacitors are lowest. When it discharges them, insert the highest. That
needs a ranking of up to 64 capacitor voltages, for six arms, every 10 to 100 µs. A
software sort in a microcontroller is too slow for that.

This RTL makes the ranking in hardware in two independent ways and runs both on the same
inputs:

* **Sorting-network engine (`sn_balancer`).** A Bitonic sorting network with all its
  compare-and-swap hardware folded onto a single column of M/2 comparators. The six arms
  share it one after another. It gives an exact ranking.
* **Voltage-mapping engine (`cvms_balancer`, one per arm).** It does not sort.
  * The voltage window [Vc_min, Vc_max] is cut into LEVELS sub-ranges, with one FIFO per
    sub-range.
  * Each SM's position is pushed into the FIFO of its sub-range, so the FIFO array is
    already a ranked list (to within one sub-range) once every SM has been stored.
  * The SMs to insert are then popped from the bottom or the top of the array.

A nearest-level-control stage (`nlc`) turns each arm's reference voltage into the number
of SMs to insert. The top, `mmc_cvb_ctrl`, puts out one gate vector per arm from each
engine. Which of the two drives the power stage is up to the integrator.

## Block map

```
mmc_cvb_ctrl                      top: 6 arms, N = 64 SMs per arm
├── nlc            x6             insertion index round(n_sm * Vref / Vdc)
├── sn_balancer                   sorting-network engine, shared by the 6 arms
│   ├── bitonic_sorter            folded M-input Bitonic network
│   │   ├── bitonic_fsm           stage counter, gather/compare/scatter
│   │   └── cs_operator  x M/2    compare-and-swap of (voltage, position)
│   └── sm_selection   x6         ranking + index + current sign -> gate vector
└── cvms_balancer  x6             voltage-mapping engine, one per arm
    ├── cvms_scaler               (Vc - Vc_min) * 1/dV, truncated -> FIFO row
    ├── cvms_fifo_array           LEVELS FIFOs of depth N holding SM positions
    └── cvms_reader               pops rows in voltage order, builds gate vector
mmc_pkg                           network wiring functions shared by the sorter
```

## The folded Bitonic sorter

### Network shape

For M = 2^P inputs the network has P *phases*. Phase i (i = 1..P) works on blocks of
2^i wires:

1. The first stage of the phase is a *mirror* stage. Inside each block it compares
   wire j with wire 2^i−1−j (counting from 0), so a block of 8 pairs its wires 1–8, 2–7, 3–6 and 4–5 counting from 1.
2. It is followed by i−1 *half-cleaner* stages, which compare wires 2^(i−2), …, 2, 1
   apart.

In this form every comparator points the same way, with the larger value going to the
lower-numbered wire. One compare-and-swap (CS) unit therefore serves any pair in any
stage. The network has S(M) = P(P+1)/2 stages of M/2 comparisons each:

| M  | P | stages S | cycles per list (3·S) |
|----|---|----------|-----------------------|
| 8  | 3 | 6        | 18                    |
| 16 | 4 | 10       | 30                    |
| 32 | 5 | 15       | 45                    |
| 64 | 6 | 21       | 63                    |

### Folding: three cycles per stage

The list sits in M working registers (`work[]`). There is only one column of M/2
`cs_operator`s, so every stage goes through the same three steps:

| cycle   | control (bitonic_fsm)                      | what happens                                                                                                      |
|---------|--------------------------------------------|-------------------------------------------------------------------------------------------------------------------|
| gather  | `gather_en` (`gather_ext` in stage 0)      | For each CS unit k, a multiplexer picks the two wires that stage s pairs on unit k and loads them into `in_a/in_b`. Stage 0 takes the sorter inputs directly. |
| compare | `compare_en`                               | The CS outputs (larger, smaller) are registered.                                                                  |
| scatter | `scatter_en`                               | Every wire takes back the CS output that stage s assigned to it.                                                  |

The multiplexers on both sides form the *Map*. Their select patterns are compile-time
constants for each (stage, unit) and (stage, wire). They come from three functions in
`mmc_pkg`:

* `bitonic_wire(P, s, k, hi)`: which wire goes to side a or b of unit k in stage s.
* `bitonic_slot(P, s, w)`: which unit wire w uses in stage s.
* `bitonic_is_hi(P, s, w)`: whether wire w is on the smaller side of that unit.

The stage counter selects among them, so to change M you change only the parameter.

The first gather happens on the same edge that samples `start`. After that one stage
completes every three edges, and the sorted list is in `work[]` (and on `v_sorted` and
`p_sorted`) when `done` pulses, 3·S edges after `start`. For the 8-input case that is
18 cycles, and the intermediate list changes every three cycles, at cycles 2, 5, 8, …, 17.

### Arms with fewer SMs than inputs

The number of SMs present, `n_sm`, is an input. The unused inputs get *dummy* elements
with voltage 0 and position all-ones, so they sink to the bottom of the ranking.

Because each phase i leaves every block of 2^i wires completely sorted, an arm with
n_sm ≤ 2^j is fully ranked after the first j phases. The sorter then stops after
j(j+1)/2 stages. For example, a 16-SM arm takes 30 cycles on the 64-input network
instead of 63.

The comparison key is `{voltage, real}`, where `real` is 1 for an SM and 0 for a
dummy. A real SM whose capacitor reads 0 therefore still ranks above the dummies.

### Sharing across arms, and selection

`sn_balancer` captures all six arms on `start` and sorts arm 0, 1, …, 5 back to back,
with one idle cycle between sorts. After each sort, that arm's `sm_selection` registers
a gate vector:

* `i_arm > 0` (charging): insert the `n_ins` SMs at the bottom of the ranking
  (positions `p_sorted[n_sm-1]`, `p_sorted[n_sm-2]`, …).
* otherwise: insert the `n_ins` SMs at the top of the ranking.

`arm_done[a]` pulses for arm a (counted from `start`) after (a+1)·(3·S+1)+1 cycles. A
full run at M = 64 takes 385 cycles, which is 3.85 µs at 100 MHz.

## The voltage-mapping engine (CVMS)

### Mapping

The row of an SM is

```
addr = floor( (Vc - Vc_min) * inv_dv / 2^FRAC ),   clamped to 0 .. LEVELS-1
inv_dv = ceil( M_used * 2^FRAC / (Vc_max - Vc_min) )        (codes, FRAC = 2*BV+2)
```

`vc_min` and `inv_dv` are inputs, so the window and the number of rows used
(`M_used` ≤ LEVELS) can be changed at run time.

* **Exactness of inv_dv.** With FRAC = 2·BV+2 fraction bits, the rounded-up reciprocal
  gives exactly the same row as an exact division for every 12-bit code.
* **Truncation.** The rounding step truncates, so a voltage 1.8 sub-ranges above
  Vc_min goes to row 1.
* **Clamping.** Voltages below Vc_min go to row 0. Rows beyond the top are clamped to
  LEVELS−1. If the window is configured over all LEVELS rows, every voltage at or above
  Vc_max lands in the top row.

`cvms_scaler` has two register stages: the subtraction, then the multiplication with
only the integer part kept. The clamp is combinational after them, and the FIFO write
happens on the third edge. Each SM therefore takes three cycles.

### FIFO array and read-out

* **Array.** `cvms_fifo_array` holds LEVELS × DEPTH positions, with DEPTH = N, so even
  all SMs in one row fit. Every row has a write count and a read pointer. The whole
  array is cleared in one cycle at the start of each run. `overflow` is a sticky flag for
  a push into a full row, which cannot happen at DEPTH = N.
* **Read-out.** `cvms_reader` starts at row 0 when `i_arm > 0`, otherwise at row
  LEVELS−1. Each cycle it either pops the head of the current row and sets that SM's
  gate bit, or, if the row is empty, moves one row on. It stops when `n_ins` SMs are
  chosen or the last row has been passed.

Within one row the order is store order, that is SM position order, not voltage order.
That is the price of not sorting. With LEVELS = 64 over the working window, the
difference is at most one sub-range.

### CVMS timing

From `start`, a run takes 1 cycle to capture the inputs, 1 to clear the array, 3·n_sm
to store, 1 for hand-over, then n_ins pops plus one cycle per empty row passed, then 1
to update `gate`.

* At N = 64 this is at most 3·64 + 64 + 64 + 5 = 325 cycles, about 6.5 µs at 50 MHz.
* In the 6-SM, 8-row example used by the testbenches it is 30 cycles.

## Nearest level control

`nlc` computes `n_ins = round(n_sm · vref / vdc)`:

* It rounds half up.
* It is clamped to `n_sm`.
* It gives 0 when `vdc` = 0.

`vref` is the arm's share of the DC-link voltage, from 0 to Vdc. The division is
combinational and the result is registered on `load`.

## Top-level interface and timing (`mmc_cvb_ctrl`)

| port | width | meaning |
|------|-------|---------|
| `sample` | 1 | sampling-period tick; loads the NLC results |
| `n_sm` | 7 | SMs present per arm (1..64) |
| `vdc`, `vref[6]` | 16 | DC-link voltage and arm reference voltages, same scale |
| `i_arm[6]` | 16 | arm currents, two's complement; only the sign is used |
| `vc[6][64]` | 12 | capacitor voltage codes |
| `vc_min`, `inv_dv` | 12, 33 | CVMS window bottom and 1/dV (see above) |
| `n_ins[6]` | 7 | NLC insertion indices |
| `gate_sn[6]`, `gate_cvms[6]` | 64 | gate vectors, bit p = SM at position p, 1 = inserted |
| `sn_arm_done[6]`, `sn_done` | 1 | sorting-network engine: per arm / all arms updated |
| `cvms_done[6]`, `cvms_overflow[6]` | 1 | voltage-mapping engine per arm |
| `busy` | 1 | any engine running |

Arm order in every array is a-upper, a-lower, b-upper, b-lower, c-upper, c-lower.

Both engines start one cycle after `sample`. They capture `vc`, `n_sm` and the currents
then, so the inputs can change during the run. Gate vectors hold until the next update.
Everything is synchronous to `clk`, with an asynchronous active-low `rst_n`.

At the defaults, a generic yosys synthesis of the top gives about 20 k flip-flop bits
(most of them the captured voltages and the sorter's working registers) and 6 × 24 576
memory bits for the FIFO arrays.

## Where this design departs from its source or fills gaps

| Topic | Source | This design |
|-------|--------|-------------|
| Six-arm sorting time at M = 64 | quotes about 260 cycles, from a closed formula | 385 cycles: 3 cycles × 21 stages + 1 per arm. The formula does not follow from its own 18-cycle, 8-input example, which this design matches exactly. |
| CVMS address | called a "rounding" | Truncation, because the worked example maps 1.8 to 1. |
| NLC | gives both round(Vref/Vdc) and round(N·n) | These are combined as round(n_sm·Vref/Vdc). |
| Ties and dummies | compares voltages only | A `real` bit breaks ties in favour of real SMs. |
| Zero arm current | "i > 0" test | Zero counts as discharging, so the highest voltages are inserted. |
| Skipping empty FIFOs | "read the next address" | One cycle per empty row. |
| Widths of vref, vdc and i_arm | not given | 16 bits each. |
| Voltage scale | not given | The RTL only sees codes. The testbenches use 10 mV per code (arms held near 16 V). A 10–35 kV window fits 12 bits at 10 V per code. |
| Switching-reduction schemes, outer and circulating current control | referenced to other work | Not built. Their results enter as `vref`. |

## Verification

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. The reference models used
by the testbenches are in `tb/tb_ref_pkg.sv` and are written independently of the RTL.

| testbench | what it checks |
|-----------|----------------|
| `tb_cs_operator` | all orderings of small values, including ties |
| `tb_bitonic_fsm` | phase order, stage count, early `last_stage`, `done` timing |
| `tb_bitonic_sorter` | 8-input worked example: final order and the 18-cycle latency; random lists at M = 8 and 16 for every n_sm, with latency 3·j(j+1)/2; the default 64-input sorter on the same example with 56 dummies (18 cycles) and on 16-, 32- and 64-SM arms (30, 45, 63 cycles) |
| `tb_sm_selection` | both current signs, zero current, n_ins = 0 and n_ins > n_sm |
| `tb_nlc` | rounding, saturation, Vdc = 0 |
| `tb_cvms_scaler` | 6-SM example (rows 3 6 1 1 4 3), exhaustive codes against an exact floor for several windows, clamps |
| `tb_cvms_fifo_array` | FIFO order per row, empty flags, clear, overflow |
| `tb_cvms_reader` | both directions, empty-row skipping, early end |
| `tb_cvms_balancer` | example latency of 30 cycles and random arms against a reference ranking |
| `tb_sn_balancer` | two arms sharing the sorter: per-arm latency (a+1)(3S+1)+1 and selections |
| `tb_cvms_sweep` | default-size CVMS engine on a 16-SM arm, window 10–35 kV split into 8, 16, 32 and 64 sub-ranges, closed loop: every selection, run time, and a capacitor spread within two sub-ranges plus one period's change (measured 641, 170, 89, 52 codes against sub-ranges of 313, 157, 79, 40) |
| `tb_mmc_cvb_ctrl` | full-size top (6 arms × 64 SMs, default parameters) |

`tb_mmc_cvb_ctrl` closes the loop with a simple arm model:

* Inserted capacitors charge or discharge with the arm current.
* Upper arms follow the sorting-network gates and lower arms the CVMS gates.
* It runs n_sm = 64, 16 and 6 for hundreds of sampling periods.

It checks every NLC index, every gate vector against the reference choice, both
latencies, and that each arm's capacitor spread converges. It also counts how often each
mechanism occurred and fails if one never did:

* early finish and full-length sorts;
* both current signs;
* empty-row skips;
* voltages below and above the window;
* NLC saturation.

It runs in about 15 s.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_mmc_cvb_ctrl rtl/mmc_pkg.sv tb/tb_ref_pkg.sv tb/tb_mmc_cvb_ctrl.sv
./obj_dir/Vtb_mmc_cvb_ctrl
```

Change the top module name to run any other testbench. Lint reports the CS units' unused
`swap` pins and that `rst_n` is used both synchronously and asynchronously. The second
comes from the assertions, which are disabled during reset. Both are explained in the
file headers.

## Limits

* LEVELS = 64 rows. A 128-row mapping does not fit without raising the parameter; the
  array grows linearly with it.
* N and M must be powers of two for the sorter. Arms with fewer SMs are handled at run
  time.
* The engines rank on capacitor voltage only. They have no hold-off or
  switching-reduction logic, so SMs may be re-selected every period.
* ADCs, gate drivers, the current controllers and the power stage are outside this RTL.
