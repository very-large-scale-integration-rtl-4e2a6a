# Sum of squared differences by the parallel vertical group method

This design computes

    y = (Xe_1 - Xb_1)^2 + (Xe_2 - Xb_2)^2 + ... + (Xe_N - Xb_N)^2

for N pairs of unsigned n-bit operands. This distance is the core operation
of a radial-basis-function network's hidden layer, where an input vector Xb
is compared with stored centres Xe. It contains no multiplier. Each operand
arrives k bits at a time (one *group* per clock). Each square is built from
*partial results of squaring*, which need only AND gates and shifts. The
partial results of all N pairs are added at once by multi-operand adders:
trees of single-bit adders with no carry chain between them. The method is
called the parallel vertical group method:

* *parallel*: the N pairs are processed side by side;
* *vertical*: sums are formed column by column of bits;
* *group*: the operand is handled k bits at a time.

With the defaults (N = 7, n = 16, k = 4) the device takes one set of 7 pairs
every h = n/k = 4 clocks. Each result appears 2h + 2 = 10 clocks after the
set's first group.

## The arithmetic

### Squaring without a multiplier

Read an n-bit magnitude A as the fraction X = 0.x1 x2 ... xn, with x1 the
most significant bit. Its square is

    X^2 = sum_{i=1..n} 2^-(i-1) * P_i,     P_i = x_i AND (0.x1 x2 ... x(i-1) 0 1)

Each partial result P_i is the bits above x_i followed by `01`, or zero when
x_i is 0. In integer form this is the identity
`A^2 = sum_b a_b * (4*(A >> (b+1)) + 1) * 4^b`, where a_b is bit b of A and
b = 0 is the least significant bit. Every term is a copy of the bits of A
above bit b, with a 1 appended, gated by a_b.

### Groups

The n bits form h = n/k groups of k bits. The k partial results of group g
are added with shifts of 0 .. k-1 places. This gives the *group partial
result of squaring*:

    P_Kg = sum_{r=1..k} 2^-(r-1) * P_gr          (r = 1 is the group's top bit)
    X^2  = sum_{g=1..h} 2^-(g-1)k * P_Kg         (g = 1 is the top group)

### Macro-partial results and the accumulator

The differences of all N pairs are squared at the same time. Adding their
group partial results for one group gives the *macro-partial result*
P_Mg = sum_j P_jKg. The h macro-partial results are then combined by a
recurrence that needs only a shift by k and an adder:

    Y = 2^-k * Y + P_Mg,   Y starts at 0.

The recurrence runs from the least significant group to the most
significant one. This order makes its weights match the sum above: the group
added last gets weight 1, and each earlier group is shifted k more places.

### Fixed-point convention

All partial results, P_Kg, P_Mg and Y are kept as fractions with 2n fraction
bits, so each register holds the value times 2^(2n). With the groups taken
least significant first, no bit shifted out of Y is ever 1. The last step
leaves in Y the exact integer sum of squared differences. An assertion in
`y_accumulator` checks this on every shift.

Register widths:

| Value      | Width          | Notes                                   |
|------------|----------------|-----------------------------------------|
| P_gr       | 2n             | value below 1                           |
| P_Kg       | 2n+1           | value below 2                           |
| P_Mg       | 2n+1+ceil(log2 N) | sum of N values of P_Kg              |
| Y          | 2n+2+ceil(log2 N) | while running, Y stays below 2^k/(2^k-1) times the largest P_Mg |

At the defaults these are 32, 33, 36 and 37 bits.

## Structure

    xe_grp[j], xb_grp[j]  (k bits each, per cycle)
            |
       +----v-----+        ...  N processing elements PE_1..PE_N
       |  PE_j    |---- P_jKg ----+
       +----------+               |
                          +-------v--------+
                          | BS: N-input    |  Wallace tree
                          | adder          |
                          +-------+--------+
                                  | P_Mg
                              RgPMg (register)
                                  |
                           SmY: (RgY >> k) + RgPMg
                                  |
                                 RgY ----> y
    BK (control unit) drives the PEs, RgPMg and RgY

### Processing element (`pe`)

Each PE has three parts:

1. **Input subtractor and borrow trigger** (`group_subtractor`). Each clock,
   a k-bit subtractor forms `xe_grp - xb_grp - Tr`. The trigger Tr holds the
   borrow from the previous group and is forced to 0 on the first group. The
   difference groups shift into the group registers Rg1..Rgh. After h groups
   the registers hold Xe - Xb modulo 2^n, and Tr holds the sign.
2. **Module calculator OM** (`abs_module`). It gives |Xe - Xb|: the
   difference itself, or its two's complement when the final borrow is 1.
3. **Converter PC, formers and k-input adder** (`group_square_former`).
   - PC is a register. It takes |dX| one clock after the last group, then
     presents one group per clock, least significant group first.
   - Former F P_gr builds P_gr for the r-th bit of the group, counted from
     the group's top bit.
   - The adder BSmk adds the k partial results, each shifted right by r-1
     places, and outputs P_jKg.

### Multi-input adders (`multi_input_adder`, `counter7`)

Both the k-input adder inside a PE and the N-input adder BS are
`multi_input_adder`. Each layer of unlinked full adders turns every three
rows into two: a sum row, and a carry row shifted one place left. The layers
are arranged as a Wallace tree until two rows remain. One ordinary adder
then adds those two rows.

When the adder has seven operands, which is the default N, it first counts
each bit column with `counter7`. This is a seven-input single-bit adder
(inputs C1..C7, outputs S0, S1 and P0 of weights 1, 2 and 4), built from
four full adders. One step turns seven rows into three.

### Control unit BK (`control_unit`)

BK sends a control word to all PEs (`ssd_pkg::pe_ctrl_t`: `grp_en`,
`grp_first`, `ld_pc`) together with the output group step `grp_sel`. It
also times RgPMg and RgY.

## Timing

In cycle 0 the first group of a set is on the inputs, with `in_valid` high:

| Cycle       | What happens                                                    |
|-------------|-----------------------------------------------------------------|
| 0 .. h-1    | groups enter the subtractors; Rg1..Rgh fill, Tr tracks borrow    |
| h           | OM reads Rg and Tr; PC loads \|dX\| (`ld_pc`)                   |
| h+1 .. 2h   | step s = 0..h-1: PEs show P_jKg, BS adds them, RgPMg loads       |
| h+2 .. 2h+1 | SmY/RgY: Y = (Y >> k) + P_Mg, the first step starting from 0    |
| 2h+2        | `y_valid` high for one cycle, `y` holds the result              |

Collecting one set overlaps computing the previous one. A new set can
therefore start in cycle h, right after the last group of the previous set.
A continuous stream gives one result every h cycles.

`in_valid` may also drop between groups. BK counts groups, not cycles, and
`y_valid` always follows the set's last group by h+3 cycles. Results come
out in input order. There is no back-pressure: the consumer must take `y`
while `y_valid` is high.

Reset (`rst_n`) is asynchronous and active low, and clears every register.

## Parameters

| Module       | Parameter | Default | Meaning                                   |
|--------------|-----------|---------|-------------------------------------------|
| `ssd_device` | `N`       | 7       | operand pairs processed together          |
| `ssd_device` | `NB`      | 16      | operand width n                           |
| `ssd_device` | `K`       | 4       | group width k; `NB` must be a multiple of `K` |

The defaults live in `ssd_pkg`. The published method fixes none of these
sizes:

* N = 7 matches the seven-input adder that the method's multi-input-adder
  model is built around.
* n = 16 and k = 4 are ordinary choices.

Any N of 1 or more works. Any k that divides n works; k = n gives a single
group.

## What is taken from the method, and what is this design's own

These parts follow the published structure:

* group-serial input, least significant group first;
* the subtractor with borrow trigger and group registers;
* the module calculator;
* the parallel-to-vertical-group converter;
* the partial-square formers and their `01` tail;
* the k-input and N-input multi-operand adders built as Wallace trees of
  unlinked single-bit adders;
* the register for P_Mg, the adder and register for Y with the shift by k;
* the control unit that drives them;
* overlapping collection with computation over h cycles.

These are this design's own choices:

* the sizes N, n and k;
* unsigned operands;
* the 2n-bit fixed-point scaling;
* the group order in the accumulator, least significant first. This is the
  order under which the right-shift recurrence reproduces the group weights;
* the use of `counter7` as a column counter in the seven-operand adder, and
  the weights of its outputs;
* the final carry-propagate adder of each multi-operand adder;
* the cycle-by-cycle control sequence and the latency above;
* the valid-only stream interface;
* reset behaviour.

The published device was prototyped on an FPGA with fixed pin assignments.
Pin placement and I/O standards are not part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module with arithmetic that the testbench works out itself (`ssd_ref_pkg`
uses the integer squaring identity, not the fractional formers), and ends
by printing `TB_RESULT checks=<n> failures=<n>`.

| Testbench                | What it covers                                                       |
|--------------------------|----------------------------------------------------------------------|
| `tb_counter7`            | all 128 input combinations                                           |
| `tb_multi_input_adder`   | 7 (column-counter path), 5, 12 and 2 operands; random and all-ones   |
| `tb_abs_module`          | random, equal, extreme and one-apart pairs                           |
| `tb_group_subtractor`    | borrows rippling through every group; back-to-back pairs and gaps    |
| `tb_group_square_former` | every group step against the reference; square recombined; n=16/k=4 and n=8/k=2 |
| `tb_pe`                  | streamed pairs with overlapped output, per-step and total square     |
| `tb_control_unit`        | random and continuous `in_valid`; every control output every cycle   |
| `tb_y_accumulator`       | back-to-back sets; exact shifts; `y_valid` timing                    |
| `tb_ssd_device`          | whole device at default sizes; see below                             |
| `tb_ssd_device_sizes`    | whole device at N/n/k = 5/12/3, 12/8/2, 3/10/5 and 1/8/8 (one group) |

`tb_ssd_device` streams 3000 sets of seven pairs. Some sets come back to
back, some with random idle cycles, and some are corner sets:

* all differences zero;
* every pair 0 - 0xFFFF, the largest possible sum;
* borrows that ripple across groups.

For every set it checks the sum, the latency (h+3 cycles after the last
group, 2h+2 after the first) and the full rate of one result per h cycles.
It also counts how often each mechanism occurred, and fails if one never
did.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/ssd_pkg.sv tb/ssd_ref_pkg.sv tb/tb_ssd_device.sv \
        --top-module tb_ssd_device -Mdir obj
    ./obj/Vtb_ssd_device

Change `tb_ssd_device` to any other testbench name. The full-size test
finishes in well under a second.

## Files

* `rtl/ssd_pkg.sv`: default sizes and the PE control word.
* `rtl/ssd_device.sv`: top level.
* `rtl/pe.sv`, `rtl/group_subtractor.sv`, `rtl/abs_module.sv` and
  `rtl/group_square_former.sv`: the processing element and its parts.
* `rtl/multi_input_adder.sv`, `rtl/counter7.sv` and `rtl/full_adder.sv`:
  the multi-operand adders.
* `rtl/control_unit.sv`: control unit BK.
* `rtl/y_accumulator.sv`: RgPMg, SmY and RgY.
* `tb/`: the testbenches, plus `ssd_ref_pkg.sv` with the reference
  arithmetic and `ssd_stream_check.sv`, the parameterized stream checker
  used by `tb_ssd_device_sizes`.
