# Fault-tolerant 4 x 4 array multiplier with self-repairing full adders

This is a 4-bit unsigned array multiplier. Each full adder in it checks its own outputs and
corrects them while it runs. A stuck-at or transient fault on an adder's sum output, its
carry output or both is detected and corrected in the same combinational pass. The wrong
value never reaches the next adder or the product. The product is always `a * b`, even when
many adders are faulty at once.

The scheme is meant for safety-critical systems (space, defence, medical). It needs no
duplication, no voting and no retry. Each adder gets two small parity-style checkers, two
inverters and two 2:1 multiplexers. In the original circuit the adder core is a gate
diffusion input (GDI) cell of about ten transistors. The RTL here models that circuit at
gate level.

## How a full adder checks itself

A correct full adder (`sum = a^b^cin`, `cout = maj(a,b,cin)`) obeys two identities that a
cheap checker can test:

* **Sum.** `sum ^ cin == a ^ b`. The checker compares `G2 = ~(a^b)` with
  `G3 = ~(sum^cin)` and raises `Fs = G2 ^ G3` when they differ.
* **Carry.** The carry out equals the carry in except in two cases: `a = b = 0, cin = 1` and
  `a = b = 1, cin = 0`. The *functional unit* `F1 = a'b'cin + ab cin'` is 1 exactly in those
  cases. The checker compares `F1` with `G1 = cout ^ cin` and raises `Fc = G1 ^ F1` when
  they differ.

Each checker reads the adder's inputs and only its own output. So a fault on the sum cannot
hide a fault on the carry, and the reverse is also true. A *double fault*, with both outputs
wrong, raises both flags. A flag is 1 only when its output is actually wrong. For example, a
sum stuck at 1 while the correct sum is 1 raises nothing.

`G1` is written as the XOR of the complemented carry out and carry in, which equals
`cout ^ cin`. That gate is sometimes called an XNOR. Only the XOR reading gives `Fc = 0` for
a correct carry, so that is the one implemented.

## How it repairs itself

A wrong single bit has only one correct value: its inverse. Each output therefore goes
through an inverter and a 2:1 multiplexer whose select is the output's own fault flag:

```
sum_out  = Fs ? ~sum  : sum
cout_out = Fc ? ~cout : cout
```

Repair works for permanent faults (stuck-at) and transient ones (an inverted output). It
covers one output or both at once.

## The multiplier array

16 AND gates form the partial products `pp[r][j] = a[j] & b[r]`. Row 0 goes straight into a
running sum, and its lowest bit is `p[0]`. Rows 1 to 3 are each a 4-bit ripple-carry row of
self-repairing adders. Each row adds its partial product to the running sum, shifted down
one place:

```
row r, bit j:   a = pp[r][j]   b = running_sum[j]   cin = carry of bit j-1 (0 for j = 0)
p[r]          = sum of bit 0
next running  = {carry out of bit 3, sums of bits 3..1}
p[7:4]        = {last row's carry out, last row's sums of bits 3..1}
```

This gives 3 x 4 = 12 adder cells. The cells that a textbook array would build as half
adders are full adders here, with their carry in tied to 0. Only the counts are fixed (12
self-repairing adders, 16 AND gates). This ripple-row arrangement is one layout that fits
those counts.

The width is the parameter `WIDTH` (default 4). Any `WIDTH >= 2` gives the same array, with
`WIDTH*(WIDTH-1)` cells.

## Fault model and the fault port

Every adder cell has two fault sites: its sum output and its carry output, before the
checkers and the repair multiplexers. The `fa_fault_pkg::fault_e` type gives each site one
of four states:

| value          | effect                       |
|----------------|------------------------------|
| `FAULT_NONE`   | output unchanged             |
| `FAULT_STUCK0` | output forced to 0           |
| `FAULT_STUCK1` | output forced to 1           |
| `FAULT_FLIP`   | output inverted (transient)  |

`fa_fault_t` packs the two sites of one cell. The fault controls are ports so that the
detection and repair can be tested. In a real system, tie every site to `NO_FAULT`.

Two limits of the scheme:

* The checkers, inverters, multiplexers and AND gates are assumed healthy. A fault inside a
  checker is neither modelled nor covered.
* Only cell outputs are modelled as fault sites. A fault on the wire between cells is not
  covered either.

## Modules

| file | module | role |
|------|--------|------|
| `rtl/fa_fault_pkg.sv` | package | `fault_e`, `fa_fault_t`, `NO_FAULT`, `apply_fault()` |
| `rtl/gdi_full_adder.sv` | `gdi_full_adder` | 1-bit full adder, carry in GDI multiplexer form |
| `rtl/self_checking_fa.sv` | `self_checking_fa` | adder + fault sites + `Fs`/`Fc` checkers |
| `rtl/self_repairing_fa.sv` | `self_repairing_fa` | self-checking adder + inverter/multiplexer repair |
| `rtl/ft_array_multiplier.sv` | `ft_array_multiplier` | top: AND array + `WIDTH-1` rows of repairing adders |

Top ports (`ft_array_multiplier`):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | `WIDTH` | unsigned operands |
| `fault` | in | `fa_fault_t [WIDTH*(WIDTH-1)]` | fault at cell `k = (r-1)*WIDTH + j` |
| `p` | out | `2*WIDTH` | product |
| `fs`, `fc` | out | `WIDTH*(WIDTH-1)` | per-cell sum / carry fault flags, indexed like `fault` |

The design is purely combinational: it has no clock, no reset and no latency. The longest
path runs through the ripple carries of every row. Each cell adds one checker stage and one
multiplexer stage to that path. The `fs`/`fc` flags are for observation only; the repair
does not depend on them being read.

## Where this departs from the original design

* The adder is modelled as logic, not as a transistor-level GDI cell. Power, delay and
  transistor count are not modelled.
* The fault port, the four fault kinds and the `fs`/`fc` outputs of the multiplier are
  additions that make the mechanism observable and testable.
* The order in which the 12 cells are wired is a choice (see *The multiplier array*).
* The checker gate for `G1` follows its equation (XOR), not the XNOR name it is sometimes
  given.

## Testbenches

Each testbench is self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. The testbenches use a local
clock only to step through the vectors.

* `tb/tb_gdi_full_adder.sv` runs all 8 input combinations against `a + b + cin`.
* `tb/tb_self_checking_fa.sv` runs 8 inputs x 16 fault pairs. It checks the faulty outputs,
  and that each flag is raised exactly when its output is wrong.
* `tb/tb_self_repairing_fa.sv` runs the same 128 cases. The repaired outputs must always be
  correct, and the flags must match. It also counts sum-only, carry-only and double repairs.
* `tb/tb_ft_array_multiplier.sv` runs the top end to end at its default size. It covers all
  256 products in four phases:
  * no faults;
  * every single fault (12 cells x 2 sites x 3 kinds);
  * every double fault within one cell;
  * 4000 vectors with random faults in all cells.
  Every product must equal `a*b`, and healthy cells must never raise a flag. The testbench
  fails if a sum repair, a carry repair, a double repair or a repair in several cells at once
  never occurred.

To run one with Verilator:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
  rtl/fa_fault_pkg.sv rtl/gdi_full_adder.sv rtl/self_checking_fa.sv \
  rtl/self_repairing_fa.sv rtl/ft_array_multiplier.sv \
  tb/tb_ft_array_multiplier.sv --top-module tb_ft_array_multiplier
./obj_dir/Vtb_ft_array_multiplier
```

The multiplier testbench runs about 50,000 vectors in well under a second. To change the
width, set `WIDTH` on the top and set the same value in the testbench's `W` localparam.
