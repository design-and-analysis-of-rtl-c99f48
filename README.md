# Error-tolerant adder (ETA), 32 bits

In a normal adder, most of the delay and much of the switching power come
from carries that ripple across the whole word. Many workloads, such as
image, audio and signal processing, can live with a small error in the
low-order bits of a sum. The error-tolerant adder (ETA) gives up exactness
there in exchange for a short, carry-free path.

The 32-bit operands are cut at a single **split point**:

| part | bits | how it is added |
|------|------|-----------------|
| accurate part | 31..20 (12 bits) | exactly, by a conventional adder whose carry in is tied to 0 |
| inaccurate part | 19..0 (20 bits) | with no carries at all, by a control block and a carry-free addition block |

Both parts start at the split point and work away from it at the same time.
The upper part works towards the MSB and the lower part towards bit 0.
No carry ever crosses the split.

This RTL gives the logic function of the design. In the original, the
circuit is built in gate-diffusion-input (GDI) logic. GDI is a transistor-level
style in which a two-transistor cell does the job of a 4- to 12-transistor
CMOS gate. Here the full adder is an 11-transistor GDI cell.

## How the inaccurate part adds

Scan the 20 low bit pairs from bit 19 down to bit 0:

* While no pair has been seen with both bits at 1, each sum bit is
  `a[i] XOR b[i]`. This is addition with the carry thrown away.
* At the first position `k` where `a[k] = b[k] = 1`, a carry would be
  produced and lost. From that bit down to bit 0, every sum bit is set to 1.

`control_block` produces a thermometer vector `ctl`. It is high from bit `k`
down to bit 0, and all zero if no 1/1 pair exists. It is an OR chain:
`ctl[19] = a[19]&b[19]`, and `ctl[i] = ctl[i+1] | (a[i]&b[i])`.
`carry_free_adder` then computes `sum[i] = (a[i]^b[i]) | ctl[i]`.

Worked example, using 8 bits split 4 + 4 (the `eta_example_tb` test):

```
          accurate | inaccurate
  a   =       1011 | 0111
  b   =       1011 | 1101
  ETA =     1 0110 | 1111     bit 3: 0^1 = 1; bit 2 is the first 1/1 pair -> bits 2..0 forced to 1
  exact =   1 0111 | 0100
```

### What the error looks like

The error follows directly from the structure. These properties are checked
on every vector by `eta_top_tb`:

* If the low 20 bits contain no 1/1 pair, no carry exists anywhere below the
  split. The ETA result is then **exact**.
* If the first 1/1 pair is at bit `k`, the ETA result falls short of the
  exact sum by at least 1 and at most `2^(k+1) - 1`. It therefore never
  overestimates, and the error is always below `2^20`. That is about 2.4e-4
  of the 32-bit range.
* Forcing bits to 1 makes up part of the lost carry. The result is the
  largest value the low bits can hold below the point where the carry was
  dropped.

## The accurate part and the full adder

`accurate_adder` is a 12-bit ripple-carry chain of `gdi_full_adder` cells.
The ETA leaves the choice of adder for this part open: ripple carry,
carry look-ahead or carry bypass would all do. Ripple carry was chosen here
because the design is built around its full-adder cell. Its carry in is tied
to 0. Its carry out is brought out as `cout`, which is bit 32 of the result.

`gdi_full_adder` is the logic view of the 11-transistor GDI full adder. It
forms `XOR` and `XNOR` of A and B, then makes two 2:1 selections:

* `SUM = Cin ? XNOR : XOR`
* `Cout = XOR ? Cin : A`. The carry propagates when the bits differ. When
  they are equal, A is the carry.

The signal names are those of the transistor schematic. Reading the two
pass-transistor stages as multiplexers is this design's interpretation.
Transistor-level properties, such as full-swing restoration, sizing, power
and delay, have no RTL counterpart and are not modelled.

## Hierarchy and interface

```
eta_top                 WIDTH=32, INACC_WIDTH=20
├── accurate_adder      WIDTH = WIDTH-INACC_WIDTH = 12
│   └── gdi_full_adder  x12
├── control_block       WIDTH = INACC_WIDTH = 20
└── carry_free_adder    WIDTH = INACC_WIDTH = 20
eta_pkg                 ETA_WIDTH, ETA_ACC_WIDTH, ETA_INACC_WIDTH (32, 12, 20)
```

`eta_top` ports:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | WIDTH | operands |
| `sum` | out | WIDTH | approximate sum; bits above the split are exact apart from the dropped carry |
| `cout` | out | 1 | carry out of the accurate part |

All blocks are purely combinational. They have no clock, no reset and no
handshake: the result is valid one propagation delay after the operands
change. To pipeline the adder, register `a`/`b` and `sum`/`cout` outside it.
`INACC_WIDTH` may be any value from 1 to WIDTH-1. Moving the split trades
accuracy for speed: a larger inaccurate part gives a shorter carry chain and
a larger worst-case error. Other values elaborate with an error.

## Verification

Each testbench checks its own results and ends with a `TB_RESULT
checks=N failures=M` line. Each has a watchdog that counts a failure if the
run does not finish.

| testbench | what it covers |
|-----------|----------------|
| `gdi_full_adder_tb` | all 8 input combinations against `a+b+cin` |
| `accurate_adder_tb` | full carry ripple, extremes and 2000 random vectors against integer addition |
| `control_block_tb` | each single 1/1 position, the no-pair case and 3000 sparse random vectors against a loop reference |
| `carry_free_adder_tb` | `ctl` driven directly: all-zero, all-one, every thermometer pattern and random patterns |
| `eta_top_tb` | default 32-bit configuration, with the worked example at the split point, corner cases and 20000 random vectors; also checks the error properties above and counts each mechanism (control block firing or idle, firing at bit 19, firing at bit 0 only, carry out, exact and inexact results); a mechanism that never occurs is a failure |
| `eta_example_tb` | 8-bit, 4 + 4 instance, with the worked example and all 65536 operand pairs |

To run one with Verilator, list the package first:

```
verilator --binary --timing --assert -Wall -Wno-UNUSEDPARAM \
  rtl/eta_pkg.sv rtl/gdi_full_adder.sv rtl/accurate_adder.sv \
  rtl/control_block.sv rtl/carry_free_adder.sv rtl/eta_top.sv \
  tb/eta_top_tb.sv --top-module eta_top_tb
./obj_dir/Veta_top_tb
```

Every testbench finishes in well under a second.

## Relation to the original design

These points follow the original design:

* the 32-bit width and the 12 + 20 split;
* accurate bits at the top, with carry in 0;
* the control block's "first 1/1 pair and everything to its right" rule;
* forcing those sum bits to 1;
* an 11-transistor GDI full adder as the arithmetic cell.

These are choices made for this RTL:

* ripple carry for the accurate part;
* the OR-chain structure of the control block;
* the XOR/OR structure of the carry-free block;
* reading the full adder as two multiplexers;
* bringing out `cout`;
* having no clock or registers.

The original reports, from transistor-level simulation, the power and delay
figures below. RTL simulation cannot reproduce them:

| adder | power | delay |
|-------|-------|-------|
| ripple-carry | 10.5 mW | 25 ns |
| carry look-ahead | 8.2 mW | 12 ns |
| GDI ETA | 4.1 mW | 5 ns |

The baseline adders in this comparison are not part of the design and are
not included.
