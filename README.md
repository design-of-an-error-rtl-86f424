# Error-tolerant adder (ETA)

Many signal-processing datapaths (audio, image, speech) do not need
bit-exact sums. The error-tolerant adder gives up a little accuracy in the
low-order bits to remove most of the carry chain. The result is a shorter
critical path and less glitching, and so less switching power. This
repository holds synthesizable SystemVerilog for a 32-bit ETA and its parts,
with self-checking testbenches.

## The addition rule

The operands are cut at bit `M`, and the two parts are added at the same
time, each working away from the cut:

* **Accurate part** (bits `WIDTH-1 .. M`). An ordinary binary adder with
  carry in 0. Nothing crosses the cut from the lower part.
* **Inaccurate part** (bits `M-1 .. 0`). No carries at all. The bits are
  scanned from `M-1` down to 0. While the two operand bits are `00`, `01`
  or `10`, the sum bit is their XOR. At the first position where both bits
  are `1`, the scan stops: that sum bit and every bit to its right are set
  to `1`.

Example, 16 bits cut 8/8: 45978 + 26899.

```
            accurate    inaccurate
  a         10110011    10011010
  b         01101001    00010011
                           ^ first position with 1 + 1 (bit 4)
  sum     1 00011100    10011111      (carry out 1)
```

The exact sum is 72877. The ETA gives 72863.

### How large the error can be

Let `Rc` be the exact sum and `Re` the ETA result. If no lower position
has both bits 1, the XOR is the exact sum of the lower part and `Re = Rc`.
Otherwise, let `p` be the first such position. The bits above `p` then
never overlap, so their XOR is their sum. The lower part loses only
`a[p:0] + b[p:0] - (2^(p+1) - 1)`. This includes the carry that would have
gone into the accurate part. So:

```
0 < Rc - Re <= 2^(p+1) - 1 < 2^M
```

The result is never larger than the exact sum. The error is bounded by the
position of the first `1 + 1`, and never reaches the weight of the
accurate part's LSB. With the default cut at bit 20 of a 32-bit adder,
uniformly random operands lose on average less than 0.01 % of the sum. In
200 000 random additions no result was below 98.5 % accuracy. Here
accuracy is `1 - (Rc - Re)/Rc`.

### Choosing the cut

The cut is chosen at design time by checking candidates in software. Pick a
minimum acceptable accuracy (MAA), for example 95 %, and an acceptance
probability (AP), for example 98 %. AP is the share of inputs whose
accuracy exceeds the MAA. If the candidate cut misses the AP, move one bit
from the inaccurate part to the accurate part and check again. A larger
inaccurate part saves more power and time. `tb_eta_full` makes this
measurement for the default cut.

## Structure

```
 a[31:20] b[31:20]                  a[19:0] b[19:0]
      |      |                          |      |
 +----v------v-----+             +------v------v------+
 | rca (12 bits)   |<- cin = 0   | control_block      |  ctl[19:0]
 | accurate part   |             | 20 CSGCs, 5 groups |-----+
 +--------+--------+             +--------------------+     |
          |                      +------v------v------+     |
          |                      | carry_free_adder   |<----+
          |                      | 20 modified XORs   |
          |                      +---------+----------+
     cout, sum[31:20]                  sum[19:0]
```

| module             | role                                                  |
|--------------------|-------------------------------------------------------|
| `eta`              | top level: splits the operands, joins the sums        |
| `rca`              | accurate part, a ripple-carry adder                   |
| `full_adder`       | one-bit cell of `rca`                                 |
| `control_block`    | finds the first `1 + 1` position and drives `ctl`     |
| `csgc`             | control signal generating cell, type I or type II     |
| `carry_free_adder` | one modified XOR per bit                              |
| `modified_xor`     | `sum = ctl ? 1 : a ^ b`                               |
| `eta_pkg`          | default sizes: 32 bits, 20 inaccurate, groups of 4    |

A ripple-carry adder is used for the accurate part on purpose. It is the
cheapest conventional adder in power. With only 12 bits it is not the
critical path, because the inaccurate part sets the overall delay. Any
other conventional adder could replace `rca` with the same ports.

### The control block and its group jumps

`ctl[i]` must be 1 when any position `j >= i` has `a[j] = b[j] = 1`. That
is a prefix OR running from the MSB down. The block builds it from one
control signal generating cell (CSGC) per bit:

* **Type I:** `ctl[i] = a[i] & b[i] | ctl[i+1]`
* **Type II:** `ctl[i] = a[i] & b[i] | ctl[i+1] | ctl[i+4]`

A plain chain of 20 type I cells would work, but it would rebuild the long
chain the ETA is meant to avoid. So the cells are grouped in fours,
counting from bit 0. The leftmost cell of each group that has a group
above it (bits 15, 11, 7, 3) is type II. Its extra input comes from the
leftmost cell of the group above (bits 19, 15, 11, 7). A 1 found in the
top group reaches bit 0 after passing four jump links and the cells inside
one group, not 20 cells. Logically the jump input is redundant: it only
changes how fast the signal arrives, not what arrives. Functional
simulation therefore cannot see the jumps. The testbenches check the
resulting `ctl` values and count how often a control signal crossed into
a lower group.

If `WIDTH` is not a multiple of `GROUP`, the topmost group is the short
one, and the jump into the group below it comes from the block's MSB. This
case is an extension. The published arrangement is 20 bits in five groups
of four.

### The modified XOR

In a custom layout the sum cell is an XOR gate with three extra
transistors. Two of them cut the XOR off its supply and ground when `ctl`
is high, and a pull-up then drives the output to 1. The XOR stops
switching below the first `1 + 1` position, and that is where the power
saving comes from. The RTL models only the logic function
(`sum = ctl | (a ^ b)`). A standard-cell flow keeps the function but not
the supply gating.

## Interface and timing

`eta #(WIDTH = 32, INACC_WIDTH = 20, GROUP = 4)`

| port   | dir | width         | meaning                                        |
|--------|-----|---------------|------------------------------------------------|
| `a`    | in  | `WIDTH`       | operand                                        |
| `b`    | in  | `WIDTH`       | operand                                        |
| `sum`  | out | `WIDTH`       | approximate sum                                |
| `cout` | out | 1             | carry out of the accurate part                 |
| `ctl`  | out | `INACC_WIDTH` | control signals of the inaccurate part         |

The adder is purely combinational: no clock, no reset, no handshake. The
outputs follow the inputs after the propagation delay. Register the inputs
or outputs outside if a pipeline stage is needed. `ctl` is brought out for
observation and testing and can be left unconnected. `INACC_WIDTH` must be
between 1 and `WIDTH-1`.

## Where this RTL departs from the published design

* The transistor-level modified XOR is replaced by its logic function, so
  its power advantage depends on the target technology.
* `cout` and `ctl` are extra outputs. The published block diagram shows
  only the sum bits, but its worked example keeps the carry out of the
  accurate part.
* Widths other than 32/20/4 are supported through the parameters. The only
  published configurations are the 32-bit adder with a 20-bit inaccurate
  part and a 16-bit example cut 8/8.
* Published delay and power figures come from FPGA synthesis and a
  transistor-level tool, and are not reproduced here. For the record, the
  32-bit ETA was reported at 9.4 ns against 31.8 ns for a 32-bit
  ripple-carry adder.

## Testbenches

Every testbench is self-checking. Each one prints
`TB_RESULT checks=<n> failures=<n>` and ends with `$finish`, and each has
a watchdog. The expected values come from a bit-serial model of the rule
above (`tb/eta_ref_pkg.sv`), not from the RTL structure.

| testbench             | what it checks                                                  |
|-----------------------|-----------------------------------------------------------------|
| `tb_full_adder`       | all 8 input combinations                                        |
| `tb_modified_xor`     | all 8 input combinations against the truth table                |
| `tb_csgc`             | both cell types, all 16 input combinations                      |
| `tb_rca`              | 12-bit corners (full carry ripple) and 20 000 random sums       |
| `tb_carry_free_adder` | 20 bits, arbitrary control vectors, no interaction between bits |
| `tb_control_block`    | 20/4 default, plus 8-bit and 10-bit instances (short top group) |
| `tb_eta`              | 16-bit worked example, 32-bit directed and random tests, error bound; counts exact, forced-to-1, group-jump, carry-out and inexact cases, and fails if any never occurs |
| `tb_eta_full`         | default 32-bit adder, 200 000 random additions, AP at MAA 95 % must reach 98 % |

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/eta_pkg.sv tb/eta_ref_pkg.sv tb/tb_eta.sv --top-module tb_eta
./obj_dir/Vtb_eta
```

Replace `tb_eta` with any testbench name. All of them finish in well under
a second.
