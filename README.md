# Modified BZ-FAD shift-add multiplier with a Ling parallel prefix adder

A shift-add multiplier spends most of its energy moving bits that do not need
to move: the multiplier Y is shifted right every cycle to expose its next bit,
zero is "added" whenever that bit is 0, and the whole partial product is shifted
every cycle. This design keeps the sequential, one-bit-per-clock structure of a
shift-add multiplier but removes those three sources of switching:

* **Y is never shifted.** It sits in a register and a row of AND gates picks the
  bit of the current cycle.
* **Zero bits bypass the adder.** When the selected bit is 0 the partial-product
  register is fed straight back through a multiplexer, and the adder inputs are
  held at zero. The adder works only in cycles that really add X.
* **The product is not shifted.** The lowest bit of each new partial product is
  already a final product bit. It is written directly into its own position of
  the product register. The remaining bits go back into the partial-product
  register one place lower, which costs only wiring.

The one adder in the datapath is a parallel prefix adder built on Ling's
pseudo-carry equations. It is modified so that it produces real carries, which
makes every sum bit a single XOR.

The organisation follows the modified "Bypass Zero, Feed A Directly" (BZ-FAD)
multiplier described in *Efficient Shift-Add Multiplier Design Using Parallel
Prefix Adder*. This is an independent RTL implementation. The top level,
`bzfad_top`, holds the two proposed sizes side by side: an 8 x 8 multiplier and a
16 x 16 multiplier, each with its own adder.

## One multiplication, cycle by cycle

For an N-bit multiplier, `acc` is the N-bit partial-product register and `lo` is
the lower half of the product. In processing cycle k (k = 0 .. N-1):

```
ybit = Y[k]                                   (AND gates, one-hot select)
pp   = ybit ? {cout, acc + X} : {0, acc}      ((N+1) bits, mux)
lo[k] <= pp[0]                                (final product bit)
acc   <= pp[N:1]                              (stored back, shifted by wiring)
```

After N cycles the product is `{acc, lo}`.

Example: X = 13 and Y = 11, with N = 8.

| k | Y[k] | action | pp (9 bits) | lo[k] | acc after |
|---|------|--------|-------------|-------|-----------|
| 0 | 1 | add    | 0_0000_1101 | 1 | 0000_0110 |
| 1 | 1 | add    | 0_0001_0011 | 1 | 0000_1001 |
| 2 | 0 | bypass | 0_0000_1001 | 1 | 0000_0100 |
| 3 | 1 | add    | 0_0001_0001 | 1 | 0000_1000 |
| 4 | 0 | bypass | 0_0000_1000 | 0 | 0000_0100 |
| 5 | 0 | bypass | 0_0000_0100 | 0 | 0000_0010 |
| 6 | 0 | bypass | 0_0000_0010 | 0 | 0000_0001 |
| 7 | 0 | bypass | 0_0000_0001 | 1 | 0000_0000 |

The product is `{0000_0000, 1000_1111}` = 143. Only three of the eight cycles
touch the adder.

## The Ling parallel prefix adder

This is the least obvious part of the design. `ling_prefix_adder` takes a
width `W` (8 or 16 here) and has no carry-in.

**Per-bit signals** (`ling_pre_cell`): generate `g_i = a_i b_i`, propagate
`p_i = a_i + b_i` (the OR, "transmit" form) and half sum `d_i = a_i xor b_i`.

**Pseudo carry.** Ling's pseudo carry into the step above bit i is

```
H_i = g_i + g_{i-1} + p_{i-1} g_{i-2} + p_{i-1} p_{i-2} g_{i-3} + ...
```

It relates to the ordinary carry out of bit i by `c_i = H_i p_i`. Because
`g = g p`, neighbouring terms pair up. With

```
G*_i     = g_i + g_{i-1}
P*_{i-1} = p_{i-1} p_{i-2}          (all signals below bit 0 are 0)
```

the pseudo carry becomes a prefix combination of every second pair:

```
H_i = (G*_i, P*_{i-1}) o (G*_{i-2}, P*_{i-3}) o ... ,    (G,P) o (G',P') = (G + P G', P P')
```

For example, `H_4 = G*_4 + P*_3 G*_2 + P*_3 P*_1 G*_0`. Even and odd bit
positions therefore form two independent chains, each W/2 leaves long. Each
chain needs only log2(W/2) prefix levels, one fewer than a conventional prefix
adder of the same width.

**Structure**, from inputs to outputs:

1. `ling_pre_cell` at every bit gives g, p and d.
2. `ling_int_cell` at every bit gives the leaf pair `(G*_i, P*_{i-1})`.
3. `prefix_gp_cell` nodes form a Kogge-Stone style tree on each chain. Level 1
   combines bit i with bit i-2, level 2 with bit i-4, and so on. All levels but
   the last are built from these nodes.
4. Real carries:
   * Bits whose H_i is complete before the last level (0..3 for W = 8, 0..7
     for W = 16) use `carry_cell_a`: `c_i = H_i p_i`.
   * The other bits use `real_carry_cell`. It fuses the last prefix combine
     with the AND by the bit's propagate:
     `c_i = (G + P G') p_i`, where G' is the finished H of the bit 2^levels below.
5. `sum_i = d_i xor c_{i-1}` and `cout = c_{W-1}`.

For W = 8 this gives:

```
bit        7   6   5   4   3   2   1   0
leaf       *   *   *   *   *   *   *   *     (G*_i, P*_{i-1})
level 1    o   o   o   o   o   o   .   .     combine with bit i-2
carry      R   R   R   R   A   A   A   A     R: combine with H_{i-4}, then AND p_i
                                             A: H_i AND p_i
```

W must be even, and W/2 must be a power of two. An assertion at time zero
reports any other value.

## Control and interface

`bzfad_mult #(N)` is the multiplier. Its ports are:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (all registers go to 0) |
| `start` | in | 1 | accepted when not busy; X and Y are captured at that edge |
| `x`, `y` | in | N | unsigned multiplicand and multiplier |
| `busy` | out | 1 | high for the N processing cycles |
| `done` | out | 1 | one-cycle pulse; `product` is valid from then until the next accepted start |
| `product` | out | 2N | unsigned X * Y |

Timing: the edge that accepts `start` is edge 0. Bits are processed at edges
1..N, and `done` is high in the cycle after edge N. An operation therefore takes
N+1 clocks: 9 for the 8-bit multiplier and 17 for the 16-bit one. A `start` raised
while busy is ignored. A `start` held high through the `done` cycle is accepted
there, so operations can run back to back every N+1 clocks. The `product` output
shows intermediate values while busy.

`bzfad_top` has the same four signals twice, suffixed `8` and `16`
(`start8, x8, y8, busy8, done8, p8` and `start16, ...`). The two multipliers
share only the clock and the reset.

## Module map

```
bzfad_top
 |- bzfad_mult #(N=8)         u_mult8
 |   |- bzfad_ctrl            IDLE/RUN state, bit index 0..N-1, load and done strobes
 |   |- ybit_select           index -> one-hot -> AND with Y -> ybit
 |   |- ling_prefix_adder     acc + X (inputs gated to 0 when ybit = 0)
 |   |   |- ling_pre_cell, ling_int_cell, prefix_gp_cell, carry_cell_a, real_carry_cell
 |   |- pp_register           bypass multiplexer + partial-product register
 |   '- prod_lsb_reg          per-bit-enabled lower half of the product
 '- bzfad_mult #(N=16)        u_mult16  (same, with a 16-bit adder)
```

`bzfad_pkg` holds the `gp_t` generate/propagate pair type and a helper function
for index widths.

## Where the RTL fills gaps or departs

The published design fixes the datapath organisation and the adder equations.
This RTL makes its own choices on the following points:

* **Handshake and operand registers.** The start/busy/done protocol, and the
  capture of X and Y into registers when a start is accepted, are this design's
  own. Some register must hold Y for the AND-gate bit selection.
* **Sequencing.** A small binary counter drives a decoder that feeds the AND
  gates. The same one-hot vector addresses the product bit being written. The
  earlier BZ-FAD design used ring counters; this design removes them but names no
  replacement.
* **Operand isolation.** "Register contents go to the adder only when the bit is
  1" is implemented as AND gating of both adder inputs. The assertion
  `a_adder_quiet` in `bzfad_mult` checks it.
* **Storage type.** The lower product half uses flip-flops with individual
  enables, not latches.
* **Adder tree topology.** The Kogge-Stone arrangement inside each parity chain
  is a choice. It puts cell A on exactly the low half of the bits, which
  matches bits 0..3 for the 8-bit adder. Any prefix tree over the same chains
  gives the same sums.
* **Intermediate generate.** `G*_i` is taken as `g_i + g_{i-1}`, pairing the bit
  with the one below, as the expansion of H_4 requires.
* **Signedness.** Operands are unsigned. No sign handling is defined.

The published FPGA results were not reproduced, because no FPGA flow is involved
here. They were measured on a Spartan-6:

| size | slices | delay | power |
|------|--------|-------|-------|
| 8-bit | 119 | 21.7 ns | 14 mW |
| 16-bit | 494 | 46.5 ns | 14 mW |

## Verification

Every module has a self-checking testbench in `tb/<module>_tb.sv`. Each one ends
by printing `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* **Cells:** exhaustive truth tables.
* **`ling_prefix_adder_tb`:** all 65,536 operand pairs at W = 8. At W = 16,
  carry-ripple corner cases plus 20,000 random pairs.
* **`bzfad_mult_tb`:** all 65,536 products of the 8-bit multiplier, each with a
  latency check (done exactly N+1 edges after start), a check that the result
  holds after done, and a stray start that must be ignored. Also 16-bit corner
  cases and 3,000 random products.
* **`bzfad_top_tb`:** runs both multipliers at their default sizes concurrently,
  with random, back-to-back and interrupted-start traffic. It counts each
  mechanism and fails if any never occurred:
  * bypassed zero bits
  * additions
  * additions with a carry-out
  * ignored starts
  * starts accepted in the done cycle
* **Controller, selector and register testbenches:** compare against small
  software models of the same block.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/bzfad_pkg.sv tb/bzfad_top_tb.sv --top-module bzfad_top_tb -o sim
./obj_dir/sim
```

Replace `bzfad_top_tb` with any other testbench name. To lint:
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/bzfad_pkg.sv rtl/bzfad_top.sv`.
The lint gives a `SYNCASYNCNET` warning because the assertions use the
asynchronous reset in `disable iff`. This is expected.

## Changing it

* **Multiplier width:** `bzfad_mult #(.N(n))` works for any N whose adder width
  is valid, i.e. N even with N/2 a power of two (2, 4, 8, 16, 32, ...). The
  controller and the selector work for any N.
* **Other widths:** for an odd width or one that is not a power of two, the
  adder needs a different tree, or the operands can be zero-extended to the next
  valid width.
* **Adder tree:** replace the `g_lvl` generate loop in `ling_prefix_adder` with
  another topology (Sklansky, Brent-Kung) over the same two parity chains. The
  leaf and carry cells stay as they are.
