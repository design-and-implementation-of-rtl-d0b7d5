# Reconfigurable 64-bit Vedic multiply-and-accumulate unit

A fixed 64-bit MAC wastes most of its datapath when the workload only needs
16- or 32-bit precision. This unit shares one 64x64 multiplier and one
136-bit accumulator between three precisions, chosen at run time by a 2-bit
mode select:

| `s`  | mode | lanes | operands per lane | product per lane | accumulator lane | guard bits |
|------|------|-------|-------------------|------------------|------------------|------------|
| `00` | full | 1     | `a[63:0]`, `b[63:0]` | 128 bits | `acc[135:0]` | 8 |
| `01` | dual | 2     | `a[32k+31:32k]`      | 64 bits  | `acc[68k+67:68k]` | 4 |
| `10` | quad | 4     | `a[16k+15:16k]`      | 32 bits  | `acc[34k+33:34k]` | 2 |
| `11` | (unused, behaves as `00`) | | | | | |

So one clock cycle performs 1, 2 or 4 independent unsigned multiply-accumulates.
The multiplier is a hierarchical *Urdhva Tiryagbhyam* ("vertically and
crosswise") Vedic multiplier. The lanes are kept apart by **carry-break
logic** in the accumulator adder.

## Datapath

```
 s ──► precision_ctrl ──cfg──┬──────────────────────────────┐
                             │                              │
 a,b ─► reconfig_multiplier ─┴─ prod[127:0] ─► adder_logic ─┴─► acc_reg[135:0] ─► acc
         (4 x vedic_mul 32x32)                     ▲                 │
                                                   └──── feedback ───┘
```

`rmac_top` holds the three parts:

* `precision_ctrl` decodes `s` into a `prec_cfg_t`: the mode, the lane count
  and `carry_break[2:0]`.
* `reconfig_multiplier` produces a 128-bit product vector.
* `rmac_accumulator` holds the 136-bit register and `adder_logic`, the
  segmented adder that feeds the register back.

There is no pipelining. `a`, `b` and `s` are sampled at a rising edge, and
`acc` holds the new sum after that edge. `reset` is synchronous and active
high. It clears `acc` at the next rising edge.

## The Vedic multiplier hierarchy

`vedic_mul_2x2` is the leaf cell. It forms four AND partial products and
adds them with two half adders. `vedic_mul #(WIDTH)` splits each operand into
halves of H = WIDTH/2 bits. It then builds four HxH Vedic multipliers in
parallel:

* the vertical products low·low (`ll`) and high·high (`hh`);
* the crosswise products low·high and high·low.

It combines them as

    p = ll + ((lh + hl) << H) + (hh << WIDTH)

The module instantiates itself recursively down to the 2x2 cell. A 32x32
instance therefore holds the 4x4, 8x8 and 16x16 levels. The sums at each level
are written as word-level `+`, so synthesis chooses the adder architecture.

`reconfig_multiplier` uses four 32x32 blocks:

* u1 = a_lo·b_lo
* u2 = a_lo·b_hi
* u3 = a_hi·b_lo
* u4 = a_hi·b_hi

It outputs, depending on the mode:

* **full:** `u1 + ((u2 + u3) << 32) + (u4 << 64)`, the 128-bit product.
* **dual:** `{u4, u1}`. These are exactly the two 32x32 lane products.
* **quad:** `{u4.hh, u4.ll, u1.hh, u1.ll}`. The 16x16 lane products are the
  vertical sub-products *inside* u1 and u4. Each `vedic_mul` brings these out
  on its `p_ll`/`p_hh` ports.

So the SIMD modes reuse the multiplier that already exists. Nothing is
duplicated, and in the reduced modes u2 and u3 are simply unused.

## Segmented adder and carry-break logic

This part is the least obvious. `adder_logic` first **aligns** the product
vector to the accumulator lanes. Each lane product is zero-extended into its
lane, which leaves the guard bits above it:

    full: {8'b0, p[127:0]}
    dual: {4'b0, p[127:64], 4'b0, p[63:0]}
    quad: {2'b0, p[127:96], 2'b0, p[95:64], 2'b0, p[63:32], 2'b0, p[31:0]}

It then adds the aligned vector to `acc` using **one** adder cut into four
34-bit segments. The carry from segment *i* into segment *i+1* is ANDed with
`~carry_break[i]`:

| mode | `carry_break` | carry killed at acc bit |
|------|---------------|--------------------------|
| full | `000` | none: one 136-bit add |
| dual | `010` | 68: two 68-bit adds |
| quad | `111` | 34, 68, 102: four 34-bit adds |

The same adder hardware therefore serves all three modes. A lane that
overflows its guard bits wraps modulo 2^lane-width. It never disturbs its
neighbour, and the carry out of bit 135 is dropped. Worst-case headroom
before a wrap:

* full: 256 products
* dual: 16 products per lane
* quad: 4 products per lane

Clearing or draining the accumulator often enough is the user's job.

## Using it

Pack lane *k* of a SIMD operation into `a`/`b` at bit 32k (dual) or 16k
(quad). Read lane *k* from `acc` at bit 68k or 34k. Changing `s` does not clear
`acc`. The old bits are then reinterpreted with the new lane layout. Assert
`reset` for one cycle when switching modes, unless that reinterpretation is
what you want.

Example (quad mode, from a cleared accumulator): with `a = 2078314362` and
`b = 1515911804` (0x7be08f7a and 0x5a5afa7c), only lanes 0 and 1 have
non-zero operands: 0x8f7a·0xfa7c = 0x8c62a318 and 0x7be0·0x5a5a =
0x2bb84cc0. After one edge `acc = 12601409309807649560`,
which is 0x8c62a318 in `acc[33:0]` and 0x2bb84cc0 in `acc[67:34]`.

## Files

| file | contents |
|------|----------|
| `rtl/rmac_pkg.sv` | widths (64/128/136, 34-bit segments), `mode_t`, `prec_cfg_t` |
| `rtl/vedic_mul_2x2.sv` | 2x2 leaf cell |
| `rtl/vedic_mul.sv` | recursive WIDTHxWIDTH Vedic multiplier with `p_ll`/`p_hh` taps |
| `rtl/reconfig_multiplier.sv` | 64x64 core with mode-selected product vector |
| `rtl/precision_ctrl.sv` | mode decoder |
| `rtl/adder_logic.sv` | lane alignment + segmented carry-break adder |
| `rtl/rmac_accumulator.sv` | 136-bit register with feedback adder |
| `rtl/rmac_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

All widths are fixed by the package, and the design has no top-level
parameters. `vedic_mul` takes a `WIDTH` parameter (power of two, at least 4).

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each also has a cycle-count watchdog. The expected values come
from the simulator's own wide multiplication and from a lane-by-lane model.
They never come from the Vedic structure itself.

* `tb_vedic_mul_2x2`: all 16 input pairs.
* `tb_vedic_mul`: 8x8 exhaustively, including its 4x4 sub-products, and 32x32
  with corners and 20,000 random pairs.
* `tb_reconfig_multiplier`: all four mode codes, with corners and random
  operands.
* `tb_precision_ctrl`: all four codes.
* `tb_adder_logic`: carries placed at every segment boundary in every mode,
  plus random sums.
* `tb_rmac_accumulator`: cycle-by-cycle accumulation, the synchronous reset,
  and a check that `acc` holds until the edge.
* `tb_rmac_top`: the whole unit at its default configuration. It covers about
  7,000 MACs across all modes, and it reproduces the published dual-mode and
  quad-mode example results bit for bit. It counts, and requires at least one
  of, each of the following:
  * each mode code;
  * a mode switch with reset and one without;
  * a carry killed at a lane boundary;
  * a full-mode carry crossing a segment boundary;
  * use of the guard bits;
  * a lane wrap.

Build and run any of them with plain Verilator, for example:

    verilator --binary --timing -Irtl -Itb -y rtl +libext+.sv \
        rtl/rmac_pkg.sv tb/tb_rmac_top.sv --top-module tb_rmac_top
    ./obj_dir/Vtb_rmac_top

The gate-level multiplier turns into large C++ expressions. Building the
testbenches that contain 32x32 blocks takes one to three minutes with
Verilator's default optimisation.

## Where this RTL makes its own choices

* **Operands are unsigned.** There is no signed mode.
* **Mode `11`** is not defined by the architecture, and this RTL treats it as
  full precision.
* **Lane overflow wraps** inside the lane. There is no saturation or overflow
  flag.
* **No accumulate-enable or valid/done handshake.** The unit accumulates on
  every clock, so hold `a` or `b` at zero to idle. A `done` flag, if needed,
  belongs to the surrounding logic.
* **Mode changes do not clear the accumulator.**
* **Lane packing:** lane *k* comes from the *k*-th slice of `a`/`b` and goes to
  the *k*-th slice of `acc`. This layout reproduces the reference results of
  the original architecture exactly.
* **One segmented adder instead of separate adders.** The architecture's RTL
  schematic shows separate 34-, 68- and 136-bit adders and a mux. This RTL
  builds the one carry-broken adder that the architecture's description calls
  for. Both give the same per-lane sums.
* **Timing, area and power** (about 6.9k LUTs and 220 MHz on an FPGA in the
  original implementation) have not been reproduced here.
