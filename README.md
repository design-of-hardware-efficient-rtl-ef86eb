# Multiplier-free 2D DCT for HEVC transform units

This design computes the forward 2D transform of an HEVC transform unit (TU)
of size 8x8, 16x16 or 32x32. It does not use the exact integer DCT of the
standard. Instead it uses an *approximate* DCT whose coefficients are all
-1, 0 or +1. The whole transform is therefore built from adders, with no
multipliers and no shift-and-add networks. One 32-lane 1D transform unit is
reconfigured per TU size, and two such units (one for columns, one for rows)
are joined by a transpose memory:

```
 residual columns                                       coefficient rows
 ──► input_splitter ──► dct32_approx ──► transpose_mem ──► dct32_approx ──► output_mem ──►
                        (columns)                        (rows)
```

The top module is `hevc_dct2d` (`rtl/hevc_dct2d.sv`).

## The approximate transform

### 8 points

The base transform maps x0..x7 to F0..F7 with this coefficient matrix:

| out | x0 | x1 | x2 | x3 | x4 | x5 | x6 | x7 |
|-----|----|----|----|----|----|----|----|----|
| F0  | +  | +  | +  | +  | +  | +  | +  | +  |
| F1  | +  | +  | +  | 0  | 0  | -  | -  | -  |
| F2  | +  | 0  | 0  | -  | -  | 0  | 0  | +  |
| F3  | +  | 0  | -  | -  | +  | +  | 0  | -  |
| F4  | +  | -  | -  | +  | +  | -  | -  | +  |
| F5  | +  | -  | 0  | +  | -  | 0  | +  | -  |
| F6  | 0  | -  | +  | 0  | 0  | +  | -  | 0  |
| F7  | 0  | -  | +  | -  | +  | -  | +  | 0  |

The rows are mutually orthogonal but have different norms (8, 6 or 4).
Any normalisation is left to the quantiser that follows, as for the HEVC
integer transform. `dct8_approx` builds the matrix from 22 adders in three
columns:

1. A butterfly forms a(i) = x(i) + x(7-i) and b(i) = x(i) - x(7-i).
2. The second column forms a0 ± a3 and a1 ± a2, which yields F2 and F6
   directly. It also forms four pairwise combinations of the b values.
3. The third column finishes F0, F4 and the odd outputs F1, F3, F5 and F7.

Everything longer is derived from this table. To match another
implementation of this approximation bit for bit, compare its 8-point matrix
with the table first, especially the odd rows F1, F3, F5 and F7.

### Doubling the length

An N-point transform is made from two N/2-point transforms:

* An **input adder unit** (`iau`) forms the sums a(i) = x(i) + x(N-1-i)
  and the differences u(j) = x(N/2-1-j) - x(N/2+j). The differences are
  listed from the middle of the input outwards.
* The first N/2-point transform takes the sums and gives the even outputs,
  F(2m).
* The second N/2-point transform takes the differences and gives the odd
  outputs, F(2m+1).

Applying this rule once gives the 16-point transform, and applying it twice
gives the 32-point one. Using the same -1/0/+1 structure for the odd half is
what makes the transform approximate: an exact DCT would need a different
odd-half matrix.

### One datapath, three lengths (`dct32_approx`)

All the adders of the 32-point transform are present at once, and multiplexers
bypass the ones that a shorter length does not use:

```
x[0..31] ─► 32-pt IAU ─► MUX(sel32) ─► 2 x 16-pt IAU ─► MUX(sel16) ─► 4 x dct8_approx ─► output_perm ─► F[0..31]
```

The two select bits form the TU-size code in `hevc_dct_pkg::tu_size_e`:

| {sel32, sel16} | enum   | one pass computes                                   |
|----------------|--------|-----------------------------------------------------|
| 00             | `TU8`  | four 8-point DCTs: x0..7, x8..15, x16..23, x24..31  |
| 01             | `TU16` | two 16-point DCTs: x0..15, x16..31                  |
| 11             | `TU32` | one 32-point DCT                                    |
| 10             | –      | reserved; the top asserts it never occurs           |

The output permutation (`output_perm`) puts the 32 unit outputs d[k][j]
(unit k, output j) in order:

* 8-point: F(8k+j) = d[k][j].
* 16-point: F(16h + 2j + q) = d[2h+q][j].
* 32-point: F(4j + r) = d[k][j], where r is k with its two bits swapped
  (0, 2, 1, 3).

F0 and F31 are wired straight through in every mode. Each of the other 30
outputs is a 3:1 multiplexer.

## Lane packing for small TUs

This is the part that needs the most care. The datapath always has 32
lanes. An NxN TU with N < 32 therefore uses G = 32/N transforms side by
side, and every vector between the blocks carries G columns or G rows:

| stage | vector s (or t) lane g*N + i holds           |
|-------|---------------------------------------------|
| splitter → column DCT | residual row i of TU column s*G + g |
| column DCT → transpose memory | coefficient i of column s*G + g |
| transpose memory → row DCT | element (row t*G + g, column i) |
| row DCT → output memory | coefficient i of row t*G + g |

Consequences:

* A TU takes S = N/G passes per direction: 32 for 32x32, 8 for 16x16 and
  2 for 8x8.
* `input_splitter` gathers G input columns into one vector.
* `transpose_mem` is a 32x32 register array. A write loads whole register
  columns through column enables. A read uses one multiplexer per lane to
  pick a register row. Both decode the TU size to find which registers and
  lanes take part.
* `output_mem` stores the result unpacked, row r in memory row r, so it is
  read the same way for every size.

## Sequencing, interface and timing (`hevc_dct2d`)

**Input.** The source presents one TU column per cycle on `in_col`, with row
r in lane r. Lanes at N and above are ignored. `in_valid`/`in_ready` is a
standard valid/ready handshake. `in_tu` is sampled with the first column of
each TU.

**COL phase.** Every G accepted columns, the splitter presents a packed vector
for one cycle. The column DCT transforms it combinationally, and the result
is written into the transpose memory at the next clock edge.

**ROW phase.** This phase runs S cycles. Each cycle reads G rows from the
transpose memory, passes them through the row DCT and writes them into the
output memory. There is only one transpose buffer, so `in_ready` stays low
from the last column write until the ROW phase ends.

**Result.** When the ROW phase ends, `out_valid` rises and `out_tu` gives the
size. The reader fetches rows with `rd_en`/`rd_row`. `rd_data` holds the row
one cycle later, with column k in lane k. Pulse `out_ack` to release the
result. While a result is held and unreleased, the next ROW phase waits, so
no result is ever overwritten.

**Latency.** Measured from the first accepted column to `out_valid`, into an
idle design:

| TU    | column input | write | row passes | total cycles |
|-------|--------------|-------|------------|--------------|
| 32x32 | 32           | 1     | 32         | 65           |
| 16x16 | 16           | 1     | 8          | 25           |
| 8x8   | 8            | 1     | 2          | 11           |

Input bubbles and waits for `out_ack` add cycles one for one.

**Critical path.** The 1D transforms are combinational. The longest path is
the transpose-memory read multiplexer, then five adder levels and the
multiplexers of the row DCT, ending in the output-memory write.

## Word widths

Every adder level adds one bit, and the values are never rounded, clipped or
scaled:

| signal                  | width                  | default |
|-------------------------|------------------------|---------|
| residuals               | `IN_W`                 | 9 bits  |
| transpose memory        | `MID_W` = `IN_W` + 5   | 14 bits |
| output coefficients     | `OUT_W` = `MID_W` + 5  | 19 bits |

The results are exact for any input. For example, the DC term of a 32x32
block of -256 is -262144, which just fits in 19 bits. To get narrower
outputs, add rounding or clipping after `dct32_approx` and set the parameters
to match.

## What this RTL chooses for itself

These points are not fixed by the architecture described above. They are
choices made here and can be changed:

* The handshakes, the one-buffer transpose memory, the `out_valid`/`out_ack`
  protocol, the cycle counts above and the reset. Reset is asynchronous and
  active-low, and it clears control state only, not the memories.
* The input format (one column per cycle) and the G-wide lane packing.
* Which pairs of b values the 8-point unit's second adder column combines.
  The adder count (22) and the three-column structure are fixed by the
  architecture.
* The transpose memory loads each register column through a synchronous
  write enable.
* 9-bit residuals and full-precision internal widths. A 16-bit output word
  would need rounding or clipping after a pass.
* 4x4 TUs are **not supported**, because the approximate transform has no
  4-point form. An HEVC encoder needs a separate 4x4 path, for example the
  4x4 DST or DCT, for those blocks.
* The output is the approximate transform. It is **not** bit-exact with the
  HEVC integer DCT, so an encoder using it trades some coding efficiency
  for the smaller hardware.

## Files

| file | contents |
|------|----------|
| `rtl/hevc_dct_pkg.sv` | TU-size enum (= {sel32, sel16}) and size helper functions |
| `rtl/iau.sv` | input adder unit (butterfly), parameter N |
| `rtl/dct8_approx.sv` | 8-point approximate DCT, 22 adders |
| `rtl/output_perm.sv` | output permutation, 30 3:1 multiplexers |
| `rtl/dct32_approx.sv` | reconfigurable 32/16/8-point approximate DCT |
| `rtl/input_splitter.sv` | column packing for the TU size |
| `rtl/transpose_mem.sv` | 32x32 column-write, row-read register array |
| `rtl/output_mem.sv` | result store with a row read port |
| `rtl/hevc_dct2d.sv` | top: the 2D chain and its sequencing |
| `tb/dct_ref_pkg.sv` | reference model: coefficient matrices built by the doubling rule |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench checks the hardware against values it computes itself. The
reference package `tb/dct_ref_pkg.sv` builds the 8-, 16- and 32-point
coefficient matrices from the 8-point table and the doubling rule. This is a
matrix formulation, independent of the adder networks in the RTL.

* **Module tests.** The datapath testbenches use random, impulse and extreme
  inputs in every mode. The memory and splitter testbenches write and read
  back random blocks of every size, with random bubbles and stalls.
* **End-to-end test.** `tb_hevc_dct2d` runs the top at its default
  parameters:
  * It compares every coefficient with Y = C X Cᵀ.
  * It checks the latency table above for each size.
  * It sends extreme blocks to check for overflow.
  * It forces input refusal and row-phase waits, and checks that each of
    these happens.

Each testbench ends with a `TB_RESULT checks=… failures=…` line.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
    tb/dct_ref_pkg.sv rtl/hevc_dct_pkg.sv tb/tb_hevc_dct2d.sv \
    --top-module tb_hevc_dct2d -o sim
./obj_dir/sim
```

Replace `tb_hevc_dct2d` with any other `tb/tb_<module>.sv` to test that
module alone. `-Irtl` lets Verilator find the other modules by file name.
The RTL is plain synthesizable SystemVerilog. The only non-synthesizable
lines are the assertions, on the TU-size code and the write phase.
