# Three systolic-array GEMM engines: output, weight and input stationary

A convolution layer can be rewritten as one matrix product. Each output pixel
becomes a column of an ifmap matrix `X`, each filter becomes a row of a weight
matrix `H`, and the layer is `Y = H * X`:

| matrix | rows | columns |
|---|---|---|
| `X` (lowered ifmap) | `D = C*K*K` | `Wo*Ho` output pixels |
| `H` (filters) | `N` filters | `D` |
| `Y` (ofmap) | `N` | `Wo*Ho` |

A `P x P` grid of multiply-accumulate processing elements (PEs) computes such
a product quickly. The grid can be organised in three ways. Each way keeps a
different operand still inside the PEs and moves the other two past it:

* **Output stationary (OS).** Each PE owns one element of `Y`. Ifmap values
  and weights stream past it, and the PE accumulates over the whole
  reduction length `D`. Only the finished results leave the array.
* **Weight stationary (WS).** A `P x P` tile of weights is loaded into the
  PEs once. Ifmap vectors then stream through. Partial sums flow down the
  columns and out into a buffer.
* **Input stationary (IS).** A `P x P` tile of ifmap values is loaded into
  the PEs once. The filters then stream through. Partial sums again flow
  down and out.

This RTL builds all three as independent engines. Each engine has its own
array, its own buffers and its own controller, and `sa_top` places the three
side by side. The default size is a 4 x 4 array with 8-bit signed operands.
The buffers are sized for a small example layer: a 5 x 5 x 3 ifmap and four
3 x 3 x 3 filters, so `D = 27`, nine output pixels and `N = 4`.

The architecture follows the study *Algorithm-Architecture Co-Exploration of
Systolic Arrays Using High-Level Synthesis*. That study gives the PE
structures, the array organisation, the operand and accumulator widths, and
analytic formulas for buffer size and unit time. The buffers' organisation,
the controllers, the host interface and the cycle-level schedules are this
RTL's own.

## File map

| file | what it is |
|---|---|
| `rtl/sa_pkg.sv` | `buf_sel_e` (which buffer a host write targets), `psum_w()` |
| `rtl/os_pe.sv`, `rtl/ws_pe.sv`, `rtl/is_pe.sv` | the three PEs |
| `rtl/os_array.sv`, `rtl/ws_array.sv`, `rtl/is_array.sv` | `P x P` grids of those PEs |
| `rtl/sa_bank.sv` | one buffer bank: 1 write port and 1 synchronous read port |
| `rtl/st_ctrl.sv` | schedule generator shared by the WS and IS engines |
| `rtl/os_engine.sv`, `rtl/ws_engine.sv`, `rtl/is_engine.sv` | array + buffers + controller |
| `rtl/sa_top.sv` | the three engines side by side (`os_*`, `ws_*`, `is_*` ports) |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_sa_top` runs a whole layer |

## The processing elements

All three PEs have the same three registers. `ifmap_reg` holds an ifmap
value and `filter_reg` holds a weight. The third register holds the output
or partial sum: `ofmap_reg` in the OS and WS PEs, `psum_reg` in the IS PE. Each PE
multiplies two signed 8-bit operands into a 16-bit product. They differ in
which register holds still:

| PE | moves right | moves down | held | sum register |
|---|---|---|---|---|
| `os_pe` | ifmap (`in_data`→`out_data`) | weight (`in_weight`→`out_weight`) | output | `ofmap_reg += in_data*in_weight`; with `shift`, `ofmap_reg <= in_psum` |
| `ws_pe` | ifmap | weight, only while `load` | weight (`filter_reg`) | `ofmap_reg <= in_psum + in_data*filter_reg` |
| `is_pe` | weight (`in_weight`→`out_weight`) | ifmap, only while `load` | ifmap (`ifmap_reg`) | `psum_reg <= in_psum + in_weight*ifmap_reg` |

The OS PE multiplies the operands arriving at its inputs in the same cycle
they arrive, and it also passes them on through its registers. `clear`
zeroes its accumulator.

**Accumulator widths.** An OS PE sums `D = 27` products, so it needs
16 + ⌈log2 27⌉ = 21 bits. In WS and IS the sum grows by one product per row.
`psum_w(DW, r) = 2*DW + clog2(r+1)` gives 16, 17, 18 and 18 bits for rows 0
to 3. Each array row is instantiated at its own width, and the sums are
sign-extended between rows. Sums of -128 × -128 products, the largest
possible, are tested at every width.

## The arrays and their skew

`PE(r,c)` is row `r`, column `c`. The PEs are numbered PE0..PE15 row by row.

* **`os_array`.** Row `r` takes ifmap values for output pixel `r` from the
  left. Column `c` takes the weights of filter `c` from the top. The caller
  delays row `r` by `r` cycles and column `c` by `c` cycles. `PE(r,c)` then
  sees `X[k][r]` together with `H[c][k]` and builds `Y[c][r]`. To drain the
  results, `shift` moves every column's accumulators down one row per cycle.
  `col_psum` always shows the bottom row, so `P` shift cycles deliver rows
  `P-1, P-2, ..., 0`.
* **`ws_array`.** During `P` load cycles, column `c`'s weights are shifted in
  from the top, bottom row's weight first. Ifmap element `r` of a vector
  then enters row `r`, delayed by `r` cycles. The column sum
  `sum_r w(r,c)*x(r)` leaves the bottom `P + c` cycles after the vector's
  first element entered.
* **`is_array`.** The same as `ws_array` with the roles swapped. Ifmap values
  are preloaded down the columns and filter weights stream in from the left.

The top row's `in_psum` is tied to zero in all three arrays.

## The engines: buffers and schedules

Each engine builds its ifmap, filter and ofmap buffers from `P` `sa_bank`s.
There is one bank per array row or column, so every array edge gets one word
per cycle. Buffer sizes, in operand words:

| engine | ifmap buffer | filter buffer | ofmap buffer | analytic storage |
|---|---|---|---|---|
| OS | `P x D` (4 pixels × 27) | `P x D` (4 filters × 27) | `P x P` × 21 bit | `2·C·P·K² = 216` |
| WS | `P x M` (4 reduction rows × 9 pixels) | `P x D` (4 filters × 27) | `P x M` × 21 bit | `2·P·Wo·Ho + C·P·K²` |
| IS | `P x D` (4 pixels × 27) | `P x N` (4 reduction rows × 4 filters) | `P x N` × 21 bit | `C·P·K² + 2·N·P` |

One **unit** is one `start` … `done` run. The schedule counts `tt = 0` as
the cycle in which `start` is accepted.

**OS unit: one 4 x 4 output tile over all of `D`.**
- `tt = 0`: the accumulators are cleared.
- `tt = k + r`: ifmap bank `r` is read at index `k`. Filter bank `c` is read
  at `tt = k + c` in the same way.
- `tt = k + r + c + 1`: `PE(r,c)` adds product `k`.
- `tt = D+2P-1 .. D+3P-2`: the tile drains into the ofmap buffer. The ofmap
  buffer has one bank per filter, addressed by pixel.
- `done` pulses at `tt = D + 3P - 1`. That is 38 cycles at the defaults.

**WS and IS units: one `P`-deep slice of the reduction, starting at `k0`.**
The two engines share this schedule, generated by `st_ctrl`:
- `tt = 0 .. P-1`: the stationary tile is read, at reduction index
  `k0+P-1-tt`, so the bottom row comes first.
- `tt = 1 .. P`: the tile is loaded into the array.
- `tt = P + m + r`: stream vector `m` (an ifmap pixel for WS, a filter for
  IS) is read for row `r`.
- `tt = 2P + m + c`: the ofmap word `m` of column `c` is read.
- `tt = 2P + m + c + 1`: that word is written with the column sum. If `acc`
  was set at start, the old word is added to it. This is a read-modify-write.
- `done` pulses at `tt = T + 3P`, where `T = M = 9` for WS and `T = N = 4`
  for IS. That is 21 and 16 cycles.

Reduction indices at or beyond `D` read as zero. The last, partly filled
slice (`k0 = 24` of 27) therefore needs no special handling.

**Unit time against the analytic model.** The model predicts unit times of
`CK²+3P` (OS), `Ho·Wo+3P` (WS) and `N+3P` (IS). WS and IS match exactly. OS
is one cycle shorter, because its first buffer read overlaps the start cycle.
Per layer, the model's totals assume no tile rounding. Round the pixel count
and `D` up to multiples of `P` and the formulas give exactly the cycles
simulated for the example layer: 114 (OS), 147 (WS) and 336 (IS). These
counts cover array work only. The host's buffer loading is not included.

## Using an engine

Every engine has a host port:
- `wr_en`, `wr_buf` (`BUF_IFMAP`/`BUF_FILTER`), `wr_bank`, `wr_addr` and
  `wr_data` write one buffer word.
- `rd_bank` and `rd_addr` select one ofmap word, which appears on `rd_data`
  one cycle later.
- `start` (with `k0` and `acc` for WS/IS) begins a unit. `busy` is high
  while the unit runs, and `done` pulses for one cycle at its end.

Use the host port only while `busy` is low. An assertion flags writes during
a unit. A `start` pulse while busy is ignored.

To compute a whole layer:
- **OS.** For each 4-pixel group, write the group's `X` columns into the
  ifmap banks and the 4 filters' `H` rows into the filter banks. Start a
  unit, then read the 16 results. Filter `n`, pixel `p` is at bank `n`,
  address `p`.
- **WS.** Write all of `H` once: filter `n` goes to bank `n`, address `k`.
  Then, for `k0 = 0, 4, …, 24`, write `X` rows `k0..k0+3` into ifmap banks
  0-3, at address = pixel. Start with `k0` set and `acc = (k0 != 0)`. After
  the last unit, `Y[n][p]` is at bank `n`, address `p`.
- **IS.** For each 4-pixel group, write the group's `X` columns: pixel `c`
  goes to bank `c`, address `k`. Then, for each `k0`, write `H` columns
  `k0..k0+3` into filter banks 0-3, at address = filter, and start with
  `acc = (k0 != 0)`. `Y[n][p]` is at bank `p`, address `n`.

Rewriting a convolution as these matrices is left to the host; it is not
done in hardware. `tb/tb_sa_top.sv` shows the indexing:
`k = (c*K + ky)*K + kx`, `p = oy*Wo + ox`.

## What fits

A layer runs on the OS engine only if `C·K² ≤ D = 27`, because the
accumulators restart with every unit. The WS and IS engines split the
reduction into 4-deep slices and accumulate in the ofmap buffer. They tile
pixels (WS, 9 at a time) or filters (IS, 4 at a time), so a larger layer
needs more host passes. The example layer fits all three engines. The first
layer of VGG16/VGG19 (3 × 3 × 3) and of LeNet-5 (5 × 5 × 1) fits the OS
engine tile by tile. AlexNet's 11 × 11 × 3 first layer and every deeper
layer of these networks exceed `D` for OS. Raise `D`, `M` and `N` for such
layers. The RTL is parameterised and the accumulator width `ACC_W` should be
raised with them: 16 + ⌈log2 D⌉ bits at 8-bit operands. The three engine
testbenches also pass at `P = 8`, `D = 40`, `M = 11` and `N = 6`, with their
port widths edited to match.

Even at the default size, the WS and IS engines can compute a layer of any
depth if the host does more work. It refills the 27-deep stationary buffer
with the next chunk of the reduction and keeps `acc` set, so the ofmap buffer
goes on accumulating. The sums are held in 21-bit signed words, which are
exact only up to ±2^20. Sixty-four products of -128 × -128 already exceed
that limit. The random data of the layer tests stays well inside it, but deep
layers with real data need a wider `ACC_W`.

`tb_cnn_layers` runs real network layers this way and checks every output:

| layer | C·K² | engines | part simulated |
|---|---|---|---|
| LeNet-5 C1, C3, C5 | 25, 150, 400 | C1: OS, WS, IS; C3, C5: WS, IS | whole layers |
| AlexNet conv1 (11 × 11, stride 4) | 363 | WS, IS | first output row, all 96 filters |
| VGG16/19 conv1_1 | 27 | OS, WS, IS | first output row, all 64 filters |
| VGG16/19 conv1_2 | 576 | WS, IS | 9 pixels, all 64 filters |
| VGG16/19 block-5 shape (14 × 14 × 512) | 4608 | WS, IS | 9 pixels, 8 filters |

The test prints each run's array cycles next to the analytic total-time
estimate. The estimates assume a WS unit covers every output pixel and an IS
unit covers every filter. The default buffers hold 9 pixels and 4 filters, so
the simulated WS and IS counts are higher.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself
through a watchdog if it hangs. With Verilator 5, from the repository root:

```
verilator --binary --timing -Irtl -y rtl --top-module tb_sa_top rtl/sa_pkg.sv tb/tb_sa_top.sv
./obj_dir/Vtb_sa_top
```

Replace `tb_sa_top` with any other `tb/tb_<module>` to run another test.

* `tb_os_pe`, `tb_ws_pe` and `tb_is_pe` check each PE against a reference
  model every cycle, under random inputs and random control.
* `tb_os_array`, `tb_ws_array` and `tb_is_array` drive skewed streams by
  hand and compare every result with a dot product. They include an
  all-(-128) pass that needs the full accumulator widths.
* `tb_sa_bank` checks read latency and read-during-write behaviour.
* `tb_os_engine`, `tb_ws_engine` and `tb_is_engine` run complete products
  through the host port. They check the results, the exact unit cycle counts,
  the overwrite and accumulate modes and the ignoring of `start` while busy.
* `tb_cnn_layers` runs the network layers listed above. It takes a few
  seconds.
* `tb_sa_top` runs the example layer twice, at the default parameters,
  through all three engines. It compares the results with a direct
  convolution, not with the lowered matrices. It also counts the OS drains,
  WS/IS preloads, accumulating and overwriting units, partly filled
  reduction slices and padded pixel lanes, and fails if any of them never
  occurs.

## Choices not fixed by the architecture, and departures

* Operands are two's-complement signed. The stated widths (16, 17, 18 and
  21 bits) are just as valid for unsigned data.
* The PEs' `clear`, `shift` and `load` control pins are additions. The
  architecture names only the data ports and registers.
* The reset is asynchronous and active low, on `rst_n`. Buffers are not
  reset.
* Buffer banking, the one-cycle synchronous read, the host port and the
  accumulate-in-buffer scheme are this RTL's own. In particular, WS and IS
  accumulate across reduction slices in their ofmap buffers, at 21 bits.
* The OS unit takes `D + 3P - 1` cycles, not `D + 3P`.
* Not built:
  - a reconfigurable weight-stationary variant with weight decomposition
    for direct convolution, which is only mentioned, with no structure;
  - hardware for rewriting convolutions into the GEMM matrices, which the
    host does instead;
  - the direct, non-systolic GEMM implementations that the three arrays
    were compared against.
