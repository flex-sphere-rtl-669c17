# Flex-Sphere: a configurable sort-free sphere detector

A base station that serves several users on the same frequency at once
(multi-user MIMO, or spatial multiplexing from one user with several
antennas) receives a superposition of all transmitted symbols. Optimal
(maximum-likelihood) detection checks every combination of symbols, which is
far too many for 4 streams of 64-QAM (64^4 = 16.7 million). This RTL
implements Flex-Sphere, a breadth-first sphere detector that gets close to
ML performance with a fixed, fully pipelined amount of work and without any
sorting:

* the channel is QR-decomposed beforehand, so the distance
  ||y' - R s||^2 can be built up one real symbol at a time, from the last
  row of the upper-triangular R to the first (a tree search);
* the first two tree levels are expanded completely (8 x 8 = 64 paths for
  64-QAM);
* below that, each path is extended only by its single best child. The best
  child is the constellation point nearest to z_i / R_ii (Schnorr-Euchner
  order), which is found by rounding, not by computing and sorting all
  children;
* the detected vector is the path with the smallest distance among the 64.

One detector handles 2, 3 or 4 complex streams (M_T) and 4-, 16- or 64-QAM
chosen per stream, and both may change from one received vector to the
next. It accepts one received vector every 8 clock cycles, which is
M_T x log2(QAM order) / 8 bits per cycle: 3 bits per cycle for four
64-QAM streams, or 849.9 Mbit/s at the 283.3 MHz reported for a Virtex-5
implementation of the original design.

## The search tree and how a problem is laid out

Each complex symbol is split into its real and imaginary part, giving a real
system of M = 2 M_T levels; a real part takes one of the odd values
-q .. q with q = 1, 3 or 7 for 4-, 16- or 64-QAM. The two parts of the same
complex symbol sit on adjacent levels (real, imaginary, real, imaginary ...,
the "modified real-valued decomposition"). The two fully expanded levels
therefore cover one whole complex symbol, and a problem with fewer streams
is finished after fewer levels.

Levels are numbered i = 8 (root, detected first) down to 1, and every array
indexed by level uses index i-1. The hardware always has 8 levels. A problem
with M_T streams uses levels 8 down to 9 - 2 M_T: give its R and y' in the
highest indices (the bottom-right corner of the 8x8 R) and ignore the
lower-level outputs. The caller builds R, y' = Q^H y and 1/R_ii (QR
decomposition, channel ordering and reciprocals are not part of this
design), and gives q per level (both levels of a stream get the same q).

## Datapath

```
           +------+   8 rows, each:                                          +------------+
 R, y' --> | ped1 |--> ped2 -> pedg(6) -> pedg(5) -> pedg(4) -> pedg(3) -> pedg(2) -> pedg(1)
 (i = 8)   +------+   (i=7)                  |                    |                  |
                                             +--- level 5 --------+--- level 3 ------+--- level 1 --> min_finder --> detected vector
```

* `ped1` (level 8) computes all 8 root candidates at once.
* Each of the 8 rows starts with a `ped2` (level 7). It receives one root
  candidate and issues its 8 children one per cycle. The design is
  therefore *folded* by 8: every unit after it sees one node per cycle, and
  a problem occupies each unit for 8 consecutive cycles.
* `pedg` (levels 6 .. 1) takes one node per cycle and produces its best
  child. 8 rows x 6 levels = 48 of them.
* `min_finder` takes, per row, the level that ends the problem (5, 3 or 1
  for M_T = 2, 3, 4). It collects the 64 candidates over 8 cycles, 8 rows
  at a time, and outputs the smallest.

Every node carries its partial distance T, the symbols decided so far, and
the *residuals* z_k = y'_k - sum_{j>i} R_kj s_j of all lower levels. When a
unit decides symbol s at level i it computes

```
e   = z_i - R_ii * s
T  <= T + e^2
z_k <= z_k - R_ki * s        for every k < i
```

so the next level starts from an interference-free value. This is where
most of the multipliers are: 8 per unit at the top, fewer further down.

## Finding the best child without sorting (se_slicer)

The child of a node at level i is the odd integer nearest to
b = z_i / R_ii, limited to the constellation:

```
s = g(2 * round((b + 1) / 2) - 1),     g(x) = clip(x, -q, q)
```

`round((b+1)/2)` rounds to an integer, so `2*round(...) - 1` is the nearest
odd integer; halves round up. The clipping handles the three constellation
sizes with the same hardware, where a fixed set of decision thresholds
would not. The division by two and the multiplication by two are shifts;
the division by R_ii is a multiplication by the supplied 1/R_ii. The slicer
is a 5-stage pipeline: register, +1, halve-round-double-minus-one, compare
with -q and +q, select.

At the two fully expanded levels a candidate outside the constellation
(|s| > q) does not exist. Its distance is forced to the all-ones value
0xFFFF, and every path through it keeps that value. Valid distances
saturate at 0xFFFE, so such a path never wins, not even on a tie.

## Running different modes back to back

M_T, and with it the number of levels, can change for every problem. A
problem with fewer streams finishes earlier, so two problems could bring
their final nodes to the Min_Finder in overlapping cycles. `flex_ctrl`
keeps a reservation bit per future cycle of the Min_Finder's input and only
accepts a problem (`in_ready` high) when

* at least 8 cycles have passed since the previous acceptance, and
* its 8-cycle Min_Finder window is free. The window starts 68, 112 or 156
  cycles after acceptance for M_T = 2, 3, 4.

With a constant M_T, problems are accepted every 8 cycles without a stall.
After a change of M_T the controller may hold a problem back for a few
cycles. Results can then leave in a different order than the problems
came in, so every problem carries an 8-bit label (`in_id`) that comes back
with its result (`out_id`).

Each accepted problem's R, 1/R_ii, q and label are kept in one of 32
context slots. The slot number travels with the nodes, and each level reads
its column of R from the slot. At most 22 problems can be in flight, so a
slot is never reused too early.

The Min_Finder's input multiplexer selects, in every cycle, the tap (level
5, 3 or 1) whose nodes belong to a problem whose M_T ends at that level. It
uses the M_T carried in the node. Nodes of longer problems that pass
through level 5 or 3 are therefore ignored.

## Timing

| | cycles |
|---|---|
| ped1 | 7 |
| ped2 | 17 (+ j for child j) |
| pedg | 22 |
| min_finder | 8 after its 8-cycle collection window |
| acceptance to result, M_T = 2 | 8 + 7 + 17 + 2 x 22 + 8 = 84 |
| M_T = 3 | 8 + 7 + 17 + 4 x 22 + 8 = 128 |
| M_T = 4 | 8 + 7 + 17 + 6 x 22 + 8 = 172 |

These are the latencies of the published design. The arithmetic here needs
fewer register stages (5 in ped1 and ped2, 11 in pedg, with at most one
multiplication or one add-and-compare per stage). Each unit pads the rest
with registers (`delay_line`), so that the timing matches exactly. To
trade latency for registers, lower the `LAT` parameters. The testbenches
compute their expected cycle counts from the same constants in `flex_pkg`.

Throughput is one problem per 8 cycles:

| bits per cycle (Mbit/s at 283.3 MHz) | 4-QAM | 16-QAM | 64-QAM |
|---|---|---|---|
| M_T = 2 | 0.5 (141.6) | 1.0 (283.3) | 1.5 (424.9) |
| M_T = 3 | 0.75 (212.4) | 1.5 (424.9) | 2.25 (637.4) |
| M_T = 4 | 1.0 (283.3) | 2.0 (566.6) | 3.0 (849.9) |

No clock frequency has been measured for this RTL. The Mbit/s column uses
the 283.3 MHz of the original FPGA implementation.

## Number formats

The 16-bit word width is from the original design. The binary point
positions are this implementation's choice.

| quantity | format |
|---|---|
| R, y' | signed 16 bit, 8 fraction bits (range +-128) |
| 1/R_ii | signed 16 bit, 12 fraction bits (R_ii must be above 1/8) |
| residuals z | signed 24 bit, 8 fraction bits; cannot overflow for 16-bit inputs |
| b = z * 1/R_ii | full 40-bit product, 20 fraction bits |
| symbols | signed 4 bit, odd, -7 .. 7 |
| distances T | unsigned 16 bit, 6 fraction bits; e^2 truncated, sum saturating at 0xFFFE; 0xFFFF = invalid |

On equal distances the path from the earlier cycle wins (lower level-7
candidate); within one cycle the lower row wins (lower level-8 candidate).

## Interface of `flex_sphere_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| in_valid / in_ready | in / out | 1 | problem handshake; in_ready depends on in_mt |
| in_r | in | 8x8x16 | R_{k,l} at in_r[k-1][l-1], upper triangular |
| in_rinv | in | 8x16 | 1/R_ii at [i-1] |
| in_y | in | 8x16 | y' at [i-1] |
| in_q | in | 8x3 | q per level: 1, 3 or 7 |
| in_mt | in | 3 | M_T: 2, 3 or 4 (other values act as 4) |
| in_id | in | 8 | label returned with the result |
| out_valid | out | 1 | result valid for one cycle |
| out_sym | out | 8x4 | detected real symbol of level i at [i-1]; levels below 9-2M_T are meaningless |
| out_ped | out | 16 | distance of the detected vector |
| out_mt, out_id | out | 3, 8 | M_T and label of the result |

The whole problem is presented in one cycle. A narrower input would need a
loader in front. The problem must stay on the inputs until it is accepted.

## Files

| file | contents |
|---|---|
| `rtl/flex_pkg.sv` | constants, formats, node and column types, shared arithmetic helpers |
| `rtl/flex_sphere_top.sv` | the detector |
| `rtl/flex_ctrl.sv` | admission, Min_Finder window reservation, context store |
| `rtl/ped1.sv`, `rtl/ped2.sv`, `rtl/pedg.sv` | level units |
| `rtl/se_slicer.sv` | nearest-constellation-point finder |
| `rtl/min_finder.sv` | tap multiplexers and minimum search |
| `rtl/delay_line.sv` | latency padding |
| `tb/flex_ref_pkg.sv` | integer/real reference model and random problem generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_flex_workloads` and `tb_flex_ber` |

## Verification

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

* `tb_se_slicer`: random values, exact integers and half points for all
  three q. The expected point is computed in floating point.
* `tb_ped1`, `tb_ped2`, `tb_pedg`: every output field against the reference
  model, at the exact cycle. The tests cover out-of-range candidates,
  saturation, clipping on both sides and propagation of the invalid marker.
* `tb_min_finder`: minimum and tie order over 64 candidates, windows on all
  three taps. Non-matching traffic on the other taps must be ignored.
* `tb_flex_ctrl`: in_ready against an independent model of the spacing and
  window rules, in both directions (missed and needless stalls), and
  context read-back.
* `tb_flex_sphere_top` runs the full-size detector end to end on 400
  problems. M_T and the modulation are random per problem, and one problem
  in three is noise-free. Each result is compared with the reference model,
  noise-free results also with the transmitted symbols, and the latency
  must equal 84/128/172. The test also counts mode switches, window stalls,
  out-of-order results, out-of-range roots and mixed modulations, and fails
  if any of them never happens.
* `tb_flex_workloads` streams each of the nine M_T/QAM combinations back to
  back. It checks one acceptance and one result every 8 cycles, and the
  resulting rate against the table above.

* `tb_flex_ber` runs four 64-QAM streams over random Rayleigh channels.
  The testbench draws the complex 4x4 channel, builds the real 8x8 matrix
  in the adjacent real/imaginary order, QR-decomposes it and quantises the
  inputs. It adds Gaussian noise and counts bit errors with Gray mapping,
  while checking every result bit-exactly against the reference model. No
  channel ordering is applied. With 400 vectors (9600 bits) per point it
  measured:

  | SNR per receive antenna | 15 dB | 20 dB | 25 dB | 30 dB | 35 dB |
  |---|---|---|---|---|---|
  | bit error rate | 0.195 | 0.097 | 0.023 | 0.0014 | 0 |

The reference model re-implements the algorithm directly (64-bit integers,
nearest odd integer via floating point). It follows the same fixed-point
rules as the RTL, so it checks the hardware bit-exactly but not the choice
of formats. The bit error rate has not been compared with exhaustive ML
detection, which would need 64^4 candidates per vector.

To simulate with Verilator, for example the full detector:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/flex_pkg.sv tb/flex_ref_pkg.sv tb/tb_flex_sphere_top.sv \
    --top-module tb_flex_sphere_top -Mdir obj_top
./obj_top/Vtb_flex_sphere_top
```

The other testbenches build the same way with their own top module.

## Departures from and additions to the original design

* **From the original design:** the tree search with two fully expanded
  levels and one child per node below; the nearest-point formula with
  run-time q; the forced maximum distance of out-of-range candidates; the
  8 + 8 x 6 unit structure with folding by 8; the Min_Finder taps at levels
  5/3/1; the unit latencies 7/17/22/8 and total latencies 84/128/172; the
  16-bit word width.
* **This implementation's own choices:**
  * binary points, widths of internal values, saturation and tie order;
  * residual vectors carried with each node;
  * 1/R_ii as an input;
  * one-cycle problem interface with valid/ready;
  * the context store and tags;
  * the Min_Finder window reservation that makes on-the-fly M_T changes
    safe;
  * labels on results;
  * padding registers in place of the original internal pipelining. The
    stage split of the original units is not known. Here each stage holds at
    most one multiplication or one add-and-compare. The reachable clock of
    this RTL has not been measured.
* Two-state simulation only: no X checks were possible.
