# Progressive radiance estimation engine (PREE)

Progressive photon mapping (PPM) renders an image in two kinds of passes. A
ray-tracing pass stores one *hit-point* for each surface point that a camera
ray reaches. Each photon-tracing pass after that shoots photons from the
lights, and every photon *refines* the hit-points it lands near. The
refinement makes the radius smaller, rescales the collected flux and counts
the photon. At the end, each hit-point's flux is turned into radiance and
added to its pixel. Profiling shows that this refinement (the *hit-point
update operation*) takes most of a photon pass's time.

This RTL is an engine for those two steps, as described by C.-C. Chiu,
L.-D. Van and Y.-S. Lin (IEEE Trans. Circuits and Systems I, 2018). It has:

* four **PREUs** (progressive radiance estimation units). Each is a
  single-precision floating-point pipeline that does either one hit-point
  update or one radiance evaluation per cycle. The two modes share the same
  divider, multipliers and adders.
* an **AFTSO-HpUOC** controller (approximate full task schedule-oriented
  hit-point update operation controller). It keeps all four PREUs busy even
  though photons affect very different numbers of hit-points.
* an **ADISO-REC** controller (approximate data-independent schedule-oriented
  radiance evaluation controller). It fetches hit-points in a strided
  ("leaping") order, so that two hit-points of the same pixel are never in a
  pipeline at once.

At 125 MHz the engine does four updates per cycle, i.e. 500 M updates/s. The
end-to-end test measures 499.99 M/s on a synthetic pass of 1,000 photons over
a 20×15 image.

## 1. The arithmetic

Notation for a hit-point: radius² `R²`, photon count `N`, accumulated flux
`τ` (r, g, b) and surface colour. For a photon: position and flux `φ`. With
one new photon (M = 1) and the PPM parameter α (0 < α < 1):

```
D²   = (xH-xP)² + (yH-yP)² + (zH-zP)²          distance square
f    = (N + α) / (N + 1)                        correction factor
R²'  = R² · f                                   radius reduction (no square root)
τ'c  = (τc + colourc · φc · 1/π) · f            flux correction, per colour
N'   = N + 1
```

The new values are written back only if `D² ≤ R²`. Radiance evaluation adds
one hit-point's share to its pixel value `L`:

```
L'c = Lc + (τc · 1/π) · 1 / (N_emitted · R²)
```

Several hit-points of one pixel (from reflection and refraction) each add to
the same `L`. That is why evaluation order matters (section 4).

## 2. Engine structure

```
        external data controller + memory (index table, hit-points, photons, pixels)
          |  photon stream          ^ addr lanes          | pu_* data     ^ po_* results
          v                         |                     v               |
  +--------------------------------------------------------------------------+
  | pree                                                                     |
  |   control unit                          mode                             |
  |   +-------------+   ref_addr, photon   +-----+     +------+              |
  |   | aftso_hpuoc |--------------------->| mux |---> | addr |  (out)       |
  |   +-------------+                      |     |     +------+              |
  |   +-------------+   leaping_addr       |     |                           |
  |   | adiso_rec   |--------------------->+-----+                           |
  |   +-------------+                                                        |
  |   preu x4  <---- pu_*  (hit-point, photon, pixel, tags)    ----> po_*    |
  +--------------------------------------------------------------------------+
```

Memory and the data controller that reads and writes it are **not** part of
the engine. The engine sends addresses out. Two things stay outside:

* In update mode each lane carries a `ref_addr`, an address into a hit-point
  *index table*. The table lists, for every photon, the hit-points it
  affects: entries `p_addr … p_addr+N-1`.
* In evaluation mode each lane carries a hit-point address directly.

The external controller reads the record (and, in evaluation mode, the
pixel). It hands the data to the PREU of the same lane on `pu_*`, any number
of cycles later. It writes `po_*` back when `po_write` is set. The testbench
`tb/tb_pree.sv` has a behavioural model of this controller and its memory.

## 3. PREU: one pipeline, two configurations

Unit latencies: Add/Sub/Mult/Square 2 cycles, Div 4 cycles, Compare 0 cycles
(combinational). Add one input register and one output register. In update
mode a result leaves **10 cycles** after its operands. In evaluation mode it
leaves **12 cycles** after them.

Update mode. `sK` means "value available after K stages".

| stage | distance block | radius block | flux block (×3 colours) |
|---|---|---|---|
| s0 | input register | input register | input register |
| s0→s2 | Sub ×3 | Add N+α, Add N+1 | Mult colour·φ |
| s2→s4 | Square ×3 | Div (N+α)/(N+1) … | Mult ·1/π |
| s4→s6 | Add dx²+dy² | … Div | Add τ + τM |
| s6→s8 | Add +dz² → D² | Mult R²·f | Mult ·f |
| s8 | Compare D² ≤ R², select new or old values | | |
| out | output register (cycle 10) | | |

Evaluation mode reuses units as follows:

* the red colour multiplier forms `N_emitted·R²` (s0→s2);
* the divider forms `1/(N_emitted·R²)` (s2→s6);
* the 1/π multipliers form `τ/π` (s2→s4, then delayed to s6);
* the flux-correction multipliers form the product (s6→s8);
* the flux adders add `L` (s8→s10).

The adders come before the multipliers in update mode and after them in
evaluation mode. So in evaluation mode the adders take their second operand
from a later stage (a feedback path). That adds two stages: the output
register captures at s10, i.e. cycle 12. A separate evaluation path would
need seven multipliers, three adders and one divider; sharing saves all of
them.

The hit-point address (`tag`) and pixel index travel along with the data, so
results can be written back out of order across lanes. If a photon lies
outside the radius, the old `N`, `R²` and `τ` come out with `po_write = 0`.
The unit never stalls. `mode` must stay constant while operations are in
flight; an assertion checks this.

## 4. Scheduling

### 4.1 Filling four lanes from uneven photons (aftso_hpuoc)

Photons affect anywhere from 0 to hundreds of hit-points. If each photon's
hit-points were given whole to the lanes, many lanes would sit idle. The
controller instead buffers up to four photons. For each photon it keeps
`p_addr` and the number of hit-points it still has to hand out. Every cycle
it does the following:

1. Compute running sums `accuHP_i` of the remaining counts of entries 0..i.
2. Set `dispatch_i = accuHP_i ≥ N_SET`. `buf_addr` is the first `i` for
   which this holds.
3. Send all hit-points of entries before `buf_addr`. Fill the remaining
   lanes from entry `buf_addr`:
   * if `accuHP_buf_addr ≤ N_SET`, that entry is used up;
   * otherwise only part of it is sent, and it stays at the front of the
     buffer with a smaller count.
4. Shift the unfinished entries to the front. Write a new photon into the
   first free slot. `busy` stays high while all four slots are full.

A photon hands out its addresses from the top down. Example: a photon with
`p_addr = 100` and 3 hit-points gives `102, 101, 100`. When a photon is only
partly sent, it keeps its lowest addresses.

Example with lanes 0..3: photon A (`p_addr 100`, 3 hit-points) and photon B
(`p_addr 200`, 6 hit-points) come out as

```
cycle 1:  102 101 100 205      A whole, B partly (5 left)
cycle 2:  204 203 202 201      B partly (1 left)
cycle 3:  200 + next photon's top addresses ...
```

If no `dispatch_i` is true, the controller waits for more photons. Two cases
send whatever is buffered and leave the other lanes invalid: the `flush`
input (end of a photon pass), or a full buffer. A full buffer only matters
when N_SET > 4.

Lane outputs are registered, so a lane appears 2 cycles after its photon is
accepted. With photons offered back to back, measured utilisation is:

| lanes | utilisation |
|---|---|
| 4 | 99.9996% |
| 8 | 99.998% |
| 16 | 99.994% |

In every case the four-entry buffer is enough. The original design reports
99.99%.

The running sums are 16 bits wide. Each count is clipped to 65,535 before it
is summed, and the sums saturate. Neither changes any comparison with N_SET.

### 4.2 Keeping one pixel out of a pipeline twice (adiso_rec)

Hit-points are stored in the order the ray tracer makes them. The two
hit-points of one pixel (say reflection and refraction) therefore sit at
neighbouring addresses. In evaluation each of them does read-modify-write on
the same pixel. If they were fetched one after the other, the second would
read `L` before the first had written it back, 12 cycles later.

ADISO-REC splits the `N` hit-points into four groups, one per PREU. The
group ends are `N>>2`, `N>>1`, `(N>>2)+(N>>1)` and `N`. Within its group,
each lane walks with the stride

```
leaping_value = N >> clog2(N_SET · N_PIP) = N >> 6     (4 lanes, 12 stages)
```

When the next leap would reach the group end, the walk restarts one address
after the previous start. Example: 256 hit-points gives a group size of 64
and a stride of 4. Lane 0 issues `0, 4, 8, …, 60, 1, 5, …, 61, 2, …`.
Neighbouring addresses are then about `group size / stride` (≈16) cycles
apart, more than the 12-stage pipeline. Every address is issued exactly once,
and a run lasts as many cycles as the largest group. One limit remains: a
pixel whose hit-points straddle a group boundary is not protected. That is
why the scheme is only "approximately" data independent.

## 5. Floating-point units

`fp_add`, `fp_sub`, `fp_mult`, `fp_square` and `fp_div` are pipelined IEEE
754 single-precision units. `fp_cmp` is a combinational `a ≤ b`. Each
pipelined unit evaluates a combinational function from `rtl/fp32_pkg.sv` and
then registers the result `STAGES` times (2, or 4 for the divider), so that
synthesis can retime the registers into the logic. Details:

* rounding is round-to-nearest-even;
* the divider uses 27-step restoring division of the significands;
* denormal inputs count as zero, and results below the smallest normal are
  flushed to zero;
* overflow gives infinity;
* invalid operations give a quiet NaN.

Rendering data never come near these limits.

## 6. Top-level interface (`rtl/pree.sv`)

| port | dir | meaning |
|---|---|---|
| `mode` | in | `MODE_HPUO` (0) update, `MODE_RE` (1) evaluation; change only when the PREUs are empty |
| `ph_valid`, `ph_in`, `busy` | in/in/out | photon stream: photon (6×32 bits), `p_addr`, hit-point count; accepted when `ph_valid & !busy` |
| `flush` | in | end of pass: send buffered hit-points even if lanes stay empty |
| `re_start`, `n_hit_total` | in | start radiance evaluation over `n_hit_total` hit-points |
| `re_busy`, `re_done` | out | evaluation addresses running / last one issued (one-cycle pulse) |
| `addr_valid[4]`, `addr[4]`, `addr_photon[4]` | out | per lane: index-table address and photon (update) or hit-point address (evaluation) |
| `pu_valid`, `pu_tag`, `pu_pix`, `pu_hp`, `pu_ph`, `pu_l` (×4) | in | PREU operands from the data controller; tag = hit-point address, pix = pixel index |
| `alpha`, `n_emitted` | in | PPM α and the number of emitted photons, as single-precision values |
| `po_valid`, `po_write`, `po_tag`, `po_pix`, `po_data` (×4) | out | results: `po_data` = {N, R², rgb}; rgb is the new flux (update) or new pixel value (evaluation) |

Reset is asynchronous and active low (`rst_n`). It clears the valid bits and
the controllers' state. Data registers are not reset. Parameters: `N_SET = 4`
lanes, `BUF_DEPTH = 4` photon buffer entries, `N_PIP = 12` (the stage count
used for the leaping stride).

## 7. Verification

Every testbench checks itself and prints `TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_fp_add`, `tb_fp_sub`, `tb_fp_mult`, `tb_fp_square`, `tb_fp_div` | 4,000 operations each, one per cycle, at the exact latency. The reference widens operands to double, computes, and rounds back to single bit by bit; this gives the correctly rounded result. |
| `tb_fp_cmp` | 5,000 comparisons, including ±0 and equal values |
| `tb_preu` | 600 updates (hits, misses, D² = R² exactly) and 400 evaluations back to back, bit-exact against `tb/pree_ref_pkg.sv`; latencies 10 and 12 |
| `tb_aftso_hpuoc` | the 100/3 example and its split follower; 2-cycle latency; every lane's (photon, address) pair in order; partial dispatch, multi-photon cycles, busy, flush, and photons with no hit-point all happen |
| `tb_adiso_rec` | address streams against a procedural walk for N = 256, 300, 1000, 4099, 7, 65; each address exactly once; lanes stay within their groups; run length; neighbouring addresses ≥ 12 cycles apart |
| `tb_aftso_utilization` | utilisation with 4, 8 and 16 lanes on a 2,000-photon stream |
| `tb_pree` | full engine at default parameters. Synthetic 20×15 pass: 300 pixels, 400 hit-points, 1,000 photons, 114,473 updates, then one evaluation. Every hit-point and pixel is compared bit for bit with the reference, applied in photon order and in leaping order. Also checked: latency of every result, at most one partly filled lane set, ≥ 99% utilisation, 100-cycle evaluation, no read-after-write hazard on any hit-point or pixel, and that every mechanism above occurred. |

The scene data are random (a 4×4×4 box with random colours, radii and
fluxes). The original Cornell-box, Sibenik and Conference-room scenes are not
reproduced, so image-quality figures (SSIM, SNR) are not checked here.

## 8. Running it

Verilator 5, from the directory that holds `rtl/` and `tb/`. Example for the
end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pree \
  rtl/fp32_pkg.sv rtl/pree_pkg.sv tb/fp_ref_pkg.sv tb/pree_ref_pkg.sv \
  rtl/delay_line.sv rtl/fp_add.sv rtl/fp_sub.sv rtl/fp_mult.sv rtl/fp_square.sv \
  rtl/fp_div.sv rtl/fp_cmp.sv rtl/preu.sv rtl/aftso_hpuoc.sv rtl/adiso_rec.sv \
  rtl/pree.sv tb/tb_pree.sv -o sim && ./obj_dir/sim
```

For another testbench, replace the top module and the last file. Packages
must come first. `tb_aftso_utilization` also needs `tb/aftso_util_run.sv`.
All testbenches finish in seconds.

## 9. How far to trust it, and where it departs from the original

Taken from the original description:

* the unit set and how the two PREU modes share it;
* the 10- and 12-stage depths and the unit latencies;
* the dispatch rule, the four-entry buffer, the top-down address order and
  the 16-bit `accuHP`;
* the leaping stride, the group boundaries and the restart rule;
* the four-lane structure with a mode-selected address source.

This design's own choices:

* **Floating-point internals.** The original uses library units with the
  same formats, latencies and rounding. The units here are written from
  scratch and flush denormals to zero.
* **Handshakes.** The original shows only representative signals. `busy` is
  as described. `ph_valid`, `flush`, `re_start`/`re_done`, the lane valid
  bits and the `po_write` flag are this design's own.
* **End of a photon pass.** What happens when fewer than four hit-points are
  left is not specified; here `flush` sends them out.
* **Photons with no hit-points** are accepted and dropped.
* **Leaping with fewer than 64 hit-points.** A stride of 0 would never
  advance, so a stride of 1 is used.
* **Register placement.** The PREU input and output registers are placed to
  give exactly 10 and 12 stages, and the controller outputs are registered.
* **Control unit.** It has no module of its own. The mode multiplexer sits
  in `pree`.

Not included: the external data controller and its memory. The original
leaves them out too; the testbench models them. The same goes for the ray
tracer and photon tracer that produce hit-points and photons, and for the
physical implementation (90 nm layout, 1.78 mm², 184 mW).

Open hazard in update mode. Two photons that affect the same hit-point
within about 10 cycles of each other would read a stale value. The original
does not address this. The end-to-end test arranges its index table so that
a hit-point is revisited only after 100 cycles, and it counts hazards (none
occur). A real data controller must keep the same distance or stall.

## 10. Files

* `rtl/fp32_pkg.sv`: floating-point functions.
* `rtl/fp_*.sv`: the floating-point units.
* `rtl/delay_line.sv`: operand and tag delays.
* `rtl/pree_pkg.sv`: record types (hit-point, photon, photon buffer entry,
  PREU result, mode).
* `rtl/preu.sv`, `rtl/aftso_hpuoc.sv`, `rtl/adiso_rec.sv`: the three main
  blocks.
* `rtl/pree.sv`: the top.
* `tb/`: the testbenches, plus the reference packages `fp_ref_pkg` and
  `pree_ref_pkg`.
