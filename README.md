# Beam-parallel Mumford–Shah CT reconstruction accelerator

This is SystemVerilog RTL for an FPGA accelerator that reconstructs 3-D low-dose helical CT
volumes by full iterative reconstruction. The objective is a Mumford–Shah style functional:

    Γ(f, v) = Σ ||R f − g||² + α ∫ v² |∇f|² + β ∫ ( ε |∇v|² + (1 − v)² / (4ε) )

Here `f` is the image (attenuation), `v ∈ [0, 1]` is an edge indicator, `R` is the projection
operator and `g` is the measured data. The main idea is **asynchronous beam-based updates**.
Each X-ray beam of the current source position (the "CSP") is an independent task:

1. trace the beam through the volume;
2. compute its forward projection `R_i f` and residual `r_i = R_i f − g_i`;
3. take a gradient step on `f` and `v` at every voxel the beam crosses.

Many beams run at once, with no locking between them. Convergence is kept by diminishing step
sizes `λ_k = A/(B+k)` and `μ_k = A'/(B'+k)`.

The default configuration is:

- 48 processing elements (PEs);
- 874 × 874 image slices;
- a 24-slice sliding window over a 161-slice volume;
- 110 × 110 × 6 voxel tiles;
- a 736-channel × 16-row detector, scheduled in blocks of 48 channels × 1 row.

## Top level (`ct_accel_top`)

```
          descriptors                      step sizes λ_k, μ_k
 host ──► ray_controller ──beam──► PE[0..47] ◄──── step_size
                 ▲                  │   ▲
         rr_arbiter (PE choice)     │   │  stencil reads / voxel writes
                                    ▼   │
                    rr_arbiter (read)  rr_arbiter (write)
                                    ▼   │
                                 tile_cache  (16 colour banks, tiles of 110×110×6)
                                    │ fill / write-back, one voxel word at a time
                                 sliding_window  (window → DDR address)
                                    │
                                   DDR  {f[15:0], v[7:0]} per voxel
```

The host sequences the work through four start/done handshakes. All of them are synchronous to
`clk`; `rst_n` is a synchronous, active-low reset.

| Handshake | Effect |
|---|---|
| `step_start`/`iter_k` → `step_done` | Compute λ_k and μ_k for iteration k (42 cycles). They are held until the next request. |
| `csp_start` → `csp_done` | Run every beam of the current source position once. `csp_done` pulses when all C×W beams have been dispatched and every PE is idle. |
| `flush_req` → `flush_done` | Write every dirty tile back to DDR. This is needed before the window moves or the host reads the image. |
| `win_advance`/`win_advance_by` | Move the window base `win_z0` forward by that many slices. It stops at NZ − L. |

A typical run for one source position is: `step_start` → `csp_start` (repeat both for more
iterations) → `flush_req` → `win_advance` when the helix moves on.

Beam descriptors come from an external memory through `desc_req_*` / `desc_rsp_*`. Each one is a
`beam_t` holding:

- `sx, sy, sz` and `dx, dy, dz`: the start and end points of the beam's segment inside the
  window, in Q16.16 voxel units and window coordinates;
- `g`: the measured line integral, in Q16.16.

The descriptor index is `w·C + c`. Clipping beams to the window and converting scanner geometry
into segments is host work.

Five free-running counters report activity: `beams_dispatched`, `beams_done`, `voxels_committed`,
`cache_misses` and `cache_evictions`.

## The processing element (`pe`)

A PE is five stages joined by valid/ready FIFOs (`stream_fifo`):

```
beam ─► ray_tracer ─► FIFO ─► mem_prefetch ─┬─► forward_projector ─► r FIFO ─┐
  │                                          └─► ray buffer (MAX_RAY) ───────┴─► gradient_update ─► FIFO ─► write_back
  └─► g FIFO ────────────────────────────────────► (forward_projector)
```

The residual of a beam is known only after its last voxel has been projected. The gradient step
needs that residual at every voxel. So each fetched voxel, with its weight and its 5-point
stencil of `f` and `v`, is also kept in a per-PE ray buffer. The buffer has 2048 entries; a beam
crosses at most 874 + 874 + 24 = 1772 voxels of the window. The gradient stage replays the buffer
once the residual arrives.

A PE accepts a second beam while the first is still updating (`inflight ≤ 2`). This lets the next
beam's tracer setup and projection overlap the current beam's update. Voxels read by the second
beam may be older than the first beam's writes. That is the asynchronous update the algorithm
allows.

### Ray tracing (`ray_tracer`)

The tracer is a 3-D DDA (Amanatides–Woo) rewritten so that it emits one voxel per cycle with no
loop-carried division:

- **Setup, about 48 cycles.** Three restoring dividers compute `tDelta = 1/|d|` per axis, and a
  digit-by-digit square root gives the segment length. The parameter `t` is Q30.
- **Run, one voxel per cycle.** The axis or axes with the smallest `tMax` advance; ties advance
  together. The weight is the segment length times the parameter interval spent in the voxel,
  `w = (t − t_prev)·len`, in Q2.14.

### Forward projection (`forward_projector`)

A multiply–accumulate has more than one cycle of latency. To keep one voxel per cycle, the
running sum is split into `LATENCY` (4) partial sums used in turn, so consecutive products never
update the same register. After the beam's last voxel the partial sums are added together and `g`
is subtracted. The residual appears `LATENCY + 2` cycles after the last voxel.

### Gradient step (`gradient_update`)

For each voxel, with residual `r`, weight `w`, and the stencil centre C and neighbours E, W, S, N
in the slice plane:

    lap(x)  = x_E + x_W + x_S + x_N − 4 x_C
    |∇f|²   = (f_E − f_C)² + (f_S − f_C)²
    g_f     = 2 r w − 2α v_C² lap(f)
    g_v     = 2α |∇f|² v_C + β/(2ε) (v_C − 1) − 2βε lap(v)
    f ← f − λ_k g_f        (saturated to 16 bits)
    v ← v − μ_k g_v        (clamped to [0, 1])

The constants are α = 0.1, β = 0.05 and ε = 1 voxel. The stage is a three-stage pipeline with one
global stall. Internal arithmetic is Q16.16 in 64-bit intermediates.

The divergence term `div(v²∇f)` of the exact gradient is approximated as `v² lap(f)`, treating
`v` as locally constant. This is the main numerical simplification in the design.

### Write-back (`write_back`)

This stage forwards each updated voxel to the cache write port as soon as it is ready. It pulses
`beam_done` when the beam's last voxel is accepted. Nothing waits for other beams.

## The coloured tile cache (`tile_cache`)

The cache must return a whole cross stencil (centre plus four neighbours) in one cycle. Storage
is split into 16 banks by the colour

    colour(x, y) = (x mod 4) + 4·(y mod 4)

Under this colouring the five points of any cross fall in five different banks. Each bank
returns one word per cycle, and the stencil appears one cycle after the request is accepted.
Stencil neighbours outside the volume read the centre value, which gives a zero-gradient
boundary.

**Tiles and slots.**

- The window is cut into tiles of `TILE_XY × TILE_XY × TILE_Z` = 110 × 110 × 6 voxels, so an
  874 × 874 slice is 8 × 8 tiles.
- The cache holds `SLOTS_XY²` = 16 tiles. A tile goes to slot `(tx mod 4) + 4·(ty mod 4)`, so the
  cache is direct-mapped.
- Each slot keeps a tag `{tz, ty, tx}`, a valid bit and a dirty bit.
- The bank row is taken from the voxel's position inside a 440 × 440 × 6 region, so a slot needs
  no separate base address.

**Misses.** A read or write that misses stalls the cache (`rd_ready`/`wr_ready` low). The miss
FSM then:

1. writes the old tile back to DDR if it is dirty;
2. fills the new tile one voxel word at a time through `sliding_window`.

`flush_req` writes back every dirty slot and invalidates it. A flush starts only when no read or
write is pending.

The 48 PEs share the cache through two round-robin arbiters (`rr_arbiter`):

- the read arbiter grants one stencil read per cycle and routes the response to the granted PE
  one cycle later;
- the write arbiter grants one voxel write per cycle.

### Sliding window (`sliding_window`)

The window holds `L` slices starting at `z0`. It maps window coordinates to a linear DDR word
address, `((z0 + z)·NY + y)·NX + x`, and passes requests and responses straight through.
The window behaves as a FIFO of slices. Successive source positions of the helix need
overlapping slice ranges. Moving the window forward retires the oldest slices and brings new ones
into reach. Flush the cache first, because tiles are tagged in window coordinates.

## Scheduling (`ray_controller`)

Beams are visited in execution blocks of `C_B` channels × `W_B` rows:

    for cb in 0 .. ceil(C/C_B)−1
      for wb in 0 .. ceil(W/W_B)−1
        for c in block cb (C_B channels, fewer in the last block)
          for w in block wb
            dispatch beam (c, w)

Adjacent channels cross nearby voxels, so a block of 48 beams works within a few cached tiles.
For each beam the controller reads the descriptor and picks a ready PE round-robin. When no PE
is ready, it holds the beam and waits.

## Step sizes (`step_size`)

`λ_k = A_l/(B_l + k)` with A_l = 1/500 and B_l = 2, and `μ_k = A_m/(B_m + k)` with A_m = 1/2000 and
B_m = 2.5. Two 40-bit restoring dividers produce both values, unsigned Q8.24, 42 cycles after
`start`.

## Number formats (`ct_pkg`)

| Quantity | Format | Notes |
|---|---|---|
| image f | signed Q4.12, 16 bit | |
| edge indicator v | unsigned Q1.7, 8 bit | 1.0 = 128 |
| DDR / cache word | `{f, v}`, 24 bit | |
| intersection weight w | Q2.14 | |
| coordinates, g, r | Q16.16 | |
| λ, μ | Q8.24 | |
| gradient arithmetic | Q16.16 | 64-bit intermediates |

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `N_PE` | 48 | processing elements |
| `NX`, `NY` | 874 | slice size in voxels |
| `NZ` | 161 | slices in the volume |
| `L` | 24 | slices in the sliding window |
| `TILE_XY`, `TILE_Z` | 110, 6 | tile shape |
| `SLOTS_XY` | 4 | cache holds `SLOTS_XY²` tiles; `SLOTS_XY·TILE_XY` must be a multiple of 4 |
| `C`, `W` | 736, 16 | detector channels and rows |
| `C_B`, `W_B` | 48, 1 | execution block (channels × rows) |
| `MAX_RAY` | 2048 | per-PE ray buffer entries (longest beam) |
| `LATENCY` | 4 | partial sums in the forward projector |

## Size after generic synthesis

Yosys coarse synthesis of the top at its default parameters gives:

- about 28.7k word-level cells;
- 53k flip-flop bits;
- 43.9 Mb of memory.

The memory is the 16-bank tile cache (27.9 Mb) plus the 48 ray buffers and stage FIFOs. One PE
is about 550 cells, 1.1k flip-flop bits and 0.33 Mb of memory. Each `rr_arbiter` with 48 inputs is
about 730 cells.

## Where this RTL departs from the original design

- **Fixed point throughout.** The published work used a high-level-synthesis flow with
  floating-point ray tracing. Here ray tracing uses fixed point; the formats are listed above.
- **One shared cache.** The original gives each PE its own local buffer. Here all PEs share one
  16-bank tile cache behind arbiters, and each PE keeps only its own ray buffer. The cache
  therefore serves one stencil read and one write per cycle for all 48 PEs. This limits
  throughput well below one voxel per PE per cycle.
- **Direct-mapped tiles.** Two tiles that map to the same slot evict each other. When PEs work on
  different `z` tile layers at the same time, the cache can thrash.
- **Miss handling is simple.** Fills and write-backs move one word per DDR transaction.
- **Memory budget.** The tile cache is 16 × 110 × 110 × 6 × 24 bit ≈ 27.9 Mb. The 48 ray buffers
  add 48 × 2048 × 162 bit ≈ 15.9 Mb. The total exceeds the 32 Mb of block RAM on a ZCU102-class
  device. Lowering `MAX_RAY` to 512, or `SLOTS_XY` to 3, brings it under.
- **Gradient term.** `div(v²∇f)` is approximated by `v² lap(f)`, and ε is 1 voxel.
- **Scaling other volumes.** A 512 × 512 × 372 volume with a 672-channel detector needs
  `NX = NY = 512`, `NZ = 372` and `C = 672`. With those set, the last tile row of a slice is
  partial; the cache handles that.
- **Not included.** The host link (PCIe), the DDR controller, and the geometry that turns
  source/detector positions into clipped beam segments.
- **Fixed offline choices.** The tile shape and block size come from a design-space search done
  offline. They are fixed here as parameters.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_stream_fifo` | ordering, full/empty and count under random traffic |
| `tb_ray_tracer` | each weight against the segment clipped to that voxel in real arithmetic; face-connected voxel path; weights sum to the length; one voxel per cycle |
| `tb_forward_projector` | sum of f·w minus g, and the latency |
| `tb_gradient_update` | f and v updates against a real-valued model; clamping |
| `tb_mem_prefetch`, `tb_write_back` | stream order, back-pressure, end-of-beam flag |
| `tb_tile_cache` | random-walk stencil reads and writes against a shadow volume; misses, dirty write-backs; DDR equals the shadow after a flush |
| `tb_rr_arbiter` | fairness and grant holding |
| `tb_sliding_window` | addressing, saturation at NZ − L |
| `tb_step_size` | λ_k and μ_k against real division |
| `tb_ray_controller` | blocked visiting order, dispatch to ready PEs, done |
| `tb_pe` | axis-aligned beams through a behavioural cache; residual and every new f, v against values computed in the testbench |
| `tb_ct_accel_top` | end to end at reduced size (see below) |
| `tb_ct_accel_full` | end to end with every default parameter (see below) |
| `tb_ct_accel_m12500` | end to end sized for a 512 × 512 × 372 volume and a 672 × 16 detector (see below) |

`tb_ct_accel_top` runs 4 PEs on a 24 × 24 × 20 volume with a disc phantom. Over four iterations
the squared residual must fall. It also requires that each of these mechanisms happens at least
once:

- dispatch stall;
- read-arbitration conflict;
- two beams in one PE;
- cache miss;
- dirty eviction;
- flush;
- window move;
- step-size update.

`tb_ct_accel_full` instantiates `ct_accel_top` with no parameter overrides. It runs two passes of
all 11776 beams of one source position. Every beam is a short segment inside the first tile. The
test checks beam and voxel counts, a falling residual, a cache miss, and the flushed image in the
DDR model. `tb_ct_accel_m12500` sets `NX = NY = 512`, `NZ = 372` and `C = 672`, and moves the window to
slice 300. It runs all 10752 beams of one source position inside the partial corner tile
(x, y in 440..511), so tile fills that stop at the volume edge are exercised.

`tb/ddr_model.sv` is a behavioural DDR that stores words sparsely and reads unwritten
words as f = 0, v = 1.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ct_accel_top \
        -y rtl -y tb +libext+.sv -Irtl rtl/ct_pkg.sv tb/tb_ct_accel_top.sv
    ./obj_dir/Vtb_ct_accel_top

Lint a module with `verilator --lint-only -Wall -y rtl +libext+.sv rtl/ct_pkg.sv rtl/<module>.sv`.
