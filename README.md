# Motion segmentation processor for 640x480 video

This RTL cuts every video frame into regions that move coherently. Each region gets an affine
motion model plus a global brightness change:

    u = a1 + a2*x + a3*y        v = a4 + a5*x + a6*y        theta = (a1..a6, xi)

Each frame is labelled from three inputs:

- the frame itself and the next frame (t and t+1);
- a label map predicted from the previous frame;
- the models found for those labels.

Three kinds of work are done, one after another:

- **Robust model estimation.** A weighted least-squares fit of the affine model is made for every region. Outlier pixels are thrown out by their residual.
- **Relabelling.** Pixels are relabelled by minimising a Markov-random-field energy with iterated conditional modes (ICM), visiting pixels in raster order.
- **Detection.** New regions are found where pixels fit no existing model.

The labels and models of this frame are then carried forward to predict the next frame's label
map.

The whole frame is never held on chip. The frame is cut into 128x128 *divided images*: 5 across
and 4 down, the last row only 96 lines high. Each divided image is processed on its own, with at
most four regions (labels 0..3). Two things live off chip and are reached through ports:

- the predicted label map, one label per VGA pixel;
- a small region table holding, for each divided image, the labels in use and their models.

The architecture follows the published design "A VLSI Architecture for VGA 30 fps Video
Segmentation with Affine Motion Model Estimation". Its block diagrams give the blocks, their
connections and the two-stage pipeline, but not the arithmetic, number formats, energy weights or
handshakes. Those are this implementation's own choices, and every RTL file's header says which
is which. The places where the behaviour departs from the published algorithm are listed under
*Departures and open points*.

## Top level and pipeline (`vseg_top`, `seq_ctrl`)

Two stages work on consecutive divided images at the same time. Each stage owns one of two banks
of on-chip memory.

| stage | steps | module(s) |
|-------|-------|-----------|
| A | read the region table entry; stream 128x128 pixels of frames t and t+1 with the predicted labels; build the half-size level; estimate all models | `multires`, `psm` |
| B | ICM update of region boundaries; detection of a new region; prediction into the external map; region table write-back | `upd_det` (twice), `prediction` |

`seq_ctrl` starts both stages together. When both have finished, it swaps the banks and hands
stage A's divided image to stage B. It then starts the next image in raster order and advances
the frame counter after image 19. So the model estimation of image *n+1* runs while image *n* is
relabelled.

A bank holds:

| memory | contents |
|--------|----------|
| first image | 128x128 + 64x64 bytes |
| second image | 128x128 + 64x64 bytes, 4 read ports for interpolation |
| label map | 4 bit per pixel: current label and predicted label |
| region registers | labels in use, 4 models |

Regions are kept per divided image. There is no linking of labels across divided-image edges.

External interfaces have a fixed one-cycle read latency and never stall:

| ports | purpose |
|-------|---------|
| `ld_req`, `ld_addr`, `ld_first`, `ld_second` | pixel source: the frame-raster address goes out and the pixels of frames t and t+1 come back |
| `pm_raddr`/`pm_rdata`, `pm_we`/`pm_waddr`/`pm_wdata` | prediction map (2-bit labels, 640x480) |
| `rt_raddr`/`rt_rdata`, `rt_we`/`rt_waddr`/`rt_wdata` | region table, 20 entries of `region_t` (`active` flags + 4 models of 7 x Q16.16) |
| `blk_done`, `frame`, `idle`, `n_*` | status and activity counters |

Region bookkeeping happens in stage B:

- A label that owns no pixel after Update and Detection is released.
- A label created by Detection enters the table with a zero model.
- The new region's model is first estimated when the same divided image comes round in the next frame. No estimation is repeated inside a frame, which is what keeps one model fit per region per frame.

## Number formats (`seg_pkg`)

| quantity | format |
|----------|--------|
| pixels | 8-bit grey |
| model parameters | signed Q16.16 |
| gradients and residuals | signed integers in quarter grey levels |
| normal-equation accumulators | 64 bit |

Pixel coordinates inside the models are taken relative to the centre of the divided image,
(x-64, y-64). So `a1`/`a4` are the displacement of the block centre. This also keeps the normal
equations far better conditioned than corner-origin coordinates would.

## Motion estimation (`psm` and its parts)

The fit is the weighted least-squares solution of the linearised brightness constancy
residual:

    r   = J(x+u, y+v) - I(x, y) + xi
    chi = (Ix, Ix*xc, Ix*yc, Iy, Iy*xc, Iy*yc, 1),   y = -r
    G   = sum w*chi^T*chi,   Gs = sum w*chi^T*y,     dtheta = G^-1 * Gs

It is applied as a Gauss-Newton increment on top of the current model, so it runs at any
displacement the pyramid can reach.

All four regions are fitted in the same pass over the pixels. The pixel's label selects the model
fed to the common element. `grad_mat_mem` keeps one set of G/Gs accumulators per label, and the
pixel's terms are added to its label's entry.

Schedule per divided image:

1. Work at the half-size level, then at full size (2x2 rounded means from `multires`).
2. At each level, repeat `ITER` = 2 times:
   1. An accumulate pass over all pixels.
   2. A solve for every label in use.
   3. A weight pass that recomputes every pixel's weight under the new models.
3. Keep the weights in two 1-bit memories that swap after each weight pass. After the level change, a full-size pixel uses the weight of its parent pixel.
4. Before the first weight pass every pixel has weight 1.

The weight is binary. It is 1 when all of these hold:

- the moved position lies inside the divided image;
- the label is in use;
- |r| <= `C_TH` = 16 grey levels.

Otherwise it is 0.

One pixel enters the pipeline per clock. A divided image takes about 94k cycles (2 levels x 2
iterations x 2 passes, plus solves), plus 16.4k cycles to load.

### Common element (`ce`, `coord`)

Shared by estimation, Update and Detection. Its pipeline:

- **Cycle 0.** `coord` moves the pixel with the model (Q16). The four second-image addresses around the moved point are issued.
- **Cycle 1.** Bilinear interpolation with 8 fraction bits. The gradients are taken over the 2x2 cell, and the residual is formed.
- **Cycle 2.** The outputs appear, together with an `in_blk` flag for points whose cell leaves the divided image.

The observation `o` is |r| saturated to 8 bits; it is the data term of the labelling energy.

### Solving the 7x7 system (`inv_matrix`, `seq_div`, `motion_update`)

G mixes very different scales: gradient sums against position-weighted sums up to 64² larger.

1. `inv_matrix` first equilibrates with powers of two. sc[i] = ceil(bits(G(i,i))/2), and G' = D G D with D = diag(2^-sc). This puts every diagonal entry in [1/4, 1).
2. Gauss-Jordan elimination without pivoting then runs on G', which is symmetric positive semidefinite. It uses 96-bit Q32 words and one multiply per clock. The pivot reciprocal comes from a restoring divider. This takes about 1.4k cycles per region.
3. A non-positive pivot marks the region `singular`, and its model is left unchanged.

`motion_update` computes dtheta_j = sum_k 2^-sc[j] inv'(j,k) 2^-sc[k] Gs_k in NPRM+1 cycles and
adds it to the model.

## Relabelling and detection (`upd_det`)

The local energy of label l at a pixel is:

    U(l) = o_l                                   (|residual| under model l)
         + BETA  * #8-neighbours labelled != l   (smoothness)
         + GAMMA * [l != predicted label]        (temporal continuity)

with BETA = 4 and GAMMA = 2.

**Update.** Visits pixels in raster order.

- A *judgment* step first reads the 3x3 window. A pixel whose eight neighbours all carry its own label is skipped. Only region boundaries are ever relabelled.
- The candidates are the labels in use that appear in the window. Each candidate costs one common-element evaluation, and the lowest energy wins.
- Passes repeat until a pass changes nothing, up to `ICM_MAX` = 4.

**Detection.** One pass, with two candidates per pixel:

- the pixel's own label, at energy o + BETA_D·(differing neighbours);
- the lowest label not in use, at the fixed energy TH_MOB + BETA_D·(neighbours not carrying it).

Pixels whose own model moves them out of the divided image give no evidence and keep their label.
The pixels that flip form the new region, so at most one new region is made per divided image per
frame. The energy weights are defaults chosen for 8-bit video, and all are parameters.

The 3x3 label window slides along each row. The first pixel of a row reads all nine labels;
every further pixel reads only the three labels of its new right-hand column. The pixel just
decided moves into the window with its new label, so the raster-order ICM always sees the
freshest labels.

| case | cycles per pixel (row start) |
|------|------------------------------|
| skipped by judgment | 5 (11) |
| Update, evaluated | 12 (18) |
| Detection | 9 (15) |

Stage B is the longer of the two pipeline stages (see *Performance*).

## Prediction (`prediction`)

After Detection, every pixel of the divided image is moved with its label's model, rounded to the
nearest pixel, and its label is written at that position of the external prediction map. The
same divided image of the next frame loads it from there.

The projection has limits:

- Positions outside the divided image or below line 480 are dropped.
- Pixels with an unused label are dropped.
- Map positions nothing lands on keep their old label. The projection is forward, not an inverse warp.

The `used` output tells the top which labels still own pixels. The block handles one pixel per
clock.

## Performance and size

At the full frame size, the end-to-end test measured:

- stage A at 114k cycles per divided image;
- about 262k cycles per pipeline step on average, bounded by stage B;
- 5.22M cycles for the longest frame.

A 30 frame/s target at a 167 MHz clock leaves 5.57M cycles per frame, or 278k per divided image,
so that scene runs at about 32 frames/s. Stage B's time depends on the content:

- each ICM pass costs about 82k cycles plus 7 cycles per boundary pixel evaluated;
- up to `ICM_MAX` = 4 passes are made;
- Detection adds 148k cycles and Prediction 16k.

A divided image with long boundaries that needs all four passes therefore exceeds the budget.
Lowering `ICM_MAX` bounds the worst case.

The two banks total about 100 kbyte of on-chip memory, since both images are double-buffered.
External traffic is 20 bits per pixel: two pixels in, one label read, one label written.

## Departures and open points

- The M-estimator weight function is replaced by a binary inlier test.
- There are two pyramid levels, with a fixed count of iterations and no convergence test.
- Each frame runs prediction, estimation, update and detection once, with no inner loop. Detection makes at most one new region per divided image per frame, so further regions appear in later frames.
- Motion estimation for a new region is deferred to the next frame, as described above.
- Regions never merge, and labels are not shared across divided images.
- The label map is double-banked like the images, one bank per pipeline stage. The next divided image's predicted labels can then be loaded while the current one is relabelled.
- Memories are modelled as arrays with one write port and several read ports. A real implementation would map the 4-port second image onto banked single-port macros.
- 30 frame/s at 167 MHz is reached on typical content, not guaranteed for every frame (see *Performance*).
- On the moving-square scene of the end-to-end test, detection sometimes adds a second small region at the object's edge in a later frame. Nothing merges it back.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M`,
has a watchdog, and ends with `$finish`.

| testbench | what it checks |
|-----------|----------------|
| `tb_seg_ram` | random writes and reads on every port against a reference array, including read-during-write |
| `tb_multires` | every half-size pixel and address against the rounded 2x2 mean; one-cycle latency |
| `tb_ce` | random pixels, levels and models against a real-arithmetic reference of position, interpolation, gradient, residual, observation; two-cycle latency |
| `tb_make_matrix` | all 35 terms against 64-bit products computed in the testbench; zero weight; latency |
| `tb_grad_mat_mem` | per-label accumulation, symmetric read-out, clear |
| `tb_inv_matrix` | G·inv ≈ I for random SPD matrices; singular input; cycle bound |
| `tb_motion_update` | update for a known increment (Gs = G·dtheta) within 2^-10..2^-14; singular case; latency |
| `tb_weight_calc` | threshold, validity and label-in-use rules |
| `tb_psm` | two regions with different sub-pixel shifts and a brightness change; motion at each region centre within 0.2 pixel; cycle count |
| `tb_upd_det` | a wrongly placed boundary is corrected by ICM while region interiors are untouched (judgment skips); detection marks a moving square as a new region and nothing outside it |
| `tb_prediction` | the whole prediction map against a reference projection; dropped count; rate |
| `tb_seq_ctrl` | image hand-over between stages, bank swap, stage overlap, frame counting, drain |
| `tb_vseg_top` | full size, every parameter at its default (three frames, 60 divided images, about 40 s under Verilator) |

The `tb_vseg_top` scene has a textured background and a 40x40 object moving (+2, +1) pixels per
frame. The test counts, and requires at least once, each of these mechanisms:

- bank swaps and stage overlap;
- model solves;
- judgment skips;
- ICM changes;
- new regions;
- prediction writes and drops;
- release of a stale label.

It then checks the results:

- The object's divided image holds a region moving (2, 1) within 0.5 pixel.
- The background stays within 0.25 pixel of rest.
- At least 70% of the object's next position is predicted with its label.
- The PSM stage fits 278k cycles.

Running one test with Verilator 5 (replace `psm` by any block; the package goes first):

    verilator --binary --timing -Irtl -y rtl rtl/seg_pkg.sv rtl/psm.sv tb/tb_psm.sv \
              --top-module tb_psm -Mdir obj_psm
    ./obj_psm/Vtb_psm

`tb_seq_ctrl` does not need `seg_pkg`, but including it is harmless. For the full-size test, add
`-O3` and use `vseg_top`.
