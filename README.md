# Belief-propagation stereo engine for large disparity ranges

This is synthesizable SystemVerilog for a tile-based belief-propagation (BP)
stereo-matching engine. It is built for large label counts: the default
configuration searches **L = 512 disparities** on 32 x 32-pixel tiles, using 32
parallel lanes. Two ideas keep it affordable when L grows:

* **A memory-efficient message data flow.** BP-M keeps four direction messages
  of L words for every pixel of the tile. This engine keeps one combined message per pixel,
  in a single tile-sized *block buffer* M, plus one *line buffer* LB per lane.
  Data costs are recomputed when needed, so no cost is stored.
* **A hardware-efficient message-update PE.** A brute-force update with the
  truncated-linear smoothness model needs O(L^2) min operators. The PE shares
  min operators between neighbouring labels' trees and interleaves even and
  odd labels. This brings it to about L*(log2(T+1) + 3) operators, where
  T = L/8 is the truncation distance. The critical path is unchanged: a
  log2(L)-deep global min tree.

The engine loads a left tile and the matching right-view search region. It
runs a chosen number of BP iterations (each iteration is four passes: right,
left, down, up) and outputs one disparity per pixel. It also exchanges
boundary messages with an external store, so neighbouring tiles share
information (the tile-based BP scheme).

## The arithmetic

For a pixel p that sends a message to its neighbour q, with label set 0..L-1:

    H(l')  = C_p(l') + sum of the messages into p, except the one from q
    M(l)   = min_l' { H(l') + lam * min(|l - l'|, T) }

`C` is the data cost and `lam` is the smoothness weight. `lam` is reduced at
intensity edges by the colour weight `lam_eff = lam - ((lam * |I(p) - I(q)|) >> 8)`
(that is, lam * (1 - |dI|/256), with the division done as a shift).

The engine splits the minimum into two parts. The global term is
`min H + lam*T`. The local term is the minimum over the untruncated window
|l - l'| <= T. Every output message is then normalised by subtracting `min H`,
so its smallest entry is 0 and no entry is above lam*T. It is saturated to
10 bits.

## The message-update PE (`msg_update_pe`)

This is the least obvious part of the design.

**Sharing.** With a linear penalty, the tree for label n and the tree for
label n+k contain the same comparisons, offset by a multiple of lam. For
example, `min(H(n-2)+2lam, H(n-3)+3lam) = min(H(n-2), H(n-3)+lam) + 2lam`.
So each tree level needs only one min operator per label and side. Left
side, growing a window towards lower labels:

    P_0(n) = H(n)
    P_k(n) = min( P_k-1(n), P_k-1(n - 2^(k-1)) + 2^(k-1)*lam )

P_k(n) is min over j = 0 .. 2^k - 1 of H(n-j) + j*lam. The right side
R_k(m) is the same with n + 2^(k-1).

This does not work across the centre of a window, because
`min(H(n-1)+lam, H(n)) != min(H(n-1), H(n)+lam)`. So the two sides are built
separately.

**Interleaving.** P is computed only at even labels and R only at odd labels.
Labels n (even) and n+1 then share both halves of their trees:

    local(n)   = min( P(n),        R(n+1) + lam )
    local(n+1) = min( P(n) + lam,  R(n+1)       )

**Tree depth.** KT = clog2(T+1) levels are used. Each local tree is then a
complete binary tree over labels n-(2^KT - 1) .. n+2^KT. For T = 7 this is the
16-leaf tree H(n-7)+7lam ... H(n) ... H(n+8)+8lam.

Leaves further than T away carry a linear cost above lam*T. Such a leaf can
never beat the global term `min H + lam*T`, so

    M(l) = min( local(l), min H + lam*T ) - min H

equals the brute-force formula exactly. The testbenches check this against a
brute-force model.

**Operator count at the defaults** (L = 512, T = 64, so KT = 7):

| Part | Min operators |
|---|---|
| Shared levels | 7 * 512 = 3584 |
| Pair roots | 512 |
| Global tree | 511 |
| Final min with the global term | 512 |
| **Total** | **about 5.1 k**, against about 66 k for 512 independent (2T+1)-leaf trees |

**Timing.** The PE is a single combinational stage with a registered output.
It takes one message vector per cycle and has a latency of one cycle.

## Memory-efficient message passing (`bp_lane`, `msg_block_buffer`, `line_buffer`)

Messages come in two groups: horizontal (from left and right) and vertical
(from up and down). During horizontal passes only the vertical group's *sum*
is needed, and the reverse holds for vertical passes. So each pixel stores one
vector M: the sum of the group that is not being processed.

A lane walks along its row or column, one pixel per cycle. `FromPE` is the
message that arrives from the previous pixel:

| Pass | Equations |
|---|---|
| Forward (right, down) | `LB(i) = FromPE`<br>`H = M(i) + FromPE + C(i)`<br>`FromPE <- update(H)` |
| Backward (left, up) | `H = M(i) + FromPE + C(i)`<br>`FromPE <- update(H)`<br>`M(i) <- FromPE + LB(i)` |

In the backward row, `M(i) <- FromPE + LB(i)` is written back one cycle later.

So after the left pass, M holds left+right for every pixel, which the down
and up passes need. After the up pass, M holds up+down again for the next
iteration. The first pixel of each pass takes its FromPE from the tile
boundary (`bnd_in`). The message that leaves the last pixel goes out on
`bnd_out`.

**Decision.** In the last upward pass, a lane has all the terms for a pixel's
belief:

* M, the horizontal group
* LB, the downward messages
* FromPE, the upward-arriving message
* C

`wta_unit` takes the argmin of their sum. The lowest label wins a tie.

**Pipeline.** Each pixel goes through two stages:

1. Stage 1 issues the reads: block buffer, line buffer and image buffer. The
   cost and the colour weight are registered in this stage.
2. Stage 2 forms H, registers the PE output, and writes LB (forward) or M
   (backward).

One pass of a tile takes TILE + 1 cycles.

**Banking.** All SRAM is single-port. In every pass cycle, each of the K lanes
reads the pixel it is on and writes back the pixel it read one cycle earlier.
That is 2K accesses per cycle.

The block buffer has 2K banks of K/2 words, each word L x 10 bits. Pixel
(x, y) lives in bank `{bit1(x - y), (x + y) mod K}` at word `y/2`:

* The `(x + y) mod K` part spreads the K lanes over K banks, along rows and
  along columns alike.
* The `bit1(x - y)` part separates each read from the write of the pixel
  before it.

This needs K to be a multiple of 4. An assertion in `msg_block_buffer` flags
any bank that gets two requests in one cycle. The tests never trigger it.

## Cost, images and colour weight

`image_buffer` holds the left tile (TILE x TILE) and the right-view region of
the same rows (TILE x (TILE + L - 1)). Right column c is tile column c - (L-1).
After loading, a census phase computes 3x3 census codes, one row per cycle.

`cost_unit` computes the AD-Census cost for each label, on the fly:

    C(l) = min(|I_L - I_R(l)|, 31) + 4 * popcount(census_L ^ census_R(l))

It does this for all labels of one pixel per lane per cycle.

`color_weight` computes `lam_eff` from the sender's and receiver's left-view
intensities. At a tile edge the receiver is outside the tile, and the weight
is 1.

## Control and interface (`mode_ctrl`, `bp_engine`)

A tile runs like this:

1. Load pixels through `img_*` while the engine is idle.
2. Set `n_iter` (0 counts as 1) and `lam`, then pulse `start`.
3. The engine runs these phases:
   * **Clear:** TILE/2 cycles that zero M.
   * **Census:** TILE cycles.
   * **Passes:** 4 * n_iter passes of TILE + 1 cycles each, in the order
     right, left, down, up.
4. `done` pulses TILE/2 + TILE + 4 * n_iter * (TILE + 1) cycles after the
   clock edge that sampled `start`.

At the defaults one iteration takes 132 cycles for 1024 pixels.

Tile-boundary traffic goes to the external store, which is not part of this
RTL:

* `bnd_in[k]` is lane k's incoming boundary message. It is sampled when
  `pass_start` is high, and `pass_dir` gives the direction.
* `bnd_out[k]` is valid for one cycle (`bnd_out_valid`), right after each
  pass.

Decisions come out during the last upward pass. For each lane you get
`disp_valid[k]`, the pixel `(disp_x[k], disp_y[k])` and the disparity
`disp[k]`.

## Parameters and sizes

| Parameter | Default | Origin |
|---|---|---|
| `L` | 512 | design target |
| `T` | 64 = L/8 | design rule T = L/8 |
| `TILE` (= lanes K) | 32 | block diagram shows 32 update units and banks |
| `MSG_W` | 10 | chosen |
| `LAM_W` | 6 | chosen |
| `PIX_W` | 8 | chosen |

`TILE` must be a power of two and a multiple of 4. Internally, H is
MSG_W + 2 bits and a belief is MSG_W + 3 bits, both saturating. With
32 x 32 tiles and 10-bit words, four tile-sized direction buffers would be
2560 KB at L = 512, which matches the size usually quoted for the
conventional flow.

**Storage at the defaults:**

* Block buffer: 32*32*512*10 bits = 640 KB.
* Line buffers: 32 lanes x 32 entries = 640 KB.
* Image buffers: about 37 KB.

**Known departure.** The line buffers here keep the forward message of every
pixel of a line, because the backward merge needs them. That makes them as
large as the block buffer, so the message storage is half of the
four-buffer flow, not the roughly 70 % reduction (784 KB) that the published
figures give for this architecture. How those figures size the line buffers
could not be worked out, so this RTL keeps the version that is correct for
the equations above.

## Departures and choices to be aware of

* **Number of units.** There are 32 message-update units, as in the block
  diagram. The published gate-count comparison uses four PEs; to match it,
  build with `TILE = 4`. Note that the banking then needs 8 banks.
* **No cost SRAM.** Costs are recomputed from the image buffers. The block
  diagram also draws a cost buffer; it is omitted.
* **Chosen here, not specified by the design:**
  * normalisation of messages
  * all word widths
  * census window and cost formula
  * the bank mapping
  * the clear-to-zero initialisation
  * the pass-level handshake
  * when the decision is taken
  * rounding of the colour weight
* **Throughput.** The PE is one combinational stage. At L = 512 its critical
  path is a 9-level global tree plus a 7-level shared tree. Pipeline it
  further if the target clock needs it.
* **Image loading.** It uses a one-pixel-per-cycle port, which dominates
  run time at L = 512: 32 x 575 cycles per tile. A real system would fill the
  buffers over a wide bus.
* **Saturation.** Merged messages and H saturate. Keep `lam * T * 2` below
  2^MSG_W (lam <= 7 at the defaults) if results must equal unsaturated BP.

## Files

| File | Contents |
|---|---|
| `rtl/bp_pkg.sv` | sizes, pass directions, control word, bank mapping |
| `rtl/bp_engine.sv` | top level |
| `rtl/mode_ctrl.sv` | sequencer |
| `rtl/bp_lane.sv` | one lane: adders, LB, PE, merge, decision |
| `rtl/msg_update_pe.sv` | shared/interleaved message update |
| `rtl/msg_block_buffer.sv`, `rtl/msg_sram.sv` | banked combined-message buffer |
| `rtl/line_buffer.sv` | per-lane line buffer |
| `rtl/image_buffer.sv`, `rtl/census_unit.sv`, `rtl/cost_unit.sv` | inputs and data cost |
| `rtl/color_weight.sv` | colour-weighted lambda |
| `rtl/wta_unit.sv` | argmin decision |

## Simulating

Every testbench in `tb/` is self-checking. Each one ends by printing
`TB_RESULT checks=N failures=M`. For example:

    verilator --binary --timing --assert -Irtl --top-module tb_bp_engine \
        rtl/bp_pkg.sv tb/tb_bp_engine.sv
    ./obj_dir/Vtb_bp_engine

Use the same command for any `tb_<block>.sv`. `-Irtl` lets verilator find
the modules by name.

**End-to-end tests:**

* **`tb_bp_engine`** runs four tiles at TILE = 8, L = 16, T = 2. It uses
  several lambdas, 1 to 3 iterations and random boundary messages. It checks
  every boundary message after every pass of the last iteration, every
  disparity, and the cycle count. The reference model keeps the four
  direction messages separately and computes each update by brute force.
  The test also counts each mechanism and fails if one never happens:
  * clear and census phases
  * each pass direction
  * LB writes and reads
  * merges
  * boundary messages in and out
  * colour-weight reductions
  * truncated (global-term) wins
  * decisions
* **`tb_bp_engine_full`** runs the same checks on one tile, for one
  iteration, with the engine at its default size (L = 512, 32 lanes).
  Expect a long C++ build (about 9 minutes and 3 GB of memory with
  verilator's default flags) and about 25 s of simulation.

The block testbenches compare each unit with an independent model:

* the PE against the O(L^2) formula, including T = 7
* `tb_pe_sizes`: the PE at L = 128/T = 16, L = 256/T = 32 and
  L = 512/T = 64 (always T = L/8) against the same formula
* the buffers against model arrays, with the access pattern of real passes
* the sequencer cycle by cycle against the expected schedule
* `tb_bp_pkg`: the bank mapping for K = 4 to 32 is one-to-one and
  conflict-free in every cycle of all four pass directions
