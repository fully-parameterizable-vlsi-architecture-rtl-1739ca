# Sub-pixel motion-estimation coprocessor (type-II systolic array)

Video coders find a motion vector for every macroblock in two steps. First, a
search at whole-pixel positions finds the best integer vector. Second, the
vector is refined to a sub-pixel position. This RTL does the second step in
hardware.

For one N x N reference macroblock, it takes an integer motion vector, the
integer search-area pixels around it and the SAD (sum of absolute differences)
at that vector. It interpolates the search area to a 1/K-pixel grid. It then
evaluates all (2K-1)^2 candidate blocks at the offsets -(K-1)/K .. +(K-1)/K
pixels in each direction, in parallel. It returns the offset with the lowest
SAD. The defaults are N = 16, K = 2 and 8-bit pixels: half-pixel refinement
of 16x16 macroblocks, 9 candidates.

The design follows the architecture published as *"Fully Parameterizable VLSI
Architecture for Sub-Pixel Motion Estimation with Low Memory Bandwidth
Requirements"*. That publication describes the organisation in detail: the
processing elements, the cylindrical array, the zig-zag scan, the input
buffers, the comparator tree and the control. It leaves many details open:
the size of the array rows, the state machine, the buffers and the
interpolator's structure. Those details are this implementation's own, and
the section "Departures and own choices" lists them.

## The main idea: every candidate at once, one reference pixel per cycle

Each candidate gets its own *active PE*. In every clock cycle, all active PEs
receive the same reference pixel. Each one also receives a different
search-area sample: the pixel at the same position inside its own candidate
block. Each active PE accumulates |ref - sa|. After N*N cycles all (2K-1)^2
SADs are complete. A pipelined binary comparator tree then selects the
smallest one. The pixel rate equals the clock rate.

The hard part is to deliver the right search-area sample to every active PE
in every cycle, while fetching each interpolated sample from the buffer only
once. Two ideas solve this:

* The search-area samples are stored in the array and move between PEs. Most
  PEs are *passive*: they only hold and pass samples.
* The samples move in a zig-zag. A reference row is processed left to right
  while the search data shifts right. The next row is processed right to
  left while the data shifts left. Between rows there is one upward shift.
  No cycle is lost at the end of a row.

## Processing array (`pe_array`)

```
          column:  0 .. 2K-2        2K-1 ............... L-1
 row 0            [active PEs]      [passive PEs ........]   ring: column L-1
 row 1            [active PEs]      [passive PEs ........]   wraps to column 0
 ...
 row 2K-2         [active PEs]      [passive PEs ........]
                        ^ K new sub-pixel lines enter rows K-1 .. 2K-2
```

* The array has R = 2K-1 rows and L = K*(N+1)-1 columns: 3 x 33 for the
  defaults, 9 active and 90 passive PEs.
* One array row holds one whole interpolated search-area line, which has L
  samples on the 1/K grid.
* Every row is a ring, so shifting right or left never loses a sample.
* Horizontal neighbours are **K columns apart**. One shift therefore moves the
  data by one *integer* pixel, while the PE columns in between carry the
  other sub-pixel phases.
* Vertical neighbours are **K rows apart**. Rows 0..K-2 take their data from
  row r+K. Rows K-1..2K-2 take K new lines from the SA input buffer. One
  upward shift therefore moves the data by one integer line and brings in
  exactly K new sub-pixel lines.
* Active PE (row r, column c) evaluates the candidate
  `hc = K-1-c`, `vc = r-(K-1)`, in 1/K-pixel units.

**Where each sample sits.** While reference column i of a row is processed,
sample f of the line sits at column `(2K-2 - f + K*i) mod L`. Active column c
therefore always sees sample `K*i + 2K-2-c`, which is exactly the sample its
candidate needs.

**Rotation of new lines.** After a forward row, the rings have rotated by N-1
integer pixels. New lines must enter with the same rotation, or the stored
data would no longer line up. The SA input buffer `sa_pipo` handles this: it
writes a line either unrotated or rotated by K*(N-1) positions. It also
reverses the column order, as the placement formula above requires.

**Line sets.** A block needs N+1 line sets of K lines each:

* one preload set, in which only the last line is used;
* one initial set;
* N-1 further sets, one between each pair of rows.

Line set `q` holds the sub-pixel lines `q*K + s` (s = 0..K-1) of the
interpolated window. The sub-pixel line numbers are shifted by one, so that
line 0 is the preload set's unused line. With this numbering, all K lines of
a set lie between the two integer rows q and q+1 of the window.

## Active PE (`active_pe`)

An active PE has four parts:

* **(A) SA displacement.** A passive PE (`passive_pe`): a sample register
  with a 4-way selection (hold, from below, from the left, from the right).
* **(B) Reference pixel storage.** A register loaded every cycle from the
  row's copy of the reference pixel.
* **(C) Absolute difference.** The PE computes `r + ~s + 1`.
  * With no borrow, the result is |r - s|.
  * With a borrow, its one's complement equals `s - r - 1`. The missing +1
    leaves the unit as `ad_carry`.
* **(D) Accumulation.** A carry-save accumulator.
  * A W-bit sum vector and a (W-1)-bit carry vector absorb |r - s| every
    cycle.
  * `ad_carry` drops into the free least-significant position of the carry
    vector.
  * The carry out at weight 2^W increments a separate log2(N^2)-bit upper
    counter.
  * A format-conversion adder turns sum, carry and upper part into the binary
    SAD. For the defaults the SAD is 16 bits, and the largest possible SAD,
    256 x 255, fits.

**Power saving.** When a block starts, the threshold (normally the SAD of the
integer vector) is loaded into the PE. As soon as the partial SAD exceeds the
threshold, the accumulator freezes. From then on the PE reports the threshold
and raises `over`. Such a candidate cannot win anyway. In silicon, a frozen
PE stops toggling its adders.

## Comparison unit (`cmp_tree`, `cmp_node`)

The comparison unit is a binary tree with one register stage per level. For
9 leaves it has 4 levels. Each node compares two keys and passes on the
smaller one, together with its `hc`/`vc` coordinates. The comparison uses the
carry out of `b + ~a + 1`, computed by a Sklansky parallel-prefix network.

The key is `{SAD, over}`. A stopped candidate reports the threshold. It must
still lose against a candidate whose real SAD equals the threshold, such as
the integer-vector candidate. Remaining ties go to the lower leaf index. The
leaf index is row-major: vertical offset -(K-1) first, and within a row the
horizontal offset from +(K-1) down to -(K-1).

## Reference input buffer (`ra_piso`)

A chain of N-1 registers, each followed by a multiplexer, loads a whole
reference line in parallel and shifts it out one pixel per cycle, last input
first. The final multiplexer feeds 2K-1 identical output registers, one per
array row, which keeps fan-out low.

Zig-zag order of the reference pixels:

* Forward rows need pixels 0..N-1. The line is therefore presented reversed.
* Backward rows need pixels N-1..0. The line is presented as stored.

A new line is loaded in the cycle in which the previous line's last pixel
passes to the output registers. The stream therefore has no gaps.

## Control unit (`me_ctrl`)

The control unit has three parts:

* a **search-area line counter**, which counts the line sets fetched and
  loaded and flags the last row;
* a **reference pixel counter**, which counts the pixels of a row and the
  reference lines loaded;
* a **nine-state Moore machine**.

The state machine's nine states:

| state | what happens |
|-------|--------------|
| IDLE | waits for `start` |
| FETCH | fetches line set 0 into the SA input buffer |
| LOAD_PRE | upward shift with set 0; fetches set 1; loads reference line 0 |
| LOAD_FIRST | upward shift with set 1; clears the accumulators and loads the threshold |
| RUN_R / RUN_L | accumulate and shift right (forward row) or left (backward row) |
| TURN_R / TURN_L | last pixel of a row: accumulate and shift up; after a forward row the new lines enter rotated |
| LAST | last pixel of the block: accumulate, no shift |

In the cycle after LAST the results enter the tree. If `start` is still high
in LAST, the next block begins immediately.

**Timing per block:**

* The array is busy for N*N + 3 cycles.
* The result (`mv_valid`) appears N*N + 4 + clog2((2K-1)^2) cycles after the
  cycle in which `start` is taken. For the defaults that is 264 cycles.

## Coprocessor (`spme_coprocessor`)

```
 host pixels --> sa_buffer --(rows q, q+1)--> interp_unit --(K lines)--> me_core --> cop_ctrl --> refined MV
 host pixels --> ra_buffer --(one line)-----------------------------------^             ^
 host IPA MV + SAD ---------------------------------------------------------------------'
```

**`sa_buffer`** holds the (N+2) x (N+2) integer window: the block position
plus one pixel of margin on every side. It has two banks. The host writes one
pixel per cycle in raster order (`sa_wr_en`, `sa_wr_px`, `sa_wr_ready`). The
read port returns two adjacent rows.

**`ra_buffer`** holds the N x N reference block in two banks, with the same
kind of write port.

**`interp_unit`** is a bank of bilinear 4-tap filters. It produces the K
sub-pixel lines of a set from two integer rows, with rounding to nearest. For
K = 2 this is the usual half-pixel rule: `(a+b+1)>>1` between two pixels and
`(a+b+c+d+2)>>2` between four.

**`cop_ctrl`** does the following for each job:

1. It accepts `ipa_mvx`, `ipa_mvy` and `ipa_sad` (valid/ready).
2. It waits until both buffers hold the bank in use.
3. It starts `me_core`.
4. It returns `spa_mvx = K*ipa_mvx + hc` and `spa_mvy = K*ipa_mvy + vc`
   (1/K-pixel units), with `spa_sad` and `spa_over`, in a one-cycle
   `spa_valid` pulse.
5. It frees the bank and switches to the other one.

While one block is processed, the host can already write the next one.

For the defaults, a job takes 265 cycles from the ME start to `spa_valid`,
plus about three handshake cycles. Writing a window takes 324 cycles at one
pixel per cycle. Host input bandwidth therefore limits the throughput to
about one 16x16 block per 324 cycles. At 30 frames/s that takes:

* 61.6 M cycles/s for 1408x1152 video;
* 15.4 M cycles/s for 704x576 video.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 8 | pixel width |
| `N` | 16 | macroblock width (8 and 16 are the usual values; N >= 2) |
| `K` | 2 | sub-pixel factor, a power of two (2 = half, 4 = quarter pixel) |
| `MVW` | 8 | width of the signed integer vector (top only) |

The remaining widths are derived from these: `L`, `R`, `SW = W + log2(N^2)`,
and `CW` for the signed displacement.

## Departures and own choices

These points are not taken from the published architecture:

* **Row length.** The published array has far fewer PEs per row: about N+3
  for half-pixel accuracy, plus 2K-1 active PEs. Here each ring holds a full
  sub-pixel line of K*(N+1)-1 samples, a size derived for this
  implementation. For the defaults that means 33 PEs per row instead of
  about 19–22.
* **Register on the downward input.** The published PE drawing has a register
  on the path from the PE below. It is omitted here, because all PEs shift up
  together.
* **Carry-save accumulator.** The published PE drawing gives only register
  widths. The carry-save reading of those widths, and the use of `ad_carry`
  as the carry-in, are interpretations.
* **Power saving.** It is a register freeze, not clock gating. The `over` tie
  breaker in the comparator key is an addition.
* **Control.** The state machine, with its nine states and three-cycle
  preamble per block, is this implementation's own. So are the rotation and
  reversal rules of the SA input buffer and the reversed presentation of
  reference lines.
* **Coprocessor.** The buffers (size, double banking, write order), the host
  handshakes and the job sequencing are this implementation's own. The
  interpolator is a fully parallel filter bank; the published one is a
  shared high-throughput 4-tap filter whose structure is not given.
* **Not modelled.** The software coder that supplies the integer vectors and
  the picture memory are outside the RTL. The option of fetching pixels from
  local memories instead of the picture memory is not modelled either: the
  host writes every pixel into the buffers. The measured clock rates, area
  and power are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

* **`tb_spme_coprocessor`** runs the whole coprocessor at its default size
  (N = 16, K = 2). It sends 8 jobs with random windows and blocks. Each block
  is built from a known half-pixel position, with or without noise; some jobs
  use unrelated data and a tight threshold. A direct model supplies the
  expected values:
  * half-pixel samples by the explicit rounding rules;
  * the 9 SADs;
  * the stop rule;
  * the tie rule.

  The testbench checks every refined vector, the SAD, the stop flag and the
  latency (265 cycles). It fails if any of these never happens: a stopped PE,
  both shift directions, loading during processing, buffer back-pressure, a
  result with every candidate stopped.
* **`tb_spme_quarter`** runs the same end-to-end check with the coprocessor
  set to quarter-pixel accuracy (K = 4, N = 8, 49 candidates). Its model
  uses bilinear weights with rounding. It checks the same mechanisms and
  the latency.
* **`tb_me_core`** checks the ME architecture (and with it the array) against
  a direct SAD model. It covers N = 4, 8 and 16 at K = 2, and N = 8 at K = 4
  (49 candidates). The checks are the winner, the SAD, the latency and a
  back-to-back start.
* **`tb_qcif_workload`** plays a host coder on one synthetic 176x144 frame.
  The frame has a half-pixel motion in one half and an integer motion in the
  other. For each of the 99 macroblocks, the testbench runs an integer full
  search of +-8 pixels. It then sends the macroblock through the coprocessor
  and checks the refined vector and SAD. It also reports the share of
  accumulation cycles skipped by the power-saving stop: about 29% on this
  data, over about 32,400 cycles. Real video gives different shares, and the
  test makes no claim about them.
* **Unit testbenches** cover the PE datapaths, the Sklansky comparator, the
  tree for 9 and 49 leaves, both input buffers, the control schedule cycle by
  cycle, the interpolator (K = 2 and 4), both buffers and the coprocessor
  control.

To simulate a testbench with Verilator 5, run this from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/me_pkg.sv \
    tb/tb_spme_coprocessor.sv --top-module tb_spme_coprocessor -o sim
./obj_dir/sim
```

Replace the testbench name to run another. Modules are found by file name
(`-y rtl -y tb` works as well). The full-size end-to-end run takes well under
a second.

To change the configuration, override `N`, `K` or `W` on `spme_coprocessor`.
`me_core` can also be used alone; it reads line sets and reference lines
through registered addresses (`sa_set`, `ra_line`), and the data must answer
in the same cycle.
