# Line-based multi-level 2-D (9,7) wavelet transform

This is a hardware 2-D discrete wavelet transform (DWT) for images that
arrive in raster order. It uses the JPEG2000 lossy (9,7) filter in lifting
form. The image is never stored: two 1-D lifting units, one for rows and one
for columns, work directly on the stream. A few line-sized RAMs sit between
them. The same two units compute all J decomposition levels, so the outside
world reads each pixel once and receives each coefficient once. No frame
buffer, on chip or off, is needed.

The default build transforms a 512 x 512 image to three levels. It takes one
8-bit pixel per clock cycle (a pair every other cycle) and produces 20-bit
coefficients. It uses 10 multipliers, 16 adders and 4928 words of line RAM:
9.625 image widths, against 11 widths in the limit of unlimited levels. With
`J = 1` the same RTL is a single-level transform that takes two pixels per
cycle.

## The idea in one picture

```
 pixels ──┐                 ┌──────────────┐       ┌──────────────────┐
 (pairs)  ├─► row 1-D  ───► │ data buffer  │ ───►  │ column 1-D       │ ─► normalise ─► coefficients
 LL of    │   lifting       │ RAM_A: even  │       │ lifting          │    (LL·1/S²,
 level l ─┘   (state ×J)    │ RAM_B: odd   │       │ (state in        │     HH·S²)
   ▲                        └──────────────┘       │ temporal buffer) │        │
   └──── ll_fifo (one per level above the first) ◄─┴──────────────────┴────────┘
```

A separable 2-D DWT filters every row, then every column of the result. The
row filter is easy on a stream. The column filter needs, for every column,
the values of neighbouring rows. A direct design therefore stores the
row-filtered image. This design avoids that in two ways:

* **Column state lives in RAM.** A lifting filter carries four words of state
  from one input pair to the next. The column unit works on one column at a
  time and then moves to the next one. So it reads that column's four state
  words from the *temporal buffer*, does one lifting step, and writes the new
  state back. The temporal buffer holds four words per column: four RAMs, one
  image width deep.
* **Only 1.5 rows of row-filter output are kept.** The *data buffer* holds one
  even row (RAM_A, N words) and half of the following odd row (RAM_B, N/2
  words). The column unit consumes pairs of rows. A row arrives at two words
  per step and is read back at one word per step. That difference is what
  lets half a row of RAM_B be enough (next section).

The lifting step's normalisation is moved out of both 1-D units. The scale
factors of the row and column passes multiply together, so LL only needs
1/S², HH only needs S², and LH and HL need nothing. Two multipliers after the
column unit do this, so each 1-D unit needs only its four lifting
multipliers.

## The data buffer and its lock-step schedule

This is the part that takes the most care. Everything in a level runs in
lock step. A single counter `g` (in `dwt_ctrl`) counts *steps*, where one step
is one input pair. With `M = N/2` pairs per row:

| step | what happens |
|---|---|
| `g` | the row unit takes pixel pair `g`: row `g / M`, position `g mod M` |
| `q = g − 3` | the row unit's registered output for pair `q` is written to the data buffer. Even rows go to RAM_A at position `q mod M`. Odd rows go to RAM_B at position `(q mod M) mod (M/2)`. Each RAM is split into a lowpass half and a highpass half, so one step writes one L and one H word. |
| `k = q − M` | the column unit does column step `k`: pass `p = k / N`, column `j = k mod N` |

Column pass `p` combines rows `2p` and `2p+1`. It visits the N columns of the
row-filtered rows in the order L0, H0, L1, H1, …. For each column it reads
the even-row word from RAM_A and the odd-row word from RAM_B. Pass `p` starts
in the same step in which the first pair of row `2p+1` is written.

This schedule fits in 1.5 rows because of the rates:

* **RAM_B.** The odd row is written at position `i` in step `i` of the pass,
  for `i < M`. The column reader needs position `i` at steps `2i` and `2i+1`:
  once for the L word and once for the H word. The reader is always behind
  the writer, by up to half a row. Positions `i` and `i + M/2` can therefore
  share a RAM_B slot. Position `i` has been read (at steps `2i` and `2i+1`)
  no later than position `i + M/2` overwrites it (at step `i + M/2`),
  since `2i+1 ≤ i + M/2` for `i < M/2`.
* **RAM_A.** The next even row starts arriving in step M of the pass. Its
  position `i` lands at step `M + i`. The reader has finished with RAM_A
  position `i` by step `2i+1`, which is never later than `M + i`.

At a few points the read and the write hit the same word in the same step.
These collisions are deliberate:

* **RAM_B write-through.** The first read of an odd row (step 0 of a pass)
  needs the word that is being written in that same step. When the read and
  write positions are equal, the word is bypassed from the write port (`fwd`).
* **Read-before-write.** In two other cases the RAM must return the *old*
  word during the write:
  * RAM_A at the last read of a row pair;
  * RAM_B at slot M/2 − 1, when the odd row's last pair lands there.

  The RAMs (`tp_ram`) read combinationally and write on the clock edge, so
  this comes for free.

After the last row of an image, two more column passes run with no new rows
(the *drain*, 2.5N + 4 steps in all). They flush the column lifting pipeline
and apply symmetric extension at the bottom edge. One image therefore takes
N²/2 + 2.5N + 4 steps. With J = 1 the first coefficient appears 2N + N/2 + 5
cycles after the first pixel pair.

## The lifting step

`lift97_core` is the combinational (9,7) lifting step. It is shared in
structure by the row and column units: the row unit keeps its state in
registers, and the column unit keeps it in the temporal buffer. Each step
takes one even/odd sample pair (`e`, `o`) and four state words (t, u, v, w).
It returns one lowpass and one highpass output, which belong to the pair two
steps back, and the next state:

```
d1 = t + α·e         s1 = u + β·d1        d2 = v + γ·s1        s2 = w + δ·d2
t' = o + α·e         u' = e + β·d1        v' = d1 + γ·s1       w' = s1 + δ·d2
```

* The constants are α = −1.586134342, β = −0.052980119, γ = 0.882911076 and
  δ = 0.443506852.
* Each product is rounded on its own to the word format.
* Symmetric extension at the two ends of a line doubles the relevant product
  and drops the missing term. Nine flags say which of the three pairs in
  flight began or ended a line.
* The same flags let lines follow one another with no gap. The row unit
  starts a new row in the step after the previous one ended.

The lifting step has 4 multipliers and 8 adders. Two copies plus the two
normalisation multipliers give the totals quoted at the top.

## Sharing the units between levels

Level l+1 transforms the LL subband of level l, which is a quarter of the data
of level l. The units are shared by time slots:

* **Slots (`rpa_sched`).** With J > 1, level 0 owns every even cycle. The
  higher levels share the odd cycles. The lowest level that has an input pair
  waiting goes first. Drain steps come after input steps. A level-0 drain may
  also use an odd slot that nobody else wants. The higher levels thus get
  the odd slots on demand rather than at fixed positions of a repeating
  pattern. Each still gets a quarter of the slots of the level below it.
* **Counters and state per level.** Each level has its own `dwt_ctrl`, sized
  for its width N/2^l. The row unit keeps J sets of lifting registers and
  output registers, selected by the level of the current slot.
* **Buffer regions.** The data buffer and the temporal buffer give every
  level a region of its own. The total is (1 + 1/2 + … + 1/2^(J−1)) times
  the one-level sizes.
* **LL feedback (`ll_fifo`).** The LL outputs of level l come out of the
  normaliser one at a time. They are paired (even and odd column) and queued
  in a 4-entry FIFO. The FIFO is the input of level l+1. An assertion guards
  against overflow; it never fired in the tests.
* **Image framing.** After level 0 has drained an image, it accepts no new
  pixel until the last level has finished that image. Images are thus never
  mixed inside the shared units.

On average the shared units are busy 1/2·(1 + 1/4 + … ) of the slots, plus
the drain steps. For a 512-wide image at J = 3, one image takes 174,284 steps
in 264,958 cycles, from its first input to its last output. That is a
utilisation of 0.658, against 0.656 without the drains.

## Interface and timing (`dwt2d_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid`, `in_ready` | in/out | an input pair is taken when both are high |
| `in_even`, `in_odd` | in | pixels x[r][2n], x[r][2n+1] (unsigned, `IN_W` = 8 bits) |
| `out_valid` | out | one output pair this cycle; no back-pressure |
| `out_level` | out | decomposition level, 0 = first |
| `out_hband` | out | 0: `out_lo` = LL, `out_hi` = LH; 1: `out_lo` = HL, `out_hi` = HH |
| `out_row`, `out_col` | out | position within that level's subbands |
| `out_lo`, `out_hi` | out | signed `W` = 20-bit words with `FRAC` = 4 fractional bits |

Subband names give the horizontal filter first, then the vertical one. Pixels
enter the datapath scaled by 16, so that they carry 4 fractional bits. The
constants have 12 fractional bits.

* **Input.** `in_ready` is low in these cases:
  * in odd cycles when J > 1;
  * while level 0 drains;
  * until the last level has finished the current image.

  Holding back `in_valid` simply stalls level 0.
* **Output.** The outputs of a row pair leave in the order L0, H0, L1, H1, ….
  The LL words of levels below the last also appear on the output, tagged
  with their level, although they are consumed internally as well. A system
  that wants only the final subbands drops LL words with
  `out_level < J−1`.

## Parameters and sizes

| parameter | default | where |
|---|---|---|
| `N` | 512 | `dwt2d_top`; image width and height, a power of two, ≥ 8·2^(J−1) |
| `J` | 3 | `dwt2d_top`; decomposition levels |
| `IN_W`, `W`, `FRAC`, `CF` | 8, 20, 4, 12 | `dwt_pkg`: pixel width, word width, fractional bits of words and of constants |
| `K0` | 4 | `dwt_pkg`: state words per column = RAMs in the temporal buffer |

The number of levels J comes from the three-level schedule that this
structure was designed around. The image size, the word format, the rounding
and the value of S are this design's choices:

* S = 1.230174104914001, the usual JPEG2000 (9,7) gain.
* The arithmetic is bit-exact with the reference model in
  `tb/dwt_ref_pkg.sv`.
* Its distance from a floating-point transform has not been characterised.

## What follows the source design and what does not

Taken from the architecture as originally described:

* one row and one column 1-D unit;
* a 1.5N data buffer split into RAM_A (even rows, N words) and RAM_B (odd
  rows, N/2 words), each made of a lowpass and a highpass two-port RAM;
* a temporal buffer of K0 two-port RAMs holding the column unit's
  registers;
* normalisation by S² and 1/S² after the column unit;
* J-fold row registers;
* per-level buffer regions;
* RPA-style slot sharing, with level 0 in every other slot;
* 2 pixels per cycle for one level and 1 pixel per cycle for several.

Filled in here, because the description leaves them open:

* the step counter and its offsets;
* the column visiting order and RAM_B's modulo addressing;
* the write-through and read-before-write rules;
* the drain passes and symmetric extension;
* the handshake, framing and reset behaviour;
* the feedback FIFO and the tie-break rules between levels;
* the word format.

Not built, being alternatives the description mentions but does not adopt:

* data buffers of (1 + 2^−k)N words, or of 3N words;
* a convolution-based 1-D unit.

The external frame memory of the direct and one-level-per-pass designs that
this one replaces is not needed.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`. `tb/dwt_ref_pkg.sv` is an independent array
model of the transform: 1-D lifting with symmetric extension, applied to rows
and then to columns, with the same rounding.

| testbench | what it shows |
|---|---|
| `tb_lift97_core` | one lifting step against the model, including line ends |
| `tb_row_dwt`, `tb_col_dwt` | streamed rows / columns with stalls against the model |
| `tb_data_buffer` | writes and reads in the real schedule, including write-through and same-slot read-before-write |
| `tb_temporal_buffer`, `tb_ll_fifo` | storage and ordering against a queue or array; the FIFO reaches full depth |
| `tb_dwt_normalize` | both multipliers against real arithmetic |
| `tb_dwt_ctrl` | every address and flag of every step, random stalls |
| `tb_rpa_sched` | slot ownership and priorities, checked against the rules for random requests |
| `tb_dwt2d_1level` | `J = 1`, N = 16, three images with stalls |
| `tb_dwt2d_top` | `J = 3`, N = 32, two images |
| `tb_dwt2d_full` | the top with its defaults: N = 512, J = 3, two images |

The three top-level tests compare every coefficient of every level with the
model. They check that each subband position appears exactly once, and they
check the image length and latency (J = 1) or the input rate (J = 3). They
also count each mechanism and fail if one never happened: stalls, odd slots
refused, slots per level, slots given away, FIFO pushes and pops, waiting for
the last level, write-through, both read-before-write cases, row and column
edges, drains, and both normalisation multipliers. The full-size test also
checks the step count and utilisation of an image. It runs in a few seconds.

Run any test with plain Verilator from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_dwt2d_full rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt2d_full.sv
./obj_dir/Vtb_dwt2d_full
```

## Changing it

* **Another lifting filter.** Replace `lift97_core` and the constants in
  `dwt_pkg`. If the number of state words changes, change `K0` and the
  `lift_state_t` struct. The temporal buffer follows `K0`.
* **Another image size or number of levels.** Set `N` and `J` on
  `dwt2d_top`. Every buffer and counter scales from them.
* **Word width.** Change `W`/`FRAC` in `dwt_pkg`. Twenty bits leave headroom
  for 8-bit pixels through three levels; check the LL growth of more levels
  before going deeper.
