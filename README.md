# On-line learning character recognizer with short- and long-term reference memory

This is a character recognizer that needs no training set. It starts with an empty
memory and learns from the text it reads. Each character it sees is compared with all stored
reference patterns. If the nearest reference is close enough, the character counts as
recognized. That reference then moves up a ranked list, and the running mean of its matches
slowly updates it. If nothing is close enough, the character becomes a new reference.

The ranked list is split in two, the way human memory is often described:

- **Long-term memory** is the upper part of the list. A pattern there has been confirmed
  often and is hard to displace.
- **Short-term memory** is the lower part. New patterns enter here. If they are not
  confirmed, they sink and are eventually forgotten.

So a pattern that is matched often climbs into long-term memory and stays there. A pattern
that was only noise drops off the bottom.

The RTL covers the whole digital chain. A grey-scale column stream from a line-scan sensor
goes in. Out come the segmented, size-normalized characters together with their learning
results. Everything is synthesizable SystemVerilog on one clock.

## Data path

```
pixels ─► frame_capture ─► gray RAM ─► median_filter ─► gray RAM ─► binarizer ─► bit RAM
        ─► labeling ─► label RAM ─► segmentation ─► normalizer ─► feature_extract
        ─► learning_unit (assoc_search, reliability_check, rank_memory, optimization_unit, ref_memory)
```

`ocr_top` processes one *word frame* at a time. A small sequencer starts each stage when the
previous stage is done. The frame buffers are simple dual-port RAMs (`frame_ram`) with
synchronous read. `window_scan` is a shared neighbourhood reader. The median filter and the
binarizer use it to read a k×k window around each pixel, one word per clock, with coordinates
clamped at the frame edges.

### Word frames (`frame_capture`)

The sensor delivers one column of `FRAME_H` grey pixels at a time, top to bottom, with a
valid/ready handshake (`pix_valid`, `pix_ready`). A column is *blank* if none of its pixels is
darker than `INK_LEVEL` (dark means a value below it; 0 is black).

- Blank columns before the first ink are dropped, except the last one, which is kept as a left
  margin.
- A run of `SPACE_COLS` blank columns after ink ends the word.
- The frame width is the last inked column plus one blank column on the right.
- A frame also closes when it reaches `W_MAX` columns, and then it has no right margin.

Frames are stored column-major: `addr = col*FRAME_H + row`. The margins matter. The binarizer
clamps at the edges, so without a blank column beside it, a stroke touching the frame edge
loses its interior and splits into two labels.

### Noise removal and binarizing

- **`median_filter`** replaces each pixel with the median of its 3×3 neighbourhood. It sorts
  the nine samples with a compare-exchange network. The nine samples are read one per clock, so
  it produces one pixel every nine clocks rather than one per clock.
- **`binarizer`** uses a local mean threshold. A pixel with value c is black iff
  `(c + 8)·25 < Σ` over its 5×5 window (`BIN_R = 2`). In words, it is black when it is darker
  than the local mean by more than 8 grey levels. The offset keeps flat paper white. The 25
  samples are read one per clock, so it takes 25 clocks per pixel.

### Labeling and segmentation

**`labeling`** scans the bitmap column by column and keeps the labels of the four neighbours
already visited: up, left-up, left, and left-down. Components are therefore 8-connected. A
black pixel takes the smallest non-zero
neighbour label, or a fresh label if all four are zero. This costs 2 clocks per pixel plus 1
per column.

Equivalences between labels are **not** merged. A shape whose two arms only meet further
down or to the right (U, V, H, W) can therefore come out as two or more labels. This is the
biggest weakness of the front end (see *Limits*).

**`segmentation`** scans the label RAM once per label. It reports each label's bounding box
and pixel count with a valid/ack handshake. Labels with fewer than `MIN_PIX = 4` pixels are
taken as noise and skipped.

### Normalizing and features

- **`normalizer`** resamples each bounding box to 16×16 by bilinear interpolation with 8
  fraction bits. The four neighbouring label-RAM bits (1 if the pixel has this label) are
  weighted, and the output bit is 1 if the weighted sum is at least one half. It takes 5 clocks
  per output bit, 1280 clocks per character. Bit `v*16+u` of `img_t` is row v, column u.
- **`feature_extract`** computes six 8-bit moment features of the 16×16 image in 262 clocks:
  - mass (pixel count, saturated at 255);
  - centroid x and y in 4.4 fixed point;
  - second central moments var_x, var_y and cov + 128, in 4.4 fixed point and clamped to
    0..255.

  An empty image gives all zeros. Eccentricity, orientation and skewness are **not**
  computed. The second moments carry the same information as the ellipse parameters, but
  they are not those numbers.

## The learning unit

Each character is a `pattern_t`: the 256-bit image plus the feature vector. `learning_unit`
takes one pattern and returns a `learn_result_t`:

| field | meaning |
|---|---|
| `is_new` | no reference was close enough, so the input became a new reference |
| `reliable` | the winner was clearly better than the runner-up |
| `evicted` | memory was full, so the bottom-ranked reference was dropped to make room |
| `updated` | this match triggered a reference/threshold update |
| `addr` | reference address of the winner, or of the new reference (the class id) |
| `distance` | winner distance in quarter units (see below) |
| `rank` | rank position of that reference after the update, 0 = top |

### Distance

The distance is the one used by the original method: a quarter of the Hamming distance between the two images plus the Euclidean
distance between the two feature vectors. It is held ×4 in integers:
`D4 = popcount(a ^ b) + 4·isqrt(Σ (fa_i − fb_i)²)`, 12 bits wide.

### Search (`assoc_search`, `ref_memory`)

References live in `ref_memory`, one pattern per address, plus a valid bit.

`assoc_search` reads all `N_REF` addresses in order, one per clock. It keeps the smallest
distance (the *winner*) and the second smallest (the *loser*, used for reliability). It reports
`done` `N_REF+1` clocks after `start`. The search is exhaustive and digital, one reference
per clock.

### Known or new

Every reference has its own threshold `Dth`. The input is **known** if a winner exists and
`distance < Dth[winner]`. It is **reliable** if there is no loser or if
`D_loser − D_winner > C` (`reliability_check`).

### Ranking (`rank_memory`)

`rank_memory` keeps a list of `N_REF` rank positions. Each position holds a reference address
and an occupied flag. Position 0 is the top. Positions `0 … S_POS−1` are long-term memory,
and `S_POS … N_REF−1` are short-term memory.

- **Known winner at position p.** The jump j is `JL` if p is in long-term memory, `JS` if it is
  in short-term memory, and `JLOW` if the match was not reliable. The winner moves to
  `max(p−j, 0)`, and every entry it passes moves down by one. This shift is how a pattern drops
  from long-term into short-term memory when others overtake it.
- **New reference, long-term memory not yet full.** It takes the lowest unoccupied long-term
  position.
- **New reference, long-term memory full.** It takes position `S_POS`, the top of short-term
  memory. The short-term entries below move down by one. If the memory is full, the bottom
  entry falls off and its address is reused for the new reference.

Addresses are handed out 0, 1, 2, … until the memory is full. The winner's position is found
by comparing all positions at once, and a whole rank operation with its shift is done in one
clock. That costs `N_REF` comparators and wide multiplexers. A RAM-based version would shift one
entry per clock instead.

### Optimization (`optimization_unit`)

Every reference keeps running sums of the inputs matched to it: a per-pixel black count, the
feature sums, the distance sum and a match count `cnt`.

When `cnt` exceeds `NTH`, the reference is rewritten:

- each pixel becomes black if it was black in at least half of the matches;
- each feature becomes its mean;
- `Dth` becomes twice the mean match distance, clamped to `[DTH_MIN, DTH_MAX]`.

The sums then restart, seeded with one match at distance `Dth/2`. This way the threshold
follows how widely the class actually varies. A new reference starts with `Dth = DTH_INIT`.
Every known match is accumulated, whether or not it was reliable.

### Timing

From `in_valid` to `res_valid` takes **N_REF+9** clocks for a new reference and **N_REF+10**
for a known one. This is dominated by the search, one reference per clock, so at the defaults it
is about 520 clocks per character.

The front end dominates. The median filter, the binarizer and the labeling take about
9 + 25 + 2 = 36 clocks per frame pixel. A 1024 × 40 word therefore takes about 1.5 M clocks, and a full
1024 × 128 frame about 4.7 M clocks. Each character then adds about 1280 clocks to normalize,
262 for features and about 520 to learn.

## Top-level interface (`ocr_top`)

| port | dir | meaning |
|---|---|---|
| `pix_valid`, `pix`, `pix_ready` | in/in/out | sensor stream, one 8-bit grey pixel per handshake, column-major, top row first |
| `res_valid` | out | one-clock pulse per recognized/learned character |
| `res` | out | `learn_result_t` (above) |
| `res_label`, `res_x0/x1`, `res_y0/y1` | out | component label and bounding box in the frame (columns include the left margin column) |
| `res_pat` | out | the normalized image and features that were classified |
| `frame_done` | out | pulse after the last character of a word frame; the capture then accepts the next word |
| `ref_count` | out | number of stored references |

`pix_ready` is low while a frame is being processed. Characters are reported in label order,
which is roughly left to right.

## Parameters

| parameter | default | source |
|---|---|---|
| `FRAME_H` | 1024 | rows per sensor column, the length of the original 1024-pixel line sensor |
| `W_MAX` | 128 | longest word frame in columns (own choice) |
| `SPACE_COLS` | 8 | blank columns that end a word (own choice) |
| `LW` | 8 | label width, up to 255 components per word (own choice) |
| `BIN_R` | 2 | binarizer window radius, 5×5 (own choice) |
| `N_REF` | 512 | reference memory size (own choice) |
| `S_POS` | 256 | border between long- and short-term ranks (own choice) |
| `JS` / `JL` / `JLOW` | 5 / 8 / 1 | rank jumps; `JS = 5` from the worked example of the ranking figure, `JL > JS` as required, `JLOW` own choice |
| `C` | 16 | reliability margin, quarter units (own choice) |
| `NTH` | 8 | matches before a reference is re-optimized (own choice) |
| `DTH_INIT` / `DTH_MIN` / `DTH_MAX` | 96 / 16 / 384 | thresholds, quarter units (own choice) |

Fixed by the method: the 3×3 median, the local mean threshold, 4-neighbour labeling, one
segmentation scan per label, 16×16 bilinear normalizing, moment features, the ranked
short/long-term memory with jumps, and mean-based reference and threshold updates.

## Where this departs from the original method

- The original system finds the winner in a mixed-signal associative memory chip in one step.
  Here it is a sequential digital search, one reference per clock. The sensor front end and
  clock generation are outside the RTL.
- Eccentricity, orientation and skewness are replaced by raw second central moments.
- Labeling merges no label equivalences.
- The distance weights (¼ for the image, 1 for the features) are the original ones. The
  thresholds, jumps other than `JS`, and memory sizes are not published. All the
  numbers in the table above marked "own choice" are guesses that work in simulation.
- A distance exactly equal to `Dth` counts as new. The original describes this boundary
  both ways in different places; the ranking rule (new when `D ≥ Dth`) was followed.
- "Reliable" only decides the rank jump (`JS`/`JL` or `JLOW`). The original uses a
  reliability test too, but its exact role is not spelled out.

## Limits

- Characters whose arms join only below or to the right of where both started (U, V, W, H, M,
  and some handwriting) are split into several components. Each piece is learned as a
  separate pattern.
- The binarizer marks a pixel black only when it is darker than its 5×5 mean. A solid stroke
  wider than about half the window (more than about 2 pixels at this radius) keeps only its
  edges. Raise `BIN_R` for thick fonts.
- A word that is wider than `W_MAX` is cut. The piece after the cut has no left margin
  column.
- At the defaults one word of 40 columns takes about 1.5 M clocks. The binarizer is the
  slowest stage at 25 clocks per pixel. Pipelining the window reads with line buffers would
  make it one pixel per clock.

## Simulation

All files are plain SystemVerilog. `rtl/ocr_pkg.sv` must come first. For example, with
Verilator 5:

```
verilator --binary --timing -Wno-fatal rtl/ocr_pkg.sv rtl/*.sv tb/tb_ocr_top.sv --top-module tb_ocr_top
./obj_dir/Vtb_ocr_top
```

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one:

- ends with `TB_RESULT checks=N failures=M`;
- has a watchdog;
- checks the cycle counts stated above;
- compares the block against a behavioural model written in the testbench.

Notable testbenches:

- **`tb_learning_unit`** feeds a small memory (8 references, 4 long-term) with noisy copies of
  random prototypes. It checks every result field against a reference model of search,
  ranking and optimization. It also counts that each mechanism happened: new, known,
  unreliable, long-term and short-term jumps, eviction, and re-optimization.
- **`tb_ocr_top`** drives a reduced top (32 rows, 4 references) with rendered words of
  letters with salt-and-pepper noise. It runs the whole pipeline in a testbench model and
  compares every result.
- **`tb_ocr_full`** runs the top at its default parameters on a two-letter word of 1024 rows.
  It checks the two bounding boxes and the learning results. It takes about half a minute in
  Verilator.
