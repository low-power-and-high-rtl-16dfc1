# Multiplierless 2-D DWT / IDWT with 4-tap Daubechies filters

This design computes a three-level 2-D discrete wavelet transform of an N x N
image and its inverse. Each direction uses one transform module. That module
computes every decomposition (or reconstruction) level in turn and runs at
two samples per clock. A small N/2 x N/2 memory holds the LL band between
levels. The filters are the 4-tap Daubechies (D4) pair. Their taps are
quantized so that every product becomes three hard-wired shifts, a
carry-save stage and one adder, so the datapath contains no multipliers.
Image borders are handled by periodic extension.

The architecture follows the paper *Low-Power and High-Performance 2-D DWT
and IDWT Architectures Based on 4-tap Daubechies Filters*. That description
gives the block structure, the filter family, the processing element and the
cycle budget. It leaves many details open: the tap values, word widths,
buffer organisation, sequencing and interfaces. Every such detail here is
this design's own choice, and the sections below say which.
The default configuration is N = 8 and J = 3 levels, the worked example of
the architecture.

## Arithmetic

### Taps and processing element

The ideal D4 low-pass taps are 0.48296, 0.83652, 0.22414 and -0.12941. This
design scales them by 256 and replaces each with a nearby value of at most
three signed power-of-two terms:

| tap | x256 | terms | tap | x256 | terms |
|-----|------|-------|-----|------|-------|
| h0 | 118 | 2^7 - 2^3 - 2^1 | g0 | -35 | -2^5 - 2^1 - 2^0 |
| h1 | 216 | 2^8 - 2^5 - 2^3 | g1 | -63 | -2^6 + 2^0 |
| h2 | 63 | 2^6 - 2^0 | g2 | 216 | 2^8 - 2^5 - 2^3 |
| h3 | -35 | -2^5 - 2^1 - 2^0 | g3 | -118 | -2^7 + 2^3 + 2^1 |

The high-pass taps are g(k) = (-1)^k h(3-k). Candidates closer to the ideal
values exist, for example 124, 216, 57 and -33. This set was chosen because
it is nearly orthonormal:

- sum of h^2 is within 0.4 % of 1;
- h0 h2 + h1 h3 is within 0.2 % of 0;
- the high-pass filter has exactly zero gain at DC.

Orthonormality is what makes analysis followed by synthesis almost lossless.
A 3-level round trip of an 8-bit image comes back within a few grey levels
(47 to 52 dB PSNR). The closer set 124, 216, 57, -33 gives only about
29 dB.

`dwt_pe` multiplies a sample by one tap. It forms the three shifted (and,
where needed, negated) terms. A 3:2 carry-save stage reduces them to a sum
word and a carry word, and one adder adds those two. The result is exact.
`dwt_fir4` adds four such products and removes the 8 fractional bits with
round-half-up. Every filter in the design is a set of `dwt_fir4` instances,
differing only in which taps meet which samples.

Samples are 16-bit two's complement. Pixels enter as 0..255 zero-extended.
The LL gain is about 2 per level, so the 3-level LL band stays below 2^12.

### Transform conventions

All indices are modulo the current size W.

    analysis   lo(n) = h0 x(2n+3) + h1 x(2n+2) + h2 x(2n+1) + h3 x(2n)
               hi(n) = g0 x(2n+3) + g1 x(2n+2) + g2 x(2n+1) + g3 x(2n)
               rows first, then columns
    synthesis  x(2n)   = h1 lo(n-1) + g1 hi(n-1) + h3 lo(n) + g3 hi(n)
               x(2n+1) = h0 lo(n-1) + g0 hi(n-1) + h2 lo(n) + g2 hi(n)
               columns first, then rows

Each filter output is rounded before the next stage uses it. In the
analysis, the even-numbered and odd-numbered input samples meet separate
taps (the polyphase split). The decimated outputs are therefore computed
directly, and no sample is computed only to be discarded.

The three-sample offset in the analysis formula places each output window
on whole input pairs. The wrap-around (periodic extension) then falls at
the end of each row and column. In a subband name the first letter is the
vertical (column) filter and the second the horizontal (row) filter:

- LH is horizontal high, vertical low;
- HL is horizontal low, vertical high.

## Analysis side (`dwt_system`)

```
 frame memory --pairs--> [mux] --> dwt_hfilt --(L,H)--> dwt_vfilt --> LL,LH,HL,HH out
                           ^        (row filter)        (4 column filters)   |
                           |                                                 | LL
                        dwt_ram  <-------------------------------------------+
                           ^
                      dwt_addr_gen (reads of all levels, row-major pairs)
```

### Row filter and its wrap-around slot (`dwt_hfilt`)

Each clock a pair x(2p), x(2p+1) enters. Output column c needs pairs c and
c+1. It is produced when pair c+1 arrives, from that pair and the previous
one, which is held in a register.

The last column of a row needs the row's first pair again. That pair is
kept in a second register. The last column is formed one clock after the
row's last pair. In that clock the next row's first pair arrives, and a
first pair produces nothing on its own. A continuous input stream therefore
gives a continuous output stream of one (L, H) per clock. There is no
stall and no re-read.

### Column filters, buffers and the flush (`dwt_vfilt`)

Output row m needs rows 2m .. 2m+3 of the L and H columns. The stage keeps
five row buffers of N/2 (L, H) words each:

- E: the even row of the current pair;
- P0 and P1: the previous row pair;
- F0 and F1: the image's first row pair, for the bottom wrap-around.

While odd row 2m+3 streams in, each clock forms all four coefficients of
(m, c) at once. During even rows the four filters are idle.

The bottom wrap-around row m = H/2-1 needs rows H-2, H-1, 0 and 1, so it
can only be formed after the last input. The stage therefore runs a flush
of W/2 clocks on its own. It reads P0, P1, F0 and F1 and signals
`out_done` with the last coefficient.

The flush does not stop the input. The first row pair of the next level
(rows 0 and 1, half as wide) may stream in during the flush, because those
rows only fill E, F0, F1, P0 and P1 and produce no output. The hazard is
the buffers: the flush reads column t of P0, P1, F0 and F1 in its t-th
clock, while the new rows write the same buffers. A column may therefore
be overwritten only in or after the clock in which the flush reads it.
This holds naturally, because the new stream starts no earlier than the
flush and advances one column per clock. Two assertions check that only
rows 0 and 1 enter during a flush and that they stay behind it.

### Levels and memory (`dwt_addr_gen`, `dwt_ram`)

The sequencer reads level 1 from the external frame memory and levels 2..J
from `dwt_ram`, always in row-major pair order. The multiplexer in
`dwt_system` selects between the two sources.

The LL band of level j is written in place over level j-1. Row m of level j
is written only after row 2m+3 of level j-1 has been read. The wrap-around
row is written during the flush, after all reads.

The sequencer starts the next level in the clock after a level's last
read. The source rows of the new level must already be in the RAM, and for
the small levels they often are not. `dwt_system` therefore counts the
complete LL rows written at the current output level. It passes the
sequencer a `row_ok` flag, and a read of row r is held back until row r is
there. The last row of every level is the previous level's wrap-around row,
so it always waits for that flush.

The RAM has two banks, for even and odd columns, of N/2 rows x N/4 words.
One read returns one pair. A write stores one LL coefficient in the bank of
its column parity. The read is registered.

### Timing

For N = 8 and J = 3:

| level | image | read clocks | row wrap | column flush | overlap |
|-------|-------|-------------|----------|--------------|---------|
| 1 | 8x8 | 32 | 1 | 4 | hidden behind level 2 rows 0-1 |
| 2 | 4x4 | 8 | 1 | 2 | level 2 row 3 waits for level 1's flush |
| 3 | 2x2 | 2 | 1 | 1 | level 3 waits for level 2's rows 0 and 1 |

- The read clocks total 42 = (2/3)(1 - 4^-J) N^2. This matches the budget
  of two samples per clock.
- `busy` stays high for 54 clocks.
- The 12 extra clocks are of two kinds:
  - 7 clocks of read hold-back at the small levels;
  - the last flush plus about 4 clocks of pipeline (read, row filter,
    column filter, RAM write).
- For larger images the hold-back shrinks relative to the reads, because
  level j+1 needs row r of level j only about r*S/4 clocks after the level
  starts.

## Synthesis side (`idwt_system`)

```
 coefficient source --LH,HL,HH (+LL in step 1)--> [LL mux] --> idwt_vfilt --(L,H)--> idwt_hfilt --> pixels
                                                     ^         (4 column filters)     (row filter)    |
                                                     |                                                | LL
                                                  dwt_ram <---------------------------------------------+
                                                     ^
                                              idwt_addr_gen (command schedule, RAM addressing)
```

Synthesis runs from the coarsest level down.

- In step 1, all four M x M subbands (M = N/2^J) come from the external
  coefficient source, the entropy-decoder side.
- In each later step, LL comes from the RAM, where the previous step left
  its reconstruction.
- The last step's output is the image, two pixels per clock.

### Column synthesis: two image rows per coefficient row (`idwt_vfilt`)

Coefficient row q, together with row q-1, gives image rows 2q and 2q+1 of
both the L and the H columns. The row filter takes one row at a time, at
one (L, H) per clock. The sequencer therefore issues commands in this
order:

| command | per | does |
|---------|-----|------|
| COEF (q, c) | M clocks | reads coefficients of (q, c). For q >= 1 it emits row 2q and parks row 2q+1 in the odd-row buffer. |
| ODD (q, c) | M clocks, q >= 1 | emits the parked row 2q+1 |
| FLE (c) | M clocks | wrap-around: forms row 0 from coefficient row M-1 and the saved row 0; parks row 1 |
| FLO (c) | M clocks | emits row 1 |

The buffers hold the previous coefficient row, the first coefficient row
and the parked odd row. For q = 0 the COEF clocks emit nothing. The
wrap-around rows 0 and 1 come last.

### Row synthesis (`idwt_hfilt`)

This is the mirror of the analysis row filter. Pixel pair c >= 1 is formed
when column c arrives. Pair 0 needs the row's last column, so it is formed
one clock after that column, from the saved first column.

### RAM layout

A step with output size S writes its LL image at row offset S, or at row
offset 0 when S = N/2. The next step reads it from there. With this layout
no write lands on a row that is still to be read. After each step there are
DRAIN = 4 idle clocks, so that its last writes reach the RAM before the
next step reads them.

### Output order and timing

Rows of the image come out in the order 2, 3, ..., N-1, 0, 1. Within a row,
pair 0 comes after the others. Every pair carries its row and pair index.

For N = 8 there are 42 clocks that each produce two samples (2 + 8 + 32
over the three steps), and `busy` stays high for 61 clocks. Each step costs
2M^2 + M + DRAIN clocks.

## Top level (`dwt_idwt_top`)

The two sides stand side by side and share only the clock and the
asynchronous active-low reset. They can run concurrently. The entropy
coder and decoder are outside the design.

| port group | meaning |
|------------|---------|
| `dwt_start` / `dwt_busy` / `dwt_done` | analysis control. `start` is a one-clock pulse while idle; `done` pulses at the end. |
| `img_rd_en`, `img_rd_row`, `img_rd_col` -> `img_rd_data` | frame-memory read of pixel pair (row, 2*col .. 2*col+1). Data are due the next clock. |
| `coef_valid`, `coef_level`, `coef_row`, `coef_col`, `coef_q` | one LL/LH/HL/HH quadruple per valid clock. A coder keeps LH, HL and HH of every level and LL of level J. |
| `idwt_start` / `idwt_busy` / `idwt_done` | synthesis control |
| `cin_rd_en`, `cin_rd_level`, `cin_rd_row`, `cin_rd_col` -> `cin_rd_data` | coefficient read for (level, row, col). The quadruple is due the next clock; its `ll` field is used only in the first step. |
| `pix_valid`, `pix_row`, `pix_col`, `pix_pair` | reconstructed pixel pair |

There is no back-pressure. The external memories must answer every request
one clock later. Row and column tags are 12 bits wide, which allows images
up to 4096 wide. `coef_q` and `pix_pair` are packed structs from `dwt_pkg`.

## Where this design departs from the published architecture

- **Clock count.** The architecture quotes 42 clocks for an 8 x 8, 3-level
  DWT. Here the 42 are the input clocks, and the complete transform takes
  54. The level-1 flush is hidden, but the small levels wait for their
  rows, and the last flush and the pipeline add latency. The inverse
  transform takes 61 clocks; its flushes are not overlapped. The
  description also gives 22 clocks for the IDWT in one place
  and 42 (level 3 in clocks 10 to 41) in another. 42 is consistent with
  the formula, and the design has 42 output clocks.
- **Filter family.** One sentence of the description derives the taps from
  the biorthogonal 9/7 wavelet. The title and the implementation section
  use 4-tap Daubechies filters, and this design uses D4. The synthesis taps
  are the time-reversed analysis taps.
- **Tap values, word width and rounding** are this design's choices; see
  Arithmetic.
- **Row buffers.** The analysis column stage stores 5 rows of N/2 (L, H)
  words, which is 5N words. The published storage figure is
  N^2/4 + N(K+2), that is 6N for K = 4.
- **Periodic-extension alignment.** The conventions above are this design's.
  Other alignments shift the subbands cyclically by one position.
- **The internal structure** of the row and column filters, the sequencers,
  the command schedule of the synthesis side and the RAM banking are
  reconstructions. They realise the stated behaviour but are not taken
  from circuit diagrams.
- **Utilisation.** The published architecture states 100 % hardware
  utilisation. Here the four column filters of the analysis side work only
  during odd input rows and the flushes, the analysis side stalls at the
  small levels, and the synthesis row filter idles in the DRAIN clocks.
- **Reconstruction quality.** The PSNR quoted for the original is not
  reproduced. With the taps above, a 3-level round trip gives 47 to 52 dB.
- **Physical results** (0.18 um, 588 x 588 um^2, 28.53 mW at 50 MHz) are
  not reproduced.

## Parameters

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `N` | all systems, cores, `dwt_vfilt`, `idwt_vfilt`, `dwt_ram` | 8 | image width and height, a power of two, at least 2^(J+1) |
| `J` | `dwt_system`, `idwt_system`, sequencers, top | 3 | decomposition levels (at most 7) |
| `DRAIN` | `idwt_addr_gen` | 4 | idle clocks between synthesis steps. 4 is the minimum for the pipeline as built. |
| `DATA_W`, `COEF_FRAC` | `dwt_pkg` | 16, 8 | word width and fractional tap bits |

The row buffers and the RAM grow with N (5N and N^2/4 words). They are
written as arrays, so synthesis maps them to memories or flip-flops.

## Verification

Each testbench checks the block against an integer reference. The reference
is written with ordinary multiplications (`tb/dwt_ref_pkg.sv` and inline
models) and checks bit-exact results and cycle timing:

| testbench | checks |
|-----------|--------|
| `tb_dwt_pe` | every tap against multiplication, including the extreme inputs |
| `tb_dwt_hfilt`, `tb_idwt_hfilt` | rows of three widths, with and without gaps; values and exact output clocks |
| `tb_dwt_vfilt`, `tb_idwt_vfilt` | whole images or command schedules at three sizes; values, rows, flush timing; for the analysis stage also the next image entering during a flush |
| `tb_dwt_core`, `tb_idwt_core` | one level at three sizes; each position exactly once; latency |
| `tb_dwt_ram` | bank enables, read latency, read-during-write |
| `tb_dwt_addr_gen` | exact request sequence, reads held while `row_ok` is low, 42 read clocks |
| `tb_idwt_addr_gen` | exact command sequence, 42 output clocks, 61 busy clocks |
| `tb_dwt_system`, `tb_idwt_system` | 3-level transforms of random images; coefficients or pixels, counts, clocks, reconstruction within 6 levels and 40 dB |
| `tb_dwt_idwt_top` | default-size codec. Analysis of image k+1 runs while image k is reconstructed. It counts row wraps, column flushes, flush clocks overlapped with the next level, held-back reads, LL reads and writes through both RAMs, odd-row parking and synthesis flushes. |
| `tb_dwt_idwt_image` | N = 64 flow on a synthetic picture. 2688 read and output clocks; PSNR about 52 dB. |

To run one with Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/dwt_pkg.sv tb/dwt_ref_pkg.sv tb/tb_dwt_idwt_top.sv \
        --top-module tb_dwt_idwt_top -o sim
    ./obj_dir/sim

Any other testbench runs the same way with its name in place of
`tb_dwt_idwt_top`. `-Wno-fatal` keeps the width warnings of the
testbenches' array indexing from stopping the build.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. All of them
pass with random initial register contents (`+verilator+rand+reset+2`). Lint with
`verilator --lint-only -Wall -Irtl -y rtl rtl/dwt_pkg.sv rtl/dwt_idwt_top.sv`.
The remaining warnings are:

- SYNCASYNCNET: the reset is used both in the asynchronous flops and in
  `disable iff` of the assertions;
- one unused upper address bit group in `idwt_system`.

## Files

`rtl/`: `dwt_pkg` (types, taps, rounding), `dwt_pe`, `dwt_fir4`,
`dwt_hfilt`, `dwt_vfilt`, `dwt_core`, `dwt_ram`, `dwt_addr_gen`,
`dwt_system`, `idwt_vfilt`, `idwt_hfilt`, `idwt_core`, `idwt_addr_gen`,
`idwt_system`, `dwt_idwt_top`.
`tb/`: one testbench per module listed above, plus `dwt_ref_pkg`.
