# Fractal colour image encoder with inter-colour mapping

This is synthesizable SystemVerilog for a deeply pipelined encoder. It
compresses a 1024×1024 RGB image with fractal (PIFS) coding.

Fractal coding cuts an image into small *range* blocks. For each range block
it looks for a larger *domain* block of the same image that, once shrunk and
given an affine change of intensity (`r ≈ δ·d + ρ`), looks like it. The code
of a range block is the domain index plus δ and ρ. The search for the best
domain block is what makes fractal encoders slow. A colour image normally
needs three such searches.

This encoder runs the search only once. The G component is encoded with a
(local) search. R and B are strongly correlated with G, so each of their range
blocks is mapped directly onto the G range block at the same position. That is
a *searchless* match: only δ and ρ are stored, with no domain index. The
design has two matching processors:

- **PU1** does the usual search: G range blocks against G domain blocks.
- **PU2** does two jobs:
  - the searchless R/B matchings;
  - half of the G search, using the *same words* that were fetched for PU1.

As a result, each domain block is read from memory once for two matchings.

## Image layout and partitioning

The image is held in a 64-bit-wide main RAM of 3·2^17 words. Each word holds
8 pixels.

| Plane | Word address |
|---|---|
| G | 0 |
| R | 2^17 |
| B | 2^18 |

Each plane is stored row by row, 128 words per row. Pixel `x` of a word is in
bits `8x+7..8x`.

Each component is split into 64 sub-images (`k`) of 128×128 pixels. Inside a
sub-image:

- **Domain blocks.** There are 64 domain blocks `D_j` of 16×16 pixels (8×8
  grid, `j = 0..63`).
- **Range blocks.** There are 256 range blocks of 8×8 pixels. They are grouped
  in 64 sets `R_i` of four. Set `R_i` covers exactly the area of `D_i`:
  - `R_{i,0}` top-left
  - `R_{i,1}` bottom-left
  - `R_{i,2}` top-right
  - `R_{i,3}` bottom-right

A G range block is compared only with the 64 domain blocks of its own
sub-image. The search window is 128×128.

A 16×16 block is fetched as 32 words, in the order `p = 0..31`:

- first the left 8 columns, rows 0..15;
- then the right 8 columns, rows 0..15.

This way the four range blocks of a set come out one after another, eight
words each: `R_{i,p}` is words `8p..8p+7`. The word address generator
(`mem_addr_gen`) builds the 19-bit address by bit concatenation:

    addr = c[1:0] & k[5:3] & j[5:3] & p[3:0] & k[2:0] & j[2:0] & p[4]

## The fetch schedule: one set `i`

Everything in the encoder is timed by the order in which `mem_ctrl` and
`mem_addr_gen` fetch blocks. For each sub-image `k` and each set
`i = 0..63`:

| cycles | fetched | used by |
|---|---|---|
| 0–31 | `R^g_i` (32 words) | stored in PU1's RAM 4-R. Its contraction is `D_i`, PU1's first domain block, and is also kept in PU2's RAM D_R |
| 32–63 | `R^r_i` | PU2, searchless: mapped onto `R^g_{i,p}` |
| 64–95 | `R^b_i` | PU2, searchless |
| 96–103 | pause of 8 cycles | lets PU2 finish the searchless reads of RAM 4-R |
| 104 + 32·n | `D^g_j`, `j = i+1..63` | PU1: `R^g_{i,p} × D_j` (contracted). PU2: the same words seen as the four range blocks `R^g_{j,p}`, matched against `D_i` |
| end | drain | at least 8 cycles, and until PU1 has started matching the last domain block; the next set then overlaps the end of the matching |

Take one G range block `R^g_{m,p}` in set `m`:

- PU2 matches it against `D_0..D_{m-1}`, during sets `0..m-1`.
- PU1 matches it against `D_m..D_63`, during set `m`.

So every pair is matched exactly once, and in increasing domain order. This
is what halves the memory traffic: set `i` fetches only `D_{i+1..63}`, not all
64 domain blocks.

Each fetched word carries a *tag* along every pipeline: block kind, `k`, `i`,
`j` and word index `p` (`fetch_tag_t` in `fcic_pkg`). All the controllers
derive their strobes from the tags and not from free-running counters. A stall
or a longer drain therefore cannot put them out of step.

## Front end: MemCtrl, MemAddrG, MCC, MCC-Ctrl, SCtrl

**`mem_addr_gen`** holds the counters:

- `c` (component)
- `k` (sub-image)
- `i` (set)
- `j` (domain)
- `p` (word)
- a flag for the domain phase

It steps one word per enabled cycle. It also flags the last word of a set
and of the image.

**`mem_ctrl`** does four things:

- starts the fetch on `start`;
- drops the enable for the 8-cycle pause and for the drain;
- raises PG/SG data-valid one cycle later, when the word is on the RAM bus;
- pulses `done` when, after the last set, the processors and the code store are idle.

**`mcc`** (mean and contraction) is a three-stage pipeline over the word
stream:

1. **Stage 1: contraction.** Stage 1 adds horizontal pixel pairs. It adds them
   over two rows, which gives four 2×2 sums: the contracted pixels,
   `floor(sum/4)`.
2. **Stage 2: row sums.** Stage 2 sums a row, and also the four contracted
   pixels.
3. **Stage 3: block sums and means.** Stage 3 accumulates 14-bit block sums.
   The means are the top 8 bits (`sum/64`):
   - `M(R)` of every 8×8 range block;
   - `M(D)` of every contracted 8×8 domain block.

   They are ready three cycles after the block's last word.

**`mcc_ctrl`** makes the MCC's reset and enable strobes from the tag, delayed
to each stage.

**`sctrl`** stores the results:

- `R^g_i` words into RAM 4-R;
- contracted rows into PU1's RAM D, in two banks. The left and right four
  pixels of a row arrive 16 words apart and are written with byte enables;
- the contraction of `D_i` also into RAM D_R;
- means into the right registers.

When a G block's mean is ready, `sctrl` hands the block to PU1 as a job.

## PU1: search, `R^g_{i,p} × D_j` for `j ≥ i`

PU1 holds:

- **RAM 4-R** (32×64): the four range blocks;
- their means `μ(R_0..R_3)`;
- **RAM D** (16×64, two banks): the current and the next contracted domain
  block;
- a `μ(D)` register per bank.

`sadc_ctrl1` keeps a two-entry job queue. It runs one job in 32 cycles. In
cycle `n` it reads:

- RAM 4-R word `n`;
- RAM D row `n mod 8`;
- `μ(R_{n/8})`.

OCU1 and SADC1 then produce one result every 8 cycles. The next queued job
starts right after the last read of the previous one. That is needed, because
domain blocks arrive every 32 cycles and RAM D holds only two of them.

The first job of a set is `D_i` against its own range blocks. It waits for
`sl_done` from PU2. Until then, PU2 may still be reading RAM 4-R for the
searchless matchings.

## PU2: searchless R/B and the other half of the search

Every fetched word enters **R_D**, a 12-stage × 64-bit shift register. One
stage before the end, `sadc_ctrl2` reads the partner row:

| Word kind | Scheme | Partner row | OCU2 gets |
|---|---|---|---|
| R or B word | searchless | RAM 4-R word `p`, the G range block at the same place. PU2 borrows RAM 4-R's read port | `μ(R^g_{i,p})` |
| G domain word of `D_j` | search | row `p mod 8` of the contracted `D_i` in RAM D_R | `μ(D_R)` |

`μ(R_D)` is loaded from the MCC with the mean of the range block that is
passing through. When the word leaves R_D, three things are in place:

- the word;
- its partner row;
- OCU2's offsets.

They enter SADC2 together. A range block enters SADC2 12 cycles after its
first word was fetched, and it never stalls the fetch. Searchless results
leave at once as R/B codes. Search results go to the code store.

## Matching arithmetic: OCU and SADC

**Scale codes.** There are four scale codes: δ ∈ {−0.5, 0.25, 0.5, 1}, codes
0..3. No rotations or reflections are tried.

**OCU.** The OCU computes, for all four δ at once, `ρ = μ_R − δ·μ_D`. It
works in quarter units, so δ = 0.25 is exact. ρ is coded as a signed 7-bit
number `c` with `ρ = 4c`:

- `c = round(ρ/4)`;
- `c` is clamped to −64..63.

The OCU has one register stage.

**SADC.** The SADC has four pipeline stages. Each cycle it takes one row of 8
range pixels and 8 partner pixels.

1. **PS1.** The prediction `δ·d + ρ` is clamped to 0..255 (in quarter units).
   PS1 takes its absolute difference from `r`.
2. **PS2.** A row sum per δ.
3. **PS3.** A block sum per δ.
4. **PS4.** `SAD = sum/4` (14 bits), and the smallest of the four. A tie goes
   to the lower δ code.

A block takes 8 cycles. The result is valid 4 cycles after its last row.

## FC-SAD SCtrl: keeping the best code

`fc_sad_sctrl` owns the 256×29-bit FC-SAD RAM. Each word holds, for one range
block:

- SAD (14 bits)
- `j` (6 bits)
- δ (2 bits)
- ρ (7 bits)

For every result from PU1 or PU2 it reads the stored word, compares, and
writes back only on a **strictly smaller** SAD. So among equal SADs the lowest
domain index wins.

- **Domain 0.** A result for domain 0 is always written (*FirstSAD*).
- **Domain 63.** A PU1 result for domain 63 is the last for that block. The
  final code is also sent out on `g_code`.

One service takes two cycles, and a waiting PU1 result goes first. Each
processor sends at most one result every 8 cycles, so nothing is lost.

## Interface (`fcic_top`)

| Port | Dir | Meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, synchronous active-low reset |
| `load_we`, `load_addr[18:0]`, `load_data[63:0]` | in | write the image into the main RAM before starting |
| `start` | in | one-cycle pulse: encode `K_LAST+1` sub-images |
| `busy`, `done` | out | encoding in progress, one-cycle end pulse |
| `g_code_valid`, `g_code` | out | final G code: `k, i, p, j, δ, ρ, SAD` (one per G range block) |
| `s_code_valid`, `s_code` | out | R/B code: component (1 = R, 2 = B), `k, i, p, δ, ρ, SAD` |

The single parameter is `K_LAST`, the last sub-image to encode. Its default
is 63: the whole image.

The block index of a code is `i·4 + p` within sub-image `k`. The block's pixel
position follows from the partitioning above.

## Timing

Per set `i`:

- searchless phase: 96 cycles of fetch + 8 pause;
- search: 32 cycles per domain block;
- drain.

In numbers:

| Measure | This design | Published architecture |
|---|---|---|
| Drain per set | about 9 cycles on average | 2 cycles |
| Per sub-image | 71,741 cycles (6,656 searchless, 64,512 search, rest drain) | — |
| Whole 1024×1024 image | 4,591,464 cycles, 12.08 ms at 380 MHz | 4,628,480 cycles, 12.2 ms |
| 512×512 RGB (16 sub-images) | 3.02 ms | 3 ms |
| 256×256 RGB (4 sub-images) | 0.755 ms | 0.75 ms |

The next set may start while PU1 is still matching the last domain block of
the current one. PU1 reads word `n` of RAM 4-R in cycle `n` of that block. The
new `R^g_{i+1}` writes word `n` no earlier than that, so PU1 still reads the
old data. The new means arrive after the old ones were used. The drain
therefore only has to wait until PU1 has *started* the last block. It does not
have to wait until PU1 has finished. That start comes a few cycles after the
block's mean is known.

The two smaller workloads use `K_LAST`, with the image's tiles placed in the
first tile rows of the frame.

Synthesis (yosys, generic cells) gives about 1,500 word-level cells and about
2,000 flip-flop bits. The storage is almost all the 3 MB main RAM. The on-chip
buffers are:

| Buffer | Size |
|---|---|
| RAM 4-R | 32×64 |
| RAM D | 16×64 |
| RAM D_R | 8×64 |
| R_D | 12×64 |
| FC-SAD RAM | 256×29 |

Together these are 11,776 bits, against about 13,400 bits of on-chip memory
reported for the published FPGA implementation.

No clock-frequency claim is made for this RTL.

## Where this RTL makes its own choices

The structure follows the published architecture: units, RAM sizes, pipeline
depths, fetch order, address layout, the 8-cycle pause, and 8 cycles per
matching. The points below are where that description is silent or was not
followed.

- **Drain.** The fetch of the next set waits at least 8 cycles and until PU1
  has started its last domain block. That is about 9 cycles per set, not the
  published 2. Because the search phase is shorter, the whole image still
  takes slightly fewer cycles than the published count: each set fetches only
  `63 − i` domain blocks.
- **Second μ(D) register.** PU1 keeps one μ(D) register per RAM D bank, so
  that the mean of the block being written does not overwrite the mean of
  the block being matched.
- **PU1 job queue.** PU1 uses a two-entry job queue. The first job of a set
  waits for PU2's `sl_done`.
- **Arithmetic.** Several rules are this design's own:
  - ρ coded as `round(ρ/4)`, clamped to 7 bits;
  - the prediction clamped to 0..255;
  - ties resolved to the lower δ code and the lower domain index;
  - truncating means (`sum/64`) and contraction (`sum/4`).
- **Width of R_D.** R_D is 12 stages of 64 bits. A "64 12-bit" shift register
  was also described; the 12-stage form matches the rest of the timing.
- **Code output.** Codes leave on two ports. The published architecture only
  stores them. R/B codes are not kept in FC-SAD RAM.
- **Image loading.** The main RAM is a plain synchronous array with a load
  port.

## Files

| File | Block |
|---|---|
| `rtl/fcic_pkg.sv` | widths, tag and code structs, scale helper, address function |
| `rtl/fcic_top.sv` | the encoder |
| `rtl/main_ram.sv` | 384K×64 image memory |
| `rtl/mem_addr_gen.sv`, `rtl/mem_ctrl.sv` | fetch order and fetch control |
| `rtl/mcc.sv`, `rtl/mcc_ctrl.sv` | means and contraction |
| `rtl/sctrl.sv` | storing control |
| `rtl/pu1.sv`, `rtl/sadc_ctrl1.sv` | processor PU1 |
| `rtl/pu2.sv`, `rtl/sadc_ctrl2.sv`, `rtl/rd_shift_reg.sv` | processor PU2 |
| `rtl/ocu.sv`, `rtl/sadc.sv` | offset and SAD units (one each per processor) |
| `rtl/dp_ram.sv`, `rtl/fc_sad_ram.sv` | RAM 4-R / D / D_R, FC-SAD RAM |
| `rtl/fc_sad_sctrl.sv` | best-code keeper |

Each RTL file begins with a description of its function, interface and
timing.

## Testbenches and simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one
compares against its own model and prints
`TB_RESULT checks=N failures=M`.

**End-to-end testbenches.** These share `tb/fcic_tb_body.svh`:

| Testbench | Sub-images | Simulation time (verilator) |
|---|---|---|
| `tb_fcic_top` | 2 | about 1 s |
| `tb_fcic_512` | 16 (also reports the 4-sub-image time) | about 3 s |
| `tb_fcic_full` | all 64, default parameters | about 10 s |

Each one:

- generates a correlated RGB test image;
- loads it;
- checks every G and R/B code against a reference model of the full search;
- checks exact-once delivery, the 104/32-cycle fetch timing and the number of
  matchings;
- counts each mechanism: pause, drain, FirstSAD, replace/keep, PU1 waiting
  for PU2, every δ code.

**Processor testbenches.** `tb_pu1` and `tb_pu2` (with `tb/pu_harness.svh`)
run one sub-image through the storing path. They check every single matching
result.

To run one with plain verilator, from the directory that holds `rtl/` and
`tb/`:

    verilator --binary --timing --assert -Wno-fatal -Itb rtl/fcic_pkg.sv -y rtl \
        tb/tb_fcic_full.sv --top-module tb_fcic_full -Mdir obj_full -j 8
    ./obj_full/Vtb_fcic_full

Replace `tb_fcic_full` by any other testbench name. Assertions check two
rules:

- PU1's job queue never overflows;
- the code store never receives a second result from a processor before it
  has served the first.
