# Two-bin-per-cycle CABAC decoder for H.264/AVC

CABAC decoding is the serial part of an H.264/AVC decoder. Each bin needs a
context model (CM) chosen from the bins before it. The arithmetic decoder
needs the range and offset left by the previous bin. This design keeps that
chain moving at up to two bins per clock. It rests on three ideas:

1. **Guess the next syntax element.** While one syntax element (SE) is still
   being decoded, a predictor guesses which SE comes next. A second
   context-selection unit prepares that SE's first CMs in parallel. When the
   guess is right, the pipeline moves from one SE to the next without losing
   a cycle. A wrong guess costs exactly one bubble cycle.
2. **Decode two bins in one step without chaining two decoders.** The
   decision arithmetic is reordered so that the second bin's decision needs
   only one adder after the first bin's outputs. Both outcomes of the first
   bin are evaluated side by side.
3. **Split the CM memory by access pattern.** CMs that are never needed two
   at a time sit in a one-read/one-write SRAM (205 entries). CMs that can be
   needed in pairs sit in a register file with two read ports and two write
   ports (254 entries). Together they hold the 459 CMs and give three reads
   and three writes per cycle. This costs far less than holding every CM in
   registers.

This RTL implements that architecture for the **residual-data part** of the
CABAC syntax, with the `mb_skip_flag` (P slices) and `mb_qp_delta` that open
each macroblock:

- `mb_skip_flag`
- `mb_qp_delta`
- `coded_block_flag`
- the significance map (`significant_coeff_flag` and
  `last_significant_coeff_flag`)
- `coeff_abs_level_minus1`
- `coeff_sign_flag`
- `end_of_slice_flag`

It covers frame-coded blocks of ctxBlockCat 0 to 4. The other
macroblock-layer SEs are not decoded. "What is not built" below lists all the gaps.

## Pipeline: MCS and TSBAD stages

Every cycle, two stages work on neighbouring steps. A *step* is one or two
bins of the same SE.

```
            +-------------------- MCS --------------------+     +------------- TSBAD -------------+
 SE parser->| CS (current SE: b, b+1, b+2)                |     | CM_sel picks CM_bin1 and the    |
 predictor->| CS (predicted SE: 0, 1, 2)    -> build step |---->| two second-bin candidates       |
            |   select by match/hit/miss    -> memory     |     | tsbad_engine: 1 or 2 bins       |
            |   read addresses: Addr_SRAM, Addr1/2_REG    |     | CM write-back (up to 2)         |
            +---------------------------------------------+     | binarization matching -> Match  |
                          ^                                     +---------------+-----------------+
                          +------------ next bin index, match, actual next SE --+
```

- **MCS (modified context selection).** Context selection (CS) plus
  context-model loading (CL). `context_selection` is instantiated twice:
  - The current-SE unit looks at the next bin index b and at b+1, b+2.
  - The next-SE unit looks at bins 0, 1, 2 of the predicted SE. It never
    needs more, because once the predicted SE becomes the current one, the
    other unit takes over.

  Which unit's result is used is decided in the same cycle by the TSBAD
  stage's binarization matching:

  | TSBAD result this cycle                   | MCS builds                                    |
  |-------------------------------------------|-----------------------------------------------|
  | SE not finished                           | next step of the current SE                   |
  | SE finished, actual next SE = prediction  | first step of the next SE (no lost cycle)     |
  | SE finished, prediction wrong             | nothing: one bubble, then the actual next SE  |

- **Step descriptor.** A step holds the first bin's kind and CM location. It
  also holds *two* second-bin candidates, one for each value of the first
  bin, with a CM source for each (`src2_0`, `src2_1`). The possible sources
  are the SRAM port, register port 1, register port 2, or "reuse the first
  bin's updated CM". `build()` in `cabac_decoder.sv` assigns the three read
  ports. The first bin takes the SRAM or register port 1. The second-bin
  candidates take the ports that are left. If a candidate cannot get a port,
  that second bin is dropped and the step decodes one bin.
- **TSBAD (two-symbol binary arithmetic decoding).** The memory read data,
  steered by the registered sources, become `CM_bin1` and the two candidate
  `CM_bin2`. `tsbad_engine` decodes the bins. The updated CMs go back through
  the SRAM write port and the two register write ports. `binarization_matching`
  updates the SE state and reports Match, the value, the next bin index and
  the positions of the next second-bin candidates.

Memory reads are registered: the address is captured at the end of MCS and
the array is read during TSBAD. A write at that same edge is visible to the
read (write-first). So a CM updated by one step can be read by the very next
step, with no forwarding mux outside the memories.

Cycle accounting, checked by the end-to-end testbench:

    cycles of decoding = steps + bitstream stalls + misprediction bubbles + 1 per slice

## The two-bin arithmetic engine (`tsbad_engine`)

This is the most intricate block. It is purely combinational and takes:

- range R and offset O (9 bits each)
- a 16-bit window of the next bitstream bits
- the first bin's kind and CM
- two second-bin candidates (kind, CM, and a "same CM as bin 1" flag)

It returns:

- one or two bin values
- the range, offset and bit count after each bin
- the updated CMs

**First bin.** The standard compares O with R_MPS = R - R_LPS, which waits
for the table look-up before the subtraction. The engine instead computes

    O_LPS = (O - R) + R_LPS

(O - R) and the look-up of R_LPS run at the same time. The bin is the MPS
when O_LPS is negative. Then:

- After an MPS, the new offset is O and the new range is R - R_LPS. Both are
  shifted left by 0 or 1.
- After an LPS, the new offset is O_LPS and the new range is R_LPS. Both are
  shifted left by 1 to 6. The shift is the leading-zero count of R_LPS, so it
  is known as soon as R_LPS is.

**Second bin.** The second decision needs its own O'_LPS = (O' - R') + R'_LPS.
Both parts of the sum are already at hand for either outcome of the first
bin:

| first bin | O' - R' (before renormalisation)   | so O'_LPS is                |
|-----------|------------------------------------|-----------------------------|
| MPS       | O - (R - R_LPS) = O_LPS            | renorm(O_LPS) + R'_LPS      |
| LPS       | O_LPS - R_LPS = O - R              | renorm(O - R) + R'_LPS      |

"renorm" means the value shifted left by the first bin's renormalisation,
with new bitstream bits shifted in at the bottom. R'_LPS depends on the
second CM's state and on bits 7:6 of the renormalised first-bin range. The
engine takes the four-entry rangeTabLPS row of each candidate's state. A
4-to-1 mux then picks the entry once the first range is known. Both the MPS
and the LPS branch are computed in full, and the first bin's value picks
between them. The critical path is therefore one table read, one add, a
shift and one more add, not two full decoders in series.

If the second bin uses the same CM as the first, the updated first-bin CM is
used. This happens in runs of `coeff_abs_level_minus1` prefix bins. The
supported pairs are:

- regular + regular
- regular + bypass
- regular + terminate
- bypass + bypass

A bypass second bin shifts one bit of the window into the renormalised
offset. A terminate second bin compares with R' - 2.

All offset arithmetic is 11 bits wide, to keep the sign of the differences.
Bits are consumed from the window, at most 14 per step (a 7-bit LPS
renormalisation for each bin). The standard tables never need more than 12.

## Hybrid CM memory (`cm_sram`, `cm_regfile`)

The CMs are split by one rule: if two CMs of a set can be needed in the same
step, the set goes into registers; otherwise it goes into the SRAM.

| part           | entries | ports        | holds (ctxIdx)                                                                     |
|----------------|---------|--------------|------------------------------------------------------------------------------------|
| `cm_sram`      | 205     | 1 R, 1 W     | mb_skip/mb_type(SI)/field flags; coded_block_flag 85-104; last_significant 166-226, 338-398, 417-425, 451-459; first bin of coeff_abs_level_minus1; transform_size_8x8_flag |
| `cm_regfile`   | 254     | 2 R, 2 W     | mb_type, sub_mb_type, mvd, ref_idx, qp_delta, intra modes, coded_block_pattern; significant_coeff 105-165, 277-337, 402-416, 436-450; coeff_abs_level_minus1 bins after the first |

The mapping from ctxIdx to {part, address} is `cm_loc()` in `cabac_pkg.sv`.
It follows the table order exactly, so the macroblock-layer CMs have their
places even though this RTL does not decode those SEs.

Each entry is 7 bits: a 6-bit pState and the MPS bit. The two parts hold
179.375 and 222.25 bytes.

The hardest access pattern is the significance map, where a step may be:

- SIG[i], SIG[i+1]: two register reads, two register writes
- SIG[i], LAST[i]: register and SRAM
- LAST[i], SIG[i+1]: SRAM and register

The candidates for both values of the first bin must be loaded at once, for
example SIG[i] first with LAST[i] or SIG[i+1] second. That makes three reads
in one cycle, which is exactly the three read ports.

## Syntax-element prediction and merging (`se_predictor`, `se_parser`, `se_register`)

The significance map is decoded as *one* SE:

- bin 2i is SIG[i] and bin 2i+1 is LAST[i].
- SIG = 0 jumps to bin 2i+2. SIG = 1 goes to LAST[i]. LAST = 0 goes to the
  next SIG. LAST = 1 ends the map.
- The map also ends when the scan reaches position maxNumCoeff - 1, whose
  flag is inferred.

Because of this merging, SE switches inside the map need no prediction. The
second bin of a step is at bin index b+1 or b+2 depending on the first bin.
That is why the step carries two candidates.

The remaining branches of the residual flow are predicted as follows:

| after                        | predicted next SE                                                                 |
|------------------------------|-----------------------------------------------------------------------------------|
| `coded_block_flag`           | significance map if the previous block's flag (from `se_register`) was 1; otherwise `end_of_slice_flag` for the last block of a macroblock, else the next block's `coded_block_flag` |
| significance map             | `coeff_abs_level_minus1`                                                          |
| `coeff_abs_level_minus1`     | `coeff_sign_flag`                                                                 |
| `coeff_sign_flag`            | another level while more than one remains, else the block's end                   |
| `end_of_slice_flag`          | the next macroblock's `mb_skip_flag` (the slice is assumed to go on)              |
| `mb_skip_flag`               | `end_of_slice_flag` if the left (previous) macroblock was skipped, else `mb_qp_delta` |
| `mb_qp_delta`                | `coded_block_flag` of the macroblock's first block                                |

Only the guesses after `coded_block_flag`, `mb_skip_flag` and
`end_of_slice_flag` can be wrong, and the last only at the end of a slice.
For `mb_skip_flag` the previous macroblock is the left neighbour in raster
order, so "skipped again" or "coded again" is the guess. The guess uses the
neighbouring (previous) block's value, which is how the architecture predicts
from neighbouring data. `se_parser` works out the actual next SE. It keeps the
level counters that context selection needs (levels equal to 1, levels
greater than 1, levels left) and takes the next block's descriptor from the
`blk_*` ports.

## Context selection and binarization matching

`context_selection` follows the H.264/AVC ctxIdx rules for the covered SEs:

- **mb_skip_flag:** ctxIdx 11 to 13 (P slices). The ctxIdxInc comes from the
  neighbouring macroblocks and enters through `mb_skip_inc_i`.

- **mb_qp_delta:** bin 0 uses ctxIdx 60 or 61, depending on whether the
  previous macroblock's `mb_qp_delta` was non-zero (`se_parser` keeps that
  bit). Bin 1 uses 62 and all later bins use 63. Every bin is regular, so
  long codes decode two bins per cycle, reusing the updated CM of ctxIdx 63.

- **coded_block_flag:** the ctxIdxInc comes in from outside, because it
  depends on neighbouring blocks.
- **significant_coeff_flag and last_significant_coeff_flag:** the scan
  position, with Min(i, 2) for chroma DC.
- **coeff_abs_level_minus1:**
  - Bin 0 uses the counts of earlier levels equal to 1 and greater than 1.
  - Bins 1 to 13 use 5 + Min(greater-than-1 count, 4), with a limit of 3
    for chroma DC.
  - Bins from 14 on are bypass.
- **coeff_sign_flag:** bypass.
- **end_of_slice_flag:** terminate.

`binarization_matching` holds the state of the SE being decoded:

- the bin index
- the significance bitmap and its count
- the Exp-Golomb phase (unary prefix, k=0 suffix) and the accumulated value
  (`mb_qp_delta` is a plain unary code and uses the same counter)

Its `bm_step2()` function returns where the next step's second bin lies
(+1, +2, or none because the SE ends). The MCS stage uses this to fetch the
candidates.

## Slice start: CM initialisation and bitstream fetch

`slice_start_i` starts two things.

- `cm_init` walks ctxIdx 0 to 459, skipping 276, which has no CM. For each
  one it asks for the (m, n) pair through `init_ctx_o`/`init_m_i`/`init_n_i`,
  computes
  `preCtxState = Clip3(1, 126, ((m * Clip3(0, 51, SliceQP)) >> 4) + n)` and
  writes the CM to its SRAM or register address. This is one CM per cycle,
  459 cycles per slice. The (m, n) table itself is the standard's and is not
  part of this RTL. Connect a ROM to those ports.
- `bitstream_fetcher` is flushed and refilled. It buffers up to 64 bits,
  takes 32-bit words (first bit in the MSB) over valid/ready, and shows the
  next 16 bits. When fewer than 16 bits are buffered, the decoder stalls
  (`fetch_stall_o`).

After initialisation the decoder loads range = 510 and offset = the first 9
bits. It then decodes until `end_of_slice_flag` = 1 (`slice_done_o`).

## Top-level interface (`cabac_decoder`)

| port                                   | dir | meaning                                                        |
|----------------------------------------|-----|----------------------------------------------------------------|
| `slice_start_i`, `slice_qp_i[5:0]`     | in  | start a slice at SliceQP                                       |
| `init_ctx_o[8:0]`, `init_m_i`, `init_n_i` | out/in | (m, n) look-up, combinational, signed 8-bit             |
| `bs_valid_i`, `bs_data_i[31:0]`, `bs_ready_o` | in/out | slice data words                                 |
| `mb_skip_inc_i[1:0]`, `mb_take_o`     | in/out | ctxIdxInc of the next macroblock's `mb_skip_flag`; taken on `mb_take_o` |
| `blk_cat_i[2:0]`, `blk_cbf_inc_i[1:0]`, `blk_last_i`, `blk_take_o` | in/out | next residual block: ctxBlockCat, coded_block_flag ctxIdxInc, last block of the macroblock; taken on `blk_take_o` |
| `se_valid_o`, `se_type_o`, `se_value_o[15:0]` | out | one decoded SE per pulse; for the significance map the value is the bitmap of significant positions; for `mb_qp_delta` it is the unary code number k (delta = (k+1)/2 for odd k, -k/2 for even k) |
| `slice_done_o`, `busy_o`               | out | end of slice; initialising or decoding                         |
| `bins_o[1:0]`, `pred_miss_o`, `fetch_stall_o` | out | per-cycle activity for performance counting              |

The design uses one clock and an active-low asynchronous reset. The memory
arrays have no reset; they are written during initialisation.

## What is not built, and where this RTL departs from the architecture

- **Most macroblock-layer SEs are not decoded:** mb_type,
  sub_mb_type, intra prediction modes, ref_idx, mvd, coded_block_pattern,
  transform_size_8x8_flag and mb_field_decoding_flag. A coded macroblock
  goes straight from `mb_skip_flag` to `mb_qp_delta`, as if its
  coded_block_pattern were non-zero. `mb_skip_flag` uses the P-slice
  contexts only. Also
  missing are 8x8 residual blocks (ctxBlockCat 5) and field coding. Their
  CMs have places in the memories, but their binarizations, context rules
  and predictions are not implemented. The top therefore cannot decode a
  complete H.264/AVC slice. It decodes `mb_skip_flag`, `mb_qp_delta` and
  the residual data described by the `mb_*` and `blk_*` ports.
- **Neighbour manager, memory controller and external memories** are
  outside this RTL. Neighbour-derived information enters as
  `blk_cbf_inc_i`.
- **CM_bin2 source.** The architecture's description says the second bin's
  CM comes from one of the two register ports. The SIG[i], LAST[i] pair,
  however, needs it from the SRAM. Here the second bin may use any port, or
  the first bin's updated CM.
- **End of the significance map.** The map ends on LAST = 1 or when the
  scan reaches maxNumCoeff - 1, as in the standard.
- **LPS shift table.** The LPS renormalisation shift comes from a
  leading-zero count of R_LPS, which gives the same values as a shift table.
- **Memory behaviour.** The memories have a registered read address and are
  write-first. They are plain arrays, not SRAM macros.
- **Throughput.** The end-to-end test makes its random data denser at low
  QP, as a high bit rate does. With random gaps in the bitstream supply it
  decodes 1.60 bins/cycle at QP 12, 1.53 at QP 20 and 1.52 at QP 28. The
  architecture reports about 1.84, 1.70 and 1.53 at those QPs (IPPP average),
  and 1.69 on average, on real 1080p streams. Those streams also contain the
  macroblock-layer SEs that are not built here, and they have longer
  significance maps and larger levels than the test data. No clock frequency has been measured
  for this RTL.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Expected values come
from independent models:

- `tb/cabac_ref_pkg.sv` is a bit-serial reference CABAC *encoder*, following
  the standard's encoding procedure.
- The engine test encodes 4000 random steps and decodes them back. It checks
  every bin, every updated CM and the final bit position, and covers all
  four bin pairings plus the reuse of the first bin's updated CM.
- `tb_cabac_decoder` is the end-to-end test with the top at its defaults. It
  generates three slices of 300 random residual blocks at QP 12, 28 and 20
  (denser blocks and fewer skips at low QP),
  grouped into macroblocks. Each macroblock opens with `mb_skip_flag`
  (with runs of skipped macroblocks) and, if coded, a random `mb_qp_delta`,
  works out each ctxIdx on its own, encodes, and feeds the words with random
  gaps. It then checks, in order:
  - every decoded SE and its value;
  - the cycle-accounting identity above;
  - that each mechanism happened at least once: two-bin steps of each kind,
    SIG+SIG, SIG+LAST and LAST+SIG pairs, CM reuse, prediction hits and
    misses, fetch stalls, Exp-Golomb suffixes, both `mb_qp_delta` bin-0
    contexts, skipped macroblocks and re-initialisation.

  A typical run:
  - 18,592 steps, 12,297 of them two-bin
  - 6,768 prediction hits and 120 misses
  - 934 fetch stalls
  - 76 skipped macroblocks

Simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
    rtl/cabac_pkg.sv tb/cabac_ref_pkg.sv tb/tb_cabac_decoder.sv --top-module tb_cabac_decoder
./obj_dir/Vtb_cabac_decoder
```

Replace `tb_cabac_decoder` with any `tb_<block>` to run one block's test.
Each test finishes in well under a second.

## Files

| file                              | contents                                                        |
|-----------------------------------|-----------------------------------------------------------------|
| `rtl/cabac_pkg.sv`                | types, rangeTabLPS and state transitions, ctxIdx offsets, memory map, binarization-state functions |
| `rtl/tsbad_engine.sv`             | two-bin arithmetic decoding engine                              |
| `rtl/cm_sram.sv`, `rtl/cm_regfile.sv` | hybrid CM memory                                            |
| `rtl/context_selection.sv`        | ctxIdx, bin kind and memory location for three bin indices      |
| `rtl/binarization_matching.sv`    | bin-string state, Match and second-bin positions                |
| `rtl/se_parser.sv`, `rtl/se_predictor.sv`, `rtl/se_register.sv` | parsing flow, next-SE guess, stored SE values |
| `rtl/cm_init.sv`                  | slice-start CM initialisation                                   |
| `rtl/bitstream_fetcher.sv`        | 32-bit word buffer with a 16-bit look-ahead window              |
| `rtl/cabac_decoder.sv`            | top: MCS/TSBAD pipeline                                         |
| `tb/cabac_ref_pkg.sv`, `tb/tb_*.sv` | reference encoder and testbenches                             |
