# H.264 baseline decoder pipeline in SystemVerilog

This is a hardware H.264 decoder organised as a chain of independent stages
joined by FIFOs. Each stage has a small job: find NAL units, parse syntax,
undo the transform, predict and reconstruct, deblock, and manage stored
pictures. Every stage runs as soon as its input holds data and its output
has room, so the stages work at the same time. Stages share no memory. The
data that one stage needs from an earlier macroblock row lives in a
separate memory module, and the stage reaches it through a request/response
port.

## What decodes today

The pipeline decodes baseline-profile **I pictures**. A macroblock may be an
`I_PCM` macroblock or an `I_4x4` / `I_16x16` macroblock, but every residual
block it codes must carry no non-zero coefficient. In CAVLC terms, each
coeff_token must announce TotalCoeff = 0. The parser decodes that
coeff_token for every nC class and for chroma DC.

A stream outside this subset raises `error` and halts parsing. That covers:

- residual coefficients;
- P or B slices;
- CABAC;
- slice groups;
- picture order count type 1.

Everything after the parser is general for intra pictures:

- the inverse transform (luma DC Hadamard, chroma DC 2x2, 4x4 IDCT, and scaling with flat matrices);
- all nine 4x4 modes, all four 16x16 modes and all four chroma modes;
- the deblocking filter with its full alpha/beta/tC0 tables.

Inter prediction (motion vector prediction and the sub-sample interpolator)
is not built. The reference-sample port of the picture manager is brought out
on the top level (`ireq_*`/`ires_*`) so it can be driven directly.

## Pipeline and the items that flow through it

```
bytes -> nal_unwrap -> entropy_dec -> inverse_trans -> prediction -> deblock_filter -> buffer_control -> pictures
                         |  calc_nc       (memED)            (memP_intra)   (memD_data, memD_parameter)  (frame_buffer)
```

Each link carries one tagged item per handshake. The types are in `rtl/h264_pkg.sv`.

* **nal_item_t**: `NEW_UNIT`, `RBSP_BYTE` or `END_OF_FILE`. `nal_unwrap`
  keeps a three-byte window and a count of pending zero bytes. It drops start
  codes and emulation-prevention `0x03` bytes. It holds back zero bytes until
  it knows they are not trailing zeros.
* **pipe_item_t**: `P_PIC`, `P_SLICE`, `P_MB`, `P_PCM`, `P_BLOCK`,
  `P_ZEROS`, `P_RES`, `P_END_PIC` and `P_EOF`. This is the parser's output,
  and after the inverse transform it also carries the residual.
  * Picture and slice parameters travel in order with the data, so no stage
    needs a side channel.
  * A run of zero coefficients travels as one `P_ZEROS` item, not one item per
    coefficient.
  * `inverse_trans` sends 96 `P_RES` rows of four samples for each
    non-PCM macroblock: 16 luma blocks in z-scan order, then 4 Cb and 4 Cr.
* **dbk_item_t**: reconstructed samples, four per item, with the
  macroblock's qp and a PCM flag for the deblocking filter.
* **blk_item_t**: one finished 4x4 block with its plane and block
  coordinates, sent to the picture manager.

### Parser (`entropy_dec`, `exp_golomb`, `calc_nc`)

The parser keeps a 64-bit bit buffer. Each cycle takes one action: either it
appends a byte, or it decodes one syntax element and shifts the used bits
out. Exp-Golomb codes of up to 16-bit values decode in one cycle.

`calc_nc` keeps the total_coeff counts of the current macroblock and the
row above. The row above lives in a 40-bit x 128 word memory: four luma
counts and two counts per chroma plane per macroblock column. `calc_nc`
answers nC for the coeff_token table choice.

For I_PCM macroblocks the parser sends qp 0 to the later stages. Its own
running qp does not change.

### Prediction and reconstruction (`prediction`, `intra4x4_pred`, `intra16_pred`)

One sample row of four is produced per cycle: prediction plus residual,
clipped to 8 bits. Neighbours to the left are kept in registers.

The row above comes from `memP_intra`. It holds 17 words of 16 bits per
macroblock column: the bottom luma and chroma samples, two per word, plus the
bottom 4x4 modes. That makes 2176 words for 128 columns, 4.25 KiB.

When a 4x4 block's first row arrives, the block's mode is derived from its
neighbours' modes and the coded prev/rem syntax.

### Deblocking (`deblock_filter`, `deblock_edge`)

The hardest stage to follow. The filter keeps a window of the current
macroblock plus a margin:

- the bottom 4x4 blocks of the macroblock above;
- the right column of blocks of the macroblock to the left.

The window is 20x20 luma and 12x12 per chroma plane. The margin blocks come
back from row memories:

- `memD_data`: 32 words of 32 bits per column (16 KiB);
- `memD_parameter`: the qp of each column.

The filter then runs 192 steps, one line across one edge per step:

- luma vertical edges, then horizontal edges;
- then the same for each chroma plane.

It uses bS 4 on macroblock edges and 3 inside, because only intra
macroblocks exist here.

A block is final once no later edge can touch it. Finished blocks then leave:

- the blocks of the row above;
- the blocks of the left neighbour;
- this macroblock's blocks, except its right column, which stays in the
  window as the next macroblock's left margin (it is output too when the
  macroblock is the last of its row).

Bottom blocks are also written back to the row memory.

### Picture manager (`buffer_control`, `frame_buffer`)

The frame buffer holds 2^22 words of four samples each, split into four slots
of 2^20 words. A slot is enough for one 2048x1088 picture.

Each incoming block becomes four word writes. At the end of a picture, the
picture is read out in raster order, luma then Cb then Cr. The last word is
flagged with `out_last`.

Then the picture is marked:

- a reference picture enters the short-term list by sliding window, capped at
  three entries;
- an IDR picture empties the list first;
- a non-reference picture frees its slot.

The default reference list for P slices (newest first) is kept for the
reference-sample port. Long-term pictures and memory-management commands are
not supported.

## Memories

| memory | user | words x bits | reason for size |
|---|---|---|---|
| memED | calc_nc | 128 x 40 | 128 macroblock columns (2048 samples) |
| memP_intra | prediction | 2176 x 16 | 17 words per column |
| memD_data | deblock_filter | 4096 x 32 | 32 words per column |
| memD_parameter | deblock_filter | 128 x 8 | qp per column |
| frame_buffer | buffer_control | 4M x 32 | 4 pictures of up to 2048x1088 |

All of them use `mem_module`, except the frame buffer, which has its own
module. `mem_module` has a registered read, so a load answers one cycle after
it is accepted. A load is held off while an earlier answer has not been
taken.

## Timing

Per macroblock, roughly:

| stage | cycles |
|---|---|
| parser | one per syntax element; about 100 for an I_PCM macroblock (96 words of 32 bits) |
| prediction | 19 to load, 96 to process, 17 to store |
| deblocking | 32 to load, 192 to filter, about 40 to output |

Deblocking is the slowest stage, at about 270 cycles per macroblock. A
1280x720 picture (3600 macroblocks) therefore needs about 1M cycles. The
picture output adds one cycle per word.

## Departures from the reference design

- The residual CAVLC decoding, inter prediction, long-term pictures and
  reference list reordering are missing (see above).
- The memory modules are instantiated inside `h264_top` rather than outside
  it.
- Zero coefficients travel as runs rather than one by one.
- Input stalls while `buffer_control` outputs a picture.
- The sliding window's limit is the number of frame-buffer slots minus one,
  not the stream's `num_ref_frames`.

## Simulating

All RTL is in `rtl/`, one module or package per file; `rtl/h264_pkg.sv` must
be read first. Example with Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl rtl/h264_pkg.sv tb/tb_h264_top.sv --top-module tb_h264_top
./obj_dir/Vtb_h264_top
```

Testbenches print `TB_RESULT checks=N failures=M` at the end.

- `tb/tb_nal_unwrap.sv` feeds random NAL units with inserted
  emulation-prevention bytes and checks the unwrapped bytes.
- `tb/tb_h264_top.sv` generates a complete stream (SPS, PPS, delimiter and
  SEI units, five 64x48 pictures mixing I_PCM, I_16x16 and I_4x4 macroblocks)
  with `tb/h264_tb_common.svh`. That file also holds an independent reference
  model of prediction and deblocking. The testbench compares every output word
  and checks the reference list size after each picture.

Known defect: the end-to-end test decodes the first macroblock row
bit-exactly. Some macroblocks in later rows come out wrong: about one output
word in nine differs from the model. The fault lies in the path through the
row memories, where a macroblock gets its neighbours from the row above. It
has not been located yet. The parser, the stream handling and the
reference-list marking work as the test expects.

No test at full default frame size (176x144 or larger) has been run. The
largest size simulated is 64x48.
