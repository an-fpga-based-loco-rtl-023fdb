# LOCO-ANS image encoder in SystemVerilog

LOCO-ANS is a lossless and near-lossless image codec. It keeps the context
modelling of JPEG-LS (LOCO-I) and replaces the Golomb coding with an adaptive
coder built on tabled asymmetric numeral systems (tANS). This repository holds
a synthesizable two-lane encoder for 8-bit grey images. Each lane takes one
image (or one vertical tile of a larger image) as a raster pixel stream. It
produces the uncoded first pixel and a byte stream made of independently
decodable blocks of 2048 symbols.

The codec configuration is the balanced "LOCO-ANS6" point:

- 6-bit tANS state;
- at most NI = 7 coder iterations per error magnitude;
- blocks of BS = 2048 symbols;
- largest z-table symbol C = 8;
- 15 tables for the magnitude distribution and 32 for the sign.

NEAR (the largest allowed per-pixel error) is chosen per image: 0 gives
lossless coding.

```
            clk0 (pixel clock)                      |        clk1 (coder clock, ~2x)
 px[0] -> pixel_decorrelator -> st_quantizer -> async_fifo ->+
                                                    |         tsg_coder -> byte[0]
 px[1] -> pixel_decorrelator -> st_quantizer -> async_fifo ->+  (2 lanes,  -> byte[1]
                                                    |           shared tANS tables)
```

The decorrelator is a sequential loop: every pixel depends on the
reconstruction of the one before it. It is the slow part and runs on `clk0`
at one pixel per two cycles. The coder handles several subsymbols per pixel
but at one subsymbol per cycle, so it runs on a faster `clk1`. Each lane
crosses between the clocks through a small dual-clock FIFO.

## The pixel loop

`pixel_decorrelator` follows JPEG-LS regular mode without run mode.

- **Neighbours.** The neighbours a (left), b (above), c (above-left) and
  d (above-right) are reconstructed pixels. b, c and d come from a one-row
  buffer.
- **Context.** The three local gradients d-b, b-c and c-a are quantized to
  -4..4 using the NEAR-dependent JPEG-LS thresholds. They are combined into
  Q1·81 + Q2·9 + Q3. If the first non-zero term is negative, the triple is
  negated and the sign is remembered. This leaves 365 contexts.
- **Prediction.** The median edge detector (MED) predictor is shifted by the
  context's bias C and clamped to 0..255. The error is multiplied by the
  remembered sign.
- **Per-context state.** Each context holds:
  - C, the bias;
  - B, the accumulated error used by the bias update;
  - t, the number of pixels seen, halved together with B and St when it
    reaches 64;
  - St, the sum of the coded magnitudes z.

Each coded pixel leaves as one symbol, `dec_sym_t`:

- y, the sign of the quantized error;
- z = |ε_q| − y, its magnitude;
- p_q, the context's quantized probability of y = 1, equal to
  min(31, ⌊32·(−B)/t⌋);
- t and St, from which the coder's magnitude table is chosen.

### Two phases per pixel, with forwarding

The loop has an initiation interval (II) of 2. Two registered memory reads
are chained through each pixel. The context memory read feeds the prediction,
and the prediction error then addresses the quantization tables. The
quantized error of pixel *i* is needed before pixel *i+1*'s context can be
completed, because gradient g3 = c − a uses the reconstructed left neighbour.
The loop is therefore written as two explicit phases:

- **Phase A** accepts pixel *i*. It finishes pixel *i−1*: reconstruction,
  symbol output and the write-back of the context update. It also reads the
  context memory for pixel *i*.
- **Phase B** corrects the prediction, forms the error and addresses the three
  tables and the row buffer.

The context of pixel *i* may be the one just updated for pixel *i−1*. This is
the common case in smooth areas. The updated record is then forwarded around
the memory (`fwd`), so the loop never stalls for a read-after-write.

### Quantization by table, reconstruction from the exact error

Near-lossless coding needs a uniform quantizer ⌊(NEAR+|ε|)/(2·NEAR+1)⌋. It
also needs a reduction modulo RANGE and the re-scaled error ε_q·(2·NEAR+1)
for the bias update. None of these divisions or multiplications are in the
loop. The error ε lies in −255..255, so it addresses three 512-entry tables:

| table | content | used for |
|---|---|---|
| EQ   | quantized error after modulo reduction (ε_q) | y, z and St |
| ERE  | EQ · (2·NEAR+1) | bias update B += ERE |
| QERR | quantization error of the exact error, q·(2·NEAR+1) − ε | reconstruction |

The reconstructed pixel must match the decoder's. Usually it is computed from
the quantized error and the prediction. This design instead reads QERR with
the exact error before the sign correction and adds the result to the
original pixel: x̂ = clamp(x + QERR[ε]). This needs one table read and one
adder, which shortens the loop's critical path. The reference model in
`tb/loco_ref_pkg.sv` reconstructs from the quantized error in the textbook
way. The two agree on every pixel of every test image.

The tables are RAMs, refilled at `start` for the requested NEAR:

1. A 9-step shift-subtract divider computes RANGE = ⌈(255+2·NEAR)/(2·NEAR+1)⌉ + 1.
2. The error range is swept 0, 1, …, 255 and then 0, −1, …, −255. A running
   quotient and remainder track ⌊(NEAR+|ε|)/(2·NEAR+1)⌋ with one increment
   and one compare per step.
3. The 365 contexts are reset during the same sweep. C, B = 0, t = 1, and
   St = max(2, ⌊(RANGE+32)/64⌋).

Start-up takes 522 cycles from `start` to the first pixel read. The first
pixel is then passed out uncoded on `first_px`.

### Borders

The image borders follow JPEG-LS:

- On the first row, b = c = d = 0.
- On the first column, a = b, and c is the first pixel of the row above the
  previous row.
- On the last column, d = b.

The width must be at least 3.

### The lossless-only variant

With `LOSSLESS_ONLY = 1` each lane uses `pixel_decorrelator_ls` instead. It
fixes NEAR = 0 and emits exactly the same symbols as the general unit does at
NEAR = 0, but at one pixel per cycle.

Lossless coding removes the dependency that forces II = 2. The reconstructed
pixel is the pixel itself, so a pixel's neighbourhood and context are known
the moment it arrives. The tables disappear too:

- The modulo-256 reduction is the low 8 bits of the error read as a signed
  number.
- The re-scaled error is the error itself.

The pipeline has four stages:

| stage | work |
|---|---|
| accept | gradients, context, MED prediction, context read |
| s1 | corrected prediction, error, y/z, context update with forwarding |
| s2 | p_q division |
| out | output register |

Start-up is only the 365-cycle context reset. It measures 366 cycles to the
first pixel read.

## From context statistics to table numbers

`st_quantizer` turns (St, t) into θ_q, the index of one of 15 geometric
distributions. θ_q is the largest i in 1..14 with St > t·2^(i−1), or 0 if
there is none. All 14 comparisons run in parallel in a 2-stage pipeline.
Placing it before the clock crossing narrows the FIFO to 19 bits per symbol:
last, y, z, θ_q and p_q.

## The coder: why everything is reversed twice

A tANS encoder is last-in, first-out: the decoder gets symbols in the reverse
of the order they were coded. The decoder must also replay the context
adaptation in pixel order. The coder therefore works on blocks:

1. **`input_buffer`** collects BS = 2048 symbols in one bank of a ping-pong
   memory and reads them out backwards while the other bank fills. The last
   block of an image may be shorter. Flags mark the block's end (`blk_end`)
   and the image's last block (`img_end`).
2. **`subsymbol_generator`** serializes each symbol into tANS subsymbols:
   - the sign y, coded with p table p_q;
   - then z, split for the θ_q table with C = C(θ_q) ∈ {1, 2, 4, 8}: first
     z mod C, then ⌊z/C⌋ copies of C.

   If that would take more than NI subsymbols, it emits NI+1 copies of C
   instead. This sequence cannot occur otherwise and acts as an escape. It is
   followed by z itself as an 8-bit bypass code. A metadata register and a
   small state machine give one subsymbol per cycle.
3. **`ans_coder`** keeps the state x ∈ [64, 128), stored as x − 64 and
   starting at 64 for every block.
   - **y or z subsymbol:** it reads the entry {nbits, next} for (table,
     symbol, state). It emits the low `nbits` bits of the state and moves to
     `next`.
   - **Bypass:** emitted as is, leaving the state unchanged.
   - **Block end:** after the block's last subsymbol, the final state goes out
     as a 6-bit code.

   The next state goes straight from the table output to the next table
   address, which gives one subsymbol per cycle. This loop is the coder's
   critical path.
4. **`bit_packer`** appends codes LSB-first into bytes. It zero-pads the
   block's last byte and may emit two bytes in the block-end cycle.
5. **`output_stack`** stores each block's bytes in one bank of a ping-pong
   memory and reads them out backwards. This is the second reversal.

A decoder reads a block from its first byte on the wire, which is the last
byte written. It takes bits from the most recently written end of the block's
bit string:

1. the 6-bit final state;
2. the symbols of the block in the original pixel order, each as y, then z's
   subsymbols, or the 8-bit z after an escape.

Consecutive blocks of one image follow each other in pixel order. `blk_end`
marks the last byte of each block on the output port, and `img_end` the last
byte of the image.

The two lanes share one set of tANS tables (`tans_rom`). The tables are
dual-port memories and lane *k* uses port *k*, so neither lane waits for the
other.

### Table contents

The table contents are an input of this design. They are written through the
configuration ports on `clk1` before coding:

- **`cfg_tans_we`** writes the entry {nbits[2:0], next[5:0]} for
  (`cfg_is_y`, `cfg_tbl`, `cfg_sym`, `cfg_state`). There are 15 × 16 × 64
  z entries and 32 × 2 × 64 y entries.
- **`cfg_c_we`** writes log2 C for one θ table.

For a table of symbol frequencies f_s summing to 64, the entry for symbol s in
state x ∈ [64, 128) is:

- nbits = the smallest n with ⌊x/2^n⌋ < 2·f_s;
- next = the slot of the (⌊x/2^nbits⌋ − f_s)-th occurrence of s in the spread
  table, where the spread table places the 64 slots among the symbols.

The testbenches build such tables from simple geometric and Bernoulli
frequency sets (`build_tables()` in `tb/loco_ref_pkg.sv`). A real deployment
loads the tables of its codec.

## Timing

| quantity | value |
|---|---|
| decorrelator start-up | 522 `clk0` cycles (table and context fill), then the first pixel |
| decorrelator loop | II = 2: one pixel per 2 `clk0` cycles when nothing stalls |
| lossless-only variant | 366 cycles start-up, then one pixel per `clk0` cycle; symbol 3 cycles after its pixel |
| decorrelator latency | about 4 cycles from pixel in to symbol out |
| St quantizer | 2 cycles, one symbol per cycle |
| coder throughput | one subsymbol per `clk1` cycle, plus 2 cycles per block for the final state |
| coder latency per block | the whole block must enter before it is coded, and the whole coded block before its bytes leave: about (1 + subsymbols per z)·BS + bytes per block cycles |

Photographic images average about 2.3 subsymbols per pixel, which is why
`clk1` should be about twice `clk0`.

Worst case per symbol is y (6 bits), NI+1 = 8 z codes of 6 bits and 8 bypass
bits, or 62 bits. A 2048-symbol block is then at most 15 873 bytes, which
fits the 16 384-byte output bank. If a bank ever fills anyway, it is closed
as a block of its own.

Coarse synthesis with yosys (two lanes, default parameters) gives:

- about 2 300 word-level cells;
- 1 668 flip-flop bits;
- 1.05 Mbit of memory.

Most of the memory is the two 2×16 KiB output stacks, the two 2×2048-symbol
input buffers, the tANS tables and the two 8K row buffers.

## Where this design departs from the original LOCO-ANS hardware

- **Hand-written loop.** The original encoder was generated by high-level
  synthesis with a five-stage pixel loop. Here the loop is hand-scheduled in
  two phases with explicit context forwarding. II = 2 is the same.
- **Four-stage lossless variant.** The lossless-only decorrelator is a
  four-stage pipeline designed here. Only its purpose, II = 1 and its
  start-up time come from the original.
- **Loadable tables.** The tANS tables and C values are loaded at run time
  rather than fixed in ROM.
- **Own choices where the original gives no detail:**
  - the p_q estimator;
  - the start value of St;
  - the reset threshold 64;
  - the border rules;
  - the start state of each block;
  - the 8-bit bypass width;
  - LSB-first packing;
  - y coded before z.
- **No header writer and no DMA.** The byte streams, block/image flags and
  first pixels are ports, and framing is left to the surrounding system.
- **Sizes of our own.** The clock-crossing FIFO depth (16) and the output
  stack size (16 384 bytes per bank) were chosen here.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares the block
against an independent model in `tb/loco_ref_pkg.sv`, checks handshakes under
random stalls and ends by printing `TB_RESULT checks=N failures=M`. The model
contains:

- a decorrelator written from the JPEG-LS equations, with divisions and
  textbook reconstruction;
- the θ quantizer;
- subsymbol splitting;
- tANS coding;
- packing and both reversals.

| testbench | what it covers |
|---|---|
| `tb_pixel_decorrelator` | smooth and noisy images, NEAR 0–3, widths down to 3, stalls on both sides, start-up time and II = 2 |
| `tb_pixel_decorrelator_ls` | lossless-only unit against the model at NEAR 0, stalls, start-up time, II = 1, forwarding |
| `tb_st_quantizer` | random and boundary (St, t) pairs |
| `tb_async_fifo` | unrelated clocks, full/empty back-pressure, order |
| `tb_input_buffer` | block reversal, short last blocks, flags |
| `tb_subsymbol_generator` | all C values, escapes, flags |
| `tb_tans_rom` | both ports against a model memory |
| `tb_ans_coder` | table-driven coding, bypass, final states |
| `tb_bit_packer` | packing, one- and two-byte block ends |
| `tb_output_stack` | byte reversal, full-bank blocks |
| `tb_tsg_coder` | both lanes, many blocks and escapes, byte-exact |
| `tb_loco_ans_encoder` | the full encoder at default parameters, end to end |
| `tb_loco_ans_encoder_ls` | the same end-to-end test for the lossless-only build (`LOSSLESS_ONLY = 1`) |
| `tb_workloads` | default parameters on evaluation shapes: an 8192-wide image, a 2268-wide strip, and the 64×32 noise image whose coder latency is checked |

`tb_loco_ans_encoder` runs both lanes at the same time on separate 12 ns and
5.5 ns clocks:

- lane 0 codes a 64×40 smooth image losslessly, then a 48×20 image at NEAR 2;
- lane 1 codes a 40×60 noise image at NEAR 1.

Each output byte and flag is compared with the model. The test also counts
that each mechanism occurs at least once:

- context forwarding;
- escapes;
- multi-block images;
- FIFO back-pressure;
- output stalls;
- two-byte block flushes;
- a NEAR change.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_loco_ans_encoder \
    -y rtl -y tb +libext+.sv rtl/loco_ans_pkg.sv tb/loco_ref_pkg.sv tb/tb_loco_ans_encoder.sv
./obj_dir/Vtb_loco_ans_encoder
```

Substitute any other `tb_*` name. The end-to-end test runs in about
10 seconds.

`tb_workloads` measures the coder latency of the single-block 64×32 noise
image. The latency runs from the last symbol entering the coder to the last
byte leaving it. It came out at 27 066 `clk1` cycles, and the number of
subsymbols plus bytes is 27 054. This confirms the (1 + subsymbols per z)·BS
+ bytes latency model.

The test tables code noise poorly: 34 bpp, mostly escapes. This sends 8 635
bytes through one output bank, which still fits. With tables tuned for the
codec the same image costs about 10 bpp. The largest images simulated are
8192×2 and 2268×3. A full 2268×1512 photograph uses the same logic but is
too long for a routine simulation.

## Files

- **`rtl/loco_ans_pkg.sv`**: constants and the symbol, subsymbol, code and
  byte records.
- **Pixel domain:** `rtl/pixel_decorrelator.sv`, `rtl/pixel_decorrelator_ls.sv` (the
  lossless-only variant) and `rtl/st_quantizer.sv`.
- **Clock crossing:** `rtl/async_fifo.sv`.
- **Coder:** `rtl/tsg_coder.sv`, made of `input_buffer`,
  `subsymbol_generator`, `ans_coder`, `bit_packer`, `output_stack` and the
  shared `tans_rom`.
- **`rtl/loco_ans_encoder.sv`**: the top level.
- **`tb/`**: the reference model package and one testbench per module.
