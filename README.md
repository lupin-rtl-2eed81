# Lupin core: INT4 systolic array that keeps activation outliers in INT8 without stalling

Quantizing LLM activations to 4 bits works for almost every value. It fails for
the few large-magnitude outliers. The fix here is in the storage format. Activations are
stored as **pairs of neighbours in one byte**. When one of the two is an outlier,
its normal partner is dropped (pruned). The outlier then takes the whole byte as
an INT8 value.

The hardware side does the same with multipliers. The two PEs (processing
elements) that hold a pair each own a 4-bit multiplier. When the pair holds an
outlier, the pruned partner's multiplier is lent to the outlier. The two
multipliers compute the outlier's high and low nibble products in the same
cycle, so an INT4 × INT8 product costs no extra cycle. The array never stalls
on an outlier.

This repository is a synthesizable SystemVerilog implementation of that
accelerator core. It contains:

- the array of paired MAC units;
- the outlier-index decoder that drives the per-PE High-Precision Enable (HP_EN)
  bits;
- the activation, weight and output buffers;
- the controller.

It follows the published Lupin architecture where that architecture is
specified. It fills in the rest (sizes, byte layout, timing, host ports) with
its own choices, listed under "Own choices" below.

## The pair byte and HP_EN

The byte does not record which format it holds. That is given by the pair's two
HP_EN bits, one per element. The bits come from the block's outlier index.
Bit 0 belongs to element 0, which sits in the left PE.

| HP_EN | pair            | byte[7:4]                     | byte[3:0]                   | values used              |
|-------|-----------------|-------------------------------|-----------------------------|--------------------------|
| 00    | normal, normal  | element 0, INT4               | element 1, INT4             | both                     |
| 01    | outlier, normal | outlier high nibble (signed)  | outlier low nibble          | element 0 = INT8, element 1 = 0 |
| 10    | normal, outlier | outlier high nibble (signed)  | outlier low nibble          | element 1 = INT8, element 0 = 0 |
| 11    | outlier, outlier| element 0's 4 MSBs            | element 1's 4 MSBs          | each = MSBs × 16         |

In an outlier-outlier pair each value is kept as its nearest multiple of 16
that fits in 4 bits. For example, −18.7 becomes −16 and −33 becomes −32. Making
this rounding is the encoder's job, and the encoder is software. The hardware
only multiplies what it receives by 16.

## The paired MAC unit (`lupin_paired_mac`)

One unit is two neighbouring PEs of a row. Each PE has:

- a stationary activation nibble;
- an INT4 weight register, which is a stage of the row's left-to-right weight
  pipeline;
- a multiplier;
- an accumulator register, which adds the PE's product to the partial sum
  coming from the PE above.

The unit has four parts:

- (A) the weight and activation registers;
- (B) multiply, then shift left by 4 where HP_EN asks for it;
- (C) a shared adder for the two shifted products;
- (D) one selector per accumulator, which picks the PE's own product, the shared
  sum or zero.

Outlier-normal, worked through. The pair holds x = 0xB6 = −74 in element 0, and
PE0's weight is w0 = 3.

| step | PE0 (left)                      | PE1 (right)                                |
|------|---------------------------------|--------------------------------------------|
| operands | high nibble 0xB = −5 (signed) | low nibble 0x6 = 6 (unsigned)          |
| weight used | w0 = 3                   | w0 = 3, borrowed (its own w1 is ignored)   |
| product | −15, shifted left 4 = −240   | 18                                         |
| sum (C) | −240 + 18 = −222 = −74 × 3    |                                            |
| accumulator (D) | psum0 + (−222)      | psum1 + 0: the pruned element adds nothing |

If the outlier is element 1, the picture is mirrored. Both multipliers use w1,
and the sum goes to PE1's accumulator. The byte layout stays the same: the high
nibble is still in PE0. Each multiplier takes a 5-bit signed activation operand,
so that the low nibble can be treated as unsigned.

The two PEs of a pair see different weight vectors in any one cycle. PE1's
weight is the one PE0 held a cycle earlier. The borrowing still works. The
borrowed weight is the outlier PE's *current* weight, and the result goes into
the outlier PE's own accumulator, so it lands in the right column at the right
time.

## Array dataflow (`lupin_pe_array`)

The array is input stationary. It has ROWS × COLS PEs, built from
ROWS × COLS/2 paired units:

- PE (r, c) holds activation X[r][c], where r is the reduction index and c the
  output column (for example a token).
- Weights enter each row on the left and move one PE to the right per cycle.
- Partial sums start at zero on top and move one row down per cycle.

Row r must receive weight vector n in cycle t0 + n + r; the weight buffer adds
this skew. Column c then leaves the bottom in cycle t0 + n + ROWS + 1 + c,
holding

    Y[n][c] = Σ_r W[n][r] · X̂[r][c]

Here X̂ is the value the pair format represents, as in the "values used" column
of the table above. The output buffer delays column c by COLS−1−c cycles, which
lines up each result row.

## Outlier index and block loading (`lupin_bsi_decoder`, `lupin_controller`)

The outlier positions of a block are stored apart from the data. They use a
block sparse index: a list of relative distances.

- Elements are numbered row by row, e = r·COLS + c.
- Entry 0 is the element number of the first outlier.
- Entry i is the distance from outlier i−1 to outlier i.
- `idx_count` gives the number of entries.

One entry is wide enough to reach any element of the block, so no escape codes
are needed.

The decoder walks the list and folds one outlier per cycle into the current
row's HP_EN bits. It hands out a row in the same cycle as that row's last
outlier, so a row takes max(1, k) cycles, where k is its number of outliers.

For each row the decoder hands out, the controller reads the same row from the
activation buffer in the same cycle. One cycle later, the row's bytes and its
HP_EN bits are written into the array together. Index decoding therefore
overlaps block loading. A row with several outliers lengthens loading by a few
cycles. It never lengthens computation.

## Running a block (`lupin_top`)

1. Write the ROWS rows of the encoded block (`act_wr_*`), one row per write, COLS/2 bytes
   wide.
2. Write the index list (`idx_wr_*`) and set `idx_count`.
3. Write up to WB_DEPTH weight vectors (`wgt_wr_*`). Each vector holds one INT4
   weight per array row.
4. Pulse `start` with `n_vec` and `acc_mode`. Wait for `done`.
5. Read result row n with `out_rd_addr = n`. The data appears on `out_rd_data`
   one cycle later: COLS signed 32-bit values.

With `acc_mode = 1`, results are added to the stored rows instead of replacing
them. A reduction longer than ROWS is therefore done as consecutive blocks: the
first with `acc_mode = 0`, the rest with `acc_mode = 1`.

Cycle budget of one run. `done` rises at clock edge number

    Σ_rows max(1, outliers in row) + n_vec + ROWS + COLS + 1

counted after the edge that samples `start`. With `n_vec = 0` it is the first
term alone.

The testbenches check this budget exactly. The `n_vec` term is one cycle per
weight vector whatever the outlier mix. That is the stall-free property.
`in_load` and `in_compute` show the phase. Loading and computing do not overlap,
because there is a single activation block buffer.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS` | 16 | array rows = reduction length of one block |
| `COLS` | 16 | array columns (even) = output columns of one block, COLS/2 pairs per row |
| `ACC_W` | 24 | partial-sum width in the array |
| `OUT_W` | 32 | output buffer entry width |
| `WB_DEPTH` | 64 | weight vectors per run, which is also the number of output rows |

The published design does not state its array size or buffer sizes, so every
default above is this design's own choice. Fixed in `lupin_pkg`: INT4 normals
and weights, INT8 outliers, one-byte pairs, shift of 4.

Value ranges:

- |product| ≤ 1024. For example, −128 × −8 for an outlier, or (−8 × −8) << 4 for an
  outlier pair.
- A column of 16 rows stays within ±16384.
- 32-bit outputs hold reductions of up to about 2 million elements.

Size at the defaults, after coarse synthesis: about 3.4 k word-level cells,
11 k flip-flop bits and 40 k memory bits. The output buffer holds most of the
memory bits.

## Own choices, and where the description was silent

- **Which tensor dimension a pair spans.** Here the two elements of a pair sit in
  horizontally neighbouring PEs. They share a reduction index and belong to
  neighbouring output columns. This choice is needed because the weight passes
  from the left PE to the right PE of a pair.
- **Adders between PEs.** The published block diagram draws a small adder
  between horizontally neighbouring PEs without describing it. Here it is read
  as each pair's shared adder (C), which lives inside the paired MAC unit.
- **Byte layout.** The high nibble goes to the left PE. In a pair with one
  outlier, the byte is always the outlier's INT8 value, whichever element the
  outlier is. The published figures show only the case where the outlier is
  element 0.
- **Index format.** The index format is this design's own, and so is the decode
  rate of one outlier per cycle.
- **Loading.** The block is loaded through a row bus with a row select. The
  buffers are organised one array row per entry and use synchronous reads.
- **Output buffer.** The deskew and the accumulate mode belong to this design.
- **Reset.** An asynchronous active-low `rst_n` clears all registers except the
  memories.
- **External memory.** External memory is outside the core. The core only has
  the host write ports and the result read port.
- **Encoder.** The encoder (quantization, outlier choice, packing) is software
  in the published flow. It is not implemented in RTL here. The testbenches
  contain a reference model of it (`tb/lupin_ref_pkg.sv`).

## Verification

Each block has a self-checking testbench. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_lupin_paired_mac` | 4000 random pairs in all four formats, corner INT8 × INT4 products, weight pipeline |
| `tb_lupin_pe_array` | 20 random blocks, every column result at its promised cycle |
| `tb_lupin_bsi_decoder` | 300 blocks from empty to fully dense; HP_EN bits, row order, exact cycle count |
| `tb_lupin_act_buffer`, `tb_lupin_weight_buffer`, `tb_lupin_output_buffer` | read latency, skew, deskew, write timing, accumulate mode |
| `tb_lupin_controller` | row/HP_EN alignment, gap-free issue, done timing, held `acc_mode`, empty run |
| `tb_lupin_top` | full design at its default sizes; layer slices over 4 blocks with accumulation, empty to dense outliers, cycle budget; counts each pair format, multi-outlier rows, accumulation, empty runs |
| `tb_lupin_llm_layer` | 16-token × 64-channel slices with the reduction lengths of the 2048- and 2560-wide models evaluated for Lupin (OPT-1.3B/2.7B, BLOOM-1b7/3B), about 2 % outliers, 128 and 160 accumulated blocks |

The expected values come from the original quantized values through the
encoding's rules: pruned values count as 0, and outlier pairs are rounded to
multiples of 16. They are not derived from the byte the hardware decodes.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/lupin_pkg.sv tb/lupin_ref_pkg.sv tb/tb_lupin_top.sv --top-module tb_lupin_top
    ./obj_dir/Vtb_lupin_top

The other testbenches run the same way. Change the last file and the top
module. Every `rtl/` file also passes Verilator lint and the slang front end of
Yosys.

## Limits

- The core computes one activation block per run. Tiling a full layer is left to
  the host: it picks blocks, streams weights and reads back results.
- Weights are INT4 throughout. Only activations carry outliers.
- A run's index list must describe positions inside the block. Entries beyond
  the last element are ignored.
- The design has no double buffering, so the next block cannot be loaded while
  the current one computes.
