# Minimal-activity mixed-signal vector-matrix multiplier

This design computes vector-matrix products, `Y_m = sum_n W_mn * X_n`. These
are the core of linear transforms on images and video. It has 256 inputs and
128 rows of one-bit cells. Each template `W_m` is 4 bits wide and is stored as
4 rows, one row per bit plane, so the array holds 32 templates.

The multiply-accumulate is done in the charge domain. Each cell holds one
template bit. When the cell's bit and its column's input bit are both 1, the
cell adds one unit of charge to its row line. A row therefore sums its cells
in a single cycle. The inputs are sent as **unary** codes: the 4-bit value
`X_n` becomes 16 one-bit array cycles, and `X_n` of those cycles carry a 1.
Each row has a first-order **delta-sigma ADC** that adds up the row charges
of those 16 cycles. The ADC then converts the remainder a second time at a
finer scale. The result is an 8-bit code per row in 32 ADC cycles. Adding the
4 row codes of a template with binary weights gives `Y_m`.

The second idea is **minimal switching activity**. A unary code gives every
bit the same weight, so the order of the 16 cycles does not change the sum.
Each input therefore sends all its ones together ("sorted"). An input line
then switches at most twice per vector, not about K/2 times. If successive
vectors are sorted in opposite directions (ones first, then ones last), it
switches at most once. The array's dynamic power goes as the number of line
transitions, so with K-bit inputs the array uses about K/2 times less energy.

The array and the ADC's integrator are analog. Here they are behavioural
models that count charge in integer units (see *What is a model*). Everything
else is synthesizable RTL.

## How a product is computed

Template bits are fractions: `W = sum_i 2^(-i-1) w^(i)`, so bit plane `i = 0`
is the most significant. Row `r = 4m + i` holds plane `i` of template `m`.

For one input vector:

1. **Sorted unary frame.** The sorting converter of each column `n` drives
   its column line for 16 cycles. In `X_n` of them the line is 1, and those
   cycles are adjacent.
2. **Row charge.** In each cycle, row `r` collects
   `u = popcount(w_r AND x)` unit charges, where `0 <= u <= 256`. Over the
   frame, the row collects `S_r = sum_n w_r,n * X_n` in all.
3. **Coarse pass.** The ADC integrates `u` every cycle. Each time its
   integrator reaches the full-scale reference (256 units), the comparator
   fires and one reference is taken off. After 16 cycles:
   - the comparator has fired `floor(S_r / 256)` times;
   - the integrator holds the remainder, the *residue*.
4. **Fine pass.** A sample-and-hold keeps the residue and the integrator is
   cleared. The held residue is then integrated for another 16 cycles against
   the same reference. This gives `floor(16 * residue / 256)` more ones, which
   is the residue at a 16-times finer scale.
5. **Decimation.** A counter counts coarse ones into bits 7:4 and fine ones
   into bits 3:0. The result is

       out_code[r] = floor(16 * S_r / 256)          (0 .. 240 for AND cells)

6. **Recombination.** For template `m`, weighting plane `i` by `2^(-i-1)`
   and scaling by 16,

       out_y[m] = sum_i 2^(3-i) * out_code[4m+i]

   This equals `16/256 * sum_n Wint_mn * X_n`, rounded down by less than 15
   (one LSB per plane, weighted: 8 + 4 + 2 + 1). Here `Wint` is the 4-bit template as an
   integer.

A unary frame has 16 slots and at most 15 ones, so the coarse count is at
most 15 and the code fits in 8 bits. In the XOR configuration a cell counts
when `w != x`. A row can then reach `16 * 256` charges, and the counter
saturates at 255 and raises `out_overflow`.

## The sorting converter

Each column has a `sorted_unary_converter`. Its K-bit register is a stage of
the input shift register: during loading, words move along the row of
converters. The same register then counts out the frame:

- **sort down**: count `X` down to zero. The output is "count is not zero",
  giving `X` ones and then zeros.
- **sort up**: `start` complements the register to `2^K - 1 - X`. The first
  slot is always zero. After it, the register counts down and the output is
  "count has reached zero", giving zeros and then `X` ones.

The frame always has `2^K` slots. The last slot of a down frame and the first
slot of an up frame are both zero. A down frame therefore ends at the level
the next up frame starts with, and an up frame ending in ones is followed by
a down frame starting with ones. The converter bank (`unary_converter_bank`)
flips the direction at every frame. It registers the line values on each
step, so the lines hold still while the next vector is loaded and while the
ADCs run the fine pass.

Sorting changes when the ones are sent, not how many. The array result is
therefore identical to that of a plain binary-to-unary converter, in which
bit k of the word is repeated 2^k times.

## Template storage and refresh

Templates are loaded through two serial shift registers, one along the even
columns and one along the odd columns (`template_shift_reg`). Each has 128
stages and drives the bit lines of its columns:

1. Shift 128 times with `tpl_din_even`/`tpl_din_odd`. The k-th bit pair lands
   in columns 2k and 2k+1.
2. Request the row write with `tpl_wr_valid` and `tpl_wr_row`.

The cells are dynamic, so their charge leaks away. `refresh_ctrl` refreshes
one half row every 16 cycles: it senses and restores either the even or the
odd columns of a row, with separate select lines, and alternates between
them. A full sweep of the array takes 4096 cycles. The array model loses a
half row's ones after 8192 cycles without a write or a refresh.

A refresh uses the bit lines for its cycle. During that cycle `tpl_wr_ready`
is low and a pending write waits. Hold `tpl_wr_valid`, the row and the shift
registers until the write is accepted; assertions check this.

## Timing of one product

| phase   | cycles | what happens |
|---------|--------|--------------|
| LOAD    | 32     | 32 beats of 8 words (`in_valid`/`in_ready`) fill the 256 converters |
| START   | 1      | converters set their sort direction; ADCs cleared |
| UNARY   | 16     | one unary slot per cycle onto the lines (seen one cycle later) |
| SETTLE  | 1      | last slot integrated (the ADC coarse pass is these 16 cycles, offset by one) |
| SAMPLE  | 1      | residue held |
| RESIDUE | 16     | fine pass |
| DONE    | 1      | `out_valid` |

That is 68 cycles per product, 36 of them after the last input beat. The
results hold until the next product's START. Refresh runs in every phase.
It only touches the stored bits, which it restores unchanged, so it never
disturbs a computation.

## Top-level interface (`vmm_processor`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears everything, cells included) |
| `tpl_shift`, `tpl_din_even`, `tpl_din_odd` | in | template shift registers |
| `tpl_wr_valid`, `tpl_wr_row[6:0]`, `tpl_wr_ready` | in/in/out | row write request |
| `xor_mode` | in | 1: cells compute `w XOR x` (signed configuration) |
| `refresh_enable` | in | run the refresh sequencer |
| `in_valid`, `in_ready`, `in_words[7:0][3:0]` | in/out/in | input beats; `X_n` is the n-th word sent |
| `out_valid` | out | one-cycle result strobe |
| `out_code[127:0][7:0]` | out | row ADC codes |
| `out_y[31:0][11:0]` | out | template outputs, scaled by 16 |
| `out_overflow` | out | some ADC saturated |
| `frame_dir_up`, `phase` | out | status: sort direction of the last frame, sequencer phase |

Parameters (defaults): `COLS=256`, `ROWS=128`, `WBITS=4` (bit planes per
template), `XBITS=4` (input width; the frame is `2^XBITS` slots and each ADC
sub-range is `XBITS` bits), `LANES=8` (words per input beat),
`REF_PERIOD=16`, `RETENTION=8192`, `ALTERNATE=1` (alternate sort
directions).

## What is a model

Two blocks are behavioural models of analog circuits. They are written as
plain two-state SystemVerilog without delays, so they lint, synthesize and
simulate like the rest. Their numbers are ideal.

- `cid_dram_array`: the cell array. The real cell is a three-transistor
  circuit: a DRAM storage node plus a charge-injection device that moves its
  charge packet when the column input is active, sensed capacitively on the
  row line. The model stores bits and returns per-row counts of unit charges.
  It treats leakage as all-or-nothing after `RETENTION` cycles. Charge
  mismatch, noise and the analog waveforms are not modelled. Neither are the
  sense amplifiers that restore a half row during refresh; only their effect
  is modelled.
- `dsm_modulator`: the integrator, comparator, 1-bit feedback and
  sample-and-hold of a row ADC. It is an exact integer integrator, so the ADC
  codes are exact floors. A real converter adds the errors of its analog
  parts.

The decimation counters, converters, shift registers, refresh sequencer,
controller and recombination are real logic.

## Choices this design makes

These points are not fixed by the architecture. They were chosen here:

- **Array organisation.** 128 rows = 32 templates x 4 bit planes, with one
  ADC per row. A "256 inputs x 128 templates" reading would need 512 rows.
- **Full-scale reference.** The ADC reference is the charge of a full row
  (256 units). This makes the code `floor(16 S / 256)` and keeps it in range
  for AND cells.
- **Sorting counter.** The converter counts down. The up direction uses the
  complement and one empty slot, which gives a 16-slot frame for 4-bit values.
  The counter stops with a synchronous enable, not by gating the clock.
- **Input loading.** Inputs load 8 words per cycle in a load phase before
  each frame, and loading does not overlap the conversion. The whole product
  therefore takes 68 cycles, where the original architecture quotes 32 clock
  cycles per conversion.
- **Recombination on chip.** The bit-plane sum is computed on chip (`bitplane_combiner`),
  with plane 0 as the most significant. The architecture this design follows
  does this step off chip; `out_code` carries everything needed for that.
- **XOR configuration.** It counts differing cells as an unsigned number.
  How that count maps to a signed product (offset, polarity) is left to the
  user.
- **Other settings.** The refresh period, retention time, handshakes,
  saturation and reset values are all this design's own.

## Files

`rtl/`:
- `vmm_pkg.sv`: default sizes and the phase enum.
- `vmm_processor.sv`: the top.
- `vmm_ctrl.sv`: the sequencer.
- `unary_converter_bank.sv`, `sorted_unary_converter.sv`: the input path.
- `cid_dram_array.sv` (model), `template_shift_reg.sv`, `refresh_ctrl.sv`:
  the array and its loading.
- `dsm_adc.sv`, `dsm_modulator.sv` (model), `decimation_counter.sv`: the row
  ADC.
- `bitplane_combiner.sv`: the weighted sum of the bit-plane codes.

`tb/`: one self-checking testbench per block (`tb_<module>.sv`), plus:
- `tb_vmm_processor.sv`: end to end at a reduced size (32 x 16, retention
  300 cycles).
- `tb_vmm_processor_full.sv`: end to end at the default size.
- `tb_sort_energy.sv`: switching-activity study.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, with verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/vmm_pkg.sv tb/tb_vmm_processor.sv --top tb_vmm_processor -Mdir obj
    ./obj/Vtb_vmm_processor

Use the same command for any other testbench, changing the file and top
names. The full-size end-to-end test compiles and runs in under a minute.

What the testbenches establish:

- **Block tests.** Each block is checked against values computed in its
  testbench:
  - every unary frame for every value, in both directions;
  - 300 ADC conversions against `floor(16 S / 256)`;
  - the even/odd column mapping;
  - refresh alternation and retention.
- **`tb_vmm_processor` and `tb_vmm_processor_full`.** These load random
  templates (including an all-ones and an all-zero row) and run 40 products
  in the AND and XOR configurations. They check:
  - every row code and every template output;
  - the bound against the ideal product;
  - the overflow flag;
  - the 36-cycle latency;
  - at most one line transition per vector per input, plus one for the
    starting level.

  They also fail if any of these never happened: refresh, a write stalled by
  refresh, both sort directions, ADC overflow, XOR mode. The template loading
  outlasts the retention time, so the product checks also show that the
  refresh works.
- **`tb_sort_energy`.** This runs 400 random words with independent,
  equiprobable bits at each K = 2..8. It compares line transitions against a
  plain binary-to-unary converter. Measured gains:

  | K | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
  |---|---|---|---|---|---|---|---|
  | gain | 1.10 | 1.51 | 2.02 | 2.50 | 2.98 | 3.38 | 4.16 |

  That is about K/2, with about one transition per word after sorting. A
  converter that always sorts in the same direction makes about two
  transitions per word (2.00 at K = 8).

Not covered:
- results on real image data;
- any analog accuracy (linearity, noise, power), which the models do not
  represent;
- the bench measurement setup in which the input and template shift registers
  share one data input and the analog row line is observed after every
  shift.
