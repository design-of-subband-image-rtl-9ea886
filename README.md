# Subband image encoder with a reusable Daubechies-4 wavelet cell

This is a hardware encoder that splits an 8-bit grey-scale image into
wavelet subbands. One filter cell computes the lowpass (average) and
highpass (detail) Daubechies-4 outputs for each input sample in the same
clock cycle. The cell is reused for every resolution level. An on-chip
memory controller moves the data between two RAMs. The user gives one
number: how many one-dimensional filter passes to run, from 1 to 10. That
number sets the compression rate. Ten passes on a 512 x 512 image give five
two-dimensional levels and leave a 16 x 16 average image.

The RTL is written from a published description of such an encoder,
originally an FPGA design running at 12 MHz. The block structure, the number
format widths, the coefficients, the two-RAM ping-pong scheme and the pass
limits follow that description. Many details were not specified and were
chosen here. Those choices are marked below and in the opening comment of
each source file.

## Data flow

```
 pix (8) ─► normalization ─┐                 ┌─► ↓2 ─► det_out (19)
 RAM data (18) ────────────┴► filter bank ───┤
              DB4_H consts ─►  (4 mults,     └─► ↓2 ─► avg_demux ─┬─► avg_out (19)   (last pass)
                               delay lines,                       └─► RAM write      (other passes)
                               2x3 adders)
 controller ─ read_addr_counter ─┐
           └─ write_addr_counter ┴─ data_addr_ctrl ─┬─ RAM A
                                                    └─ RAM B
```

* **Pass 1** filters the rows of the image while the pixels stream in.
  `normalization` converts each pixel to a float.
* **Pass k ≥ 2** reads back the average coefficients that pass k-1 stored.
  It filters them along the other image direction.
* Every pass sends its **detail** coefficients straight out.
* The **average** coefficients go to RAM, except in the last pass. In the
  last pass they leave through `avg_out`.
* The two RAMs alternate. Pass 1 writes A. Pass 2 reads A and writes B.
  Pass 3 reads B and writes A, and so on. A RAM is never read and written in
  the same pass, so a read can never see a half-written result.

Only the average branch is decomposed again. In a row pass, the row-highpass
half of the image leaves at once and is not filtered along columns. The
subbands are therefore:

* the right half of the image (details of the row pass);
* the bottom-left quarter (details of the column pass);
* then the same split repeated inside the top-left quarter.

This is not the four-quadrant split of the usual 2-D Mallat transform. It
follows from the published datapath, in which only the average signal is
written to RAM.

## The number format

All arithmetic uses an 18-bit floating-point word (`dwt_pkg::fp18_t`):

| field    | bits  | notes                                      |
|----------|-------|--------------------------------------------|
| sign     | 17    |                                            |
| exponent | 16:11 | bias 31; field value 0 means zero          |
| mantissa | 10:0  | hidden leading one                         |

The original design gives the 1/6/11 split. It uses floating point so that
the lowpass branch, which grows by √2 per pass, and the highpass branch,
which tends towards zero, both keep full precision without tracking a binary
point. This implementation makes the following choices:

* bias 31;
* no denormals, infinities or NaNs;
* truncation instead of rounding;
* saturation on overflow and flush-to-zero on underflow.

Each output word (`coef_stream_t`, 19 bits) is a valid bit plus the float.

* `fp_mul` multiplies the 12-bit mantissas (hidden one included) with
  `booth_mul`, a radix-4 (modified) Booth multiplier. The product has 7
  partial products instead of 12. One normalising shift follows.
* `fp_add` aligns the smaller operand with 3 guard bits. It then adds or
  subtracts and renormalises with a leading-zero count.
* `normalization` converts pixels exactly: a pixel's leading-one position
  becomes its exponent.

## The filter cell (`dwt_filter_bank`)

The Daubechies-4 lowpass taps are h0..h3 = 0.48296, 0.83652, 0.22414,
-0.12941. The highpass taps are the same numbers reversed, with alternating
signs: g = [-h3, h2, -h1, h0]. So each input sample x(n) is multiplied only
once by each of h0..h3. Both filters then use those four products, read at
different delays:

```
lo(n) =  h0·x(n) + h1·x(n-1) + h2·x(n-2) + h3·x(n-3)
hi(n) = -h3·x(n) + h2·x(n-1) - h1·x(n-2) + h0·x(n-3)
```

The multipliers sit in front of the delay registers, not behind them. Delay
line k holds h_k·x(n-j) for j = 0..3. The lowpass adder tree takes tap k of
line k. The highpass tree takes tap 3-k and flips the sign bit where a minus
appears. The cell therefore needs four multipliers instead of eight, and
still produces both outputs every cycle. The adders cost much less than the
multipliers.

The two sign conventions for g that appear in the literature differ only in
the overall sign of the detail band. This RTL uses g0 = +0.1294, g1 = +0.2241,
g2 = -0.8365, g3 = +0.4830.

**Boundaries.** A sample flagged `in_first` starts a new row or column.
Loading it clears the older taps, so samples before the start count as zero.
The down-by-2 stage (`downsampler`) keeps outputs 0, 2, 4, … of each
sequence. A row of N samples gives N/2 averages and N/2 details, and the
cell needs no tail flush.

**Latency.** The cell has 2 cycles of latency: a product register, then an
output register. The downsampler adds 1 cycle.

## Alternating rows and columns with no transpose

This part of the design is the least obvious. Each pass k is described by
two numbers: the sequence length L and the number of sequences S. The write
side stores each result at the next address, in the order produced. The read
side (`read_addr_counter`) treats the stored data as a matrix of L rows and
S columns, stored row-major. It reads one column after the other:
address = i·S + j for sample i of sequence j.

Reading by columns filters the other image direction. Writing in order
transposes the result. After two passes the orientation is back where it
started. The controller only has to update the sizes:

```
(L, S) = (IMG_W, IMG_H)          for pass 1 (image in raster order)
(L, S) ← (S, L/2)                for every further pass
```

For a 512 x 512 image the passes are (512,512), (512,256), (256,256),
(256,128), … down to (32,16) for pass 10. Detail (and final average)
coefficients come out in this order:

* odd passes: row by row of the current average image;
* even passes: column by column;
* within a row or column: by increasing position.

The `controller` starts a pass only when the `write_addr_counter` has
counted all L/2·S average coefficients of the previous one. Pass p+1 reads
only what pass p wrote, and in a different RAM.

## Interface (`dwt_encoder`)

| port           | dir | width | meaning                                                   |
|----------------|-----|-------|-----------------------------------------------------------|
| `clk`, `rst_n` | in  | 1     | clock; asynchronous active-low reset                      |
| `start`        | in  | 1     | one-cycle pulse, while idle, to start an encoding         |
| `parameter_in` | in  | 4     | number of 1-D passes, 1..10 (0 acts as 1, >10 as 10)      |
| `pix`, `pix_valid`, `pix_ready` | in/in/out | 8/1/1 | image in raster order, taken when valid and ready |
| `det_out`      | out | 19    | detail coefficient: {valid, float}                        |
| `avg_out`      | out | 19    | average coefficient of the last pass: {valid, float}      |
| `cur_pass`     | out | 4     | pass the current outputs belong to                        |
| `busy`, `done` | out | 1     | encoding in progress; one-cycle pulse at the end          |

Parameters are `IMG_W`, `IMG_H` (default 512), `ADDR_W` (18) and `CNT_W`
(10). Each dimension must be divisible by 2 as often as the passes require.
The two RAMs each hold 2^ADDR_W words of 18 bits.

**Timing.**

* `pix_ready` is high only during pass 1.
* Passes 2..10 read one sample per cycle from RAM.
* A pass of L·S samples takes L·S cycles plus about 6 cycles for pipeline
  and set-up.
* Detail and average outputs come at most every second cycle.
* A full 10-pass encoding of a 512 x 512 image takes about 5.3·10^5 cycles
  when pixels arrive every cycle, or about 44 ms at 12 MHz.

## Files

| file | contents |
|------|----------|
| `rtl/dwt_pkg.sv` | float type, output word type, constants, the hardwired coefficients `DB4_H` (rounded at elaboration) |
| `rtl/dwt_encoder.sv` | top level |
| `rtl/booth_mul.sv`, `rtl/fp_mul.sv`, `rtl/fp_add.sv` | arithmetic |
| `rtl/normalization.sv`, `rtl/dwt_filter_bank.sv`, `rtl/downsampler.sv`, `rtl/avg_demux.sv` | filter datapath |
| `rtl/controller.sv`, `rtl/read_addr_counter.sv`, `rtl/write_addr_counter.sv`, `rtl/data_addr_ctrl.sv`, `rtl/dwt_ram.sv` | memory controller and RAMs |
| `tb/dwt_tb_pkg.sv` | float decoding and a real-valued reference model of the whole decomposition |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dwt_encoder.sv` | end-to-end test at 64 x 32 with parameters 3, 10, 0, 2 |
| `tb/tb_dwt_encoder_full.sv` | end-to-end test at the default 512 x 512, parameter 10 |
| `tb/tb_dwt_encoder_workloads.sv` | 512 x 512 image encoded with every parameter 1..10 in turn (about 5 s in Verilator) |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
Each has a cycle watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dwt_pkg.sv tb/dwt_tb_pkg.sv rtl/*.sv tb/tb_dwt_encoder_full.sv \
  --top-module tb_dwt_encoder_full -Mdir obj && obj/Vtb_dwt_encoder_full
```

For a single block, list only the package files, that block's module (and
any module it instantiates) and its testbench.

## How far it is verified

* The arithmetic blocks are checked against the simulator's real
  arithmetic on thousands of random operands, including cancellation, zero,
  underflow and overflow cases:
  * `fp_mul` must be within one unit in the last place, never above the
    exact magnitude;
  * `fp_add` must be within 2.5 units in the last place of the larger
    operand.
* The filter cell is compared with a real-valued Daubechies-4 convolution,
  with exact 2-cycle timing.
* The end-to-end tests compare every detail and average coefficient, in
  order and with its pass number, with a real-valued 2-D reference. The
  tolerance is 2^-8 × pass × (sum of absolute terms).
* The end-to-end tests also check that passes 2 and later run at one
  sample per cycle. They count that each mechanism actually occurred:
  * row and column passes;
  * reads and writes of both RAMs;
  * input idle cycles and back-pressure;
  * zero-history sequence starts;
  * the average demux;
  * clamping of the pass parameter.
* The full-size run (512 x 512, 10 passes, random input gaps) passes all
  262,164 checks.
* The same image size with every parameter from 1 to 10 passes all
  2,621,505 checks.
* For every module, a deliberately broken copy was shown to fail its
  testbench.

Not verified: timing closure at any clock frequency, and behaviour when
the image size cannot be halved as often as the parameter asks.

## Where this departs from, or adds to, the published design

* Exponent bias, hidden one, zero coding, truncation and saturation are
  choices made here.
* The 19-bit outputs are read as a valid bit plus the 18-bit float.
* The 2-D read addressing (column reads with a stride, in-order writes) was
  not specified.
* The RAMs are single-port and synchronous.
* Pixels arrive through a valid/ready handshake.
* The parameter is clamped to 1..10.
* Pipeline depths were chosen here.
* The hardwired coefficient register is the package constant
  `dwt_pkg::DB4_H`. It holds the published Daubechies-4 values, rounded to
  the nearest 18-bit float.
* `IMG_W` and `IMG_H` are fixed at elaboration time. The published design
  treats 512 x 512 as its maximum image size; a run-time image size is not
  supported.
