# JPEG-LS lossless encoder in SystemVerilog

This is a hardware encoder for JPEG-LS, the lossless image compression standard
built on the LOCO-I algorithm. It takes 8-bit grey samples in raster order and
produces the entropy-coded scan. Each sample is predicted from three of its
neighbours, and the prediction is corrected by a bias learned for the local
*context*. The prediction error is then written with a Golomb-Rice code whose
parameter adapts to the same context. In flat areas the encoder switches to
*run mode*: it counts identical samples and codes only the run length, so a
uniform region costs a small fraction of a bit per sample.

The encoder is split into components named after the steps of the algorithm.
A central sequencer chains them with start/done handshakes: it starts one
component, waits for its done, then starts the next. Memory-bound steps take
as many clocks as they need, and no component runs ahead of the others.

## Parameters and limits

| Item | Value | Where |
|---|---|---|
| Sample depth | 8 bits (MAXVAL 255, RANGE 256) | `jls_pkg` |
| Thresholds T1, T2, T3 | 3, 7, 21 | `jls_pkg` |
| RESET (statistics halving) | 64 | `jls_pkg` |
| LIMIT (longest code word) | 32 bits; qbpp = 8 | `jls_pkg` |
| NEAR | 0 (lossless only) | fixed |
| Regular contexts | 365 (index 0 unused, 1..364 used) | `jls_pkg` |
| Run-interruption contexts | 2 (indices 365 and 366) | `jls_pkg` |
| Widest row | `MAX_COLS` = 4096 samples | `jpegls_encoder` parameter |
| Image height | up to 65535 rows (16-bit `n_rows`) | top ports |

Images 4096 samples wide or less fit without changes, so typical test images
up to 3500 x 3500 are covered. For wider images, raise `MAX_COLS`. The only
cost is the two-row image memory, which holds 2 x `MAX_COLS` bytes.

## Per-sample flow

For each row, the sequencer (`jpegls_encoder`) does the following:

1. **Row load** (`fill_image_row`)
   - The two-row image memory (`image_row_buffer`) swaps its banks by toggling
     one bank bit. The row just coded becomes the "previous" row, and nothing
     is copied.
   - `fill_image_row` asserts `read_input` and takes `n_cols` samples from the
     input stream into the current row.
2. **Fetch** (`get_next_sample`)
   - For column `col`, it reads x, Rb, Rc, Rd and Ra through the memory
     arbiter (`enc_mem_cntrl`).
   - Its positions: Ra is west of x, Rb north, Rc north-west and Rd
     north-east.
   - Edge rules:
     - In the first row, Rb, Rc and Rd are 0, and Ra is 0 at column 0.
     - At column 0 of later rows, Ra = Rb, and Rc is the Ra that was used at
       column 0 of the row before (0 for the second row).
     - At the last column, Rd = Rb.
3. **Context** (`find_context`)
   - Computes the gradients D1 = Rd−Rb, D2 = Rb−Rc and D3 = Rc−Ra.
   - Quantises each gradient to −4..4 using the thresholds.
   - Folds the sign so that the first non-zero component is positive.
   - Forms Q = 81·q1 + 9·q2 + q3 with shifts and adds; there is no
     multiplier.
   - If all three gradients are zero, it raises `run_mode` instead.
4. **Regular mode**, completed in one clock once the statistics are read:
   - `predictor` forms the median edge-detecting prediction:
     - min(Ra,Rb) if Rc ≥ max(Ra,Rb);
     - max(Ra,Rb) if Rc ≤ min(Ra,Rb);
     - otherwise Ra+Rb−Rc.
   - The predictor adds or subtracts the context's bias C[Q] and clamps the
     result to 0..255.
   - It then reduces the error x − Px, with its sign folded, modulo 256 into
     −128..127.
   - `encode_reg_error` chooses k, the smallest value for which N·2^k ≥ A,
     using parallel comparisons. It maps the error to a non-negative number
     and codes it with `golomb_coder`.
   - `update_reg_var` updates A, B, C and N. `context_memory` writes them back
     in the same clock as the code word enters the output packer.
5. **Run mode**: see the next section.
6. **Output** (`bit_writer`)
   - Packs code words MSB first into bytes.
   - Pads the last byte with zeros and counts the bytes for `comp_size`.

## Run mode

Run mode is the part most likely to surprise you, because its state is spread
over three components and two coded fields.

- **Entry.** `find_context` finds Ra = Rb = Rc = Rd (all gradients zero) and
  raises `run_mode`.
  - The current sample is the first sample of a run candidate.
  - `find_runcnt` latches RUNval = Ra.
- **Counting.**
  - For each further sample, `get_next_sample` sees its registered run flag
    (`skip_context`). It fetches x and skips the context step.
  - `find_runcnt` compares x with RUNval. On a match it increments RUNcnt and
    asks for the next sample (`more`).
  - A mismatch ends the run (`ended`), and so does the end of the row
    (`eol`).
- **Run length** (`encode_run_length`)
  - The run is coded in segments of 2^J[RUNindex] samples. J comes from the
    standard 32-entry table 0,0,0,0,1,1,1,1,2,2,2,2,3,3,3,3,4,4,5,5,6,6,7,7,
    8,9,10,11,12,13,14,15.
  - Each complete segment is one '1' bit and raises RUNindex (up to 31).
  - If the row ended:
    - any partial segment left costs one more '1';
    - no sample follows.
  - Otherwise:
    - a '0' is written, followed by the leftover count in J[RUNindex] bits;
    - the sample that broke the run is coded as a run interruption.
  - The component writes one code word per segment through the same
    `code_valid/code_ready` handshake the other coders use. A long run
    therefore takes one clock per segment.
- **Run interruption** (`encode_run_interruption`)
  - RItype is 1 when Ra = Rb, and 0 otherwise.
  - The prediction is Ra for type 1 and Rb for type 0. For type 0 the error's
    sign is flipped when Ra > Rb.
  - The interruption contexts are 365 (type 0) and 366 (type 1). Each has its
    own A and N and the extra counter Nn.
  - k is the smallest value with N·2^k ≥ TEMP. TEMP is A, plus N/2 for type 1.
  - A map bit, chosen from k, the error sign and Nn versus N/2, makes the
    mapping adapt to the sign balance. The coded value is
    EMErrval = 2|Errval| − RItype − map.
  - The value is Golomb coded with a limit of LIMIT − J[RUNindex] − 1.
  - After the sample, RUNindex is lowered by one.
- **Exit.** The sequencer pulses `run_exit` and `find_context` clears its run
  flag. The next sample is processed in the normal way.

A run that starts at the last column of a row is one sample long and ends with
`eol`. The column-0 Ra and Rc rules also apply to the sample that interrupts a
run.

## Context statistics

`context_memory` holds A, B, C and N for all 367 contexts, and Nn for the two
interruption contexts.

- **Initialisation.** On `start` it sets every context to A = 4, B = 0, C = 0,
  N = 1 and Nn = 0. This takes one clock per context, 367 clocks in all,
  while `busy` is high.
- **Access.** Reads are combinational, so a context is read, used and written
  back in one step. Writes are synchronous.
- **Regular update** (`update_reg_var`):
  - B += Errval; A += |Errval|.
  - If N = RESET (64), halve A, B and N.
  - N += 1.
  - If B ≤ −N, lower C and add N to B, clamping B so that it stays above −N.
    If B > 0, raise C and subtract N from B, clamping B to at most 0.
  - C stays within −128..127.
- **Interruption update.** It follows the same pattern on A, N and Nn:
  - A += (EMErrval + 1 − RItype) / 2.
  - Nn counts negative errors.
  - When N equals RESET, A, N and Nn are halved before N is incremented.

## Memory arrangement

- **Image memory.** `image_row_buffer` is a single-port RAM with a one-clock
  read. It holds two rows, and the bank bit chooses which half is "current".
- **Arbitration.** `enc_mem_cntrl` arbitrates between the two users, the row
  loader and the sample fetcher:
  - a component keeps its grant as long as its request stays high;
  - fixed priority applies only when both ask at once;
  - an assertion checks that at most one grant is ever given.
- **No write-back.** In lossless mode the reconstructed value of a sample is
  the sample itself, so neither the predictor nor the run counter writes
  reconstructed values back to the image memory. The arbiter therefore has
  two users, not four.
- **Statistics.** All arrays are on-chip. A, B, C, N and Nn together come to
  367 × 39 bits.

## Interfaces and timing

Top module `jpegls_encoder`, one clock `clk`, asynchronous active-low `rst_n`:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `start` | in | 1 | pulse to encode an image; `n_rows`, `n_cols` sampled then |
| `n_rows`, `n_cols` | in | 16 each | image height and width (1..`MAX_COLS` columns) |
| `busy` | out | 1 | high from `start` until `done` |
| `done` | out | 1 | status bit: set once the last byte has been taken, cleared by the next `start` |
| `comp_size` | out | 32 | number of bytes produced; stable after `done` |
| `read_input` | out | 1 | encoder is ready for a sample |
| `in_valid`, `in_pixel` | in | 1, 8 | a sample is taken in each clock where `read_input` and `in_valid` are both high |
| `out_valid`, `out_byte` | out | 1, 8 | compressed byte on offer |
| `out_ready` | in | 1 | the reader takes the byte in a clock where `out_valid` and `out_ready` are both high |

Measured cycle counts, with the output never blocked:

- A regular sample takes about 12 clocks. Most of them go to the fetch: the
  five single-port reads are issued one per clock, and each answer comes a
  clock later. The context, the coding with update, and the step to the next
  column take about one clock each.
- A sample inside a run takes about 11 clocks.
- Each row load takes `n_cols` + 3 clocks.
- Whole images take 12.8 to 13.1 clocks per sample. At 100 MHz, a
  2048 × 2048 image therefore takes about 0.55 s.
- With `out_ready` held high, the output never limits the rate: a code word
  is at most 32 bits, and the packer drains one byte per clock.
- With `out_ready` low, up to 33 bits stay pending in the packer. After that
  it stops accepting code words, and the sequencer waits in the coding step.
  This is how the encoder is paused while a full result memory is emptied.
- `done` rises only after the last byte has been taken.

The output is the bare coded scan. The file header is meant to be assembled by
host software after the encoder finishes. No 0 bit is stuffed after 0xFF
bytes. To get a standard `.jls` file, a wrapper has to add the SOI, SOF55 and
SOS markers and the stuffing.

## Departures and choices

What follows the original design:

- the division into components and their names;
- the start/done chaining;
- the two-row image memory with a toggled bank bit;
- the arbitration rule, where one user holds the memory until it is done;
- the host registers (start, done, width, height, compressed size);
- the read_input pulse toward the input stream;
- the neighbour read order and the edge rules;
- the thresholds, RESET and the run-length table.

Where the description was incomplete or self-contradictory, this design
follows the JPEG-LS standard:

- **Error mapping.** For k = 0 with 2B ≤ −N, a negative error maps to
  −2·(Errval+1). Mapping it to −2·Errval+1 would give errors −1 and +1 the
  same code.
- **Update order.** Statistics are accumulated, then halved when N equals 64,
  and only then is N incremented.
- **Run-length remainder.** It is coded as a '0' followed by the count in J
  bits, and a partial segment at the end of a row is one '1'. RUNindex is
  lowered after each interruption sample.
- **Run interruption.** The details are taken from the standard: RItype, the
  sign flip, the map bit, TEMP, the code limit and the updates of A and Nn.
- **Escape code.** It is LIMIT − qbpp − 1 zeros, a one, then MErrval−1 in
  qbpp bits. MErrval is the mapped error. It applies when the unary part would reach that length.
- **Predictor.** The clamp to 0..255 and the modulo-256 reduction of the
  error.

Choices that belong to this design alone:

- the central sequencer;
- the valid/ready reading of the input stream;
- the valid/ready form of the output pause;
- the absence of a file header;
- `MAX_COLS` = 4096;
- on-chip arrays instead of external SRAM banks;
- the fixed fetch schedule;
- the field widths: A 16, B 8, C 8 and N 7 bits.

The external SRAM, the DMA engine and the PCI board around the encoder are not
part of this RTL. Their place is taken by two streams: `in_valid/in_pixel` and
`out_valid/out_ready/out_byte`. Paging an image through a small memory needs
no extra control: while the next page is loaded, the input stream simply
withholds `in_valid`.

## Verification

Every component has a self-checking testbench in `tb/`, and each ends by
printing `TB_RESULT checks=<n> failures=<m>`. The testbenches compare against
values computed independently in the testbench:

- exhaustive or random sweeps for the combinational blocks (`predictor`,
  `golomb_coder`, `encode_reg_error`, `update_reg_var`,
  `encode_run_interruption`, `find_context`);
- scripted scenarios for the sequential ones.

`tb_jpegls_encoder` runs the top at its default parameters.

- **Reference model.** It encodes seven synthetic images with a JPEG-LS
  reference model written as a SystemVerilog class (`tb/jls_ref_pkg.sv`) and
  compares every output byte and the byte count. The images are noise,
  gradients, flat blocks and mixtures, from 6 × 1 up to 3 × 4096. Image
  generators are in `tb/jls_img_pkg.sv`.
- **Stalls.** The input stream stalls at random. The output reader withholds
  `out_ready` at random on some images, up to 95 % of clocks.
- **Mechanism counts.** The testbench counts these mechanisms inside the
  encoder. Counts for the coding mechanisms are checked against the model.
  Any mechanism that never occurs is a failure:
  - regular samples;
  - run interruptions;
  - runs ended by the end of a row;
  - run segments;
  - escape codes;
  - statistics halving;
  - bias corrections up and down;
  - the mirrored k = 0 mapping;
  - input stalls;
  - output stalls;
  - encoder pauses caused by a blocked output.

`tb_jpegls_workloads` runs the encoder on generated images of the sizes of a
common lossless test set. It compares every byte with the model, and no
internal signals are probed.

- **Whole images:** 512 × 512; 448 rows of 512; 512 rows of 768;
  2048 × 2048; 2048 rows of 2560.
- **Full-width bands:** 16 rows each, 2347 and 3500 samples wide.
- **Throughput:** every image took 12.8 to 13.1 clocks per sample, row loads
  included.
- **Run time:** about two minutes in Verilator.

The reference model is independent of the RTL but was written from the same
reading of the standard. Agreement shows that the two are consistent, not that
the output decodes with a third-party JPEG-LS decoder; that was not tried.

## Simulating

Plain Verilator 5 is enough. List the packages first:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/jls_pkg.sv tb/jls_ref_pkg.sv tb/jls_img_pkg.sv tb/tb_jpegls_encoder.sv \
  --top-module tb_jpegls_encoder -o sim
./obj_dir/sim
```

The same command, with another `tb/tb_<component>.sv` and top module, runs a
component testbench or `tb_jpegls_workloads`. The end-to-end test takes under
a second. To try another image, change the list in `tb_jpegls_encoder` or add a pattern to
`make_image` in `jls_img_pkg`.

## Files

- `rtl/jls_pkg.sv`: constants, shared types, J table.
- `rtl/jpegls_encoder.sv`: top and sequencer.
- `rtl/image_row_buffer.sv`, `rtl/enc_mem_cntrl.sv`: image memory and
  arbiter.
- `rtl/fill_image_row.sv`, `rtl/get_next_sample.sv`: row load and neighbour
  fetch.
- `rtl/find_context.sv`, `rtl/predictor.sv`, `rtl/encode_reg_error.sv`,
  `rtl/update_reg_var.sv`, `rtl/context_memory.sv`: regular mode.
- `rtl/find_runcnt.sv`, `rtl/encode_run_length.sv`,
  `rtl/encode_run_interruption.sv`: run mode.
- `rtl/golomb_coder.sv`, `rtl/bit_writer.sv`: code words and byte packing.
- `tb/`: one testbench per component, the end-to-end testbench, the
  test-set-size testbench, the reference model and the image generators.
