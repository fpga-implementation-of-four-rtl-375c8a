# Four-channel on-line Infomax ICA for EEG

This design separates four mixed EEG channels into four independent components on an FPGA while the
signals are still arriving. It is based on the thesis *FPGA Implementation of Four-Channel ICA for
On-line EEG Signal Separation*.

The samples arrive over a serial link at 64 Hz. The core keeps the last 512 four-channel samples,
which is 8 s of signal. Every time 128 new samples (2 s) have arrived, it does three things:

1. It trains the 4x4 unmixing matrix **W** on the whole 512-sample window with the Infomax
   natural-gradient rule.
2. It repeats full passes over the window until the weights stop moving, or until 128 passes.
3. It multiplies the newest 128 samples by the trained **W** and sends the separated signals back
   over the serial link.

Consecutive windows overlap by 384 samples, and **W** carries over from one window to the next. So
each run starts close to the answer and the separation follows slow changes in the mixing.

Per window, the learning rule is the batch form of the natural gradient:

```
u = W (x - mean) + b            y = 1 / (1 + e^-u)          phi = 1 - 2y
W <- W + l (I + (1/T) sum_t phi u^T) W        b <- b + l (1/T) sum_t phi
```

Here T = 512, and the learning rate l = 2^-8 / (pass + 1) restarts for every window. All of it is
done in fixed point by a single computing unit. One pass costs exactly 8192 clock cycles: 16 cycles
per sample times 512 samples.

## Block structure

```
 rx --> uart_rx --> rx_header_ctrl --> async_mem_ctrl --> in_memory (32 x 512)
        (baud clock domain)            (crossing, counter, running means)
                                              |  DO_ICA
                                              v
        ica_system_ctrl --+--> gradient_update (sigmoid table, MAC, update)
        branch_ctrl       |         |  new weights (PR2)
        flush_reg x2      |         v
                          +--> converge_decision --> weight_buffer (16 x 16 bit)
                                              |  ICA_DONE
                                              v
        final_result (Y = W (X - mean), 4 outputs per cycle) --> result_encoder
          --> async_fifo (32 x 128) --> tx_header_ctrl --> uart_tx --> tx
                                         (baud clock domain)
```

There are two clocks:

- **`sys_clk`** drives the memory, the training loop and the result multiplier.
- **`baud_clk`** drives both serial sides. It runs at 8 times the bit rate, which is
  8 x 115200 Hz.

Samples cross into `sys_clk` through a toggle-flag synchroniser, and results come back through a
Gray-code FIFO. `ica_top` instantiates everything and brings out monitor signals:

- the controller state and pass number
- the convergence decision and the flush
- sample stall and loss, and receive frame errors
- memory power-save and FIFO hold

## Number formats

All formats are defined in `ica_pkg`.

| quantity | bits | format | notes |
|---|---|---|---|
| sample | 8 | unsigned 0..254 | four per 32-bit memory word; FF is kept for the header |
| centred data x - mean | 11 | signed, read as Q.7 | so 128 counts = 1.0 |
| weight W, bias b | 16 | Q2.14 | saturating; reset W = I, b = 0 |
| u | 23 | 9.14 signed | `(W xc) >>> 7 + b` |
| y = g(u) | 11 | Q1.10 | from the sigmoid table |
| phi = 1 - 2y | 12 | signed, 1024 - 2y | |
| gradient sums S = sum phi u^T | 44 | | one per weight, plus 4 for the bias |
| learning rate | 16 | Q0.20 | 4096 / (pass + 1) |
| output y = W(x - mean) | 29 | 14 fraction bits | encoded to 8 bits for sending |

Every right shift is arithmetic, so it rounds toward minus infinity. The testbench reference model
(`tb/ica_ref_pkg.sv`) uses the same formats and matches the RTL bit for bit.

## The training pass (`gradient_update`, `ica_system_ctrl`)

This is the heart of the design.

**Sample slots.** The controller walks the 512-sample window in address order, one 16-cycle slot
per sample, using a 4-bit cycle counter and a 9-bit block counter. Inside a slot:

| slot cycle | what happens |
|---|---|
| 0 | read of sample `block` from memory port A |
| 1 | the word is loaded into pipeline register PR1 |
| 2 | `sample_start`: the computing unit begins |

**The computing unit, per sample.**

1. It subtracts the channel means.
2. It forms the four u_r, one row per cycle, with four multipliers. The bias is added here.
3. It looks up y_r in the sigmoid table and forms phi_r = 1024 - 2 y_r.
4. It adds phi_i u_j into the 16 accumulators and phi_i into the 4 bias accumulators.

All of this fits well inside the 16-cycle slot. The pass therefore ends after exactly
16 x 512 = 8192 cycles, when both counters are all ones.

**The update, in the CONVERGE state.** It produces one new weight per cycle, 16 in all, in row-major
order. For entry (i, j):

```
M_ik  = delta_ik * 2^14 + S_ik >>> (10 + 9)          (I + S/T, Q.14)
A_ik  = (M_ik * lrate) >>> 20                         (l (I + S/T))
W'_ij = sat16( W_ij + (sum_k A_ik W_kj) >>> 14 )
```

- The biases are updated in the same phase: `b += (sum phi * lrate) >>> 25`.
- Every new weight leaves together with its old value, through pipeline register PR2, to the
  convergence check.
- The whole new matrix is committed to `weight_buffer` when the decision arrives.
- The update takes 17 cycles from `update_start` to `update_done`.

**The sigmoid table (`nonlinear_lut`).** It has 512 entries over |u| < 8, with a step of 1/64.
Entry k holds round(1024 / (1 + e^-(k + 0.5)/64)). The table is computed at elaboration by a
constant function, so there is no table file. Negative inputs use the symmetry g(-u) = 1 - g(u). For
|u| >= 8 the output saturates to 1024 (or to 0).

## Convergence, branch prediction and the flush

After each pass, `converge_decision` sums |W'_ij - W_ij| over the 16 entries as they stream out of
the update. One cycle after the 16th entry it reports whether the sum is at most `THRESH` = 64,
which is 64 / 2^14 summed over the matrix.

Leaving the loop is treated as a branch:

- **Not taken** (another pass) is by far the common case, so it is the prediction. On the first
  CONVERGE cycle the controller already issues the read of sample 0 for the next pass, into PR1.
  The next pass then skips that read.
- **Taken** happens when the weights converged or the pass counter is all ones (128 passes).
  `branch_ctrl` then pulses `flush`, which clears PR1 (the prefetched sample) and PR2 (the weight
  stream). The predictor stays in its taken state until the controller is back in IDLE.

The controller's four states:

| state | action | next |
|---|---|---|
| IDLE | samples are being stored | TRAINING on a DO_ICA request |
| TRAINING | one 8192-cycle pass | CONVERGE |
| CONVERGE | weight update and decision; new weights committed | DONE if taken, else TRAINING with pass + 1 |
| DONE | result multiplier runs; samples may be stored | IDLE on the next DO_ICA, once the multiplier has finished |

The learning rate 2^-8 / (pass + 1) has a consequence for the pass limit. The total weight change at
pass p is at most 64/(p+1) times the summed |GW|, where G is the batch gradient. At the default
threshold this drops below 64 long before pass 128 for realistic data: the test data converges in
6 to 9 passes. So the 128-pass exit is a safety net. The controller's own testbench exercises it
directly, and `tb_ica_top_passlimit` runs the whole chip with the limit lowered to 4 and the
threshold to 0, so that every run ends on the limit.

**How fast it separates.** This learning-rate schedule moves the weights slowly. Within one window
the sum of the learning rates over the passes is about 2^-8 x (1 + 1/2 + ... + 1/9), roughly 0.01.
So **W** changes by only about 1% per window, and the separation builds up over many windows.

I checked this with the bit-true model on a synthetic mixture of four super-Gaussian sources, two
of them 5 Hz and 12 Hz bursts, mixed by a fixed matrix with off-diagonal terms of 0.2 to 0.5. After
40 windows (80 s of signal), the worst output's best correlation with a source was still only about
0.7 to 0.8. Reading the data with fewer fraction bits raised it to about 0.85.

Faster adaptation needs a larger initial learning rate or a smaller convergence threshold. Both are
single constants: `LRATE_INIT` in `ica_pkg` and `CONV_THRESH` on `ica_top`. Treat separation
quality on real recordings as unverified for this RTL.

## Window handling (`async_mem_ctrl`, `in_memory`)

**Writing samples.** Each new sample word is written to the circular buffer at `wr_ptr`. The write
takes two cycles on memory port B:

1. a read of the word about to be overwritten
2. the write, which also updates four running channel sums (sum += new - old)

The mean is round(sum / 512). It is used to centre the data both for training and for the final
multiply.

**DO_ICA timing.** `ica_enable` rises when the window first holds 512 samples. `do_ica` pulses on
that sample and then on every 128th sample after it.

**Frozen window.** While the controller is in TRAINING or CONVERGE, writes are held back, so the
window cannot change under a run. One sample may wait in a pending register (`sample_stall`). A
second sample arriving meanwhile is lost (`sample_overflow`). At 68 MHz a full 128-pass run lasts
about 15 ms. That is shorter than one 15.6 ms sample period at 64 Hz, so at real rates at most one
sample waits and none is lost.

**Power save.** `in_memory` counts cycles without any access. After `IDLE_LIMIT` = 32 such cycles it
raises `sleep`, the flag for putting the bank into power-save mode. The clock gating itself is left
to the target technology.

## Results and the serial protocol

**Result multiplier.** On ICA_DONE, `final_result` latches the means and the write pointer. It then
reads the newest 128 samples in time order, one per cycle, and computes all four outputs
y_i = sum_j W_ij (x_j - mean_j) at once with 16 multipliers. It has three pipeline stages (memory,
centring, multiply), so the first result appears 4 cycles after ICA_DONE and the multiplier is busy
for 131 cycles. It pauses while the output FIFO is almost full: `fifo_hold` rises with 4 free
entries.

**Encoder and FIFO.** `result_encoder` turns each output into round(y / 2^14) + 128, clipped to
0..254. That is the separated signal on the same scale as the input, centred on 128, with FF never
produced. The four codes go into the 32-bit `async_fifo` (128 entries, one result set).

**Framing.** Both directions use the same framing: 115200 bps, one start bit, 8 data bits LSB first,
one stop bit, no parity. Each four-channel sample is sent as

```
FF  ch1  ch2  ch3  ch4
```

with channel 1 in bits [7:0] of the word. The receiver takes the four bytes after an FF whatever
their value, and drops bytes outside a frame, so it resynchronises on the next header. A byte with a
bad stop bit is dropped and reported on `frame_error`. The receiver samples the first data bit 12
ticks (1.5 bits) after the start edge.

**Rates.** Input and output each carry 64 x 5 bytes/s = 3200 bit/s, well under the link's
115200 bit/s.

## Sizes, speed and resources

| parameter (`ica_top`) | default | meaning |
|---|---|---|
| DEPTH | 512 | window, samples (8 s at 64 Hz) |
| STEP | 128 | new samples per run and outputs per run |
| MAX_PASS | 128 | pass limit |
| FIFO_DEPTH | 128 | output FIFO entries |
| CONV_THRESH | 64 | convergence threshold on sum \|dW\| (LSB = 2^-14) |
| OVERSAMPLE | 8 | baud-clock ticks per bit |
| IDLE_LIMIT | 32 | idle cycles before memory power save |

**Speed.** The 68 MHz target is 64 Hz x 128 passes x 8192 cycles = 67.1 M cycles per second. In
other words, a worst-case run must fit inside one sample period. That is what this design needs:

- Runs are started only every 128 samples, so a clock of about 0.6 MHz would be enough for the
  arithmetic alone.
- But the window is frozen during a run and only one sample can wait. Below about 68 MHz, a run
  that goes to the pass limit loses samples (reported on `sample_overflow`).

No timing analysis was done for a specific FPGA.

**Resources.** A generic yosys synthesis of `ica_top` gives about 2300 flip-flop bits and 26112
memory bits:

- the 16384-bit input memory
- the 4096-bit FIFO
- the 5632-bit sigmoid table

## Where this design departs from the original description

- **Encoder placement.** The encoder sits ahead of the output FIFO. The original block diagram draws
  it after the FIFO, but its FIFO is 32 bits wide and its simulation pushes packed 8-bit code words.
  So the FIFO here holds encoded words.
- **Memory total.** The FIFO keeps the printed 32 x 128 size. Together with the 32 x 512 input
  memory that gives 20480 bits, not the 24576 memory bits reported for the original.
- **One computing unit.** The original pipeline figure shows two recursive circuits. This design has
  one, used for every pass. How two would share the work is not described.
- **Leaving the loop.** The original state table leaves the loop only on the pass limit, while its
  text stops on convergence. Both end the loop here.
- **Flush timing.** The original text ties the flush to the idle state. Here the flush comes at the
  taken decision, and the predictor returns to "not taken" in IDLE.
- **Choices not specified in the original:**
  - the convergence threshold
  - the weight reset value (identity)
  - the power-save idle count
  - the oversampling factor of 8
  - the channel order inside a word
  - the encoder's rounding and clipping
  - the sample pending/overflow scheme
  - the clock-domain crossings
  - the use of the window mean for centring
- **Fixed-point splits.** The original gives word widths (16-bit weights, 23-bit u, 11-bit y) but not
  all fraction splits. The splits here are chosen so that the identity weight is exact and u covers
  the sigmoid table's range.
- **Not part of this RTL.** The acquisition board (electrodes, ADCs, microcontroller), the Bluetooth
  module and the display program. The design's serial pins are where they connect.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/ica_ref_pkg.sv` is an independent bit-true
model of the arithmetic: the sigmoid table, a training pass, the learning rate and the encoder.

| testbench | checks |
|---|---|
| `tb_nonlinear_lut` | every table step against the exact sigmoid, symmetry, saturation |
| `tb_gradient_update` | three passes bit-exact against the model; 8192-cycle pass; 17-cycle update |
| `tb_ica_system_ctrl` | 8192-cycle TRAINING; 512 sample slots; read order with the prefetch; exit on convergence and after exactly 128 passes; DONE waits for the multiplier |
| `tb_converge_decision`, `tb_branch_ctrl`, `tb_weight_buffer` | distance and threshold edges; flush only on taken; predictor states; identity reset |
| `tb_async_mem_ctrl`, `tb_in_memory` | written stream with stalls and losses; means; DO_ICA spacing; read-before-write; power-save count |
| `tb_final_result`, `tb_result_encoder` | outputs against W(x - mean); 4-cycle latency; back-to-back results; hold against a small queue; rounding and clip edges |
| `tb_async_fifo`, `tb_tx_header_ctrl`, `tb_uart_tx`, `tb_uart_rx`, `tb_rx_header_ctrl` | scoreboard across two clocks; frame format and spacing; bit timing; sampling point; resynchronisation |

**End-to-end test.** `tb_ica_top` runs the whole chip at its default sizes through its serial pins.

- **Stimulus.** It sends about 1350 samples: first 512 samples with the same square wave on all
  channels, then four super-Gaussian sources mixed by a fixed matrix. It adds stray bytes and bytes
  with bad stop bits.
- **Reference.** It runs the reference model on every window the chip trains on. It checks the pass
  count, the 8192-cycle passes, the final weights and biases, and every byte of the 6 x 128 output
  frames decoded from `tx`.
- **Events.** It counts, and requires at least once: sample stall, sample loss, branch not taken,
  taken with flush, memory power save, FIFO hold and frame error.
- **Clock ratio.** `sys_clk` runs only 4.3 times faster than `baud_clk`, so that samples arrive
  during training and the stall and loss paths are exercised.

It takes a few seconds of simulation. `tb_ica_top_passlimit` repeats the same test with
`MAX_PASS` = 4 and `CONV_THRESH` = 0, and requires runs ending on the pass limit instead of on
convergence. Every module also has a broken variant that its testbench was
shown to reject.

To run a testbench with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ica_top \
    rtl/ica_pkg.sv tb/ica_ref_pkg.sv -y rtl -y tb tb/tb_ica_top.sv -o sim
./obj_dir/sim
```

Replace `tb_ica_top` with any other testbench name. Every file in `rtl/` is synthesizable and
lints cleanly except for the unused monitor outputs noted in `ica_top`.
