# RZLA: a Sobel loop accelerator with Razor error detection and rollback

This is a hardware loop accelerator for Sobel edge detection. It is built so
that it can run with less timing margin than a conventional design: a clock
period or supply voltage at which some paths occasionally miss the clock
edge. Such late arrivals are caught by Razor flip-flops at the ends of the
timing-critical stages. The accelerator then rolls back a few cycles and
recomputes the affected results.

The main idea is that an accelerator is much easier to roll back than a
processor. It has no architectural state. Its working data live in shift
registers that are consumed and discarded, and its control is a fixed
(modulo) schedule. Making the shift-register file a little deeper (R extra
entries) and letting the controller remember where it was R pushes ago is
enough for a complete check-point. Results are kept in a short queue until
they are older than the error-detection latency. Only then are they written
to memory. Recovery is then "discard the queue, rewind R pushes, replay".

The RTL is SystemVerilog (IEEE 1800-2017). Everything is synthesizable
except the Razor flip-flop. That cell is a custom circuit and is given as a
behavioural model (`rtl/rff.sv`).

## Using it

The host side of `rzla_top` works like this:

1. While `busy` is low, write the image into local memory through
   `host_addr/host_we/host_wdata`. Pixels are 8-bit grey values in raster
   order from address 0 (`index = row*X + col`).
2. Write the configuration into the constant register file (CRF) through
   `crf_we/crf_addr/crf_wdata`:

   | addr | register  | reset |
   |------|-----------|-------|
   | 0    | X (width, 3..MAX_X)  | 64 |
   | 1    | Y (height, 3..MAX_Y) | 64 |
   | 2    | threshold            | 128 |

3. Pulse `start` for one cycle. `busy` rises. `done` pulses for one cycle
   when the edge map is complete in memory.
4. Read the edge map through the same host port. Read data appear on
   `host_rdata` one cycle after the address.

The edge map lies at `MAX_X*MAX_Y + row*X + col`, with the same layout as
the input. A pixel is `0xFF` when `|Gx| + |Gy| > threshold` and `0x00`
otherwise. The kernels are `Gx = [-1 0 1; -2 0 2; -1 0 1]` and
`Gy = [-1 -2 -1; 0 0 0; 1 2 1]`, and the largest magnitude is 2040. The
outer row and column of the edge map are not written, so they keep whatever
the host put there.

With no timing errors, a run of an X x Y image takes X*Y + R + 2 cycles from
the `start` edge to `done`. That is one pixel per cycle, plus the pipeline
and the store queue. Each rollback adds about R + 2 cycles.

`error` (the synchronised composite error) and `rollback` are outputs. They
are meant for an external controller that counts errors, for example to
adapt the supply voltage or the clock. That controller is not part of this
RTL.

## Datapath and clocking: pulsed latches and negative-phase latches

This is the least conventional part of the design. Read it before changing
`sobel_datapath`.

A Razor flip-flop (`rff`) here is a pulsed latch, not a master-slave
flip-flop:

- Its storage element is a latch that is transparent while `clk` is high.
- A transition detector watches D. Two pulse generators turn each rising
  or falling transition on D into a wide pulse. A pulse that overlaps the
  high phase of `clk` is reported as a timing error, and the error flag
  stays set until ROLLBACK. This covers any transition during the high
  phase. It also covers a transition less than one pulse width before the
  rising edge (0.2 ns in the model, parameter `PULSE_W`).
- The late value still passes through the open latch to Q.

In effect, the cell behaves as a rising-edge flip-flop with an error output.
The catch is the hold side. The whole high phase is now a window in which D
must not move. A fast path that starts at a rising edge and reaches the RFF
during the same high phase would be reported as an error, even though the
logic is correct. This is the Razor minimum-delay constraint.

Instead of padding short paths with delay buffers, each stage's logic is cut
in two by a latch that is transparent while `clk` is low (`latch_n`). During
the high phase that latch is opaque, so nothing launched by the rising edge
can reach the RFF before the falling edge. The constraint holds by
construction. The cost is that the second half of each stage can only start
evaluating at the falling edge.

The datapath is organised like this:

```
 SRF window (flip-flops, rise k)
   -> weighted sums Gx+, Gx-, Gy+, Gy-   | latch_n L1 (40 b) |  |a-b| twice  -> RFF x20 (|Gx|,|Gy|)   rise k+1
   -> |Gx| + |Gy|                        | latch_n L2 (11 b) |  > threshold  -> RFF x1  (edge bit)   rise k+2
   -> latch_n L3 (1 b) -> store queue flip-flops                                                    rise k+3
```

L3 has no logic in front of it. Its only job is to keep the store queue's
ordinary flip-flops from racing with the RFF output, which changes right at
the rising edge. A window that the SRF presents after rising edge k
therefore produces an edge bit that the store queue samples at edge k+3
(`PIPE_LAT = 3` in `rzla_pkg`).

In a zero-delay RTL simulation no RFF ever flags an error. The latch
placement guarantees this, and `sobel_datapath_tb` checks it on every cycle.
The testbenches create timing errors by forcing a wrong value onto an RFF's
D input during the high phase and releasing it in the low phase. This acts
like a late path: the wrong value really enters the pipeline, so recovery
has to work for the test to pass.

## Error detection and recovery

- `error_or_tree` ORs the 21 RFF error flags and passes the result through
  two flip-flops, because the flags rise at arbitrary times within the high
  phase.
- `error_controller` turns the synchronised error into a one-cycle
  `rollback` pulse. It does so only while the accelerator is busy, and never
  in two cycles in a row.
- ROLLBACK clears the RFF error flags and the synchroniser at the next
  rising edge. At that same edge it also:
  - empties the store queue, and blocks the store queue's write in the
    cycle when ROLLBACK is high;
  - clears the valid bits in the pipeline and drops the memory read in
    flight;
  - restores the loop controller's state from R pushes ago.

### Why R = 8 and a store queue of R-3 = 5

Suppose a late transition hits an RFF in the high phase of cycle c. The
timing is then:

- The synchroniser has the error at edge c+2.
- ROLLBACK is high in cycle c+3.
- The flush and the rewind happen at edge c+4.

The corrupted result enters the store queue at edge c+1 at the earliest. With
a queue D entries deep, its write would be presented in cycle c+D and would
take effect at edge c+D+1. This must not happen before the rollback. That
requires D >= 3. This design uses 5, which leaves margin.

At the rollback edge, the results that are not yet in memory come from at
most the last D + 3 pushes: D in the queue and 3 in the pipeline. Rewinding
R = D + 3 = 8 pushes regenerates all of them. Rewinding further than
necessary is harmless, because results that are recomputed get the same
values and are written again.

The two parameters are tied together in `rzla_top`: the store queue depth is
`R - PIPE_LAT`. If you change the detection path (for example by adding a
synchroniser stage), recheck the inequality above and raise R.

### Check-point in the SRF and the controller

The shift-register file (`srf`) holds the last 2*MAX_X + 3 pixels. That is
two full rows plus three pixels, which is what a 3x3 window needs. It also
holds R more pixels.

The SRF is a circular buffer. Its write slot plays the role of the shift
position, and its nine window taps are computed from the slot of the newest
pixel and the run-time width X.

The loop controller keeps a history, R entries deep, of its own small state:

- the next pixel index;
- its column and row;
- its SRF slot.

It pushes one history entry per pixel. Rolling back means restoring the
oldest entry. The extra R entries guarantee that none of the pixels the
restored window needs has been overwritten. After a rollback the history is
refilled with the restored state. A second error soon afterwards therefore
goes back to the same point, not further, and the SRF slots stay consistent
with it. An error during the first R pushes rewinds to the start of the
image.

The schedule is static, with an initiation interval of one:

- Each cycle the controller issues a read of the next pixel.
- The pixel that arrives one cycle later is pushed into the SRF.
- A valid bit and an output address travel alongside the datapath. The
  valid bit is set for column >= 2 and row >= 2, and the address is that of
  the window centre.

A run ends when every pixel has been pushed and the pipeline and the store
queue are empty.

## Modules

| module | role |
|---|---|
| `rzla_pkg` | widths, CRF map and `crf_t` struct, `PIPE_LAT`, edge values |
| `rzla_top` | the accelerator; parameters `MAX_X = 64`, `MAX_Y = 64`, `R = 8` |
| `loop_controller` | static schedule, raster position, output addresses, check-point history, completion |
| `srf` | pixel shift-register file with R extra entries, 3x3 window taps |
| `sobel_datapath` | two-stage Sobel functional units with RFFs and negative-phase latches |
| `rff` | Razor flip-flop, behavioural model (latch and transition detector) |
| `latch_n` | negative-phase transparent latch |
| `store_queue` | results wait here until validated, then are written to memory |
| `error_or_tree` | OR of the RFF error flags, two-flip-flop synchroniser |
| `error_controller` | ROLLBACK pulse generation |
| `crf` | X, Y and threshold registers |
| `local_mem` | 2*MAX_X*MAX_Y bytes; port A for host or pixel reads, port B for committed results |

With the default sizes, the memory is 8192 bytes. The SRF has 139 entries,
and the design has 21 RFF bits and 52 negative-latch bits.

Synthesis reports latches in `sobel_datapath`, `rff` and `latch_n`. They are
intended.

## Simulating

Each module has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl rtl/rzla_pkg.sv tb/rzla_top_tb.sv \
  --top-module rzla_top_tb -o sim && ./obj_dir/sim
```

- `rzla_top_tb` runs at MAX_X = MAX_Y = 16. It uses six images (16x16,
  10x7 and 12x9, with several thresholds). Late transitions are injected
  early in a run (before R pushes), in the middle of a run, in two
  neighbouring cycles, and while the pipeline drains. The testbench checks:
  - every result entering the store queue and every write to memory,
    against a Sobel reference model (a wrong value may enter the queue but
    must never be written);
  - the whole edge map, including the untouched border;
  - the error-free latency X*Y + R + 2.

  It counts late transitions, composite errors, rollbacks, rollbacks before
  R pushes, rollbacks in the drain, discarded corrupted results and timed
  clean runs. It fails if any of these never happened.
- `rzla_top_full_tb` runs the default configuration (64x64, R = 8) through
  one complete image. It injects one error into each RFF stage and compares
  all 4096 output bytes.
- The unit testbenches cover:
  - the RFF (timely data, late transition, stickiness, glitches, clear,
    the pulse-width window before the rising edge);
  - the latch phases;
  - SRF windows across pointer wrap for two widths;
  - store-queue timing and flush;
  - synchroniser latency;
  - the ROLLBACK pulse rules;
  - the controller against a reference model, including random rollbacks;
  - the CRF;
  - the memory;
  - the datapath result timing and its error flags.

The simulator is two-state, so everything that is read is reset or
initialised. The latch contents in the datapath are random until the first
low phase, but they never carry a valid result.

## Limits and departures

- **Sizes are this design's choice.** This includes the pixel width
  (8 bits), the image limit (64x64), the CRF width (16 bits), R = 8, the
  memory size and the memory map. So are the host interface and the border
  handling.
- **The Sobel details are standard choices.** The standard Sobel kernels,
  the |Gx|+|Gy| magnitude and the 0xFF/0x00 output are assumed. The
  pipelining into two stages is also this design's choice.
- **R is counted in pushes, not clock cycles.** The controller reverts R
  pushes. While streaming, that is the same as R cycles. In the bubble cycle
  after a rollback and in the drain, pushes are fewer than cycles, so the
  rewind reaches further back than R cycles. This is safe.
- **Latch placement is by hand.** Latches are placed mid-stage by hand
  (52 latch bits). The original approach uses an automatic latch-insertion
  step on a full netlist and reports hundreds of latches there. That count
  depends on the gate-level netlist and cannot be compared with this RTL.
- **The RFF is a behavioural model.** Its detector pulses are ideal, with a
  fixed width, and metastability is not modelled. The model sets its own
  time unit (1 ns). For silicon it must be replaced by the real cell with the
  same ports (`clk, rst_n, d, rollback -> q, err`). Verilator's lint reports
  NOLATCH on its latch block, but the block is a latch, and it is intended.
  Synthesis ignores the model's pulse delays, so synthesizing the model
  gives a constant `err`.
- **The off-chip parts are not included.** These are the voltage regulator,
  DAC, ADC and current-sense path, and the control board and GPIO that read
  `error`. The RTL stops at the `error` and `rollback` ports.
