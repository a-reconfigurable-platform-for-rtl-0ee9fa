# FlexFilm: real-time motion-compensated noise reduction for 2K film, in SystemVerilog

Digital film at 2K resolution means 2048x2048 pixels of 30 bits (three 10-bit colour components), 24 frames a second: about 100 million pixels per second that must be processed without stopping. This design is the datapath of a multi-FPGA board built for that job. It runs at one pixel per 125 MHz clock. The algorithm it implements is a temporal-spatial noise reducer:

1. **Motion estimation** finds, for every 16x16 block of the current frame, the best match in the previous frame and in the next frame. It uses a full search over vectors -8..+7 in both directions.
2. **Motion compensation** keeps whichever of the two candidates has the smaller sum of absolute differences (SAD). A scene cut therefore does not destroy the prediction: after a cut, the next frame still matches. It then fetches that candidate block from memory.
3. The original frame and the motion-compensated frame are sent as two streams over one **64-bit time-multiplexed (TDMA) link** to a second FPGA.
4. There, a **Haar transform** between the two frames splits them into a temporal low band and a temporal high band.
5. Each band goes through a **2D 5/3 wavelet transform**. Small detail coefficients (noise) are set to zero ("coring"), and the **inverse** transforms rebuild the picture.

Around this datapath sit the infrastructure blocks the board depends on:

- a **scheduling SDRAM controller** with quality-of-service features: a CPU priority port, traffic shaping, bank interleaving and read/write bundling;
- **local memory controllers** (LMCs) that produce access patterns;
- a **microcoded controller** that programs everything over a small control bus.

All of it is in `rtl/`. Every block has a self-checking testbench in `tb/`.

## Block map

| File | Role |
|---|---|
| `flexfilm_pkg.sv` | widths (10-bit component, 30-bit pixel, 64-bit link, 128-bit memory word), SDRAM command enum |
| `me_pe.sv`, `me_core.sv` | 256-PE full-search block matcher |
| `lmc_transpose.sv` | row-major to column-major reordering for the matcher |
| `mc_select.sv`, `mc_align.sv` | previous/next choice; unaligned 16-pixel fetch from two aligned blocks |
| `word_pack.sv`, `word_unpack.sv` | two 30-bit pixels per 64-bit link word |
| `tdma_tx.sv`, `tdma_rx.sv` | slot-table link multiplexer and demultiplexer |
| `pair_join.sv` | re-pairs the two streams after the link |
| `haar_fwd.sv`, `haar_inv.sv` | lossless integer Haar (S-transform) between two frames |
| `dwt53_fwd.sv`, `dwt53_inv.sv` | reversible 5/3 lifting along lines or down columns |
| `nr_shrink.sv` | threshold (coring) of one coefficient |
| `dwt2d_nr.sv` | one-level 2D transform, coring of the LH/HL/HH bands, 2D inverse |
| `cmc_addr_map.sv`, `traffic_shaper.sv`, `cmc.sv` | SDRAM controller |
| `load_gen.sv`, `ppc_line_buffer.sv` | QoS test traffic: real-time streams and a CPU with a one-burst buffer |
| `lmc_agen.sv` | programmable 2D address generator |
| `algo_ctrl.sv` | microcode sequencer driving the control bus |
| `flexfilm_top.sv` | everything wired together |

## The motion estimator (the hardest part)

`me_core` has one processing element (`me_pe`) per candidate vector: 16x16 = 256 of them. Each PE forms a 10-bit absolute difference and adds it into a 19-bit SAD, one pixel per clock. 16x16x1023 fits into 19 bits.

**Pixel order and window.**

- The current block's pixels enter in column-major order, the order the transposing LMC produces.
- The search window of the reference frame is 31x31 pixels (16 + 15). It sits in a two-bank register array and is loaded one column per clock through `win_we/win_col/win_data`. Loads always go to the bank not in use, and `start` switches to the bank just loaded.

**How the band register feeds the PEs.**

- Block column j needs window columns j..j+15. They are copied into a 31x16 *band* register when the column starts.
- The band then shifts up by one row per pixel. Row 0 of the band is always the row that the current pixel (i, j) meets at vertical offset 0.
- So PE (dy, dx) reads band row dy, column dx, and the 256 SADs build up in parallel.

**Finding the minimum.**

- After the last pixel, all SADs are copied to a shadow bank.
- A scan then compares one SAD per clock. The scan can overlap the next block.
- The result (`mv_x`, `mv_y` signed 5-bit, `min_sad`) appears **SR*SR + 2 = 258 clocks after the last pixel**.
- If two vectors have the same SAD, the one scanned first wins, scanning row by row from (-8,-8).

**Throughput.** The next window (31 clocks) loads while the current block runs, so blocks follow every 257 clocks: one `start` clock plus 256 pixels. At 2048x2048 and 24 fps this needs 101 of the 125 MHz available. The original array streams search pixels through the PEs; this design keeps the whole window in registers instead.

**In the top.** Two cores run the same block: one against the previous frame, one against the next. `mc_select` takes the smaller SAD, and a tie goes to the previous frame. `mc_align` turns block position plus vector into a memory block address. If the target group of 16 pixels is not aligned (`need_second`), it funnel-shifts the group out of two aligned 16-pixel blocks.

## The wavelet noise reducer

**Haar step.** `haar_fwd` computes `h = a - b` and `l = b + floor(h/2)`, where a is the current pixel and b the motion-compensated pixel. This is the integer S-transform, and `haar_inv` reverses it exactly. With all thresholds at zero, the whole chain therefore reproduces the input bit for bit. The top-level test relies on this.

**5/3 lifting.** Each transform uses the reversible integer lifting form:

```
d[n] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)
s[n] = x[2n]   + floor((d[n-1] + d[n] + 2) / 4)
```

At the picture edge the samples are mirrored: x[-1] = x[1] and x[N] = x[N-2]. This symmetric extension is what keeps the transform invertible at the border.

**Lines or columns.** `dwt53_fwd` and `dwt53_inv` take a parameter `NCOL`:

- With `NCOL = 1` they filter along a line, one sample per clock.
- With `NCOL = W` they filter *down the columns*. Pixels arrive row-major, and every piece of per-column state sits in a small memory indexed by the column. The lifting state therefore becomes a set of line memories.

**Inverse timing.** The inverse cannot finish the last pair of a line or column until the line ends. It keeps that pair *pending* per column and sends it out:

- on the first pair of the next line or frame, or
- while `flush` is held at the end of a sequence, in column order.

**2D chain.** `dwt2d_nr` goes: row transform → column transform of the row-low and row-high bands → coring → inverse columns → inverse rows.

- Coring uses `nr_shrink`: a coefficient with |c| < threshold becomes 0. There is a separate threshold for each of LH, HL and HH.
- The block emits **two rows by two columns** of reconstructed pixels per output, on `out_pix[2][2]`.
- Output follows input by about one row pair.
- The top instantiates one `dwt2d_nr` for the low band and one for the high band, for each colour component (six in all). The thresholds are control-bus registers.

## The TDMA link

The two streams between the FPGAs share one 64-bit channel. `word_pack` puts two 30-bit pixels into one word: the first in bits [29:0], the second in [61:32], the rest zero.

`tdma_tx` sends one word per slot, following a programmable slot table (up to 8 slots, length `sched_len`). The slot's stream number and a start-of-schedule flag travel on extra control lines (`link_sid`, `link_sof`), so the receiver (`tdma_rx`) needs no headers.

- Packets are a single word each. Interleaving the streams finely (1-2-1-2-1 rather than 1-1-1-2-2) keeps the buffers small: four words per stream here.
- A slot whose stream has nothing queued goes out idle. It is not given to the other stream, so every stream keeps its guaranteed bandwidth.
- The top programs the schedule 1-2, which gives each stream 125 Mpixel/s.

After the link, `word_unpack` splits the words. `pair_join` re-pairs the original and compensated pixels before the Haar step.

## The SDRAM controller and its quality of service

`cmc` serves three request ports with full 4-beat bursts of 128 bits (DDR, 64 bits, 8 words). Every column command auto-precharges.

**Address map.** `cmc_addr_map` takes the bank from the two lowest burst-address bits. Linear streams therefore rotate over all four banks.

**Scheduling, stage 1.** Each port's waiting request is eligible only if its bank is idle.

**Scheduling, stage 2.**

1. Port 0 (the CPU) wins whenever `cfg_prio` is set and the traffic shaper allows it.
2. Otherwise a request in the same direction as the last one wins (read/write bundling). After `MAX_BUNDLE` accesses in one direction while the other direction waits, the preference flips.
3. Round robin decides among the remaining ports.

**Traffic shaper.** `traffic_shaper` admits at most n CPU grants in any window of T clocks, for example T=57 with n=1. It keeps the ages of the last n grants.

**Command engine.** Priority goes column command > refresh > activate. One activated request is held until its column command. Per-bank counters enforce the precharge and write-recovery times, and global counters enforce the read-to-write and write-to-read turnarounds. A refresh is due every `T_REFI` = 975 clocks (7.8 µs).

**Test traffic.** The QoS environment in the top mirrors a hardware test setup:

- `load_gen` (one reader, one writer) issues linear burst requests at a programmable period, queues up to four, and counts requests that miss their deadline as *lost*;
- `ppc_line_buffer` turns 4-word CPU cache-line accesses into burst accesses, and holds the last burst so the second line of a burst is a hit.

**Measured in simulation.** With priority and shaping, two load generators at period 16/16 lose nothing. Without shaping at 9/9 they lose requests. The controller alone sustains about 12/12 without loss. The SDRAM timing values are assumptions (tRCD = tRP = tWR = CL = 3 clocks). The simple one-request-at-a-time activate pipeline is why the controller falls short of the 10/9 that the original hardware reached.

## Control: algorithm controller and LMC address generator

`algo_ctrl` runs a program of up to 16 instructions, each 50 bits wide: `op[49:48]`, `a[47:32]`, `b[31:0]`.

| Opcode | Instruction | Effect |
|---|---|---|
| 0 | WRITE | writes b to control-bus address a |
| 1 | WAIT | waits until done flag a has been seen; the flag is remembered even if it came early |
| 2 | JUMP | jumps to a |
| 3 | HALT | stops |

Control-bus pages (`addr[15:8]`) in the top:

| Page | Target |
|---|---|
| 1 | `lmc_agen` |
| 2 | noise thresholds, registers 0..2 = LH, HL, HH |
| 3 | TDMA slot table: register k = stream of slot k; register 0xFF = schedule length |

`lmc_agen` registers: 0 base, 1 x-stride, 2 y-stride, 3 x-count, 4 y-count; writing 5 starts it. It then produces `base + y*sy + x*sx` for x in 0..cx-1 and y in 0..cy-1, one address per clock while `run` is high, and pulses `done`. Signed strides give transposed, mirrored or zig-zag patterns.

## Interfaces and timing conventions

- One clock `clk` and an active-low asynchronous reset `rst_n` everywhere.
- Streams use `valid` without back-pressure. The datapath is periodic, and the bandwidth is reserved when the system is designed.
- Handshakes exist only where the memory can stall (`req_valid/req_ready`, `cpu_req/cpu_ack`) and at the transpose buffer (`in_ready`).
- Pipelines are registered: Haar, select and unpack take 1 clock; the link takes 2 clocks (tx register, rx register).
- Assertions check these rules:
  - no activate to a busy bank;
  - unpack words at least two clocks apart;
  - the `pair_join` FIFOs never overflow;
  - the two band paths of the noise reducer stay in lock step.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/flexfilm_pkg.sv rtl/*.sv \
          tb/ddr_sdram_model.sv tb/flexfilm_top_tb.sv --top-module flexfilm_top_tb
./obj_dir/Vflexfilm_top_tb
```

Block testbenches need only their block's files plus the package. Some testbenches need `ddr_sdram_model.sv`: a behavioural DDR model that flags timing violations and counts refreshes, activates and bus turnarounds.

`flexfilm_top_tb` runs the whole design at 16x8 pixel frames:

- programs the system through the microcode controller;
- runs three motion-estimation blocks, covering previous/next selection and aligned and unaligned fetches;
- streams three frames over the looped-back link and checks bit-exact reconstruction with zero thresholds;
- runs one frame with coring;
- runs the two QoS phases.

It counts each mechanism and fails if any of them never happened: idle TDMA slot, schedule start, previous/next selection, second-block fetch, flushed output, coring, CPU priority grant, shaper hold, bus turnaround, refresh, lost request, line-buffer hit, LMC done, controller wait, bank interleaving.

`flexfilm_top_full_tb` does the same with every parameter at its default (2048x2048). It runs one full frame (about 8.4 million clocks, under a minute in Verilator).

## Departures from the original design

These are what to check before trusting the results:

- **One decomposition level.** The original noise reducer cascades three levels, buffering the intermediate bands in SDRAM FIFOs. Here `dwt2d_nr` is one level, and the SDRAM FIFO/ring-buffer memory controllers are not modelled.
- **Window storage.** The full search window of the next block is buffered in a second register bank (2 x 31 x 31 x 10 bits per core) rather than streamed through the PE array.
- **Unspecified insides are this design's own choices.** The source gives only the function of these blocks, not their insides:
  - TDMA details: slot table size, FIFOs, idle slots;
  - pixel packing bit positions;
  - Haar as the S-transform;
  - 5/3 in lifting form (the original uses polyphase shift-add filters, with the same result up to rounding);
  - coring as hard thresholding;
  - scheduler internals and SDRAM timings;
  - load-generator queue;
  - CPU buffer write policy;
  - LMC register set;
  - controller instruction set.
- **Memory throughput.** The controller reaches a lower sustained load than the original (see above).
- **Not included:** the PCI-Express router, the LVDS link PHYs, the PowerPC core and the SDRAM chips. Their signals are ports of the top (`link_tx_*`/`link_rx_*`, `cpu_*`, `sd_*`).
- **Scale limit.** 4K material (about 293 Mpixel/s and 4096-pixel lines) does not fit the default configuration.
