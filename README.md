# Two LiDAR receiver front ends: a full-waveform ADC path and a 50 ps TDC

A LiDAR finds distance from the round-trip time of a laser pulse. At 1 cm of
range per 67 ps of round trip, the receiver has to time the echo to a few
tens of picoseconds. This RTL holds two receivers that answer that need in
two ways:

* **TDC front end** (`tdc`). This is a time-to-digital converter that only
  measures the interval from a *start* edge (laser fired) to a *stop* edge
  (echo seen). Whole 2 ns periods of a 500 MHz clock are counted. The
  fractions of a period at both ends are read from a tapped delay line of
  45 cells of about 50 ps each. The result is a 21-bit value in picoseconds,
  up to about 1.4 µs, which is a 200 m range.
* **ADC front end** (`adc_frontend`). This path records the whole echo
  waveform. One trigger plays a short pulse out of a DAC and starts a
  capture of the ADC samples into on-chip memory in the same clock cycle.
  Because of that, the delay between emitted and received pulse is identical
  from shot to shot. The converters run at 1 GS/s; the logic sees 4 samples
  per channel per 250 MHz clock.

The top module `lidar_frontends` places the two side by side. They share
nothing: each has its own clock, reset and ports.

```
lidar_frontends
├── adc_frontend                  (250 MHz, 128-bit ADC words)
│   ├── single_shot_axi           AXI4-Lite register: fire / cyclic / status
│   ├── mem_buffer                1024-sample pulse table -> 2 DAC channels
│   ├── capture_ctrl              IDLE / CAPTURE / FINISH write controller
│   └── capture_mem               512 x 128-bit sample RAM
└── tdc                           (500 MHz)
    ├── pulse_gen                 start/stop edges -> hit pulse
    ├── tdl_carry_chain           45-cell delay line (behavioural model)
    ├── remap_logic               sampling row + first/last-piece banks
    ├── tdc_synchronizer          Mealy FSM on the line's end taps
    ├── coarse_cnt                period counter, starts at 1
    ├── counter_error             range limit (MSBs = 1011)
    ├── t2b_decoder               2 x thermo2bin_pipeline
    └── tdc_merge                 T = N*2000 + (Fs - Fe)*50 ps
```

Shared constants live in `tdc_pkg` and `adc_pkg`.

## How the TDC measures an interval

### The hit pulse
`pulse_gen` holds two flip-flops whose D input is tied to 1.
* The start edge clocks the first flop, whose output is the *hit* signal.
* The stop edge clocks the second flop. Its output clears both flops at
  once, so hit is a single pulse as wide as the interval being measured.

Reset and the range-limit flag also clear them. This is the only place where
start and stop act as clocks.

### The delay line and its two snapshots
Hit runs down a chain of 45 cells (`tdl_carry_chain`). On an FPGA each cell
is a carry-chain primitive with four taps. All 180 taps are sampled on every
rising clock edge by the first register row in `remap_logic`. That gives one
picture per period of how far hit's edges have travelled.

Two ends of that picture go to the synchronizer:
* *first*: the tap nearest the input;
* *last*: the farthest tap.

The pair {first, last} tells the line's state:

| first last | meaning |
|---|---|
| 1 0 | filling: the rising edge of hit is inside the line |
| 1 1 | full: hit covers the whole line |
| 0 1 | emptying: the falling edge of hit is inside the line |
| 0 0 | empty |

### The synchronizer
`tdc_synchronizer` is a Mealy machine with four states:

* **Idle.** On `10` it stores the *first piece* (the thermometer code of the
  filling line) and moves to *filling*.
* **Filling.** On `11` it moves to *full* and enables the counter. It also
  does this on a second `10`: with a line longer than the clock period, the
  rising edge can still be inside the line one period later. On `01` (a hit
  shorter than two periods) it goes straight to *emptying* and stores the
  *last piece*.
* **Full.** It counts one period per clock while *first* is 1. When *first*
  drops it stores the last piece and moves to *emptying*.
* **Emptying.** It waits for the end-of-measurement pulse from the merge
  block, then returns to idle.

The store enables act on the same sample that caused them. Each bank in
`remap_logic` keeps one tap per cell (the cell's last tap), so each piece is
a 45-bit thermometer code.

A hit must be caught on at least two clock edges. Intervals below about
2 ns are therefore outside the converter's range.

### Coarse count and range limit
`coarse_cnt` starts at 1 and adds one for each period seen full. It is held
at 1 while the synchronizer is idle.

`counter_error` looks only at the four top bits of the 10-bit count. When
they read `1011`, the count has reached 704 periods (1.408 µs). The flag
clears hit, so a missing echo ends the measurement at the largest value the
converter reports, instead of leaving the counter running.

### Thermometer to binary
`thermo2bin_pipeline` counts the ones in a thermometer code that fills from
bit 0 upwards:

1. The code is padded to a power of two.
2. Each registered stage looks at the top bit of the lower half. If that bit
   is set, the lower half is full, so its size is added and the upper half is
   kept. Otherwise the lower half is kept.
3. After log2(P/8) such binary-search stages, the last 8 bits are counted by
   an adder tree. A stray bit near the edge of the code (a "bubble") then
   costs at most a small error instead of a wrong power of two.

For 45 cells the latency is 5 cycles, and a new code can enter every cycle.

`t2b_decoder` runs two encoders:
* The first piece gives **Fs**, the number of ones: the part of the first
  period covered by hit.
* The last piece is emptying, so its zeros are at the input end. It is fed
  bit-reversed, and **Fe** = 45 − ones: the part of the last period after
  hit fell.

### Merge
`tdc_merge` waits until both fine codes have arrived, then loads its
operands and computes

    T [ps] = N * 2000 + (Fs - Fe) * 50

The multiply-add is given a 6-cycle window as a multicycle path instead of
being squeezed into one 2 ns period. At the end of the window `measure_o` is
updated and `eom_o` pulses for one cycle. Results below zero, which only
inconsistent codes could produce, are reported as 0.

### Timing at a glance
The first clock edge that samples the line emptying starts the count. From
there to `eom_o` takes:
* 1 cycle to store the last piece;
* 5 cycles for the encoder;
* 1 cycle to load the merge operands;
* 6 cycles of merge window.

That is 13 cycles, 26 ns. The next start can follow right after `eom_o`, so
the processing alone would allow about 38 million measurements per second;
in practice the interval being measured adds to that.

Inputs:
* `en_i` low pauses the converter: no store, no count, no new measurement.
* `rst_i` is active high. It is synchronous in the control logic and
  asynchronous in the pulse generator and the sampling registers.

## How the ADC front end keeps shots aligned

### Data format
Each 250 MHz cycle carries 4 samples of 16 bits (two's complement) for each
of two channels.
* In the 128-bit ADC word, the channels alternate in 16-bit slots:
  `[15:0]` channel 1 sample 0, `[31:16]` channel 2 sample 0,
  `[47:32]` channel 1 sample 1, and so on.
* The DAC side has one 64-bit word per channel, sample 0 in the low bits.

### Register interface (`single_shot_axi`)
This is an AXI4-Lite slave with one transaction of each kind in flight and
OKAY responses.

| offset | access | bits |
|---|---|---|
| 0x0 CTRL | write | bit0 = 1: fire one shot (self-clearing); bit1: DAC cyclic mode |
| 0x0 CTRL | read | bit1: cyclic mode |
| 0x4 STATUS | read | bit0 capture busy; bit1 capture done (sticky until the next shot); bit2 DAC playing |

A shot produces a one-cycle `single_shot_o` pulse. That pulse starts the
DAC playback and the capture in the same cycle.

### Pulse table (`mem_buffer`)
The table holds 1024 samples, read as 256 words of 4 samples, which is
1.024 µs at 1 GS/s.
* In single-shot mode a rising trigger plays the table once. The outputs
  then return to zero.
* In cyclic mode the table repeats for as long as the mode bit is set.

The address advances only in cycles where the DAC core asks for data
(`val_info`). The table is computed at elaboration as a rectangular pulse:
8 samples of −16000 starting at sample 64. `PULSE_START`, `PULSE_LEN` and
`PULSE_AMP` change it. A pulse with a small duty cycle passes the
ADC's DC-blocking input stage undistorted.

### Capture (`capture_ctrl`, `capture_mem`)
The controller has three states:
* **IDLE**: the counter is held at 0.
* **CAPTURE**: the state after the trigger. Every valid ADC word is written
  and the counter advances.
* **FINISH**: entered when the counter wraps from its maximum. The memory
  is disabled, the counter is reset, and the next cycle returns to IDLE.

The memory has 512 words, so one shot records 2048 samples per channel
(2.048 µs). The processor reads it back through a registered read port
(`mem_rd_en_i`, `mem_raddr_i`, `mem_rdata_o`).

The DAC output and the ADC input are connected through analog converters
and serial links. The testbenches model that path as a fixed delay. With a
delay of L cycles, DAC word k always lands at capture address k + L + 1.

## What lies outside this RTL

The ADC front end relies on parts that are bought, not designed. Their
signals are ports of `adc_frontend`:
* the 1 GS/s ADC and the DAC;
* their JESD204B links and transport cores;
* the clock generator;
* the processor, whose bus is the AXI4-Lite port;
* the block-RAM controller, whose port is the memory read port.

The original system also had a DMA-to-DDR capture path, which the capture
controller and memory here replace.

The delay line is a **behavioural model**: a transport delay per cell. It
lets the TDC be simulated with real time intervals, but it does not
synthesize to a delay line. On an FPGA, replace `tdl_carry_chain` with a
chain of carry primitives placed in one column. The ports stay the same:
`hit_i` in and `4*NUM_CELLS` taps out. Everything else in the TDC is
ordinary synchronous logic plus the two edge-clocked flops of `pulse_gen`.

## Choices made here

These are the points where this RTL fills gaps or departs from the original
design:

* **Synchronizer.** The full-to-emptying step, the treatment of `00` while
  filling (keep waiting), the return to idle on `eom_o`, and the pause input
  are this design's own.
* **Remap banks.** Each bank keeps one tap per cell, the cell's last tap.
* **Encoder internals.** The split into mux stages plus a final 8-bit
  counter, and the 5-cycle latency, are this design's own. The 13-cycle
  total was arranged to match the 26 ns processing time of the original.
* **Merge.** It latches the two ready pulses and clamps at zero.
* **ADC front end.**
  - The register map and status bits are new.
  - It uses a single clock for the bus and the data path.
  - The pulse shape and the 512-word capture depth are chosen. The depth
    matches the roughly 2 µs window of the original.
  - Cyclic mode is kept next to single-shot mode.
* **Widths and defaults.** The TDC numbers are the original design's: 45
  cells, 50 ps, 500 MHz, a 10-bit counter, 8-bit fine codes, a 21-bit
  result and a 6-cycle merge. So are the 1024-sample table and the 16-bit,
  4-sample, 2-channel data format.

## Simulating

All files are SystemVerilog-2017 and carry their own `timescale` (1 ns /
1 ps). With Verilator 5 (two-state simulation, `--timing` for the delays of
the delay-line model and the testbench clocks):

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/tdc_pkg.sv rtl/adc_pkg.sv tb/tb_tdc.sv --top-module tb_tdc \
    --Mdir obj_tdc -o sim
./obj_tdc/sim
```

Replace `tb_tdc` with any testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and ends. Each has a watchdog that counts a
failure if the run hangs.

| testbench | what it establishes |
|---|---|
| `tb_lidar_frontends` | Both front ends at default sizes, running concurrently. Two ADC shots are captured through a 20-cycle loopback; every captured word is checked and the two shots must be identical; the cyclic period is 256 words. 40 random TDC intervals (2.5 ns to 1 µs) are each measured within ±100 ps, followed by a range-limit run and a pause. It counts shots, capture wrap-arounds, cyclic periods, line-filling-twice, short hits, full periods, range limits and pauses, and fails if any never happened. |
| `tb_tdc_workloads` | The two bench experiments: a linearity sweep of 100 delays in 66.7 ps steps from 3 ns to 1 µs (each within 100 ps, fitted slope within 1e-4 of 1), and 16 repeated measurements of two cable delays 150 ps apart with the pulse source locked to the TDC clock (identical results per cable) |
| `tb_adc_workloads` | 50 single shots fired at random times through a loopback: every capture is correct and all 50 are identical |
| `tb_tdc` | Accuracy within ±100 ps over the range, the 13-cycle (26 ns) latency, range limit at 704 periods, pause, all synchronizer paths |
| `tb_adc_frontend` | Capture alignment through a loopback, shot-to-shot repeatability, cyclic period, status bits |
| `tb_thermo2bin_pipeline` | A code every cycle at 45 and 256 bits, bubbles inside the counted segment, saturation, the 5-cycle latency |
| others | One per block: reference models of the formula, the FSM, the counter, the range flag, the AXI handshakes, the RAM |

The end-to-end test covers about 16 µs of simulated time and runs in well
under a second once built.

## Changing sizes

* **TDC.** `NUM_CELLS` and `CELL_DELAY_PS` describe the line.
  - The line must cover one clock period: `NUM_CELLS * CELL_DELAY_PS >=
    TCLK_PS`.
  - `TDELAY_PS` is the per-cell delay that the merge assumes. On hardware
    it is the calibrated average.
  - The fine codes saturate at 255 cells.
  - The range flag pattern (`tdc_pkg::MAX_CNT_MSBS`) must be recomputed if
    `CNT_W` or the clock changes.
* **ADC side.** `WAVE_LEN` sets the pulse-table size in samples (a multiple
  of 4). `CAP_ADDR_W` sets the capture depth.
