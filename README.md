# Variability-aware FPGA speed calibration: sensing network and support architecture

No two chips come out of a fab equally fast, and neither do two regions of one chip.
FPGA timing analysis hides this behind one worst-case guard band for the whole product
line, so most parts run well below what their silicon can do. The method this RTL
implements claws that margin back in the field, with no vendor support:

1. **Measure the chip.** Hundreds of identical ring-oscillator (RO) sensors, spread
   evenly over the fabric, count their own oscillations during a fixed window. The counts
   make a *variability map*: a speed figure for every cell of the die.
2. **Choose.** The map's mean ranks several boards, so the fastest device can be
   picked. A moving-average search over the map finds the fastest region big enough
   for the user's design. This is software on a host and is not part of this RTL.
3. **Calibrate the clock.** The user design ("User IP") is placed in that region. It sits
   inside a small *support architecture*: a run-time retunable PLL and two dual-clock
   FIFOs. The processor runs the design at the frequency reported by timing analysis
   and stores the results as golden data. It then raises the clock 1 MHz at a time and
   reruns, until the results stop matching. The last clean frequency, less a
   user-chosen guard band, becomes the operating point.

This repository holds the fabric-side logic for steps 1 and 3, in synthesizable
SystemVerilog. It also holds behavioural models for the two analog parts, the ring and
the PLL, and testbenches that play the processor and the DMA engine.

```
             sys_clk (100 MHz)
                 |
   AXI-lite ---> ro_axil_ctrl --reset/activate/enable--> ro_network (N x ro_sensor)
   (processor)        ^                 sel --------->      |  large mux
                      +------------- count (16 b) <---------+
                                        sensing_system

   AXI-lite ----> pll_model ---- ip_clk (retuned) ----+
   (processor)       | locked -> run reset            v
   AXI-stream -> async_fifo --> fir16 / fft16 --> async_fifo --> AXI-stream
   (from DMA)      dma_clk | ip_clk          ip_clk | dma_clk     (to DMA)
                                        support_arch
```

`vm_top` puts the sensing system and two support architectures side by side: one hosts
the 16-tap FIR and the other the 16-point FFT. On a real device these are separate
configurations, loaded one after the other. The processor, the DMA engines, the DDR
memory and the processor's timer are not part of the fabric logic. Their connections
are ports of `vm_top`.

## The ring-oscillator sensor (`ro_sensor`, `ro_ring`)

This part is the least conventional, because half of it is not synchronous logic.

```
 activate --D  Q--+   +-------- ring (3 inverting stages) --------+     +---------------+
 enable ---CE     +-->| gated stage -> inv -> inv --+--> inv ----> ro_clk --> 16-bit counter |
 sys_clk --|>         |      ^______________________|             |     |   -> out register  |--> count
                      +-------------------------------------------+     +---------------+
                                                                          (clocked by ro_clk)
```

* **Input register.** It is a single flip-flop on the system clock: D is `activate` and
  the clock enable is `enable`. Its output gates the first stage of the ring, so all
  sensors start and stop on the same system-clock edge.
* **Ring.** The loop has three inverting stages, an odd number, so it oscillates while the
  gate is open. One more inverter, outside the loop, buffers it and drives `ro_clk`. On silicon, each
  stage is a LUT followed by a pass-through latch. Placement and routing are fixed by
  constraints so that every copy is identical, and its frequency then depends only on
  the local silicon. `ro_ring` is a **behavioural model** with a delay of `STAGE_PS` per
  stage. The period is `6 * STAGE_PS`, so the default 417 ps gives about 400 MHz. When
  the gate closes, the ring settles with `ro_clk` low. How the first stage is gated is
  this model's choice.
* **Counter and output register.** Both run on `ro_clk`. The counter counts rising edges,
  and the output register copies the counter on every edge. When the ring stops, the
  register holds the count. It lags the counter by one edge, so `count = edges - 1`.
  `sensor_rst` clears both asynchronously, because their clock is not running then.
  The count wraps at 2^16.
* **Clock-domain crossing.** There is no synchronizer on `count`. The processor reads it
  only after the window has ended and the ring has stopped, when the value is static.
  Do not read a sensor while it is running.

Frequency: `f_ro = count / T`. With T = 30 us (10,000 cycles of a 333 MHz timer) a
476 MHz ring gives about 14,300 counts, well inside 16 bits.

In simulation, `ro_network` gives sensor *i* the stage delay
`BASE_STAGE_PS + (13*i mod SPREAD_PS)` = 385..416 ps, which is about 400..433 MHz. This is
the synthetic process variation that the testbenches measure. It has no meaning for
synthesis.

## Sensing network and its register map (`ro_network`, `ro_axil_ctrl`, `sensing_system`)

All `N_SENSORS` sensors (408 by default, the XC7Z020 map) share reset, activate and
enable. A registered multiplexer returns the count of the sensor chosen by `sel`, one
system clock later. An address past the last sensor reads 0.

AXI-lite registers (32-bit, byte addresses):

| addr | name  | access | meaning |
|------|-------|--------|---------|
| 0x00 | CTRL  | R/W | bit 0 sensor reset, bit 1 activate, bit 2 enable (input-register CE) |
| 0x04 | SEL   | R/W | multiplexer address |
| 0x08 | DATA  | R   | count of the selected sensor (16 bits, zero-extended) |
| 0x0C | NSENS | R   | number of sensors |

One map takes these steps:

1. Write `CTRL=1`.
2. Write `CTRL=6`, then wait T on the processor's timer.
3. Write `CTRL=4`.
4. For each sensor, write `SEL=i` and read `DATA`.

The slave takes the write address and data in the same cycle and answers one clock
later. A read returns data one clock after the address. Every response is OKAY. Byte
strobes are honoured. Assertions check that the master holds `ARVALID`/`AWVALID` and the
address until the slave is ready.

## Support architecture (`support_arch`, `pll_model`, `async_fifo`)

Clocks:

* `dma_clk` (100 MHz) runs the DMA side, the PLL registers and the FIFO ports facing
  the DMA.
* `ip_clk` comes from the PLL and runs the benchmark and the FIFO ports facing it.

The FIFOs are 16 deep and 33 bits wide (32 data bits plus `last`). Their pointers cross
between domains in Gray code through two flip-flops. Backpressure works end to end:

* A full output FIFO stalls the benchmark.
* A stalled benchmark stops reading the input FIFO.
* A full input FIFO drops `s_axis_tready`.

**PLL model.** Write the wanted frequency in MHz to register 0x00. Then `locked` falls
and the output clock stops low. After `RECONF_CYCLES` reference clocks (3,000, which is
30 us) the clock restarts at the new frequency and `locked` rises. Register 0x04 reads
`{frequency in effect[15:0], 15'b0, locked}`. After reset the model locks to
`F_INIT_MHZ`: 140 for the FIR and 240 for the FFT, each benchmark's timing-analysis
frequency. The half period is `round(500000/f)` ps. The model is behavioural; on
silicon this is the device's clock manager, reconfigured through its dynamic port.

**Run reset.** This is a choice of this design, and it matters for the calibration
loop. While the PLL is unlocked, the benchmark and both FIFOs are held in reset,
`s_axis_tready` is low and `m_axis_tvalid` is low. Every run after a frequency change
therefore starts from the same state, with an empty FIR delay line and an FFT waiting
for a new block. Its output can then be compared word for word with the golden run.
Retune only between runs, with both streams idle.

**Calibration loop (processor software).**

1. Run the test vectors at the timing-analysis frequency `f_sta` and keep the results as
   golden data.
2. Set `f = f_sta + 1` MHz and rerun.
3. While the results match the golden data, raise `f` by 1 MHz and rerun.
4. Report `f - 1` MHz.

With a guard band g, the design must pass at `(1+g)·f_ip`, so the operating frequency
is the result divided by `1+g`. A coarse search in 10 MHz steps before the 1 MHz steps
shortens the loop.

## Benchmarks (`fir16`, `fft16`)

Both benchmarks use the same stream interface: valid, ready, 32-bit data and last.
Results are signed and sign-extended.

* **fir16.** A direct-form 16-tap filter with 12-bit samples and 12-bit Q1.11
  coefficients. The default is a symmetric low-pass,
  `{-12,-20,0,60,150,260,350,400,400,350,260,150,60,0,-20,-12}`, set by a parameter.
  `y = sat12((Σ c_k·x[n-k]) >>> 11)`. It takes one sample per clock, and each result
  appears 3 clocks after its sample. The whole pipeline holds when the output is not
  taken.
* **fft16.** A 16-point radix-2 decimation-in-time FFT. Samples and results are
  `{imag[15:0], real[15:0]}`, with 12 significant input bits.
  * Samples are loaded in bit-reversed order into a 16-entry register buffer.
  * The block is then transformed in place by one butterfly per clock: 4 stages of 8
    butterflies, 32 clocks.
  * Results leave in natural order, with `last` on bin 15.
  * Each stage halves its outputs, so the result is `DFT/16`.
  * Twiddles are `round(2047·cos(2πk/16))` and `round(-2047·sin(2πk/16))`.
  * Products and halvings are rounded.
  * Results stay within 4 LSB of an exact DFT/16.
  * The first result comes 32 clocks after the 16th sample.
  * It takes a new block only after the previous one has been unloaded, so it does not
    stream.

The method prescribes only the size and the 10–13-bit accuracy of these two benchmarks.
Their internal architecture is this design's own. Either one can be replaced by any
core with the same stream interface.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| vm_top, sensing_system, ro_network | N_SENSORS | 408 | sensors (XC7Z020 map; 216 for a Virtex-7 XC7VX485T half map, 1,060–1,310 for larger parts) |
| ro_sensor, ro_network | CNT_W | 16 | counter width |
| ro_network | BASE_STAGE_PS / SPREAD_PS | 385 / 32 | simulated stage-delay spread |
| vm_top, support_arch, pll_model | RECONF_CYCLES | 3000 | PLL relock time in reference clocks (30 µs) |
| support_arch | BENCH / F_INIT_MHZ / FIFO_DEPTH | FIR / 140 (FFT: 240) / 16 | benchmark, start frequency, FIFO depth |
| fir16 | TAPS / DW / CW / COEF | 16 / 12 / 12 / low-pass | filter |
| fft16 | DW | 12 | significant input bits (at most about 14) |

## How far to trust it, and where it departs from the method

* The ring and the PLL are behavioural models. The useful property of the real sensor
  is its placement: identical LUTs, latches, carry chains and routes for every copy, all
  fixed by constraints. That lives in constraint files and cannot be expressed in RTL.
  Synthesized as it stands, the ring is a combinational loop that tools will warn about,
  and the pass-through latches are missing.
* The register maps, the run reset, the FIFO depth, the benchmark internals and the
  coefficients are this design's choices. The method fixes only the following:
  * AXI-lite commands, multiplexer addressing and 16-bit counters for the sensors;
  * a retunable PLL with a 30 µs reconfiguration;
  * two dual-clock FIFOs;
  * a 100 MHz DMA/PLL domain;
  * the benchmark sizes.
* The sensing network and the benchmarks share one top here. On a device they are
  separate configurations.
* Not included:
  * the embedded processor (ARM Cortex-A9 or MicroBlaze);
  * the AXI DMA engine;
  * DDR memory;
  * the processor timer that sets the window T;
  * the host software, including region search, device ranking and the calibration
    script;
  * the FFT sizes 32–1024 and FIR lengths up to 128 taps used in the method's
    statistical evaluation. FIR length and widths are parameters; other FFT sizes need
    a different core.
* Timing failures do not occur in RTL simulation. The end-to-end testbenches emulate
  them by corrupting the fetched results above a chosen frequency, which is enough to
  exercise the search's stopping rule.

## Simulation

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. With
Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/vm_pkg.sv \
          tb/tb_vm_top.sv --top-module tb_vm_top && ./obj_dir/Vtb_vm_top
```

| testbench | what it shows |
|---|---|
| tb_ro_ring | period = 6·STAGE_PS, edge count over 10 µs, stops low |
| tb_ro_sensor | count = edges − 1 against an independent edge counter, enable gating, accumulation, reset |
| tb_ro_network | 24 sensors against their delays, ordering, registered mux, out-of-range address, reset |
| tb_ro_axil_ctrl | register file, strobes, response timing |
| tb_sensing_system | two full maps over AXI-lite, fastest sensor found, repeatability |
| tb_async_fifo | random traffic with unrelated clocks both ways, full and empty reached, no loss |
| tb_pll_model | lock time, clock stopped while relocking, period at 140–143, 240 and 300 MHz |
| tb_fir16 | bit-exact against a convolution model, saturation, 3-clock latency, backpressure |
| tb_fft16 | against a floating-point DFT/16 (≤ 4 LSB), 32-clock latency, backpressure |
| tb_support_arch | golden run vs FIR model, reruns at 141–144 and 300 MHz identical, both FIFOs pushing back |
| tb_vm_top | map of 24 sensors, then the full frequency search for FIR and FFT in parallel; counts sensor resets, windows, mux reads, PLL relocks, search stops, FIFO backpressure, FIR stalls, FFT blocks |
| tb_vm_top_full | the same at the default size: 408 sensors, 30 µs window, 30 µs relocks (about 3 minutes) |

`axil_bfm` (AXI-lite master) and `dma_model` (stream source and sink with random
throttling) in `tb/` stand in for the processor and the DMA engine.
