# OnSiRoC digital core: readout and control of silicon strip detectors

A silicon microstrip detector read out through analogue pipeline chips
delivers its data as a serial analogue stream. Each stream carries up to 2048
strips, one after the other, from the pipeline cell that held the triggered
bunch crossing. This VME module takes four such streams. It subtracts a
per-strip, per-cell pedestal in the analogue domain, digitises each sample
with a 12-bit FADC and stores the samples. While the samples are stored it
finds clusters of strips above threshold, so the event can later be read
over VME in one of three ways:

- the whole event (raw mode);
- only a list of clusters (hit mode);
- the cluster list plus the samples of each cluster (hit-and-cluster mode).

A microprogrammed sequencer drives the front-end chips and the module's own
conversion logic. It runs a *scan* program while the detector is live and a
*readout* program after a trigger. The module also switches twelve front-end
and bias supplies, each with an overload cut-off.

The SystemVerilog here is the module's digital part. The analogue branch is
left outside, as ports: preamplifier, analogue adder, pedestal DACs, FADC,
the switching supplies themselves and the connectors. A behavioural model of
one analogue path (`tb/frontend_model.sv`) stands in for it in simulation.

```
               +------------------------ VME bus -------------------------+
               |                                                          |
          vme_slave  --local bus-->  address decode (onsiroc_top)         |
               |                      |        |          |               |
      interrupter <- trigger_control  |   control_registers   sequencer memory
                       |   ^          |   (CR1, CR2, status,        |
     L1,L2,FC,L3 ----->+   |          |    commands, DAC codes)     |
                       v   |          |                             v
                    sequencer ------ SQD0..15 ----> control[3:0] to the front end
                       | strobes (convert, clear, cell advance)
                       v
      4 x input_channel:  channel_counters (CH1, CH2, cell)
                          pedestal_memory  --fine_code--> DAC (outside)
                          adc_data (outside) --> raw_data_memory
                                             \-> hit_cluster_finder --> pointer_memory
      12 x overload_protection:  reg_sw[i] --> reg_on[i]
```

## Input channel: the data path of one analogue input

`input_channel` holds the per-input logic. The four instances are identical
and run in lock step from the same sequencer strobes.

**Two channel counters.** The analogue path takes time. The pedestal for
strip *n* has to be at the DAC while strip *n* passes through the adder.
The FADC result for strip *n* comes out several conversions later.
`channel_counters` therefore keeps two strip counters:

- **CH1** addresses the pedestal memory.
- **CH2** addresses the raw data memory and the cluster finder.

CH2 starts `DELAY` conversion strobes after CH1 (default 4). Of those 4, one
is the registered pedestal read and three are the assumed FADC pipeline. If
a different FADC is used, `DELAY` must match its latency. A readout
therefore needs 2048 + `DELAY` conversion strobes. A 5-bit **cell counter**
holds the pipeline cell of the frozen event. The scan program advances it
(SQD7) in step with the front-end pipeline.

**Pedestal memory.** 32 × 2048 bytes per input, addressed by {cell, CH1}.
Each strip therefore has one pedestal for each of the 32 pipeline cells. Its
output is the 8-bit fine pedestal DAC code. With *Pedestal enable* (CR1
bit 0) off the code is 0. The same memory is the test pattern source: with
the analogue input disabled (CR2 bits 12/13), the board feeds the DAC output
itself to the FADC. So a pattern loaded here comes back through the whole
chain into the raw data memory.

**Raw data memory.** 2048 × 13 bits per input: the 12-bit sample plus the
FADC overflow bit. Writes happen at CH2.

**Hit and cluster finder.** Works on the same sample stream as it is written:

- A *hit* is a sample above that input's threshold. A sample with the
  overflow bit set is also a hit.
- A *cluster* is a run of adjacent hits.
- When the run ends (first non-hit, or strip 2047), the cluster is accepted
  if its width is **greater than** the programmed minimum width.
- An accepted cluster is written to the pointer memory one clock later, as
  {first strip [22:12], width [11:0]}, at the next free index.

The number of accepted clusters is readable as a register. So in hit mode the
reader knows how many pointer words to fetch. Both comparisons are strict,
as the description of the original board says ("bigger than").

**Pointer memory.** 2048 × 23 bits per input. Word *k* is the *k*-th cluster
of the event.

All memories and counters of a channel can be read and written over VME.
Acquisition has priority if both write the same word in the same clock.

## Sequencer: microprogram and strobes

`sequencer` is a 128K × 32 microprogram memory. Each word is one step:

| bits | meaning |
|---|---|
| 0–3 | front-end control lines, brought out as four complementary pairs `control`/`control_n` (gated by CR1 bit 8) |
| 4 | halve the high time of bits 1 and 2 in this step |
| 5 | conversion: FADC convert strobe; also steps CH1 and CH2 |
| 6 | clear CH1, CH2 and the cluster finder (start of an event) |
| 7 | advance the pipeline cell counter |
| 8, 9 | internal, no function in this logic (free for programs) |
| 10 | clear the pipeline cell counter |
| 11–13 | free external outputs `sqd_ext` |
| 14 | next-address bit 16 |
| 15 | stop after this step |
| 31–16 | next-address bits 15..0 |

So every word carries its own successor, {bit 14, bits 31..16}. Loops,
including endless ones, cost nothing. A word with bit 15 set is output for
one step, then the sequencer halts. The trigger logic sees this as the end
of the front-end readout.

**Programs and starts.** There are three start-address registers:

- the scan program starts at {0, SCAN_ADR} (lower 64K);
- the readout program starts at {1, RO_ADR} (upper 64K);
- a test program can start anywhere (TEST_ADR, 17 bits).

A start interrupts whatever is running. If several starts come in the same
clock, readout wins over scan, and scan over test. After a start, the first
word appears at the second step boundary.

**Step timing.** One step lasts `STEP_DIV` board clocks (internal clock, CR1
bit 1 set). Otherwise one step lasts one period of `ext_clk`, which is
synchronised to the board clock. The default 80 MHz board clock with
`STEP_DIV` = 8 gives 10 MHz steps. A readout program spends two steps per
sample, so the sample rate is 5 MSps. The sequencer output `stb` is high for
the first board clock of each step. Internal strobes are `sqd[i] & stb`, one
per step.

**Pulse shortening.** When bit 4 is set, bits 1 and 2 are forced low in the
second half of the step. With `ext_clk`, "second half" means while
`ext_clk` is low.

A typical pair of programs:

- **scan:** an endless loop that clocks the front-end chip's pipeline
  (bits 0–3) and advances the cell counter with bit 7.
- **readout:** one word with bit 6 (clear); then 2048 + `DELAY`
  repetitions of {bit 5 + readout clock, idle}; then a word with bit 15.

The end-to-end testbench builds exactly these.

## Trigger sequence

`trigger_control` turns the experiment's trigger signals into sequencer
starts and status bits. All trigger inputs are synchronised and act on their
rising edge.

1. **Scan.** The scan program runs while the detector is live.
2. **1st-level trigger.** Halts the scan. The front-end pipeline and the
   cell counter are frozen, and the cell counter names the cell to read. It
   is ignored during a readout and when disabled (CR1 bit 6).
3. **2nd-level trigger** (only while *run* is on). It increments the 32-bit
   event counter, sets *L2 prompt* and clears *Front-End Ready*. If *L2
   delayed* is off, it sets *L2 delayed* and starts the readout program. If
   *L2 delayed* is already on, a previous event is still being read over
   VME. The new event is then held as **pending**.
4. **Stop bit.** The readout program ends. *Front-End Ready* is set (and
   driven out if CR1 bit 5 enables it). The VME interrupt is raised.
5. **VME readout** of the memories by the external processor. The
   interrupt is cleared by the interrupt-acknowledge cycle or by a command.
6. **Reset-delayed command.** Clears *L2 delayed*. If an event is pending,
   its readout starts at once instead. *L2 delayed* stays on, and the
   readout has to use that event's pipeline cell.
7. **Fast Clear.** From the central trigger, at any time. It clears
   *prompt* and the 3rd-level bits and restarts the scan program. During
   a front-end readout the restart waits for the stop bit. CR1 bit 4
   disables it.
8. **3rd-level keep** only sets its status bit. **3rd-level reject** aborts
   a running readout, restores *L2 delayed* from the pending state, sets
   *Front-End Ready* and restarts the scan. CR2 bits 14/15 disable them.

*run* is the internal run enable (CR1 bit 2), or the external run input when
CR1 bit 3 does not disable it. A software trigger command acts as a 2nd-level
trigger. With CR1 bit 7 (automatic 1st-level sequence) it also acts as a
1st-level trigger in the same clock.

## VME interface

`vme_slave` is a synchronous slave.

- **Cycles.** It accepts A24 (AM 0x39/0x3D, base from `base_a24` on
  A23..22) and A32 (AM 0x09/0x0D, base from `base_a32` on A31..22). The
  module occupies a 4 MB window.
- **Transfers.** D32 (LWORD* low, A1 low) and D16 (LWORD* high). In D16,
  A1 = 0 reads or writes the upper half of a 32-bit location. Single-byte
  cycles get no DTACK.
- **Decoding.** A cycle is decoded once, when both data strobes have been
  seen. The slave then waits for AS* to be released before decoding again.
  This keeps it safe when the master changes the address while the
  synchronisers still show the old strobes.
- **Timing.** DTACK* follows the data strobe by about four to five board
  clocks (at most 53.8 ns measured at 80 MHz).
- **Interrupter.** It drives IRQ*[*n*] with *n* from CR1 bits 10..9 (0 = off,
  1..3). It answers the acknowledge cycle for that level with the 8-bit
  vector (CR1 bits 15..11 in the low five bits), releases the request
  (release on acknowledge) and passes other acknowledge cycles down the
  IACKIN*/IACKOUT* daisy chain.

### Address map (byte offsets in the window)

| offset | contents |
|---|---|
| 0x000000 | sequencer memory, 128K × 32 |
| 0x100000 | pedestal memories: channel in A19..18, cell in A17..13, strip in A12..2; data in bits 7..0 |
| 0x200000 | raw data: A13 selects channels 0/1 or 2/3, A12..2 the strip. One 32-bit word is {even channel sample, odd channel sample}, 16 bits each, sample in bits 12..0 (bit 12 = overflow) |
| 0x280000 | pointer memories: channel in A14..13, cluster index in A12..2 |
| 0x300000 | registers (below), word offsets |

Two 16-bit samples per 32-bit word means the complete event of 4 × 2048
samples takes 4096 D32 transfers. In hit-and-cluster mode, a reader can
fetch one channel's samples with D16 cycles.

### Registers (word offset × 4 from 0x300000)

| word | register |
|---|---|
| 0 | CR1: 0 pedestal enable, 1 internal clock, 2 internal run enable, 3 external run disable, 4 external Fast Clear disable, 5 Front-End Ready enable, 6 external L1 disable, 7 automatic L1 sequence, 8 control signals enable, 10..9 interrupt level, 15..11 interrupt vector |
| 1 | CR2: 11..0 supply on (Va1..Va4, Vd1..Vd4, Vb1..Vb4), 12 disable analogue input of channels 0–1, 13 of channels 2–3, 14 disable external L3 reject, 15 disable external L3 keep |
| 2 | status (read only): 0 sequencer running, 1 scan phase, 2 L2 prompt, 3 L2 delayed, 4 Front-End Ready, 5 interrupt, 6 L2 keep (level of the 2nd-level trigger input), 7 L3 keep, 8 L3 reject, 12..9 supplies Va*i* and Vd*i* both on |
| 3 | command (write 1 to pulse): 0 reset L2 delayed, 1 start scan, 2 start readout, 3 start test, 4 clear interrupt, 5 software trigger, 6 stop sequencer |
| 4 | 32-bit event counter (writable) |
| 5, 6, 7 | scan, readout and test start addresses |
| 8–11 | hit thresholds, channels 0–3 |
| 12–15 | minimum cluster widths |
| 16–19 | coarse pedestal DAC codes (8 bits, to `coarse_code`) |
| 20–23 | bias voltage DAC codes (8 bits, to `bias_code`) |
| 24–27 | accepted cluster count of the last event (read only) |
| 32 | sequencer address (read only) |
| 33 | overload-tripped flags of the 12 supplies (read only) |
| 64 + 4·ch + k | channel counters: k = 0 CH1, 1 CH2, 2 cell (read/write) |

The bit assignments of CR1, CR2 and the status register follow the original
board. Words 3 to 64+ are this design's own layout of the controls the board
describes only by function. All registers reset to 0, so the supplies start
switched off.

## Overload protection of the switching supplies

`overload_protection` is one per supply (12 in all). It uses a simple fact: a
healthy switching regulator stops switching now and then once its output is
in regulation, while an overloaded one switches all the time. Two
retriggerable monostables are built as counters:

- **MM1** restarts on every falling edge of the regulator's switch output
  `reg_sw`. Its pulse (`MM1_TICKS`, default 1200 clocks = 15 µs) is 1.5
  periods of an assumed 100 kHz regulator. If switching never pauses, MM1
  simply stays high.
- **MM2** restarts on every rising edge of MM1, and on switch-on. Its output
  *is* the regulator's ON input. If MM1 does not rise again within
  `MM2_TICKS` (default 80000 clocks = 1 ms), MM2 runs out and the supply goes
  off. Once off, the regulator stops switching and MM1 falls. That falling
  edge does not restart MM2, so the supply stays off. A tripped supply also
  ignores any later activity on `reg_sw`. The trip flag and the off state
  hold until software clears and sets the enable bit again.

The 1 ms interval also covers the power-on phase, when the regulator
switches continuously. Scale both counts to the real regulator frequency and
start-up time.

## Timing against the original board

These are the results of the end-to-end testbench at the default sizes (80
MHz board clock, 5 MSps):

| operation | original board | this design |
|---|---|---|
| front end → raw data memory, 4 × 2048 samples | ≈ 410 µs | 412.4 µs (2052 conversions × 200 ns + start) |
| raw data → VME, 4096 D32 transfers | < 510 µs, ≈ 120 ns per cycle | 614.4 µs (150 ns per cycle, of which the slave takes ≤ 53.8 ns; the rest is the test's bus master) |
| hit mode, about 10 % occupancy | < 50 µs | 43.2 µs (288 transfers) |
| hit-and-cluster mode, about 10 % occupancy | not given | 249.5 µs (1663 transfers) |

Higher sample rates (the original board runs up to 10 MSps) need a 20 MHz
sequencer step rate:

- with `STEP_DIV` = 4 at 80 MHz;
- or with `ext_clk` at 20 MHz, which is the limit of the synchroniser (each
  half period must last at least two board clocks).

The end-to-end testbench runs a fourth event with a 20 MHz `ext_clk`. Its
front-end readout takes 205.4 µs, and the raw data read back match. The
`STEP_DIV` = 4 variant was not simulated.

## Parameters

| where | parameter | default | notes |
|---|---|---|---|
| `onsiroc_pkg` | `N_CH`, `N_STRIPS`, `ADC_BITS`, `N_CELLS`, `SEQ_AW`, `N_SUPPLIES` | 4, 2048, 12, 32, 17, 12 | sizes of the original board |
| top, `sequencer` | `STEP_DIV` | 8 | board clocks per sequencer step |
| top, `input_channel`, `channel_counters` | `DELAY` | 4 | CH2 lag in conversions; must equal the FADC latency + 1 |
| top, `overload_protection` | `MM1_TICKS`, `MM2_TICKS` | 1200, 80000 | monostable times in board clocks |

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=<n> failures=<m>`
and has a watchdog. With Verilator 5 (the `--timescale` matters, because the
testbenches use `ns` delays):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -Irtl -y rtl -y tb +libext+.sv rtl/onsiroc_pkg.sv tb/tb_onsiroc_top.sv \
  --top-module tb_onsiroc_top -o sim
obj_dir/sim
```

Replace the testbench name to run another one:

| testbench | what it checks |
|---|---|
| `tb_onsiroc_top` | The whole module at full size, end to end: configuration, scan, L1 freeze, L2, front-end readout time, interrupt and vector, raw, hit and hit-and-cluster readout against computed data, pending second event, Fast Clear during readout, L3 reject, SQD4 shortening, supply overload, a 10 MSps readout with the external sequencer clock. Every mechanism is counted. Runs in under a minute. |
| `tb_input_channel` | one channel with the analogue model: pedestal per cell, CH2 delay, raw data, clusters |
| `tb_hit_cluster_finder` | random events against a reference cluster list, edge strips, overflow |
| `tb_channel_counters` | CH1/CH2 lag, cell counter, VME loads |
| `tb_pedestal_memory`, `tb_raw_data_memory`, `tb_pointer_memory` | both ports, enable and overflow handling |
| `tb_sequencer` | next-address chaining, bit 14, starts and priority, stop, step period, SQD4, external clock |
| `tb_trigger_control` | the trigger sequence above, including pending event, deferred Fast Clear, L3 reject, disables |
| `tb_control_registers` | register bits, byte enables, commands, decoded fields |
| `tb_vme_slave` | A24/A32, D16/D32, foreign cycles, DTACK release, interrupter and daisy chain |
| `tb_overload_protection` | normal bursts, continuous-switching trip and its timing, supply staying off after the cut-off, trip cleared by switching off, start-up interval, tolerated start-up switching (short monostable times) |

## Departures and open points

- **Interrupt level.** The original description says the interrupter
  works on levels 1 to 7, but its register table has only two level bits.
  This design follows the register table: levels 1–3 can be selected.
  Widening the field needs one more CR1 bit, which has none free.
- **Chosen here, not taken from the original description:**
  - the sequencer bit assignment beyond bits 4, 14 and 15;
  - the local address map and the extra registers;
  - the pointer word layout;
  - what a 1st-level trigger does (halt the scan);
  - what the automatic 1st-level sequence does;
  - that a Fast Clear during a readout is deferred to its end;
  - `DELAY`;
  - the monostable times.
- **Two input-disable bits.** CR2 has two bits that both disable the
  analogue input. Here each controls one pair of channels.
- **VME speed.** The design's own share of a raw-mode transfer (DS to
  DTACK ≤ 54 ns) fits the original board's 120 ns cycle. The testbench's
  bus master is slower, so the simulated raw readout takes 614 µs rather
  than 500 µs.
- **Left outside the logic:** the analogue branch, DACs, FADC, regulators,
  the bias current measurement and the front-panel drivers. Their digital
  signals are ports of `onsiroc_top`.
- **Board-level reset.** Not specified by the original description. All
  state here uses a synchronous active-high `rst`.
