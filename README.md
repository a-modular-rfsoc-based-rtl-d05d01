# Cycle-exact qubit controller for the programmable logic of an RFSoC

Superconducting qubits are driven and read out with short microwave pulses
whose timing, frequency, amplitude and phase must be exact to the
nanosecond, and an experiment is a long, precisely timed chain of such
pulses and measurements. This RTL implements the programmable-logic half of
such a controller: a set of identical **digital unit cells**, each holding
everything needed for one qubit (a small RISC-V sequencer, two pulse
generators, a demodulating recorder, result memories and digital trigger
outputs), plus the glue that starts cells together and mixes their sample
streams onto shared converter channels.

The main idea is determinism. Everything runs on one 250 MHz clock with no
clock-domain crossings; the on-chip bus answers every access after a fixed
number of cycles; and a program running on the sequencer starts all
actions of a cell by *broadcasting* a single trigger word that every module
on the bus sees in the same cycle. The time of every pulse is therefore
known to the cycle (4 ns) from the program alone.

The design follows a published RFSoC controller architecture. Everything
the publication specifies (block structure, instruction set and timing, bus
behaviour, module features, counts and memory sizes) is kept; where it is
silent, the choices made here are listed in the last sections.

## Sample streams

All sample streams carry **4 complex samples per clock cycle** (1 GS/s at
250 MHz), each sample a pair of signed 16-bit I and Q values (`qc_pkg::beat_t`,
lane 0 is the earliest sample). Generators stream without pause
(`tvalid` = 1). The RF data converters, their filters and the analog mixers
are outside this RTL; the top level brings the 1 GS/s complex streams out as
ports.

## System level (`qc_pl_top`)

```
 AXI4-Lite ──► axil_interconnect ──► cell 0 … cell 14, coordinator, combiner
                                      │
 cell_coordinator ── start[c] ───────►│  (same cycle for every selected cell)
 cells' readout/control streams ──► sample_combiner_splitter ──► 4 DAC streams
 4 ADC streams ──► sample_combiner_splitter ──► each cell's recorder input
```

* `NCELLS` = 15 cells, `NDAC` = `NADC` = 4 complex channels (eight
  converters used as I/Q pairs).
* **AXI windows** of 256 kB: window `c` (byte address `c << 18`) is cell `c`,
  window 15 the coordinator, window 16 the combiner. An address in any other
  window answers DECERR. The interconnect handles one transaction at a time.
* **Cell coordinator**: writing a bit mask to register 4 sends a one-cycle
  start pulse to every selected cell in the same clock cycle (two cycles
  after the bus request). Register 5 shows which cells are still running,
  register 6 the last mask.
* **Combiner/splitter**: register `4+d` is a mask for DAC channel `d`; bit
  `2c` adds cell `c`'s readout stream, bit `2c+1` its control stream. The sum
  is saturated to 16 bits and registered (one cycle). Register `16+c` picks
  the ADC channel feeding cell `c`'s recorder (also one registered cycle).
  Frequency-multiplexed readout of several qubits on one line is done by
  adding several readout streams onto one DAC and feeding the same ADC to
  every recorder; each recorder then demodulates its own tone.

## Inside a digital unit cell

```
            ┌───────────────┐   WB master 0 (priority)
 start ────►│   sequencer   │──────────┐
 state ────►│  (RISC-V)     │◄─ slave 0│
            └───────────────┘          ▼
 AXI4-Lite ─► axil2wb_bridge ── WB master 1 ─► wb_interconnect ─► slaves 1..5
                                                         │ broadcast (111)
   slave 1  signal_generator  (readout)   ──► readout stream
   slave 2  signal_generator  (control)   ──► control stream
   slave 3  signal_recorder   ◄── ADC stream ──► result, state
   slave 4  data_storage      ◄── result, state
   slave 5  digital_trigger   ──► 8 digital outputs
```

Cell byte address = `slave * 0x8000 + register * 4`.

### The Wishbone bus and its fixed latency

The cell bus has 16-bit register addresses and 32-bit data. Address bits
15:13 select the slave; `111` is the **broadcast** prefix, which forwards the
access to every slave at once.

* Every slave uses the common front end `wb_reg_slave`: the request is
  registered, and the acknowledge (with read data) comes **exactly two
  cycles** after the request, never stalled.
* `wb_interconnect` accepts **one access per cycle, pipelined**, and itself
  generates the acknowledges from this fixed latency (an assertion checks the
  slaves keep it). A sequencer read returns after **4 cycles**.
* The sequencer always wins a conflict. The bridge's request first enters a
  holding register (so its accesses take **5 cycles**), and it is stalled
  while the sequencer uses the bus; the stall cannot affect the sequencer's
  timing.

### Common registers and the trigger word

Every slave starts with the same four registers:

| byte | register | content |
|---|---|---|
| 0x0 | info | `{ID[15:0], version[15:0]}` |
| 0x4 | status | module specific |
| 0x8 | control | module specific |
| 0xC | trigger | 20-bit trigger word in bits 31:12, strobed by a write |

Trigger word fields (`qc_pkg::TF_*`, `TB_*`):

| bits | 19:16 | 15:12 | 11:8 | 7:4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| field | DT set | control SG set | SR mode | readout SG set | – | sync | start | reset |

A zero field means "no operation" for that module, so one broadcast write can
start a readout pulse, a recording and a digital trigger in the same cycle,
while leaving the control generator untouched. `sync` restarts all NCOs,
`reset` stops and clears the modules; the `start` bit is carried but no
module acts on it.

### Sequencer

A multi-cycle RV32 core with 32 registers and a 1024-word program memory.
It decodes the RV32I ALU, branch, jump, LUI/AUIPC and load/store
instructions, MUL, and six sequencing instructions:

| instruction | encoding | action |
|---|---|---|
| TRIG w | custom-1 (`0101011`), bits 31:12 = w | broadcast write of w to the trigger register |
| WAIT-IMM n | custom-0 funct3 000, imm = n | wait n cycles |
| WAIT-REG rs1 | custom-0 funct3 001 | wait x[rs1] cycles |
| WAIT-REG-TRIG rs1 | custom-0 funct3 010 | wait x[rs1]−1 cycles (to follow a TRIG) |
| SYNC-EXT rd | custom-0 funct3 011 | wait for the qubit state from the recorder, write it to rd |
| SYNC-START | custom-0 funct3 100 | end the run, wait for the next start |

Cycle counts are fixed so a program's timing can be computed exactly: 1 for
ALU, LUI/AUIPC, not-taken branches and TRIG; 3 for taken branches, JAL and
JALR; 6 for MUL; 8 for LW/SW. TRIG does not wait for the acknowledge, so
triggers can be issued every cycle; a later load or store first waits until
all outstanding triggers are acknowledged. Loads and stores address Wishbone
registers directly (low 16 bits of `rs1 + imm`), so a program can
reconfigure modules or read results mid-experiment. A state that arrives
before SYNC-EXT is kept until consumed.

The next program counter is computed combinationally and the program
memory is read synchronously, so straight-line code runs without fetch
bubbles. Slave registers: control bit 0 start, bit 1 stop; status bit 0
running, bit 1 waiting in SYNC-EXT, bits 25:16 program counter; registers
32–63 are x0–x31 (writable while stopped); 0x400 onward is program memory.

### Signal generator (`signal_generator`, two per cell)

Fifteen **trigger sets** each describe a pulse: duration in cycles, phase
offset, amplitude, start rows of the I and Q envelopes (they may be the
same), a *hold* flag (keep the last envelope value until the next trigger,
for continuous waves or trapezoids) and a *persist* flag (add the phase
offset permanently to the global phase reference: a virtual Z gate). The
envelope memory holds 4096 16-bit samples, addressed in rows of four.

Pipeline: envelope rows → amplitude scaling → complex multiplication with the
NCO (phase = global reference + set offset) → per-quadrature gain
calibration → stream. The first sample leaves 6 cycles after the bus request
of the trigger.

Registers: 4 NCO phase step per sample (2³² = one turn); 5 gains I/Q (Q2.14);
6 global phase (read only); `64+4s+{0,1,2}` set `s` (`{persist, hold,
duration}`, `{amplitude Q1.15, phase offset /65536 turn}`, `{Q row, I row}`);
0x800 onward the envelope, two samples per word.

### Signal recorder (`signal_recorder`)

The input stream is conditioned continuously,
`(I,Q)out = M · ((I,Q)in − offset)` with a 2×2 matrix in Q2.14, and mixed
down by the conjugate of its NCO. A trigger starts a recording after a
programmable **trigger offset** (so one TRIG can start the readout pulse and
its recording despite the cable delay). During the window of programmable
length the mixed samples are summed (boxcar integration) and the conditioned
samples are written to a 4096-sample time-trace memory. The result (I, Q,
32 bit each) leaves 3 cycles after the window; a **state** bit is estimated
by projecting the result on a programmable axis and comparing it with a
threshold. Results are also summed for averaging until reset.

Modes (SR field of the trigger word): 1 SINGLE (result and state to the
data storage, state to the sequencer), 2 ONESHOT (state to the sequencer
only), 3 CONTINUOUS (back-to-back windows until STOP), 4 STOP (the running
window completes), 5 reset.

Registers: 4 offsets, 5–6 matrix, 7 NCO step, 8 trigger offset, 9 window
length, 10 axis `{sin, cos}` (Q1.15), 11 threshold, 12–14 last result I, Q
and state, 15 result count, 16–19 averaging sums, 20 trace length, 0x1000
onward the trace.

### Data storage (`data_storage`)

Four 1024-word memories, each with its own data control: a selectable source
(result I, result Q, state, states packed 32×1 bit, states packed 10×3 bit,
or words written over the bus), append until full with an overflow flag, or
circular wrap-around. The second memory port is readable over the bus.
Registers: `4+m` config `{circular, source}`, `8+m` status `{overflow, full,
empty, size}`, `12+m` append register, 0x1000 + `m*1024` memory `m`. A
control write with bit 0 or a reset trigger clears all channels.

### Digital trigger (`digital_trigger`)

Fifteen sets, each naming which of the 8 outputs to raise (mask), for how
many cycles, or continuously; a set with duration 0 that is not continuous
switches its outputs off. Each output has its own start offset (to align
external equipment with different delays) and an inversion bit.

## Where this RTL departs from, or adds to, the published design

* **Sizes not given by the source** are chosen here: 1024-word data storage
  memories (matching its stated block-RAM share), a 4096-sample time trace,
  a 1024-entry NCO table, 32-bit NCO phase.
* **Encodings and register maps** (custom instruction encodings, trigger
  sets, module registers, AXI windows, mode numbers) are this design's.
* **State estimation** method is not specified by the source; a projection
  and threshold (one state bit) is used. The 3-bit state path and 10-state
  packing exist but only values 0/1 are produced.
* The sequencer decodes 38 instructions (the source counts 33 without listing
  them).
* The processing system (Linux, host services), converters, their filters,
  analog front end and output pads are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/` printing
`TB_RESULT checks=N failures=M`. The end-to-end testbench `tb_qc_pl_top`
runs the full-size design (15 cells, all parameter defaults) with every DAC
looped back to an ADC: a calibrated five-qubit Ramsey sequence in lock step
(two 13-cycle π/2 pulses with a delay growing by 4 cycles per point,
frequency-multiplexed readout on one channel, SYNC-EXT branching, states
stored and checked), and on a sixth cell a bus-stall, CONTINUOUS/STOP
overflow, circular buffer and ONESHOT scenario. It counts each of these
mechanisms and fails if any never happened. There is no qubit model: the
recorded states follow the readout pulse phase, not a simulated qubit.

Run a testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/qc_pkg.sv rtl/seq_pkg.sv tb/rv_asm_pkg.sv tb/tb_qc_pl_top.sv \
  --top tb_qc_pl_top -o sim
./obj_dir/sim
```

`tb/rv_asm_pkg.sv` holds small functions that assemble instructions for
test programs (`TRIG(...)`, `WAIT_IMM(...)`, `BEQ(...)`, …).
