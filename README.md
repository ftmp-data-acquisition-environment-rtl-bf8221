# FTMP system bus data acquisition system (DAS)

The Fault-Tolerant Multi-Processor (FTMP) is a test-bed whose processor and
memory triads talk over a redundant serial system bus: five each of a poll bus
(P), a transmit bus (T), a receive bus (R) and a clock bus (C). Everything
that describes the machine's state passes over that bus every few tens of
milliseconds. The DAS is a passive observer of those 20 lines. It works like a
small logic analyser dedicated to this bus: it waits until a chosen 16-bit
word appears on a chosen line, then records a chosen number of time slices of
all 15 data lines into a local memory and hands the memory to the host
computer by DMA. The observed system is never touched, and the host only sets
parameters, starts the DAS and collects the result.

This repository holds synthesizable SystemVerilog for the DAS board and its
digital front end, plus self-checking testbenches with behavioural models of
the FTMP bus and of the host's DMA controller.

## The stored word: one time slice of the bus

Each word written to the buffer is a snapshot of all data lines taken at one
edge of the sampling clock:

| bit | 15 | 14..10 | 9..5 | 4..0 |
|-----|----|--------|------|------|
| line | unused (0) | P5..P1 | R5..R1 | T5..T1 |

Because every FTMP bus is serial, one 16-bit FTMP word on one bus is spread
over 16 consecutive DAS words, one bit per word. In exchange, those same 16
DAS words also hold whatever the other 14 lines carried at the same instants,
so skew between the redundant copies of a bus (for example T1 against T2 and
T3) is directly visible in the data.

## Trigger line and sampling clock are chosen together

The P lines are NRZ at 1 MHz and are sampled by the C clock. The five C lines
are phase-locked copies of one clock, so they are voted into a single clock C.
The T and R lines carry 8 Mbit/s pulse-width modulated data; the redundant
copies are not guaranteed to be within half a bit (62.5 ns) of each other, so
each T and R line gets its own demodulator and its own recovered bit clock.

A single 4-bit selection code therefore picks both the line searched for the
trigger word and the clock that samples everything. The code is the line's
bit number in the DAS word:

| code | trigger line | sampling clock |
|------|--------------|----------------|
| 0..4 | T1..T5 | T1C..T5C (recovered) |
| 5..9 | R1..R5 | R1C..R5C (recovered) |
| 10..14 | P1..P5 | C (voted) |
| 15 | none, the DAS never triggers | none |

All 15 lines are sampled by the selected clock, not by their own. A recovered
T or R clock only runs while its line carries pulses, so acquisition on a T or
R code pauses when that line is idle. The C clock never stops.

## Acquisition cycle and host protocol

The host (a UNIBUS DMA controller driven by a VAX device driver in the
original system) sees four functions and a status register:

* **LOAD**, followed by three 16-bit control words in this order: trigger
  line code (low 4 bits used), trigger word, number of DAS words to acquire.
* **START** arms the trigger search. The DAS is armed one system clock after
  the strobe, well inside the 200 ns the original hardware promised.
* **RESET** stops whatever the DAS is doing and returns it to idle. It does
  not clear the three control registers, so START can follow directly.
* **READ** down-loads the buffer, if data is ready.
* The **csr** output is the status register. Bit 10 is the ready flag.
  Bits 3:0 show the trigger code. Bit 8 means armed, bit 9 acquiring, bit 11
  down-load in progress and bit 12 start pending. The other bits are 0.

```
IDLE --START--> ARMED --trigger word seen--> ACQ --count reached--> READY
 ^                                                                   |
 |                                                                 READ
 +---------------- last word taken (no START pending) ---------- DNLOAD
                   last word taken, START pending --> ARMED
```

* The trigger search shifts the selected line in at each sampling edge, the
  first bit received ending in bit 15. A match counts only after 16 bits have
  arrived since the search began.
* The sample that completes the trigger word is not stored. Storage starts at
  the next sampling edge, at address 0, one word per edge.
* When the write address equals the word count, csr bit 10 is set. A count of
  0 gives an empty buffer. A count above the buffer size is limited to the
  buffer size.
* During DNLOAD the words come out in order on `out_data` with `out_valid`.
  The host takes each one with `out_ready`. After each word one clock passes
  before the next is offered (read-port latency). The pace is the DMA
  controller's: about 400K words/s in the original system.
* csr bit 10 stays set through the whole down-load and clears when the last
  word is taken. A host can poll it to know when the transfer is over.
* A START while data is ready or being down-loaded is remembered. The DAS
  re-arms as soon as the last word has gone out. This gives repetitive
  acquisition with no dead time spent waiting for the host. A START while
  already armed or acquiring restarts the search.
* A READ outside READY is ignored. Control words are accepted in any state
  and take effect at once.

## Front end: vote and pulse-width demodulation

* `c_bus_voter` is a 3-of-5 majority of the C lines. It masks any two failed
  lines.
* `pwdm` assumes that each 125 ns T/R bit cell begins with a rising edge. A
  long pulse (about 3/4 of the cell) is a 1 and a short one (about 1/4) is a
  0. At SPB = 8 system clocks per cell, the demodulator looks at the line
  THRESH = 4 clocks after the rising edge. Still high means 1. It updates
  `data` and then pulses the recovered clock `bclk`.
  * The decision is taken at a fixed time after the cell starts, not at the
    end of the pulse. So lines whose cells are aligned produce their clocks in
    the same cycle, whatever bits they carry.
  * When one line's clock samples all lines, the other lines' bits have
    already settled. A demodulator that decided at the falling edge would
    make a 0 line's clock fire before a 1 line had finished its pulse.

## Clocking

The whole design runs on one system clock, `clk`, assumed to be 64 MHz: eight
samples per T/R bit cell. The 20 raw lines pass two-flop synchronizers. Bus
clock edges are detected as one-clock strobes (`sample_gate`), and are not
used as clocks. The trigger AND gate of the original board becomes `store =
sample & acquiring`.

From a sampling edge on the bus to the memory write takes 2 clocks of
synchronizer, 1 clock of edge detect and 1 clock of latch. For T/R lines the
demodulator adds THRESH + 2 clocks. None of this affects the stored data,
since all lines pass the same path.

## Module map

| module | role |
|--------|------|
| `das_top` | the DAS: front end, trigger, latch, buffer and control wired together |
| `das_pkg` | DAS word and selection-code types, function and state enums, csr bit positions |
| `sync_2ff` | two-flop synchronizer for the raw bus lines |
| `c_bus_voter` | 3-of-5 vote of the C lines |
| `pwdm` | pulse-width demodulator, ten instances (R1-5, T1-5) |
| `trigger_mux` | selection code to trigger line and paired clock |
| `sample_gate` | rising-edge strobe of the selected clock, ANDed with "acquiring" |
| `trigger_circuit` | 16-bit serial compare against the trigger word |
| `das_latch` | captures the 15 lines as one DAS word, one clock ahead of the write |
| `das_buffer` | DEPTH x 16 memory, write counter compared with the count, read counter |
| `das_control` | control registers, sequencer, csr, host handshake |

Parameters of `das_top`:

| parameter | default | meaning |
|-----------|---------|---------|
| DEPTH | 8192 | buffer words; the board was designed to grow to 64K (set 65536) |
| SPB | 8 | system clocks per T/R bit cell (64 MHz / 8 MHz) |
| PWM_THRESH | 4 | clocks after a rising edge at which the bit is read |

## What is not here

* The analog side is not modelled: line receivers, drivers, terminations and
  the TTL/ECL level interfaces. `das_top` takes the digital line levels.
* The UNIBUS DMA controller and the VAX host are represented only by the
  simple host port. That port is this design's own. A real board would adapt
  it to the DMA controller's user interface: 16-bit data in each direction,
  function lines and status lines.
* The device driver and application software are outside the RTL.

## Where the design rests on assumptions

These points are choices of this design, not properties of the original
board:

* the single 64 MHz clock and the synchronizers
* the exact PWM format and the mid-cell decision point
* the majority vote
* MSB-first order of the trigger word
* the 16-bit guard before a match counts
* the 2-bit function encoding and the handshake
* the csr debug bits
* limiting counts above the buffer size
* the handling of START and READ in each state

Each module's header comment says which of its parts are such choices.

The design has been checked only in simulation, against the bus and host
models in `tb/`. Those models follow the same assumptions, so the tests show
that the design is consistent with them, not that it matches real FTMP
signals. The part most likely to need changing on real hardware is the
pulse-width demodulator: its format, thresholds and system clock rate. The
parts taken from the original design are:

* the line-to-bit assignment
* the code-to-clock pairing
* the three-word parameter block
* the ready flag in csr bit 10
* RESET keeping the control registers
* acquisition starting at address 0 and stopping when the address equals the
  count
* the 8K-word buffer

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Build any of them with Verilator 5, for example the end-to-end
test:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/das_pkg.sv tb/tb_das_top.sv --top-module tb_das_top -Mdir obj_top
obj_top/Vtb_das_top
```

`tb_das_top` runs `das_top` at its default parameters, through
`tb/ftmp_bus_model.sv` (C, P, T and R traffic) and `tb/dma_host_model.sv`
(400K words/s down-load). It takes a few seconds and covers five runs:

1. Trigger on T1 and fill the whole 8192-word buffer. It checks the fill time
   (8192 bit times, 1.024 ms), every word, the 400K words/s down-load and the
   ready flag clearing.
2. Trigger on P2 with two C lines stuck, plus a START during the down-load,
   which re-arms the DAS afterwards.
3. RESET while armed, new parameters, then a trigger on R3 with idle gaps on
   the T/R lines.
4. Word count 65535, limited to 8192, then RESET with data waiting.
5. RESET in mid-acquisition, then START with the kept parameters: trigger
   word AAAA on T1, 50 words.
6. T2 delayed by one bit time and T3 by two, inside the bus model. Sampled
   with the T1 clock, the stored words show T2 one bit late and T3 two bits
   late, which is how skew inside a bus triad becomes visible.

The expected words come from the traffic the testbench queued. It scans the
selected line's bit stream for the first match and takes the slices that
follow. At the end the testbench prints how often each mechanism occurred,
and fails any that never did.

Two more end-to-end testbenches run the acquisition workloads the DAS was
built for:

* `tb_das_workloads` runs at the default size. It models the fault-effect
  experiment: about 150 bus words captured twice every 40 ms, which means
  2400 DAS words per capture. It runs two captures back to back, the second
  armed by a START given during the first down-load, and requires each to
  finish in under 20 ms. It also repeats the 50-word example acquisition.
* `tb_das_expanded` builds `das_top` with `DEPTH = 65536`, the expanded
  buffer. It acquires the largest count the 16-bit register allows, 65535
  words, and down-loads them. This takes about 10 s of simulation.

Each block also has its own testbench, `tb/tb_<module>.sv`, checked against
independent reference values.

## Rates

With the default sizes, a full 8192-word buffer fills in 1.024 ms on an
8 Mbit/s line. At 400K words/s it down-loads in 20.48 ms. With about 60 us of
command overhead, that is roughly 380K words/s of sustained acquisition.
In this RTL a parameter load takes four system clocks and START one. The
microseconds a real host needs for these are spent in the driver and the DMA
controller. That
is about eight times the CTA and 1553 paths the DAS was added beside.

A typical fault-effect experiment needs about 150 bus words, twice every
40 ms. Sent serially on one bus, that is 2400 DAS words. They take about
6.4 ms per cycle, which fits easily.
