# SAND: a four-event systolic neural processor for trigger boards

This is synthesizable SystemVerilog for a neural-network trigger processor
built around the SAND chip (Simple Applicable Neural Device) and the VME board
that carries four of them.

The problem it solves is a memory bottleneck. A layer of a feed-forward network
is a matrix-vector product. With one processing element (PE) per neuron, each
PE needs its own weight memory. With a single weight memory, that memory must
deliver one weight per PE per cycle.

SAND avoids both by processing **four events (patterns) at once**. Every
weight read from memory serves four activities, one from each event, over four
cycles. So one chip needs only one weight per cycle and one activity per
cycle, and its four PEs stay busy all the time. The matrix-vector product of
one event becomes a matrix-matrix product over four events.

Four chips share one activity bus and together compute 16 neurons at a time
(a *segment*). At 50 MHz this is 4 multiply-accumulates × 4 chips = 800 million
operations per second.

The board around the chips does the following:
- collects events from the data-acquisition stream;
- runs the network layer by layer and segment by segment;
- sends each hidden layer through a programmable activation table;
- returns the results event by event, either as 16-bit values or as yes/no
  trigger bits against a threshold.

## Block map

```
 input stream ─► sand_in_ctrl ──(4 × FIFO_in)──┐
                                               ▼
 host writes ─► sand_cfg_ram ─► sand_engine ┌──────────────────────────────────────┐
             ─► weights / LUT ─────────────►│ sand_sequencer                       │
                                            │   │ BUS_A (activity + tag)           │
                                            │   ├─► sand_chip #0 ◄─ sand_wram #0   │
                                            │   ├─► sand_chip #1 ◄─ sand_wram #1   │
                                            │   ├─► sand_chip #2 ◄─ sand_wram #2   │
                                            │   └─► sand_chip #3 ◄─ sand_wram #3   │
                                            │ sand_result_path (BUS_O) ─► sand_lut │
                                            │      └─► FIFO_B / FIFO_A / output    │
                                            └──────────────────────────────────────┘
                                               ▼
 output stream ◄─ sand_out_ctrl ◄──(4 × FIFO_out, threshold comparator)
```

Inside a chip (`sand_chip`): four `sand_pe`. Each PE has a `sand_alu` with
four accumulators, a `sand_autocut`, and a bank of four results. After the PEs
come an output buffer and a `sand_postproc` that does pass, max search or min
search.

## The systolic schedule

This is the central idea and the part most worth understanding before you
change anything.

Activities enter a chip in this order:

```
o[0][e0] o[0][e1] o[0][e2] o[0][e3] o[1][e0] o[1][e1] ...
```

Here `o[j][e]` is input `j` of event `e`. Each activity carries a tag with its
event number, whether it is the first or last input of the sum, and the
operation.

Activities move from PE to PE through one register per PE, so PE k sees an
activity k cycles after PE 0.

The weight bus carries `w[k][j]` (the weight of PE k's neuron for input j) in
the cycle in which `o[j][e_k]` enters the chip. PE k latches it k cycles later,
just as `o[j][e0]` reaches it. It then uses that weight for the next four
cycles, once per event. So every cycle the chip takes one activity and one
weight, and does four multiply-accumulates.

The first part of this example (`n_in = 2`) looks like this. Entries are the
products each PE accumulates in a cycle:

| cycle | bus act | bus wgt | PE0        | PE1        | PE2        | PE3        |
|-------|---------|---------|------------|------------|------------|------------|
| 0     | o0e0    | w00     | w00·o0e0   |            |            |            |
| 1     | o0e1    | w10     | w00·o0e1   | w10·o0e0   |            |            |
| 2     | o0e2    | w20     | w00·o0e2   | w10·o0e1   | w20·o0e0   |            |
| 3     | o0e3    | w30     | w00·o0e3   | w10·o0e2   | w20·o0e1   | w30·o0e0   |
| 4     | o1e0    | w01     | w01·o1e0   | w10·o0e3   | w20·o0e2   | w30·o0e1   |

Each PE keeps four 40-bit accumulators, one per event, selected by the tag.

When the tag marks the last input, each accumulator is cut to 16 bits and
stored in the PE's bank. When PE 3's bank is complete, all four banks are
copied to the chip's output buffer. The 16 results (4 neurons × 4 events)
then leave one per cycle, starting 10 cycles after the last activity entered.

A chip can only take a new segment every 16 cycles, because that is how long
its output buffer takes to empty. The board's shared result bus is slower
still (see below).

Because the operation travels in the tag, a change from multiply-accumulate to
square-accumulate takes effect correctly in every PE, even while older terms
are still in the pipeline.

## The processing element

`sand_alu` is a three-stage pipeline:

1. **Operand registers and pre-adder.** The pre-adder forms `d = act − w`.
2. **Multiplier.** It forms `act·w` for multiply-accumulate (MAC) or `d·d`
   for square-accumulate (SQR).
3. **Accumulator.** The selected 40-bit accumulator is loaded on the first
   input and added to on later inputs.

SQR gives the squared Euclidean distance between the input vector and the
weight vector. Radial-basis and Kohonen layers use it, usually together with a
minimum search.

Forty bits hold 512 products of two 16-bit numbers. So 512 is the largest
fan-in (`MAX_NIN`).

`sand_autocut` turns the 40-bit sum into a 16-bit word:
- It takes the window `sum >>> shift`, with `shift` from 0 to 24 set per
  layer in the configuration word.
- It can round to nearest instead of truncating (`rnd`).
- It saturates to +32767 or −32768 and raises `ovf` or `unf`.

Each chip raises `sat` when a result of its last completed segment saturated.
Only real neurons count, not padding neurons. The top brings the four flags
out. The window is not chosen automatically. The user sets the shift per layer,
which matches how the weight range is scaled.

## Segments, FIFO_A and FIFO_B (`sand_sequencer`)

A layer of `n_out` neurons runs in `ceil(n_out/16)` segments. In each segment
the sequencer streams all `n_in` inputs of the four events, which takes
`4·n_in` cycles. In the same cycles it addresses the WRAMs (weight memories).

Weights are stored in read order, so the WRAM address just counts up by one
per activity. For neuron `n = 16s + 4c + k`, the weight for input `j` is at
`base + (s·n_in + j)·4 + k` in the WRAM of chip `c`.

Activities come from these sources:
- **Layer 0, segment 0** reads the four FIFO_in in turn. A missing (dummy)
  event reads as zero. Every word is also copied into FIFO_A.
- **Later segments of the layer** read FIFO_A as a circular buffer. Each word
  read is written back, except in the layer's last segment, which leaves
  FIFO_A empty.
- **Layer L > 0** reads, in the same circular way, the buffer that layer L−1
  wrote.

**Bias input.** A neuron computes `f(Σ w·o + θ)`. When a layer's `bias` bit
is set, the sequencer appends one more input to every neuron after the `n_in`
real ones. This input is the constant `BIAS_ACT` = 0x4000, which is 1.0 with
14 fraction bits, and is not read from any buffer. Its weight is `θ`. Load the
layer with `n_in + 1` weights per neuron, with `θ` last. The weight layout
above then uses `n_in + 1`.

Results go to FIFO_B for layers 0, 2, 4 and so on, to FIFO_A for layers 1, 3
and so on, and to the output controller for the layer marked `last`. So any
number of layers (up to the 64 words of the configuration memory) runs with
the two buffers.

Timing rules:
- **A segment lasts at least 64 cycles** (`MIN_SEG`). The single result bus
  must carry one segment's 64 results before the next segment's arrive. Layers
  with `n_in < 16` are padded with idle cycles.
- **After a layer's last segment the sequencer waits** at least 40 cycles
  (`T_DRAIN`) and until the result path is empty. Only then does the next layer
  start, because it reads what this layer wrote. In search mode it first
  flushes the chips' searches and then the board-level merger.
- At most two finished batches may be waiting in the output FIFOs. Otherwise
  the sequencer waits before starting a new batch.

## The result bus and the activation table (`sand_result_path`, `sand_lut`)

The four chips finish a segment at the same moment but share one output bus.

Each chip's results first go into its own buffer. The buffers are then read
chip by chip: 16 results per chip, neuron by neuron, events 0..3 within each
neuron. This is exactly the interleaved order the next layer reads.

Results of padding neurons (index ≥ `n_out`) are dropped, so a layer with
`n_out = 20` writes 20 × 4 words.

For layers with `nonlin` set, the result is used as an address into the 64K ×
16 lookup table, which holds any activation function. Otherwise the result is
used unchanged.

In max or min search mode each chip finds its own extreme and neuron index per
event. A second `sand_postproc` on the board merges the four chips. The layer
then outputs two words per event: the extreme value (through the table if
`nonlin`) and the index of the winning neuron. Only real neurons (index <
`n_out`) take part.

## Configuration word

The configuration memory holds 256 bytes, which is 64 layers of one 32-bit
word each. The word is written little-endian at byte address `4·layer`.

| bits  | field  | meaning                                                   |
|-------|--------|-----------------------------------------------------------|
| 9:0   | n_in   | inputs per neuron, 1..512                                 |
| 19:10 | n_out  | neurons in the layer, 1..1023                             |
| 20    | op     | 0 multiply-accumulate, 1 square-accumulate (distance)     |
| 22:21 | pp     | 0 pass all results, 1 maximum search, 2 minimum search    |
| 27:23 | shift  | window position of the 16-bit cut (0..24)                 |
| 28    | rnd    | round to nearest when cutting                             |
| 29    | nonlin | pass results through the activation table                 |
| 30    | last   | last layer: results go to the output                      |
| 31    | bias   | add the constant bias input (see the segments section)    |

The set of fields follows the original board. The bit positions are this
design's own.

## Input and output side

**Input (`sand_in_ctrl`).** Events arrive one after another as `n_in` words
each, on a valid/ready stream. `n_in` is the first layer's fan-in, which the
top keeps a copy of as soon as configuration bytes 0..3 are written.

Event `e` of a group goes into FIFO_in[e], and `ev_ack` pulses after each full
event. A group is handed to the sequencer when four events are in, or when
`in_flush` is high at an event boundary. The group carries a mask of which
events are real. Up to two groups may wait. When both are waiting, or the
target FIFO is full, `in_ready` goes low.

**Output (`sand_out_ctrl`).** Each result of the last layer, tagged with its
event, is written to FIFO_out[event], but only for real events: dummy results
are dropped. When a batch is complete, its events are sent one after the other
with an event number and a last-word flag. The sink can hold the stream with
`out_ready`.

With `thr_en` set, each word is replaced by 1 if it is ≥ `thr` and by 0
otherwise. `out_yes` always carries this comparison.

Input, computation and output overlap. The next group can load while the
current one computes and the previous one drains.

## Programming the board

All host accesses are plain synchronous write ports of `sand_vme_board`:

1. **Configuration.** Write 4 bytes per layer through `cfg_wr_*`. The top
   keeps a copy of layer 0's word, whose `n_in` sets the input event length.
2. **Weights.** For each layer, pulse `wl_start` with `wl_n_in` and `wl_base`.
   Then give the weights on `wl_valid`/`wl_data`, one per cycle, neuron by
   neuron and input by input within each neuron. `sand_wload` spreads them
   over the four WRAMs. Load layer 0 at base 0 and each later layer at the
   `wl_next_base` left by the one before. The sequencer reads the layers back
   to back from address 0.
3. **Activation table.** Write 65536 words through `lut_wr_*`. The address is
   the 16-bit result read as unsigned (two's complement).
4. **Events.** Stream them in. Set `thr_en`/`thr` for yes/no output.

Do not change the configuration while `busy` is high.

## Timing and throughput

For each batch of four events, every layer costs `ceil(n_out/16) ·
max(4·n_in, 64)` cycles of streaming. About 80 cycles per layer come on top
for draining the pipeline and the result bus.

The workload testbench measured these times (20 ns clock):

| network   | cycles / 4 events | µs per event |
|-----------|-------------------|--------------|
| 16:16:16  | 289               | 1.4          |
| 256:16:16 | 1249              | 6.2          |
| 128:32:16 | 1314              | 6.6          |
| 256:32:16 | 2338              | 11.7         |
| 256:64:16 | 4516              | 22.6         |
| 64:64:1   | 1442              | 7.2          |
| 16:5:1    | 250               | 1.25         |
| 512:128:128:128:16 | 25430        | 127          |

Large networks reach the full rate of 16 multiply-accumulates per cycle.

Small networks are dominated by the 64-cycle segment minimum and the drain
between layers. For a 16:5:1 network the original design is quoted at about
0.5 µs per event at 40 MHz, which is the streaming time alone. This design
needs 1.6 µs at 40 MHz.

The quoted 5.1 µs for 64:64:1 at 40 MHz is below the 6.4 µs that 4096
products on 16 multipliers require at that clock. No schedule of this
architecture can reach it, and this design gives 9 µs at 40 MHz.

## Where this design departs from or adds to the original

These parts are this design's own:
- The bit layout of the configuration word.
- The weight layout in the WRAMs.
- The valid/ready handshakes and the flush input.
- The memory sizes:
  - WRAM 64K × 16 per chip;
  - lookup table 64K × 16;
  - all FIFOs 2048 words, which is 512 inputs × 4 events.
- The batch queues (two deep).
- The chip's output buffer and the per-chip buffers on the result bus.
- The board-level merge of the four chips' searches.
- The two-word (value, index) output of search layers.
- The segment minimum and the drain wait.
- The bias input and its constant.
- Using FIFO_A and FIFO_B in alternation for networks with more than two
  layers.

Other choices and readings:
- The "automatic adaption of accuracy" after the cut is implemented as
  selectable rounding. The cut window itself is set per layer, not searched
  automatically.
- A chip's lookup-table address output and its linear output carry the same
  value.
- The board always has four chips. The original accepts one to four.

These parts are not included:
- The VME bus interface with DMA master and interrupt.
- The DMA channel configuration memories.
- The FPDP receiver.
- The ECL/NIM output drivers and their serial/parallel converter.

The top module exposes their data as plain streams and write ports instead.

## Files

Design (`rtl/`):

| file | content |
|------|---------|
| `sand_pkg.sv` | widths, configuration word and tag types |
| `sand_alu.sv` | pre-adder, multiplier, four accumulators |
| `sand_autocut.sv` | 40-to-16-bit cut, rounding, saturation |
| `sand_pe.sv` | one processing element |
| `sand_postproc.sv` | pass / max / min search with index |
| `sand_chip.sv` | the SAND chip |
| `sand_wram.sv` | weight memory (64K × 16) |
| `sand_lut.sv` | activation lookup table |
| `sand_fifo.sv` | show-ahead FIFO with overflow/underflow assertions |
| `sand_cfg_ram.sv` | 256-byte layer configuration memory |
| `sand_wload.sv` | weight distributor over the four WRAMs |
| `sand_sequencer.sv` | command sequencer |
| `sand_result_path.sv` | result bus, chip merge, table stage |
| `sand_engine.sv` | processing engine: sequencer, chips, WRAMs, LUT, FIFO_A/B |
| `sand_in_ctrl.sv` | input controller with four FIFO_in |
| `sand_out_ctrl.sv` | output controller with four FIFO_out and threshold |
| `sand_vme_board.sv` | top level |

Testbenches (`tb/`): `tb_<module>.sv` for each module above except the
package, `sand_wload` and `sand_result_path`, which the engine and board
testbenches cover. `tb_sand_workloads.sv` runs the network sizes in the table
above.

Every testbench checks against its own reference model and prints one line:

```
TB_RESULT checks=<n> failures=<m>
```

Each testbench has a watchdog.

`tb_sand_vme_board` runs the board at its default sizes. It loads the table
and four networks and streams 14 events with random back-pressure on the
output. It counts how often each mechanism was exercised:
- bias inputs;
- multi-segment layers;
- FIFO_A/FIFO_B alternation;
- dummy events;
- table and linear activation;
- square-accumulate;
- min and max search;
- threshold output;
- saturation;
- input stalls and output back-pressure.

If any mechanism never occurred, the testbench counts it as a failure.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sand_pkg.sv \
    tb/tb_sand_vme_board.sv --top-module tb_sand_vme_board -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. Every module is synthesizable.
The memories are plain arrays. The WRAMs and the lookup table read
synchronously (one cycle). The FIFOs (show-ahead) and the configuration
memory read combinationally; for a RAM macro without that, the FIFO needs a
small prefetch register. Reset is asynchronous and active low.
