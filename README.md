# Harmony Bus: a timestamped message pool for FPGA feedback systems

Feedback and acquisition systems at a synchrotron beamline need instruments that
react within microseconds, yet the processing they do changes from experiment to
experiment. Harmony answers this with one fixed FPGA design made of small,
independent cores that all talk over a single fast bus. Every piece of data a
core produces becomes a 64-bit message with a source ID and a nanosecond
timestamp, and every message is broadcast to every core. A core is told at run
time which IDs to listen to and which ID to publish under, so a processing chain
(sample -> delay -> moving average -> record, or input edge -> output pin) is
built by writing a few ID registers rather than by re-synthesising the FPGA.
Seen from the cores, the bus behaves like a shared pool where every datum appears
a few clock cycles after it was produced.

This repository holds SystemVerilog for that bus and for the cores of a
four-channel electrometer built on it: an ADC controller, per-channel delay-line
and moving-average cores, an ID generator, a recording memory, a digital I/O
core, and a time-reference core. `harmony_top` wires them together.

## Messages

Every message is one 64-bit word (`harmony_pkg::hb_msg_t`):

| bits    | field  | meaning                                                   |
|---------|--------|-----------------------------------------------------------|
| [63:32] | `data` | 32-bit payload; samples are two's complement              |
| [31:8]  | `ts`   | time of the event in ns, 24 bits (wraps at 16.78 ms)      |
| [7:0]   | `id`   | source ID, 0..255                                          |

Two IDs are reserved. **ID 0** is the time reference: every core clears its
timestamp when an ID 0 message reaches it, and `hb_timebase` sends one every
16 ms, so timestamps from different cores can be compared directly. **ID 255**
is an error message: a core whose output queue overflowed sends one, with its
own output ID as data. The placement of the fields inside the word is this
design's choice; the widths and reserved IDs are Harmony's.

## The bus tree

The bus is two buses laid over a tree of bridges (`harmony_bridge`):

* **Upstream**, from each core towards the top. A core raises `req` ("data
  request") while it offers a message; its bridge raises `rd` ("reading") for
  exactly the cycle in which it takes it. The message must stay stable while
  `req` is high and `rd` low. A bridge chooses among its requesting children
  round-robin, takes at most one message per cycle into a small FIFO of `SLOTS`
  messages, and offers the oldest to its own parent with the same handshake.
  Because of round-robin, no child can be starved: a child waits at most
  `N_PORTS-1` grants.
* **Broadcast**, from the top down. The top bridge (`ROOT=1`) has no parent:
  it takes one message per cycle out of its FIFO and drives it, with a `valid`
  line, onto the broadcast bus. Every other bridge re-registers the broadcast
  bus before handing it to its children, which keeps long broadcast nets out of
  the timing paths.

So the bus carries at most one message per clock cycle (125 M messages/s at
125 MHz), shared by all cores. Latency on an idle bus: a core's message is
taken by its bridge in the cycle after it is offered, each level adds one cycle
up and one cycle down. In `harmony_top` a message from a channel core appears on
the top broadcast (`bc_mon`) 2 cycles after it is offered, and reaches the
channel cores one cycle later still. Under load a message waits in bridge slots;
the numbers are deterministic for a given traffic pattern.

Note a consequence of "one in, one out per cycle" at the top: the top bridge's
own FIFO never holds more than one message. The slots fill in the lower bridges,
whose parent is busy serving other children.

Each bridge counts, for the control software, the messages it has passed on
(`diag_sent`), the slots occupied now (`diag_used`) and the most ever occupied
since the last `clear_diag` (`diag_max_used`): together they show how close the
bus is to saturation.

### The core side

`hb_master` is the upstream port every publishing core contains: a small FIFO
(depth 2 to 16 depending on the core) feeding the `req`/`rd` handshake. If a core
pushes into a full queue, the message is dropped, the sticky `overflow` flag is
set, and an ID 255 message is queued as soon as there is room. The three status
flags (`full`, `overflow`, `err_pending`, type `hb_status_t`) are what the
control software reads to trust an acquisition. `hb_timestamp` is the per-core
nanosecond counter: +8 per cycle, cleared by a broadcast ID 0.

## The cores

All cores take their configuration as plain input ports: in the instrument
these are registers written by the control software over the slow control bus
before an acquisition.

**`adc_core` (ADCCORE).** Reads an `N_CH`-channel simultaneous-sampling
serial ADC with `ADC_BITS`-bit results (4 and 18). Every `period` cycles it
raises `adc_cnv` for `CONV_CYCLES` cycles, then clocks out the results MSB first
on one `adc_sdo` line per channel: it samples the line when it raises `adc_sck`,
and the ADC moves to the next bit on the falling edge. `adc_sck` runs at
125/(2·`SCK_HALF`) MHz. Each result is sign-extended to 32 bits and published
with ID `base_id + k`, timestamped at the start of the conversion. A conversion
and read-out take `CONV_CYCLES + 2·SCK_HALF·ADC_BITS + 1` = 153 cycles by
default, so `period` must be larger than that. If a period ends while a
conversion is still running, that period is skipped.

**`hb_fifo` (FIFO).** A delay line of up to `MAX_DEPTH` (1024) words for one
input ID. Each arriving word is stored. Once `delay` words are held, each new
arrival also sends out the oldest word under `out_id`. The output is therefore
the input stream delayed by `delay` messages. Lower `delay` only together with a
`clear`. In store mode (`store_mode = 1`) nothing is sent: words are kept, up to
`MAX_DEPTH` (later ones are dropped), and read back oldest first with `rd_pop`;
`rd_word` is valid with `rd_valid` one cycle later.

**`hb_average` (AVERAGE).** An accumulator that adds the data of `add_id`
and subtracts the data of `sub_id`. When `sub_id` is the same stream delayed by
N messages, the accumulator is the sum of the last N samples, updated in one
add and one subtract per sample whatever N is. After each subtraction it sends
`acc >>> shift`, the average when N = 2^`shift`.

**`id_gen` (ID GEN).** Sends `count` messages (0: until `stop`) with ID `gen_id`
and data `start_data`, `start_data+step`, …, one every `period` cycles. It is
started by a pulse or by a trigger ID on the bus. It is meant to preload
memories and to load the bus for diagnostics. With `period = 1` it floods the
bus, which is how the overflow path is exercised.

**`hb_memory` (Memory).** A `DEPTH`-frame (4096 × 64 bit) circular recording
buffer. While running it stores every broadcast frame whose ID lies in
[`id_lo`, `id_hi`], whole: data, timestamp and ID. Recording starts and stops
either from the slow bus (`sw_start`, `sw_stop`) or from the fast bus, on
messages with `start_id` / `stop_id` when `trig_en` is set. A start message is
not stored; a stop message in range is. `wr_ptr` and `wrapped` tell where the
oldest frame is. Read-back through `rd_addr`/`rd_data` takes one cycle.

**`digital_io` (Digital I/O).** `N_IO` = 13 front-panel pins: 4 coaxial and 9
RS422. Each pin has a mode. In *trigger* mode every rising edge sends the pin's
edge count with the pin's ID. In *counter* mode edges are counted and the count
is sent whenever `sample_id` appears on the bus. In *output* mode the pin is
driven with bit 0 of each message carrying the pin's ID, which closes a feedback
loop from any core to a physical output. Inputs go through a two-flop
synchroniser. Events are held one per pin (the lowest pin is sent first); an event
that arrives while the pin's previous one is still held sets `lost[i]`.

**`hb_timebase`.** Sends ID 0 every `PERIOD_CYCLES` = 2,000,000 cycles (16 ms)
while enabled, with an epoch counter as data.

## The electrometer system (`harmony_top`)

```
                        top bridge (ROOT) ── broadcast ──┬──> memory
   port 0  hb_timebase ──┤                               ├──> ADC, ID GEN, Digital I/O
   port 1  adc_core    ──┤                               └──> channel bridges
   port 2  id_gen      ──┤
   port 3  digital_io  ──┤
   port 4+c channel bridge c ── port 0 hb_fifo c
                              └─ port 1 hb_average c       (c = 0..3)
```

The classic configuration: ADC `base_id = 1`; FIFO c `in_id = 1+c`,
`out_id = 11+c`, `delay = N`; AVERAGE c `add_id = 1+c`, `sub_id = 11+c`,
`out_id = 21+c`, `shift = log2 N`. Each channel then yields an N-sample moving
average as ID 21+c, and the memory can record raw samples, delayed samples and
averages with common timestamps. A digital input in trigger mode (ID 0x0F, say)
time-stamps external events in the same time frame, and a digital output in
output mode can follow any core's result.

All configuration registers are top-level `cfg_*` inputs. All diagnostics are
top-level outputs: core status flags in the order timebase, ADC, ID GEN, Digital
I/O, FIFO 0..3, AVERAGE 0..3, the FIFO fill levels, store-mode read ports and
AVERAGE accumulators, bridge counters with index `N_CH` for the top
bridge, the memory read port, and `bc_mon`, the top broadcast bus, for a logic
analyser.

| parameter    | default   | meaning                                  |
|--------------|-----------|------------------------------------------|
| `N_CH`       | 4         | ADC channels, FIFO and AVERAGE cores     |
| `N_IO`       | 13        | digital pins                             |
| `MEM_DEPTH`  | 4096      | recording memory, frames                 |
| `FIFO_DEPTH` | 1024      | maximum delay of each FIFO core          |
| `TB_PERIOD`  | 2,000,000 | cycles between ID 0 references (16 ms)   |
| `SLOTS`      | 16        | message slots per bridge                 |

Bus width, timestamp width, ID width, 125 MHz clock, 16 ms reference period,
4 channels, 18-bit ADC and the 13 front-panel pins come from the Harmony/Em#
design. Slot count, memory and FIFO depths, ADC timing and queue depths are this
design's own choices.

## What is not here, and where this RTL makes its own choices

* **The slow control bus** (a self-describing Wishbone interconnect from the
  open-hardware community) is not included. It is how the software finds the
  cores and reaches their registers; here those registers are ports. Adding it
  means putting a register bank in front of each core's `cfg_*` inputs.
* Outside the FPGA: the single-board computer and its PCIe link, the isolated
  ADC and current amplifiers, the four analog outputs (no core for them is
  defined), and the boards. `tb/adc_model.sv` is a behavioural ADC model for
  simulation only.
* Choices not fixed by the Harmony description, made here: field order in the
  message word; round-robin arbitration and FIFO slots in bridges; one
  timestamp counter per core cleared by ID 0; a dedicated core sending ID 0; the
  ADC serial protocol and timing; the FIFO timestamping its output with the send
  time (not the original sample time); AVERAGE sending after each subtraction
  and dividing by a shift; the ID GEN ramp; storing whole frames with an ID window
  in the memory; the digital I/O modes; the content of error messages; a
  two-level bridge tree (one bridge per channel).
* The digital inputs are sampled at the 125 MHz bus clock through a two-flop
  synchroniser, so an input must stay high and low for more than one 8 ns
  clock each. Trigger and counter modes are reliable up to roughly 50 MHz, below the 100 MHz
  the coaxial front-panel ports themselves can carry.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops on a watchdog:

| testbench            | what it establishes |
|----------------------|---------------------|
| `tb_hb_master`       | order and completeness under random reading; overflow flag; exactly one ID 255 message; clearing |
| `tb_harmony_bridge`  | per-child order, one read per cycle, full slots during a parent stall, diagnostics, one-cycle broadcast register, root broadcast |
| `tb_hb_timebase`     | ID 0 exactly every period with epoch data; timestamps restart and step 8 ns |
| `tb_adc_core`        | serial read-out against an ADC model, sign extension, IDs, conversion spacing, latency 153 cycles, timestamps |
| `tb_hb_fifo`         | delay against a reference queue, output 2 cycles after the input, full-depth delay, clear, store mode and read-back |
| `tb_hb_average`      | accumulator and shifted result against a reference, 4-sample moving average |
| `tb_id_gen`          | ramp values and spacing, trigger start, stop, flood with overflow and error message |
| `tb_hb_memory`       | ID window, wrap and circular read-back, start/stop by ID |
| `tb_digital_io`      | trigger (4-cycle latency), counter, output, off pin, simultaneous edges |
| `tb_harmony_top`     | the whole system at default sizes, below |

`tb_harmony_top` runs the electrometer at its default parameters for a little
over 2 million cycles (about 2 s of simulation). It checks every broadcast
message of the acquisition chain against values computed from the ADC model's
samples. It reads back all 4096 recorded frames after the memory has wrapped,
and it checks that ID 0 arrives exactly 2,000,003 cycles after the time
reference is enabled and that timestamps then restart. It also makes contention,
bridge buffering, generator overflow with ID 255 messages, memory wrap, FIFO
store mode with read-back, and all three digital I/O modes happen, and fails if any of them did not.

To run one, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/harmony_pkg.sv tb/tb_harmony_top.sv --top-module tb_harmony_top
./obj_dir/Vtb_harmony_top
```

The testbenches rely on two-state simulation with random initial values.
Everything the design reads is reset, so the result does not depend on the seed.
The RTL uses only synthesizable SystemVerilog-2017 (packages, packed structs,
`always_ff`/`always_comb`); the handshake rules are written as concurrent
assertions in `hb_master` and `harmony_bridge`.

## Extending it

A new core needs a broadcast input (`hb_bcast_t`), an `hb_master` for its
upstream port and an `hb_timestamp` for its time. It connects to a free bridge
port (raise `N_PORTS`) or to a new bridge of its own. Matching IDs with
`harmony_pkg::hb_match` and keeping IDs as run-time inputs keeps the core
reusable in other chains.
