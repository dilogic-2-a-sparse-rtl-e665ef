# DILOGIC-2: sparse data scan and readout for a multiplexed ADC

A detector front-end multiplexes up to 64 analog channels (four groups of 16)
onto one ADC. Almost all channels carry nothing but their DC offset (the
pedestal) plus noise. DILOGIC-2 sits behind the ADC and keeps only the
channels that carry a signal: for each sample it compares the 12-bit amplitude
with that channel's threshold, and when the amplitude is above it stores the
amplitude minus the channel's pedestal, together with the channel address.
The kept words of each event, closed by an end-event word, wait in an on-chip
FIFO; a hit pattern of the event waits in a second memory. An external
processor reads both out over an 18-bit bus shared by a daisy chain of chips,
so that several hundred channels are read over one bus.

The threshold of channel *i* is meant to be `TH(i) = PED(i) + N*SIG(i)`, with
`PED` and `SIG` the mean and r.m.s. of its pedestal distribution and `N`
usually 3 or more. The host measures those values with the suppression turned
off (SubCmp low), then loads `TH` and `PED` into the chip.

This repository holds synthesizable SystemVerilog of the chip's logic, a
self-checking testbench for every module, and end-to-end testbenches with two
and four chips in a chain.

## Structure

```
            Ampl[11:0] ChAddr[5:0]  Trg NrofGx SubCmp
                 |         |         |
           +-----v---------v---------v------+      +--------------+
 bus (test)|  frontend                       |<---->|  config_mem  |
 --------->|   sparse_scan: compare/subtract |      | TH 64x8      |
           |   channel, hit, event counters  |      | PED 64x8     |
           +------+------------------+-------+      +------^-------+
                  | data + end-event | pattern words       | config write/read
           +------v------+    +------v------+              |
           |  data_fifo  |    | bitmap_fifo |              |
           |  512 x 18   |    |  64 x 16    |              |
           +------+------+    +------+------+              |
                  |                  |                     |
           +------v------------------v---------------------+--+
           |  backend_ctrl: function code, daisy chain FSM,     |
           |  StrIn_N strobes, bus and Mack_N drive             |
           +------+-------------------------------+-------------+
                  | D[17:0] (d_in/d_out/d_oe)     | EnIn_N / EnOut_N
```

| File | What it is |
|------|------------|
| `rtl/dilogic_pkg.sv` | sizes, function-code enum, word structs |
| `rtl/sparse_scan.sv` | comparator and subtractor of one sample |
| `rtl/config_mem.sv` | threshold and pedestal memories, 64 x 8 each |
| `rtl/frontend.sv` | event sequencer: samples, pattern words, end-event word |
| `rtl/data_fifo.sv` | 512-word data FIFO with Empty_N, NoAData_N, AlmostFull_N, event delete |
| `rtl/bitmap_fifo.sv` | 64 x 16 hit-pattern memory used as a FIFO |
| `rtl/backend_ctrl.sv` | function-code controller and back-end state machine |
| `rtl/dilogic2.sv` | the chip (top) |

The front-end and the back-end work at the same time. The memories have
separate write and read ports, so one event can be read out while the next is
being written.

## The event: what the front-end writes

After a one-clock pulse on `trg`, the front-end takes one sample per clock for
16, 32, 48 or 64 clocks (`nrofgx` = 00, 01, 10, 11). In the clock after the
last sample it writes the end-event word. An event of 16·k channels therefore
takes 16·k + 1 clocks.

| Word | Bits |
|------|------|
| data word | D17-D12 channel address, D11-D00 amplitude − pedestal |
| end-event word | D17-D07 event number (11 bits), D06-D00 hit count (7 bits) |

* **Suppression.** When `subcmp` is high, a sample is kept only if
  `ampl > TH` (strictly greater). The value stored is `ampl − PED`, clamped to
  0 if the pedestal is above the amplitude. When `subcmp` is low, every sample
  is kept with its raw amplitude. This is the mode for pedestal runs.
  Thresholds and pedestals are 8 bits and are zero-extended to 12.
* **Lookup.** Threshold and pedestal are looked up by the sample's channel
  address, in the same clock as the sample.
* **Pattern words.** Each kept sample sets bit `chaddr[3:0]` of the current
  16-bit pattern word. After every 16th sample the word goes to the bit-map
  memory. An event leaves one pattern word per group of 16 channels.
* **Counters.** The 7-bit hit counter is cleared at each trigger. The 11-bit
  event counter wraps, and is cleared only by `clr_n`. The first event after
  a clear is number 0.
* **Test mode.** With function code 0000, samples come from the bus instead
  of the pins: channel address on D17-D12, amplitude on D11-D00.
* **Mack_N pulse.** `mack_n` goes low for the clock in which the end-event
  word is written. The pin is shared with the back-end's end-event marker.
  If an event ends while another is being read out, the pin can therefore
  pulse low during a data word as well. Qualify it with the bus strobe.

## The FIFOs

**Data FIFO.** 512 entries. Each entry is the 18-bit word plus one tag bit
that marks end-event words. The tag is not on the bus; the chip uses it to
find event boundaries. Its flags:

* `empty_n` is low when the FIFO holds nothing.
* `noadata_n` is low when the FIFO holds no data word. It may still hold
  end-event words of empty events. A count of data words gives this flag.
* `almost_full_n` is low when the free space is ≤ the 9-bit preset. Put
  another way, the write pointer has come within `preset` of the read
  pointer. The preset is 67 after `rst_n`, and function code 0001 loads it
  from D08-D00. Use the flag to hold off triggers.
* A write to a full FIFO is dropped.

**Bit-map memory.** 64 × 16 bits. That holds 16 events of 64 channels.
It has no flag of its own, and `almost_full_n` watches only the data FIFO.
When events are small (few hits), the bit-map fills before the data FIFO
does. The readout processor must therefore also keep no more than
64 / (`nrofgx`+1) events outstanding. Otherwise the pattern words of the
newest events are dropped.

**Delete and reset.** The analog-delete code drops the oldest event from the
data FIFO, one word per clock, up to and including its end-event word. The
pattern-delete code drops `nrofgx+1` words from the bit-map in one clock.
Both are meant for skipping an event without reading it. The
reset-FIFO-pointers code empties both memories.

## The back-end: function codes, strobes and the daisy chain

Part of the back-end is one state machine per chip, with three states:
**start**, **active** and **done**. `EnOut_N` is low only in **done**.

* In **start**, the chip becomes active when `EnIn_N` is low and the function
  code is one of the four chained operations (1000, 1010, 1110, 1111).
* When its part of the operation is over, the chip goes to **done**. Its
  `EnOut_N` then enables the next chip.
* It stays in **done**, ignoring strobes, until a chain reset.

The host keeps the function code stable and gives `StrIn_N` cycles: low, then
high.

| Code | Operation | Per StrIn_N cycle | Chip is done after |
|------|-----------|-------------------|--------------------|
| 1010 | analog readout | oldest data-FIFO word on the bus from the falling to the rising edge, popped at the rising edge; `mack_n` low while it is the end-event word | the end-event word |
| 1000 | pattern readout | oldest bit-map word on D15-D00, popped at the rising edge | `nrofgx+1` words |
| 1110 | configuration write | bus word written for channel 0, 1, … 63 at the rising edge: threshold on D07-D00, pedestal on D15-D08 | 64 cycles |
| 1111 | configuration read | the same word format driven for channel 0, 1, … 63 | 64 cycles |
| 1001 | pattern delete | drop one event from the bit-map | – (all chips) |
| 1011 | analog delete | drop one event from the data FIFO | – (all chips) |
| 0001 | load almost-full preset | D08-D00 to the preset | – (all chips) |
| 1100 | reset FIFO pointers | empty both memories | – (all chips) |
| 1101, 0xxx | reset daisy chain | back to **start**: `EnOut_N` high, bus and `mack_n` released | – (all chips) |
| 0000 | front-end test mode | samples come from the bus | – |

Codes 0010 to 0111 do nothing except the chain reset they share with every
0xxx code.

**Readout of a chain.** This is how one event is read from every chip:

1. Pull `EnIn_N` of the first chip low.
2. Set 1010 and give strobes. The first chip puts out its data words, then
   its end-event word (marked by `mack_n`), and passes the enable.
3. The next chip continues on the following strobes.
4. The last chip's `EnOut_N` falling says the event is complete.
5. Give one strobe with 1101, so that the next event can be read.

Pattern readout follows the same steps with 1000. A chip that holds no event
when it becomes active passes the enable at the first falling edge of
`StrIn_N`, without driving the bus.

**Bus timing.** `StrIn_N` is sampled by the chip clock.

* A word appears one clock after the falling edge is seen.
* It is released one clock after the rising edge.
* Each phase of `StrIn_N` must last at least two clocks.
* The bus is driven only while the word is valid (`d_oe`). A chip's `mack_n`
  is driven (`mack_oe`) from the moment it is selected until the chain reset.

## Clocking and reset

One clock, `clk`, runs the whole chip. It plays the role of the ADC clock
(`Clk`). `clr_n` clears the front-end asynchronously. `rst_n` resets the
back-end asynchronously: FIFOs, preset and chain state machine. The threshold
and pedestal memories are not reset; load them before enabling SubCmp.

## Where this RTL departs from the chip description, or fills gaps

* **One synchronous clock.** `StrIn_N` is sampled by `clk`. It is not used
  as a clock of its own. To reach the 20 MHz bus strobe rate the chip is rated
  for, `clk` would have to run at 80 MHz or more.
* **Split bus.** The bidirectional bus and `Mack_N` are split into value and
  enable signals (`d_in`, `d_out`, `d_oe`; `mack_n`, `mack_oe`). The pad cells
  are left to the chip level.
* **Full FIFO.** A write to a full data FIFO or bit-map is dropped rather
  than overwriting older data.
* **Readout pops.** Readout removes the words it reads. Delete drops an event
  that was not read.
* **Pattern readout pace.** Pattern readout gives one word per strobe cycle.
  This follows the rule that pattern readout runs like analog readout. It
  does not stream words while `StrIn_N` stays low.
* **Choices of this design.** The description does not give these:
  * the configuration word layout;
  * the end-event tag bit;
  * the zero clamp of the subtraction;
  * pattern bit position = `chaddr[3:0]`;
  * delete, preset and pointer-reset codes acting on all chips without
    `EnIn_N`;
  * the empty-chip rule;
  * first event numbered 0;
  * a trigger during an event being ignored.
* **Not built.** The later variant with 9-bit pedestal and threshold fields
  is not built. To build it, change `PW` in `dilogic_pkg` and the
  configuration word layout.
* **Not checked.** Power and speed figures cannot be checked from RTL.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dilogic2 \
    -y rtl -y tb rtl/dilogic_pkg.sv tb/tb_dilogic2.sv -o sim
./obj_dir/sim
```

Replace `tb_dilogic2` with any other testbench:

* `tb_sparse_scan`: corner cases and random vectors.
* `tb_config_mem`: writes and reads back through both ports.
* `tb_frontend`: events of all four sizes, with SubCmp on and off and in test
  mode. It checks every FIFO and bit-map write and the 16·k+1 clock event
  length.
* `tb_data_fifo`, `tb_bitmap_fifo`: random traffic against queue models,
  fill to full, delete and the almost-full threshold.
* `tb_backend_ctrl`: every function code against FIFO and memory models.
* `tb_dilogic2`: two chips in a chain on one bus, at the chip's full sizes.
  It covers:
  * configuration write and read-back;
  * pattern and analog readout with the enable handover;
  * event delete;
  * an empty event (NoAData_N);
  * an event written during readout;
  * SubCmp bypass and test mode;
  * the almost-full flag after a preset load;
  * a pointer reset.

  It counts each of these mechanisms and fails if one never happened.
* `tb_chain_stream`: four chips (256 channels) at a 10 MHz clock. For each
  event size (16 to 64 channels), events are triggered back to back while
  earlier ones are read out through the chain. Triggers are held off by
  AlmostFull_N (preset 67) and by the bit-map limit. About 90 events are
  run and every word is checked.

The package must come first on the command line. All sizes are in
`dilogic_pkg.sv`; the FIFO modules also take `DEPTH` parameters.
