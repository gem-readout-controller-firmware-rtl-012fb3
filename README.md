# GEM readout controller

This controller sits in the user FPGA of a VME board with three 32-channel
LVDS ports. It triggers twelve GEM detector front-end modules and buffers the
data frames they send back until a VME CPU reads them. Each GEM gets two
lines from the controller, T1 (a serial 3-bit trigger word) and CLK. It
answers each trigger with a 192-bit frame on a DATA/DATA_VALID pair. The
controller turns each frame into twelve 16-bit words and keeps up to 63
events per channel. The CPU has no interrupt: it polls per-channel event
counts over a 16-bit register bus and then reads each event, first its size
and then its words.

Everything runs on one 32 MHz clock. The board makes that clock from a NIM
reference input through a x1 PLL, and the same reference goes to the GEM
modules. A test frame generator can send a programmable 192-bit frame on a
third port. With a loopback cable to the input port, the whole receive path
can be tested without detectors.

```
 NIM trigger ─► trigger_sync ─► t1_trigger_gen ─► T1 ×12, CLK ×12 (port C)
                     │                 ▲ soft trigger, trigger words
                     ▼                 │
               gem_test_frame_gen ─────┼──► TEST_DATA/VALID ×12 (port E)
                     ▲ frame words     │
                     │                 │
   register bus ◄─► vme_regs ◄─── status, data ───┐
                        │ pops                     │
 DATA/VALID ×12 ─► gem_frame_rx ─► gem_event_buffer (×12)
 (port A)
```

## The link to a GEM module

**Trigger (T1, CLK).** A trigger is a 3-bit word shifted out on T1, most
significant bit first, one bit per clock. T1 is low when idle. Two words can
be programmed: the *hard* word goes out on each rising edge of the NIM trigger
input, and the *soft* word on each write to a register. The same word goes to
all twelve T1 lines at once. While the first two bits of a word are on the
line, new triggers are ignored. Triggers closer than three clocks apart
therefore produce only one word. A trigger exactly three clocks after the
last one follows it with no gap. A soft trigger during a hard word is ignored,
and a hard trigger during a soft word is ignored too. If both come in the same
idle cycle, the hard word is sent.

T1 changes on the rising edge of the system clock. CLK is the system clock
itself, sent from the clock's falling edge through a DDR output register
(`ddr_out`). CLK therefore rises in the middle of each T1 bit, and the GEM
samples T1 on the rising edge of the CLK it receives. That gives it half a
period of setup and of hold time.

**Data (DATA, DATA_VALID).** The inputs are synchronous to the system clock.
Their phase is set by cable length, so the controller only puts them through
one input register. A frame is a run of clocks with DATA_VALID high, one bit
per clock. The bits are sent word 0 first, each word MSB first. A normal
frame is 192 bits. The frame ends on the first clock with DATA_VALID low, so
two frames need at least one idle clock between them.

Frames that are not 192 bits long are handled as follows:
- A shorter frame gives fewer words.
- A trailing group of fewer than 16 bits becomes one more word. It is
  left-aligned and zero-filled.
- A longer frame is cut at 12 words.

## Event buffering: the part to understand

Each channel has two FIFOs that advance together (`gem_event_buffer`):

* **EventSize FIFO**: one 4-bit entry per event, the number of 16-bit words
  in it (12 for a normal frame). At most 63 entries are used.
* **EventData FIFO**: the words themselves. It is a 1024 x 16 dual-port RAM.

The buffer writes incoming words at a tentative write pointer. Readers see
nothing of the frame until it ends. At that point it is *committed*: its size
enters the EventSize FIFO, the data write pointer jumps to the tentative one,
and the event and word counts grow. The keep-or-drop decision is made when
the frame starts:
- The frame is kept if fewer than 63 events are buffered and the data FIFO
  has room for 12 more words.
- Otherwise the whole frame is dropped. The buffer never holds a partial
  event.

A 32-bit *frames sent* counter counts every frame that ends, kept or not.
Frames sent minus events read is therefore the number of frames lost to a
full buffer.

The CPU reads a channel in this order:

1. Read `FIFOSize[ch]`. Bits [5:0] are the number of buffered events, bits
   [15:6] the number of buffered words.
2. If the event count is not zero, read `EventSize[ch]`. It returns the size
   of the oldest event and removes that entry, which frees the event slot.
3. Read exactly that many words from the channel's `EventsData` window. Each
   read pops one word. A different number of reads puts sizes and data out of
   step, and nothing in the hardware can detect that.

Reads of an empty FIFO do not move it. At 63 events x 12 words the data FIFO
holds at most 756 words, so the 63-event limit is always the one that drops a
frame. The data-room check only matters for DATA_DEPTH values much smaller
than the default.

## Register map

All registers are 16 bits wide and sit at even byte offsets. The board's VME
interface (A24/A32, D16) presents them as single-cycle strobes on the local
bus (`bus_addr` = byte offset, `bus_wr`, `bus_rd`, `bus_wdata`). Read data
comes on `bus_rdata` with `bus_rvalid` one clock after `bus_rd`. Write-only and
unmapped addresses read as 0.

| Offset | Name | Access | Content |
|---|---|---|---|
| 0x0000 | BoardID | RO | [2:0] slot D, [5:3] slot E, [8:6] slot F (000 A395A, 001 A395B, 010 A395C, 011 A395D) |
| 0x0002 | Revision | RO | [15:8] major = 1, [7:0] minor = 0 |
| 0x0004 | Reset | WO | any write resets all logic and registers for one clock |
| 0x0010 | GEMTxStart | WO | [0]=1 sends one test frame; [1] stored: 1 = the NIM trigger also sends a test frame |
| 0x0012 | GEMSoftTrig | WO | any write sends the soft trigger word |
| 0x0014 | GEMTrigWord | WO | [2:0] soft word, [5:3] hard word |
| 0x0016–0x002D | GEMTxWord[0..11] | WO | test frame; word 0's MSB is sent first |
| 0x0030–0x0047 | FIFOSize[ch] | RO | [5:0] buffered events, [15:6] buffered words |
| 0x0048–0x005F | EventSize[ch] | RO | [3:0] words in the next event; the read removes it |
| 0x0080–0x0097 | EventsSentH[ch] | RO | frames sent [31:16]; also copies [15:0] into a holding register |
| 0x00A0–0x00B7 | EventsSentL[ch] | RO | the holding register; every channel's address returns it |
| 0x4000–0x4BFF | EventsData | RO | 256 bytes per channel (ch = (offset−0x4000)/256); each read pops one word |

To read a consistent 32-bit frame count, read EventsSentH of the channel, then
any EventsSentL. After Reset, all fields are zero, including both trigger
words. A trigger word of 000 puts nothing visible on T1, so software must set
the words before triggering.

## Test frame and loopback

`gem_test_frame_gen` sends the twelve GEMTxWord registers as one 192-bit frame.
For 192 clocks DATA_VALID is high, and the same stream goes to all twelve
TEST_DATA/TEST_DATA_VALID pairs of port E. A frame starts in one of two ways:
- a write of 1 to GEMTxStart bit 0;
- a NIM trigger edge, if GEMTxStart bit 1 is set. The same edge also sends
  the hard T1 word.

A start during a frame is ignored. With port E cabled straight to port A,
each start puts one identical event into all twelve channel buffers.

## Pins

Ports A, C and E share one channel map. Port G channel 0 is the clock
reference (through the PLL) and channel 1 is the NIM trigger.

| Pins | GEM | Port A (in) | Port C (out) | Port E (out) |
|---|---|---|---|---|
| 2k, 2k+1 (k = 0..5) | GEM1A..GEM1F = channel k | DATA_VALID, DATA | T1, CLK | TEST_DATA_VALID, TEST_DATA |
| 16+2k, 17+2k (k = 0..5) | GEM2A..GEM2F = channel 6+k | DATA_VALID, DATA | T1, CLK | TEST_DATA_VALID, TEST_DATA |
| 12–15, 28–31 | unused | ignored | 0 | 0 |

The ports of `gem_readout_top` are the single-ended channels after the LVDS
receivers or before the LVDS drivers.

## Latencies

These are clock edges between an input and the output it causes.

* Receive: let edge E be the clock edge that first samples a pin value.
  The input register holds it after E. The word completed by that bit is
  written after E+1. When DATA_VALID goes low, the frame_end pulse follows
  after E+1. The event is committed after E+2, so a register read sampled at
  E+3 or later sees it.
* NIM trigger: let edge N be the first edge that samples the input high. The
  two synchroniser flops and the edge register take edges N, N+1 and N+2.
  The first T1 bit is on the line after edge N+3.
* Test frame from a register: let W be the edge that samples the GEMTxStart
  write. The control pulse follows after W, the frame is loaded at W+1, and
  DATA_VALID is high from W+2 for 192 clocks.
* Register read: 1 clock.

## Where this design makes its own choices

The following are this design's choices, not given by the board's
specification:
- the local-bus handshake;
- the T1 bit order and idle level;
- the end-of-frame rule and the handling of short and long frames;
- the commit-at-end, drop-whole-frame buffer;
- the EventData FIFO depth (1024 words, the largest the 10-bit word count can
  report);
- that reading EventSize removes the entry;
- the all-zero reset values;
- the rule that a hard trigger during a soft word is ignored.

Two points resolve conflicts or gaps in the register list:

* The register list places both GEMTrigWord and the start of GEMTxWord at
  0x0014. Here GEMTrigWord stays at 0x0014, and the twelve frame words fill
  the twelve even addresses ending at 0x002D, starting at 0x0016.
* Which GEM is "channel k" follows the order of the pinout (GEM1A–F, then
  GEM2A–F).

Not part of this RTL:
- the x1 PLL (the top takes its output as `clk`);
- the VME slave of the board (the top exposes the local bus);
- the LVDS/NIM pads and connectors;
- the GEM modules themselves.

For testing, `tb/gem_frontend_model.sv` is a behavioural GEM that decodes T1
words whose MSB is 1 and answers with tagged frames.

Memory: 12 x 1024 x 16 data bits plus 12 x 64 x 4 size bits, 199,680 bits in
all. If the board's user FPGA is an EP1C20 with 64 M4K blocks, this is about
68% of its block RAM. Timing at 32 MHz has not been checked on a device.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_gem_frame_rx`: the sample frame `A012 C345 E678 9ABC DEF0 1234 5678
  9ABC DEF0 1234 5678 9ABC`, short, partial, over-long and back-to-back
  frames against a bit-level reference, and the first-word latency.
* `tb_gem_event_buffer`: fills 63 events, drops the 64th but counts it as
  sent, reads back against a reference queue, reuses freed space, ignores
  empty pops, and drops on lack of data room (small-FIFO instance).
* `tb_t1_trigger_gen`: T1 bit patterns for single, back-to-back, colliding
  and ignored triggers; the busy length; CLK phase.
* `tb_trigger_sync`: one pulse per edge and a 3-edge latency.
* `tb_gem_test_frame_gen`: bit order, 192-clock length, start latency,
  ignored restarts, and the external enable.
* `tb_vme_regs`: every register, the pop strobes per channel, the H/L holding
  register and the read latency.
* `tb_gem_readout_top`: the whole controller at its default size, acting as
  the readout CPU. It covers:
  - loopback frames and external-trigger frames;
  - hard and soft T1 words decoded on the pins, and a trigger ignored;
  - twelve GEM models answering triggers with per-channel tagged data, which
    checks the pin map;
  - overflow of all 63-event buffers, with 7 frames dropped and the sent
    counters at 74;
  - a full drain, and the Reset register.

  It counts each of these and fails if one never happened. It runs in well
  under a second.
* `tb_gem_rate_workload`: sustained operation. Twelve GEM models answer NIM
  triggers that arrive at random intervals. At the same time a CPU model
  polls and reads all channels, taking 32 clocks (1 µs) per register access.
  That access time is an assumption standing for single-cycle VME reads
  without DMA.
  - At a 5.4 kHz average rate, every frame is read with consecutive event
    tags. At most 4 events are buffered. The read data rate is the trigger
    rate x 24 bytes per channel: about 129 kB/s, about 1.5 MB/s for all
    twelve channels.
  - At 7.5 kHz this CPU model falls behind. The buffers reach 63 events and
    frames are dropped (118 of 1,500 per channel). After draining, frames
    read plus frames dropped equal the frames-sent counters.

  So the limit on trigger rate comes from the readout, not from this logic.
  Each receiver is busy for 193 of every ~5,900 clocks at 5.4 kHz. The
  testbench runs in about 15 s.

Simulating with Verilator (run from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --timescale 1ns/1ps rtl/gem_pkg.sv tb/tb_gem_readout_top.sv \
    --top-module tb_gem_readout_top -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. The testbenches are written
for a two-state simulator: everything that is read is reset or initialised.

## Files

* `rtl/gem_pkg.sv`: widths, depths, register offsets, channel status struct.
* `rtl/gem_readout_top.sv`: top level and pin map.
* `rtl/gem_frame_rx.sv`, `rtl/gem_event_buffer.sv`: per-channel receive path.
* `rtl/trigger_sync.sv`, `rtl/t1_trigger_gen.sv`, `rtl/ddr_out.sv`: triggers
  and forwarded clock.
* `rtl/gem_test_frame_gen.sv`: test frame generator.
* `rtl/vme_regs.sv`: register file.
* `tb/`: one testbench per module, the top-level testbench, and the GEM
  front-end model.
