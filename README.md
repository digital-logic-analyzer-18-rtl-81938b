# A 32-channel logic analyzer with protocol decoders

This is the FPGA fabric of a logic analyzer that sits next to an ARM
processor. Thirty-two probe lines are sampled at up to 100 MHz. The
analyzer does not store a sample every clock. It stores **edges**: each
change on a line becomes a 32-bit *time-edge packet*, `{time[30:0], level}`,
where `time` is the sample number. A slow or idle line costs almost nothing,
and a trace can span seconds.

The same edge packets feed two consumers:

* **Protocol decoders.** There are four I2C, four SPI and four UART decoders,
  plus a tracer for the AVR external-memory bus (XMEM). Any probe can be
  routed to any decoder input. The decoders rebuild the waveform from edges
  and write decoded words to memory.
* **Memory.** Every edge is also written to a raw trace buffer.

All data ends up in circular buffers in processor memory, through AXI3
write bursts on the coherent port. The processor programs everything with
register writes and reads back only tail pointers and one interrupt status
register.

```
 probes ─► sampler (sample clock) ─► sampler interface ─┬─► 13 decoders ─► memory channels 1..13 ─┐
            32 channels, trigger    async FIFOs, routing │                                         ├─► burst switches ─► 8 AXI masters ─► (crossbar, ACP)
                                                         └─► sample-to-memory merge ─► channel 0 ──┘
 processor GP0 ─► CPU interface ─► configuration bus (write-only broadcast) ─► every block
```

## Sampling and the ordering rule

Each of the 32 sampling channels (`sampling_channel`) works like this:

* A two-flop synchronizer feeds an edge detector.
* A free-running sample counter stamps each edge with its time.
* The channel has two FIFOs: a pretrigger FIFO and a post-trigger FIFO.

A run goes through four states:

* **PRETRIG.** While the channel is armed, edges go into the pretrigger FIFO.
  The oldest entry is dropped in two cases:
  * a new edge arrives while the FIFO is full;
  * the entry is older than `max_age` samples.

  A dropped edge is not lost information. It becomes the known level of the
  line since that time.
* **SAMPLING.** On the trigger, the channel first emits an *initial value
  packet*: the oldest level it still knows, stamped with the time since
  which it is known. It then drains the pretrigger FIFO, then passes
  post-trigger edges through the second FIFO. Capture stops `max_num`
  samples after the trigger.
* **WAIT.** Once both FIFOs are empty, the channel clears its counter and
  goes back to PRETRIG, ready to be re-armed.

The hard part is **ordering**. Decoders such as I2C need SCL and SDA edges
in time order, even though the two lines sit in separate channels with
separate FIFOs. The sampler handles this centrally:

* Every cycle it computes `release_time`, the earliest head time over all
  channels that hold a packet.
* A channel may offer its head packet only if that packet is not later than
  `release_time`.

So packets leave the sampler globally sorted, one per channel per cycle at
most. Downstream, each decoder merges its own inputs oldest-first
(`earliest_select`). Because its inputs are already ordered, it never
receives an older edge after a newer one.

This rule has two consequences a user should know:

* **One stalled channel holds up all the others.** If a channel cannot
  deliver its packets (its memory path is blocked and no decoder reads it),
  no other channel can deliver either.
* **The pretrigger window is set by the FIFO depth.** A busy channel keeps
  only its last 16 pretrigger edges, whatever `max_age` says.

## Trigger

There are eight trigger groups. Each group has three 32-bit registers:
enable, value-high and value-low.

* Value-high is compared with the previous sample of each enabled channel.
  Value-low is compared with the current sample.
* Equal bits ask for a level. Different bits ask for an edge: high 0 and
  low 1 is a rising edge.
* A group with no enabled channel never fires.
* Any matching group triggers in the same sample cycle.

The trigger control register has two bits:

* bit 0 arms the enabled channels;
* bit 1 triggers them by hand.

## Clock domains and reset

The sampler runs on the sample clock `sclk`, which comes from an external
clock manager (an MMCM). Everything else runs on the interface clock `clk`.

**Crossing between the domains.** Everything goes through Gray-pointer
asynchronous FIFOs:

* configuration writes into the sampler;
* samples out of the sampler.

**Changing the sample rate.**

1. The processor writes the sample-clock register with half the multiplier
   and half the divider (6 bits each).
2. `sample_clock_ctrl` pulses `mmcm_reconfig` with the doubled values.
3. It holds the whole sample domain in reset until the clock manager has
   dropped `locked` and regained it.
4. It then sets the *sample clock stable* interrupt bit.

Software must not write sampler registers until that interrupt arrives. The
configuration FIFO is held in reset meanwhile, so such writes are lost. The
first lock after power-up is reported the same way.

## Sampler interface: routing

Routing between the 32 sampling channels and the 47 functional (decoder)
inputs uses two register tables:

* `insel[n]` names the sampling channel that feeds functional input `n`;
* `dest[c]` names the functional input that reads channel `c`.

A route exists only when both agree. When it exists:

* the decoder's ready pops the channel's FIFO;
* the memory path takes a copy in the same cycle if it can;
* if the memory path cannot take it, the copy is lost and the *overflow*
  status bit is set. The decoder never waits for memory.

A channel without a reader is popped by the memory path alone.

| functional inputs | meaning |
|---|---|
| 0–7   | I2C k: 2k = SCL, 2k+1 = SDA |
| 8–23  | SPI k: 8+4k + {0 SCLK, 1 MOSI, 2 MISO, 3 SS} |
| 24–27 | UART k: 24+k |
| 28–46 | XMEM: 28–35 AD[7:0], 36–43 A[15:8], 44 RD_n, 45 WR_n, 46 ALE |

## Decoders and their memory words

Every decoder writes 64-bit words. Bits 62:32 hold a time in samples.

| decoder | word | notes |
|---|---|---|
| SPI | `{1, t_first, MOSI[31:0]}` then `{1, t_last, MISO[31:0]}` | LSB first, CPOL/CPHA, word size 1–32, four-wire / half-duplex three-wire / three-wire without SS; SS rising mid-word gives `{0, t, partial}` |
| I2C | `{type[2:0], t, 4'b0, ack, rw, data[23:0]}` | types 1 start, 2 stop, 3 address, 4 data, 7 error; data width 1–24 (0 = 8) |
| UART | `{ok, t_start, 22'b0, parity_err, stop_err, data[7:0]}` | bit period in samples, 5–8 data bits, even parity optional, 1 or 2 stop bits |
| XMEM | `{ok, t, err[3:0], 3'b0, is_write, A[15:8], A[7:0], AD[7:0]}` | word on RD_n/WR_n falling; A[7:0] latched while ALE is high; errors: RD and WR together, ALE during an access, AD change during a write, address change during an access |
| raw samples | `{27'b0, channel[4:0], time[30:0], level}` | from the sample-to-memory merge, earliest time first |

**I2C.** The decoder uses two output FIFOs and merges them oldest first:

* address, data and error words go to one FIFO;
* start and stop words go to the other.

This lets a stop and an error produced in the same cycle both be kept.

**UART.** The decoder sees edges, not samples. It works out a bit's value
only when a later edge proves the bit is over. As a result, the last frame
of a burst whose final bits are all 1 is reported when the next edge
arrives. This is the next start bit on a live line.

## Memory system

There are 14 memory channels:

* 0: raw samples
* 1–4: I2C
* 5–8: SPI
* 9–12: UART
* 13: XMEM

Each channel owns a circular buffer in processor memory, set by three
registers: base, length and head. All three are 8-byte aligned. Each
channel buffers 16 words. It writes a burst whose length is the smallest of:

* the words waiting;
* 16;
* the free space, keeping one slot empty so that head = tail means empty;
* the space to the end of the buffer;
* the space to the next 4 KB boundary.

After the burst's write response, the channel advances its tail and sets
the *write done* interrupt bit. Writing the length register resets the tail
to 0.

The AXI crossbar in front of the coherent port gives each master a fixed
3-bit ID, so only eight masters fit:

* Channels 0 (samples) and 1 each have their own `axi_master`.
* The other twelve share six `burst_switch`es in pairs: 13/12, 11/10, 9/8,
  7/6, 5/4 and 3/2.
* A switch grants one burst at a time, from request to write response.
  When both ask at once, it alternates.

`axi_master` has no buffer. It passes a burst straight through:

* the address phase on AW: INCR, 8-byte beats, AWCACHE = 1111;
* the data beats on W: full strobes;
* then it waits for B.

The 8 AXI write ports are brought out at the top.

**The software protocol:**

1. Program base and length, then clear head.
2. On an interrupt, read the tail.
3. Consume the words from head up to tail, wrapping at length.
4. Write the new head.

## Registers

The CPU interface is an AXI-lite style slave on the processor's GP0 port.
Every write is broadcast as `{valid, regnum = address[9:2], data}`.

Reads return three kinds of value:

* the tail pointers (registers 4k+3);
* the interrupt status register (register 56);
* zero for anything else.

`irq` is high while any status bit is set.

| register numbers | block |
|---|---|
| 4k .. 4k+3 (k = 0..13) | memory channel k: base, length, head, tail (read) |
| 56 | interrupt status: bit 0 overflow, 14 write done, 15 button 1, 16 sample clock stable; write 1 to clear |
| 96–103, 104–111, 112–119 | trigger value-high, value-low, enable, groups 0–7 |
| 120, 121, 122, 123 | trigger control, max sample number, max pretrigger age, channel enable mask |
| 128–174, 175–206 | routing: `insel[0..46]`, `dest[0..31]` (127 = no reader) |
| 224+2k, 232+2k, 240+2k | I2C k, SPI k, UART k configuration (first of each pair used) |
| 248–249 | XMEM (no register used) |
| 250 | sample clock: [5:0] half multiplier, [11:6] half divider |

## What is not in the RTL

The design stops at three parts that come from the FPGA vendor. Their
signals are top-level ports of `dla_top`:

* the clock manager (`sclk`, `mmcm_locked`, `mmcm_mult`, `mmcm_div`,
  `mmcm_reconfig`);
* the AXI crossbar (`axi_req[8]` and `axi_rsp[8]`);
* the processor system (the `s_*` GP0 slave and `irq`).

The end-to-end testbench has simple behavioural models of all three.

## Own choices and departures

Where the original description was silent, this design chose:

* **Packets.** The form of the initial value packet, and the word layouts of
  the I2C, UART and XMEM decoders and of the SPI error word. The raw-sample
  word and the two SPI data words follow the original description.
* **Register map.** The functional-input numbering; the trigger-control
  bits; the reset values (max number 1024, max age 1024, SPI mode 0 with 8
  bits, UART 8N1 at 16 samples per bit). The register addresses and the
  fields of the configuration registers follow the original map.
* **Trigger.** The value-high/value-low reading described above.
* **Sizes.** FIFO depths: 16 pretrigger, 16 post-trigger, 16 per routed
  line, 4 per channel in the sample-to-memory merge, 8 per decoder output.
* **Buffers and switches.** The 4 KB burst split, the one-empty-slot buffer
  rule, and the burst-switch pairing.
* **Small behaviours.** UART parity is even. The UART idle level is high;
  the start bit is low, the stop bits high. The button has no debouncing.

Known limits:

* The XMEM tracer has no configuration register.
* GP0 accepts single-beat accesses only.
* In the raw trace, a routed channel's copy is taken when its decoder reads
  it. Its words can therefore be a few samples out of global order with
  respect to unrouted channels. Within one channel they are always in order.

## Simulation

Every file in `rtl/` holds one module, interface or package. `dla_pkg.sv`
holds the shared types and register constants. Each block has a
self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/dla_pkg.sv tb/tb_dla_top.sv --top-module tb_dla_top
./obj_dir/Vtb_dla_top
```

`tb_dla_top` runs the whole analyzer at its full size. It programs
everything over GP0, then drives the probes:

* an I2C write;
* an SPI word;
* UART bytes;
* an XMEM write cycle;
* a square wave;
* a pretrigger burst.

It then decodes memory and checks every word. It also forces each
mechanism at least once and prints how often each happened:

* pretrigger drops;
* an edge trigger and manual triggers;
* contention at a burst switch;
* the sampler-to-memory overflow;
* a post-trigger FIFO overflow;
* a clock reconfiguration with its reset and interrupt;
* the button interrupt.

`tb/axi_mem_model.sv` is the behavioural AXI memory shared by the memory
testbenches. It checks the protocol and inserts random ready delays.
`tb_workload_square` samples square waves and measures their half periods
from the trace in memory.
