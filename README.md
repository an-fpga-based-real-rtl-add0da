# Real-time event sampler

This is a logic analyzer for testing real-time behaviour of an embedded system.
It does not sample continuously. It records events. The system under test (SUT)
signals an event by changing one of a few GPIO lines. The sampler stores the new
line levels together with a timestamp, and stores nothing while the lines are
still. Only changes take memory, so one recording can run for a long time at
full clock resolution. The external memory holds 2^19 samples.

This RTL covers the part of the design with logic of its own. That part runs
on the sampling clock. It samples the lines, timestamps the changes, buffers
them on chip and writes them into an external synchronous SRAM (SSRAM).
A full system needs more, which this RTL does not contain:

- a soft CPU running the control software;
- a clock crossing bridge to the slower system domain;
- a DMA that copies the SSRAM into DDR SDRAM;
- an Ethernet MAC that sends the samples to a workstation.

All of these are library components or external chips. The top module brings
out their connections as ports (see "The system around it").

## A sample

Each sample is 32 bits: `{channels[7:0], timestamp[23:0]}`.

| bit  | channel | use |
|------|---------|-----|
| 24–27 | 0–3 | test data from the SUT |
| 28–29 | 4–5 | interrupt-generation tests |
| 30    | 6   | SUT error flag; can stop the recording |
| 31    | 7   | timestamp overflow, or an eighth external pin |
| 0–23  | –   | timestamp, counting clocks of the sampling clock |

The timestamp is the value of a free-running 24-bit counter. The sample gets
that value at the clock edge when its new channel levels reach the sample
register. The channel roles and their count come from the
original design. The bit positions are this design's choice.

## The sampling pipeline

```
 pins ─► 2-flop sync ─► combine with timestamp ─► compare to previous ─► enabled? ─► FIFO ─► write master ─► SSRAM
                          ▲                                                                    ▲
                timestamp counter (+ overflow toggle into ch 7)          address counter, sample counter
```

| stage | module | what happens |
|-------|--------|--------------|
| 1 | `input_channels` | Two-flop synchronizers on the pins. Channel 7 is chosen here. The channels and the timestamp are registered into one sample. |
| 2 | `change_detector` | The channel byte is compared with the previous clock's byte. The timestamp takes no part. A difference marks the sample as changed. |
| 3 | `sampler_control` | A changed sample goes into the FIFO in the same cycle, if sampling is running. |
| 4 | `sample_fifo` | 1024 × 32 buffer with separate read and write ports, in synchronously read memory (block RAM) behind a show-ahead output register. |
| 5 | `bus_master_adapter` | Pops a sample and issues one memory-mapped write. |

A pin change is written into the FIFO on the fourth clock edge after the edge
that first samples the pin. That latency is fixed. The pipeline accepts one event per clock. When the
memory has no wait states, it also writes one sample per clock. The FIFO
absorbs bursts of events while the SSRAM is slow or held. Its depth therefore
sets the longest burst that is recorded without loss.

"Previous" means the previous clock cycle, not the previously stored sample.
So every change is recorded exactly once. A line that toggles on every clock
fills the FIFO at one sample per clock.

## Timestamp wraps

The 24-bit counter wraps every 2^24 clocks, which is 0.11 s at 150 MHz. A
recording must show how many wraps happened between two events. So each wrap
flips an overflow bit, and that bit is looped back into channel 7. The first
sample after a wrap therefore differs from the one before it. That sample is
stored with timestamp 0 and the new channel-7 level. To get absolute time,
count the flips of bit 31 and add 2^24 clocks for each one.

Setting `CH7_EXT` gives up this loopback. Channel 7 then becomes an eighth
pin, and wraps are no longer recorded.

## Control: running, stopping, halting

`sampler_control` has three states:

- **IDLE**: not sampling. `START` moves to RUN, unless the memory is full.
- **RUN**: changed samples are stored. `STOP` returns to IDLE. The FIFO keeps
  draining to memory, so nothing already captured is lost.
- **HALT**: sampling stopped on an error. Only `RESET` leaves HALT, and
  `START` is ignored there.

While running, three events halt the sampler. Each sets a sticky flag in
`STATUS`:

1. **SUT error** (enabled by `ERR_STOP`, which is set at reset). A changed
   sample with channel 6 high is stored first, then sampling stops. The error
   sample is always the last one in memory.
2. **FIFO overflow.** A changed sample found the FIFO full and was lost. The
   sampler stops at once, so a recording never has a silent gap.
3. **Memory full.** The sample counter has reached 2^19. Samples still in the
   FIFO are not written.

`RESET` is the recovery path. It empties the FIFO, restarts the timestamp at
0 and the overflow bit at 0, and returns the address and sample counters to
their start values. It also clears the flags and goes to IDLE. The settings
(`ERR_STOP`, `CH7_EXT`, `WRITE_HOLD`) take the values written with `RESET`.

## Writing to memory: the two counters

The write master (`bus_master_adapter`) uses Avalon-MM-style signals:
`address`, `write`, `writedata`, `byteenable` and `waitrequest`. While
`waitrequest` is high, the address and data stay stable. An assertion checks
this in simulation.

Two separate counters advance together on every write the adapter launches:

- **`address_counter`** holds the byte address of the latest write. It resets
  to one word below the memory's base address. The first increment therefore
  gives the base address, which is presented together with the first sample.
- **`sample_counter`** counts the writes from 0. Its bit 19 is the
  memory-full flag. The count and the full test need no adder on the address.
  This matters because the full test must be quick, since it stops the
  recording.

**`WRITE_HOLD`**: the SSRAM has a single port. The DMA that copies samples
out to SDRAM also needs that port. While `WRITE_HOLD` is set, the adapter
starts no new writes. Samples then collect in the FIFO, and software can run
the DMA without losing events, as long as the pause is shorter than the
FIFO's capacity. If the FIFO overflows during a hold, the sampler halts as
described above.

## Register map

The management slave has 3 word-address bits and 32-bit data. It never
inserts wait states. Read data arrives one clock after `read`, flagged by
`readdatavalid`.

| addr | name | access | contents |
|------|------|--------|----------|
| 0 | CTRL | W / RW | bit0 START, bit1 STOP, bit2 RESET (write-one pulses, read as 0); bit3 ERR_STOP, bit4 CH7_EXT, bit5 WRITE_HOLD (stored, read back) |
| 1 | STATUS | R | bit0 running, bit1 halted, bit2 SUT error, bit3 FIFO overflow, bit4 memory full, bit5 FIFO empty (no sample held) |
| 2 | COUNT | R | samples written (20 bits) |
| 3 | ADDR | R | address of the latest write |
| 4 | TSTAMP | R | current timestamp |
| 5 | LEVEL | R | samples waiting in the FIFO |

Every write to CTRL also rewrites the three settings. Write them together with
the command bits.

A typical recording:

1. Write `RESET`.
2. Write `START`.
3. Poll `STATUS`.
4. Write `STOP`, or wait for a halt.
5. Wait for `FIFO empty`.
6. Read `COUNT` samples from the SSRAM.

## The system around it

`event_sampler_top` contains:

- `timestamping_core`: the pipeline, the counters and the management slave;
- an **SSRAM offset bridge** on the core's write path;
- a **descriptor offset bridge**.

A clock crossing bridge adds its own base address to the addresses of the
slaves behind it. In a flat address map, other paths to the same slave need a
bridge that removes that offset again. `offset_bridge` does exactly that: it
computes `m_address = s_address - ADDR_OFFSET` and passes every other signal
through unchanged.

- **SSRAM path.** The core writes at the SSRAM's system address,
  `SSRAM_BASE` = 0x0800_0000 and up. The SSRAM port `ssram_*` sees local
  addresses from 0.
- **Descriptor path.** In the full system, the descriptor offset bridge sits
  between the Ethernet DMAs and their descriptor memory. Here both of its
  sides are ports, `dsc_s_*` and `dsc_m_*`.

The remaining ports connect to library parts:

- `ctl_*` comes from the CPU through the clock crossing bridge.
- `ssram_*` goes to the SSRAM interface: a pipeline bridge, a tri-state
  bridge and the SSRAM chip itself. A two-master arbiter between the core and
  the copy DMA belongs to that interconnect and is not included.

Everything in the top runs on one clock, `clk`, which is the sampling clock.

## How far it follows the original design, and where it does not

These follow the original design:

- the eight channels and their roles;
- the 32-bit sample with a 24-bit timestamp;
- storing only changes;
- storing counter overflows as events;
- the pipeline order (combine, compare, enable, FIFO, bus adapter);
- the address counter that starts one word early;
- the separate sample counter whose bit 19 means "memory full";
- stopping on errors and a reset for recovery;
- offset bridges that compensate the clock crossing bridge's address offset;
- the idea of keeping samples in the FIFO to free the SSRAM port.

These are choices of this design, because the original leaves them open:

- **FIFO depth** of 1024 samples (four 9-kbit memory blocks).
- **Pin synchronizers**, which add 2 clocks of fixed latency.
- **Overflow loopback as a toggle**, one event per wrap.
- **Bit order** inside the sample.
- **Register map and CTRL bits.** This includes `WRITE_HOLD` as the mechanism
  that frees the SSRAM port.
- **Which errors halt the sampler**, and the HALT state.
- **Single-word writes.** The SSRAM could take bursts, but no burst length is
  specified.
- **Base address and offsets**: `SSRAM_BASE` = 0x0800_0000 and
  `DESC_OFFSET` = 0x0100_0000.
- **One clock for the whole top.** A variant that runs the sampling front end
  on a third, faster clock with a dual-clock FIFO is not built.

**Memory size.** A full flag at bit 19 means 2^19 samples of 4 bytes, or
2 MiB of SSRAM. A software buffer "of the SSRAM's size" of 1024 kB would only
hold half of that. The RTL follows the bit-19 flag. For a 1 MiB SSRAM, set
`CNT_W = 19`.

**Timing.** Nothing here has been through FPGA place and route. The original
design reached 150 MHz on the slowest Cyclone III speed grade and up to about
200 MHz on the fastest. No timing claim is made for this RTL. The
longest-looking paths are:

- the FIFO's full compare feeding `push`;
- the launch condition in the write master.

## Files

| file | contents |
|------|----------|
| `rtl/sampler_pkg.sv` | sizes, channel positions, register map, control state enum, halt-cause struct |
| `rtl/timestamp_counter.sv` | 24-bit counter and overflow toggle |
| `rtl/input_channels.sv` | synchronizers, channel-7 select, sample register |
| `rtl/change_detector.sv` | compare to previous |
| `rtl/sampler_control.sv` | IDLE/RUN/HALT, stop causes, FIFO write gate |
| `rtl/sample_fifo.sv` | sample buffer |
| `rtl/bus_master_adapter.sv` | memory-mapped write master |
| `rtl/address_counter.sv`, `rtl/sample_counter.sv` | the two counters |
| `rtl/mgmt_regs.sv` | management slave |
| `rtl/timestamping_core.sv` | the core, wiring the above |
| `rtl/offset_bridge.sv` | address-offset bridge |
| `rtl/event_sampler_top.sv` | top: core and the two offset bridges |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_event_sampler_full.sv` | one full recording at the default sizes |

## Simulating

Each testbench checks itself. It prints `TB_RESULT checks=N failures=M` and
ends with `$finish`. Verilator 5 can build and run any of them, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_event_sampler_top \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/sampler_pkg.sv tb/tb_event_sampler_top.sv
./obj_dir/Vtb_event_sampler_top
```

The testbenches:

- **Unit testbenches.** Each drives one module with random stimulus and
  compares it with a reference model written in the testbench.
- **`tb_timestamping_core`.** Runs the core with an 8-bit timestamp, so that
  wraps happen every 256 clocks.
- **`tb_event_sampler_top`.** Runs the top with a 16-sample FIFO and a
  512-sample memory. It works through random events with memory wait states,
  a full 24-bit timestamp wrap, external channel 7, a write hold that ends in
  FIFO overflow, an SUT error stop, memory full, and the descriptor bridge. It
  counts each mechanism and fails if one never happened. In each phase it
  works out the expected samples from its own pin history and timestamp, and
  compares them one by one with the SSRAM writes.
- **`tb_event_sampler_full`.** Runs the top with all parameters at their
  defaults. It records until the memory is full: 524,288 samples over about
  21 million clocks with random wait states, including a timestamp wrap. It
  checks every sample and takes about 10 s.

To change the sizes, set the top's parameters:

- `FIFO_DEPTH`: longest burst recorded without loss;
- `CNT_W`: memory size is 2^(CNT_W-1) samples;
- `SSRAM_BASE` and `DESC_OFFSET`: the address map.

The timestamp width is fixed at the top so that a sample stays 32 bits. It can
be changed on `timestamping_core`.
