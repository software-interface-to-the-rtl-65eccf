# Converter board host interface

This is the FPGA logic that sits between a PCI Express DMA engine and a set
of ADC and DAC converters. The converters run on a grid of sample times tied
to GPS time. Once per *DMA period*, the board moves a block of samples
to or from host memory. Each block carries a time stamp, so the host can tell
which moment the data belongs to, and the board can refuse DAC data that
arrives for the wrong moment.

The host sees a 32 kB memory window (PCIe BAR0) with three parts: the
control registers, the filter coefficient memory, and two regions that are
brought out as ports (converter diagnostics and flash programming). The DMA
engine sees two dual-ported buffers, one per direction. The logic tells the
engine when to move which buffer to which host address.

Everything runs in one clock domain at 2^26 Hz, the board's GPS-locked
oscillator.

## Time and ticks

GPS time is a 64-bit fixed-point number: 32 bits of seconds, then 32 bits of
fraction in units of 2^-32 s. `gps_time_base` adds 2^(32-26) = 64 units to it
every clock. On each 1 PPS pulse it loads the seconds from the timing
receiver and clears the fraction. *Timing OK* is set when a PPS arrives
exactly where the count expected one. It is cleared by a PPS at any other
time, or by a count that passes a second boundary without a PPS.

Four tick generators (`period_tick_gen`) derive the converter and DMA events
from that time:

- ADC sampling
- ADC DMA
- DAC conversion
- DAC DMA

Each has a period and a delay in 2^-32 s units. Both are written to the
registers **minus one**, and periods must be powers of two. The events of a
generator are at `second + delay + k*period`, with the delay taken modulo the
period. Events fall between clocks, so a tick is given on the first clock at
or after the event. The tick also reports the exact event time and the phase
of the event within the second. A period of all ones means one tick per
second. A delay of all ones means "no delay", i.e. aligned with the PPS.

Only the bits above the sampling period appear in a data time stamp.

## DMA channels and buffer rings

Each direction has two DMA channels. Even DMA ticks (counting from the PPS,
which is tick 0) use channel 0, and odd ticks use channel 1. Each channel has:

- a 64-bit host address
- a transfer length (28 bits)
- a buffer offset

The configuration register gives N per direction. A channel then cycles
through a ring of 2^N buffers at `address + i*offset`:

```
tick k:   channel = k mod 2
          buffer  = (k / 2) mod 2^N
          address = chan.address + buffer * chan.offset
```

These settings give the three usual modes:

| Mode | How to set it |
|---|---|
| Single buffer | Both channels get the same address, with N = 0. |
| Double buffer | The two channels get different addresses, with N = 0. |
| Ring | N > 0 and a non-zero offset, e.g. N = 1 gives four buffers in all. |

N is clipped to `MAX_LOG2_BUFS` (4).

`dma_buf_addr` forms the request one clock after the DMA tick. `dma_chan_ctrl`
hands it to the DMA engine if DMA is enabled and the engine reports that
channel as ready. Otherwise a *not ready* error is raised for the channel.

A channel stays busy until the engine reports done. If it is still busy at
its deadline, a *missing data* error is raised. The deadlines are:

- **ADC**: the next DMA tick that belongs to the other channel.
- **DAC**: the start of conversion of that buffer.

A *done* pulse also raises the direction's interrupt request, when it is
enabled in the configuration register.

## ADC buffer

`adc_frame_builder` holds two halves (even and odd) of `ADC_BUF_BYTES` each.
Memory rows are 16 bytes wide, four 32-bit values. A set of `N_ADC` channel
values takes `ceil(N_ADC/4)` rows, and unused lanes of the last row read as
zero.

With oversampling (sampling period shorter than the DMA period), the set taken
in slot *s* of a DMA period goes to row `s*ceil(N_ADC/4)`. A sample belongs to
the first DMA tick after it. The DMA engine reads the half of the tick that
just happened. Read data appears one clock after the row address.

The DMA read of a buffer covers the transfer length written for the channel.
If time stamps are enabled, the layout seen by the host is:

```
row 0 ..            sets of ADC values, oldest first
...                 dummy rows (read as zero) up to the last row
last row            [31:0]   time stamp fraction (2^-32 s)
                    [63:32]  time stamp seconds
                    [95:64]  status bytes (below)
                    [127:96] overflow bits, bit (channel mod 32)
```

The time stamp is the time of the slot 0 sample, with the bits below the
sampling period cleared. So the host should set the length to the data plus
16 bytes, rounded up to its cache line size. Examples:

- 32 channels, no oversampling: 128 + 16 bytes, rounded to 192.
- 32 channels, 8x oversampling: 1024 + 16 bytes, rounded to 1088.

The status word of the stamp has one byte per item:

| Byte | Contents |
|---|---|
| 0 | ADC state. Bit 7 is timing OK, bit 2 ADC data valid, bit 1 ADC DMA running, bit 0 ADCs running. |
| 1 | ADC sticky errors, the same as register 0x010 bits 11:8. |
| 2 | DAC state. Bit 7 is the watchdog monitor, bit 2 DAC data valid, bit 1 DAC DMA running, bit 0 DACs running. |
| 3 | DAC sticky errors, the same as register 0x010 bits 29:24. |

Bits 2:0 of the state bytes differ from the register: there, bit 2 is
"configuration valid" and bits 1 and 0 are converter running and DMA
running.

The converter side supplies the overflow flags. They are the limit flags of
the ADC filter stage, which is not part of this RTL.

## DAC buffer

`dac_frame_reader` is the same kind of buffer in the other direction. The DMA
engine writes rows into the half of the current DMA tick. The sets come
first, and then, in the row right after the data, the 16-byte time stamp
block. DAC buffers have no dummy rows.

At each conversion tick, one set is played out to the converters as
`ceil(N_DAC/4)` beats of four values. The first beat is two clocks after the
tick.

The conversion usually uses the buffer of the preceding DMA tick. If bit 0 of
the DAC sampling-delay register is written as 0, one more DMA period is put
between transfer and conversion. Otherwise the register is used with bit 0
forced to 1.

On slot 0 of a buffer, the time stamp row is checked against the time of the
conversion. A mismatch sets the time-stamp error of that half. Unless errors
are ignored (configuration bit 19), the buffer is played out as zeros and
*DAC data valid* drops. Checking is switched off entirely with bit 18.

Every value then passes `range_limit`. This saturates the value to the
converters' 28-bit two's complement range (-2^27 .. 2^27-1) and sets an
overflow flag per lane.

## Control registers (BAR0 0x0000-0x0FFF)

`ctrl_regs` decodes byte addresses of 32-bit words. Reads have one clock of
latency, and any address not listed reads zero. Writes to read-only words are
ignored.

| Address | Contents |
|---|---|
| 0x000 | GPS time fraction. Reading it latches the seconds. |
| 0x004 | GPS seconds, as latched by the last read of 0x000. |
| 0x008 | Global status: bit 31 = timing OK. |
| 0x00C | Firmware release (non-zero). |
| 0x010 | Status (see below). |
| 0x014 | Configuration. ADC: bits 0 DMA enable, 1 conversion disable, 2 time stamp disable, 7 interrupt enable, 15:8 N. DAC: bits 16 DMA enable, 17 conversion disable, 18 time stamp disable, 19 ignore time stamp errors, 23 interrupt enable, 31:24 N. |
| 0x018 / 0x01C | ADC / DAC missing-data error counter. Any write clears it. |
| 0x020-0x03C | Set-up, each value minus one. ADC: DMA period, DMA delay, sampling delay, sampling period. DAC: DMA period, DMA delay, sampling delay, sampling period. |
| 0x040-0x07C | Read-only converter description: supported rates, delays, buffer limits, clocks. |
| 0x080 | Filter configuration. 0x46 means 16 filters of 64 cycles. |
| 0x090 | Filter selection. |
| 0x0C0-0x0FC | DMA channels: ADC ch0, ADC ch1, DAC ch0, DAC ch1. Each has four words: address low, address high, length, offset. |
| 0x130-0x148 | Timing: configuration, node address (slot), link status, board and software IDs, VCXO control. |
| 0x180-0x1B4 | Board and monitor configuration, and monitor readings (passed in as ports). |
| 0x1F8 | ADC VCXO control. |
| 0x1FC | Watchdog. Any write toggles the watchdog line. Bit 0 = line, bit 1 = monitor. |

The status word at 0x010 has two halves:

- **ADC (low half)**: bits 0-2 are DMA running, conversion running and
  configuration valid. Bit 7 is timing OK. Bits 8-11 are sticky errors: not
  ready ch0/ch1, then missing ch0/ch1.
- **DAC (high half)**: bits 16-18 are DMA running, conversion running and
  configuration valid. Bit 23 is the watchdog monitor. Bits 24-29 are sticky
  errors: not ready ch0/ch1, missing ch0/ch1, time stamp ch0/ch1.

Reading the status clears the sticky bits. An error that arrives on the
clock of that read is kept.

A direction's configuration is *valid* when:

- both of its periods are powers of two;
- the DMA rate is 2^12 to 2^16 Hz and the sampling rate 2^12 to 2^19 Hz (the
  limits reported at 0x050/0x054);
- the sampling period is not longer than the DMA period;
- the sets of one DMA period fit in one buffer half. The stamp block is not
  stored in the buffer.

A direction *runs* only with valid configuration and timing OK. Otherwise it
issues no transfers and converts nothing.

## Other parts

- `bar0_decoder` splits the 32 kB window as follows. Read data from all
  regions returns one clock after the read strobe.

  | Region | Purpose |
  |---|---|
  | 0x0000 | control |
  | 0x1000 | diagnostics (port) |
  | 0x2000 | flash programming (port, 8 kB) |
  | 0x4000 | coefficient memory (8 kB) |
  | 0x6000-0x7FFF | unassigned: reads zero, writes dropped |

- `coef_mem` holds 1024 64-bit coefficients, and the host writes them as
  32-bit halves, low half first. Filter *f* of `2^LOG2_CYCLES` cycles starts
  at coefficient `f * 2^LOG2_CYCLES`. A filter engine reads coefficient
  (selected filter, cycle) one clock after the request. The engine itself is
  outside this RTL, and its port is brought out of the top.
- `watchdog` toggles the watchdog line on each host write. Its monitor bit
  stays set for `WD_TIMEOUT` clocks (one second) after the last toggle.

## Where this RTL departs from, or adds to, the board description

- The DAC sampling delay is placed at 0x038. This completes the eight
  set-up words.
- Message-signalled interrupts and their configuration registers are not
  built. Only the two DMA-done interrupt requests are output.
- The 0x0C0-0x0FC range holds the DMA channel registers.
- Register 0x008 has only the timing OK bit.
- The description words at 0x040-0x07C are computed from the parameters.
  The supported rates, processing delay (15 clocks), native rate (2^19 Hz)
  and AXI clock (125 MHz) are example values.
- The last word of an ADC stamp block carries overflow bits.
- DAC limiting is to 28 bits (-2^27 .. 2^27-1).
- The board description leaves these choices open, so they are this design's
  own:
  - the request/ready/done handshake with the DMA engine, and the deadlines
    used for missing-data errors;
  - the timing OK rule;
  - the exact rule for a valid sampling configuration;
  - the watchdog timeout;
  - `N_DAC` = 16 and 4 kB per buffer half;
  - zero-filling DAC output on a time stamp error.
- Not built: the PCIe endpoint and DMA engine, the timing receiver, the VCXO
  loop, the ADC/DAC IIR filter banks, flash programming, the diagnostics
  block, and the XADC/power monitors. Their signals are ports of `conv_top`.

## Files

- `rtl/conv_pkg.sv`: bus request type, register offsets, configuration bit
  layout, DMA channel and descriptor types.
- `rtl/conv_top.sv`: the top, which instantiates every block. All of its
  parameters have defaults.
- `tb/tb_<block>.sv`: one self-checking testbench per block. `tb_conv_top`
  runs the full-size top through register set-up, 1 PPS alignment, ADC and
  DAC DMA with oversampling, double buffering and a ring, DAC overflow, time
  stamp rejection, error counting, interrupts and the watchdog. It counts each
  of these.
- `tb/tb_conv_top_single.sv`: a second full-size run with the plainest
  arrangement. Both ADC channels share one 192-byte buffer, at 2^16 Hz with a
  DMA delay of 0x3FF against a converter that needs 15 clocks. The DAC uses
  the extra DMA period. It checks every transfer, and checks that a clean run
  leaves no error.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its
own (with a watchdog). With Verilator 5:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps \
    rtl/conv_pkg.sv $(ls rtl/*.sv | grep -v conv_pkg) tb/tb_conv_top.sv \
    --top-module tb_conv_top
./obj_dir/Vtb_conv_top
```

To run another testbench, replace the testbench name. The package must be
compiled first. Each full-size top test simulates a little over one second of GPS time, since
timing OK needs two PPS pulses, and takes under a minute. The block tests take seconds.
