# A USB sample link for testing DSP hardware from the PC

This design turns an FPGA into a DSP test bench that a PC drives over USB.
The PC sends a block of signal samples. The FPGA feeds them, one at a time,
to a user's DSP circuit. It collects the circuit's outputs and sends them
back. From the PC side, the FPGA looks like a plain HID device (the USB
class used by keyboards and mice), so no custom driver is needed. The
signal-processing results (an output waveform, a measured frequency
response) can then be compared directly with a software model.

The user circuit sees only a tiny interface:

* a 32-bit input sample,
* a 32-bit output sample,
* a sample clock that ticks once per sample,
* a reset.

Everything else is provided: the USB protocol, buffering, and the
conversion between bytes and samples. The USB connection goes through an
external Philips PDIUSB12 USB device controller. This chip handles the
electrical USB link and the low-level packet protocol. The FPGA talks to it
over an 8-bit parallel microcontroller bus.

The example user circuit is a three-tap FIR filter with a notch:

    y[n] = x[n] - 1.625 x[n-1] + x[n-2]

```
 PDIUSB12 pins                                                      user system
 ──────────────┐ 8  ┌──────────┐ 8  ┌──────────┐ 16 ┌───────────┐ 8  ┌─────────────┐ 32  ┌────────────┐
 data[7:0]     ├───►│ usb_low_ │───►│ usb_mid_ │───►│ usb_high_ │───►│ sample_     │────►│ fir_filter │
 a0 cs_n wr_n  │◄───│ level    │◄───│ level    │◄───│ level     │◄───│ buffer      │◄────│            │
 rd_n int_n    │    │ bus      │    │ command  │    │ USB + HID │    │ FIFOs,      │ clk │ y = x -    │
 ...           │    │ cycles   │    │ sequences│    │ enumerate │    │ sample clock│────►│ 1.625x1+x2 │
               │    └──────────┘    └──────────┘    └───────────┘    └─────────────┘ rst └────────────┘
               │    └─────────────────────── usb_interface ────────────────────────┘
```

## The user-system interface and its timing

This is the only part a user circuit depends on. It is provided by
`sample_buffer` and brought out by `usb_interface`.

| signal         | dir (from the interface) | meaning |
|----------------|-----|---------|
| `sample_out`   | out | the current input sample `x[n]` for the user circuit, 32-bit two's complement |
| `sample_in`    | in  | the user circuit's output `y[n]` |
| `sample_clk`   | out | rises once per sample, *after* `y[n]` has been captured |
| `sample_reset` | out | high during board reset and for 4 clocks after a reset command from the PC |

One sample period (45 MHz clock, default parameters):

```
clk          _|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_|‾|_
sample_out   ==X x[n] ==========================X x[n+1]
                 |<- SETTLE=2 ->|
y captured                      ^
sample_clk   ___________________|‾‾‾‾‾‾‾|_______
                                  HIGH=2   LOW=2
```

* A new sample is driven on `sample_out`.
* `SETTLE_CYCLES` clocks later, `sample_in` is pushed into the output FIFO.
* `sample_clk` then goes high for `CLK_HIGH_CYCLES` clocks and low for
  `CLK_LOW_CYCLES` clocks.
* A period is therefore `1 + SETTLE + HIGH + LOW` = 7 clocks (156 ns) when
  samples are waiting.
* The sample clock only runs while there is input and room for the output.
  It is data-driven, not periodic.

So a user circuit must:

* compute `y[n]` combinationally from `x[n]` and its state, within the
  settle time;
* advance its state on the rising edge of `sample_clk`.

The example filter does exactly this. Its two delay registers are the only
state. A circuit with a registered output is also possible, but its outputs
come back one sample late.

Only the bits a circuit uses need to be connected:

* unused bits of `sample_out` can stay open;
* unused upper bits of `sample_in` should copy the sign bit of the
  circuit's output.

Inputs from the PC are always sign-extended to 32 bits.

## What travels over USB

The device is a vendor-defined HID with one configuration, one interface,
and two interrupt endpoints: 0x02 OUT and 0x82 IN, 64 bytes each, polled
every 1 ms.

Every report is 64 bytes, laid out like this:

| byte  | OUT report (PC → FPGA)                     | IN report (FPGA → PC)  |
|-------|--------------------------------------------|------------------------|
| 0     | command: `0x01` samples, `0x02` reset the user system | `0x01`      |
| 1     | N, number of samples (0–15)                | N                      |
| 2…61  | N samples, 4 bytes each, least significant byte first | N results, same format |
| rest  | ignored                                    | zero                   |

When the FPGA sends results back:

* It sends an IN report as soon as 15 results are waiting.
* It also sends one when fewer results are waiting but nothing more is
  coming in.

A host therefore sends its samples in OUT reports and reads IN reports
until it has as many results as it sent samples. Results come back in the
same order.

Flow control is end to end:

1. If the host stops reading, the output FIFO fills.
2. The sample clock then stops, and the input FIFO fills.
3. Once the input FIFO lacks room for a whole report, the FPGA stops
   emptying the chip's OUT buffer.
4. The chip then refuses further OUT packets (NAK).

Nothing is lost.

## The USB stack, layer by layer

### `usb_low_level`: bus cycles

One request moves one byte. It is either a command byte (A0 = 1) or a data
byte (A0 = 0), written or read. The cycle runs as follows:

1. CS_N goes low with A0 and the write data driven (1 clock).
2. WR_N or RD_N is low for `STROBE_CYCLES` clocks. A read samples the bus in
   the last of these clocks.
3. The data is held for 1 clock.
4. CS_N goes high and the bus is released for `RECOVERY_CYCLES` clocks.

A transfer takes `3 + STROBE + RECOVERY` = 15 clocks (333 ns) from request
to `done`. ALE is held low (separate-address mode) and DMACK_N is held high
(no DMA).

### `usb_mid_level`: chip commands

This module turns one operation from `usb_pkg::usb_op_e` into up to four
byte transfers. It uses the PDIUSB12 command set:

| operation | transfers |
|-----------|-----------|
| `OP_SET_MODE` | `F3`, config, clock division |
| `OP_SET_ADDR` | `D0`, enable/address |
| `OP_SET_EP_EN` | `D8`, enable |
| `OP_READ_INT` | `F4`, read, read → 16-bit interrupt register |
| `OP_READ_STATUS` | `40+ep`, read (this also clears the endpoint's interrupt) |
| `OP_SET_STALL` | `40+ep`, write |
| `OP_ACK_SETUP` | `00`, `F1`, `01`, `F1` |
| `OP_RD_START` | select `ep`, `F0`, read reserved, read count |
| `OP_RD_WORD` / `OP_RD_BYTE` | two or one data reads |
| `OP_RD_END` | select `ep`, `F2` (clear buffer) |
| `OP_WR_START` | select `ep`, `F0`, write 0, write count |
| `OP_WR_WORD` / `OP_WR_BYTE` | two or one data writes |
| `OP_WR_END` | select `ep`, `FA` (validate buffer) |

Results come back 16 bits wide. Two-byte reads return `{second, first}`.

### `usb_high_level`: enumeration and reports

This is the largest part of the design: a single state machine that issues
one operation at a time. Its main job is enumeration, the exchange with
which the host discovers and configures a newly plugged-in USB device.

At start-up, and whenever VBUS is absent, it:

* sets the chip mode (SoftConnect on, clock running);
* enables address 0.

It then waits for the chip's interrupt line. When the line goes low, it
reads the interrupt register once and handles each set bit in turn:

* **Bus reset.** Returns to address 0 and forgets the configuration.
* **Control OUT.** Reads the status of the control OUT endpoint.
  * If the packet was a SETUP, it reads the 8 bytes, acknowledges the
    setup, clears the buffer and decodes the request.
  * A status-stage packet is simply cleared.
* **Control IN done.** Sends the next packet of a reply that is still in
  progress. Replies are cut into 16-byte packets (the control endpoint
  size). A reply shorter than the host asked for, whose last packet is
  full, ends with a zero-length packet.
* **Main OUT.** Notes that a report is waiting.
* **Main IN done.** Notes that the IN buffer is free.

Supported requests:

* GET_DESCRIPTOR for the device, configuration, HID and report
  descriptors;
* SET_ADDRESS, SET_CONFIGURATION, GET_CONFIGURATION, GET_STATUS,
  GET_INTERFACE, SET_INTERFACE, CLEAR_FEATURE and SET_FEATURE;
* the HID requests SET_IDLE and SET_PROTOCOL.

Anything else, including string descriptors, stalls both control
endpoints.

The descriptors are in a small ROM function inside the module (86 bytes).
Their layout is given in the comments there.

Between interrupts, two kinds of work run:

* A waiting OUT report is copied into `sample_buffer` as soon as it has
  room for a full report.
* Once the device is configured and the IN buffer is free, a report
  offered by `sample_buffer` is written into the IN endpoint.

### `sample_buffer`: bytes, samples and the sample clock

This module:

* rebuilds 32-bit samples from the report bytes into a 64-deep input FIFO;
* runs the sample engine described above;
* packs results from a 64-deep output FIFO into IN reports.

`rx_room` means there is space for a full report plus one sample in
flight. `tx_avail` means an IN report can be read. `sync_fifo` is the FIFO
used for both directions.

## The example filter

`fir_filter` implements the three-tap FIR shown above. Its frequency
response is

    |H(w)| = |2 cos w - 1.625|

The response has these landmarks:

* 0.375 (−8.5 dB) at DC;
* a zero at cos w = 0.8125, which is 800 Hz at 8 kHz sampling;
* 3.625 (+11.2 dB) at the Nyquist frequency.

At 600 Hz the gain is 0.157. A full-scale 600 Hz input therefore comes back
at about 15 % amplitude.

The arithmetic is as follows:

* −1.625 is exactly −13/8. The filter forms `8x[n] − 13x[n−1] + 8x[n−2]`
  with shifts and adds in 37 bits, with no multiplier.
* It then divides by 8 with an arithmetic shift, which rounds towards
  minus infinity.
* The result is not rescaled.
* The 32-bit output wraps around when the true result leaves the 32-bit
  range. With 17-bit inputs (scaling factor 65535) this cannot happen. With
  near-full-scale 32-bit inputs it does. This is the overflow that a host
  can provoke on purpose by choosing a large scaling factor.

The delay registers use an asynchronous reset, because the sample clock
does not run while reset is held.

## Top level

`dsp_usb_top` joins `usb_interface` and `fir_filter`:

* `sample_out` → `x`;
* `y` → `sample_in`;
* `sample_clk` clocks the delay registers;
* `sample_reset` resets them.

The PDIUSB12 pins are ports, and the 8-bit data bus is one tri-state
`inout`. The 45 MHz clock is an input; it comes from an FPGA PLL outside
this design.

Changing the filter to another user system means replacing `fir_filter`.
The other modules stay as they are.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `usb_low_level`, `usb_interface` | `STROBE_CYCLES` | 4 | WR_N/RD_N low time, clocks |
| | `RECOVERY_CYCLES` | 8 | CS_N high time between transfers |
| `sample_buffer`, `usb_interface` | `IN_DEPTH`, `OUT_DEPTH` | 64 | sample FIFO depths (powers of two, ≥ 32) |
| `sample_buffer` | `SETTLE_CYCLES`, `CLK_HIGH_CYCLES`, `CLK_LOW_CYCLES` | 2, 2, 2 | sample clock timing |
| | `RESET_CYCLES` | 4 | sample reset pulse after a reset command |
| `usb_high_level` | `VENDOR_ID`, `PRODUCT_ID` | FFF0, 0001 | placeholders; set real identifiers before use |
| | `MODE_CONFIG`, `MODE_CLKDIV` | 16, 47 (hex) | PDIUSB12 Set Mode bytes |
| `fir_filter` | `WIDTH` | 32 | sample width |

## Simulating

All testbenches are self-checking. Each prints a line of the form
`TB_RESULT checks=N failures=M`. Example commands, run from the folder
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/usb_pkg.sv \
    tb/dsp_usb_top_tb.sv -y rtl -y tb --top-module dsp_usb_top_tb
./obj_dir/Vdsp_usb_top_tb
```

| testbench | what it shows |
|-----------|---------------|
| `fir_filter_tb` | bit-exact filter output against a 64-bit reference, impulse and step response, wrap-around, reset |
| `usb_low_level_tb` | strobe widths, A0/data on the bus, read data, 15-clock transfer time |
| `usb_mid_level_tb` | byte sequence and result of every operation |
| `sample_buffer_tb` | byte/sample conversion, report headers, 7-clock sample period, backpressure, reset command |
| `usb_high_level_tb` | full enumeration, descriptor contents, multi-packet replies with a zero-length end, stall, OUT/IN reports, flow control, bus reset |
| `usb_interface_tb` | the whole interface with an accumulator as user system |
| `dsp_usb_top_tb` | whole design at default parameters, as described below |
| `freq_response_tb` | 40 tones (100 Hz to 4 kHz, 30 ms each), bit-exact results, measured response matches theory, notch at 800 Hz |

`dsp_usb_top_tb` runs these steps:

1. enumeration;
2. a stalled request;
3. a 600 Hz cosine for 10 ms at 8 kHz with scaling 65535;
4. a reset command;
5. a Nyquist tone;
6. a full-scale tone that overflows;
7. a burst that fills both FIFOs;
8. a bus reset and re-enumeration.

It counts how often each mechanism occurred.

The USB side in simulation is `tb/pdiusb12_model.sv`, a behavioural model
of the PDIUSB12's parallel interface:

* It keeps the endpoint buffers, the interrupt register and the
  transaction status for each endpoint.
* Its tasks play the USB host: SETUP packets, IN/OUT packets, bus reset,
  a whole enumeration, and sending a waveform.

It does not model USB bus timing, double buffering, DMA or suspend. It
implements the chip's commands from the published command set, but only
as far as this design uses them.

## What this design does not include, and where it goes its own way

Not included:

* **The FPGA PLL.** It would make the 45 MHz clock, and a 90 MHz clock that
  nothing here needs.
* **The PDIUSB12 itself.**
* **The PC software.**

The device is meant for host software that:

* sends a cosine of a given frequency, length, scaling factor and sample
  rate, and returns the output;
* sends an arbitrary waveform;
* sweeps frequencies to measure a response.

Such software has to follow the report format above.

Choices made here that the reference design may not share:

* **Pins.** The chip interface has the usual eleven pins. The original
  board may route one more control line, which is not identified and not
  built.
* **Unconnected pins.** DMREQ_N and SUSPEND are accepted but ignored.
* **Control signals.** The user interface has the two control signals
  described above: the sample clock and the sample reset. The original
  interface is said to have five; the other three are not known.
* **Filter reset.** The filter is reset by `sample_reset`, so that the PC
  can clear it between measurements. The board reset also reaches it this
  way. The reference wiring connects only the board reset to the filter.
* **Sample nets.** The reference port map names the two sample nets the
  other way round, which would leave one net with two drivers. Here
  `sample_out` feeds the filter's `x` and the filter's `y` returns on
  `sample_in`, as the port descriptions say.
* **Own choices.** All of the following are this design's own:
  * the report format;
  * the HID descriptors and placeholder identifiers;
  * the FIFO depths;
  * the bus and sample-clock timing;
  * the operation set between the mid- and high-level modules;
  * the filter's rounding.

Throughput: the FPGA side handles far more than the USB link can carry. In
simulation, about 2 MB/s of samples pass through it. The PDIUSB12's
interrupt transfers are limited to about 512 kbit/s. With 8 bytes per
sample round trip, that is at most about 7,500 samples per second, so
tests run slower than real time. They are not streaming tests.

That 512 kbit/s is one 64-byte interrupt report per 1 ms USB frame. At
45 MHz a frame is 45,000 clocks. In the top-level test, the FPGA empties an
OUT report in about 2,600 clocks and fills an IN report in about 1,300
clocks, so the link, not the logic, sets the sample rate.
