# GRETA eight-channel pulse processor

This is the digital pulse processing for an eight-channel germanium-detector
digitizer board. Each channel takes a stream of 12-bit ADC samples (100 MHz in
the original system: the register reset values of 0x1C2 = 450 clocks are
specified as 4.5 us). For every detector pulse it does four things:

* It finds the pulse with a leading-edge discriminator (LED).
* It times the pulse precisely with a digital constant-fraction discriminator (CFD).
* It measures the energy with a trapezoidal filter.
* It writes a packet with the time stamps, energy, CFD samples and a window of raw samples.

A token ring then moves finished packets from the eight channels into an
external 32-bit FIFO. A small serial controller programs the two
LTC1660 DACs of the analogue front end.

Everything is synchronous to one clock. Everything is configured through a simple
request/acknowledge programming bus. The VME bridge that drives this bus on the
real board is not part of this RTL.

## Hierarchy

```
greta_chip                       top: processing block + DAC control + address decode
├── eight_channel                programming fan-out, debug memory, 8 channels, read-out
│   ├── debug_mem                1024 x 16 waveform memory replayed in debug mode
│   ├── channel  (x8)
│   │   ├── tap_delay (x4)       TD1..TD4, 512-tap circular delay lines
│   │   ├── led                  diff_filt, gau_filt x4, round_shift x2, vth_cross,
│   │   │                        vth_process, noise_timer
│   │   ├── cfd                  diff_filt, gau_filt x2, round_shift x2, tap_delay (64),
│   │   │                        mult_minusa, magnitude, cfd_process
│   │   ├── energy               trapz_fil, msearch (compare)
│   │   ├── proc_core            timer_machine, packet_machine, wait_counter,
│   │   │                        pileup_counter, timer48, mux16_16to1
│   │   └── prebuffer            1024 x 16 write / 512 x 32 read packet memory
│   └── fifo_interface           fifo_machine + data/size multiplexers
└── dac_control                  LTC1660 serial writer
greta_pkg                        register map, reset values, packet word indices, enums
```

## One channel's signal path

The channel registers its input sample `x`. This is the ADC word, or in debug
mode the word replayed from the debug memory. The sample then runs through four
tap delays in series:

| delay | length | output |
|---|---|---|
| TD1 | k | x(n-k) |
| TD2 | m | x(n-k-m) |
| TD3 | k | x(n-2k-m) |
| TD4 | m | x(n-2k-2m) |

Here m is the trapezoid rise time (integration length) and k is its flat top
(collection length). Both are global registers.

Each tap delay is a dual-port RAM used as a circular buffer. It reads a location
before writing it, so the registered output is the input delayed by exactly
LENGTH clocks. STATUS rises once the pointer has wrapped for the first time after
a length change. The processing blocks use the delays as follows:

* **LED** uses `x - TD1`. This is a k-sample difference that turns a step-like
  preamplifier pulse into a short bump.
* **CFD** uses `TD2 - TD3`. This is the same difference, delayed by k+m so that the
  timing is taken later.
* **ENERGY** uses TD1..TD4 as Xn, Xn-m, Xn-m-k and Xn-2m-k.
* **TD4** also supplies the raw samples written into the packet.

### Filtering shared by LED and CFD

`diff_filt` forms the 13-bit difference. `gau_filt` is a 1-2-1 smoothing filter:

```
y(n) = x(n-1) + 2 x(n-2) + x(n-3)   (of its registered input)
```

It is pipelined as two registered additions. The newest sample reaches the
output two clocks later.

The LED applies four smoothing stages:
1. Two stages, then rounding to 13 bits by /16.
2. Two more stages, then rounding to 16 bits by /2.

The total gain is 8. The CFD applies two stages and rounds to 16 bits.
`round_shift` rounds half up and saturates.

### Leading-edge discriminator

`vth_cross` compares the 16-bit filtered value against +/-VTH with a single adder:
* VTH is added to negative inputs and subtracted from positive ones.
* The adder's carry XOR the input sign is the CROSSING flag.

`vth_process` is a two-state machine. A rising CROSSING in IDLE produces:
* a one-clock `led_timestamp`;
* MaxMinb, which records whether the pulse was negative;
* a start of the noise timer.

While the noise window (default 64 clocks) runs, no new trigger is possible.
LED_TIMESTAMP comes 10 clocks after the first input sample whose filtered value
crosses the threshold.

### Constant-fraction discriminator

The CFD forms `g(n) - 2^a g(n-L)` in 20 bits:
* g is the 16-bit filtered signal.
* L is the 6-bit programmable delay; the default is 63.
* a is the 2-bit fraction code. The multiplier `mult_minusa` gives -1, -2, -4 or -8.

The delay line's own output register is one of its L stages. The direct path
therefore carries one register, matching the multiplier register.

`magnitude` enables the search only while |g/16| exceeds a 5-bit threshold
(default 16). This keeps baseline noise from producing crossings.

`cfd_process` watches the top 16 bits of the CFD signal. On the first change of
sign while enabled, it:
* stores the last sample before the crossing and the first sample after it;
* pulses `cfd_timestamp`;
* holds `cfd_valid` until it is cleared. The channel clears it at the end of each event.

Software can interpolate the zero crossing between these two points.

### Energy

`trapz_fil` runs the recursion:

```
Y(n) = Y(n-1) + (Xn + Xn-2m-k) - (Xn-m + Xn-m-k)
```

It has three pipeline stages (two 13-bit sums, a 14-bit difference and a 23-bit
accumulator). For a step of height A the output rises over m samples to a flat
top of m·A, which lasts k samples.

A recursive accumulator remembers any garbage it has ever summed. A `restart`
input therefore holds it at zero until the channel's fill counter says all four
delays hold real samples. The fill counter runs 2047 clocks after reset or after
any change of m or k. Until then TD4's status bit reads 0 and no trigger is accepted.

`msearch` tracks the running maximum of the trapezoid, or the minimum for a
negative pulse. The search is cleared and its direction latched when an event is
accepted. The energy is the extremum at the end of the computation window.

## Event control (`proc_core`)

### Trigger acceptance

`timer_machine` has three states: Idle, Program and Trigger. In Idle,
programming requests come first. Otherwise it accepts an event when all of the
following hold:
* the channel runs;
* every delay is filled;
* the trigger condition of the current mode holds.

| mode (ctrl bits 4:3) | trigger |
|---|---|
| 00, 11 | LED trigger whose sign is allowed by the polarity bits 11:10 (01 positive only, 10 negative only, 11 both) |
| 01 | external: VALIDATE input (energy read after the external sliding length) |
| 10 | LED trigger, but the packet is kept only if VALIDATE arrives within the external window |

On acceptance the machine does three things:
* It latches the 48-bit timestamp.
* It starts the computation window. This is 2m+k+8 clocks for an internal trigger, or the external sliding length for an external one.
* In mode 10 it also opens the validation window.

It returns to Idle when the packet is finished or aborted and every window has
run out (the minimum dead time).

### Pile-up

`pileup_counter` keeps two counts:
* the time since the last LED trigger;
* the time left in a window that opens when an event is accepted.

An event is flagged as piled up if another LED trigger came less than the
pile-up window (default 1024) before it, or comes less than the window after it.
With pile-up drop enabled (ctrl bit 2, default on), flagged events are aborted.
Otherwise they are written with the P flag set.

### Packet writing

`packet_machine` starts when the computation window ends. The event is dropped
(ABORT) if any of these holds:
* the channel was stopped;
* the event piled up and pile-up drop is enabled;
* the pre-buffer still holds an unread packet.

Otherwise the packet is written:
1. The machine steps through the 12 header words, one per clock.
2. It waits the raw-data sliding length.
3. It writes the raw samples.
4. In mode 10, it then waits for validation. An expired window aborts the packet.

A complete packet sets PREBUFFER_READY (status bit 15) until the read-out
acknowledges it.

### Packet format

Packets are written as 16-bit words. The read port pairs them into 32-bit words,
with the even word in the low half.

| word | content |
|---|---|
| 0 | board id (13 bits) and channel (3 bits) |
| 1 | packet size in 32-bit words, (12 + raw length + 1) / 2 |
| 2-4 | 48-bit LED/external timestamp, least significant word first |
| 5 | energy bits 15:0 |
| 6 | P (pile-up), C (CFD valid), E (external trigger), S (negative pulse), 5 zero bits, energy bits 22:16 |
| 7-9 | 48-bit CFD timestamp |
| 10, 11 | CFD samples before and after the zero crossing |
| 12 ... | raw samples, 12 bits each, upper 4 bits zero |

The timestamps count clocks since the last SYNCH. Each holds the timer value of
the clock in which its trigger pulse was high.

## Read-out (`fifo_interface`, `fifo_machine`)

A token visits the channels in turn. At a channel whose pre-buffer is ready, and
only while the FIFO's almost-full flag is inactive (`fifo_pafneg` = 1), the
machine does the following:
1. It reads SIZE 32-bit words through a one-hot pre-buffer enable.
2. It writes them to the FIFO with `fifo_wenneg` low.
3. It writes one separator word, 0xAAAAAAAA.
4. It acknowledges the channel.

Otherwise the token moves on after one clock. The FIFO is written on the
processing clock, which is also output as `fifo_wclk`.

## Programming

A request is a rising edge of `prog_flag` with `prog_add` and `prog_data`
stable. The addressed block answers with a `prog_ack` pulse. `prog_done`
reports, per block, which blocks have answered the current request. These are
the eight channels, the debug memory and the DACs.

| address | register | reset |
|---|---|---|
| 0x02 | external validation window (11 bits) | 0x7FF |
| 0x03 | pile-up window (11 bits) | 0x400 |
| 0x04 | noise window (7 bits) | 0x40 |
| 0x05 | external sliding length (11 bits) | 0x1C2 |
| 0x06 | k, collection (flat top) length (9 bits) | 0x1C2 |
| 0x07 | m, integration (rise) length (9 bits) | 0x1C2 |
| 0x08+ch | control: 11:10 polarity, 4:3 trigger mode, 2 pile-up drop, 1 debug, 0 run | polarity 11, drop 1, others 0 |
| 0x10+ch | LED threshold (bits 14:0 used) | 0x7FFF |
| 0x18+ch | CFD: 12:7 delay, 6:5 fraction code, 4:0 magnitude threshold | 0x3F, 00, 0x10 |
| 0x20+ch | raw-data sliding length (11 bits) | 0x1C2 |
| 0x28+ch | raw-data length (10 bits, clamped to 1010) | 0x32 |
| 0x30 | debug memory write address | 0 |
| 0x31 | debug memory data (address increments after each write) | |
| 0x40-0x4F | DAC write: bit 3 selects the chip, bits 2:0 the DAC (0 = DAC H), data bits 9:0 | |

`status_reg[ch]` reads back the following fields:
* bit 15: pre-buffer ready;
* bits 11:10: polarity;
* bits 9:5: delay-filled flags (TD4, TD3, TD2, TD1, CFD delay);
* bits 4:0: the control bits.

Undecoded addresses with bit 6 set are acknowledged and ignored.

### DAC control

The DAC controller shifts the 16-bit LTC1660 word MSB first:
* The word is a 4-bit DAC address, a 10-bit code and two zero bits.
* The serial clock is the system clock divided by 2·DIV (DIV = 16).
* Data changes while SCK is low and is taken on the rising edge.

CS/LD rises at the end to load the DAC, and then `prog_ack` is given. The
controller only clocks while a word is being sent.

## Where this design chooses for itself

The overall structure, the block boundaries, the register map, the reset values,
the packet layout and the filter equations come from the original design
description. The following are choices made here:

* **CFD fraction.** Fraction code 00 gives a multiplier of -1, and 11 gives -8. The
  multiplier is an exact negation. The original text also describes the code-00
  setting as a fraction of 0.5 and writes the multiplier output as "-a·x + 1". Here
  the "+1" is read as the carry of the two's-complement negation.
* **Computation window.** The window for internal triggers is 2m+k+8 clocks. The
  margin of 8 covers the filter pipeline.
* **Window timing.** Each window's done pulse comes N+1 clocks after its start.
* **Delay assignment.** TD1/TD3 use k and TD2/TD4 use m.
* **Fill time.** The fill counter (2047 clocks) and the energy `restart` are additions
  of this design.
* **LED threshold.** The threshold uses 15 bits, matching the LED block's port; the
  register is described as 16 bits with 3 fractional bits.
* **Raw length.** The raw length is clamped to 1010 so that a packet always fits the
  1024-word pre-buffer. The register field allows 1023.
* **Read-out clock.** The read-out runs on the processing clock. The original runs
  it at half rate to match 16-bit writes against 32-bit reads.
* **Separator.** One separator word follows every packet.
* **Pre-buffer ready.** PREBUFFER_READY rises only once the whole packet is in
  the pre-buffer, and the read-out starts after that. The original lets the
  read-out start as soon as enough of the packet has been written.
* **CFD flag on external triggers.** The C flag is forced to 0 for externally
  triggered packets, which carry no CFD time.
* **Address width.** The programming address is 7 bits. The original processing
  block decodes 6, and the seventh bit selects the DAC space here.
* **DAC word.** The DAC word format and addressing follow the LTC1660 data sheet.
* **Rounding.** Rounding in the filter chain is round-half-up with saturation.
* **LED latency.** The LED latency is 10 clocks, measured from the newest sample.
  The original pipeline chart places the trigger at clock 19 of its own count. The
  two were not reconciled beyond checking that every stage's pipeline matches its
  description.

Not included:
* the VME slave (a Cypress bus-bridge chipset);
* I/O pads;
* clock managers;
* the external FIFO.

Their signals are the ports of `greta_chip`.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/greta_pkg.sv tb/tb_greta_chip.sv \
          --top-module tb_greta_chip
./obj_dir/Vtb_greta_chip
```

The testbenches compare against models written independently of the RTL:
* The LED and CFD testbenches recompute the filter chain sample by sample and predict the trigger cycle and the two CFD points.
* The energy testbench accumulates the trapezoid from its own sample history.
* The channel testbench checks that a 400-count step with m = 20 gives exactly 8000.

`tb_greta_chip` runs the whole chip at its default sizes: m = k = 450, a raw
length of 50, 8 channels, and 1024-word memories. It programs the chip through
the bus and decodes the DAC serial stream. It collects the FIFO output and checks
every packet. It counts these mechanisms and fails if any never occurs:
* programming acknowledge;
* a DAC write;
* an undecoded-address acknowledge;
* positive and negative events with energy ±m·A;
* a timestamp against SYNCH;
* a pile-up drop, and a kept packet with the pile-up flag;
* an external trigger;
* a validated event and a validation time-out;
* debug-memory replay;
* a FIFO almost-full stall;
* the global trigger.

It takes about 30 000 clocks.
