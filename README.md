# Fast multichannel analyzer (MCA) for radiation detection

A multichannel analyzer measures the height of every pulse that arrives from a detector and
builds a histogram of those heights: the spectrum. Each channel is one word of memory, and each
pulse adds one to the word addressed by its digitized amplitude. In most analyzers a
microprocessor does that read-add-write, and its instruction time adds to the dead time of every
event. This design has no processor. A small hard-wired state machine in a programmable logic
device starts on the ADC's end-of-conversion signal. It runs the whole read-increment-write on an
external SRAM in four cycles of a 20 MHz clock, so every event costs 200 ns. The logic could
therefore accept 5 million events per second. In practice the ADC's conversion time is the limit:
200 ksps for the 16-bit converter this design was built around, 1.25 Msps for a faster 12-bit
one.

The intended application is a one-dimensional position-sensitive X-ray detector. There, a
time-to-amplitude converter (TAC) turns the photon position into a pulse height. The design
suits any spectroscopy front end that delivers a shaped analog pulse.

## Signal chain

```
 analog pulse ──► discriminator ──► monostable 1 ──► monostable 2 ──► ADC ──EOC, 12 bits──► logic ──► SRAM
 (0..10 V)        (comparator,      (500 ns wait      (trigger                   (mca_cpld)    4096 x 16
                   threshold)        for the peak)     pulse)                        ▲
                                                                                     └── ISA bus ── PC
```

1. **Discriminator** (`mca_discriminator`). A comparator whose output is high while the input is
   above an adjustable threshold. Noise and small pulses below the threshold never start a
   conversion.
2. **Trigger generator** (`mca_trigger_gen`). A dual monostable. The discriminator edge starts a
   500 ns pulse, about the time a TAC output needs to reach its maximum. The end of that pulse
   fires the second monostable, and its pulse starts the ADC conversion. The first monostable
   cannot be retriggered, so a second edge inside the 500 ns wait is ignored.
3. **ADC** (external chip). It samples at the trigger and raises end of conversion (EOC) when the
   code is ready. Only the 12 most significant bits go to the logic. With a 16-bit converter,
   dropping the lower bits hides its poor differential nonlinearity.
4. **Logic** (`mca_cpld`). The histogramming state machine, the PC interface and the SRAM port
   they share.
5. **SRAM** (external chip). It holds 4096 counts of 16 bits each.

The discriminator and trigger generator are analog parts on the board. Here they are behavioural
models with `real`-valued voltages and `#` delays, written so that the whole board can be
simulated. They simulate but do not synthesize. Everything in `mca_cpld` and below is
synthesizable.

## The four-cycle read-increment-write

This is the heart of the design (`mca_hist_fsm`). The EOC input is asynchronous. It passes a
two-flop synchronizer, and its rising edge is the event. The synchronizer adds two cycles of
latency but no dead time. On the clock edge that accepts the event, the ADC word is latched and
becomes the SRAM address. Then:

| cycle | state     | `mem_rd_n` | `mem_wr_n` | data bus          | what happens                                           |
|-------|-----------|------------|------------|-------------------|--------------------------------------------------------|
| 1     | `LATCH`   | 1          | 1          | SRAM idle         | address set-up                                         |
| 2     | `READ`    | **0**      | 1          | SRAM drives count | falling edge of the first pulse: the count is read      |
|       |           |            |            |                   | at the end of this cycle (the pulse's rising edge) count + 1 is captured |
| 3     | `WRITE`   | 1          | **0**      | logic drives count + 1 | second pulse                                      |
| 4     | `RECOVER` | 1          | 1          | logic still drives | rising edge of the second pulse writes the SRAM; address and data are held |

An event accepted in cycle 4 goes straight to cycle 1 of the next event. Events that arrive 200 ns
apart are therefore all stored. An event that arrives in cycles 1 to 3 cannot be taken. It is
dropped and reported by a one-cycle pulse on `missed`. No ADC considered here converts in under
800 ns, so this never happens on the real board. The testbenches provoke it on purpose.

Both strobes are registered outputs decoded from the next state, so they cannot glitch. The
READ and WRITE pulses are each one 50 ns clock cycle long. The SRAM must therefore have an access
time well under 50 ns, minus the logic's clock-to-output delay. Assertions check that the two
strobes are never low together, that the bus is driven whenever WRITE is low, and that every
event takes exactly four cycles.

**Channel modes.** The memory always has 4096 words. To run with 2048 or 1024 channels, the
latched ADC word is shifted right by one or two bits before it is used as the address. The mode
comes from the control register.

**Count width.** Counts are 16 bits and wrap from 65535 to 0. The host should read the spectrum
before any channel can fill up. The width is the `COUNT_W` parameter and may be reduced, but the
PC interface assumes that a count fits its 16-bit data port.

## Sharing the SRAM with the PC

The PC reads the spectrum through ISA I/O ports (`mca_isa_io`). There is one SRAM port and two
users, so the logic gives it to only one of them at a time:

* While acquisition is enabled, or the state machine is still busy, the memory belongs to the
  state machine. A host memory access the PC requests is only marked pending.
* When acquisition is stopped and the state machine is idle, a pending host access runs in three
  cycles: address set-up, strobe low, then strobe high with address and data held. The
  multiplexer in `mca_cpld` switches to the host only for those cycles. The state machine's
  enable is gated off during them, so the two users can never collide.

ISA I/O cycles are asynchronous to the 20 MHz clock and much longer than it. IOR# and IOW# are
synchronized, and write data are taken once a synchronized strobe is seen low. A read never waits
for the SRAM. The data port returns a count already fetched into a register. Writing the pointer
fetches its channel. Reading the data port advances the pointer and fetches the next channel.
The PC can therefore stream the spectrum with back-to-back reads.

### Register map

16-bit I/O ports, in an 8-byte window at `BASE_ADDR` (default 0x300). IOCS16# is asserted on a
hit, and AEN masks the decode.

| offset | name | write                                                    | read                                               |
|--------|------|----------------------------------------------------------|----------------------------------------------------|
| +0     | CTRL | bit 0: acquire; bits 2:1: 0 = 4096, 1 = 2048, 2 = 1024 channels (3 acts as 4096) | same bits, plus bit 3: state machine busy; bit 4: host access pending |
| +2     | ADDR | set the channel pointer and fetch that channel           | the pointer                                        |
| +4     | DATA | store the value at the pointer, then advance the pointer (used to clear) | the fetched count, then advance the pointer and fetch the next |

A typical run:

1. Write CTRL = 0 to stop acquisition.
2. Write ADDR = 0, then write DATA = 0 once per channel to clear the spectrum.
3. Write CTRL = 1, 3 or 5 to acquire with 4096, 2048 or 1024 channels.
4. Write CTRL = mode with bit 0 clear to stop.
5. Wait until bit 4 of CTRL reads 0.
6. Write ADDR = 0, then read DATA once per channel.

## Modules and parameters

```
mca_board            board: analog models + logic; ADC, SRAM, ISA pins are ports
├── mca_discriminator    behavioural comparator model
├── mca_trigger_gen      behavioural dual-monostable model
└── mca_cpld             the programmable-logic contents (synthesizable)
    ├── mca_hist_fsm         four-cycle histogramming state machine
    └── mca_isa_io           ISA registers and host memory sequencer
mca_pkg              shared types: channel-mode enum, state enum, register offsets, CTRL layout
```

| parameter      | default | meaning |
|----------------|---------|---------|
| `ADC_BITS`     | 12      | ADC bits latched = SRAM address width (4096 channels) |
| `COUNT_W`      | 16      | count width (at most 16) |
| `BASE_ADDR`    | 0x300   | ISA I/O base address |
| `PEAK_WAIT_NS` | 500     | first monostable: wait for the pulse peak |
| `TRIG_NS`      | 100     | ADC trigger pulse width |
| `DELAY_NS` (discriminator) | 10 | comparator delay |

The ADC and SRAM pins are ports of `mca_board`. The SRAM and ISA data buses are split into
`_in`, `_out` and `_oe` signals, and the tristate pad belongs to the chip's I/O cell. After coarse
synthesis, `mca_cpld` has about 120 word-level cells and 115 flip-flops, which is well within a
small CPLD.

## What follows the source description and what does not

These parts follow the published design:
* the discriminator, dual-monostable and ADC chain;
* the 500 ns peak wait;
* the 12 latched ADC bits used as the SRAM address;
* the four-cycle operation at 20 MHz, with the two pulses and the edges on which the count is
  read, incremented and written;
* the 200 ns dead time;
* reading the memory from a PC over the ISA bus;
* 1024-, 2048- and 4096-channel operation.

These are this implementation's own choices, because the description leaves them open:
* the exact placement of the two pulses within the four cycles;
* synchronization of EOC and the treatment of an event that arrives while busy;
* the 16-bit wrapping count;
* how fewer channels are obtained (dropping low ADC bits);
* the whole ISA register map;
* the policy that the PC touches memory only while acquisition is stopped;
* clearing through the data port;
* the trigger width and polarity, and non-retriggering;
* the comparator delay.

The ADC, SRAM, clock oscillator and PC software are outside this RTL.

## What the simulations show

Counting rate (`tb_mca_rate`). The input is periodic pulses and the output is the counts registered
in one channel, 60 pulses per point:

| ADC model                | input rate | registered |
|--------------------------|-----------:|-----------:|
| 16-bit, 200 ksps         | 50 kHz     | 50 kHz     |
|                          | 196 kHz    | 196 kHz    |
|                          | 233 kHz    | 116 kHz    |
|                          | 588 kHz    | 196 kHz    |
| 12-bit, 1.25 Msps        | 667 kHz    | 667 kHz    |
|                          | 1.11 MHz   | 1.11 MHz   |
|                          | 1.37 MHz   | 685 kHz    |
|                          | 1.64 MHz   | 820 kHz    |

The registered rate follows the input rate exactly up to the converter's maximum. Above it,
conversions are skipped; with strictly periodic pulses, every second or third pulse is skipped.
The logic itself never drops an event at these rates. It would start dropping only above 5 MHz.

Spectrum quality (`tb_mca_spectra`). An amplitude sweep gives a flat 1024-channel histogram, and a
slit-mask pattern gives centroids on a straight line within 0.05 % of the channel range. The ADC
models are ideal, so these runs show only that the digital path adds no distortion: every count
lands in the right channel and none is lost or duplicated. The differential and integral
nonlinearity of a real board come from its converter and analog front end, which this RTL does not
model.

## Limits and caveats

* The SRAM must complete a read within one 50 ns READ pulse, measured from the strobe's falling
  edge. With a slower memory or a faster clock, the READ state must be stretched.
* An end of conversion that arrives less than four cycles (200 ns) after the previously accepted
  one is dropped. It is reported on `event_missed` but not counted anywhere. The design has no live-time or dead-time counter.
* While acquisition runs, the PC can read the control register but not the spectrum. Memory
  requests wait until acquisition stops.
* Counts wrap at 65536.
* `mca_board` contains behavioural models and cannot be synthesized as a whole. Synthesize
  `mca_cpld`.

## Simulating

Every testbench is self-checking. Each ends by printing `TB_RESULT checks=N failures=M` and has a
watchdog. With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/mca_pkg.sv tb/tb_mca_board.sv --top-module tb_mca_board -o sim
./obj_dir/sim
```

Replace `tb_mca_board` with any other testbench:

| testbench              | what it checks |
|------------------------|----------------|
| `tb_mca_hist_fsm`      | whole-histogram comparison in all three channel modes; an isolated event is busy exactly 4 cycles; events every 4 cycles all stored; events every 3 cycles, every second one dropped; nothing stored while disabled; wrap from 65535 to 0 |
| `tb_mca_isa_io`        | register read-back, busy flag, host access held during acquisition and while busy, streamed reads with pointer wrap, streamed writes, AEN and foreign addresses ignored |
| `tb_mca_cpld`          | clear through the data port, events at up to 5 MHz, EOC-to-write latency, spectrum read back over ISA in 4096- and 2048-channel modes, no SRAM bus contention |
| `tb_mca_discriminator` | output versus input and threshold, with delay; one output pulse per pulse above threshold |
| `tb_mca_trigger_gen`   | trigger 500 ns after the edge, 100 ns wide; a second edge inside the wait is ignored |
| `tb_mca_rate`          | counting rate: fixed pulses at input rates from 50 kHz to 1.6 MHz through both ADC models; the registered count of each rate point must match a timing model of the chain, be complete below the ADC's maximum rate and saturate above it, with no event lost in the logic |
| `tb_mca_spectra`       | spectrum quality: a TAC-style amplitude sweep at 1024 channels must give a flat histogram (counts within one of each other), and a 20-slit mask pattern at 2048 channels must give peak centroids within 0.1 % of a straight line |
| `tb_mca_board`         | end to end at the default sizes: analog pulses through two ADC models (16-bit at 200 ksps, 12-bit at 1.25 Msps) into the full 4096-channel SRAM; clear, acquire, read back all channels in all three modes; sub-threshold pulses rejected; every named mechanism counted |

The testbench helpers in `tb/` are `sram_model`, an asynchronous SRAM that writes on the rising
edge of WE#; `adc_model`, a sampling ADC with a busy-style EOC; and `isa_bus_if`, PC I/O read
and write cycles. The analog pulse amplitudes are placed in the middle of a channel, so each
testbench knows the expected channel without consulting the design.
