# Multi-mode demultiplexing stimulator for intracortical electrode arrays

An array of hundreds of stimulating electrodes cannot be driven with one DAC
and one wire per electrode, and the data link feeding an implanted chip (a
radio link) is slow. This design shares one current DAC among eight
electrodes and moves pulse timing and pulse parameters onto the chip:

* **on-chip timers** produce the whole biphasic pulse (cathodal phase,
  delay, anodal phase) from one command instead of four, and the time
  between "on" and "off" no longer depends on when the link can carry the
  next word, so the two phases stay charge-balanced;
* **on-chip pixel RAM** holds one amplitude and one pulse width per
  electrode, and a train controller repeats the pulses from it on its own.
  The link then only carries changes to the picture.

The chip can also be run in a **basic** mode in which each word just sets
the DAC current and routes it to an electrode, leaving all timing to the
outside world. Amplitude and pulse width can each be the modulated
quantity in every mode.

The default configuration is the eight-channel chip: one input section,
one DAC subsystem, a 250 kHz master clock that is also the timer clock (4
us resolution), and the 1/128 slow clock (512 us) brought in from outside
on the SLOW pin.

## Serial words

The link is synchronous: DATA is sampled on every rising edge of the chip
clock, so one word bit lasts one clock cycle. The line idles high. A word
is 17 bits:

| bits | value |
|---|---|
| 1 | start bit, 0 |
| 7 | address a0..a6, LSB first |
| 7 | magnitude m0..m6, LSB first |
| 2 | stop bits, 0 then 1 |

The two stop bits have opposite values so that noise is unlikely to frame a
word by chance. If either is wrong, ERR goes high for one cycle and the word
is dropped. After every frame, good or bad, the receiver looks for a new
start bit in the very next cycle. A glitch on an idle line therefore costs
one ERR pulse and no loss of step. A good word takes effect 17 cycles after
its start bit (68 us at 250 kHz); words may follow each other with no gap.

## Address map

| a6..a0 | meaning |
|---|---|
| `0 P C C C D D` | channel write: channel CCC, magnitude is an amplitude (P = 0) or a pulse width (P = 1) |
| `1 T 1 0 X D D` | write T2 (T = 0) or T3 (T = 1) |
| `1 X 1 1 0 X X` | write the mode register (low 3 magnitude bits) |
| `1 X 1 1 1 X X` | reset the chip |
| `1 M 0 0 X D D` | write the magnitude into every word of the amplitude (M = 0) or pulse-width (M = 1) RAM bank |
| `1 X 0 1 X X X` | unused, ignored |

DD selects a DAC subsystem. The single subsystem of the eight-channel chip
is DD = 00, and DD = 11 reaches every subsystem at once, for example to
initialise all of them with one word.

An amplitude is a 7-bit sign/magnitude code. Bit 6 set means anodal
(current sourced into the electrode). Bit 6 clear means cathodal (current
sunk). Bits 5..0 are the magnitude. Pulse widths and T2 are counted in
fast ticks (4 us). T3 is counted in slow ticks (512 us).

## Modes

| code | mode | a channel write does |
|---|---|---|
| 000 | load | update RAM and the named register (amplitude or T1); no output |
| 001 | basic | set the amplitude (P is ignored), store it in RAM too, and drive that current steadily into the addressed electrode |
| 010 | single pulse | store the value in RAM and its register, fetch the other value of the pair for that channel from RAM, and send one biphasic pulse on that channel |
| 110 | continuous | update RAM only; the train controller keeps pulsing every channel from RAM |

Any other code behaves like load mode. The chip comes out of reset in load
mode. Writes to T2 and T3 and bank fills work in every mode.

## The DAC subsystem

Each subsystem (`dac_subsystem`) has an amplitude register, the timer
registers T1 (phase width), T2 (biphasic delay) and T3 (interpulse
interval), one 7-bit countdown timer, a pulse controller, a train
controller, the two RAM banks, and the decoder that drives the eight
passgates.

### One biphasic pulse

The pulse controller runs this sequence on the shared timer:

```
start -> load T1, DAC on          (phase 1: T1 ticks)
      -> load T2, DAC off         (delay:   T2 ticks)
      -> load T1, DAC on, sign inverted (phase 2: T1 ticks)
      -> DAC off, done
```

The sign of the second phase is produced by inverting bit 6 on its way to
the DAC. The stored amplitude does not change, so the next pulse starts with
the same polarity. A count of N lasts exactly N fast ticks, and a count of 0
acts as 1. With a fast tick in every cycle, as on the eight-channel chip, a
pulse occupies exactly 2*T1 + T2 cycles. A single-pulse word's pulse begins
two cycles after the word is received: one cycle to load the register from
RAM, one to start.

During the whole pulse, including the delay, the addressed electrode is
connected to the DAC. At all other times, except in basic mode, every
electrode is switched to the EXHAUST line (ground), which drains charge left
on it. In basic mode the last addressed electrode stays connected and the
DAC stays on.

### The continuous train

In mode 110 the train controller sets its channel counter to 0. For each
channel it loads the amplitude register and T1 from RAM (one cycle), starts
the pulse controller (one cycle), and waits for the pulse to finish. After
channel 7 it loads the timer with T3 on the slow time base, waits for the
time-out, and starts over. A frame therefore lasts

    8 x (2*T1 + T2 + 2) fast cycles  +  T3 slow ticks

All channels share the same T2 and T3, so every channel repeats at the same
rate. With 100 us phases (T1 = 25) and a 12 us delay (T2 = 3), the pulses of
a frame take 1.76 ms. T3 = 1 then gives 440 to 570 frames per second,
T3 = 3 gives 300 to 360, and T3 = 127 about 15. Because the slow tick is not aligned to the load, T3
slow ticks last between T3-1 and T3 slow periods.

A RAM update that arrives in continuous mode is used the next time the
train reaches that channel. The pulse in flight keeps its values, because
in this mode writes do not touch the registers.

### A single-pulse word during a pulse

A word that arrives in single pulse mode while a pulse is still running
updates RAM but does not start a pulse, and it does not disturb the running
pulse. The sender has to space single-pulse words at least one pulse apart.

## Time bases

All logic runs on the master clock. The "fast" and "slow" clocks are clock
enables (`fast_tick`, `slow_tick`):

* `fast_tick` is the master clock divided by `FAST_DIV`. It is 1 at 250
  kHz. A chip with a faster master clock, for example 2 MHz for more
  channels, would use `FAST_DIV = 8`.
* `slow_tick` is a rising edge seen on the SLOW pin (`ON_CHIP_SLOW = 0`, the
  default, because the eight-channel chip took its slow clock from
  outside), or the fast tick divided by `SLOW_DIV = 128` on chip
  (`ON_CHIP_SLOW = 1`).

## Reset

The RESET pin clears everything: controllers, registers, RAM and mode. A
write to the reset address does the same for everything except the serial
receiver, so that a word sent right behind the reset word is still
received.

## Analog parts

The DAC is a binary-weighted current mirror. Each magnitude bit switches in
a source or sink of twice the weight of the bit below, and the sign selects
sources (anodal) or sinks (cathodal). A 3-to-8 decoder drives eight CMOS
passgates that connect the active electrode to the DAC and the others to
EXHAUST.

Only the decoder is logic (`channel_demux`). The DAC (`current_dac`) and
the passgates (`passgate_array`) are behavioural models that use `real`
values. They turn the digital outputs into the current in microamps
delivered to each electrode, so that tests can check currents. They are
ideal models. The unit current `LSB_UA` is set to 2 uA, so a 120 uA pulse is
code 60. On silicon the unit current depends on the supply voltage and is
trimmed with it. The models are not synthesizable; a synthesis flow would
replace them with the analog macro and pads.

## How far it goes, and where it departs

* Built: the input section (receiver, address decoding, mode register, reset
  word), the complete DAC subsystem with all four modes, both dividers, and
  the top with models of the analog parts.
* The address format is that of the eight-channel chip: two DAC select
  bits, so `NUM_DACS` is 1 to 3. The 625-channel scaling (79 DACs, 11
  address bits, 21-bit words) would need a wider address word and is not
  parameterised.
* Only T1 can be loaded from RAM. No RAM holds T2, so T2 comes only from
  the serial link.
* Not modelled: DAC non-linearity (up to 2 LSB on silicon), the weaker
  anodal compliance, the charge drained through EXHAUST, and the bias
  network.
* This design's own choices include: the sign polarity; reporting ERR at
  the end of the second stop bit; ignoring a start request while a pulse
  runs; a count of 0 acting as 1; register-free writes in continuous mode;
  reset values; unused mode codes acting as load.

## Files

| file | contents |
|---|---|
| `rtl/stim_pkg.sv` | widths, mode and command types, address map summary |
| `rtl/stim_chip.sv` | top level |
| `rtl/serial_rx.sv` | input controller, shift register, address latch |
| `rtl/addr_decode.sv` | address decoding into commands |
| `rtl/mode_reg.sv` | mode register |
| `rtl/dac_subsystem.sv` | one DAC control element |
| `rtl/amp_reg.sv`, `rtl/timer_regs.sv` | amplitude and timer registers |
| `rtl/countdown_timer.sv` | 7-bit two-speed countdown timer |
| `rtl/pulse_controller.sv`, `rtl/train_controller.sv` | the two sequencers |
| `rtl/pixel_ram.sv` | amplitude and pulse-width banks |
| `rtl/channel_demux.sv` | passgate decoder |
| `rtl/clk_divider.sv` | tick divider |
| `rtl/current_dac.sv`, `rtl/passgate_array.sv` | behavioural analog models |
| `tb/tb_<module>.sv` | a self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Each has a watchdog. Run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/stim_pkg.sv tb/tb_stim_chip.sv --top tb_stim_chip
./obj_dir/Vtb_stim_chip
```

Replace the testbench name to run another one. `tb_stim_chip` runs the
default eight-channel chip end to end through the serial line, in about a
second. It covers:

* a load-mode set-up;
* cathodal and anodal amplitude sweeps in basic mode;
* single pulses of 20 uA and 200 us, started by amplitude words and by
  pulse-width words, plus a word sent during a pulse;
* three frames of the eight-channel continuous demonstration: 100 us phases,
  channels 0-3 cathodal-first at 60/80/100/120 uA and channels 4-7
  anodal-first at 120/100/80/60 uA, with the interpulse interval timed from
  SLOW;
* a RAM update while the train runs;
* framing errors, an idle-line glitch, the reset word, a broadcast bank
  fill, and a word for an absent DAC.

It counts each of these and fails if one never happened.

`tb_stim_rates` measures repeat rates, also at the default parameters. In
continuous mode it checks the frame period for T3 = 1, 3, 10 and 40 against
the formula above and confirms that 300 Hz is reachable. In single pulse
mode it pulses all eight channels at 150 Hz each, one word per pulse, and
checks the period on every channel.

`tb_stim_scaled_clock` runs the chip on a 2 MHz master clock, with
`FAST_DIV = 8` and the slow divider on chip (`ON_CHIP_SLOW = 1`). It checks
that the pulse phases and the interpulse interval keep their lengths in
250 kHz ticks. The module
testbenches check the cycle timing of the timer, the pulse controller, the
train controller and the receiver against independent models.

The design has been checked with Verilator's lint and with yosys' slang
front end. The simulations rely on two-state behaviour: every register that
is read is reset.
