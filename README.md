# Digital controller for a switch-mode magnet power supply

This is the FPGA logic of a power-supply controller for accelerator magnets.
The controller holds the output current of a switch-mode converter at a
reference. A 24-bit ADC measures the current. A regulator compares it with the
reference and sets a modulation index. A PWM generator turns that index into
two gate signals, S0 and S1, with 5 ns edge placement from a 50 MHz clock.
Around this loop sit:

- a state machine that trips the converter on interlocks or while parameters
  are being changed;
- a register space for operator settings and monitoring;
- a "virtual scope" that records internal signals;
- monitor DACs;
- a FIFO link to an embedded processor board that runs the control-system
  server.

Everything is written in synthesizable SystemVerilog, in a single 50 MHz
clock domain. The processor bus is the only asynchronous input, and it is
synchronised on entry.

## How the pieces connect

```
 adc_main ──► feedback_regulator ──m──► pwm_generator ──► S0/S1 quarter levels ──► (phase-clock output stage)
               ▲ i_ref, kp, ki            ▲ slave, sync_in        └─► sync_out
               │                          │
 reg bus ◄──► register_bank ──setting_up, commands──► psu_state_machine ◄── ilk_in[15:0]
               │        ▲ monitored values                 └─► regulate, dig_out[7:0]
               │        │
               └─ selects ─► signal_select ×2 ──► dac[4]
                                         └──────► virtual_scope (512×32 RAM) ◄──► scope read port
 processor bus ◄──► processor_board_if (rx/tx 256×8 FIFOs) ◄──► FIFO ports of the communication controller
```

`dpsc_top` wires these blocks together. Some parts are outside it and appear
only as its ports:

- the converter chips: ADC and DAC samples come and go as parallel words;
- the 8-bit soft processor that acts as communication controller;
- the USB, flash, DDR, fast-feedback Ethernet and optical timing links;
- the phase-shifted clocks of the PWM output stage.

## PWM generation (the hard part)

The generator makes two gate signals, S0 and S1, in a fixed 500-clock period
(100 kHz at 50 MHz). A sync pulse marks the start of each 250-clock half. All
positions below are counted in quarter clocks from the last sync pulse, so one
half period is 1000 steps.

The modulation index `m` is signed, with 1.0 equal to 2^15. It sets the
difference in pulse length between the two signals:

    t1 = |m| · 1000          (quarter clocks, 0 … 1000)
    T  = floor((1000 − t1) / 2)

| half period | at T                   | at T + t1               |
|-------------|------------------------|-------------------------|
| first       | leading signal rises   | lagging signal rises    |
| second      | lagging signal falls   | leading signal falls    |

So the leading signal is high for 1000 + t1 quarter clocks per period and the
lagging one for 1000 − t1. Both are centred on the mid-period sync pulse. The
bridge voltage is proportional to their difference, 2·t1 out of 2000. S0 leads
when m ≥ 0 and S1 leads when m < 0. When 1000 − t1 is odd, the spare quarter
clock goes into the interval just before the next sync pulse. That interval is
then one step longer than T.

**Sub-clock resolution.** The logic runs at 50 MHz. Each clock it outputs four
bits per signal (`s0_ph`, `s1_ph`), one for each quarter of that clock; bit 0
is the quarter that starts at 0°. An output stage built from four clocks at
0/90/180/270° (an FPGA clock-manager resource, not included here) turns these
bits into edges that land on 5 ns steps.

**Dither.** |m|·1000 has 15 fraction bits below one quarter clock. A
first-order error-feedback accumulator adds that fraction once per period.
When the accumulator overflows, it rounds t1 up by one for that period. The
average of t1 over many periods therefore equals the exact demand, and the
running error stays below one quarter clock.

**Update timing.** `m` is sampled once per period, when the counter wraps, so
a change never tears a pulse. Outputs are registered. `sync_out` is high in
the same clock as the quarter pattern of the first clock of each half period.

**Master/slave.** With `slave` set, a pulse on `sync_in` moves the counter to
the nearest half-period boundary, so several cards switch in step. Sync pulses
mark both halves of the period. A slave can therefore lock with its period
start on either pulse: in phase with the master, or half a period away.

## Regulation loop

`feedback_regulator` is a PI loop. It runs once for each ADC sample
(`adc_valid`), and its output is valid two clocks later:

    e = i_ref − i_meas
    I ← clamp(I + ki·e, ±2^31)
    m = sat16((kp·e + I) >>> 16)

`kp` and `ki` are unsigned gains with 16 fraction bits. The integrator is
clamped at the level that already drives m to full scale, so it cannot wind
up. While the converter is not ON, the integrator is cleared and m is 0.
`dpsc_top` also forces the gate signals low.

## Protection: state machine and Setting Up

`psu_state_machine` has three states:

- **TRIPPED**: the converter is shut down;
- **OFF**: ready, converter off;
- **ON**: regulating.

It comes out of reset in TRIPPED. It goes to TRIPPED from any state, within
one clock, when:

- an enabled interlock input is active. The 16 isolated inputs are active
  high, pass a two-flop synchroniser and are masked by `ilk_mask`;
- the **Setting Up** bit is clear.

`register_bank` clears Setting Up on reset and on any write to a parameter
register. It sets Setting Up again when the parameter-done register is
written. So the converter can never run while its parameters are missing or
only half changed.

A reset command leaves TRIPPED only if no enabled interlock is active and
Setting Up is set. The on and off commands then move between OFF and ON. The
interlocks seen while tripping are latched in `trip_cause` until the next
accepted reset.

The digital outputs are:

| bit | meaning |
|-----|---------|
| 0   | converter enable |
| 1   | tripped |
| 2   | ready (OFF) |
| 7:3 | user bits from a register, forced low while tripped |

## Register map (`dpsc_pkg`)

Word addresses on the register bus. A write takes effect at the clock edge
where `wr` is high. Read data appear one clock after `rd`.

| addr | name | kind | content |
|------|------|------|---------|
| 00 | COMMAND | comm, W | bit0 on, bit1 off, bit2 reset (one-clock pulses) |
| 01 | IREF | comm | current reference, signed 24-bit ADC counts |
| 02 | SCOPE_CTRL | comm, W | bit0: scope read-out done |
| 03 | DOUT | comm | user digital outputs [4:0] |
| 10 | KP | param | proportional gain |
| 11 | KI | param | integral gain |
| 12 | ILK_MASK | param | 1 = input enabled as interlock (all 1 after reset) |
| 13 | MON_SEL | param | [15:0] four 4-bit DAC selects, [31:16] four 4-bit scope selects |
| 14 | SCOPE_CFG | param | [0] triggered mode, [1] falling slope, [3:2] trigger channel, [15:8] N, [16] enable |
| 15 | SCOPE_IVL | param | sample interval in clocks (minimum 4) |
| 16 | SCOPE_LVL | param | trigger level, signed 32-bit |
| 17 | PWM_CFG | param | [0] slave mode |
| 1F | PARAM_DONE | W | sets Setting Up |
| 20 | STATUS | RO | [1:0] state, [2] Setting Up, [3] scope ready, [4] scope triggered |
| 21 | ILK_IN | RO | [15:0] synchronised inputs, [31:16] trip cause |
| 22 | IMEAS | RO | measured current |
| 23 | MOD | RO | modulation index |
| 24, 25 | AUX01, AUX23 | RO | auxiliary ADC readings, two per word |

The 16 monitor signals that the DAC and scope selects choose from:

| select | signal |
|--------|--------|
| 0 | measured current |
| 1 | reference |
| 2 | error |
| 3 | m |
| 4 | integrator >>> 16 |
| 5–8 | auxiliary ADCs 0–3 |
| 9 | state |
| 10 | interlock inputs |
| 11 | t1 |
| 12 | trip cause |
| 13 | digital outputs |
| 14 | S0/S1 quarter levels |
| 15 | PWM sync |

A DAC shows bits 23:8 of the selected signal in offset binary.

## Virtual scope

`virtual_scope` stores 128 samples of four 32-bit channels in a 512×32 RAM,
at address {sample, channel}. At each sample instant the four values are
latched together and written one channel per clock. For that reason the
sample interval is at least four clocks.

- **Free run.** It takes 128 samples, raises `ready` and holds. A pulse on
  `rd_done` starts the next capture.
- **Triggered.** It samples continuously into a ring buffer. Then it takes N
  more samples, the trigger sample included, and raises `ready`. The trigger
  fires when two successive samples of the chosen channel are both past the
  level with the chosen slope:
  - rising: both above the level, and the second larger;
  - falling: both below the level, and the second smaller.

  A trigger counts only once 128 − N samples have been taken, so the whole
  buffer holds valid data.

Read-out addresses are logical: sample 0 is the oldest sample of the capture,
and data arrive one clock after the address. A finished capture is held until
`rd_done`, even if the mode is changed in the meantime.

## Processor board link

`processor_board_if` connects to the processor bus: 8 data bits, active-low
chip select and read/write strobes, two address lines and an interrupt. The
strobes, address and data pass a two-flop synchroniser. Each access is acted
on when its strobe ends.

| access | effect |
|--------|--------|
| write address 0 | pushes a byte into the receive FIFO |
| read address 0 | returns the head of the transmit FIFO; the byte is removed at the end of the strobe |
| read address 1 | returns status {rx_full, rx_empty, tx_full, tx_not_empty} |

`irq` is high while the transmit FIFO holds data. Strobes must be low for at
least three clocks, and high for three clocks between accesses. Both FIFOs
(`sync_fifo`) are 256×8 first-word-fall-through. Assertions flag overflow and
underflow.

## How far this follows the original design

From the source description:

- the block partition;
- the 50 MHz clock, four clock phases, 5 ns resolution and sync every 250
  clocks;
- the T / t1 edge structure and the dithering idea;
- 16 interlock inputs, 8 outputs, 16 selectable signals and 4 DACs;
- the Setting Up behaviour and the tripped state;
- the scope's RAM size, modes, sample interval and two-sample slope trigger;
- the 256×8 processor FIFOs.

This design's own choices:

- The regulator algorithm. The original loop was produced with a model-based
  tool and is not published; the PI loop here is the simplest loop that does
  the job.
- The state set and commands, beyond the tripped state.
- Interlock polarity and masking.
- The register map, the bus protocols and all widths not listed above.
- The monitor-signal list.
- The scope's pre-trigger ring and read handshake.
- The mapping t1 = |m|·1000.
- The slave alignment rule.

Not included: the communication controller (a vendor soft processor and its
firmware), the ADC/DAC serial interfaces, ADC linearity correction, the
waveform-reference player, flash and DDR controllers, USB, the fast-feedback
Ethernet, the optical timing input, the card-to-card serial bus and the
phase-shifted output stage of the PWM.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and stops. For example, with Verilator 5:

    verilator --binary --timing --assert -Irtl --top-module tb_pwm_generator \
        rtl/dpsc_pkg.sv rtl/pwm_generator.sv tb/tb_pwm_generator.sv
    ./obj_dir/Vtb_pwm_generator

`tb_dpsc_top` runs the whole controller at its default size. A first-order
model of the converter and magnet closes the loop. The test:

1. loads parameters and switches the converter on;
2. settles positive and negative references to within 1 %;
3. captures the step response with the triggered scope;
4. trips on an interlock and on a parameter change, and checks that the gates
   stop;
5. repeats free-run captures;
6. moves bytes both ways through the processor FIFOs;
7. locks the PWM to an external sync in slave mode.

It counts how often each of these happened, and fails if any never did. Build
it with all `rtl/*.sv` files, listing `rtl/dpsc_pkg.sv` first. The run takes
well under a second.

All sizes are parameters with the default values given above. The scope's
channel count must be a power of two, because its RAM address is formed as
{sample, channel}.
