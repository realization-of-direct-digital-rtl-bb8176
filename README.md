# DDS function generator: FPGA sample engine with a PSoC analog back end

This is a direct digital synthesis (DDS) function generator that makes sine,
triangle (ramp) and square waves. The work is split between two chips:

* an **FPGA** computes the waveform digitally: a phase accumulator, a
  quarter-wave sine table and two simpler shape generators;
* a **PSoC** (a microcontroller with configurable analog blocks) turns the
  samples into a voltage with an 8-bit DAC, a second-order anti-imaging
  low-pass filter and a programmable gain amplifier (PGA). It also talks
  to a PC over USB.

A UART link joins the two chips. Samples go from the FPGA to the PSoC and
commands go the other way. The PSoC decodes PC commands itself. A gain
command sets the PGA. A waveform or frequency command is passed on to the
FPGA.

The RTL here covers all the digital logic of both chips:

* the whole FPGA side;
* the PSoC's digital side: UART, command decoder, PGA gain register and the
  timer that resets the FPGA.

The analog chain and the USB device appear as ports.

```
 PC --USB bytes--> [psoc_digital]                         [dds_fpga]
                    psoc_contr_unit --uart_tx--- tx ---> uart_rx --> fpga_contr_unit
                    (gain -> pga_gain)                                 | ftw, wave
                    reset_timer ------------ fpga_rst ----------> rst  v
   dac_code <------ uart_rx <--------------- rx <--- uart_tx <----- dds_core
   (8-bit DAC, LPF, PGA are analog: outside)                 sine_wave / triangle_wave /
                                                             square_wave, phase_accumulator
```

## How a sample is made

### Phase accumulator and tuning equation

`phase_accumulator` holds a 32-bit phase. On each update it adds the
frequency tuning word `ftw`, wrapping modulo 2^32. If the accumulator is
updated `fs` times per second, the output frequency is

    f0 = ftw * fs / 2^32

and the frequency step is `fs / 2^32`. A phase offset input is added after
the register. The core ties it to zero, because no command sets it.

### Quarter-wave sine table (`sine_wave`)

This is the part that needs the closest reading. Only the top
`PHASE_W = 10` bits of the phase are used (truncation). Those 10 bits are
registered and then split up:

| bits            | role                                                        |
|-----------------|-------------------------------------------------------------|
| `phase[9]`      | half of the period: the table value is negated when it is 1 |
| `phase[8]`      | quarter: the table is read backwards when it is 1           |
| `phase[7:0]`    | table address `a`                                           |

When it is read backwards the address is `255 - a`. So the table only
stores the first quarter of a sine, in 256 entries of 7 bits:

    LUT[i] = round(127 * sin(pi/2 * (i + 0.5) / 256)),  i = 0..255

The half-step offset `+0.5` makes the second quarter an exact mirror of the
first. As a result the output for every 10-bit phase `p` is

    ampl = round(127 * sin(2*pi*(p + 0.5) / 1024))

This is a signed 8-bit value in -127..127. The testbenches use this
closed-form expression, computed over the whole circle with `$sin`, as
their reference. The table itself is computed at elaboration by a constant
function, so there is no data file. Changing `PHASE_W` or `AMPL_W` changes
the table.

Pipeline: the phase register feeds the address fold. The table read is
registered, and the half-period bit is delayed alongside it. `ampl_o`
therefore shows the accumulator phase of two updates earlier.

### Triangle (ramp) and square

Both shape blocks take the sine block's `phase_o`, so all three shapes run
from one accumulator.

* `triangle_wave` outputs the top 8 phase bits with the MSB inverted. This
  is a ramp from -128 to 127 once per period, which is the shape the
  generator produces under the name "triangle". It is not a symmetric
  triangle.
* `square_wave` outputs +127 for the first half of the phase circle and
  -128 for the second half, a 50 % duty cycle.

`dds_core` selects one of the three shapes with `wave`. It then inverts the
MSB, which turns the signed value into an offset-binary code for the
unipolar DAC (128 is mid-scale).

## The sample rate is the link rate

The FPGA does not run the accumulator at its clock rate. `dds_fpga`
offers the current sample to the UART transmitter all the time. Each time
the transmitter takes a byte, the core advances by one sample. The UART
sends 8N1 frames back to back, ten bit times per byte with no gap. The
transmitter takes the next byte in the last clock of the stop bit. So

    fs = BAUD / 10 = 16 MHz / 427 / 10 = 3747 samples/s   (BAUD = 37.5 kbit/s)

The bit time is `round(CLK_HZ/BAUD)` = 427 clocks, so the real rate is
37 471 bit/s.

Example: a 114 Hz wave needs `ftw = 114 * 2^32 / 3747 ≈ 1.307e8`, which
gives about 33 samples per period. The end-to-end testbench measures a
square-wave period of 140 910 clocks, which is 113.5 Hz.

The link rate sets the bandwidth. Nyquist allows up to about 1.87 kHz, and
waveforms look reasonable up to a few hundred hertz. The link was found to
be unreliable above about 37.5 kbit/s. A 2 MHz output would need a
sample path thousands of times faster than this UART.

## Commands

All commands are byte frames: an opcode followed by its payload. The PC
sends them to the PSoC. The PSoC forwards the ones meant for the FPGA
unchanged.

| frame                        | meaning                               | handled by          |
|------------------------------|---------------------------------------|---------------------|
| `'F'` (0x46) + 4 bytes, MSB first | tuning word `ftw`                | FPGA                |
| `'W'` (0x57) + 1 byte        | 0 = sine, 1 = triangle, 2 = square    | FPGA                |
| `'G'` (0x47) + 1 byte        | PGA gain level 0..15 (16 levels)      | PSoC (`pga_gain`)   |

* **`psoc_contr_unit`** collects a frame from the `usb_*` valid/ready
  stream.
  * A `'G'` frame loads the gain register.
  * `'F'` and `'W'` frames are queued for the UART transmitter byte by
    byte. While that happens, `usb_ready` is low, which stalls the PC side.
  * An unknown opcode, a waveform code above 2 or a gain above 15 drops the
    frame and pulses `cmd_dropped`.
  * An assertion checks that an offered UART byte stays stable until it is
    taken.
* **`fpga_contr_unit`** parses the same frames from its UART receiver.
  * Tuning-word bytes are shifted into a load register. The delta-phase
    register `ftw` is written only when the fourth byte arrives, so the DDS
    never runs on a half-loaded word.
  * Invalid frames are ignored.
  * After reset, `ftw = 0` (a constant output) and the waveform is sine.

`uart_rx` synchronises the line with two flip-flops and re-checks the start
bit at mid-bit. It samples each bit in its middle. If the stop bit is low it
drops the byte and pulses `frame_err`. On the PSoC side that pulse is the
`link_err` output, and the DAC register is left unchanged.

## FPGA reset timer

`reset_timer` keeps `fpga_rst` high for about one second after the PSoC
leaves reset, or after a `trigger` pulse. It uses a prescaler of 488 (about
32.8 kHz ticks at 16 MHz) and a 16-bit counter that counts 32768 ticks. The
pulse lasts 488 × 32768 clocks, which is 0.999 s. While the pulse is high
the whole FPGA side is held in reset and sends nothing, and the DAC register
stays at mid-scale.

## Top-level ports (`dds_generator`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | one clock for both halves; synchronous active-high reset of the PSoC side |
| `usb_data`, `usb_valid`, `usb_ready` | in/in/out | 8/1/1 | command bytes from the PC (USB device is outside) |
| `dac_code`, `dac_strobe` | out | 8/1 | DAC register and its update pulse (DAC, LPF, PGA are analog, outside) |
| `pga_gain` | out | 4 | PGA gain level |
| `fpga_rst` | out | 1 | reset pulse from the PSoC timer to the FPGA |
| `cmd_dropped` | out | 1 | a command frame was invalid |
| `link_err` | out | 1 | a sample byte arrived with a bad stop bit |

Parameters, with their defaults:

* `CLK_HZ` = 16 000 000;
* `BAUD` = 37 500;
* `FTW_W` = 32;
* `PHASE_W` = 10;
* `AMPL_W` = 8. The link carries bytes, so the top asserts `AMPL_W == 8`.
* `PRESCALE` = 488;
* `RST_TICKS` = 32768.

All registers reset synchronously, and there are no latches. The only
arrays are the constant sine table and the five-byte frame buffer of the
PSoC command decoder.

## Where this RTL makes its own choices

The generator's structure is fixed:

* a DDS core with three shape sub-blocks;
* a quarter-wave sine table of 256 samples with folding and negation;
* an 8-bit DAC path;
* a UART link at 37.5 kbit/s;
* a control unit on each chip;
* a 16-bit timer that makes a reset pulse of about 1 s;
* 16 gain levels.

The following are choices made here, and are the first places to look when
matching another implementation:

* **Width of the truncated phase.** The 256-entry table is read as the
  quarter-wave table, so 10 phase bits are used. A reading of 256 samples
  per whole period would mean `PHASE_W = 8`, and that is a parameter
  change.
* **Table contents and rounding.** These are given by the formula above.
* **The "triangle" is a ramp.** It follows the shape the generator actually
  outputs. A symmetric triangle would need a different `triangle_wave`.
* **DDS pacing.** The DDS is paced by the link, one sample per UART byte,
  rather than by a fast clock.
* **Link protocol.** The UART uses 8N1 framing. The command encoding in the
  table above is this design's own.
* **PSoC logic as hardware.** The PSoC's control unit was software on its
  microcontroller. Here it is a state machine with the same decisions: wait
  for a valid command, then either adjust the gain or forward the command
  to the FPGA.
* **Time base of the reset timer.** The prescaler and 32.768 kHz tick are
  chosen here. One shared clock is used for both chips.
* **Offset-binary output and zero phase offset.**

Not covered: the analog parts (DAC, filter, PGA, the output amplitude) and
the USB device. The distortion target of the generator was never measured,
and nothing here models it.

## Simulating

Each block has a self-checking testbench in `tb/`, named `tb_<module>`.
Each one prints `TB_RESULT checks=N failures=M` and stops on a watchdog if
it hangs. `tb/dds_ref_pkg.sv` holds the reference models: the full-circle
sine, the ramp, the square, and a cycle model of the core pipeline.

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv --top-module tb_dds_generator \
    rtl/dds_pkg.sv tb/dds_ref_pkg.sv tb/tb_dds_generator.sv
./obj_dir/Vtb_dds_generator
```

To run another testbench, replace `tb_dds_generator` with its name.

The block testbenches use small clock-to-baud ratios (8 to 32 clocks per
bit) and short timers so that they finish in milliseconds.
`tb_dds_generator` runs the whole design at its default sizes, which takes
about 10 s of simulation time. It covers:

* the 1 s FPGA reset;
* a gain command;
* a dropped command;
* a stalled USB stream;
* a 114 Hz tuning word;
* all three waveforms.

Every DAC byte is compared with the reference model, and so is the spacing
of the bytes, which must be 4270 clocks. The run ends with a period
measurement and counts of each mechanism.

`tb_frequency_band` runs the FPGA half at its default sizes. It programs
square waves at 20, 114 and 200 Hz over the serial link and measures each
frequency from the decoded sample stream. The measured values are 20.00,
114.12 and 199.84 Hz, each within one sample of `2^32/ftw` per period.
