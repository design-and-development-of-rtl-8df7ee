# Eight-cavity digital low-level RF controller

A linear accelerator's RF cavities are driven so that the field inside each
one keeps a set amplitude and phase. This FPGA design does that for eight
cavities at once. Each cavity's pick-up signal is **undersampled** directly by
an ADC. The samples are turned into an I/Q vector, and the vector into
amplitude and phase. Two PI loops correct the amplitude and phase, and the
corrected drive vector is turned back into a sample stream for a DAC, whose
filtered output drives the cavity's amplifier. The converters are connected
over JESD204B lanes. Software reaches the loop registers, and the SPI and IIC
buses of the board's chips, over IPbus.

The key trick is the sampling rate. With

    f_s = D * 4 * f_RF / (2N - 1),    N = 11

consecutive samples taken D apart advance the RF phase by a quarter turn
(plus whole turns). Every D-th sample is therefore I, Q, -I, -Q, I, ... in
turn, with no mixer or NCO. At f_s = 121.9 MHz this gives D = 8 for 80 MHz
cavities and D = 4 for 160 MHz cavities, from one clock. The DAC side works
the same way in reverse.

## Per-cavity signal path (`cavity_controller`)

One pass runs for every demodulated (I, Q) pair, which comes every 2·D
samples:

1. **Demodulator** (`iq_demodulator`)
   - Keeps every D-th ADC sample and names it I, Q, -I or -Q by a 2-bit slot
     counter.
   - Removes the signs and, if averaging is on, averages 2^avg_exp pairs
     (integrate and dump).
   - Outputs |I|, |Q| and the two sign bits.
   - `ccw` flips Q for values of N whose sample order runs I, -Q, -I, Q.
2. **Vectoring CORDIC** (`cordic`, 16 iterations, 19-bit, fully pipelined)
   - Gives the magnitude and the first-quadrant angle.
   - The sign bits then restore the quadrant.
   - Angles are binary fractions of a turn, so phase arithmetic wraps for
     free.
3. **Errors.** `phase_err = phase_sp - phase` wraps. `field_err = field_sp -
   amplitude` saturates. Magnitudes saturate; phases wrap.
4. **Two PI loops** (`pi_controller`)
   - The unsigned 16-bit gains have 8 fractional bits.
   - Each loop has an integrator with anti-windup when saturating.
   - The field loop always saturates.
   - The phase loop wraps in GDR mode and saturates in SEL mode, for the
     reason given in the SEL/CPM section below.
5. **Drive vector in polar form**
   - Amplitude is the quiescent power plus the field correction.
   - Phase is the phase correction in **GDR** (generator-driven resonator)
     mode.
   - In **SEL** (self-excited loop) mode, phase is the measured cavity phase
     plus a programmable phase shift.
6. **Rotation CORDIC** turns the polar drive back into I/Q. Its output is
   divided by 4 to fit 16 bits.
7. **CPM** (`cpm`, complex phase modulator). It computes `Vout = Vin + j·k·Vin`,
   which turns the vector by atan(k) and adds only first-order amplitude. k is
   the phase-loop output in SEL and 0 in GDR.
8. **Modulator** (`iq_modulator`)
   - Writes I, Q, -I, -Q into every D-th DAC slot and zeros in between.
   - `power_en = 0` silences the output.

Next to the chain:

- **`freq_error`** sums the wrapped backward difference of the phase error
  over 256 loop samples and reports the sum. This is the rate of change of
  the phase error. A cavity that resonates above the reference gives a
  **negative** value. It is what a slow tuner loop would read.
- **`lock_detector`** (one per loop) reports lock when |error| ≤ threshold
  for `window` consecutive samples.

### GDR versus SEL, and why the CPM

- **GDR.** The loops set the drive outright. This needs the cavity close to
  resonance.
- **SEL.** The cavity's own signal, shifted, is fed back, so the cavity rings
  at whatever its resonance currently is. This is useful while it is far
  detuned. The phase is then pulled to the set point without a new phase
  command: the CPM adds a small quadrature vector.

In SEL the phase-loop output is tan φ. If it wrapped from +max to −max, it
would flip the correction and the loop oscillates. Saturating it in SEL mode
removes that limit cycle.

### Latency and rates

| Quantity | Value |
|---|---|
| Loop update rate, D = 8 | f_s / 16 = 7.6 MHz |
| Loop update rate, D = 4 | f_s / 8 = 15.2 MHz |
| Demodulated pair to new DAC drive | 2·(16+1) + 5 = 39 clocks |
| CORDIC | one result per clock |

## JESD204B lanes

Settings: subclass 0 (no SYSREF), F = 2 octets per frame, so one 16-bit
sample per lane per clock. K = 32 frames per multiframe. No scrambling. The
transceivers themselves (8b/10b, SERDES, comma alignment) are outside; the
lanes work on their 16-bit parallel side. Bits 7:0 of the word are the
earlier octet, and a sample's MSB goes first.

**Receive lane** (`jesd204_rx_lane`) is three blocks in a row:

1. **`jesd204_cgs`** (code group synchronization). It deasserts SYNC~ after
   four words of K28.5 commas, and reasserts it after four bad words.
2. **`jesd204_ifs_ils`** (initial lane alignment and de-framing)
   - Once SYNC~ is released, it finds the ILAS.
   - It checks four multiframes: /R/ at the start, /A/ at the end, /Q/ in the
     second.
   - It then marks frame and multiframe starts.
   - It replaces /F/ and /A/ in a frame's last octet with the previous
     frame's last octet.
   - `sync_check` reports "ILAS passed and the /A/ characters are where they
     should be".
3. **`jesd204_ls`** (lane alignment buffer). It is a 16-word FIFO written from
   the first multiframe start. A link's two lanes are read together once both
   hold data, which removes skew between them. Overflow is sticky.

**Transmit lane** (`jesd204_tx_lane`) mirrors the receiver:

- It sends K28.5 while SYNC~ is low.
- It then sends a four-multiframe ILAS from the next LMFC boundary. The second
  multiframe carries the 14 link-configuration octets and their checksum.
- It then sends samples, with the same /F/ and /A/ substitution.

## Register interface (IPbus)

`ipbus_fabric` decodes word-address bits 15:8. Slave n occupies
`0x100·n … 0x100·n+0xFF`. An unused slave number answers with err. Every
slave acknowledges one clock after strobe.

| Slave | Block | Contents |
|---|---|---|
| 0–7 | `ctrl_regs` | loop registers of cavity 0–7 |
| 8 | `config_regs` | SPI master (10 chip selects: 4 ADCs, 4 DACs, 2 PLLs) and IIC master (front-end and power-monitor boards) |
| 9 | `xcvr_regs` | lane status (CGS done, ILAS ok, sticky overflow, TX data phase, SYNC~ levels) and lane resets |

Control registers (`ctrl_regs`, 18 words):

| Addr | Contents |
|---|---|
| 0 | [5:0] D, [10:6] averaging exponent, [11] ccw, [12] phase loop on, [13] field loop on, [14]/[15] phase/field locked (read), [16] SEL, [17] power enable, [18] averaging enable |
| 1–4 | phase shift, quiescent power, phase set point, field set point |
| 5–8 | phase Kp, phase Ki, field Kp, field Ki |
| 9–12 | phase/field lock threshold, phase/field lock window |
| 13 | reads 0 |
| 14 | [15:0] phase error, [31:16] field error |
| 15 | frequency error (24 bit, sign extended) |
| 16–17 | phase correction, field correction |

Reset puts D = 8 with everything else 0: loops open and power off.

Configuration registers:

| Addr | Contents |
|---|---|
| 0 | SPI control: device [3:0], bit count [13:8], start [31] |
| 1 | SPI data out |
| 2 | SPI data in |
| 3 | status: SPI busy, IIC busy, IIC NACK |
| 4 | IIC control: device [6:0], read [7], register [15:8], start [31] |
| 5 | IIC data out |
| 6 | IIC data in |

- **SPI:** mode 0, MSB first, 1–32 bits.
- **IIC:** one-byte register write, or a read with a repeated start. There is
  no clock stretching.

## Top level (`rf_ioc_top`)

- 8 receive lanes, 8 cavity controllers and 8 transmit lanes.
- Lanes 2l and 2l+1 form dual-converter link l. Its SYNC~ is the AND of the
  two lanes.
- Cavity c reads receive lane c and writes transmit lane c.
- Plus the IPbus fabric and its ten slaves.
- Ports: the transceivers' parallel data, the four ADC and four DAC SYNC~
  signals, the IPbus master bus, and the SPI and IIC pins.
- Single clock (the 121.9 MHz device clock), synchronous active-high reset.

Synthesised by yosys it comes to about 13 k cells, 7.5 k flip-flop bits, and
40 kbit of memory (the alignment buffers).

## Where this departs from the reference design, or fills gaps

- **Register-map conflicts.** The controller's register table and its
  register layout disagree on the field integral gain (7 or 8) and on the
  error and frequency-error addresses. This design uses 8, 14 and 15.
- **Design choices.** These were not specified and were chosen here:
  - number formats (gain Q8.8, CPM factor Q1.15, angles as turn fractions)
  - CORDIC iteration count
  - frequency-error window
  - lock rule
  - averaging as integrate-and-dump
  - zero samples between DAC slots
  - address map
  - SPI/IIC frame formats
  - contents of the transceiver registers
  - lane-to-link pairing
- **Phase-loop saturation in SEL mode** is this design's own addition (see
  above).
- **CORDIC range.** The CORDIC has a 180° pre-rotation, so it takes any
  quadrant, although the demodulator feeds it only positive values.
- **Not here:**
  - the gigabit transceivers and the IPbus Ethernet core (vendor / library
    blocks)
  - the converter and PLL chips
  - the analog front end and filters
  - the power monitor board
  - the slow cavity-tuning state machine, which runs in control-system
    software

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, has a watchdog, and compares against
independently computed values (floating-point CORDIC and cavity references,
bit-exact PI and CPM models, JESD204B frames built in the bench).

Models used by the benches:

- `tb/cavity_model.sv`: a first-order baseband cavity with detuning. It
  converts undersampled ADC samples to and from DAC slots.
- `tb/spi_slave_model.sv` and `tb/i2c_slave_model.sv`: the board's slave
  devices.
- `tb/ipb_master_tasks.svh`: IPbus read and write tasks.

`tb_cavity_controller` closes the loop around the cavity model in:

- GDR
- SEL with the CPM
- both detuning signs
- D = 8 and D = 4
- a phase step
- power off

`tb_rf_ioc_top` runs the whole chip at its default size (8 cavities):

- ADCs serialised through the transmit-lane logic into the receive lanes
- DAC lanes decoded back into cavity models
- link bring-up (CGS, ILAS)
- character replacement
- GDR lock and set-point tracking
- SEL with CPM
- frequency-error sign
- averaging
- SPI and IIC transfers
- a bus error
- a lane reset

It counts each of these and fails any that never happened. It takes about
a second to simulate after a 10 s build.

Run one bench with plain Verilator, for example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/llrf_pkg.sv rtl/*.sv \
        tb/cavity_model.sv tb/spi_slave_model.sv tb/i2c_slave_model.sv \
        tb/tb_rf_ioc_top.sv --top-module tb_rf_ioc_top
    ./obj_dir/Vtb_rf_ioc_top
