# Bunch-by-bunch beam current monitor: FPGA logic

An electron storage ring with harmonic number 45 holds up to 45 bunches. These
circulate at 4.534 MHz and are spaced one RF period apart (204.03 MHz, 4.90 ns).
This design measures the charge of every bunch separately. A button beam
position monitor (BPM) sees each passing bunch as a short bipolar pulse. The
sum of its four electrodes goes to a 12-bit ADC. The ADC is clocked at the RF
frequency, so it takes exactly one sample per bucket. Its clock is delayed so
that every sample lands on the positive peak of a pulse, and that peak voltage
is proportional to the bunch charge for a given bunch length. The FPGA stores
65536 consecutive samples (1456 complete turns of all 45 buckets) in a FIFO.
The first stored sample always belongs to the same bucket. The FPGA then ships
the snapshot to a PC over USB. The PC averages each bucket's 1456 samples and
scales the 45 means so that they add up to the ring's total current, which a
DC current transformer (DCCT) measures. The same data, read turn by turn, also
shows each bunch's longitudinal (synchrotron) oscillation.

The RTL in `rtl/` covers the FPGA's part of that system. The BPM, combiner,
filter, ADC, USB bridge and PC software are outside it. Testbench models stand
in for the beam/ADC and for the USB bridge.

```
                 +-------------------- FPGA (bxb_monitor_top) ---------------------+
 ADC LVDS x12 -->| diff_input_buffer --12--> async_fifo 65536x12 --12--> fx2_fd    |--> USB bridge
 adc_dco ------->|          (wr_clk)            ^wr ^full   rd^ v empty            |    slave FIFO
                 |                              |           |                      |
                 |                        fifo_controller ----- GPIF: slwr_n,      |
                 |                      (arm, SYN wait,           pktend_n, full_n |
                 |                       write, drain)                             |
 SPI ----------->| spi_regs --arm--------------^                                   |
                 |    |  ^status, cur_tap                                          |
                 |    +--target_tap--> phase_shifter --PSEN/PSINCDEC--> dcm_delay  |--> sample_clk
 rf_clk -------->| freq_divider (/45) --SYN--> fifo_controller            ^ rf_clk  |    (to ADC)
                 +-----------------------------------------------------------------+
```

## Sampling on the peak: the clock path

Everything in the monitor is timed by the ring's RF clock, `rf_clk`.

* **Sample clock.** `sample_clk` is `rf_clk` delayed by `tap x 10 ps`, where
  `tap` runs from 0 to 1023. The longest delay is 10.23 ns, more than two RF
  periods, so the sampling point can be put anywhere in the bucket. In the
  FPGA the delay comes from the clock manager's (DCM's) fine phase shift.
  `dcm_delay` is a behavioural model of it. Each pulse on its PSEN input
  moves the delay by one tap, up or down according to PSINCDEC. PSDONE
  answers when the new delay is in force. `phase_shifter` is the synthesizable
  controller. It mirrors the DCM's tap position (0 after reset) and steps it
  one tap at a time toward the value the host wrote, waiting for PSDONE
  after every step. With the model's PSDONE latency of 4 cycles, one step
  takes 8 cycles of the 48 MHz control clock, so a 300-tap move takes about
  50 µs.
* **Finding the peak.** Finding the peak is the host's job. It sweeps the
  tap, takes a snapshot at each setting, and keeps the tap with the largest
  total signal. `tb/tb_phase_scan.sv` runs this procedure end to end.
* **SYN and bunch numbers.** `freq_divider` counts `rf_clk` modulo 45. Its
  count is the bucket number `bunch_no`, and `syn` is high for one cycle
  per turn, when the count is 0. A capture always begins a fixed number of
  buckets after SYN. So word `k` of every snapshot belongs to bucket
  `(k + r) mod 45`, with the same `r` every time. `r` depends only on the
  fixed latencies (ADC pipeline, synchronizers). It is found once, for
  example with a single-bunch fill.
* **ADC data clock.** The ADC returns its data with its own clock, `adc_dco`.
  That clock is the FIFO's write clock. It has the RF frequency but an
  unknown phase, so SYN reaches the write side through a two-flop
  synchronizer. This is safe: SYN is high for one full period of a clock of
  the same frequency, so exactly one write-clock edge samples it.

## One acquisition

`fifo_controller` spans two clock domains. The write side runs on `adc_dco`.
The control and read side runs on `sys_clk`, the USB bridge's interface clock
(48 MHz in the testbenches). Events cross between the two sides as toggles
through two-flop synchronizers.

1. The host writes 1 to bit 0 of the CTRL register. The controller holds the
   FIFO in reset for 4 `sys_clk` cycles, then passes the arm event to the
   write side.
2. The write side waits until the FIFO has left reset (its full flag reads 1
   while in reset) and SYN has been seen. It then writes one sample per
   `adc_dco` cycle until the FIFO is full, which is exactly 65536 samples
   (0.32 ms).
3. The "captured" event goes back to the read side. The read side then
   issues one FIFO read per `sys_clk` cycle, as long as the FIFO is not empty
   and the bridge's full flag `fx2_full_n` is high. Each word appears on
   `fx2_fd` one cycle after its read, with `fx2_slwr_n` low. It is the 12-bit
   sample, zero-extended to 16 bits. At full speed the snapshot takes 65536
   cycles (1.37 ms at 48 MHz).
4. `fx2_full_n` is treated as an almost-full flag: one more word may still
   be written in the cycle after it falls. If a snapshot does not fill a
   whole number of 512-byte USB packets, `fx2_pktend_n` pulses once after the
   last word. At 65536 words it never does, because 131072 bytes make exactly
   256 packets.
5. `done` is set (STATUS bit 2) and stays set until the next arm.

Capture and readout never overlap. The FIFO is filled completely and only
then drained, so the host always gets exactly one contiguous 65536-sample
snapshot. The USB link is slower than the ADC, which is why the FIFO exists.

`async_fifo` is a plain dual-clock FIFO. It uses a memory array and Gray-coded
pointers with two-flop synchronizers. The full and empty flags are registered,
the read data arrives one read-clock edge after the read, and reset is
asynchronous with a synchronous release in each domain. Assertions flag a
write into a full FIFO or a read from an empty one.

## Host control: SPI registers

`spi_regs` is an SPI slave in mode 0. The host sends 16-bit frames, MSB first:
`{rw, addr[2:0], data[11:0]}`. `rw` is 1 for a read, in which case the
register value is shifted out on `miso` during the 12 data bits. The SPI lines
are sampled by `sys_clk`, so `sclk` must stay below `sys_clk/4`.

| addr | name    | access | content                                                      |
|------|---------|--------|--------------------------------------------------------------|
| 0    | CTRL    | W      | bit 0 = 1: arm one capture                                   |
| 1    | TAP     | R/W    | requested sample-clock delay, 0..1023 taps of 10 ps          |
| 2    | STATUS  | R      | bit 0 capturing, 1 reading, 2 done, 3 phase shifter busy     |
| 3    | CUR_TAP | R      | tap the DCM has actually reached                             |

## From snapshot to bunch currents (host side)

The PC carries out the following steps. The testbench `tb_bxb_monitor_top`
repeats them to check the data.

* Split the first 1456 x 45 words into 45 groups by bucket. Then
  `A_i` = the mean of group `i` with the ADC mid-scale (2048) subtracted.
* Calibrate: `K = I_dcct / sum(A_i)`, and the current of bunch `i` is
  `I_i = K * A_i`. All bunches are assumed to be equally long, which holds
  for an even fill.
* Longitudinal tune: take the spectrum of one bucket's 1456 turn-by-turn
  samples. The turn rate is 4.534 MHz, so the resolution is 3.1 kHz and the
  range 2.27 MHz. The sample sits on the pulse's peak, so a phase
  oscillation lowers the reading on both swings. The line therefore appears
  at twice the synchrotron frequency. A 25 kHz oscillation shows at 50 kHz.

## Sizes

| parameter (top)  | default | meaning                                         |
|------------------|---------|-------------------------------------------------|
| `HARMONIC`       | 45      | buckets per turn, SYN divider                   |
| `FIFO_DEPTH`     | 65536   | samples per snapshot (power of two)             |
| `ADC_BITS`       | 12      | sample width                                    |
| `TAP_BITS`       | 10      | phase tap range 0..1023                         |
| `TAP_PS`         | 10      | delay per tap, ps (model only)                  |

The shared constants, the SPI register enum and the status struct are in
`rtl/bxb_pkg.sv`.

## What follows the original system and what is this design's own

The following comes from the published monitor: the blocks and signals of the
FPGA (differential input buffer, FIFO with wr/rd/rst/full/empty and separate
write and read clocks, FIFO controller with a GPIF port to the USB bridge and
an SPI port, divide-by-45 SYN, DCM phase shifter producing the sample clock);
the 12-bit samples; the 65536-word depth; the 0..1023 x 10 ps delay range; and
the host-side analysis.

The following was not specified and was chosen here:

* the controller's sequence (reset on arm, wait for SYN, fill completely,
  then drain);
* the SPI frame and register map;
* the USB handshake. It follows a Cypress FX2-style slave FIFO: SLWR#,
  PKTEND#, the full flag used as almost-full, and the 12-bit sample
  zero-extended to 16 bits;
* the use of the DCM's PSEN/PSINCDEC/PSDONE port;
* the clock plan: the FIFO's read clock and the SPI and phase-shifter logic
  all run on the USB interface clock;
* reset behaviour everywhere.

The original uses the FPGA vendor's FIFO. Here it is written out as RTL.

Known departures and limits:

* The original drawing has the FIFO controller drive the FIFO's read clock.
  Here the top wires the USB clock to both.
* A real Virtex-4 DCM has a different fine-shift range and step size from the
  ideal 1024 x 10 ps delay line modelled in `dcm_delay`. On hardware the tap
  count and step would follow the DCM.
* `dcm_delay` and `diff_input_buffer` are behavioural models of FPGA
  primitives. They contain delays and a deliberate hold (which lint reports
  as a latch). As a result the top simulates but does not synthesize as it
  stands. For an FPGA build, replace them with the vendor's DCM and LVDS input
  buffer primitives.
* There is no timestamp or trigger input. A capture starts when the host arms
  it.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench               | what it establishes                                                                                                   |
|-------------------------|-----------------------------------------------------------------------------------------------------------------------|
| `tb_freq_divider`       | bunch number against a reference counter; SYN once every 45 cycles                                                    |
| `tb_async_fifo`         | random traffic on unrelated clocks against a queue; full at exactly 65536 words and in-order readback at full depth   |
| `tb_fifo_controller`    | three captures (64-word FIFO): word count, contiguity, the same fixed offset from SYN, PKTEND, USB back-pressure, 1 word/cycle |
| `tb_phase_shifter`      | step count and direction, final tap, `LAT+4` cycles per step against a DCM stand-in                                   |
| `tb_dcm_delay`          | measured output delay equals tap x 10 ps; PSDONE latency; saturation at 0 and 1023                                    |
| `tb_diff_input_buffer`  | random codes received; value held when both lines of a pair are equal                                                 |
| `tb_spi_regs`           | register writes, read-back, status and tap reads, arm pulses, read-only addresses                                     |
| `tb_bxb_monitor_top`    | whole design at default sizes (see below)                                                                             |
| `tb_phase_scan`         | whole design: tap sweep 0..480, snapshot sums match the model, peak found at the modelled 3.0 ns                      |

`tb_bxb_monitor_top` runs at the default sizes. It uses `tb/adc_model.sv`,
which models the beam, the BPM and the ADC: a triangular pulse per bucket,
with a 34-bunch train and one single bunch, and optional longitudinal
oscillation of one bucket. It also uses `tb/fx2_model.sv`, which models the
USB slave FIFO and stalls on purpose, and `tb/spi_master.sv`. The test takes
three full 65536-sample snapshots:

* Every word matches the model's code for its bucket under a single bucket
  rotation.
* The rotation is the same for all three captures.
* The calibrated bunch currents match.
* A 25 kHz oscillation of bunch 9 produces a spectral line at 49.8 kHz.

It also counts that each mechanism happened: SPI reads, phase steps up (350)
and down (50), captures that ended on FIFO full (3), cycles with USB
back-pressure, and SYN-aligned captures.

Simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    --top-module tb_bxb_monitor_top rtl/bxb_pkg.sv tb/tb_bxb_monitor_top.sv
./obj_dir/Vtb_bxb_monitor_top
```

Replace the top-module name to run any other testbench. The full-size
end-to-end test takes a few seconds and the phase scan about 20 s.
