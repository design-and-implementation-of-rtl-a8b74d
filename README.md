# HF radar digital receiver: timing generator, down-converter and USB link

A pulsed HF Doppler radar (18 MHz, monostatic) must, every pulse repetition
time (PRT), switch its antenna to transmit, send a short RF pulse, switch back,
wait for the echo from the height of interest, and then sample that echo range
gate by range gate. This RTL puts that whole sequence in one FPGA clock domain:

* the **TCSG** (timing and control signal generator) produces the T/R switch
  signal, the transmit pulse, the beam-orientation strobe, the receive window
  and one sample pulse per range gate, all from settings the host can change
  between pulses;
* a **DDS** makes the 18.1 MHz local oscillator, and a **DDC** mixes the ADC
  samples down to baseband I/Q and integrates them over each range gate;
* a **FIFO bank** keeps one FIFO per range gate, so after N pulses FIFO *g*
  holds the N-point time series of gate *g*, which the PC turns into a Doppler
  spectrum;
* a **USB core** talks to a Cypress CY7C67300 USB controller through its host
  port interface (HPI), takes settings and commands from the PC and sends the
  FIFO contents back.

```
           +---------------------------- hf_radar_rx ------------------------------+
 adc_data -+-> ddc ----------> fifo_bank (64 x 1024 x 64b) --> sys_ctrl --+        |
           |    ^  ^ dump/window    ^ write select                ^       | 16-bit |
           |   dds  \________ tcsg _/                             |       v stream |
 dac_i/q <-+-- (TX-gated)      ^  |--> tr_pulse, tx_pulse, beam   |    usb_core <--+--> HPI bus
           |                   |  run_en                          |       |        |    (CY7C67300)
           |              cmd_decoder <----- command words -------+-------+        |
           +-------------------------------------------------------------------------+
```

Everything runs on one clock, taken to be the ADC sample clock. Its default
is 245.76 MHz (parameter `CLK_KHZ`). At that rate a 20 µs pulse is 4915
clocks. All microsecond times are converted to clock counts at elaboration,
so a testbench can run the same RTL at 1 MHz, where one clock is one
microsecond.

## The pulse repetition cycle (`tcsg`)

The TCSG is a state machine with states 0 to 6. Four counters built from one
counter module (`tc_counter`) time it:

| counter | counts | ends |
|---|---|---|
| PRF counter | every clock of the PRT | at the PRT of the selected PRF; the time base for everything else |
| PW counter | clocks of the transmit pulse | at 20, 60, 80 or 100 µs |
| window-start counter | clocks from the PRT start | at the value read from the window-start ROM |
| range-gate counter | sample pulses in the window | after the selected number of gates (1 to 64) |

A fifth counter of the same kind places the sample pulses 20 µs apart. One
range gate is 3 km of range.

One PRT, with *t* measured from the rising edge of T/R:

| state | T/R | TX | window | lasts until |
|---|---|---|---|---|
| 0 idle | 0 | 0 | 0 | `run_en` = 1 (settings are sampled here) |
| 1 | 1 | 0 | 0 | t = 50 µs; `beam_en` high, `beam` updated |
| 2_00 / 2_01 / 2_10 / 2_11 | 1 | 1 | 0 | pulse width 20 / 60 / 80 / 100 µs |
| 3 | 1 | 0 | 0 | t = 200 µs, i.e. 150 µs − PW after TX ends |
| 4 | 0 | 0 | 0 | t = window start (at least one clock) |
| 5 | 0 | 0 | 1 | 20 µs × number of gates; `sampling_pulse` at the end of each gate |
| 6 done | 0 | 0 | 0 | end of PRT, then state 1 again (state 0 if `run_en` has dropped) |

In state 5, each sample pulse also sets one bit of the 64-bit one-hot vector
`fifo_wr_en_vct`. This is the range gate whose sum the DDC is dumping.

Settings (`tcsg_cfg_t` in `hf_radar_pkg`) are sampled in state 0 and at every
PRT start. A change from the host therefore takes effect with the next pulse
and never cuts one short.

| field | code |
|---|---|
| `pw_sel` | 0: 20 µs, 1: 60 µs, 2: 80 µs, 3: 100 µs |
| `prf_sel` | 0: 100 Hz, 1: 167 Hz, 2: 250 Hz, 3: 500 Hz |
| `ws_code` | window start = code × 10 µs from the PRT start (0 to 2550 µs) |
| `num_gates` | 1 to 64 (0 is read as 1, anything above 64 as 64) |
| `beam` | 0 zenith, 1 east, 2 west |

Settings that do not fit are not rejected. If the window start falls before
t = 200 µs, the window opens one clock after T/R drops. If the window runs
past the end of the PRT, the next pulse waits a whole PRT. Typical settings
for this radar:

* E region: 20 µs pulse, 250 Hz, window at about 630 µs, 16 gates.
* F region: 80 µs pulse, 100 Hz, window at 2420 µs (363 km), 64 gates.

Both fit easily inside the PRT.

## Down-conversion and range gating (`dds`, `ddc`)

The DDS has a 30-bit phase accumulator. Its top 16 bits (the phase angle) go
to a 19-stage pipelined CORDIC, which gives 18-bit sine and cosine with no
table. Details:

* Amplitude is 131000, accurate to a few LSB.
* Latency is 21 clocks.
* One tuning-word step is 0.229 Hz at 245.76 MHz. The top computes the word
  for `LO_HZ` = 18.1 MHz (79080107).

The DDC multiplies each 14-bit sample by the cosine and the sine (giving
32-bit products) and sums them while the window is open. Each sample pulse
dumps the sum, shifted right by 13 and cut to 32 bits, and restarts it. A
20 µs gate is 4915 samples, so the shift keeps full-scale signals inside
32 bits. The DDC is therefore an integrate-and-dump low-pass filter and
decimator, one output per range gate.

The dumped I/Q pair is written one clock after the sample pulse as
{I[31:0], Q[31:0]}. It goes into the FIFO of that gate.

While TX is high, the DDS carrier also leaves on `dac_i`/`dac_q` as the
transmit signal. It is zero at all other times.

## FIFO bank and system control (`fifo_bank`, `sys_ctrl`)

There are 64 FIFOs, each 1024 words of 64 bits, in 4 banks of 16. The reader
chooses one with 2 bank-select and 4 FIFO-select lines. They share one
memory array (address = {FIFO, pointer}) with one write and one read per
clock, because only one gate is written at a time and the host reads one
FIFO at a time. A write to a full FIFO is dropped and flagged in
`fifo_overflow`.

The system controller carries out four host commands:

* **START** empties the FIFOs and runs the TCSG for `PULSES` (1024) PRTs,
  which fills every used FIFO exactly once. At 250 Hz that is 4.1 s of data,
  4 Mbit in all. It then stops on its own.
* **TEST** does the same, but stores {pulse number, gate number} instead of
  I/Q, so the path to the PC can be checked without a radar signal.
* **READ** *f* sends FIFO *f* to the USB core as 16-bit words, most
  significant first (I high, I low, Q high, Q low), until the FIFO is empty.
* **STOP** ends any of these. The TCSG finishes its current PRT.

Acquisition and readout take turns; data is not read while pulses are
running.

## Host commands (`cmd_decoder`)

Every 16-bit word the PC sends is one command. Bits [3:0] select the
destination and bits [15:4] are the value:

| [3:0] | meaning of [15:4] |
|---|---|
| 0 | pulse-width code |
| 1 | PRF code |
| 2 | window-start code |
| 3 | number of range gates |
| 4 | beam orientation |
| 5 | system command: [5:4] op (0 STOP, 1 START, 2 READ, 3 TEST), [11:6] FIFO number (bank = upper 2 bits) |

Other selects are counted as bad and otherwise ignored. After reset the
settings are: 20 µs pulse, 167 Hz, window at 540 µs, 64 gates, zenith.

## The USB link (`usb_core`, `hpi_master`)

The USB protocol itself runs in the firmware of the CY7C67300. The FPGA sees
only the chip's HPI port, a 16-bit bus with four registers:

| A | register |
|---|---|
| 00 | data: chip memory at the address register, which then auto-increments |
| 01 | mailbox |
| 10 | address register |
| 11 | status |

`hpi_master` performs one access. Chip select and the strobe go low for
`STROBE` clocks (4 by default), followed by one recovery clock.

The two sides talk through mailbox words: bits [15:12] are the type and bits
[11:0] a word count. The chip raises `hpi_int` while a message for the FPGA
is waiting. The core's state machine, with its state numbers:

| state | does | next |
|---|---|---|
| 0 idle | reset | 1 |
| 1 configure | write mailbox `CONFIG` | 2 |
| 2 wait interrupt | on `hpi_int` read the mailbox | EP0 setup → 3, EP1 OUT → 4, EP2 IN → 5 |
| 3 control setup | read the 4-word setup packet at `EP0_BUF`, write `SETUP_RX` | 10 |
| 10 wait ACK | mailbox `ACK` (transfer complete); `setup_valid` pulses | 2 |
| 4 OUT setup | write `OUT_RX` | 6 |
| 6 wait ACK | mailbox `ACK` | 7 |
| 7 read OUT data | read *n* words at `EP1_BUF`, each one goes to the command decoder | 2 |
| 5 IN setup | write `IN_RX` | 9 |
| 9 wait ACK | mailbox `ACK` | 8 |
| 8 write IN data | write *n* words of the radar stream to `EP2_BUF`, then `IN_DONE` | 2 |

The message codes are in `hf_radar_pkg`. The buffer addresses are parameters.

If the host asks for more IN words than the stream holds, the rest are
written as zeros, so the link never hangs. The count field limits one
transfer to 4095 words, so one full FIFO (4096 words) takes two IN
requests. Each IN word costs 7 clocks, about 560 Mbit/s at 245.76 MHz
before the USB chip's own limits. That is far above the 1 Mbit/s a
250 Hz, 64-gate acquisition produces. A mailbox message of the wrong
type is counted in `bad_msgs` and dropped.

A host session is:

1. Send settings and START (or TEST) as OUT data.
2. Wait about PULSES PRTs.
3. For each gate, send READ *g* as OUT data, then request 4 × 1024 words
   as IN data.

## Departures from the original description, and open points

* **State 3.** The state list keeps T/R high in state 3, but the state
  diagram labels state 3 with T/R low. This design keeps T/R high there, so
  T/R lasts 200 µs and covers the transmit pulse with 50 µs on both sides
  or more.
* **Leaving state 0.** The state diagram labels the step from state 0 to
  state 1 with the reset signal. Here state 0 is left on `run_en`. Reset is
  synchronous and active high.
* **Window start.** The window-start ROM's contents were not given. A
  10 µs grid was chosen, so the 633.49 µs window start used for one E-region
  measurement can only be approximated (630 or 640 µs).
* **Gate spacing and PRF codes.** The 20 µs gate spacing (from the 3 km
  gate) and the codes for PRF (only 100, 167 and 250 Hz appear in practice),
  pulse width and window start are this design's choices. A waveform of the
  original showed a 3-bit pulse-width value, which is not reproduced.
* **Clock.** The 245.76 MHz clock was inferred from the 4915-clock, 20 µs
  pulse. With it the DDS resolution is 0.229 Hz rather than the quoted
  0.25 Hz (0.25 Hz would need 268.4 MHz).
* **DDS sine generation.** The CORDIC, the accumulator scaling, test mode's
  pattern and the whole HPI message protocol are this design's own, because
  only the existence and purpose of these parts were described.
* **Fig. 5 arrows.** In the USB state diagram, the steps 5→9→8 and the
  returns to state 2 were chosen by analogy with the OUT path.
* **Not included.** Coherent integration over several pulses (a setting of
  the radar's processing) is not in the hardware. The FFT processing, the
  ADC/DAC daughter card, its clocking and interface logic, the USB chip and
  the PC software are outside this RTL.
* **One clock.** The real ADC and USB chip would bring their own clocks;
  this RTL has no clock-domain crossings.

## Files

`rtl/` contains one module or package per file:

* `hf_radar_pkg`: types, codes, µs-to-clock functions.
* `hf_radar_rx`: the top.
* `tcsg`, `tc_counter`, `ws_rom`: timing.
* `dds`, `ddc`: signal path.
* `fifo_bank`, `sys_ctrl`, `cmd_decoder`: storage and control.
* `usb_core`, `hpi_master`: USB link.

`tb/` holds one self-checking testbench per module, plus
`cy7c67300_model`, a behavioural model of the USB chip's HPI side and its
firmware. The model also provides host tasks: send setup, send OUT words,
request IN words.

* `tb_hf_radar_rx` runs the whole receiver at a 1 MHz clock with 8-word
  FIFOs. It covers settings over USB, a test acquisition with FIFO overflow,
  readout, a tone acquisition whose I/Q magnitude is checked per gate, and
  STOP.
* `tb_hf_radar_rx_full` runs the design at its default parameters. It
  covers one acquisition with an 18.1 MHz tone stopped after one pulse,
  readout of three gates, a two-pulse test run at 100 µs / 500 Hz, and a
  timed 2048-word IN transfer. That is about 2.6 million clocks, a few
  seconds in Verilator. A full
  1024-pulse acquisition (5×10⁸ clocks at 500 Hz) was not simulated.
* `tb_hf_radar_workloads` also runs at the default parameters. It sends the
  E-region set-up (20 µs, 250 Hz, 16 gates, window at 630 µs, east beam)
  and the F-region set-up (80 µs, 100 Hz, 64 gates, window at 2420 µs) over
  USB and runs two pulses of each. It measures TX, PRT, window opening,
  window length and beam on the outputs and checks the I/Q magnitudes of
  three gates.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hf_radar_rx \
  -y rtl -y tb +libext+.sv -Irtl rtl/hf_radar_pkg.sv tb/tb_hf_radar_rx.sv
./obj_dir/Vtb_hf_radar_rx
```

Change `--top-module` and the last file to run another. The testbenches use
`$urandom`, real math and SystemVerilog queues. All storage is reset or
written before it is read, so they run the same with two-state simulation.
