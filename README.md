# eCrystal: a sensor-node clock calibrated against a remote tone

A body-worn wireless sensor node normally takes its reference clock from a quartz crystal
and an oscillator. Those parts need milliwatts and far more board area than the
microwatt baseband they clock. The *embedded crystal* (eCrystal) idea removes them. An
on-chip tunable clock generator is allowed to start with a large error, up to 3 % over
process, voltage and temperature. The node then calibrates it against a reference tone sent
by the remote device, until the error is below 50 ppm. The calibration is digital and
cheap: it counts the beat between the local clock and the received tone.

This repository holds synthesizable SystemVerilog for the digital part of such a node:

* the **calibration loop**: a DDFS clock generator, a counter-based frequency detector
  and the calibration controller;
* the **low-power baseband infrastructure** around it: the 512 x 8 bit sensor FIFO, and
  the power managers that sequence power gating and isolation for the modem power domains
  of the sensor node (WSN) and of the central processing node (CPN).

The architecture, the detector principle, the direction-search rule, the 48-bit tuning word,
the 512 x 8 FIFO and the isolate-then-power-off order follow the eCrystal thesis *An
Embedded Crystal Oscillator for Wireless Body Area Network Applications*. Widths, handshakes,
delays, the step-size mapping and the clock-domain crossings are this design's own choices.
Each file's header says which is which.

## How the error becomes measurable

The remote device transmits a tone at `N_syn * f_o`, where `f_o` is the wanted baseband
clock (5 MHz here). The receiver's synthesizer multiplies the local clock `f_o(1+eps)` by
the same `N_syn`, and the mixer plus low-pass filter leave only the difference:

    f_err = N_syn * f_o * |eps|

For the 1.4 GHz medical band and a 5 MHz clock, `N_syn = 280`. A 3 % error then gives a
42 MHz beat, 8.4 times the clock itself. A 50 ppm error gives 70 kHz.

The analog chain (band-pass filter, synthesizer, mixer, filter, and the RC bias network that
squares the beat into a logic level) is not RTL. The design sees only its output, `err_sig`.

## Counter-based frequency detector (`freq_detector`)

Count the clock for a fixed window of `N_CLK` cycles, and count the beat's rising edges
`N_err` in the same window. Then

    N_clk / N_err = (1+eps) / (N_syn*eps)   =>   eps ~= N_err / (N_syn * N_CLK)

`N_CLK = 16384` gives 0.22 ppm per count. The 50 ppm target is then 229 counts, and a 3 %
error is about 137,600 counts (`CNT_W = 20` bits).

The hard part is that the beat is a clock of its own, and can be much faster than the
generated clock. As in the reference architecture, the `N_err` counter is clocked directly by
the beat. In this design it runs freely and publishes a Gray-coded copy. The generated-clock
domain synchronises that copy with two flops, converts it back to binary and subtracts a
snapshot taken at the window start from one taken at the end. Only one Gray bit changes per
beat edge, so each sample is off by at most one count, whatever the frequency ratio. The
window opens on the edge that samples `start`; `done` is set by the `N_CLK`-th edge after it,
with `n_err` valid.

## Calibration controller (`cal_controller`)

`N_err` gives the size of the error but not its sign: a clock 1 % fast and one 1 % slow
produce the same beat. The controller therefore searches for the direction:

1. Detect. If `N_err <= LOCK_THR` (50 ppm), go to the locked, normal-data state.
2. On the first step of a calibration, guess the direction (upwards here).
3. On later steps, keep the direction while the new count is not larger than the previous
   one, and reverse it when it is larger.
4. Move the tuning word by `N_err * GAIN` in that direction, wait `SETTLE` cycles, and go
   back to 1.

`GAIN = round(FTW_NOMINAL / (N_SYN * N_CLK))` converts counts into tuning-word units, so the
step is the estimated `eps` times the nominal word. Calibration therefore needs one
constant multiplier and no divider.

How it converges:

* **Right guess** (clock slow). The first step lands within about `eps^2` of the target,
  because the count measures `eps/(1+eps)`. At -3 % that residue is a few hundred ppm the
  other way. The count shrinks, the direction is kept, the next step overshoots slightly,
  the count grows, and the direction reverses. This is 3 steps in simulation.
* **Wrong guess** (clock fast). The error roughly doubles, the count grows, and the direction
  reverses with a step of twice the original error, which lands close to the target. This is
  2 steps at +1500 ppm.

After `MAX_ITER` steps without reaching the target, the controller stops in `CAL_FAIL`.
In the locked state it stays put until `recal_req`. That input comes from the baseband, which
estimates the frequency error from received data. Recalibration starts from the current
word, not from the initial one.

The thesis requires the number of detect/tune rounds to be 3 or more at its operating SNR,
and its FPGA prototype reached 40-80 ppm with a noisy lab reference. With the noise-free
model used here, the loop locks within about 11 ppm in 2 to 4 detections.

## Clock generator (`ddfs`, `ddfs_sine_rom`)

The tunable clock generator is a direct digital frequency synthesizer (DDFS), as in the
emulation platform. A 48-bit phase accumulator adds the tuning word every cycle of the DDFS
clock (100 MHz assumed), giving `f_out = FTW * f_clk / 2^48`. The top 10 phase bits address a
quarter-wave sine table of 256 x 11 bits, computed at elaboration with `$sin`, and symmetry
logic gives a signed 12-bit `dac_code` for an external DAC and filter. The generated clock
used by the digital logic is the registered accumulator MSB. It has exactly the right mean
frequency, and is what an ideal filter plus comparator would return.

The controller runs on the clock that the DDFS generates. So, after reset, the DDFS loads
`ftw_init`, the un-calibrated word, on its own and starts running. Later words cross from the
controller with a toggle handshake and are taken 3 DDFS clock edges after the toggle. The
DDFS ignores that toggle until the generated-clock domain has left reset. That domain's reset
is synchronised into the DDFS clock domain and gates the toggle. Without the gate, a
controller that has not yet seen a generated-clock edge could hand over a stale word, for
example zero. A zero word would stop the clock for good.

## Power domains of the baseband (`power_domain_ctrl`, `wsn_power_manager`, `cpn_power_manager`, `isolation_cell`, `sensor_fifo`)

The modems are split into power-gated domains (PGDs). Only the domain of the current
operation mode may be powered; the FIFO and the control logic are always on.

* `power_domain_ctrl` sequences one domain. To sleep, it isolates first and cuts the supply
  `ISO_DLY` cycles later. To wake, it restores the supply first and releases isolation
  `WAKE_DLY` cycles later. An assertion checks that the domain is never unpowered while it
  is not isolated.
* `isolation_cell` clamps a sleeping domain's outputs to 1.
* `wsn_power_manager` has three domains: MT-CDMA TX (0), OFDM DL-RX (1) and OFDM UL-TX (2).
  In a transmit mode, the transmitter sleeps while `sensor_fifo` fills. It is woken when the
  FIFO is full and sleeps again when it has drained the FIFO. The DL-RX domain is powered for
  its whole mode.
* `cpn_power_manager` has three domains: MT-CDMA RX, OFDM DL-TX and OFDM UL-RX. Each is
  powered in its own mode.

The FIFO size is tied to the calibration. At 610 samples per second, 512 samples take 840 ms,
and calibration must finish within that time. In simulation it takes 10-13 ms.

## Top level (`wsn_ecrystal_top`)

The DDFS runs on `ref_clk`. Detector, controller, FIFO and WSN power manager run on the
generated clock `gen_clk`. The CPN power manager has its own `cpn_clk`, `cpn_rst_n` and
`cpn_mode`.

Each modem domain connects through `pgd_out_raw[g]`. Bits 7:0 are data, which leave as
`pgd_out[g]` after isolation. Bit 8 is the domain's FIFO read request, active low, so the
high clamp of a sleeping domain means "no read". Sensor samples (`sample_valid`,
`sample_data`) and the modem buses are taken to be synchronous to `gen_clk`. `rst_n` is
asynchronous, and every clock domain releases its reset through a two-flop synchroniser.

| parameter | default | meaning |
|---|---|---|
| `N_SYN` | 280 | receive-synthesizer multiplication factor (1.4 GHz / 5 MHz) |
| `N_CLK` | 16384 | detection window in generated-clock cycles |
| `CNT_W` | 20 | width of the error count |
| `TARGET_PPM` | 50 | lock threshold |
| `FTW_NOMINAL` | 14073748835533 | tuning word for 5 MHz at a 100 MHz DDFS clock |
| `MAX_ITER`, `SETTLE` | 16, 64 | step budget, wait after each step |
| `ADDR_W`, `AMP_W` | 10, 12 | sine-table address and sample widths |
| `FIFO_DEPTH`, `FIFO_W` | 512, 8 | sensor FIFO (depth must be a power of two) |
| `ISO_DLY`, `WAKE_DLY` | 4, 16 | isolation-to-power-off and power-on-to-release delays |

For another band or clock, set `N_SYN` to the nearest integer of band / clock, and set
`FTW_NOMINAL = f_o / f_ddfs * 2^48`. A fractional `N_syn` only makes the steps slightly
wrong; the loop still converges.

## What is not here

These parts are analog, or were taken from other work, and have no RTL:

* the DAC and filter of the DDFS, and the reference-clock multiplier;
* the RF receive chain and its bias/VGA circuit;
* the power switches themselves, and level shifters;
* the MT-CDMA and OFDM modems, the tunable clock generator of the real chip, and the
  temperature sensor.

The power managers bring out the switch and isolation enables as ports.

Where this RTL departs from the thesis:

* The thesis's detector is reported at about 0.46 k gates. This design adds a 20 x 22-bit
  constant multiplier, Gray-code crossing and a controller, so it is larger.
* The thesis's power-management control waveform was not available. Only the order of the
  steps (isolate, then cut power; power up, then release) is taken from it; the delays are
  invented.
* The thesis prototype settled at 40-80 ppm because its reference had about 0.1 % jitter.
  The testbenches use a noise-free reference, except `tb_jitter_workload`, which moves
  every edge of the beat by up to 0.1 % of its half period. A window of 16384 clocks averages
  that out, so the loop still locks within about 11 ppm. How a real jittery reference
  degrades the count was not modelled further.
* The thesis sizes each detection window near its minimum, about `1/(N_syn * eps_target)`
  clocks (72 at 50 ppm), and takes several rounds. That short window only says whether the
  error is still above the target. This design uses one fixed, long window, so that a
  single count measures the error to 0.22 ppm and sets the step size. A detection then takes
  3.3 ms, and a whole calibration takes 10-13 ms, far inside the 840 ms budget.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5, for example:

    verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
        --top-module tb_wsn_ecrystal_top -y rtl -y tb +libext+.sv -Irtl \
        rtl/ecrystal_pkg.sv tb/tb_wsn_ecrystal_top.sv
    ./obj_dir/Vtb_wsn_ecrystal_top

The RTL has no delays and no timescale of its own; the testbenches set 1 ns / 1 ps.
`-Wno-fatal` lets the build continue past Verilator's warning about the variable delay in
`rf_error_model`. The testbenches reset every flop they read, so they also pass with
`+verilator+rand+reset+2`.

* `tb_wsn_ecrystal_top` runs the whole node at default parameters, in a few seconds. It
  checks three locks: a +1500 ppm start, a -800 ppm reference drift with recalibration, and
  a -3 % start. It also checks FIFO fill and wake, drain and sleep with every word compared,
  isolation clamping, DL-RX mode and the CPN modes. It counts each mechanism and fails if one
  never happened. Its sensor rate is one sample per 160 clocks instead of 610 Hz, so the
  FIFO fills only after lock, as the real rates guarantee.
* `tb_fsk_workload` runs the 14.72 MHz / 434 MHz FSK case with `N_SYN = 29`, from -1 % and
  from +1 %.
* `tb_jitter_workload` runs the default node with a jittery error signal, from +1500 ppm,
  -3 % and +3 %, and requires lock within 80 ppm.
* `tb_freq_detector`, `tb_cal_controller`, `tb_ddfs`, `tb_ddfs_sine_rom`, `tb_sensor_fifo`,
  `tb_isolation_cell`, `tb_power_domain_ctrl`, `tb_wsn_power_manager` and
  `tb_cpn_power_manager` test the blocks on their own. Their reference values are computed
  independently: real-valued frequencies, `$sin`, a queue model of the FIFO, and
  cycle-exact sequencing rules.

`rf_error_model` (testbench only) stands in for the RF chain. It turns the DDFS tuning word
in use and a reference frequency into `err_sig`.
