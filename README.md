# Hearing-test tone generator: digital PWM and level control

An audiometer plays pure tones, one frequency at a time, to each ear at a level the operator
sets. This chip is the digital core of that device, driven by a PC. The PC supplies two values
once per sample period. One is a 12-bit audio sample. The other is a 7-bit level code, 0 to 127.
The chip has no DAC. It turns each sample into one pulse whose length is timed by a 1 GHz
counter. An H-bridge class-D output stage then drives a 32 Ω headphone from those pulses. An
analog low-pass filter turns the pulses back into a tone. The level code picks which
output-stage inverter drives the bridge, and which branches of an analog attenuator are switched
in.

The RTL follows the design in the thesis "Design of a PC-Programmable Chip for Hearing-Testing"
(0.18 µm CMOS, 1.3 V supply). That thesis builds every block at transistor level. This repository
writes the logic of those blocks as synthesizable SystemVerilog. The analog parts connect through
ports. The section "Where this RTL departs from the original" lists every change.

## One sample period

A sample period is 4096 cycles of the fast clock: 1 GHz / 2^12 = 244.14 kHz. That is about 12
samples per cycle of a 20 kHz tone. Everything runs on the one fast clock `clk_1g`. Cycle 0 is
the cycle in which the 244 kHz clock `clk_244k` (the top bit of the divider) rises.

| fast cycle | what happens |
|---|---|
| 0 | `clk_244k` rises and the reset circuit raises `rst_pulse`. This clears the counter (asynchronous) and sets `pwm` high (asynchronous). |
| 1 | The data and level registers load `sample_in` and `level_in`. |
| 2 | `rst_pulse` falls, two cycles after it rose. |
| 1.5, 2.5, 3.5 … | The counter advances on the falling edges of `clk_1g`, through the clock driver. |
| 2 + d | At the first rising edge where the count equals the sample `d`, `pwm` drops. The clock driver lets one more counter edge through and then holds the counter clock high. The counter stays frozen until the next period. |

For 1 ≤ d ≤ 4093 the pulse is therefore **d + 2 fast cycles** long. The two extra cycles are
the reset pulse. The PC can subtract 2 from its samples if it needs exact duty. There are two
end cases:

* **d = 0.** The count already equals 0 while the reset pulse still forces `pwm` high. No match
  is seen afterwards, so the pulse lasts the **whole period**.
* **d ≥ 4094.** The match would fall at or after the next reset, so the output again stays high
  for the whole period.

Keep samples in 1..4093 (a sine around 2048 with amplitude up to 2045).

The counter clock toggles only while the pulse is high, which is the purpose of the clock
driver. The counter is the only logic running at the full 1 GHz, and after the match its value
no longer matters.

### Reset pulse

`reset_circuit` delays `clk_244k` through two flip-flops. It then feeds `NAND(delayed, clk_244k)`
and `NAND(clk_244k, clk_244k)` into an XOR. The two XOR inputs differ only during the two cycles
after a rising edge. They stay equal at a falling edge, so there is no pulse there. Two cycles
are needed because the reset has to set the PWM flip-flop and reach the clock driver's latch
before the counter clock starts.

### Clock driver (gated counter clock)

The counter clock is `NAND(clk_1g, enable)`. While enabled it is the inverted clock, so the
counter steps on falling edges of `clk_1g`. While disabled it sits high. The enable (`pwm`) goes
through a latch that is transparent while `clk_1g` is low. The enable can therefore only change
while the NAND output is forced high anyway, so no runt clock pulse can occur. Synthesis reports
this one latch bit. It is intentional.

### Counter and comparator

* **Counter.** `counter12` is an incrementer feeding a 12-bit register that is cleared by
  `rst_pulse`. The incrementer (`incrementer12`) is a conditional-sum design. Each 4-bit group
  computes "unchanged" and "+1" in parallel, and a 2-to-1 multiplexer per bit picks one using
  the group's carry. That carry is the AND of the all-ones flags of the groups below.
* **Comparator.** `comparator12` is active low. It uses one XNOR per bit, then a tree of 6 NAND2,
  3 NOR2 and 1 NAND3 instead of a 12-input AND.

## The level code

The 7-bit code B6..B0 covers 16 sections of 8 steps. The upper four bits select the section.
The lower three bits select the step within it. The required headphone voltage grows
exponentially with the level in dB. Reaching the smallest step directly would take a 22-bit
attenuator. Instead, each section has its own step size, set by the analog networks.

`control_logic` produces 31 lines from the code (the `level_ctrl_t` struct in `hearing_pkg`):

| section (B6..B3) | codes | coarse branch (`coarse`) | step lines carrying B0,B1,B2 (`step`) | offset line (`offset`) |
|---|---|---|---|---|
| 0 | 0–7 | 0.40 V | R0, R1, R2 | none |
| k = 1…10 | 8k … 8k+7 | 0.40 V | Rk, Rk+1, Rk+2 | D*k* (`offset[k-1]`) |
| 11 | 88–95 | 0.40 V | R12, R13, R14 | D11_D15 (`offset[10]`) |
| 12 | 96–103 | 0.64 V | R12, R13, R14 | D11_D15 |
| 13 | 104–111 | 1.00 V | R12, R13, R14 | D11_D15 |
| 14 | 112–119 | 1.60 V | R12, R13, R14 | D11_D15 |
| 15 | 120–127 | 2.26 V | R12, R13, R14 | D11_D15 |

The table uses these signals and networks:

* **Coarse branch.** The "coarse branch" column gives the peak-to-peak voltage of the
  output-stage inverter that is switched on.
* **Step lines.** Step line R*n* drives a transmission-gate array whose conductance is 2^n times
  that of R0. Putting B0..B2 on three adjacent lines R*b*..R*b*+2 therefore gives eight equal
  steps of size 2^b. The step size doubles from one section to the next.
* **Offset lines.** An offset line switches in a fixed conductance per section.

Inside `control_logic`:

* **Decoder.** `decoder_logic` decodes B6..B3 one-hot into D0..D15. It also makes two group
  signals:
  * `D0_D11 = NAND(B6, B5)` selects the 0.40 V branch.
  * `D11_D15 = D11 OR NOT D0_D11` selects the top step group and the top offset network.
* **Step steering.** `fine_step_logic` ORs together (bit AND section) terms. R0, R13 and R14
  have one term each. R1, R11 and R12 have two. R2..R10 have three.

## H-bridge output stage

`classd_coarse` holds the logic of the output stage:

* **H-bridge.** The positive half is driven by `pwm` and the negative half by `~pwm` (one extra
  inverter), so the headphone sees twice the supply swing.
* **Branch gate cells.** Each half has five parallel output inverters. Every inverter has its
  own gate cell, `gate_select`, with PMS = NAND(EN, ¬IN) and NMS = ¬NAND(EN, IN). When enabled,
  both gates follow the PWM level. When disabled, the PMOS gate is held high and the NMOS gate
  low, so the branch is off.
* **Ports.** The ten gate drives per half come out as `pms_p/nms_p/pms_n/nms_n`, with bit i in
  `coarse_sel_t` order. `node_p`/`node_n` give the logic level each half-bridge output takes, and
  `bridge_driven` says both halves have a branch on.

Original transistor sizing of the five inverters, for the analog designer:

| p-p across 32 Ω | series devices | NMOS / PMOS width each (µm) |
|---|---|---|
| 0.40 V | 5 | 0.46 / 0.92 |
| 0.64 V | 4 | 0.42 / 0.84 |
| 1.00 V | 3 | 0.42 / 0.84 |
| 1.60 V | 1 | 0.55 / 1.10 |
| 2.26 V | 1 | 0.90 / 1.80 |

## What is outside the RTL

These parts are analog. They connect through the top-level ports:

* **1 GHz clock (`clk_1g`).** The original source is a seven-stage inverter ring oscillator.
  Any 1 GHz clock will do.
* **Output power inverters.** These are the five per half in the table above. They are driven by
  the gate-drive ports.
* **Output filters.** Each bridge half has a second-order Butterworth active low-pass filter with
  a 100 kHz cut-off, built from op-amps.
* **Fine-control attenuator.** It has 15 step arrays and 11 offset arrays of transmission gates.
  The effective widths of the step arrays run from 0.007 µm (R0, 60 gates in series) to 100 µm
  (R14), doubling each line. They are driven by `level_ctrl.step` and `level_ctrl.offset`.
* **Host link.** The link from the PC that writes `sample_in` and `level_in` is not designed
  here. Both must be stable at the fast-clock edge one cycle after `clk_244k` rises.

The end-to-end level (about 1 to 109 dB SPL over the 128 codes, 0.5–2 dB per step above 15 dB)
comes from these analog parts. The RTL does not reproduce it. The RTL does check that every code
selects the intended branch and lines.

## Where this RTL departs from the original

* **One clock domain.** The sample and level registers run on the fast clock, with a load enable
  one cycle after `clk_244k` rises. In the original they are clocked by the 244 kHz clock.
* **Divider.** The chain of twelve divide-by-two flip-flops is written as a 12-bit synchronous
  counter. The waveforms are the same, without ripple skew.
* **PWM flip-flop.** In the original the comparator's active-low match pulse clocks a
  falling-edge flip-flop with D tied high, and the output is taken from Q'. Here the match
  is sampled on the fast clock, so no clock is derived from data. The reset still sets the
  output asynchronously.
* **Clock driver.** The enable latch in front of the NAND is an addition.
* **Incrementer.** The original gives its gate counts (2 NOR, 6 NAND, 11 MUX, 9 XOR, 6 INV) and
  a critical path of two NANDs, a NOR and a MUX. The grouping used here (three 4-bit groups) is
  a simple conditional-sum form with its own gate count.
* **D11_D15.** The original equation combines the signals with a NOR that is never true. This
  RTL uses the OR of sections 11–15, which is what the step-group table needs.
* **Step-line bit order.** One example in the original puts the lowest level bit on the highest
  line of a group. This RTL puts B0 on the lowest line, so every code increment adds the same
  step.
* **Coarse branch selects.** The 0.64–2.26 V branches are selected by D12..D15, taken from the
  code ranges. The original does not name these signals.
* **Power-on reset.** An active-low `rst_n` clears the divider, the reset flip-flops and the
  registers. The original describes only the per-sample reset. The PWM flip-flop and the counter
  become defined at the first reset pulse, 2048 cycles after `rst_n` is released.

## Files

`rtl/` holds one module or package per file:

```
hearing_test_chip          top
├── input_registers        12-bit sample and 7-bit level registers
├── digital_pwm            PWM section
│   ├── clock_divider      ÷4096
│   ├── reset_circuit      2-cycle pulse per sample
│   ├── clock_driver       gated counter clock
│   ├── counter12          └── incrementer12
│   ├── comparator12
│   └── pwm_logic
├── control_logic          level code → 31 selection lines
│   ├── decoder_logic
│   └── fine_step_logic
└── classd_coarse          H-bridge gate drives
    └── gate_select (×10)
hearing_pkg                widths, coarse_sel_t, level_ctrl_t
```

`tb/` has a self-checking testbench `tb_<module>.sv` for each module. Each compares the module
against values computed in the testbench and ends with a `TB_RESULT checks=… failures=…` line.
There are two system-level benches:

* `tb_hearing_test_chip` runs the top at full size. It plays a 20 kHz tone while the level code
  steps through all 128 values, one per tone cycle, followed by the end-case samples. About 1550
  sample periods are checked for pulse length, period, counter-clock edges and level outputs. It
  also counts that each mechanism occurred: reset, match, clock gating, whole-period pulse, every
  branch, step line and offset line.
* `tb_tone_workload` plays 20 Hz, 1 kHz and 20 kHz tones. It checks every pulse, then demodulates
  the pulse train and checks its mean and the fundamental's amplitude against the sine that was
  sent. It runs about 58 M fast cycles, in roughly 20 s.

## Simulating

With Verilator 5, from the repository root, for any testbench:

```
verilator --binary --timing -Irtl rtl/hearing_pkg.sv tb/tb_hearing_test_chip.sv \
          --top-module tb_hearing_test_chip -o sim
./obj_dir/sim
```

The `-Irtl` lets Verilator find each module by its file name. Lint with
`verilator --lint-only -Wall -Irtl rtl/hearing_pkg.sv rtl/hearing_test_chip.sv`. Lint leaves
two unused-signal warnings: the lower divider stages, and D11, which is used only inside the
decoder.

To change the design:

* **Sample width.** Change `SAMPLE_W` in `hearing_pkg` and the divider depth `DIV_STAGES` of
  `digital_pwm` together. The counter, incrementer and comparator are written for 12 bits.
* **Level plan.** The mapping from code to lines lives in `decoder_logic`, `fine_step_logic`
  (the `base_of` function) and `control_logic`.
