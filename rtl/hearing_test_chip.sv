// Hearing-test tone generator chip (digital part), top level.
//
// A host computer writes a 12-bit audio sample and a 7-bit output-level code
// once per 244 kHz sample period. The chip turns the sample into a PWM pulse
// train timed by a 1 GHz clock (no DAC), and turns the level code into
// selections for the output stage: one of five H-bridge inverter strengths
// (coarse level) and the fine-control attenuator lines (15 step lines and
// 11 offset lines) that trim the level in 128 steps over roughly 1..109 dB SPL
// at a 32 ohm headphone.
//
// Two sections, as in the original design:
//   digital_pwm      clock divider, reset circuit, clock driver, 12-bit
//                    counter, comparator and PWM logic;
//   output control   sample/level input registers, control logic and the
//                    gate-drive side of the class-D output stage.
// Parts that are analog are not in this RTL and connect through ports: the
// 1 GHz ring oscillator (clk_1g), the power transistors of the output
// inverters (driven by the pms/nms ports), the active low-pass filters and
// the transmission-gate fine-control networks (driven by step/offset), and
// the host link (sample_in, level_in).
//
// Timing: sample_in and level_in are captured one fast cycle after each
// rising edge of clk_244k; the PWM pulse for that sample starts at the same
// rising edge and is high for sample+2 fast cycles (see digital_pwm for the
// end cases). The output-control signals follow the captured level code
// combinationally.
module hearing_test_chip
  import hearing_pkg::*;
(
  input  logic                clk_1g,     // from the ring oscillator
  input  logic                rst_n,      // power-on clear, active low
  input  sample_t             sample_in,  // from the host link
  input  level_t              level_in,   // from the host link
  output logic                clk_244k,
  output logic                rst_pulse,
  output logic                pwm,
  output logic                counter_clk,
  output sample_t             count,
  output sample_t             sample_q,
  output level_t              level_q,
  output logic [COARSE_N-1:0] pms_p,
  output logic [COARSE_N-1:0] nms_p,
  output logic [COARSE_N-1:0] pms_n,
  output logic [COARSE_N-1:0] nms_n,
  output logic                node_p,
  output logic                node_n,
  output logic                bridge_driven,
  output level_ctrl_t         level_ctrl
);
  input_registers u_regs (
    .clk     (clk_1g),
    .rst_n   (rst_n),
    .clk_slow(clk_244k),
    .data_in (sample_in),
    .ctrl_in (level_in),
    .data_q  (sample_q),
    .ctrl_q  (level_q)
  );

  digital_pwm u_pwm (
    .clk      (clk_1g),
    .rst_n    (rst_n),
    .sample   (sample_q),
    .pwm      (pwm),
    .clk_slow (clk_244k),
    .rst_pulse(rst_pulse),
    .count    (count),
    .gclk     (counter_clk)
  );

  control_logic u_ctl (
    .level(level_q),
    .ctrl (level_ctrl)
  );

  classd_coarse u_out (
    .pwm   (pwm),
    .sel   (level_ctrl.coarse),
    .pms_p (pms_p),
    .nms_p (nms_p),
    .pms_n (pms_n),
    .nms_n (nms_n),
    .node_p(node_p),
    .node_n(node_n),
    .driven(bridge_driven)
  );
endmodule
