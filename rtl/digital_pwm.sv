// Digital pulse-width modulator: turns a 12-bit sample into one PWM pulse per
// sample period, without any data converter.
//
// A 1 GHz clock is divided by 4096 to give the 244 kHz sample clock. At each
// rising edge of the sample clock the reset circuit emits a two-cycle pulse
// that clears the 12-bit counter and sets the PWM output high. The counter
// then counts the fast clock; the comparator signals when the count equals
// the sample, and the PWM logic drops the output. While the output is low
// the clock driver stops the counter clock, so the counter only toggles for
// the length of the pulse. The block structure is the original one.
//
// Pulse length: for a sample d with 1 <= d <= 4093 the output is high for
// d + 2 fast cycles out of 4096 (the two reset cycles plus d counts). For
// d = 0 the count already equals d while the reset pulse still holds the
// output, so no match is seen and the output stays high for the whole period;
// the same happens for d >= 4094, whose match would fall after the next reset.
//
// Interface: clk (fast clock), rst_n (asynchronous clear of the divider and
// reset flip-flops), sample (the data register, must be stable from one fast
// cycle into the reset pulse onwards), pwm (PWM pulse), clk_slow (sample clock), rst_pulse, count and gclk (counter
// value and its gated clock, for observation).
module digital_pwm
  import hearing_pkg::*;
#(
  parameter int unsigned DIV_STAGES = SAMPLE_W  // 2^DIV_STAGES fast cycles per sample
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t sample,
  output logic    pwm,
  output logic    clk_slow,
  output logic    rst_pulse,
  output sample_t count,
  output logic    gclk
);
  logic [DIV_STAGES-1:0] div;      // divider stage outputs; only the last is used
  logic                  match_n;

  clock_divider #(.N(DIV_STAGES)) u_div (
    .clk     (clk),
    .rst_n   (rst_n),
    .div     (div),
    .clk_slow(clk_slow)
  );

  reset_circuit u_rst (
    .clk      (clk),
    .rst_n    (rst_n),
    .clk_slow (clk_slow),
    .rst_pulse(rst_pulse)
  );

  clock_driver u_cdrv (
    .clk (clk),
    .en  (pwm),
    .gclk(gclk)
  );

  counter12 u_cnt (
    .clk  (gclk),
    .rst  (rst_pulse),
    .count(count)
  );

  comparator12 u_cmp (
    .a   (sample),
    .b   (count),
    .eq_n(match_n)
  );

  pwm_logic u_pwm (
    .clk    (clk),
    .rst    (rst_pulse),
    .match_n(match_n),
    .pwm    (pwm)
  );

endmodule
