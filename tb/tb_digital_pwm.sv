// Digital PWM section at full size (4096 fast cycles per sample period).
// For a list of samples covering the ends of the range and random values it
// measures, per sample period: the PWM high time (expected sample + 2 cycles,
// or the whole period for 0 and for samples above 4093), the period itself
// (4096 cycles between reset pulses), the number of counter clock edges
// (expected sample + 2, showing the clock is stopped after the pulse; one more
// when the previous period never stopped it, or may be in the first period) and the count left in the
// counter one cycle before the period ends (sample + 1).
`timescale 1ns/1ps
module tb_digital_pwm;
  import hearing_pkg::*;
  localparam int PERIOD = 4096;
  logic    clk = 0, rst_n = 0;
  sample_t sample = '0;
  logic    pwm, clk_slow, rst_pulse, gclk;
  sample_t count;
  int checks = 0, failures = 0;
  int gedges = 0, gated_periods = 0, full_periods = 0;

  digital_pwm dut (.clk(clk), .rst_n(rst_n), .sample(sample), .pwm(pwm), .clk_slow(clk_slow),
                   .rst_pulse(rst_pulse), .count(count), .gclk(gclk));

  always #0.5 clk = ~clk;
  always @(posedge gclk) gedges++;

  function automatic int exp_high(int d);
    return (d >= 1 && d <= PERIOD - 3) ? d + 2 : PERIOD;
  endfunction

  initial begin
    int samples[$];
    samples = '{1, 2, 3, 100, 2048, 4093, 0, 4094, 4095, 7};
    repeat (20) samples.push_back($urandom % 4096);
    #2.25 rst_n = 1;
    @(posedge clk_slow);                   // first period start: t0
    #0.25;                                 // all sampling is at t0 + k + 0.25
    foreach (samples[i]) begin
      int d, hi, cnt_end;
      logic prev_full;
      prev_full = (i > 0) && (exp_high(samples[i-1]) == PERIOD);
      d = samples[i];
      sample = sample_t'(d);               // stable before the capture edge at t0 + 1
      gedges = 0;
      hi = 0;
      cnt_end = 0;
      checks++;
      if (!rst_pulse || !pwm) begin failures++; $display("FAIL no reset/pwm at period start i=%0d", i); end
      for (int cyc = 0; cyc < PERIOD; cyc++) begin
        if (pwm) hi++;
        if (cyc == PERIOD - 1) cnt_end = int'(count);
        checks++;
        if (clk_slow !== (cyc < PERIOD / 2)) begin failures++; $display("FAIL slow clock phase cyc=%0d", cyc); end
        #1;
      end
      checks += 1;
      if (hi != exp_high(d)) begin failures++; $display("FAIL d=%0d high=%0d exp=%0d", d, hi, exp_high(d)); end
      if (exp_high(d) < PERIOD) begin
        gated_periods++;
        checks += 2;
        // in the first period the gate state left from power-up is unknown,
        // so the extra edge may or may not be there
        if (gedges != d + 2 + (prev_full ? 1 : 0) && !(i == 0 && gedges == d + 3)) begin failures++; $display("FAIL d=%0d counter edges=%0d", d, gedges); end
        if (cnt_end != ((d <= PERIOD - 4) ? d + 1 : d)) begin failures++; $display("FAIL d=%0d final count=%0d", d, cnt_end); end
      end else begin
        full_periods++;
      end
    end
    checks += 2;
    if (gated_periods == 0) begin failures++; $display("FAIL no gated period"); end
    if (full_periods == 0)  begin failures++; $display("FAIL no full-high period"); end
    $display("gated periods=%0d full-high periods=%0d", gated_periods, full_periods);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(40 * PERIOD);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
