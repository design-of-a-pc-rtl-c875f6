// Tone workload on the full-size chip: a 20 Hz, a 1 kHz and a 20 kHz tone,
// each over a whole number of tone cycles that spans an almost whole number
// of sample periods (1, 7 and 29 cycles) (the ends and the middle of the audio band),
// sampled at 1 GHz / 4096 = 244.14 kHz and quantised to 12 bits around
// mid-scale, at a fixed level code.
//
// Pulse edges are timed from events, not polled, so the 20 Hz cycle (12207
// sample periods, 50 M fast cycles) runs quickly. Per sample period it checks
// that the pulse is sample + 2 ns long. Per tone it demodulates the pulse
// train the way the output filter does, by taking the pulse lengths as the
// signal, and checks the mean (mid-scale) and the amplitude of the tone's
// fundamental (single-bin DFT) against the sine that was sent.
`timescale 1ns/1ps
module tb_tone_workload;
  import hearing_pkg::*;
  localparam real FS     = 1.0e9 / 4096.0;
  localparam real PI     = 3.14159265358979;
  localparam real AMP    = 2000.0;

  logic clk = 0, rst_n = 0;
  sample_t sample_in = '0, count, sample_q;
  level_t  level_in = 7'd100, level_q;
  logic clk_244k, rst_pulse, pwm, counter_clk, node_p, node_n, bridge_driven;
  logic [COARSE_N-1:0] pms_p, nms_p, pms_n, nms_n;
  level_ctrl_t level_ctrl;
  int checks = 0, failures = 0;

  hearing_test_chip dut (
    .clk_1g(clk), .rst_n(rst_n), .sample_in(sample_in), .level_in(level_in),
    .clk_244k(clk_244k), .rst_pulse(rst_pulse), .pwm(pwm), .counter_clk(counter_clk),
    .count(count), .sample_q(sample_q), .level_q(level_q),
    .pms_p(pms_p), .nms_p(nms_p), .pms_n(pms_n), .nms_n(nms_n),
    .node_p(node_p), .node_n(node_n), .bridge_driven(bridge_driven),
    .level_ctrl(level_ctrl));

  always #0.5 clk = ~clk;

  // PWM edge times
  realtime t_rise, t_fall;
  always @(posedge pwm) t_rise <= $realtime;
  always @(negedge pwm) t_fall <= $realtime;

  task automatic run_tone(input real f, input int cycles);
    int  n_samp;
    real sum, re, im, amp, mean;
    n_samp = int'(real'(cycles) * FS / f);
    sum = 0.0; re = 0.0; im = 0.0;
    for (int n = 0; n < n_samp; n++) begin
      int d, hi;
      real ph;
      ph = 2.0 * PI * f * real'(n) / FS;
      d  = int'(2048.0 + AMP * $sin(ph));
      sample_in = sample_t'(d);
      @(posedge clk_244k);               // end of this period = start of the next
      hi = int'(t_fall - t_rise);      // pulse of the sample just sent (whole ns)
      sum += real'(hi - 2);
      re  += real'(hi - 2) * $cos(ph);
      im  += real'(hi - 2) * $sin(ph);
      checks++;
      if (hi != d + 2) begin
        failures++;
        if (failures < 10) $display("FAIL f=%0.0f n=%0d pulse=%0d exp=%0d", f, n, hi, d + 2);
      end
      #0.25;
    end
    mean = sum / real'(n_samp);
    amp  = 2.0 * $sqrt(re * re + im * im) / real'(n_samp);
    $display("tone %0.0f Hz: %0d samples, mean %0.2f, fundamental amplitude %0.2f (sent %0.1f)",
             f, n_samp, mean, amp, AMP);
    checks += 2;
    if (mean < 2045.0 || mean > 2051.0)        begin failures++; $display("FAIL mean f=%0.0f", f); end
    if (amp < 0.98 * AMP || amp > 1.02 * AMP)  begin failures++; $display("FAIL amplitude f=%0.0f", f); end
  endtask

  initial begin
    #2.25 rst_n = 1;
    // one warm-up period with a known sample: the first 244 kHz edge starts
    // it, the second ends it (the output is undefined before the first edge)
    sample_in = 12'd2048;
    @(posedge clk_244k); #0.25;
    @(posedge clk_244k); #0.25;
    run_tone(20.0e3, 29);     // 354.004 samples
    run_tone(1.0e3, 7);       // 1708.98 samples
    run_tone(20.0, 1);        // 12207.03 samples
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #70_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
