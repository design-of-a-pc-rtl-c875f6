// End-to-end test of the chip at its default size, driven the way a host
// drives it: a 20 kHz tone (12-bit samples of a sine at the 244.14 kHz sample
// rate, about 12.2 samples per tone cycle) while the level code steps from 0
// to 127, one step per tone cycle, followed by samples at the ends of the
// range. Every sample period is checked against a model computed here:
//   - PWM high time = sample + 2 fast cycles (whole period for 0 and > 4093)
//     and a period of 4096 cycles;
//   - counter clock edges = sample + 2 (+1 after a period that never ended),
//     i.e. the clock driver stops the counter after the pulse;
//   - coarse branch, fine step lines and offset lines for the captured level;
//   - the two bridge halves switch in antiphase with the PWM pulse.
// It also counts how often each mechanism occurred: reset pulses, comparator
// matches, clock-gated periods, whole-period pulses, each of the five output
// branches, each step line and each offset line; one never seen is a failure.
`timescale 1ns/1ps
module tb_hearing_test_chip;
  import hearing_pkg::*;
  localparam int    PERIOD = 4096;
  localparam real   FS     = 1.0e9 / 4096.0;   // sample rate in Hz
  localparam real   FTONE  = 20.0e3;           // tone frequency in Hz
  localparam real   PI     = 3.14159265358979;
  localparam int    SAMPLES_PER_STEP = 12;

  logic clk = 0, rst_n = 0;
  sample_t sample_in = '0, count, sample_q;
  level_t  level_in = '0, level_q;
  logic clk_244k, rst_pulse, pwm, counter_clk, node_p, node_n, bridge_driven;
  logic [COARSE_N-1:0] pms_p, nms_p, pms_n, nms_n;
  level_ctrl_t level_ctrl;

  int checks = 0, failures = 0;
  int gedges = 0;
  logic warmup = 1;   // first period after power-up: counter clock state unknown
  int n_reset = 0, n_match = 0, n_gated = 0, n_full = 0;
  int n_coarse[COARSE_N];
  int n_step[STEP_N];
  int n_offset[OFFSET_N];

  hearing_test_chip dut (
    .clk_1g(clk), .rst_n(rst_n), .sample_in(sample_in), .level_in(level_in),
    .clk_244k(clk_244k), .rst_pulse(rst_pulse), .pwm(pwm), .counter_clk(counter_clk),
    .count(count), .sample_q(sample_q), .level_q(level_q),
    .pms_p(pms_p), .nms_p(nms_p), .pms_n(pms_n), .nms_n(nms_n),
    .node_p(node_p), .node_n(node_n), .bridge_driven(bridge_driven),
    .level_ctrl(level_ctrl));

  always #0.5 clk = ~clk;
  always @(posedge counter_clk) gedges++;
  always @(posedge rst_pulse) n_reset++;

  function automatic int exp_high(int d);
    return (d >= 1 && d <= PERIOD - 3) ? d + 2 : PERIOD;
  endfunction

  function automatic logic [4:0] exp_coarse(int code);
    if (code < 96)  return 5'b00001;
    if (code < 104) return 5'b00010;
    if (code < 112) return 5'b00100;
    if (code < 120) return 5'b01000;
    return 5'b10000;
  endfunction

  function automatic logic [14:0] exp_step(int code);
    int sec;
    sec = code / 8;
    return 15'((code % 8) << ((sec <= 10) ? sec : 12));
  endfunction

  function automatic logic [10:0] exp_offset(int code);
    int sec;
    sec = code / 8;
    if (sec == 0)  return '0;
    if (sec <= 10) return 11'(1 << (sec - 1));
    return 11'h400;
  endfunction

  task automatic run_period(input int d, input int code, input logic prev_full);
    int hi;
    sample_in = sample_t'(d);
    level_in  = level_t'(code);
    gedges = 0;
    hi = 0;
    checks++;
    if (!rst_pulse || !pwm) begin failures++; $display("FAIL period start d=%0d", d); end
    for (int cyc = 0; cyc < PERIOD; cyc++) begin
      if (pwm) hi++;
      if (cyc == 8) begin
        checks += 5;
        if (sample_q !== sample_t'(d) || level_q !== level_t'(code)) begin failures++; $display("FAIL capture d=%0d code=%0d", d, code); end
        if (level_ctrl.coarse !== exp_coarse(code)) begin failures++; $display("FAIL coarse code=%0d", code); end
        if (level_ctrl.step !== exp_step(code))     begin failures++; $display("FAIL step code=%0d", code); end
        if (level_ctrl.offset !== exp_offset(code)) begin failures++; $display("FAIL offset code=%0d", code); end
        if (!bridge_driven)                         begin failures++; $display("FAIL bridge not driven"); end
        for (int k = 0; k < COARSE_N; k++) if (level_ctrl.coarse[k]) n_coarse[k]++;
        for (int k = 0; k < STEP_N; k++)   if (level_ctrl.step[k])   n_step[k]++;
        for (int k = 0; k < OFFSET_N; k++) if (level_ctrl.offset[k]) n_offset[k]++;
      end
      if (cyc % 64 == 3) begin
        checks++;
        if (node_p !== ~pwm || node_n !== pwm) begin failures++; $display("FAIL bridge antiphase"); end
      end
      #1;
    end
    checks++;
    if (hi != exp_high(d)) begin failures++; $display("FAIL d=%0d high=%0d exp=%0d", d, hi, exp_high(d)); end
    if (exp_high(d) < PERIOD) begin
      n_match++;
      if (!warmup) checks++;
      if (!warmup && gedges != d + 2 + (prev_full ? 1 : 0)) begin failures++; $display("FAIL d=%0d counter edges=%0d", d, gedges); end
      if (gedges < PERIOD) n_gated++;
    end else begin
      n_full++;
    end
  endtask

  initial begin
    int n, d, prev_d;
    int ends[6];
    ends = '{0, 4094, 1, 4093, 4095, 5};
    n = 0;
    prev_d = 1;
    #2.25 rst_n = 1;
    @(posedge clk_244k);
    #0.25;
    run_period(1, 0, 1'b0);
    warmup = 0;
    // tone with a level sweep
    for (int code = 0; code < 128; code++) begin
      for (int k = 0; k < SAMPLES_PER_STEP; k++) begin
        d = int'(2048.0 + 2040.0 * $sin(2.0 * PI * FTONE * real'(n) / FS));
        run_period(d, code, exp_high(prev_d) == PERIOD);
        prev_d = d;
        n++;
      end
    end
    // ends of the sample range
    for (int i = 0; i < 6; i++) begin
      run_period(ends[i], 127 - i, exp_high(prev_d) == PERIOD);
      prev_d = ends[i];
    end
    $display("reset pulses=%0d matches=%0d gated=%0d whole-period=%0d", n_reset, n_match, n_gated, n_full);
    checks += 4;
    if (n_reset < 128 * SAMPLES_PER_STEP) begin failures++; $display("FAIL reset pulses"); end
    if (n_match == 0) begin failures++; $display("FAIL no comparator match"); end
    if (n_gated == 0) begin failures++; $display("FAIL counter clock never stopped"); end
    if (n_full == 0)  begin failures++; $display("FAIL no whole-period pulse"); end
    for (int k = 0; k < COARSE_N; k++) begin checks++; if (n_coarse[k] == 0) begin failures++; $display("FAIL branch %0d unused", k); end end
    for (int k = 0; k < STEP_N; k++)   begin checks++; if (n_step[k] == 0)   begin failures++; $display("FAIL step line %0d unused", k); end end
    for (int k = 0; k < OFFSET_N; k++) begin checks++; if (n_offset[k] == 0) begin failures++; $display("FAIL offset line %0d unused", k); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1600 * PERIOD);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
