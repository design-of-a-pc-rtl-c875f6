// Input registers: inputs change every fast cycle; the registers must take the
// value present at the first clock edge after each rising edge of the slow
// clock and hold it otherwise.
`timescale 1ns/1ps
module tb_input_registers;
  import hearing_pkg::*;
  logic clk = 0, rst_n = 0, clk_slow = 0;
  sample_t data_in, data_q, exp_data;
  level_t  ctrl_in, ctrl_q, exp_ctrl;
  int checks = 0, failures = 0, loads = 0;
  int phase = 0;
  logic slow_seen = 0;

  input_registers dut (.clk(clk), .rst_n(rst_n), .clk_slow(clk_slow), .data_in(data_in),
                       .ctrl_in(ctrl_in), .data_q(data_q), .ctrl_q(ctrl_q));

  always #0.5 clk = ~clk;

  initial begin
    data_in = '0; ctrl_in = '0;
    exp_data = '0; exp_ctrl = '0;
    #2.25 rst_n = 1;
    for (int c = 0; c < 400; c++) begin
      logic load_now;
      @(negedge clk);
      data_in = sample_t'($urandom);
      ctrl_in = level_t'($urandom);
      load_now = clk_slow & ~slow_seen;  // first edge that sees the slow clock high
      @(posedge clk); #0.05;
      slow_seen = clk_slow;
      if (load_now) begin exp_data = data_in; exp_ctrl = ctrl_in; loads++; end
      phase = (phase + 1) % 16;          // slow clock: 16-cycle period
      clk_slow = (phase >= 8);
      checks += 2;
      if (data_q !== exp_data) begin failures++; if (failures < 10) $display("FAIL data c=%0d", c); end
      if (ctrl_q !== exp_ctrl) begin failures++; if (failures < 10) $display("FAIL ctrl c=%0d", c); end
    end
    checks++;
    if (loads < 20) begin failures++; $display("FAIL loads=%0d", loads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
