// Clock divider at its full 12 stages: after reset the slow clock must have a
// period of exactly 4096 fast cycles with a 50 % duty cycle, rising after
// 2048 cycles, and the stage outputs must count up by one per cycle.
`timescale 1ns/1ps
module tb_clock_divider;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] div;
  logic clk_slow;
  int checks = 0, failures = 0;
  int cyc = 0, last_rise = -1, highs = 0, rises = 0;
  logic prev_slow;
  logic [N-1:0] prev_div;

  clock_divider #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .div(div), .clk_slow(clk_slow));

  always #0.5 clk = ~clk;

  initial begin
    #2.25 rst_n = 1;
    prev_slow = clk_slow;
    prev_div  = div;
    repeat (4 * 4096) begin
      @(posedge clk); #0.1;
      cyc++;
      checks++;
      if (div !== prev_div + 1'b1) begin failures++; if (failures < 10) $display("FAIL count %0d -> %0d", prev_div, div); end
      if (clk_slow) highs++;
      if (clk_slow && !prev_slow) begin
        rises++;
        if (last_rise < 0) begin
          checks++;
          if (cyc != 2048) begin failures++; $display("FAIL first rise at cycle %0d", cyc); end
        end else begin
          checks++;
          if (cyc - last_rise != 4096) begin failures++; $display("FAIL period %0d", cyc - last_rise); end
        end
        last_rise = cyc;
      end
      prev_slow = clk_slow;
      prev_div  = div;
    end
    checks += 2;
    if (rises != 4)           begin failures++; $display("FAIL rises=%0d", rises); end
    if (highs != 2 * 4096)    begin failures++; $display("FAIL high cycles=%0d", highs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
