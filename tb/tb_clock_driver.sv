// Clock driver: random enable changes placed in both clock phases. The
// expected output is computed from a reference latch (enable as last seen
// while the clock was low): high during every low phase, the inverse of the
// latched enable during every high phase, with no extra edge inside a phase.
// The number of rising output edges must equal the number of enabled high
// phases, and a disabled stretch must produce none.
`timescale 1ns/1ps
module tb_clock_driver;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int rises = 0, exp_rises = 0, disabled_phases = 0;
  logic en_ref = 0;

  clock_driver dut (.clk(clk), .en(en), .gclk(gclk));

  logic counting = 0;
  always @(posedge gclk) if (counting) rises++;

  initial begin
    #0.05;
    counting = 1;
    for (int c = 0; c < 400; c++) begin
      // low phase: enable may change, output must stay high
      #0.1;
      if ($urandom % 4 == 0) en = ~en;
      #0.1;
      checks++;
      if (gclk !== 1'b1) begin failures++; $display("FAIL low phase c=%0d", c); end
      #0.25;
      en_ref = en;                   // value held when clk rises
      #0.05; clk = 1;                // rising edge
      // high phase: enable may change, output must follow the held value
      #0.1;
      if ($urandom % 4 == 0) en = ~en;
      #0.2;
      checks++;
      if (gclk !== ~en_ref) begin failures++; $display("FAIL high phase c=%0d gclk=%b", c, gclk); end
      if (en_ref) exp_rises++;       // the falling clk edge ends the phase
      else disabled_phases++;
      #0.2; clk = 0;
    end
    #0.2;
    checks += 2;
    if (rises != exp_rises)  begin failures++; $display("FAIL rises=%0d expected=%0d", rises, exp_rises); end
    if (disabled_phases == 0) begin failures++; $display("FAIL never disabled"); end
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
