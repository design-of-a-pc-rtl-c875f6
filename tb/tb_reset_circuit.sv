// Reset circuit: the slow clock is driven from the testbench with random high
// and low lengths (at least three fast cycles each). The pulse must be high
// for exactly the two fast cycles starting at each rising edge of the slow
// clock and low everywhere else, including after falling edges.
`timescale 1ns/1ps
module tb_reset_circuit;
  logic clk = 0, rst_n = 0, clk_slow = 0, rst_pulse;
  int checks = 0, failures = 0, pulses = 0;
  int since_rise = 100;

  reset_circuit dut (.clk(clk), .rst_n(rst_n), .clk_slow(clk_slow), .rst_pulse(rst_pulse));

  always #0.5 clk = ~clk;

  initial begin
    #2.25 rst_n = 1;
    for (int p = 0; p < 40; p++) begin
      int hi, lo;
      hi = 3 + $urandom % 6;
      lo = 3 + $urandom % 6;
      @(posedge clk); #0.05 clk_slow = 1; since_rise = 0;
      repeat (hi) begin
        #0.5;                           // mid-cycle sample
        checks++;
        if (rst_pulse !== (since_rise < 2)) begin failures++; $display("FAIL p=%0d k=%0d pulse=%b", p, since_rise, rst_pulse); end
        if (rst_pulse && since_rise == 0) pulses++;
        @(posedge clk); #0.05; since_rise++;
      end
      clk_slow = 0;
      repeat (lo) begin
        #0.5;
        checks++;
        if (rst_pulse !== 1'b0) begin failures++; $display("FAIL low phase pulse p=%0d", p); end
        @(posedge clk); #0.05;
      end
    end
    checks++;
    if (pulses != 40) begin failures++; $display("FAIL pulses=%0d", pulses); end
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
