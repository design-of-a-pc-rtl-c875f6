// PWM logic: set by the reset pulse, cleared at the first clock edge that sees
// a match, held low until the next reset, and the reset wins over a match.
`timescale 1ns/1ps
module tb_pwm_logic;
  logic clk = 0, rst = 0, match_n = 1, pwm;
  int checks = 0, failures = 0;

  pwm_logic dut (.clk(clk), .rst(rst), .match_n(match_n), .pwm(pwm));

  always #0.5 clk = ~clk;

  task automatic expect_pwm(input logic v, input string what);
    checks++;
    if (pwm !== v) begin failures++; $display("FAIL %s pwm=%b", what, pwm); end
  endtask

  initial begin
    for (int r = 0; r < 20; r++) begin
      int wait_cyc;
      wait_cyc = 1 + $urandom % 20;
      @(posedge clk); #0.2 rst = 1; #0.05;
      expect_pwm(1'b1, "set immediately by reset");
      match_n = 0;                       // match during reset: reset wins
      @(posedge clk); #0.05;
      expect_pwm(1'b1, "reset over match");
      match_n = 1;
      #0.1 rst = 0;
      repeat (wait_cyc) begin
        @(posedge clk); #0.05;
        expect_pwm(1'b1, "held high");
      end
      match_n = 0;                       // one-cycle match pulse
      #0.3;
      expect_pwm(1'b1, "no change before edge");
      @(posedge clk); #0.05;
      expect_pwm(1'b0, "cleared by match");
      match_n = 1;
      repeat (5) begin
        @(posedge clk); #0.05;
        expect_pwm(1'b0, "held low");
      end
    end
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
