// 12-bit counter: asynchronous clear, counting through the full range with
// wrap-around from 4095 to 0, a clear in mid-count, and holding while the
// clock is stopped.
`timescale 1ns/1ps
module tb_counter12;
  logic clk = 0, rst = 0;
  logic [11:0] count;
  int checks = 0, failures = 0;
  int expected = 0;

  counter12 dut (.clk(clk), .rst(rst), .count(count));

  task automatic tick();
    #0.5 clk = 1; #0.5 clk = 0;
  endtask

  initial begin
    #0.5 rst = 1;
    #0.5;
    checks++;
    if (count !== 0) begin failures++; $display("FAIL clear"); end
    rst = 0;
    for (int i = 0; i < 4096 + 100; i++) begin
      tick();
      expected = (expected + 1) % 4096;
      checks++;
      if (int'(count) != expected) begin failures++; if (failures < 10) $display("FAIL i=%0d count=%0d exp=%0d", i, count, expected); end
    end
    // asynchronous clear without a clock edge
    #0.2 rst = 1; #0.1;
    checks++;
    if (count !== 0) begin failures++; $display("FAIL async clear"); end
    tick();                          // clock while in reset: stays 0
    checks++;
    if (count !== 0) begin failures++; $display("FAIL hold in reset"); end
    rst = 0;
    repeat (37) tick();
    #5;                              // clock stopped: count holds
    checks++;
    if (count !== 12'd37) begin failures++; $display("FAIL after restart count=%0d", count); end
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
