// Reset circuit: a two-fast-clock-cycle high pulse on every rising edge of
// the 244 kHz sample clock.
//
// The pulse clears the counter and sets the PWM output at the start of each
// sample period. It must outlast the path reset -> PWM logic -> clock driver,
// hence two cycles (2 ns at 1 GHz). The structure is the original one: the
// slow clock passes through two D flip-flops clocked by the fast clock (a
// delay of two cycles); a NAND of the delayed copy and the slow clock and a
// second NAND used as an inverter of the slow clock feed an XOR. In steady
// state and after a falling edge both XOR inputs are equal; after a rising
// edge they differ until the delayed copy catches up.
//
// Interface: clk (fast clock), rst_n (asynchronous clear of the delay
// flip-flops, this design's addition), clk_slow (sample clock, synchronous to
// clk), rst_pulse (active high). Timing: rst_pulse is combinational from
// clk_slow and the second flip-flop; it is high for exactly the two clk cycles
// that start at the edge where clk_slow rises.
module reset_circuit (
  input  logic clk,
  input  logic rst_n,
  input  logic clk_slow,
  output logic rst_pulse
);
  logic d1, d2;
  logic nand_a, nand_b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d1 <= 1'b0;
      d2 <= 1'b0;
    end else begin
      d1 <= clk_slow;
      d2 <= d1;
    end
  end

  assign nand_a    = ~(d2 & clk_slow);
  assign nand_b    = ~(clk_slow & clk_slow);
  assign rst_pulse = nand_a ^ nand_b;
endmodule
