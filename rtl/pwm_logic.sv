// PWM logic: holds the PWM output high from the reset pulse until the
// comparator reports that the counter has reached the sample value.
//
// The original cell is a flip-flop with its D input tied high, triggered by
// the falling edge of the comparator's active-low match pulse, reset by the
// reset pulse, and read at its inverted output: reset drives the PWM output
// high, the match drives it low. Here the flip-flop is asynchronously set by
// the reset pulse as before, but the match is sampled on the fast clock
// instead of being used as a clock itself (this design's choice: no clock is
// derived from data, and the match is read while it is stable). The reset
// wins over a match in the same cycle.
//
// Interface: clk (fast clock), rst (reset pulse, asynchronous set, active
// high), match_n (comparator output, low on a match), pwm (PWM pulse; also the
// clock-driver enable). Timing: pwm rises as soon as rst rises; it falls at the
// first rising clk edge, with rst low, at which match_n is low.
module pwm_logic (
  input  logic clk,
  input  logic rst,
  input  logic match_n,
  output logic pwm
);
  always_ff @(posedge clk or posedge rst) begin
    if (rst)           pwm <= 1'b1;
    else if (!match_n) pwm <= 1'b0;
  end
endmodule
