// Clock driver: switches the counter clock off while the PWM output is low.
//
// The 12-bit counter is the fastest-switching logic on the chip, and once the
// PWM pulse of the current sample has ended its count is no longer needed, so
// its clock is stopped until the next reset pulse raises the PWM output again.
// The cell is a two-input NAND of the fast clock and the enable, as in the
// original design: enabled, it passes the inverted clock; disabled, it holds
// its output high.
//
// A bare NAND produces a runt pulse if the enable changes while the clock is
// high (the only phase in which the enable reaches the output). This design
// adds a latch in front of the enable input that is transparent while the
// clock is low and holds while it is high, so the enable seen by the NAND
// only changes while the NAND output is forced high anyway. The latch is
// intended; it is the usual glitch-free clock gate.
//
// Interface: clk (fast clock), en (PWM pulse, active high), gclk (to the
// counter). Timing: while enabled, gclk rises at each falling edge of clk; an
// enable change made in a clk-high phase takes effect at the next falling
// edge, so turning the enable off still lets the edge that ends that phase
// through, and turning it on first gives a rising gclk edge one full clk
// cycle later.
module clock_driver (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = ~(clk & en_l);
endmodule
