// 12-bit high-speed counter: the conditional-sum incrementer feeding a
// 12-bit register whose output is both the count and the incrementer input.
//
// The register is cleared asynchronously by the reset pulse at the start of
// each sample period and then counts up once per edge of its clock, which is
// the gated clock from the clock driver (it stops when the PWM output falls).
// This is the original structure.
//
// Interface: clk (gated counter clock, rising edge), rst (asynchronous, active
// high: the reset pulse), count. Timing: count changes one gclk edge after
// each rising edge while rst is low; it reads 0 while rst is high.
module counter12 (
  input  logic        clk,
  input  logic        rst,
  output logic [11:0] count
);
  logic [11:0] next;

  incrementer12 u_inc (.a(count), .out(next));

  always_ff @(posedge clk or posedge rst) begin
    if (rst) count <= '0;
    else     count <= next;
  end
endmodule
