// Input registers: the 12-bit sample (data) register and the 7-bit level
// (control) register, both written by the host link.
//
// Both registers take a new value once per sample period, at the rising edge
// of the 244 kHz sample clock, so the sample and the level code stay constant
// while the counter and comparator work through one PWM period. Here they are
// clocked by the fast clock and load when a rising edge of the sample clock
// has just been seen (a one-flip-flop edge detector): this keeps the chip in a
// single clock domain and is this design's choice, the registers themselves
// and their load instant follow the original.
//
// Interface: clk (fast clock), rst_n (asynchronous clear, this design's
// addition), clk_slow (sample clock, synchronous to clk), data_in/ctrl_in
// (from the host link), data_q/ctrl_q (held values). Timing: the registers
// load at the first rising clk edge after the one at which clk_slow rose, i.e.
// one fast cycle into the two-cycle reset pulse, so the new sample is in place
// before the counter leaves reset.
module input_registers
  import hearing_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clk_slow,
  input  sample_t data_in,
  input  level_t  ctrl_in,
  output sample_t data_q,
  output level_t  ctrl_q
);
  logic slow_q;
  logic load;

  assign load = clk_slow & ~slow_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slow_q <= 1'b0;
      data_q <= '0;
      ctrl_q <= '0;
    end else begin
      slow_q <= clk_slow;
      if (load) begin
        data_q <= data_in;
        ctrl_q <= ctrl_in;
      end
    end
  end
endmodule
