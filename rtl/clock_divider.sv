// Clock divider: derives the 244 kHz sample clock from the 1 GHz counter clock.
//
// Twelve divide-by-two stages in series give a division by 2^12 = 4096, so
// 1 GHz becomes 244.14 kHz and one sample period is exactly one full cycle of
// the 12-bit counter. The stages are written here as one synchronous 12-bit
// binary counter clocked by the fast clock (bit i toggles at f/2^(i+1), the
// same waveforms a ripple chain of toggle flip-flops produces, without the
// ripple skew); the ripple chain of D flip-flops is the original circuit, the
// synchronous form is this design's choice so that the whole chip runs in
// one clock domain.
//
// Interface: clk (fast clock), rst_n (asynchronous, active low; this design's
// addition), div (all stage outputs), clk_slow = div[N-1], high for the
// second half of each 2^N-cycle period. Timing: clk_slow rises on the clock
// edge at which the count passes from 2^(N-1)-1 to 2^(N-1).
module clock_divider #(
  parameter int unsigned N = 12  // number of divide-by-two stages
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [N-1:0] div,
  output logic         clk_slow
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= div + 1'b1;
  end

  assign clk_slow = div[N-1];
endmodule
