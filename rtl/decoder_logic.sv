// Decoder logic: selects one of the sixteen level sections.
//
// The four most significant bits of the level code (B6..B3) are decoded one-hot
// into D0..D15; section k covers level codes 8k..8k+7. Two group signals are
// formed without wide gates:
//   D0_D11  = NAND(B6, B5): high for sections 0..11 (codes 0..95), because
//             sections 12..15 are exactly those with B6 = B5 = 1. It selects
//             the smallest output-stage branch.
//   D11_D15 = high for sections 11..15 (codes 88..127) = D11 OR NOT D0_D11,
//             built as a NAND of the inverted D11 and D0_D11. It selects the
//             top group of fine-control steps and the top offset network.
// The decoder and D0_D11 are as in the original design. For D11_D15 the
// original equations combine D11 with D0_D11 through a NOR, which is low for
// every code; the OR form is used here because it is the one that makes the
// step-group table (sections 11..15 share lines R12..R14) work.
//
// Interface: msb = {B6,B5,B4,B3}; d (one-hot, d[k] = section k); d0_d11;
// d11_d15. Purely combinational.
module decoder_logic
  import hearing_pkg::*;
(
  input  logic [3:0]  msb,
  output logic [SECTIONS-1:0] d,
  output logic        d0_d11,
  output logic        d11_d15
);
  always_comb begin
    d = '0;
    d[msb] = 1'b1;
    d0_d11  = ~(msb[3] & msb[2]);
    d11_d15 = ~(~d[11] & d0_d11);
  end
endmodule
