// Fine-control step logic: steers the three least significant bits of the
// level code onto three adjacent fine-control step lines.
//
// The step lines R0..R14 drive transmission-gate arrays whose conductance
// doubles from one line to the next, so a group of three adjacent lines
// R(b), R(b+1), R(b+2) driven by B0, B1, B2 gives eight evenly spaced steps
// of size 2^b. Section k (k = 0..10) uses base b = k; sections 11..15 share
// base b = 12 (lines R12..R14), selected by D11_D15. Each line is therefore an
// OR of (bit AND section) terms: R0, R13 and R14 have one term (an AND gate),
// R1, R11 and R12 have two (a 2-to-1 block of three NANDs), R2..R10 have three
// (a 3-to-1 block). The grouping and the gate counts are the original ones.
// The original text assigns the lowest bit to the highest line of the group in
// one example; here B0 goes to the lowest line R(b) so that each level-code
// increment raises the attenuator conductance by the same step (monotonic).
//
// Interface: lsb = {B2,B1,B0}; dsel = D10..D0 from the decoder; d11_d15;
// r = R14..R0. Purely combinational.
module fine_step_logic
  import hearing_pkg::*;
(
  input  logic [2:0]        lsb,
  input  logic [10:0]       dsel,
  input  logic              d11_d15,
  output logic [STEP_N-1:0] r
);
  localparam int NSEL = 12;          // eleven decoder lines plus D11_D15

  // Base step line of each selector.
  function automatic int base_of(int s);
    return (s <= 10) ? s : 12;
  endfunction

  logic [NSEL-1:0] sel;
  assign sel = {d11_d15, dsel};

  always_comb begin
    r = '0;
    for (int k = 0; k < STEP_N; k++)
      for (int s = 0; s < NSEL; s++)
        for (int j = 0; j < 3; j++)
          if (base_of(s) + j == k) r[k] = r[k] | (lsb[j] & sel[s]);
  end
endmodule
