// Control logic: expands the 7-bit level code into the 31 selection lines of
// the output-level networks.
//
// The level range is cut into 16 sections of 8 steps. The decoder logic picks
// the section from the four upper bits; the fine-control step logic places the
// three lower bits on the step lines of that section. Outputs:
//   coarse (5)  one-hot output-stage branch: codes 0..95, 96..103, 104..111,
//               112..119, 120..127 select 0.40, 0.64, 1.00, 1.60, 2.26 V p-p;
//   step (15)   R14..R0, three adjacent lines carry B2..B0;
//   offset (11) {D11_D15, D10..D1}: at most one offset network per section
//               (section 0 uses none).
// This partition is the original one. The outputs are combinational from the
// level register, which only changes at the start of a sample period.
//
// Interface: level (B6..B0), ctrl (level_ctrl_t). Purely combinational.
module control_logic
  import hearing_pkg::*;
(
  input  level_t      level,
  output level_ctrl_t ctrl
);
  logic [SECTIONS-1:0] d;   // d[11] only feeds D11_D15 inside the decoder
  logic        d0_d11, d11_d15;
  logic [STEP_N-1:0] r;

  decoder_logic u_dec (
    .msb    (level[6:3]),
    .d      (d),
    .d0_d11 (d0_d11),
    .d11_d15(d11_d15)
  );

  fine_step_logic u_step (
    .lsb    (level[2:0]),
    .dsel   (d[10:0]),
    .d11_d15(d11_d15),
    .r      (r)
  );

  always_comb begin
    ctrl.coarse.v0p40 = d0_d11;
    ctrl.coarse.v0p64 = d[12];
    ctrl.coarse.v1p00 = d[13];
    ctrl.coarse.v1p60 = d[14];
    ctrl.coarse.v2p26 = d[15];
    ctrl.step         = r;
    ctrl.offset       = {d11_d15, d[10:1]};
  end
endmodule
