// Class-D output stage with coarse level control, gate-drive side.
//
// The headphone sits across an H-bridge. Each bridge half is a group of five
// parallel CMOS inverters of different strength (stacks of 5, 4, 3, 1 and 1
// series transistors of increasing width, giving 0.40, 0.64, 1.00, 1.60 and
// 2.26 V peak-to-peak across 32 ohm after filtering). Exactly one inverter of
// each group is switched on by the one-hot coarse select; the others have both
// transistors off. The negative half receives the PWM signal through one extra
// inverter, so the two halves switch in antiphase and the load sees a
// differential swing of twice the supply.
//
// This module holds the digital part of the stage: the inversion for the
// negative half and the ten gate-selection cells (five per half). The power
// transistors themselves are analog; their logic effect is modelled by the
// node outputs: a half-bridge node is high when one of its PMOS gates is low,
// and low otherwise (its drive then comes from an NMOS, or from nothing when
// no branch is selected, which 'driven' reports). The partition and the gate
// cells follow the original; the node model is this design's.
//
// Interface: pwm (PWM pulse), sel (coarse_sel_t, one-hot), pms_p/nms_p and
// pms_n/nms_n (gate drives of the positive and negative half, bit i = branch
// i in coarse_sel_t order), node_p/node_n (logic level of each half-bridge
// output), driven (both halves have at least one branch on). Purely
// combinational.
module classd_coarse
  import hearing_pkg::*;
(
  input  logic                pwm,
  input  coarse_sel_t         sel,
  output logic [COARSE_N-1:0] pms_p,
  output logic [COARSE_N-1:0] nms_p,
  output logic [COARSE_N-1:0] pms_n,
  output logic [COARSE_N-1:0] nms_n,
  output logic                node_p,
  output logic                node_n,
  output logic                driven
);
  logic pwm_inv;
  logic [COARSE_N-1:0] en;

  assign pwm_inv = ~pwm;      // extra inverter of the negative half
  assign en      = sel;

  for (genvar i = 0; i < COARSE_N; i++) begin : g_branch
    gate_select u_gs_p (.in(pwm),     .en(en[i]), .pms(pms_p[i]), .nms(nms_p[i]));
    gate_select u_gs_n (.in(pwm_inv), .en(en[i]), .pms(pms_n[i]), .nms(nms_n[i]));
  end

  // Inverter outputs: pulled up by any conducting PMOS (gate low), pulled
  // down by any conducting NMOS (gate high).
  always_comb begin
    node_p = ~&pms_p;
    node_n = ~&pms_n;
    driven = (~&pms_p | |nms_p) & (~&pms_n | |nms_n);
  end
endmodule
