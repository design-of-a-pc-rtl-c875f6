// Gate selection logic of one output-stage inverter.
//
// Each of the parallel output inverters has its PMOS and NMOS gates driven
// separately. When enabled, both gates receive the PWM level, so the pair
// acts as an inverter; when disabled, the PMOS gate is held high and the NMOS
// gate low, so both transistors are off and the branch floats. Built, as in
// the original, from two NANDs and two inverters:
//   PMS = NAND(EN, NOT IN),  NMS = NOT NAND(EN, IN).
//
// Interface: in (PWM level), en (branch select), pms (PMOS gate), nms (NMOS
// gate). Purely combinational.
module gate_select (
  input  logic in,
  input  logic en,
  output logic pms,
  output logic nms
);
  assign pms = ~(en & ~in);
  assign nms = ~(~(en & in));
endmodule
