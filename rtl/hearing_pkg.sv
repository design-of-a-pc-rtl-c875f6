// Shared widths and constants of the hearing-test tone generator.
//
// The chip turns a 12-bit audio sample into a pulse-width-modulated square
// wave (one PWM period = 4096 ticks of the fast counter clock) and a 7-bit
// level code into selections for an H-bridge output stage and an attenuator.
// The widths below (12-bit sample, 7-bit level code, five coarse branches,
// fifteen fine-step lines, eleven offset lines) are the ones the design is
// built around; nothing here is a free choice except the type names.
package hearing_pkg;
  localparam int unsigned SAMPLE_W  = 12;  // data register / counter width
  localparam int unsigned CTRL_W    = 7;   // level (control) register width
  localparam int unsigned SECTIONS  = 16;  // level code split in 16 sections of 8 steps
  localparam int unsigned COARSE_N  = 5;   // parallel output inverters per bridge branch
  localparam int unsigned STEP_N    = 15;  // fine-control step lines R0..R14
  localparam int unsigned OFFSET_N  = 11;  // fine-control offset lines D1..D10, D11_D15

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [CTRL_W-1:0]   level_t;

  // Coarse output branch selects, one-hot. Bit order follows the peak-to-peak
  // level each branch delivers: 0.40 V, 0.64 V, 1.00 V, 1.60 V, 2.26 V.
  typedef struct packed {
    logic v2p26;  // level codes 120..127 (D15)
    logic v1p60;  // level codes 112..119 (D14)
    logic v1p00;  // level codes 104..111 (D13)
    logic v0p64;  // level codes  96..103 (D12)
    logic v0p40;  // level codes   0..95  (D0_D11)
  } coarse_sel_t;

  // Outputs of the control logic towards the analog level-setting networks.
  typedef struct packed {
    coarse_sel_t         coarse;  // to the class-D output stage
    logic [STEP_N-1:0]   step;    // R14..R0 to the fine-control step arrays
    logic [OFFSET_N-1:0] offset;  // {D11_D15, D10..D1} to the fine-control offset arrays
  } level_ctrl_t;
endpackage
