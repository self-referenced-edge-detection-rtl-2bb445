// pwm_pkg: constants shared by the self-referenced PWM transceiver.
//
// The carrier runs at 2 GHz (T = 500 ps): one PWM symbol per carrier cycle, so
// 2-bit PWM carries 4 Gb/s and 1-bit PWM 2 Gb/s, the two rates the design is
// specified for. The modulation factor dT (the step between adjacent falling
// edge positions is 2*dT) is this design's own choice, 25 ps, which keeps the
// latest falling edge (0.5T + 3dT) well inside the carrier period and leaves
// a margin of dT at every receiver comparison.
package pwm_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T_PS      = 500; // carrier period
  localparam int unsigned DT_PS     = 25;  // modulation factor dT
  localparam int unsigned PWM_BITS  = 2;   // bits per symbol in the main mode
  localparam int unsigned N_LEVELS  = 1 << PWM_BITS;  // falling-edge positions
  localparam int unsigned THERMO_W  = N_LEVELS - 1;   // receiver latches

  typedef logic [PWM_BITS-1:0] symbol_t;
  typedef logic [THERMO_W-1:0] thermo_t;
  typedef logic [15:0]         trim_t;   // delay-line trim, in ps
endpackage
