// pwm_selector_or: the transmitter's selector and OR gate.
//
// taps[0] is the duty-controlled clock itself, taps[k] the same pulse delayed
// by 2k*dT. The selector passes taps[sel]; the OR with taps[0] keeps the
// undelayed rising edge and takes the falling edge of the selected copy, so
// the pulse is 0.5T - 3dT + 2*sel*dT wide. Purely combinational.
module pwm_selector_or
  import pwm_pkg::*;
(
  input  logic [N_LEVELS-1:0] taps,
  input  symbol_t             sel,
  output logic                pwm_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic selected;

  always_comb begin
    selected = taps[sel];
    pwm_out  = taps[0] | selected;
  end
endmodule
