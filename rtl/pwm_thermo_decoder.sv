// pwm_thermo_decoder: thermometer-to-binary decoder of the receiver.
//
// Latch i reads 1 when the falling edge came after the sampling point
// 0.5T + (2i - 2)dT, so a symbol s sets the s lowest latches: 00 -> 000,
// 01 -> 001, 10 -> 011, 11 -> 111. The binary value is the number of ones,
// which also gives the nearest symbol for a code with a bubble; `valid` is low
// for such a code (a 1 above a 0). Purely combinational.
module pwm_thermo_decoder
  import pwm_pkg::*;
(
  input  thermo_t thermo,
  output symbol_t bin,
  output logic    valid
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    bin   = '0;
    valid = 1'b1;
    for (int i = 0; i < THERMO_W; i++) begin
      bin = bin + symbol_t'(thermo[i]);
      if (i > 0 && thermo[i] && !thermo[i-1]) valid = 1'b0;
    end
  end
endmodule
