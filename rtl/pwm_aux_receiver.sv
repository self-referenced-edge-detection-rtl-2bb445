// pwm_aux_receiver: auxiliary receiver for inter-cycle detection (1-bit PWM).
//
// Contains behavioural delay models, so it is a simulation model as a whole;
// the inverter and the two latches are synthesizable logic.
//
// The received signal is inverted, so that its falling edges become rising
// edges, and sent through two delay lines of 1T - dT and 1T + dT. Each delayed
// edge clocks a latch that samples the inverted signal: the latch reads 1 when
// the next falling edge came before that point. With 1-bit PWM the distance
// between adjacent falling edges is T (bit unchanged), T + 2dT (0 -> 1) or
// T - 2dT (1 -> 0), so {A-, A+} is 01, 00 or 11. This needs no reference
// clock either.
//
// The inverted signal is both data and (delayed) clock of the latches, as in
// the main receiver.
//
// Reset: A- clears, A+ is set, i.e. the pair starts at 01 (no change).
//
// Timing: A- and A+ for the pair (bit k, bit k+1) settle about 1.5T after the
// rising edge of pulse k and hold until the same point one cycle later.
module pwm_aux_receiver
  import pwm_pkg::*;
#(
  parameter int unsigned T  = T_PS,
  parameter int unsigned DT = DT_PS
) (
  input  logic rst_n,
  input  logic rx_in,
  output logic a_minus,
  output logic a_plus
);
  timeunit 1ps;
  timeprecision 1ps;

  logic rx_inv;
  logic dly_minus, dly_plus;

  assign rx_inv = ~rx_in;

  pwm_delay_line #(.DELAY_PS(T - DT)) u_dly_minus (
    .din(rx_inv), .trim_ps('0), .dout(dly_minus)
  );
  pwm_delay_line #(.DELAY_PS(T + DT)) u_dly_plus (
    .din(rx_inv), .trim_ps('0), .dout(dly_plus)
  );

  pwm_edge_latch u_latch_minus (
    .clk_dly(dly_minus), .rst_n(rst_n), .d(rx_inv), .q(a_minus)
  );
  // A+ resets to 1 so that the pair reads 01 ("no change") until the first
  // real comparison; the ECC would otherwise take 00 for a 0 -> 1 step.
  pwm_edge_latch #(.RESET_VALUE(1'b1)) u_latch_plus (
    .clk_dly(dly_plus), .rst_n(rst_n), .d(rx_inv), .q(a_plus)
  );
endmodule
