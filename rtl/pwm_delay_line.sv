// pwm_delay_line: behavioural model of an analog delay element.
//
// Not synthesizable. Every delay in the transceiver (the 2dT/4dT/6dT taps of
// the transmitter, the 0.5T-2dT/0.5T/0.5T+2dT lines of the receiver, the
// 1T-dT/1T+dT lines of the auxiliary receiver and the extra (n-0.5)T line of
// the jitter test) is an instance of this model. Each edge of `din` appears on
// `dout` DELAY_PS + trim_ps later (transport delay: pulses shorter than the
// delay pass through unchanged, as they do through a chain of inverters).
// `trim_ps` stands for the tuning input that delay-line calibration adjusts; it
// is sampled when an edge enters the line. The output starts low, so the input
// must also be low when the simulation starts.
module pwm_delay_line #(
  parameter int unsigned DELAY_PS = pwm_pkg::T_PS / 2
) (
  input  logic         din,
  input  pwm_pkg::trim_t trim_ps,
  output logic         dout
);
  timeunit 1ps;
  timeprecision 1ps;

  initial dout = 1'b0;

  // One forked timer per edge gives a transport delay.
  always @(posedge din or negedge din) begin
    if (din) begin
      fork
        #(DELAY_PS + int'(trim_ps)) dout <= 1'b1;
      join_none
    end else begin
      fork
        #(DELAY_PS + int'(trim_ps)) dout <= 1'b0;
      join_none
    end
  end
endmodule
