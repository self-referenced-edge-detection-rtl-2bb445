// pwm_duty_control: behavioural model of the transmitter's duty controller.
//
// Not synthesizable. The controller narrows the high phase of the carrier by
// SHRINK_PS (3dT). The falling edge follows the carrier's falling edge at once
// and the rising edge is held back by SHRINK_PS, so a 50 % carrier becomes a
// pulse of 0.5T - 3dT. How the narrowing is done is this design's choice; only
// the amount (-3dT) is fixed. Delaying the rising edge rather than advancing
// the falling one needs no knowledge of the period, and the fixed 3dT shift of
// every pulse is invisible to the self-referenced receiver.
module pwm_duty_control #(
  parameter int unsigned SHRINK_PS = 3 * pwm_pkg::DT_PS
) (
  input  logic clk_in,
  output logic pulse_out
);
  timeunit 1ps;
  timeprecision 1ps;

  initial pulse_out = 1'b0;

  always @(posedge clk_in or negedge clk_in) begin
    if (clk_in) begin
      fork
        begin
          #(SHRINK_PS);
          if (clk_in) pulse_out <= 1'b1;  // a high phase under 3dT is lost
        end
      join_none
    end else begin
      pulse_out <= 1'b0;
    end
  end
endmodule
