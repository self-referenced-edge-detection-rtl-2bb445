// pwm_transmitter: PWM transmitter of the self-referenced transceiver.
//
// Contains behavioural delay models, so it is a simulation model as a whole;
// the modulation circuit and the selector/OR are synthesizable logic.
//
// The carrier clock goes through the duty controller (high phase narrowed by
// 3dT) and into a bank of delay elements of 2dT, 4dT and 6dT; together with
// the undelayed path they form the four selector inputs. The modulation
// circuit picks one copy per carrier cycle and the OR merges it with the
// undelayed copy: the rising edge is never modulated and the falling edge
// lands at 0.5T + (2s - 3)dT after it for symbol s. Each symbol on tx_data is
// sampled on a rising carrier edge and sent in the pulse that starts 3dT
// later.
module pwm_transmitter
  import pwm_pkg::*;
#(
  parameter int unsigned DT = DT_PS
) (
  input  logic    carrier_clk,
  input  logic    rst_n,
  input  logic    mode_1bit,
  input  symbol_t tx_data,
  output logic    tx_out
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_LEVELS-1:0] taps;
  symbol_t             sel;

  pwm_duty_control #(.SHRINK_PS(3 * DT)) u_duty (
    .clk_in   (carrier_clk),
    .pulse_out(taps[0])
  );

  for (genvar k = 1; k < N_LEVELS; k++) begin : g_tap
    pwm_delay_line #(.DELAY_PS(2 * k * DT)) u_dly (
      .din    (taps[0]),
      .trim_ps('0),
      .dout   (taps[k])
    );
  end

  pwm_modulation_circuit u_mod (
    .carrier_clk(carrier_clk),
    .rst_n      (rst_n),
    .mode_1bit  (mode_1bit),
    .tx_data    (tx_data),
    .sel        (sel)
  );

  pwm_selector_or u_sel (
    .taps   (taps),
    .sel    (sel),
    .pwm_out(tx_out)
  );
endmodule
