// pwm_transceiver: self-referenced edge detection PWM transceiver.
//
// Contains behavioural delay models (the delay elements and the duty
// controller), so it is a simulation model as a whole.
//
// Data travel as the width of a carrier-rate pulse. The transmitter keeps the
// rising edge of every carrier cycle and moves the falling edge to one of four
// positions, 2dT apart, around 0.5T. The receiver needs no clock: each pulse
// is compared with a copy of itself delayed by about 0.5T, so the pulse's own
// rising edge is the reference for its falling edge.
//
// Blocks:
//   u_tx    transmitter (duty controller, 2/4/6 dT taps, selector, OR)
//   u_rx    main receiver (0.5T -/+ 2dT lines, three latches, decoder)
//   u_aux   auxiliary receiver (1T -/+ dT lines on the inverted signal)
//   u_ecc   error check and correction of the 1-bit decision
//   u_edge  falling-edge-only 1-bit decoder, the alternative receiver
//           topology that uses the auxiliary latches alone
//   u_cdf   latch counters for the jitter measurement
// The channel is outside: tx_out leaves the block and rx_in comes back.
//
// Modes:
//   mode_1bit = 0   2-bit PWM: rx_data is the received symbol.
//   mode_1bit = 1   1-bit PWM: tx_data[0] is sent as width 0.5T -/+ dT,
//                   rx_bit_raw is the middle (0.5T) latch, rx_bit_corrected
//                   the ECC output, rx_bit_edge_only the bit rebuilt
//                   from falling-edge spacing alone.
//   jitter_test = 1 all receiver lines get an extra (n - 0.5)T, n = jitter_n
//                   (1 or more), so the latches compare carrier edges n cycles
//                   apart at nT - 2dT, nT and nT + 2dT; cdf_start runs a count
//                   window and cdf_count gives the CDF points. rx_trim_ps
//                   adjusts each line for calibration.
// The ECC and the output registers are clocked by the rising edge of rx_in,
// the received carrier itself. The CDF counters use its falling edge: in
// jitter-test mode the latches change close to a rising edge (n cycles after
// the edge that started them), so a rising-edge counter would sometimes see a
// latch before and sometimes after its update.
//
// rx_in is both a clock (of the delay-line latches, the ECC and the output
// registers) and a data input (of the latches): that is the principle of the
// self-referenced receiver, so lint's note that rx_in is flopped both
// synchronously and asynchronously is expected.
//
// Latency: a symbol sampled on rising carrier edge k appears on rx_data after
// the received rising edge of cycle k+1 (about one cycle plus 3dT plus the
// channel delay); the corrected 1-bit decision one cycle later still.
module pwm_transceiver
  import pwm_pkg::*;
#(
  parameter int unsigned T          = T_PS,
  parameter int unsigned DT         = DT_PS,
  parameter int unsigned CDF_WINDOW = 1024,
  localparam int unsigned CDF_W     = $clog2(CDF_WINDOW + 1)
) (
  input  logic                          carrier_clk,
  input  logic                          rst_n,
  input  logic                          mode_1bit,
  input  symbol_t                       tx_data,
  output logic                          tx_out,
  input  logic                          rx_in,
  input  logic                          jitter_test,
  input  logic [3:0]                    jitter_n,
  input  trim_t [THERMO_W-1:0]          rx_trim_ps,
  input  logic                          cdf_start,
  output thermo_t                       rx_thermo,
  output symbol_t                       rx_data,
  output logic                          rx_code_valid,
  output logic                          rx_bit_raw,
  output logic                          rx_bit_corrected,
  output logic                          ecc_error,
  output logic                          rx_bit_edge_only,
  output logic [THERMO_W-1:0][CDF_W-1:0] cdf_count,
  output logic                          cdf_busy,
  output logic                          cdf_done
);
  timeunit 1ps;
  timeprecision 1ps;

  trim_t extra_ps;
  logic  a_minus, a_plus;
  logic  rx_in_n;

  assign rx_in_n = ~rx_in;

  // (n - 0.5)T in jitter-test mode; n = 0 is treated as n = 1.
  always_comb begin
    if (jitter_test && jitter_n > 4'd1) extra_ps = trim_t'(int'(jitter_n) * T - T / 2);
    else if (jitter_test)               extra_ps = trim_t'(T / 2);
    else                                extra_ps = '0;
  end

  pwm_transmitter #(.DT(DT)) u_tx (
    .carrier_clk(carrier_clk),
    .rst_n      (rst_n),
    .mode_1bit  (mode_1bit),
    .tx_data    (tx_data),
    .tx_out     (tx_out)
  );

  pwm_receiver #(.T(T), .DT(DT)) u_rx (
    .rst_n        (rst_n),
    .rx_in        (rx_in),
    .extra_ps     (extra_ps),
    .trim_ps      (rx_trim_ps),
    .thermo       (rx_thermo),
    .rx_data      (rx_data),
    .rx_code_valid(rx_code_valid)
  );

  pwm_aux_receiver #(.T(T), .DT(DT)) u_aux (
    .rst_n  (rst_n),
    .rx_in  (rx_in),
    .a_minus(a_minus),
    .a_plus (a_plus)
  );

  // The 1-bit decision is the middle latch; it is registered inside the ECC.
  assign rx_bit_raw = rx_thermo[THERMO_W/2];

  pwm_ecc u_ecc (
    .clk         (rx_in),
    .rst_n       (rst_n),
    .rx_bit      (rx_bit_raw),
    .a_minus     (a_minus),
    .a_plus      (a_plus),
    .rx_corrected(rx_bit_corrected),
    .error_code  (ecc_error)
  );

  // The same two latches, read on their own, form the falling-edge-only
  // receiver (M- = A-, M+ = A+).
  pwm_edge_only_decoder u_edge (
    .clk    (rx_in),
    .rst_n  (rst_n),
    .m_minus(a_minus),
    .m_plus (a_plus),
    .rx_bit (rx_bit_edge_only)
  );

  pwm_jitter_cdf_counter #(.N_TAPS(THERMO_W), .WINDOW(CDF_WINDOW)) u_cdf (
    .clk   (rx_in_n),
    .rst_n (rst_n),
    .start (cdf_start),
    .sample(rx_thermo),
    .count (cdf_count),
    .busy  (cdf_busy),
    .done  (cdf_done)
  );
endmodule
