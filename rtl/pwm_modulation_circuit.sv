// pwm_modulation_circuit: sets the transmitter's selector from the TX symbol.
//
// One symbol is taken per carrier cycle, on the rising carrier edge. At that
// moment the previous pulse and all its delayed copies are low (the latest
// copy falls at 0.5T + 3dT) and the next pulse has not started (it rises 3dT
// after the edge), so the selector changes only while every selector input is
// low and the OR output cannot glitch.
//
// 2-bit mode: symbol s selects the tap delayed by 2*s*dT (00 -> 0, 01 -> 2dT,
// 10 -> 4dT, 11 -> 6dT), the order of falling edges in the 2-bit PWM signal.
// 1-bit mode (mode_1bit = 1): bit 0 of tx_data is sent as symbol 01 (bit 0) or
// 10 (bit 1), i.e. pulse widths 0.5T - dT and 0.5T + dT, which the middle
// (0.5T) receiver latch tells apart. This mapping is this design's choice.
//
// The symbol is registered as given and mapped after the register, so during
// reset the link carries the "zero" of the selected mode (00, or 01 in 1-bit
// mode); the ECC of the receiver relies on starting from a run of zeros.
// mode_1bit is meant to change only while rst_n is low.
//
// Interface: carrier_clk, rst_n (asynchronous), tx_data, mode_1bit; sel is
// valid from the carrier edge on which tx_data was sampled.
module pwm_modulation_circuit
  import pwm_pkg::*;
(
  input  logic    carrier_clk,
  input  logic    rst_n,
  input  logic    mode_1bit,
  input  symbol_t tx_data,
  output symbol_t sel
);
  timeunit 1ps;
  timeprecision 1ps;

  symbol_t data_q;

  always_ff @(posedge carrier_clk or negedge rst_n) begin
    if (!rst_n) data_q <= '0;
    else        data_q <= tx_data;
  end

  always_comb begin
    if (mode_1bit) sel = data_q[0] ? symbol_t'(2) : symbol_t'(1);
    else           sel = data_q;
  end
endmodule
