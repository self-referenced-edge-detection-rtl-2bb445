// pwm_receiver: main self-referenced PWM receiver (intra-cycle detection).
//
// Contains behavioural delay models, so it is a simulation model as a whole;
// the latches, the decoder and the output register are synthesizable logic.
//
// The received signal feeds three delay lines of 0.5T - 2dT, 0.5T and
// 0.5T + 2dT. Each delayed rising edge clocks a latch whose data input is the
// received signal itself, so latch i reads 1 when the falling edge of the same
// pulse is later than its delay. No sampling clock or PLL is needed: the
// pulse's own rising edge is the time reference. The three latch outputs are a
// thermometer code; the decoder turns them into the 2-bit symbol, which is
// registered on the next rising edge of the received signal (this register is
// this design's choice; it gives a glitch-free output once per cycle).
//
// Jitter test and calibration: extra_ps is added to all three lines (the
// top sets it to (n - 0.5)T so that the latches compare edges n cycles
// apart), and trim_ps[i] adds to line i alone.
//
// Timing: thermo is final 0.5T + 2dT after a rising edge; rx_data for a
// pulse is valid after the following rising edge. thermo[1] alone is the
// 1-bit PWM decision.
//
// rx_in is both the latches' data and, delayed, their clock: that is the
// self-referenced principle, so lint's note that rx_in is flopped both
// synchronously and asynchronously is expected.
module pwm_receiver
  import pwm_pkg::*;
#(
  parameter int unsigned T  = T_PS,
  parameter int unsigned DT = DT_PS
) (
  input  logic                   rst_n,
  input  logic                   rx_in,
  input  trim_t                  extra_ps,
  input  trim_t [THERMO_W-1:0]   trim_ps,
  output thermo_t                thermo,
  output symbol_t                rx_data,
  output logic                   rx_code_valid
);
  timeunit 1ps;
  timeprecision 1ps;

  thermo_t clk_dly;
  symbol_t bin;
  logic    bin_valid;

  for (genvar i = 0; i < THERMO_W; i++) begin : g_cmp
    // 0.5T + (2i - (THERMO_W - 1)) dT
    localparam int unsigned DLY = T / 2 + 2 * i * DT - (THERMO_W - 1) * DT;

    pwm_delay_line #(.DELAY_PS(DLY)) u_dly (
      .din    (rx_in),
      .trim_ps(trim_t'(extra_ps + trim_ps[i])),
      .dout   (clk_dly[i])
    );

    pwm_edge_latch u_latch (
      .clk_dly(clk_dly[i]),
      .rst_n  (rst_n),
      .d      (rx_in),
      .q      (thermo[i])
    );
  end

  pwm_thermo_decoder u_dec (
    .thermo(thermo),
    .bin   (bin),
    .valid (bin_valid)
  );

  always_ff @(posedge rx_in or negedge rst_n) begin
    if (!rst_n) begin
      rx_data       <= '0;
      rx_code_valid <= 1'b0;
    end else begin
      rx_data       <= bin;
      rx_code_valid <= bin_valid;
    end
  end
endmodule
