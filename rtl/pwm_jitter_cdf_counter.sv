// pwm_jitter_cdf_counter: counts latch outcomes for the jitter measurement.
//
// In jitter-test mode each receiver latch compares a carrier edge with the
// edge n cycles earlier delayed by nT - 2dT, nT or nT + 2dT. The fraction of
// cycles in which a latch reads 1 is the cumulative distribution of the
// n-cycle timing error at that offset; three latches give three points of the
// CDF. A narrow CDF (outer latches always 0 and 1) means small jitter and room
// for a smaller dT or a faster carrier. The counting window is this design's
// choice; only the CDF itself is specified.
//
// Interface: a pulse on `start` (sampled on clk) clears the counts and runs a
// window of WINDOW clk cycles; `busy` is high during it. count[i] then holds
// the number of cycles in which sample[i] was 1, and `done` stays high until
// the next start. rst_n clears everything asynchronously.
module pwm_jitter_cdf_counter #(
  parameter int unsigned N_TAPS = pwm_pkg::THERMO_W,
  parameter int unsigned WINDOW = 1024,
  localparam int unsigned CNT_W = $clog2(WINDOW + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [N_TAPS-1:0]          sample,
  output logic [N_TAPS-1:0][CNT_W-1:0] count,
  output logic                       busy,
  output logic                       done
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [CNT_W-1:0] remaining;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count     <= '0;
      remaining <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
    end else if (start) begin
      count     <= '0;
      remaining <= CNT_W'(WINDOW);
      busy      <= 1'b1;
      done      <= 1'b0;
    end else if (busy) begin
      for (int i = 0; i < N_TAPS; i++)
        count[i] <= count[i] + CNT_W'(sample[i]);
      remaining <= remaining - 1'b1;
      if (remaining == CNT_W'(1)) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end
endmodule
