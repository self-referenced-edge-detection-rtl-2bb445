// pwm_ecc: error check and correction for 1-bit PWM.
//
// Inputs per received bit: the bit of the main (intra-cycle) receiver and the
// two auxiliary (inter-cycle) latches A- and A+, which compare each falling
// edge with the previous one delayed by 1T -/+ dT. Their pair tells what the
// last transition was: 00 = 0 -> 1 (edge later by 2dT), 01 = no change,
// 11 = 1 -> 0 (edge earlier), 10 cannot occur.
//
// Pipeline, one step per rising edge of clk:
//   stage 1:  D2 <= raw bit, and A-/A+ are registered beside it
//   check:    error = TABLE[A-A+][D1 D2]   (D1 = previous corrected bit)
//   stage 2:  D1 <= error ? ~D2 : D2       (D1 is the corrected output)
// The error table and the two-register structure with the inverting selector
// follow the published circuit. Registering A-/A+ beside the raw bit is this
// design's choice: the auxiliary latches settle in the same carrier cycle as
// the main latch, so without it they would be compared one bit late.
// A single wrong bit between two good ones is corrected; two wrong bits in a
// row are not, as only adjacent edges are compared.
//
// Timing: the corrected bit for the raw bit taken at edge k appears after
// edge k+1. rst_n clears everything asynchronously.
module pwm_ecc (
  input  logic clk,
  input  logic rst_n,
  input  logic rx_bit,        // original RX bit, before ECC
  input  logic a_minus,       // auxiliary latch with the 1T - dT line
  input  logic a_plus,        // auxiliary latch with the 1T + dT line
  output logic rx_corrected,  // D1
  output logic error_code
);
  timeunit 1ps;
  timeprecision 1ps;

  logic       d2;
  logic [1:0] a_reg;   // {A-, A+}

  // Error table: 1 = the received pair D1 D2 disagrees with A- A+.
  always_comb begin
    unique case ({a_reg, rx_corrected, d2})
      4'b00_00: error_code = 1'b1;
      4'b00_01: error_code = 1'b0;
      4'b00_11: error_code = 1'b1;
      4'b00_10: error_code = 1'b1;
      4'b01_00: error_code = 1'b0;
      4'b01_01: error_code = 1'b1;
      4'b01_11: error_code = 1'b0;
      4'b01_10: error_code = 1'b1;
      4'b10_00: error_code = 1'b1;
      4'b10_01: error_code = 1'b1;
      4'b10_11: error_code = 1'b1;
      4'b10_10: error_code = 1'b1;
      4'b11_00: error_code = 1'b1;
      4'b11_01: error_code = 1'b1;
      4'b11_11: error_code = 1'b1;
      4'b11_10: error_code = 1'b0;
      default:  error_code = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d2           <= 1'b0;
      a_reg        <= 2'b01;
      rx_corrected <= 1'b0;
    end else begin
      d2           <= rx_bit;
      a_reg        <= {a_minus, a_plus};
      rx_corrected <= error_code ? ~d2 : d2;
    end
  end
endmodule
