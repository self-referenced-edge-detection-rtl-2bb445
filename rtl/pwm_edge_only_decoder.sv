// pwm_edge_only_decoder: logic circuit of the falling-edge-only 1-bit receiver.
//
// In this receiver topology only one kind of edge is used. Two latches compare
// each falling edge with the previous one delayed by 1T - dT and 1T + dT
// (pwm_aux_receiver is exactly that front end), giving M- M+:
//   00  the edge came 2dT late   -> the bit went 0 -> 1, current bit = 1
//   11  the edge came 2dT early  -> the bit went 1 -> 0, current bit = 0
//   01  spacing of one period    -> current bit = previous bit
//   10  cannot occur; treated here like 01 (bit kept)
// so the data are rebuilt from the accumulated period, like timing jitter from
// accumulated period jitter. The rule for 00/11/01 follows the published
// example sequence; the handling of 10 is this design's choice.
//
// A wrong pair makes every later bit wrong until a transition with the
// opposite sense: the decoder is differential and has no absolute reference.
// After reset the previous bit is 0, so the link must start with zeros.
//
// Interface: one step per rising edge of clk (the received signal); the pair
// must be stable around that edge. rx_bit is the decoded bit; it is valid
// after the edge that follows the pair's update.
module pwm_edge_only_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic m_minus,
  input  logic m_plus,
  output logic rx_bit
);
  timeunit 1ps;
  timeprecision 1ps;

  logic next_bit;

  always_comb begin
    unique case ({m_minus, m_plus})
      2'b00:   next_bit = 1'b1;
      2'b11:   next_bit = 1'b0;
      default: next_bit = rx_bit;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rx_bit <= 1'b0;
    else        rx_bit <= next_bit;
  end
endmodule
