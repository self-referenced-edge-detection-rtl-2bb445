// pwm_edge_latch: the timing comparator of the self-referenced receiver.
//
// The received signal `d` is sampled on the rising edge of `clk_dly`, a delayed
// copy of the received signal (or of its inverse). The result says which came
// first: the delayed rising edge (q = 1 when the pulse is still high) or the
// edge being measured. The comparator is built here as an edge-triggered
// sampler, the usual reading of a latch used as a time comparator; a
// transparent latch would follow the data for as long as its clock is high.
// rst_n sets it asynchronously to RESET_VALUE (0 unless the instance needs
// another start value, see the auxiliary receiver).
module pwm_edge_latch #(
  parameter bit RESET_VALUE = 1'b0
) (
  input  logic clk_dly,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk_dly or negedge rst_n) begin
    if (!rst_n) q <= RESET_VALUE;
    else        q <= d;
  end
endmodule
