// tb_pwm_edge_only_decoder: cycle-level test of the falling-edge-only decoder.
// A random bit stream is turned into M- M+ pairs (00 rise, 01 no change,
// 11 fall) and presented one per clock; the decoder must rebuild the stream.
// The example sequence 0, 1, 1, 0, 0 with pairs 00, 01, 11, 01 runs first.
// A final wrong pair must make the output wrong, showing the decoder is
// differential.
module tb_pwm_edge_only_decoder;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b1, mm = 1'b0, mp = 1'b1, rx_bit;
  int   checks = 0, failures = 0;

  pwm_edge_only_decoder dut (.clk(clk), .rst_n(rst_n), .m_minus(mm), .m_plus(mp),
                             .rx_bit(rx_bit));

  initial #1 rst_n = 1'b0;

  task automatic step(logic prev, logic cur);
    {mm, mp} = (!prev && cur) ? 2'b00 : (prev && !cur) ? 2'b11 : 2'b01;
    #5 clk = 1'b1;
    #5 clk = 1'b0;
    checks++;
    if (rx_bit !== cur) begin
      failures++;
      $display("FAIL: %b -> %b decoded as %b", prev, cur, rx_bit);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev, cur;
    #10 rst_n = 1'b1;
    step(1'b0, 1'b0);
    step(1'b0, 1'b1);
    step(1'b1, 1'b1);
    step(1'b1, 1'b0);
    step(1'b0, 1'b0);
    prev = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      cur = 1'($urandom);
      step(prev, cur);
      prev = cur;
    end
    // a "rise" reported while the bit stays 1 keeps the output at 1; a
    // "fall" reported for a steady 0 stream flips the output for good
    {mm, mp} = 2'b10;
    #5 clk = 1'b1;
    #5 clk = 1'b0;
    checks++;
    if (rx_bit !== prev) begin failures++; $display("FAIL: pair 10 changed the bit"); end
    {mm, mp} = prev ? 2'b11 : 2'b00;
    #5 clk = 1'b1;
    #5 clk = 1'b0;
    {mm, mp} = 2'b01;
    repeat (3) begin
      #5 clk = 1'b1;
      #5 clk = 1'b0;
      checks++;
      if (rx_bit !== ~prev) begin failures++; $display("FAIL: error did not persist"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
