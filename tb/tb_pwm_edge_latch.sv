// tb_pwm_edge_latch: the comparator must hold the data value present at each
// rising edge of its clock, ignore data changes between edges, and clear on
// reset.
module tb_pwm_edge_latch;
  timeunit 1ps;
  timeprecision 1ps;

  logic clk = 1'b0, rst_n = 1'b1, d = 1'b1, q;
  logic held;
  int   checks = 0, failures = 0;

  pwm_edge_latch dut (.clk_dly(clk), .rst_n(rst_n), .d(d), .q(q));

  // a falling edge on rst_n, so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5 clk = 1'b1; #5 clk = 1'b0;
    checks++;
    if (q !== 1'b0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      d = 1'($urandom);
      #7 clk = 1'b1;
      held = d;
      #3;
      d = ~d;          // data moves while the clock is high
      #5;
      checks++;
      if (q !== held) begin failures++; $display("FAIL: q=%b expected %b", q, held); end
      clk = 1'b0;
      #3 d = 1'($urandom);
      #2;
      checks++;
      if (q !== held) begin failures++; $display("FAIL: changed while clock low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
