// tb_pwm_duty_control: checks that the duty controller narrows the carrier's
// high phase by 3dT (75 ps of a 250 ps high phase at T = 500 ps): the output
// rises 75 ps after each carrier rising edge and falls with its falling edge.
module tb_pwm_duty_control;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned T = 500;
  localparam int unsigned SHRINK = 75;

  logic   clk = 1'b0;
  logic   pulse;
  int     checks = 0, failures = 0, rises = 0, falls = 0;
  longint t_clk_rise, t_rise;

  pwm_duty_control #(.SHRINK_PS(SHRINK)) dut (.clk_in(clk), .pulse_out(pulse));

  always @(posedge clk) t_clk_rise = $time;

  always @(posedge pulse) begin
    t_rise = $time;
    rises++;
    checks++;
    if ($time - t_clk_rise != SHRINK) begin
      failures++;
      $display("FAIL: rise %0t ps after the carrier edge", $time - t_clk_rise);
    end
  end

  always @(negedge pulse) begin
    falls++;
    checks++;
    if ($time - t_rise != T / 2 - SHRINK || clk) begin
      failures++;
      $display("FAIL: width %0t ps", $time - t_rise);
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    repeat (50) begin
      clk = 1'b1; #(T / 2);
      clk = 1'b0; #(T / 2);
    end
    checks += 2;
    if (pulse !== 1'b0) failures++;
    if (rises != 50 || falls != 50) begin
      failures++;
      $display("FAIL: %0d rising and %0d falling edges for 50 carrier cycles", rises, falls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
