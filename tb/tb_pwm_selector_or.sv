// tb_pwm_selector_or: exhaustive check of the selector and OR gate against
// out = taps[0] | taps[sel].
module tb_pwm_selector_or;
  timeunit 1ps;
  timeprecision 1ps;

  logic [3:0] taps;
  logic [1:0] sel;
  logic       out;
  int         checks = 0, failures = 0;

  pwm_selector_or dut (.taps(taps), .sel(sel), .pwm_out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 16; t++) begin
      for (int s = 0; s < 4; s++) begin
        logic expected;
        taps = 4'(t);
        sel  = 2'(s);
        #1;
        expected = ((t >> 0) & 1) == 1 || ((t >> s) & 1) == 1;
        checks++;
        if (out !== expected) begin
          failures++;
          $display("FAIL: taps=%b sel=%0d out=%b", taps, sel, out);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
