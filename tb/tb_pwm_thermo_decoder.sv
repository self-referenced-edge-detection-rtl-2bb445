// tb_pwm_thermo_decoder: exhaustive check of the thermometer decoder. The
// expected symbol is the number of ones; a code is valid only if it is one of
// 000, 001, 011, 111.
module tb_pwm_thermo_decoder;
  timeunit 1ps;
  timeprecision 1ps;

  logic [2:0] thermo;
  logic [1:0] bin;
  logic       valid;
  int         checks = 0, failures = 0;

  pwm_thermo_decoder dut (.thermo(thermo), .bin(bin), .valid(valid));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      int ones;
      bit ok;
      thermo = 3'(c);
      #1;
      ones = (c & 1) + ((c >> 1) & 1) + ((c >> 2) & 1);
      ok   = (c == 0 || c == 1 || c == 3 || c == 7);
      checks += 2;
      if (bin !== 2'(ones)) begin
        failures++;
        $display("FAIL: %b -> %0d", thermo, bin);
      end
      if (valid !== ok) begin
        failures++;
        $display("FAIL: %b valid=%b", thermo, valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
