// tb_pwm_receiver: the testbench generates 2-bit PWM pulses itself (period
// 500 ps, falling edge at 0.5T + (2s - 3)dT with up to +/-15 ps of random
// timing error, less than the dT margin) and checks the thermometer code
// and the registered symbol. It then sets a trim on one line and checks that
// the decision moves as a delay-line shift predicts (a bubble code and a
// wrong symbol), and that the (n - 0.5)T extra delay makes the latches
// compare the next cycle's rising edge.
module tb_pwm_receiver;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 500, DT = 25;

  logic        rst_n = 1'b1, rx = 1'b0;
  logic [15:0] extra = '0;
  logic [2:0][15:0] trim = '0;
  logic [2:0]  thermo;
  logic [1:0]  rx_data;
  logic        valid;
  int          checks = 0, failures = 0;

  pwm_receiver dut (.rst_n(rst_n), .rx_in(rx), .extra_ps(extra), .trim_ps(trim),
                    .thermo(thermo), .rx_data(rx_data), .rx_code_valid(valid));

  // One pulse: rise now, fall after `width`, period T.
  task automatic pulse(int width);
    rx = 1'b1;
    #(width) rx = 1'b0;
    #(T - width);
  endtask

  // a falling edge on rst_n, so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] prev = '0;
    #100 rst_n = 1'b1;
    #100;
    pulse(T / 2 - 3 * DT);
    for (int i = 0; i < 400; i++) begin
      logic [1:0] s;
      int err;
      s = 2'($urandom);
      err = int'($urandom % 31) - 15;
      fork
        pulse(T / 2 + (2 * int'(s) - 3) * DT + err);
        begin
          // the rising edge has just registered the previous pulse's decision
          #1;
          checks++;
          if (rx_data !== prev || valid !== 1'b1) begin
            failures++;
            $display("FAIL: pulse %0d: rx_data=%0d expected %0d", i, rx_data, prev);
          end
          #(T / 2 + 2 * DT + 9);
          checks++;
          if (thermo !== 3'((1 << s) - 1)) begin
            failures++;
            $display("FAIL: symbol %0d thermo %b", s, thermo);
          end
        end
      join
      prev = s;
    end
    // trim line 0 by +4dT: it now samples at 0.5T + 2dT; symbol 10 falls at
    // 0.5T + dT, so the code is 010 (bubble, invalid) and the count is 1
    trim[0] = 16'(4 * DT);
    pulse(T / 2 + DT);
    pulse(T / 2 + DT);
    #1;
    checks += 2;
    if (thermo !== 3'b010) begin failures++; $display("FAIL: trimmed thermo %b", thermo); end
    if (valid !== 1'b0 || rx_data !== 2'd1) begin
      failures++;
      $display("FAIL: trimmed decision %0d valid %b", rx_data, valid);
    end
    trim = '0;
    pulse(T / 2 + DT);
    pulse(T / 2 + DT);
    // extra (n - 0.5)T with n = 1: latches sample the next pulse at
    // T - 2dT, T and T + 2dT after a rising edge. Shift every rising edge
    // 10 ps early: only the last two latches see the next pulse high.
    extra = 16'(T / 2);
    repeat (4) pulse(T / 2 - 3 * DT);
    repeat (6) begin
      rx = 1'b1;
      #(T / 2) rx = 1'b0;
      #(T / 2 - 10);
    end
    checks++;
    if (thermo !== 3'b110) begin failures++; $display("FAIL: jitter-test code %b", thermo); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
