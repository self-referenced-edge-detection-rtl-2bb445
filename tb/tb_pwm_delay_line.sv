// tb_pwm_delay_line: checks the transport delay of the delay-element model.
//
// Pulses of random width (some shorter than the delay) are sent through a
// 100 ps line with random trims; every output edge must come exactly
// DELAY + trim after the matching input edge, and no edge may be lost.
module tb_pwm_delay_line;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned DLY = 100;

  logic          din = 1'b0;
  logic [15:0]   trim = '0;
  logic          dout;
  int            checks = 0, failures = 0;
  longint        exp_t[$];
  logic          exp_v[$];

  pwm_delay_line #(.DELAY_PS(DLY)) dut (.din(din), .trim_ps(trim), .dout(dout));

  always @(din) if ($time > 0) begin
    exp_t.push_back($time + DLY + trim);
    exp_v.push_back(din);
  end

  always @(dout) if ($time > 0) begin
    checks++;
    if (exp_t.size() == 0) begin
      failures++;
      $display("FAIL: unexpected edge at %0t", $time);
    end else begin
      longint t;
      logic   v;
      t = exp_t.pop_front();
      v = exp_v.pop_front();
      if (t != $time || v != dout) begin
        failures++;
        $display("FAIL: edge %b at %0t, expected %b at %0t", dout, $time, v, t);
      end
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
    #50;
    for (int i = 0; i < 200; i++) begin
      if (i % 20 == 0) trim = 16'(($urandom % 4) * 10);  // change only while idle
      #(10 + $urandom % 150) din = 1'b1;
      #(10 + $urandom % 150) din = 1'b0;
      if (i % 20 == 19) #400;
    end
    #500;
    checks++;
    if (exp_t.size() != 0) begin
      failures++;
      $display("FAIL: %0d edges never came out", exp_t.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
