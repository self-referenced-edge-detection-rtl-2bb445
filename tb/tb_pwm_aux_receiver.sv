// tb_pwm_aux_receiver: the testbench sends 1-bit PWM (falling edge at
// 0.5T -/+ dT, plus up to +/-8 ps of random error) and, 0.5T + 2dT + 15 ps
// into each pulse, checks A- A+ against the transition from the previous bit
// to this one: 0 -> 1 gives 00, no change 01, 1 -> 0 gives 11.
module tb_pwm_aux_receiver;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 500, DT = 25;

  logic rst_n = 1'b1, rx = 1'b0, am, ap;
  int   checks = 0, failures = 0;
  int   seen [4] = '{0, 0, 0, 0};

  pwm_aux_receiver dut (.rst_n(rst_n), .rx_in(rx), .a_minus(am), .a_plus(ap));

  // a falling edge on rst_n, so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic b_prev = 1'b0;
    #100 rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      logic b;
      int   w;
      b = 1'($urandom);
      w = T / 2 + (b ? DT : -DT) + int'($urandom % 17) - 8;
      // 0.5T + 2dT + 15 ps into the pulse the pair (b_prev, b) has settled
      rx = 1'b1;
      #(w) rx = 1'b0;
      #(T / 2 + 2 * DT + 15 - w);
      if (i >= 1) begin
        logic [1:0] exp_a;
        exp_a = (!b_prev && b) ? 2'b00 : (b_prev && !b) ? 2'b11 : 2'b01;
        checks++;
        seen[exp_a]++;
        if ({am, ap} !== exp_a) begin
          failures++;
          $display("FAIL: bits %b%b gave A-A+ = %b%b", b_prev, b, am, ap);
        end
      end
      #(T / 2 - 2 * DT - 15);
      b_prev  = b;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[3] == 0) begin
      failures++;
      $display("FAIL: transitions seen %0d %0d %0d", seen[0], seen[1], seen[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
