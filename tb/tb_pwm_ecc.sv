// tb_pwm_ecc: cycle-level test of the error check and correction.
//
// A random bit stream b is generated. At clock edge k the testbench presents
// the main receiver's bit (b[k], or its inverse for an injected error) and the
// auxiliary pair for the transition b[k-1] -> b[k] (00 rise, 01 no change,
// 11 fall). Errors are injected at random, at least four bits apart.
// After edge k+1 the corrected output must equal b[k]. The error flag is also
// held against the rule "the pair D1 D2 does not match the transition shown
// by A- A+", written out independently of the table in the design.
module tb_pwm_ecc;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 2000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic rx_bit = 1'b0, am = 1'b0, ap = 1'b1;
  logic corr, err;
  logic b [0:N];
  int   checks = 0, failures = 0, injected = 0, flagged = 0;

  pwm_ecc dut (.clk(clk), .rst_n(rst_n), .rx_bit(rx_bit), .a_minus(am),
               .a_plus(ap), .rx_corrected(corr), .error_code(err));

  function automatic logic [1:0] aux_pair(logic prev, logic cur);
    if (!prev && cur) return 2'b00;
    if (prev && !cur) return 2'b11;
    return 2'b01;
  endfunction

  // Independent form of the error rule.
  function automatic logic expect_err(logic [1:0] a, logic d1, logic d2);
    case (a)
      2'b00:   return !(d1 == 1'b0 && d2 == 1'b1);
      2'b01:   return d1 != d2;
      2'b11:   return !(d1 == 1'b1 && d2 == 1'b0);
      default: return 1'b1;
    endcase
  endfunction

  // a falling edge on rst_n, so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last_inj = -10;
    b[0] = 1'b0;
    for (int k = 1; k <= N; k++) b[k] = 1'($urandom);
    #20 rst_n = 1'b1;
    for (int k = 1; k < N; k++) begin
      logic [1:0] a;
      bit inject;
      inject = (k - last_inj > 4) && (k < N - 20) && ($urandom % 6 == 0);
      if (inject) begin last_inj = k; injected++; end
      a      = aux_pair(b[k-1], b[k]);
      rx_bit = inject ? ~b[k] : b[k];
      {am, ap} = a;
      #5 clk = 1'b1;
      #5 clk = 1'b0;
      // edge k done: error flag now judges D1 = corrected b[k-1], D2 = raw k
      checks++;
      if (err !== expect_err(dut.a_reg, corr, dut.d2)) begin
        failures++;
        $display("FAIL: error flag %b at bit %0d", err, k);
      end
      if (err) flagged++;
      if (k >= 2) begin
        checks++;
        if (corr !== b[k-1]) begin
          failures++;
          $display("FAIL: corrected bit %0d = %b, sent %b", k - 1, corr, b[k-1]);
        end
      end
    end
    checks++;
    if (injected == 0 || flagged != injected) begin
      failures++;
      $display("FAIL: %0d errors injected, %0d flagged", injected, flagged);
    end
    $display("injected=%0d flagged=%0d", injected, flagged);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
