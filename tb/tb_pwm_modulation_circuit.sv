// tb_pwm_modulation_circuit: random symbols in both modes. After each rising
// carrier edge sel must equal the symbol sampled at that edge (2-bit mode) or
// 01/10 for bit 0/1 (1-bit mode); reset must send the zero of the mode
// (00, or 01 in 1-bit mode).
module tb_pwm_modulation_circuit;
  timeunit 1ps;
  timeprecision 1ps;

  logic       clk = 1'b0, rst_n = 1'b1, mode = 1'b0;
  logic [1:0] tx = '0, sel, expected;
  int         checks = 0, failures = 0;

  pwm_modulation_circuit dut (.carrier_clk(clk), .rst_n(rst_n), .mode_1bit(mode),
                              .tx_data(tx), .sel(sel));

  always #250 clk = ~clk;

  // a falling edge on rst_n, so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tx = 2'b11;
    #10;
    checks++;
    if (sel !== 2'b00) begin failures++; $display("FAIL: reset"); end
    mode = 1'b1;
    #1;
    checks++;
    if (sel !== 2'b01) begin failures++; $display("FAIL: reset in 1-bit mode"); end
    mode = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      tx   = 2'($urandom);
      mode = (i >= 200);
      expected = mode ? (tx[0] ? 2'b10 : 2'b01) : tx;
      @(posedge clk);
      #1;
      checks++;
      if (sel !== expected) begin
        failures++;
        $display("FAIL: mode=%b tx=%b sel=%b", mode, tx, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
