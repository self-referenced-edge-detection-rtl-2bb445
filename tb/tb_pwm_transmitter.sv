// tb_pwm_transmitter: random symbols in 2-bit and then (after a reset)
// 1-bit mode at
// T = 500 ps, dT = 25 ps. Every output pulse must rise 3dT after the carrier
// edge that sampled its symbol and be 0.5T + (2s - 3)dT wide; one pulse per
// carrier cycle.
module tb_pwm_transmitter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 500, DT = 25;

  logic       clk = 1'b0, rst_n = 1'b1, mode = 1'b0;
  logic [1:0] tx = '0, sym_q[$];
  logic       tx_out;
  longint     t_edge, t_rise;
  int         checks = 0, failures = 0, pulses = 0;
  int         seen [4] = '{0, 0, 0, 0};

  pwm_transmitter dut (.carrier_clk(clk), .rst_n(rst_n), .mode_1bit(mode),
                       .tx_data(tx), .tx_out(tx_out));

  always #(T / 2) clk = ~clk;

  // The symbol of the pulse that starts 3dT after this edge; the mode is read
  // a little later, as it may change just after the edge.
  always @(posedge clk) begin
    logic [1:0] tx_s;
    logic       rst_s;
    t_edge = $time;
    tx_s   = tx;
    rst_s  = rst_n;
    #20;
    sym_q.push_back(!rst_s ? (mode ? 2'b01 : 2'b00) : mode ? (tx_s[0] ? 2'b10 : 2'b01) : tx_s);
  end

  always @(posedge tx_out) begin
    t_rise = $time;
    checks++;
    if (t_rise - t_edge != 3 * DT && $time > 10) begin
      failures++;
      $display("FAIL: rise %0t after the carrier edge", t_rise - t_edge);
    end
  end

  always @(negedge tx_out) begin
    logic [1:0] s;
    int width;
    s = sym_q.pop_front();
    width = T / 2 + (2 * int'(s) - 3) * DT;
    pulses++;
    seen[s]++;
    checks++;
    if ($time - t_rise != width && $time > 10) begin
      failures++;
      $display("FAIL: symbol %0d width %0t expected %0d", s, $time - t_rise, width);
    end
  end

  // a falling edge on rst_n, so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      tx = 2'($urandom);
      if (i == 300) begin
        // the mode is changed under reset, just after a carrier edge, while
        // every selector input is low
        @(posedge clk) #10 rst_n = 1'b0;
        @(posedge clk) #10 mode = 1'b1;
        @(negedge clk) rst_n = 1'b1;
      end
    end
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (pulses < 600 || seen[0] == 0 || seen[3] == 0) begin
      failures++;
      $display("FAIL: %0d pulses", pulses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
