// tb_pwm_jitter_cdf_counter: random samples with different densities per tap
// over a window of 300 cycles (and a second window of 300 to check the
// restart). Counts must match a software count, busy must last exactly
// WINDOW cycles and done must follow.
module tb_pwm_jitter_cdf_counter;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned W = 300;
  localparam int unsigned CW = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic [2:0] sample = '0;
  logic [2:0][CW-1:0] count;
  logic busy, done;
  int   checks = 0, failures = 0;

  pwm_jitter_cdf_counter #(.N_TAPS(3), .WINDOW(W)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .sample(sample),
    .count(count), .busy(busy), .done(done));

  always #250 clk = ~clk;

  // a falling edge on rst_n, so the asynchronous reset really fires
  initial #1 rst_n = 1'b0;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #600 rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      int ref_cnt [3];
      int busy_cycles;
      ref_cnt = '{0, 0, 0};
      busy_cycles = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (busy) begin
        sample[0] = ($urandom % 10) < 1;
        sample[1] = ($urandom % 10) < 5;
        sample[2] = ($urandom % 10) < 9;
        for (int i = 0; i < 3; i++) ref_cnt[i] += int'(sample[i]);
        @(negedge clk);
        busy_cycles++;
        if (busy_cycles > 2 * W) break;
      end
      checks++;
      if (busy_cycles != W || !done) begin
        failures++;
        $display("FAIL: busy for %0d cycles, done=%b", busy_cycles, done);
      end
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (int'(count[i]) != ref_cnt[i]) begin
          failures++;
          $display("FAIL: tap %0d count %0d expected %0d", i, count[i], ref_cnt[i]);
        end
      end
      repeat (5) begin
        sample = '1;
        @(negedge clk);
      end
      checks++;
      if (int'(count[2]) != ref_cnt[2]) begin failures++; $display("FAIL: counted after the window"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
