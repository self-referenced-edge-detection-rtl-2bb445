// tb_pwm_transceiver: end-to-end test of the PWM transceiver at its default
// parameters (T = 500 ps, dT = 25 ps, 1024-cycle CDF window).
//
// The testbench supplies the carrier clock (with random period jitter in the
// low phase) and the channel: a 10 ps transport delay that can hold back the
// rising edge of chosen pulses, the kind of timing error that makes the main
// receiver misread a pulse while the falling-edge spacing stays intact.
//
// Phases:
//   1. 2-bit PWM, PRBS7 symbols, +/-10 ps jitter: every decoded symbol must
//      equal the symbol sent one pulse earlier.
//   2. Calibration trim: line 0 is lengthened by 4dT; symbol 10 must now give
//      a bubble code (invalid) decoded as 01.
//   3. Jitter test, n = 1, jitter +/-30 ps (< 2dT): the latches at T - 2dT
//      and T + 2dT must read all 0 and all 1, the middle one in between.
//   4. Jitter test, n = 2, jitter +/-60 ps per cycle: the outer latches must
//      now see the spread (large-jitter case).
//   5. Reset, 1-bit PWM with ECC: isolated '1' pulses are sent with a
//      rising edge 2dT late. The raw bit must be wrong exactly for those, the
//      ECC must flag each of them and the corrected bit must always be right.
//      The falling-edge-only decoder, blind to rising edges, must be right
//      throughout.
// Each mechanism is counted and a failure is counted for one that never
// happened.
module tb_pwm_transceiver;
  timeunit 1ps;
  timeprecision 1ps;

  import pwm_pkg::*;

  localparam int T  = int'(T_PS);
  localparam int DT = int'(DT_PS);
  localparam int CH = 10;        // channel delay
  localparam int LATE = 2 * DT;  // injected rising-edge error
  localparam int WIN = 1024;
  localparam int CW = $clog2(WIN + 1);

  logic               clk = 1'b0, rst_n = 1'b1, mode = 1'b0;
  logic [1:0]         tx = '0;
  logic               tx_out, rx = 1'b0;
  logic               jtest = 1'b0;
  logic [3:0]         jn = 4'd1;
  logic [2:0][15:0]   trim = '0;
  logic               cdf_start = 1'b0;
  logic [2:0]         thermo;
  logic [1:0]         rx_data;
  logic               code_valid, bit_raw, bit_corr, ecc_err, bit_edge;
  logic [2:0][CW-1:0] cdf_count;
  logic               cdf_busy, cdf_done;

  pwm_transceiver dut (
    .carrier_clk(clk), .rst_n(rst_n), .mode_1bit(mode), .tx_data(tx),
    .tx_out(tx_out), .rx_in(rx), .jitter_test(jtest), .jitter_n(jn),
    .rx_trim_ps(trim), .cdf_start(cdf_start), .rx_thermo(thermo),
    .rx_data(rx_data), .rx_code_valid(code_valid), .rx_bit_raw(bit_raw),
    .rx_bit_corrected(bit_corr), .ecc_error(ecc_err), .rx_bit_edge_only(bit_edge), .cdf_count(cdf_count),
    .cdf_busy(cdf_busy), .cdf_done(cdf_done));

  int checks = 0, failures = 0;
  // mechanism counters
  int sym_seen [4] = '{0, 0, 0, 0};
  int bubbles = 0, mode_switches = 0, raw_errors = 0, ecc_flags = 0;
  int cdf_narrow = 0, cdf_wide = 0, injected = 0, edge_only_ok = 0;

  // ---------------- carrier clock with period jitter ----------------
  int jit_amp = 10;
  initial begin
    #100;
    forever begin
      int j;
      j = 0;
      if (jit_amp > 0) begin
        j = 1 + int'($urandom % jit_amp);
        if ($urandom % 2 == 0) j = -j;
      end
      clk = 1'b1;
      #(T / 2);
      clk = 1'b0;
      #(T / 2 + j);
    end
  end

  // ---------------- channel ----------------
  logic inject_next = 1'b0, late_cur = 1'b0;
  always @(posedge tx_out) begin
    fork
      #(CH + (late_cur ? LATE : 0)) rx = 1'b1;
    join_none
  end
  always @(negedge tx_out) begin
    fork
      #(CH) rx = 1'b0;
    join_none
  end

  // ---------------- what was sent ----------------
  typedef struct packed { logic [1:0] sym; logic late; } sent_t;
  sent_t sent_q[$];
  always @(posedge clk) begin
    sent_t s;
    s.sym  = !rst_n ? (mode ? 2'b01 : 2'b00) : mode ? (tx[0] ? 2'b10 : 2'b01) : tx;
    s.late = inject_next && rst_n;
    late_cur = s.late;
    if (s.late) injected++;
    sent_q.push_back(s);
  end

  // ---------------- receiver checks, one per received pulse ----------------
  bit    check_2bit = 1'b0, check_1bit = 1'b0;
  int    since_reset = 0;
  sent_t p1, p2;       // the previous and the one before
  always @(posedge rx) begin
    sent_t cur;
    cur = sent_q.pop_front();
    #1;
    if (!rst_n) since_reset = 0;
    else        since_reset++;
    if (check_2bit && since_reset >= 3) begin
      checks++;
      if (rx_data !== p1.sym || code_valid !== 1'b1) begin
        failures++;
        $display("FAIL %0t: rx_data %0d valid %b, sent %0d", $time, rx_data, code_valid, p1.sym);
      end
      sym_seen[rx_data]++;
    end
    if (check_1bit && since_reset >= 4) begin
      if (bit_raw !== p1.sym[1]) raw_errors++;
      checks++;
      if ((bit_raw !== p1.sym[1]) != p1.late) begin
        failures++;
        $display("FAIL %0t: raw bit %b, sent %b, late %b", $time, bit_raw, p1.sym[1], p1.late);
      end
      if (ecc_err) ecc_flags++;
      checks++;
      if (ecc_err !== p1.late) begin
        failures++;
        $display("FAIL %0t: ecc flag %b for a pulse with late=%b", $time, ecc_err, p1.late);
      end
      checks++;
      if (bit_edge !== p1.sym[1]) begin
        failures++;
        $display("FAIL %0t: edge-only bit %b, sent %b", $time, bit_edge, p1.sym[1]);
      end
      else edge_only_ok++;
      checks++;
      if (bit_corr !== p2.sym[1]) begin
        failures++;
        $display("FAIL %0t: corrected bit %b, sent %b", $time, bit_corr, p2.sym[1]);
      end
    end
    p2 = p1;
    p1 = cur;
  end

  // ---------------- watchdog ----------------
  initial begin
    #20000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reset (and mode change) just after a carrier edge, while the transmitter's
  // selector inputs are all low.
  task automatic do_reset(logic new_mode);
    @(posedge clk) #10 rst_n = 1'b0;
    @(posedge clk) #10;
    if (mode != new_mode) mode_switches++;
    mode = new_mode;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  endtask

  task automatic run_cdf(output int c0, output int c1, output int c2);
    @(negedge clk) cdf_start = 1'b1;
    @(negedge clk) cdf_start = 1'b0;
    wait (cdf_done);
    c0 = int'(cdf_count[0]);
    c1 = int'(cdf_count[1]);
    c2 = int'(cdf_count[2]);
    $display("CDF n=%0d: %0d %0d %0d of %0d", jn, c0, c1, c2, WIN);
  endtask

  initial begin
    int c0, c1, c2, last_inj;
    logic [6:0] prbs = 7'h7f;
    #1 rst_n = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // 1. 2-bit PWM, symbols from a PRBS7 (x^7 + x^6 + 1), two bits each
    check_2bit = 1'b1;
    repeat (400) begin
      logic [1:0] sym;
      for (int b = 0; b < 2; b++) begin
        sym[b] = prbs[6];
        prbs   = {prbs[5:0], prbs[6] ^ prbs[5]};
      end
      @(negedge clk) tx = sym;
    end

    // 2. calibration trim on line 0
    @(negedge clk) tx = 2'b10;
    repeat (3) @(negedge clk);
    check_2bit = 1'b0;
    @(posedge clk) #10 trim[0] = 16'(4 * DT);
    repeat (4) @(posedge rx);
    #2;
    checks++;
    if (code_valid === 1'b0 && rx_data === 2'b01) bubbles++;
    else begin
      failures++;
      $display("FAIL: trimmed line gave %0d valid %b", rx_data, code_valid);
    end
    @(posedge clk) #10 trim = '0;

    // 3. jitter test, n = 1, small jitter
    @(negedge clk) tx = 2'b11;
    jit_amp = 30;
    jn = 4'd1;
    jtest = 1'b1;
    repeat (10) @(posedge clk);
    run_cdf(c0, c1, c2);
    checks++;
    if (c0 == 0 && c2 == WIN && c1 > WIN / 4 && c1 < 3 * WIN / 4) cdf_narrow++;
    else begin failures++; $display("FAIL: small-jitter CDF"); end

    // 4. jitter test, n = 2, larger jitter
    jit_amp = 60;
    jn = 4'd2;
    repeat (10) @(posedge clk);
    run_cdf(c0, c1, c2);
    checks++;
    if (c0 > 0 && c2 < WIN && c0 < c1 && c1 < c2) cdf_wide++;
    else begin failures++; $display("FAIL: large-jitter CDF"); end
    jtest = 1'b0;
    jit_amp = 10;

    // 5. 1-bit PWM with ECC
    do_reset(1'b1);
    check_1bit = 1'b1;
    last_inj = 0;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      tx = 2'($urandom);
      inject_next = tx[0] && (i - last_inj > 4) && (i < 590) && ($urandom % 3 == 0);
      if (inject_next) last_inj = i;
    end
    @(negedge clk) inject_next = 1'b0;
    repeat (4) @(negedge clk);
    check_1bit = 1'b0;

    // mechanisms
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (sym_seen[s] == 0) begin failures++; $display("FAIL: symbol %0d never received", s); end
    end
    checks += 7;
    if (edge_only_ok == 0)  begin failures++; $display("FAIL: edge-only decoder never checked"); end
    if (bubbles == 0)       begin failures++; $display("FAIL: no bubble code"); end
    if (mode_switches == 0) begin failures++; $display("FAIL: no mode switch"); end
    if (raw_errors == 0 || raw_errors != injected) begin
      failures++;
      $display("FAIL: %0d raw errors for %0d late pulses", raw_errors, injected);
    end
    if (ecc_flags == 0)     begin failures++; $display("FAIL: ECC never flagged"); end
    if (cdf_narrow == 0)    begin failures++; $display("FAIL: no narrow CDF"); end
    if (cdf_wide == 0)      begin failures++; $display("FAIL: no wide CDF"); end
    $display("symbols %0d %0d %0d %0d, bubbles %0d, mode switches %0d, late pulses %0d, raw errors %0d, ECC flags %0d",
             sym_seen[0], sym_seen[1], sym_seen[2], sym_seen[3], bubbles, mode_switches,
             injected, raw_errors, ecc_flags);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
