// tb_online_test -- self-checking test of the Allan-variance Online test.
// Instance `dut` has the defaults (4096 differences, V_min = 1.1); counter
// values arrive back to back every 4 clk0 cycles to keep the run short.
// The reference computes the sum of squared successive differences
// independently and checks every estimate (AVAR*256, truncated), its timing
// (first estimate with the 4097th value, then every 4096 values) and the
// alarm decision. Window 1: values 217 + a sum of binomial noise with
// variance well above 1.1 (no alarm). Window 2: nearly constant values
// (alarm). Instance `dut_hi` (window 64, V_max = 4.0) checks the upper bound.
// Before that, the threshold is recomputed with the worst-case stochastic
// model (tb_trng_model_pkg::v_min): the variance at the minimal jitter is
// 1.09 for a min-entropy of 0.98 and 1.06 for a Shannon entropy of 0.9998,
// both at or below the default V_min = 1.1; in the best case the variance
// cannot fall below 0.5 however small the jitter.
module tb_online_test;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;

  localparam int unsigned N_AVAR = AVAR_N;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [CNT_W-1:0] cnt = '0;
  logic cnt_valid = 1'b0;
  logic alarm, avar_valid;
  logic [2*CNT_W+7:0] avar_q8;
  logic alarm_hi, avar_valid_hi;
  logic [2*CNT_W+7:0] avar_q8_hi;
  int checks = 0, failures = 0;
  int nval = 0;

  always #500 clk = ~clk;

  online_test dut (.clk(clk), .rst_n(rst_n), .cnt(cnt), .cnt_valid(cnt_valid),
                   .alarm(alarm), .avar_valid(avar_valid), .avar_q8(avar_q8));
  online_test #(.N_AVAR(64), .VMAX_Q8(4 * 256)) dut_hi (
    .clk(clk), .rst_n(rst_n), .cnt(cnt), .cnt_valid(cnt_valid),
    .alarm(alarm_hi), .avar_valid(avar_valid_hi), .avar_q8(avar_q8_hi));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Sends one value; returns after the cycle in which an estimate could appear.
  task automatic send(int v);
    @(negedge clk);
    cnt = CNT_W'(v);
    cnt_valid = 1'b1;
    @(negedge clk);
    cnt_valid = 1'b0;
    nval++;
    repeat (2) @(negedge clk);
  endtask

  // Noise with variance k/4 (sum of k fair bits, centred).
  function automatic int noise(int k);
    int s = 0;
    for (int i = 0; i < k; i++) s += $urandom % 2;
    return s;
  endfunction

  longint sum_sq;
  longint sum_hi;
  int prev;
  int nd, nd_hi;
  int estimates = 0, estimates_hi = 0;
  bit exp_alarm = 1'b0, exp_alarm_hi = 1'b0;
  longint d;

  // Reference model, evaluated on every strobe.
  always @(posedge clk) begin
    if (rst_n && cnt_valid) begin
      if (nval > 0) begin
        d = longint'(cnt) - longint'(prev);
        sum_sq += d * d;
        sum_hi += d * d;
        nd++;
        nd_hi++;
      end
      prev = int'(cnt);
      #1;
      if (nd == int'(N_AVAR)) begin
        check(avar_valid, "estimate after N_AVAR differences");
        check(longint'(avar_q8) == (sum_sq * 256) / (2 * N_AVAR),
              $sformatf("avar_q8 %0d == %0d", avar_q8, (sum_sq * 256) / (2 * N_AVAR)));
        if (sum_sq * 256 < longint'(AVAR_VMIN_Q8) * 2 * N_AVAR) exp_alarm = 1'b1;
        check(alarm == exp_alarm, "alarm decision");
        estimates++;
        sum_sq = 0;
        nd = 0;
      end else begin
        check(!avar_valid, "no estimate inside a window");
      end
      if (nd_hi == 64) begin
        check(avar_valid_hi, "estimate after 64 differences (small window)");
        check(longint'(avar_q8_hi) == (sum_hi * 256) / 128, "avar_q8 (small window)");
        if (sum_hi * 256 < longint'(AVAR_VMIN_Q8) * 128 || sum_hi * 256 > longint'(4 * 256) * 128)
          exp_alarm_hi = 1'b1;
        check(alarm_hi == exp_alarm_hi, "alarm decision with upper bound");
        estimates_hi++;
        sum_hi = 0;
        nd_hi = 0;
      end
    end
  end

  task automatic check_threshold();
    real v_inf, v_1, h_inf, h_1, v_best;
    v_inf = tb_trng_model_pkg::v_min(0.98, 1'b1);
    v_1   = tb_trng_model_pkg::v_min(0.9998, 1'b0);
    tb_trng_model_pkg::edge_model(0.01, 0.0, h_inf, h_1, v_best);
    $display("V_min: %0.4f (min-entropy 0.98), %0.4f (Shannon 0.9998), best-case floor %0.3f",
             v_inf, v_1, v_best);
    check(v_inf > 1.085 && v_inf < 1.095, "V_min for min-entropy 0.98 is 1.09");
    check(v_1 > 1.055 && v_1 < 1.065, "V_min for Shannon entropy 0.9998 is 1.06");
    check(real'(AVAR_VMIN_Q8) / 256.0 >= v_inf && real'(AVAR_VMIN_Q8) / 256.0 >= v_1,
          "default threshold 1.1 is at or above both");
    check(v_best > 0.499 && v_best < 0.501, "absolute floor of the variance is 0.5");
  endtask

  initial begin
    check_threshold();
    sum_sq = 0; sum_hi = 0; nd = 0; nd_hi = 0; prev = 0;
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    // Window 1: variance of noise(12) is 3, Allan variance 3 -> pass.
    // (the small window also sees these values: 3 < 4, no alarm.)
    for (int i = 0; i < 64 + 1; i++) send(211 + noise(12));
    check(estimates_hi == 1 && !alarm_hi, "small window passes at AVAR about 3");
    // Large excursions trip the upper bound of the small window.
    for (int i = 0; i < 64; i++) send((i % 2 != 0) ? 240 : 200);
    check(alarm_hi, "upper bound raises the alarm");
    for (int i = 0; i < int'(N_AVAR) - 128; i++) send(211 + noise(12));
    check(estimates == 1 && !alarm, "healthy window passes");
    // Window 2: almost constant values (variance ~0.06) -> alarm.
    for (int i = 0; i < int'(N_AVAR); i++) send(217 + (($urandom % 16) == 0 ? 1 : 0));
    check(estimates == 2 && alarm, "low variance raises the alarm");
    // Sticky: another healthy window keeps the alarm.
    for (int i = 0; i < int'(N_AVAR); i++) send(211 + noise(12));
    check(estimates == 3 && alarm, "alarm is sticky");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
