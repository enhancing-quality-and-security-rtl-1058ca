// tb_total_failure_test -- self-checking test of the runs' length test.
// Feeds counter values one per K_D = 435 clk0 cycles, as the TDC does.
// Phase 1: random values with runs shorter than L_MIN = 24 must never alarm.
// Phase 2: a run of exactly L_MIN-1 identical values must not alarm.
// Phase 3: a constant value (total failure) must raise alarm_run one cycle
// after the L_MIN-th identical value, i.e. L_MIN*K_D cycles after the start
// of the run's first period. Phase 4 (after reset): loss of PLL lock
// raises alarm_lock. The alarm must stay high (sticky).
// Before that, the threshold itself is recomputed with the normal
// approximation of the stochastic model (tb_trng_model_pkg::l_min) for
// Configuration A at the worst case for repetitions, a counter mean on an
// integer and the variance at the Online threshold V_min = 1.1: for one false
// alarm per day, week and month it must give 24, 26 and 28, with latencies
// of l_min*K_D periods of the 129.46 MHz reference clock.
module tb_total_failure_test;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;
  import tb_trng_model_pkg::*;

  localparam int unsigned KD    = CFG_A_KD;
  localparam int unsigned L_MIN = TOT_L_MIN;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [CNT_W-1:0] cnt = '0;
  logic cnt_valid = 1'b0;
  logic pll_locked = 1'b1;
  logic alarm, alarm_run, alarm_lock;
  logic [$clog2(L_MIN+1)-1:0] run_len;
  int checks = 0, failures = 0;
  longint cycle = 0;
  longint run_start_cycle;

  always #500 clk = ~clk;
  longint alarm_cycle = -1;
  always @(posedge clk) begin
    cycle++;
    #1 if (alarm && alarm_cycle < 0) alarm_cycle = cycle;
  end

  total_failure_test dut (.clk(clk), .rst_n(rst_n), .cnt(cnt), .cnt_valid(cnt_valid),
                          .pll_locked(pll_locked), .alarm(alarm), .alarm_run(alarm_run),
                          .alarm_lock(alarm_lock), .run_len(run_len));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // One counter value per pattern period: strobe in the period's last cycle.
  task automatic send(int v);
    repeat (KD - 1) @(negedge clk);
    cnt = CNT_W'(v);
    cnt_valid = 1'b1;
    @(negedge clk);
    cnt_valid = 1'b0;
  endtask

  // Configuration A reference clock: 125 MHz * 29 / (4 * 7).
  localparam real T0_NS = 1.0e3 * 4.0 * 7.0 / (125.0 * 29.0);
  localparam real SECONDS[3]    = '{86400.0, 7.0 * 86400.0, 30.0 * 86400.0};
  localparam int  LMIN_TAB[3]   = '{24, 26, 28};
  localparam real LOG2_BETA[3]  = '{-34.58, -37.38, -39.49};
  localparam int  LAT_T0[3]     = '{10440, 11310, 12180};
  localparam real LAT_US[3]     = '{80.643, 87.363, 94.083};

  task automatic check_thresholds();
    real beta, lb;
    int  l;
    for (int i = 0; i < 3; i++) begin
      beta = real'(KD) * T0_NS * 1.0e-9 / SECONDS[i];
      lb = $ln(beta) / $ln(2.0);
      check(lb > LOG2_BETA[i] - 0.02 && lb < LOG2_BETA[i] + 0.02,
            $sformatf("beta = 2^%0.2f for one false alarm in %0.0f s", lb, SECONDS[i]));
      l = l_min(217.0, 1.1, beta, int'(KD));
      check(l == LMIN_TAB[i], $sformatf("l_min(beta) = %0d, table %0d", l, LMIN_TAB[i]));
      check(l * int'(KD) == LAT_T0[i], "latency l_min*K_D periods");
      check(real'(l * int'(KD)) * T0_NS * 1.0e-3 > LAT_US[i] - 0.01 &&
            real'(l * int'(KD)) * T0_NS * 1.0e-3 < LAT_US[i] + 0.01, "latency in microseconds");
    end
    check(int'(L_MIN) == LMIN_TAB[0], "default threshold is the once-per-day value");
  endtask

  initial begin
    int v, prev, run;
    check_thresholds();
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    // Phase 1: runs of random length 1..L_MIN-1.
    prev = -1;
    for (int r = 0; r < 20; r++) begin
      do v = 200 + $urandom % 30; while (v == prev);
      run = 1 + $urandom % (L_MIN - 1);
      for (int k = 0; k < run; k++) begin
        send(v);
        check(!alarm, "no alarm for runs shorter than L_MIN");
        check(int'(run_len) == k + 1, "run length tracked");
      end
      prev = v;
    end
    // Phase 2: exactly L_MIN-1 identical values, then a change.
    for (int k = 0; k < int'(L_MIN) - 1; k++) send(prev + 1);
    send(prev + 2);
    check(!alarm, "L_MIN-1 identical values do not alarm");
    // Phase 3: total failure, constant counter value.
    run_start_cycle = cycle;          // the run's first period starts here
    for (int k = 0; k < int'(L_MIN) - 1; k++) begin
      send(217);
      check(!alarm, "no alarm before L_MIN values");
    end
    send(217);
    check(alarm && alarm_run && !alarm_lock, "alarm_run raised at the L_MIN-th value");
    check(alarm_cycle - run_start_cycle == longint'(L_MIN) * KD,
          $sformatf("latency %0d cycles == L_MIN*K_D", alarm_cycle - run_start_cycle));
    send(100);
    send(101);
    check(alarm, "alarm is sticky");
    // Phase 4: PLL lock loss.
    rst_n = 1'b0;
    @(negedge clk);
    check(!alarm, "reset clears the alarm");
    rst_n = 1'b1;
    send(5); send(6);
    check(!alarm, "no alarm while locked");
    @(negedge clk) pll_locked = 1'b0;
    @(negedge clk) pll_locked = 1'b1;
    check(alarm && alarm_lock && !alarm_run, "lock loss raises alarm_lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
