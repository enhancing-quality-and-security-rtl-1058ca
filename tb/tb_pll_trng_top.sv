// tb_pll_trng_top -- end-to-end test of the generator's mechanisms.
// Five complete generators (PLL models + core) run side by side from one
// 125 MHz input clock; all use a 256-value Online window to stay short.
//   u_ok   Configuration A, healthy jitter (14 ps / 5 ps): raw bits flow, no
//          alarm, Allan variance close to the stochastic model.
//   u_dead jitter-free PLLs (total failure of the source): constant counter
//          value, Total failure alarm after exactly 24 values (latency
//          24*K_D*T0), FIFO flushed, not a single raw bit released.
//   u_weak 3 ps jitter: some contributors but variance below 1.1 -> Online
//          alarm at the first estimate, FIFO flushed, output stops.
//   u_two  two PLL1 outputs shifted by 90 degrees, XORed: variance about
//          twice that of u_ok, no alarm.
//   u_one  single-PLL variant (clk0 = clk_in, K_D = 15): one counter value
//          every 15 input cycles.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_pll_trng_top;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;
  import tb_trng_model_pkg::*;

  localparam real T_IN = 8000.0;
  localparam real T0   = T_IN * 28.0 / 29.0;
  localparam real T1   = T_IN * 15.0 / 26.0;
  localparam int  KD   = 435;
  localparam int  NAV  = 256;
  localparam int  NI   = 5;

  logic clk_in = 1'b0;
  logic rst_n = 1'b0;
  logic [NI-1:0] clk0, lk, xo, cv, rb, rv, at, ao, av;
  logic [CNT_W-1:0] cnt [NI];
  logic [2*CNT_W+7:0] aq [NI];
  int checks = 0, failures = 0;

  always #(T_IN / 2.0) clk_in = ~clk_in;

  pll_trng_top #(.N_AVAR(NAV)) u_ok (
    .clk_in(clk_in), .rst_n(rst_n), .clk0(clk0[0]), .pll_locked(lk[0]), .dff_out(xo[0]),
    .cnt(cnt[0]), .cnt_valid(cv[0]), .raw_bit(rb[0]), .raw_valid(rv[0]),
    .alarm_tot(at[0]), .alarm_ol(ao[0]), .avar_q8(aq[0]), .avar_valid(av[0]));
  pll_trng_top #(.N_AVAR(NAV), .JITTER0_PS(0.0), .JITTER1_PS(0.0)) u_dead (
    .clk_in(clk_in), .rst_n(rst_n), .clk0(clk0[1]), .pll_locked(lk[1]), .dff_out(xo[1]),
    .cnt(cnt[1]), .cnt_valid(cv[1]), .raw_bit(rb[1]), .raw_valid(rv[1]),
    .alarm_tot(at[1]), .alarm_ol(ao[1]), .avar_q8(aq[1]), .avar_valid(av[1]));
  pll_trng_top #(.N_AVAR(NAV), .JITTER0_PS(0.0), .JITTER1_PS(3.0)) u_weak (
    .clk_in(clk_in), .rst_n(rst_n), .clk0(clk0[2]), .pll_locked(lk[2]), .dff_out(xo[2]),
    .cnt(cnt[2]), .cnt_valid(cv[2]), .raw_bit(rb[2]), .raw_valid(rv[2]),
    .alarm_tot(at[2]), .alarm_ol(ao[2]), .avar_q8(aq[2]), .avar_valid(av[2]));
  pll_trng_top #(.N_AVAR(NAV), .N_OUT(2)) u_two (
    .clk_in(clk_in), .rst_n(rst_n), .clk0(clk0[3]), .pll_locked(lk[3]), .dff_out(xo[3]),
    .cnt(cnt[3]), .cnt_valid(cv[3]), .raw_bit(rb[3]), .raw_valid(rv[3]),
    .alarm_tot(at[3]), .alarm_ol(ao[3]), .avar_q8(aq[3]), .avar_valid(av[3]));
  pll_trng_top #(.N_AVAR(NAV), .USE_PLL0(1'b0)) u_one (
    .clk_in(clk_in), .rst_n(rst_n), .clk0(clk0[4]), .pll_locked(lk[4]), .dff_out(xo[4]),
    .cnt(cnt[4]), .cnt_valid(cv[4]), .raw_bit(rb[4]), .raw_valid(rv[4]),
    .alarm_tot(at[4]), .alarm_ol(ao[4]), .avar_q8(aq[4]), .avar_valid(av[4]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int n_vals[NI], n_raw[NI], n_est[NI];
  int raw_after_alarm[NI];
  int fifo_flushes[NI];
  realtime t_first[NI], t_alarm_tot[NI];
  int level_before[NI];
  int one_gap_err = 0;
  realtime t_prev_one = 0;

  for (genvar g = 0; g < NI; g++) begin : g_mon
    bit was_alarm = 1'b0;
    always @(posedge clk0[g]) if (lk[g]) begin
      if (cv[g]) begin
        if (n_vals[g] == 0) t_first[g] = $realtime;
        n_vals[g]++;
      end
      if (rv[g]) begin
        n_raw[g]++;
        if (was_alarm) raw_after_alarm[g]++;
      end
      if (av[g]) n_est[g]++;
      if ((at[g] || ao[g]) && !was_alarm) begin
        if (at[g]) t_alarm_tot[g] = $realtime;
        was_alarm = 1'b1;
      end
    end
  end

  // FIFO flush observation (levels inside the cores).
  always @(posedge clk0[1]) if (lk[1]) begin
    if (!at[1]) level_before[1] = int'(u_dead.u_core.fifo_level);
    else if (level_before[1] > 0 && u_dead.u_core.fifo_level == 0) begin
      fifo_flushes[1]++;
      level_before[1] = 0;
    end
  end
  always @(posedge clk0[2]) if (lk[2]) begin
    if (!ao[2]) level_before[2] = int'(u_weak.u_core.fifo_level);
    else if (level_before[2] > 0 && u_weak.u_core.fifo_level == 0) begin
      fifo_flushes[2]++;
      level_before[2] = 0;
    end
  end
  // Single-PLL variant: one value every 15 clk_in cycles.
  always @(posedge clk0[4]) if (lk[4]) begin
    if (cv[4]) begin
      if (t_prev_one > 0) begin
        real e;
        e = ($realtime - t_prev_one) - 15.0 * T_IN;
        if (e > 1.0 || e < -1.0) one_gap_err++;
      end
      t_prev_one = $realtime;
    end
  end

  initial begin
    real m_ok, v_ok, m_weak, v_weak;
    int  c_ok, c_weak;
    int  mech_raw, mech_tot, mech_ol, mech_flush, mech_two, mech_one;
    for (int g = 0; g < NI; g++) begin
      n_vals[g] = 0; n_raw[g] = 0; n_est[g] = 0; raw_after_alarm[g] = 0;
      fifo_flushes[g] = 0; level_before[g] = 0;
    end
    counter_moments(KD, T0, T1, 1000.0, 0.5, $sqrt(5.0 * 5.0 + 14.0 * 14.0), m_ok, v_ok, c_ok);
    counter_moments(KD, T0, T1, 1000.0, 0.5, 3.0, m_weak, v_weak, c_weak);
    $display("model: healthy Var=%f (%0d contributors), weak Var=%f (%0d contributors)",
             v_ok, c_ok, v_weak, c_weak);
    #(2.5 * T_IN) rst_n = 1'b1;
    wait (n_est[0] >= 2 && n_est[3] >= 2);
    repeat (3) @(posedge clk0[0]);
    $display("ok: %0d values, %0d raw, AVAR %f | two: AVAR %f | weak: AVAR %f",
             n_vals[0], n_raw[0], real'(aq[0]) / 256.0, real'(aq[3]) / 256.0, real'(aq[2]) / 256.0);

    // Healthy generator.
    check(!at[0] && !ao[0], "healthy: no alarm");
    check(n_raw[0] >= n_vals[0] - TOT_L_MIN - 1, "healthy: raw bits released");
    check(real'(aq[0]) / 256.0 > 0.7 * v_ok && real'(aq[0]) / 256.0 < 1.3 * v_ok,
          "healthy: Allan variance close to the model");
    mech_raw = n_raw[0];
    // Total failure.
    check(at[1] && u_dead.u_core.u_tot.alarm_run, "dead source: Total failure alarm");
    check(n_raw[1] == 0, "dead source: no raw bit released");
    check(t_alarm_tot[1] - t_first[1] > (23.0 * KD - 2.0) * T0 &&
          t_alarm_tot[1] - t_first[1] < (23.0 * KD + 2.0) * T0,
          "dead source: alarm 23 periods after the first value (24 values)");
    mech_tot = at[1];
    // Online alarm.
    check(v_weak < 1.1, "weak source: model variance below the threshold");
    check(ao[2], "weak source: Online alarm");
    check(n_est[2] >= 1, "weak source: estimate produced");
    check(raw_after_alarm[2] == 0 && raw_after_alarm[1] == 0, "no raw bit after an alarm");
    mech_ol = ao[2];
    mech_flush = fifo_flushes[1] + fifo_flushes[2];
    check(fifo_flushes[1] == 1 && fifo_flushes[2] == 1, "alarms flush the security FIFO");
    // Two PLL1 outputs.
    check(!at[3] && !ao[3], "two outputs: no alarm");
    check(aq[3] > aq[0] + aq[0] / 4, "two outputs: larger variance than one output");
    mech_two = n_raw[3];
    // Single-PLL variant.
    check(u_one.KD == 15, "single PLL: K_D = 15");
    check(n_vals[4] > 1000 && one_gap_err == 0, "single PLL: value every 15 input cycles");
    mech_one = n_vals[4];

    check(mech_raw > 0, "mechanism: raw output");
    check(mech_tot > 0, "mechanism: Total failure alarm");
    check(mech_ol > 0, "mechanism: Online alarm");
    check(mech_flush > 0, "mechanism: FIFO flush");
    check(mech_two > 0, "mechanism: two PLL1 outputs");
    check(mech_one > 0, "mechanism: single-PLL clock switch");
    $display("mechanisms: raw=%0d tot=%0d ol=%0d flush=%0d two=%0d one=%0d",
             mech_raw, mech_tot, mech_ol, mech_flush, mech_two, mech_one);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T0 * 600000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
