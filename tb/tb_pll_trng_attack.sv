// tb_pll_trng_attack -- the two clock attacks on configuration CV_B.
// The TRNG core runs with K_D = 495 and all other parameters at their
// defaults (l_min = 24, a 4096-value Online window, V_min = 1.1). PLL1 is the
// behavioural PLL model of CV_B (125 MHz * 8 / (1 * 5) = 200 MHz, 14 ps rms
// jitter); the reference clock clk0 of three copies of the core comes from:
//   u_ok  PLL0 of CV_B (125 MHz * 99 / (13 * 4) = 237.98 MHz): nominal case,
//         which must pass a full Online window without an alarm;
//   u_tf  PLL0 at first, then a generator at exactly 200 MHz, aligned to the
//         middle of the clk1 high phase: clk0 is locked to clk1, every
//         sample has the same value and the counter value becomes constant;
//         the Total failure alarm must follow within l_min + 2 periods and
//         no raw bit made from the failed source may leave the security
//         FIFO. The Online test comes much later: its first window holds the
//         step from the nominal values to the constant one (whose squared
//         difference alone lifts the estimate above V_min), so the alarm
//         rises at the end of the second window;
//   u_ol  a generator at 231 MHz from the start. The two clocks are no longer
//         in a coherent ratio, so the counter value beats slowly instead of
//         repeating: no Total failure alarm, and an Allan variance well above
//         the nominal one. This copy enables the optional upper bound of the
//         Online test, set to 3.0 for CV_B (this testbench's choice, about
//         twice the nominal estimate), and the alarm must rise at the end of
//         the first window, 4097 periods (the discarded first one plus 4096)
//         after the reset is released. With the lower bound alone this
//         attack would not be detected in this model.
// The two attack frequencies and the nominal CV_B dividers are those of the
// reference experiment; the clock hand-over, the phase alignment and the
// upper bound are this testbench's choices. The expected latencies are worked
// out here from K_D, l_min, the window length and the clock periods; the
// measured ones are printed.
module tb_pll_trng_attack;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;

  localparam int unsigned KD    = 495;                 // CV_B, Table 2
  localparam real         T_IN  = 8000.0;              // 125 MHz
  localparam real         T_TF  = 5000.0;              // 200 MHz attack clock
  localparam real         T_OL  = 1.0e6 / 231.0;       // 231 MHz attack clock
  localparam real         T_NOM = T_IN * 13.0 * 4.0 / 99.0;
  localparam int unsigned VMAX_Q8_CVB = 3 * 256;         // upper bound 3.0
  localparam logic [2*CNT_W+7:0] VMIN_Q8_DEFAULT = (2*CNT_W+8)'(AVAR_VMIN_Q8);

  logic       clk_in = 1'b0;
  logic       areset = 1'b1;
  logic       rst_n  = 1'b0;
  logic [0:0] clk1, pll0;
  logic       lock1, lock0;
  logic       gen_tf = 1'b0, gen_ol = 1'b0;
  logic       sw_tf  = 1'b0;
  logic       clk0_tf, clk0_ok, clk0_ol;
  int checks = 0, failures = 0;

  always #(T_IN / 2.0) clk_in = ~clk_in;

  pll_model #(.M(8),  .N(1),  .C(5), .JITTER_PS(14.0), .PHASE_PS(1000.0)) u_pll1 (
    .clk_in(clk_in), .areset(areset), .clk_out(clk1), .locked(lock1));
  pll_model #(.M(99), .N(13), .C(4), .JITTER_PS(5.0)) u_pll0 (
    .clk_in(clk_in), .areset(areset), .clk_out(pll0), .locked(lock0));

  wire locked = lock1 && lock0;

  // 231 MHz generator, free running.
  always #(T_OL / 2.0) gen_ol = ~gen_ol;

  // 200 MHz generator, started a quarter period after a rising clk1 edge.
  initial begin
    wait (sw_tf);
    @(posedge clk1[0]);
    #(T_TF / 4.0);
    forever begin
      gen_tf = 1'b1;
      #(T_TF / 2.0);
      gen_tf = 1'b0;
      #(T_TF / 2.0);
    end
  end

  // The attacked clock takes over at the first generator edge; until then
  // PLL0 clocks the core (the hand-over takes one partial clk0 period).
  logic tf_running = 1'b0;
  always @(posedge gen_tf) tf_running <= 1'b1;
  assign clk0_ok = pll0[0];
  assign clk0_tf = tf_running ? gen_tf : pll0[0];
  assign clk0_ol = gen_ol;

  typedef struct packed {
    logic           dff_out;
    logic [CNT_W-1:0] cnt;
    logic           cnt_valid, raw_bit, raw_valid, alarm_tot, alarm_ol, avar_valid;
    logic [2*CNT_W+7:0] avar_q8;
  } core_out_t;
  core_out_t o_ok, o_tf, o_ol;

  pll_trng_core #(.KD(KD)) u_ok (
    .clk0(clk0_ok), .rst_n(rst_n), .clk1(clk1), .pll_locked(locked),
    .dff_out(o_ok.dff_out), .cnt(o_ok.cnt), .cnt_valid(o_ok.cnt_valid),
    .raw_bit(o_ok.raw_bit), .raw_valid(o_ok.raw_valid), .alarm_tot(o_ok.alarm_tot),
    .alarm_ol(o_ok.alarm_ol), .avar_q8(o_ok.avar_q8), .avar_valid(o_ok.avar_valid));
  pll_trng_core #(.KD(KD)) u_tf (
    .clk0(clk0_tf), .rst_n(rst_n), .clk1(clk1), .pll_locked(locked),
    .dff_out(o_tf.dff_out), .cnt(o_tf.cnt), .cnt_valid(o_tf.cnt_valid),
    .raw_bit(o_tf.raw_bit), .raw_valid(o_tf.raw_valid), .alarm_tot(o_tf.alarm_tot),
    .alarm_ol(o_tf.alarm_ol), .avar_q8(o_tf.avar_q8), .avar_valid(o_tf.avar_valid));
  pll_trng_core #(.KD(KD), .VMAX_Q8(VMAX_Q8_CVB)) u_ol (
    .clk0(clk0_ol), .rst_n(rst_n), .clk1(clk1), .pll_locked(locked),
    .dff_out(o_ol.dff_out), .cnt(o_ol.cnt), .cnt_valid(o_ol.cnt_valid),
    .raw_bit(o_ol.raw_bit), .raw_valid(o_ol.raw_valid), .alarm_tot(o_ol.alarm_tot),
    .alarm_ol(o_ol.alarm_ol), .avar_q8(o_ol.avar_q8), .avar_valid(o_ol.avar_valid));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $realtime);
    end
  endtask

  realtime t_rst = 0.0, t_switch = 0.0;

  // Nominal copy: counter values, raw bits, alarms.
  int ok_vals = 0, ok_raw = 0;
  bit ok_avar_seen = 1'b0;
  always @(posedge clk0_ok) if (rst_n && locked) begin
    if (o_ok.cnt_valid) ok_vals++;
    if (o_ok.raw_valid) ok_raw++;
    if (o_ok.avar_valid && !ok_avar_seen) begin
      ok_avar_seen = 1'b1;
      $display("nominal CV_B: Allan variance estimate %0.3f", real'(o_ok.avar_q8) / 256.0);
      check(o_ok.avar_q8 >= VMIN_Q8_DEFAULT, "nominal CV_B: estimate at or above V_min");
    end
  end

  // Total failure attack copy. Production time of every counter value; a
  // released raw bit is the LSB of the value written L_MIN writes earlier.
  realtime tf_val_t[$];
  realtime t_tf_alarm = 0.0, t_tf_ol_alarm = 0.0;
  int tf_late_raw = 0;
  int n_tf_win = 0;
  always @(posedge clk0_tf) if (rst_n && locked) begin
    if (o_tf.raw_valid && tf_val_t.size() > int'(TOT_L_MIN)) begin
      // Values strobed after the first full 200 MHz period are constant.
      if (sw_tf && tf_val_t[tf_val_t.size() - 1 - TOT_L_MIN] > t_switch + 2.0 * KD * T_TF)
        tf_late_raw++;
    end
    if (o_tf.cnt_valid) tf_val_t.push_back($realtime);
    if (o_tf.alarm_tot && t_tf_alarm == 0.0) t_tf_alarm = $realtime;
    if (o_tf.alarm_ol && t_tf_ol_alarm == 0.0) t_tf_ol_alarm = $realtime;
    if (o_tf.avar_valid) n_tf_win++;
  end

  // Online attack copy.
  realtime t_ol_alarm = 0.0;
  bit ol_tot = 1'b0;
  always @(posedge clk0_ol) if (rst_n && locked) begin
    if (o_ol.alarm_ol && t_ol_alarm == 0.0) begin
      t_ol_alarm = $realtime;
      $display("231 MHz: Allan variance estimate %0.3f", real'(o_ol.avar_q8) / 256.0);
      check(o_ol.avar_q8 > (2*CNT_W+8)'(VMAX_Q8_CVB), "231 MHz attack: estimate above the upper bound");
    end
    if (o_ol.alarm_tot) ol_tot = 1'b1;
  end

  real lat, lo, hi;
  initial begin
    #(T_IN * 3.0) areset = 1'b0;
    wait (locked);
    #(T_IN * 2.0) rst_n = 1'b1;
    t_rst = $realtime;
    // Nominal running of the attacked copy for 100 periods.
    #(100.0 * KD * T_NOM);
    check(!o_tf.alarm_tot && !o_tf.alarm_ol, "before the attack: no alarm");
    sw_tf = 1'b1;
    wait (tf_running);
    t_switch = $realtime;
    // Total failure alarm within l_min + 2 periods of the attack clock.
    #(real'(TOT_L_MIN + 4) * KD * T_TF);
    check(t_tf_alarm > 0.0, "200 MHz attack: Total failure alarm");
    lat = (t_tf_alarm - t_switch) / 1.0e6;
    lo  = real'(TOT_L_MIN - 1) * KD * T_TF / 1.0e6;
    hi  = real'(TOT_L_MIN + 2) * KD * T_TF / 1.0e6 + 0.1;
    $display("200 MHz attack: Total failure alarm %0.2f us after the switch (expected %0.2f..%0.2f)",
             lat, lo, hi);
    check(lat >= lo && lat <= hi, "200 MHz attack: Total failure latency");
    check(t_tf_ol_alarm == 0.0, "200 MHz attack: Online alarm not yet (window not complete)");
    // Wait for the end of the first Online window of every copy (the one of
    // u_tf runs mostly at 200 MHz, the slowest clock).
    #((real'(AVAR_N + 3) * KD * T_TF) - ($realtime - t_rst));
    check(ok_avar_seen, "nominal CV_B: Online window completed");
    check(!o_ok.alarm_tot && !o_ok.alarm_ol, "nominal CV_B: no alarm");
    check(ok_raw == ok_vals - int'(TOT_L_MIN), $sformatf("nominal CV_B: %0d raw bits of %0d values",
          ok_raw, ok_vals));
    // The first window of u_tf holds the step from the nominal values to the
    // constant one, whose squared difference alone exceeds V_min; the
    // second window, all constant, raises the alarm.
    check(n_tf_win == 1 && t_tf_ol_alarm == 0.0, "200 MHz attack: first window passes (it holds the step)");
    check(tf_late_raw == 0, "200 MHz attack: no raw bit from the failed source released");
    check(t_ol_alarm > 0.0, "231 MHz attack: Online alarm");
    check(!ol_tot, "231 MHz attack: no Total failure alarm");
    lat = (t_ol_alarm - t_rst) / 1.0e9;
    lo  = real'(AVAR_N + 1) * KD * T_OL / 1.0e9;
    hi  = (real'(AVAR_N + 2) * KD + 40.0) * T_OL / 1.0e9;   // + synchroniser and register
    $display("231 MHz attack: Online alarm %0.4f ms after reset (expected %0.4f..%0.4f)", lat, lo, hi);
    check(lat >= lo && lat <= hi, "231 MHz attack: Online latency of one window");
    #((real'(2 * AVAR_N + 3) * KD * T_TF) - ($realtime - t_rst));
    check(n_tf_win == 2 && t_tf_ol_alarm > 0.0, "200 MHz attack: Online alarm at the end of the second window");
    check(tf_late_raw == 0, "200 MHz attack: still no raw bit released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2.5e10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
