// tb_pll_trng_core -- self-checking test of the digital TRNG core.
// The PLL1 output is replaced by a synthetic coherent-sampling pattern driven
// on the falling edge of clk0: sample i reads the level of an ideal clock at
// position j = (i*K_M) mod K_D of the reconstructed period (K_M = 728,
// K_D = 435, duty 0.5); positions close to the two edges are "contributors"
// that take a random value with probability 1/2. The core runs at its
// defaults except for a 256-value Online window.
// The reference checks, on every clk0 edge: dff_out is the input delayed
// by two edges; each counter value equals the number of ones of dff_out over
// the K_D edges before its strobe and strobes are K_D cycles apart; every
// released raw bit is the LSB of the counter value 24 strobes earlier.
// Scenarios (each after a reset), with their expected outcome:
//   healthy  8 contributors (variance 2)      -> no alarm, raw bits released
//   weak     1 contributor  (variance 0.25)   -> Online alarm, FIFO flushed
//   dead     no contributor (constant N_p)    -> Total failure after 24 values
//   unlock   pll_locked drops                 -> Total failure (lock) alarm
module tb_pll_trng_core;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;

  localparam int unsigned KD = CFG_A_KD;
  localparam int unsigned KM = CFG_A_KM;
  localparam int unsigned N_AVAR = 256;

  logic clk0 = 1'b0;
  logic rst_n = 1'b0;
  logic [0:0] clk1 = '0;
  logic pll_locked = 1'b1;
  logic dff_out;
  logic [CNT_W-1:0] cnt;
  logic cnt_valid, raw_bit, raw_valid, alarm_tot, alarm_ol, avar_valid;
  logic [2*CNT_W+7:0] avar_q8;
  int checks = 0, failures = 0;

  always #3862 clk0 = ~clk0;   // 129.46 MHz

  pll_trng_core #(.N_AVAR(N_AVAR)) dut (
    .clk0(clk0), .rst_n(rst_n), .clk1(clk1), .pll_locked(pll_locked),
    .dff_out(dff_out), .cnt(cnt), .cnt_valid(cnt_valid), .raw_bit(raw_bit),
    .raw_valid(raw_valid), .alarm_tot(alarm_tot), .alarm_ol(alarm_ol),
    .avar_q8(avar_q8), .avar_valid(avar_valid));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $realtime);
    end
  endtask

  // Pattern generator. n_contr contributors per edge.
  int n_contr = 4;
  int i_smp = 0;
  always @(negedge clk0) begin
    int j;
    j = (i_smp * KM) % KD;
    if (j < n_contr || (j >= KD / 2 && j < KD / 2 + n_contr)) clk1[0] <= 1'($urandom);
    else clk1[0] <= (j < KD / 2);
    i_smp = (i_smp + 1) % KD;
  end

  // Reference model of the core.
  bit  in_hist[$];
  bit  x_hist[$];
  int  vals[$];
  int  last_strobe = -1;
  int  cyc = 0;
  int  n_vals = 0, n_raw = 0;
  int  sum_x;
  int  since_rst = 0;
  bit  prev_alarm = 1'b0;
  always @(posedge clk0) begin
    cyc++;
    if (!rst_n) begin
      in_hist.delete(); x_hist.delete(); vals.delete(); last_strobe = -1;
      since_rst = 0;
      prev_alarm = 1'b0;
    end else begin
      // Sampler: x seen now is the clk1 level captured two edges ago.
      since_rst++;
      if (since_rst >= 5)
        check(dff_out == in_hist[in_hist.size() - 2], "dff_out is clk1 delayed by two edges");
      if (cnt_valid) begin
        if (x_hist.size() >= KD) begin
          sum_x = 0;
          for (int k = 0; k < int'(KD); k++) sum_x += int'(x_hist[x_hist.size() - 1 - k]);
          check(int'(cnt) == sum_x, $sformatf("cnt %0d == ones over the period %0d", cnt, sum_x));
        end
        if (last_strobe >= 0) check(cyc - last_strobe == int'(KD), "one counter value per K_D cycles");
        last_strobe = cyc;
        vals.push_back(int'(cnt));
        n_vals++;
      end
      if (raw_valid) begin
        check(vals.size() > int'(TOT_L_MIN), "raw bit only after the FIFO filled");
        if (vals.size() > int'(TOT_L_MIN))
          check(raw_bit == 1'(vals[vals.size() - 1 - TOT_L_MIN]), "raw bit is LSB of N_p 24 values earlier");
        check(!prev_alarm, "no raw bit after an alarm was raised");
        n_raw++;
      end
      in_hist.push_back(clk1[0]);
      x_hist.push_back(dff_out);
      if (in_hist.size() > 4) void'(in_hist.pop_front());
      if (x_hist.size() > KD) void'(x_hist.pop_front());
      prev_alarm = alarm_tot || alarm_ol;
    end
  end

  task automatic restart();
    @(negedge clk0) rst_n = 1'b0;
    repeat (3) @(negedge clk0);
    rst_n = 1'b1;
    n_vals = 0;
    n_raw = 0;
  endtask

  task automatic wait_values(int n);
    int target;
    target = n_vals + n;
    while (n_vals < target) @(posedge clk0);
  endtask

  int raw_at_alarm;
  initial begin
    // Healthy: two full Online windows.
    n_contr = 4;
    restart();
    wait_values(2 * N_AVAR + 4);
    check(!alarm_tot && !alarm_ol, "healthy source: no alarm");
    check(n_raw == n_vals - int'(TOT_L_MIN) - 1, $sformatf("healthy source: %0d raw bits", n_raw));
    check(avar_q8 > 256 + 128 && avar_q8 < 4 * 256, $sformatf("AVAR estimate %0d/256 near 2", avar_q8));
    // Weak: one contributor per edge only on the rising edge.
    n_contr = 1;
    restart();
    wait_values(N_AVAR + 3);
    check(alarm_ol, "weak source: Online alarm");
    check(!alarm_tot || dut.u_tot.alarm_run, "weak source: no lock alarm");
    raw_at_alarm = n_raw;
    wait_values(30);
    check(n_raw == raw_at_alarm, "no raw bit after the Online alarm");
    // Dead: no contributors at all.
    n_contr = 0;
    restart();
    wait_values(int'(TOT_L_MIN) + 1);
    check(alarm_tot && dut.u_tot.alarm_run, "dead source: Total failure alarm");
    check(!alarm_ol, "dead source: Online test has not finished a window yet");
    check(n_raw == 0, "dead source: no raw bit ever released");
    // Lock loss.
    n_contr = 4;
    restart();
    wait_values(5);
    check(!alarm_tot, "locked: no alarm");
    @(negedge clk0) pll_locked = 1'b0;
    @(negedge clk0) pll_locked = 1'b1;
    @(posedge clk0) #1;
    check(alarm_tot && dut.u_tot.alarm_lock, "lock loss: Total failure alarm");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(7724.0 * 2000000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
