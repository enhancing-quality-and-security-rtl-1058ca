// tb_pll_trng_top_full -- the complete generator at its default parameters.
// Configuration A (K_M = 728, K_D = 435, f0 = 129.46 MHz), one PLL1 output,
// behavioural PLLs with 5 ps (PLL0) and 14 ps (PLL1) rms edge jitter. The
// test runs one full Online test window (4097 counter values, about 13.8 ms
// of generator time) and checks against the stochastic reference model:
//   - the core leaves reset only after the PLLs lock;
//   - one counter value every K_D*T0 = 3.36 us (bit rate f0/K_D);
//   - no alarm for a healthy source;
//   - the mean counter value and the Allan variance estimate agree with the
//     model's E(N) and Var(N) (within 0.2 and 15 %);
//   - raw bits leave the security FIFO 24 values late, each equal to the
//     LSB of its counter value, with a balanced share of ones.
module tb_pll_trng_top_full;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;
  import tb_trng_model_pkg::*;

  localparam real T_IN = 8000.0;
  localparam real T0   = T_IN * 28.0 / 29.0;
  localparam real T1   = T_IN * 15.0 / 26.0;
  localparam int  KD   = 435;

  logic clk_in = 1'b0;
  logic rst_n = 1'b0;
  logic clk0, pll_locked, dff_out, cnt_valid, raw_bit, raw_valid, alarm_tot, alarm_ol, avar_valid;
  logic [CNT_W-1:0] cnt;
  logic [2*CNT_W+7:0] avar_q8;
  int checks = 0, failures = 0;

  always #(T_IN / 2.0) clk_in = ~clk_in;

  pll_trng_top dut (
    .clk_in(clk_in), .rst_n(rst_n), .clk0(clk0), .pll_locked(pll_locked),
    .dff_out(dff_out), .cnt(cnt), .cnt_valid(cnt_valid), .raw_bit(raw_bit),
    .raw_valid(raw_valid), .alarm_tot(alarm_tot), .alarm_ol(alarm_ol),
    .avar_q8(avar_q8), .avar_valid(avar_valid));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int vals[$];
  int n_vals = 0, n_raw = 0, n_ones = 0, n_avar = 0;
  real sum_n = 0.0;
  realtime t_last = 0;
  real max_dt_err = 0.0;
  bit  early = 1'b0;
  always @(posedge clk0) if (pll_locked) begin
    if (cnt_valid) begin
      if (!pll_locked) early = 1'b1;
      if (n_vals > 0) begin
        real e;
        e = ($realtime - t_last) - real'(KD) * T0;
        if (e < 0.0) e = -e;
        if (e > max_dt_err) max_dt_err = e;
      end
      t_last = $realtime;
      vals.push_back(int'(cnt));
      sum_n += real'(cnt);
      n_vals++;
    end
    if (raw_valid) begin
      if (vals.size() > TOT_L_MIN)
        check(raw_bit == 1'(vals[vals.size() - 1 - TOT_L_MIN]), "raw bit is the LSB of N_p 24 values earlier");
      n_raw++;
      n_ones += int'(raw_bit);
    end
    if (avar_valid) n_avar++;
  end

  initial begin
    real mean_m, var_m, mean_s, avar_s;
    int  nc;
    counter_moments(KD, T0, T1, 1000.0, 0.5, $sqrt(5.0 * 5.0 + 14.0 * 14.0), mean_m, var_m, nc);
    $display("model: E(N)=%f Var(N)=%f contributors=%0d", mean_m, var_m, nc);
    #(2.5 * T_IN) rst_n = 1'b1;
    wait (n_avar == 1);
    repeat (3) @(posedge clk0);
    mean_s = sum_n / real'(n_vals);
    avar_s = real'(avar_q8) / 256.0;
    $display("simulated: %0d values, mean %f, AVAR %f, %0d raw bits (%0d ones)",
             n_vals, mean_s, avar_s, n_raw, n_ones);
    check(!early, "no counter value before the PLLs lock");
    check(n_vals == AVAR_N + 1, "first estimate with the 4097th counter value");
    check(max_dt_err < 40.0, $sformatf("values every K_D*T0 (max error %f ps)", max_dt_err));
    check(!alarm_tot && !alarm_ol, "healthy source raises no alarm");
    check(mean_s > mean_m - 0.2 && mean_s < mean_m + 0.2, "mean counter value matches the model");
    check(avar_s > 0.85 * var_m && avar_s < 1.15 * var_m, "Allan variance matches the model variance");
    check(avar_s > 1.1, "Allan variance above the 1.1 threshold");
    check(n_raw == n_vals - TOT_L_MIN - 1 || n_raw == n_vals - TOT_L_MIN, "raw bits released 24 values late");
    check(n_ones > n_raw * 45 / 100 && n_ones < n_raw * 55 / 100, "raw bits balanced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T0 * 2500000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
