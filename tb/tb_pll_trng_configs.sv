// tb_pll_trng_configs -- all selected generator configurations, 1 and 2 outputs.
// Instantiates the complete generator for the seven distinct divider sets of
// the selected configurations (A, shared by the three FPGA families, and
// CV_B, S6_B, SF_B, CV_C, S6_C, SF_C), each with one and with two PLL1
// outputs, using a 256-value Online window. Checks per configuration:
//   - the derived K_M / K_D equal the configuration's published factors;
//   - bit rate R = f0/K_D and jitter sensitivity S = K_D/T1 match the
//     published values (0.01 Mb/s, 0.001 1/ps);
//   - no Total failure alarm for a healthy source (14 ps / 5 ps jitter);
//   - one output: the mean counter value and the Allan variance agree with
//     the reference model, and the Online alarm is raised exactly when the
//     model variance is clearly below 1.1 (no decision within 15 % of it);
//   - two outputs: the Allan variance exceeds that of one output.
module tb_pll_trng_configs;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;
  import tb_trng_model_pkg::*;

  localparam int NC  = 7;
  localparam int NAV = 256;
  localparam real T_IN = 8000.0;
  typedef int unsigned cfg_t [NC];
  localparam cfg_t M0 = '{29, 99, 19, 31,   5, 33, 35};
  localparam cfg_t N0 = '{ 4, 13,  4,  4,   1,  4, 11};
  localparam cfg_t C0 = '{ 7,  4,  4,  4,   3,  7,  2};
  localparam cfg_t M1 = '{26,  8, 29, 23, 147, 17, 17};
  localparam cfg_t N1 = '{ 5,  1,  5,  3,  19,  5,  3};
  localparam cfg_t C1 = '{ 3,  5,  5,  3,   5,  3,  3};
  localparam cfg_t KM = '{728, 416, 464, 368, 441, 476, 374};
  localparam cfg_t KD = '{435, 495, 475, 279, 475, 495, 315};
  localparam real R_MBPS [NC] = '{0.30, 0.48, 0.31, 0.87, 0.44, 0.30, 0.63};
  localparam real S_PS   [NC] = '{0.094, 0.099, 0.069, 0.089, 0.092, 0.070, 0.074};
  localparam string NAME [NC] = '{"A", "CV_B", "S6_B", "SF_B", "CV_C", "S6_C", "SF_C"};

  logic clk_in = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #(T_IN / 2.0) clk_in = ~clk_in;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [NC-1:0] at1, ao1, av1, at2, ao2, av2, cv1, clk01, clk02;
  logic [2*CNT_W+7:0] aq1 [NC];
  logic [2*CNT_W+7:0] aq2 [NC];
  logic [CNT_W-1:0]   cnt1 [NC];
  int unsigned kd_of [NC];
  int unsigned km_of [NC];
  int n_est1 [NC];
  int n_est2 [NC];
  real sum1 [NC];
  int  nv1 [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    logic lock1, unused_b, unused_c, unused_d, lock2, unused_f, unused_g, unused_h, unused_i;
    logic [CNT_W-1:0] unused_cnt;
    pll_trng_top #(.M0(M0[c]), .N0(N0[c]), .C0(C0[c]), .M1(M1[c]), .N1(N1[c]), .C1(C1[c]),
                   .N_AVAR(NAV)) u1 (
      .clk_in(clk_in), .rst_n(rst_n), .clk0(clk01[c]), .pll_locked(lock1), .dff_out(unused_b),
      .cnt(cnt1[c]), .cnt_valid(cv1[c]), .raw_bit(unused_c), .raw_valid(unused_d),
      .alarm_tot(at1[c]), .alarm_ol(ao1[c]), .avar_q8(aq1[c]), .avar_valid(av1[c]));
    pll_trng_top #(.M0(M0[c]), .N0(N0[c]), .C0(C0[c]), .M1(M1[c]), .N1(N1[c]), .C1(C1[c]),
                   .N_OUT(2), .N_AVAR(NAV)) u2 (
      .clk_in(clk_in), .rst_n(rst_n), .clk0(clk02[c]), .pll_locked(lock2), .dff_out(unused_f),
      .cnt(unused_cnt), .cnt_valid(unused_g), .raw_bit(unused_h), .raw_valid(unused_i),
      .alarm_tot(at2[c]), .alarm_ol(ao2[c]), .avar_q8(aq2[c]), .avar_valid(av2[c]));
    assign kd_of[c] = u1.KD;
    assign km_of[c] = trng_km(M0[c], N0[c], C0[c], M1[c], N1[c], C1[c], 1'b1);
    always @(posedge clk01[c]) if (lock1) begin
      if (av1[c]) n_est1[c]++;
      if (cv1[c] && n_est1[c] == 0) begin
        sum1[c] += real'(cnt1[c]);
        nv1[c]++;
      end
    end
    always @(posedge clk02[c]) if (lock2 && av2[c]) n_est2[c]++;
  end

  initial begin
    bit all_done;
    for (int c = 0; c < NC; c++) begin
      n_est1[c] = 0; n_est2[c] = 0; sum1[c] = 0.0; nv1[c] = 0;
    end
    #(2.5 * T_IN) rst_n = 1'b1;
    do begin
      #(100.0 * T_IN);
      all_done = 1'b1;
      for (int c = 0; c < NC; c++) if (n_est1[c] < 1 || n_est2[c] < 1) all_done = 1'b0;
    end while (!all_done);
    for (int c = 0; c < NC; c++) begin
      real t0, t1, f0, r, s, mean_m, var_m, avar1, avar2, mean_s;
      int  nc;
      t0 = T_IN * real'(N0[c] * C0[c]) / real'(M0[c]);
      t1 = T_IN * real'(N1[c] * C1[c]) / real'(M1[c]);
      f0 = 1.0e6 / t0;                       // MHz
      r  = f0 / real'(kd_of[c]);             // Mb/s
      s  = real'(kd_of[c]) / t1;             // 1/ps
      counter_moments(int'(kd_of[c]), t0, t1, 1000.0, 0.5, $sqrt(5.0 * 5.0 + 14.0 * 14.0), mean_m, var_m, nc);
      avar1 = real'(aq1[c]) / 256.0;
      avar2 = real'(aq2[c]) / 256.0;
      mean_s = sum1[c] / real'(nv1[c]);
      $display("%-5s K_M/K_D=%0d/%0d R=%.3f Mb/s S=%.4f /ps | model E=%.1f Var=%.2f (%0d contr.) | sim mean=%.1f AVAR1=%.2f AVAR2=%.2f alarms1=%b%b alarms2=%b%b",
               NAME[c], km_of[c], kd_of[c], r, s, mean_m, var_m, nc, mean_s, avar1, avar2,
               at1[c], ao1[c], at2[c], ao2[c]);
      check(kd_of[c] == KD[c] && km_of[c] == KM[c], {NAME[c], ": K_M and K_D as published"});
      check(r > R_MBPS[c] - 0.006 && r < R_MBPS[c] + 0.006, {NAME[c], ": bit rate as published"});
      check(s > S_PS[c] - 0.0006 && s < S_PS[c] + 0.0006, {NAME[c], ": jitter sensitivity as published"});
      check(!at1[c] && !at2[c], {NAME[c], ": no Total failure alarm"});
      check(mean_s > mean_m - 0.4 && mean_s < mean_m + 0.4, {NAME[c], ": mean counter value matches the model"});
      check(avar1 > 0.7 * var_m && avar1 < 1.3 * var_m, {NAME[c], ": Allan variance matches the model"});
      if (var_m < 0.85 * 1.1) check(ao1[c], {NAME[c], ": Online alarm for a low variance"});
      if (var_m > 1.15 * 1.1) check(!ao1[c], {NAME[c], ": no Online alarm for a sufficient variance"});
      check(avar2 > avar1, {NAME[c], ": two outputs raise the variance"});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_IN * 400000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
