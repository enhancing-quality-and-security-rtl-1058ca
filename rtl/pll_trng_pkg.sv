// pll_trng_pkg -- constants and helper functions shared by the PLL-TRNG blocks.
//
// The defaults describe "Configuration A" of the generator: a two-PLL setup
// with a 125 MHz input clock, PLL0 = (M0, N0, C0) = (29, 4, 7) giving
// f0 = 129.46 MHz and PLL1 = (M1, N1, C1) = (26, 5, 3) giving f1 = 216.67 MHz.
// The resulting TRNG factors are K_M = 728 and K_D = 435, so one pattern
// period T_P spans 435 reference-clock cycles and one raw bit is produced per
// T_P (about 0.30 Mb/s). The counters are 9 bits wide (every K_D used is
// below 511). The Total failure threshold l_min = 24 is the "false alarm once
// per day" value for this configuration, and the Online test estimates the
// Allan variance over 4096 counter values against a minimum of 1.1.
// Expressing V_min in units of 1/256 (Q8) is this design's own choice.
package pll_trng_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Width m of the time-to-digital converter and of the T-base counter.
  localparam int unsigned CNT_W = 9;

  // Configuration A (same for the three FPGA families studied).
  localparam int unsigned CFG_A_M0 = 29;
  localparam int unsigned CFG_A_N0 = 4;
  localparam int unsigned CFG_A_C0 = 7;
  localparam int unsigned CFG_A_M1 = 26;
  localparam int unsigned CFG_A_N1 = 5;
  localparam int unsigned CFG_A_C1 = 3;
  localparam int unsigned CFG_A_KM = 728;
  localparam int unsigned CFG_A_KD = 435;

  // Total failure test threshold l_min(beta), once-per-day false alarm rate.
  localparam int unsigned TOT_L_MIN = 24;

  // Online test: number of counter values per Allan variance estimate and
  // the minimal variance 1.1 expressed in 1/256 units (round(1.1*256)).
  localparam int unsigned AVAR_N       = 4096;
  localparam int unsigned AVAR_VMIN_Q8 = 282;

  // Greatest common divisor, used to reduce K_M/K_D to coprime factors.
  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned x = a;
    int unsigned y = b;
    while (y != 0) begin
      int unsigned t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  // TRNG division factor K_D for a two-PLL setup:
  //   f1/f0 = (M1/(N1*C1)) / (M0/(N0*C0)) = K_M/K_D.
  // With use_pll0 = 0 the reference clock is clk_in itself (M0=N0=C0=1).
  function automatic int unsigned trng_kd(int unsigned m0, int unsigned n0, int unsigned c0,
                                          int unsigned m1, int unsigned n1, int unsigned c1,
                                          bit use_pll0);
    int unsigned km = use_pll0 ? m1 * n0 * c0 : m1;
    int unsigned kd = use_pll0 ? n1 * c1 * m0 : n1 * c1;
    return kd / gcd(km, kd);
  endfunction

  function automatic int unsigned trng_km(int unsigned m0, int unsigned n0, int unsigned c0,
                                          int unsigned m1, int unsigned n1, int unsigned c1,
                                          bit use_pll0);
    int unsigned km = use_pll0 ? m1 * n0 * c0 : m1;
    int unsigned kd = use_pll0 ? n1 * c1 * m0 : n1 * c1;
    return km / gcd(km, kd);
  endfunction

endpackage
