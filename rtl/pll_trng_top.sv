// pll_trng_top -- complete enhanced PLL-TRNG with behavioural PLLs.
//
// Two PLLs share the input clock clk_in (125 MHz). PLL0 makes the reference
// clock clk0 = M0/(N0*C0) * f_in and PLL1 the sampled clock(s)
// clk1k = M1/(N1*C1) * f_in, k = 0..N_OUT-1, shifted by 180/N_OUT degrees.
// With USE_PLL0 = 0 the switch in front of the core selects clk_in itself as
// clk0 (single-PLL variant). The ratio f1/f0 = K_M/K_D, reduced to coprime
// factors, fixes the pattern period: KD is derived from the divider values
// and passed to the digital core (default Configuration A: K_M = 728,
// K_D = 435, f0 = 129.46 MHz, one raw bit every 3.36 us). The core samples
// the PLL1 outputs, converts each pattern period into a 9-bit counter value,
// tests it (Total failure and Online tests) and releases raw bits through
// the security FIFO. `rst_n` (active low) resets the PLLs and the core; the
// core is held in reset until both PLLs report lock. clk0 is brought out so
// that the outputs, which are synchronous to it, can be sampled. The divider
// values follow the generator's Configuration A; jitter, duty cycle and
// phase values are assumed figures for the behavioural PLLs. Because it
// contains the PLL models this module is for simulation only; the
// synthesizable part is pll_trng_core.
module pll_trng_top
  import pll_trng_pkg::*;
#(
  parameter real         F_IN_MHZ   = 125.0,
  parameter bit          USE_PLL0   = 1'b1,          // two-PLL configuration
  parameter int unsigned M0         = CFG_A_M0,
  parameter int unsigned N0         = CFG_A_N0,
  parameter int unsigned C0         = CFG_A_C0,
  parameter int unsigned M1         = CFG_A_M1,
  parameter int unsigned N1         = CFG_A_N1,
  parameter int unsigned C1         = CFG_A_C1,
  parameter int unsigned N_OUT      = 1,             // PLL1 outputs sampled
  parameter real         JITTER0_PS = 5.0,           // PLL0 rms edge jitter
  parameter real         JITTER1_PS = 14.0,          // PLL1 rms edge jitter
  parameter real         DUTY1      = 0.5,           // PLL1 duty cycle
  parameter real         PHASE1_PS  = 1000.0,        // PLL1 start offset
  parameter int unsigned L_MIN      = TOT_L_MIN,
  parameter int unsigned N_AVAR     = AVAR_N,
  parameter int unsigned VMIN_Q8    = AVAR_VMIN_Q8,
  parameter int unsigned VMAX_Q8    = 0,
  parameter int unsigned KD         = trng_kd(M0, N0, C0, M1, N1, C1, USE_PLL0)
) (
  input  logic                 clk_in,      // input clock
  input  logic                 rst_n,       // active-low reset
  output logic                 clk0,        // reference clock (outputs are synchronous to it)
  output logic                 pll_locked,  // both PLLs locked
  output logic                 dff_out,     // sampler output x_i
  output logic [CNT_W-1:0]     cnt,         // counter value N_p
  output logic                 cnt_valid,   // N_p strobe
  output logic                 raw_bit,     // raw random bit
  output logic                 raw_valid,   // raw bit strobe
  output logic                 alarm_tot,   // Total failure alarm
  output logic                 alarm_ol,    // Online test alarm
  output logic [2*CNT_W+7:0]   avar_q8,     // Allan variance estimate * 256
  output logic                 avar_valid   // estimate strobe
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_OUT-1:0] clk1;
  logic             lock1;
  logic             lock0;
  logic [0:0]       pll0_clk;

  pll_model #(
    .F_IN_MHZ(F_IN_MHZ), .M(M1), .N(N1), .C(C1), .N_OUT(N_OUT),
    .JITTER_PS(JITTER1_PS), .DUTY(DUTY1), .PHASE_PS(PHASE1_PS)
  ) u_pll1 (
    .clk_in(clk_in), .areset(!rst_n), .clk_out(clk1), .locked(lock1)
  );

  if (USE_PLL0) begin : g_pll0
    pll_model #(
      .F_IN_MHZ(F_IN_MHZ), .M(M0), .N(N0), .C(C0), .N_OUT(1),
      .JITTER_PS(JITTER0_PS), .DUTY(0.5), .PHASE_PS(0.0)
    ) u_pll0 (
      .clk_in(clk_in), .areset(!rst_n), .clk_out(pll0_clk), .locked(lock0)
    );
    assign clk0 = pll0_clk[0];
  end else begin : g_no_pll0
    assign pll0_clk = 1'b0;
    assign lock0    = 1'b1;
    assign clk0     = clk_in;
  end

  assign pll_locked = lock1 & lock0;

  pll_trng_core #(
    .KD(KD), .N_OUT(N_OUT), .W(CNT_W), .L_MIN(L_MIN), .FIFO_D(L_MIN),
    .N_AVAR(N_AVAR), .VMIN_Q8(VMIN_Q8), .VMAX_Q8(VMAX_Q8)
  ) u_core (
    .clk0(clk0), .rst_n(rst_n & pll_locked), .clk1(clk1), .pll_locked(pll_locked),
    .dff_out(dff_out), .cnt(cnt), .cnt_valid(cnt_valid),
    .raw_bit(raw_bit), .raw_valid(raw_valid),
    .alarm_tot(alarm_tot), .alarm_ol(alarm_ol),
    .avar_q8(avar_q8), .avar_valid(avar_valid)
  );
endmodule
