// pll_trng_core -- digital part of the enhanced PLL-TRNG (clk0 domain).
//
// Signal flow: the PLL1 outputs clk1[k] are sampled on clk0 by the
// two-flip-flop sampler and XORed into x_i (also brought out as `dff_out` for
// off-chip acquisition). The T-base counter cuts time into pattern periods of
// K_D clk0 cycles; over each period the m-bit TDC counts the ones of x_i and
// delivers the counter value N_p. Its LSB is the raw random bit, which waits
// in the security FIFO while the Total failure test (runs of identical N_p,
// PLL lock) and the Online test (Allan variance of N_p) inspect the full
// m-bit values. A bit leaves the FIFO on `raw_valid`/`raw_bit` only after
// L_MIN more counter values passed; either alarm flushes the FIFO and stops
// the output until reset. One raw bit per K_D clk0 cycles (R = f0 / K_D).
// `rst_n` is asserted asynchronously and released through a two-stage
// synchroniser on clk0. This structure follows the generator's block
// diagram; feeding the tests and the FIFO with the TDC's registered strobe
// (rather than the raw time-base signal) and flushing on both alarms are
// this design's choices.
module pll_trng_core
  import pll_trng_pkg::*;
#(
  parameter int unsigned KD      = CFG_A_KD,     // TRNG division factor K_D
  parameter int unsigned N_OUT   = 1,            // sampled PLL1 outputs n
  parameter int unsigned W       = CNT_W,        // TDC width m
  parameter int unsigned L_MIN   = TOT_L_MIN,    // Total failure threshold
  parameter int unsigned FIFO_D  = TOT_L_MIN,    // security FIFO depth
  parameter int unsigned N_AVAR  = AVAR_N,       // Online test window
  parameter int unsigned VMIN_Q8 = AVAR_VMIN_Q8, // Online test minimum * 256
  parameter int unsigned VMAX_Q8 = 0             // Online test maximum * 256, 0 = none
) (
  input  logic             clk0,        // reference clock
  input  logic             rst_n,       // asynchronous active-low reset
  input  logic [N_OUT-1:0] clk1,        // PLL1 outputs, sampled as data
  input  logic             pll_locked,  // AND of the PLL lock flags
  output logic             dff_out,     // sampler output x_i
  output logic [W-1:0]     cnt,         // counter value N_p
  output logic             cnt_valid,   // N_p strobe, once per K_D cycles
  output logic             raw_bit,     // raw random bit after the FIFO
  output logic             raw_valid,   // raw bit strobe
  output logic             alarm_tot,   // Total failure alarm
  output logic             alarm_ol,    // Online test alarm
  output logic [2*W+7:0]   avar_q8,     // last Allan variance estimate * 256
  output logic             avar_valid   // estimate strobe
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [1:0]       rst_sync;
  logic             rst_i_n;
  logic [N_OUT-1:0] s;
  logic             x;
  logic [W-1:0]     tb_count;
  logic             period_end;
  logic             tdc_raw;
  logic             alarm_run, alarm_lock;
  logic [$clog2(L_MIN+1)-1:0]  run_len;
  logic [$clog2(FIFO_D+1)-1:0] fifo_level;

  // Reset: asynchronous assertion, synchronous release.
  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) rst_sync <= '0;
    else        rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_i_n = rst_sync[1];

  trng_sampler #(.N_OUT(N_OUT)) u_sampler (
    .clk0 (clk0), .rst_n(rst_i_n), .clk1(clk1), .s(s), .x(x)
  );
  assign dff_out = x;

  tbase_counter #(.KD(KD), .W(W)) u_tbase (
    .clk(clk0), .rst_n(rst_i_n), .count(tb_count), .period_end(period_end)
  );

  trng_tdc #(.W(W)) u_tdc (
    .clk(clk0), .rst_n(rst_i_n), .x(x), .period_end(period_end),
    .cnt(cnt), .cnt_valid(cnt_valid), .raw_bit(tdc_raw)
  );

  total_failure_test #(.W(W), .L_MIN(L_MIN)) u_tot (
    .clk(clk0), .rst_n(rst_i_n), .cnt(cnt), .cnt_valid(cnt_valid),
    .pll_locked(pll_locked), .alarm(alarm_tot), .alarm_run(alarm_run),
    .alarm_lock(alarm_lock), .run_len(run_len)
  );

  online_test #(.W(W), .N_AVAR(N_AVAR), .VMIN_Q8(VMIN_Q8), .VMAX_Q8(VMAX_Q8)) u_ol (
    .clk(clk0), .rst_n(rst_i_n), .cnt(cnt), .cnt_valid(cnt_valid),
    .alarm(alarm_ol), .avar_valid(avar_valid), .avar_q8(avar_q8)
  );

  security_fifo #(.DEPTH(FIFO_D)) u_fifo (
    .clk(clk0), .rst_n(rst_i_n), .wr_en(cnt_valid), .wr_bit(tdc_raw),
    .flush(alarm_tot | alarm_ol), .rd_valid(raw_valid), .rd_bit(raw_bit),
    .level(fifo_level)
  );

  // The FIFO must hold at least the Total failure latency.
  initial begin
    assert (FIFO_D >= L_MIN) else $error("pll_trng_core: FIFO shallower than the test latency");
    assert (KD <= (1 << W) - 1) else $error("pll_trng_core: K_D does not fit the TDC");
  end

  // Every raw bit leaving the FIFO was written FIFO_D strobes earlier, so
  // nothing may leave once an alarm has been raised.
  a_no_release_after_alarm: assert property (
    @(posedge clk0) disable iff (!rst_i_n) raw_valid |-> !$past(alarm_tot || alarm_ol))
    else $error("pll_trng_core: raw bit released after an alarm");
endmodule
