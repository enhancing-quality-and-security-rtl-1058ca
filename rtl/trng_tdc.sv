// trng_tdc -- m-bit time-to-digital converter of the PLL-TRNG.
//
// Replaces the XOR decimator of the original generator: during each pattern
// period T_P it counts how many sampler outputs x_i were 1. In the cycle
// where the time base flags the end of the period, the count including that
// last sample is registered as the counter value N_p and `cnt_valid` pulses
// for one clk0 cycle (one cycle after `period_end`). The accumulator restarts
// from 0 for the next period, so every sample belongs to exactly one period.
// The first period after reset is counted but not delivered: it contains the
// samples that were still in the cleared sampler pipeline, so its value is
// not a genuine counter value (this is this design's choice).
// The least significant bit cnt[0] = N_p mod 2 equals the XOR of the K_D
// samples and is the raw random bit. The counting principle and the use of
// cnt[0] follow the generator; register timing is this design's choice.
module trng_tdc
  import pll_trng_pkg::*;
#(
  parameter int unsigned W = CNT_W        // converter width m
) (
  input  logic         clk,               // clk0
  input  logic         rst_n,             // asynchronous active-low reset
  input  logic         x,                 // sampler output x_i
  input  logic         period_end,        // last cycle of T_P (from the time base)
  output logic [W-1:0] cnt,               // counter value N_p
  output logic         cnt_valid,         // one-cycle strobe for a new N_p
  output logic         raw_bit            // cnt[0], raw random bit R_p
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0] acc;
  logic [W-1:0] acc_next;
  logic         primed;      // first (incomplete) period has passed

  assign acc_next = acc + W'(x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      cnt_valid <= 1'b0;
      primed    <= 1'b0;
    end else begin
      cnt_valid <= period_end & primed;
      if (period_end) begin
        primed <= 1'b1;
        if (primed) cnt <= acc_next;
        acc <= '0;
      end else begin
        acc <= acc_next;
      end
    end
  end

  assign raw_bit = cnt[0];
endmodule
