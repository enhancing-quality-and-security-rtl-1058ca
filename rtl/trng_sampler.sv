// trng_sampler -- coherent sampler of the PLL-TRNG.
//
// Each of the N_OUT phase-shifted outputs clk1[k] of PLL1 is used as data and
// sampled on the rising edge of the reference clock clk0 by two D flip-flops
// in series: the first captures the jittered clock level, the second gives a
// possible metastable state one clk0 period to resolve. The second-stage
// outputs s[k] are XORed into the single sampler output x (with N_OUT = 1,
// x = s[0]). x appears two clk0 cycles after the clk1 level was captured.
// The two-stage structure and the XOR of the n outputs follow the generator's
// architecture; the synchronous clear of both stages is this design's choice
// (it only makes the first two samples after reset defined).
module trng_sampler #(
  parameter int unsigned N_OUT = 1        // number n of PLL1 outputs sampled
) (
  input  logic             clk0,          // reference clock
  input  logic             rst_n,         // asynchronous active-low reset
  input  logic [N_OUT-1:0] clk1,          // jittered clocks, used as data
  output logic [N_OUT-1:0] s,             // resolved samples s_ik
  output logic             x              // sampler output x_i
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [N_OUT-1:0] stage1;

  always_ff @(posedge clk0 or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= '0;
      s      <= '0;
    end else begin
      stage1 <= clk1;
      s      <= stage1;
    end
  end

  assign x = ^s;
endmodule
