// online_test -- Allan-variance test on the TDC counter values.
//
// The variance of the counter value N_p grows with the jitter, so a lower
// bound on the variance guarantees the minimal jitter the entropy bound was
// computed for. The test estimates the Allan variance
//   AVAR = 1/2 * E[(N_{p+1} - N_p)^2]
// over windows of N_AVAR consecutive differences (4096 by default): each new
// counter value is subtracted from the previous one, the difference squared
// (one multiplier) and accumulated. At the end of a window the sum S gives
// AVAR = S / (2*N_AVAR); the estimate is output as `avar_q8` (AVAR * 256) with
// a one-cycle `avar_valid`, and the alarm is raised when AVAR < VMIN_Q8/256 or,
// if VMAX_Q8 is not 0, when AVAR > VMAX_Q8/256. Windows follow each other
// without a gap; the first counter value after reset only primes the
// difference, so the first estimate comes with the (N_AVAR+1)-th value, one
// clk0 cycle after its strobe. The comparison is exact (S*256 against
// V*2*N_AVAR). The Allan-variance statistic, the window of 4096 values and
// the threshold 1.1 follow the generator; the fixed-point format, the
// optional upper bound encoding and the sticky alarm are this design's
// choices. N_AVAR must be a power of two.
module online_test
  import pll_trng_pkg::*;
#(
  parameter int unsigned W       = CNT_W,        // counter value width
  parameter int unsigned N_AVAR  = AVAR_N,       // differences per estimate
  parameter int unsigned VMIN_Q8 = AVAR_VMIN_Q8, // minimal AVAR * 256
  parameter int unsigned VMAX_Q8 = 0             // maximal AVAR * 256, 0 = no upper bound
) (
  input  logic            clk,
  input  logic            rst_n,       // asynchronous active-low reset
  input  logic [W-1:0]    cnt,         // counter value N_p
  input  logic            cnt_valid,   // new N_p strobe
  output logic            alarm,       // online test alarm (sticky)
  output logic            avar_valid,  // new estimate strobe
  output logic [2*W+7:0]  avar_q8      // last estimate, AVAR * 256 (truncated)
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned LN    = $clog2(N_AVAR);
  localparam int unsigned SUM_W = 2 * W + LN;
  localparam logic [63:0] LIM_LO = 64'(VMIN_Q8) * 64'(2 * N_AVAR);
  localparam logic [63:0] LIM_HI = 64'(VMAX_Q8) * 64'(2 * N_AVAR);

  logic [W-1:0]       prev;
  logic               have_prev;
  logic [LN-1:0]      idx;          // differences accumulated in this window
  logic [SUM_W-1:0]   acc;
  logic signed [W:0]  diff;
  logic signed [2*W+1:0] prod;
  logic [2*W-1:0]     sq;
  logic [SUM_W-1:0]   sum_now;
  logic [63:0]        sum_q8;

  initial begin
    assert (N_AVAR >= 2 && (N_AVAR & (N_AVAR - 1)) == 0)
      else $error("online_test: N_AVAR must be a power of two");
  end

  always_comb begin
    diff    = $signed({1'b0, cnt}) - $signed({1'b0, prev});
    prod    = diff * diff;                  // evaluated at 2W+2 bits
    sq      = (2*W)'(unsigned'(prod));
    sum_now = acc + SUM_W'(sq);
    sum_q8  = {{(64 - SUM_W - 8){1'b0}}, sum_now, 8'd0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      have_prev  <= 1'b0;
      idx        <= '0;
      acc        <= '0;
      alarm      <= 1'b0;
      avar_valid <= 1'b0;
      avar_q8    <= '0;
    end else begin
      avar_valid <= 1'b0;
      if (cnt_valid) begin
        prev      <= cnt;
        have_prev <= 1'b1;
        if (have_prev) begin
          idx <= idx + 1'b1;
          if (idx == LN'(N_AVAR - 1)) begin
            acc        <= '0;
            avar_valid <= 1'b1;
            avar_q8    <= (2*W+8)'(sum_q8 >> (LN + 1));
            if (sum_q8 < LIM_LO) alarm <= 1'b1;
            if (VMAX_Q8 != 0 && sum_q8 > LIM_HI) alarm <= 1'b1;
          end else begin
            acc <= sum_now;
          end
        end
      end
    end
  end
endmodule
