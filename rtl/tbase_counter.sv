// tbase_counter -- time base of the PLL-TRNG.
//
// Counts reference-clock (clk0) cycles modulo K_D, so that one count cycle
// lasts exactly one pattern period T_P = K_D * T0 of the coherently sampled
// clock. `period_end` is high during the last clk0 cycle of every period
// (count = K_D-1) and is used to close the TDC accumulation window. The
// counter restarts at 0 on the next cycle, so `period_end` repeats every K_D
// cycles exactly; the first one comes K_D cycles after reset is released.
// Count range (0 .. K_D-1) and the 9-bit width follow the generator's
// description; the synchronous single-cycle strobe and the active-low
// asynchronous reset are this design's choices.
module tbase_counter
  import pll_trng_pkg::*;
#(
  parameter int unsigned KD = CFG_A_KD,   // TRNG division factor K_D
  parameter int unsigned W  = CNT_W       // counter width
) (
  input  logic         clk,        // clk0, reference clock
  input  logic         rst_n,      // asynchronous active-low reset
  output logic [W-1:0] count,      // position inside the pattern period
  output logic         period_end  // last cycle of the pattern period
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam logic [W-1:0] LAST = W'(KD - 1);

  initial begin
    assert (KD >= 2 && KD <= (1 << W)) else $error("tbase_counter: K_D out of range");
  end

  assign period_end = (count == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          count <= '0;
    else if (period_end) count <= '0;
    else                 count <= count + 1'b1;
  end
endmodule
