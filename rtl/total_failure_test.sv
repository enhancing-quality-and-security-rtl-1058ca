// total_failure_test -- runs' length test on the TDC counter values.
//
// When the jitter source dies there are no contributing samples left and the
// counter value N_p stops changing. The test counts how many consecutive
// counter values are identical; when a run reaches L_MIN values
// (l_min(beta) from the stochastic model, 24 for a false alarm about once a
// day in Configuration A) the alarm is raised. As a complementary sub-test
// the PLL "locked" flag is watched: a PLL that is not locked also raises the
// alarm. The alarm is registered, rises one clk0 cycle after the strobe of
// the L_MIN-th identical value (latency L_MIN * K_D * T0 from the start of the
// run) and stays high until reset. The run-length principle, the threshold
// and the lock sub-test follow the generator; the sticky alarm, the separate
// cause flags and the saturating run counter are this design's choices.
module total_failure_test
  import pll_trng_pkg::*;
#(
  parameter int unsigned W     = CNT_W,     // counter value width
  parameter int unsigned L_MIN = TOT_L_MIN  // run length that raises the alarm
) (
  input  logic         clk,
  input  logic         rst_n,        // asynchronous active-low reset
  input  logic [W-1:0] cnt,          // counter value N_p
  input  logic         cnt_valid,    // new N_p strobe
  input  logic         pll_locked,   // PLL lock flag(s), high when locked
  output logic         alarm,        // total failure alarm (sticky)
  output logic         alarm_run,    // cause: run of L_MIN identical values
  output logic         alarm_lock,   // cause: PLL lost lock
  output logic [$clog2(L_MIN+1)-1:0] run_len  // current run length
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned RW = $clog2(L_MIN + 1);

  logic [W-1:0]  prev;
  logic          have_prev;
  logic [RW-1:0] run_next;

  initial begin
    assert (L_MIN >= 2) else $error("total_failure_test: L_MIN must be at least 2");
  end

  always_comb begin
    if (!have_prev || cnt != prev) run_next = RW'(1);
    else if (run_len == RW'(L_MIN)) run_next = run_len;     // saturate
    else                            run_next = run_len + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev       <= '0;
      have_prev  <= 1'b0;
      run_len    <= '0;
      alarm_run  <= 1'b0;
      alarm_lock <= 1'b0;
    end else begin
      if (cnt_valid) begin
        prev      <= cnt;
        have_prev <= 1'b1;
        run_len   <= run_next;
        if (run_next == RW'(L_MIN)) alarm_run <= 1'b1;
      end
      if (!pll_locked) alarm_lock <= 1'b1;
    end
  end

  assign alarm = alarm_run | alarm_lock;
endmodule
