// pll_model -- behavioural model of an FPGA phase-locked loop (not synthesizable).
//
// Models a locked PLL as seen by the TRNG: from the input clock of frequency
// F_IN_MHZ it produces N_OUT output clocks of frequency
//   f_out = M / (N * C) * f_in,
// the relation of the usual divider structure (input divider N, loop divider
// M, output divider C). Output k is delayed by k * 180/N_OUT degrees. Each
// edge is placed at its ideal time plus an independent Gaussian deviation
// of standard deviation JITTER_PS: the PLL loop keeps the thermal jitter
// bounded, so edges do not drift (no accumulation), and the period ratio
// between two models driven by the same input is exact. DUTY is the high
// fraction of the output period, PHASE_PS an extra start delay. The outputs
// start on the first rising clk_in edge after `areset` is released and
// `locked` (low from time zero and during reset) goes high LOCK_CYCLES input
// cycles later. The phase detector, charge pump, loop filter, VCO and
// post-VCO divider are not modelled individually; the lock time and the Gaussian edge model are this model's
// choices. Time unit 1 ps, precision 1 fs.
module pll_model #(
  parameter real         F_IN_MHZ    = 125.0, // input frequency (used for the period)
  parameter int unsigned M           = 26,    // loop (multiplication) factor
  parameter int unsigned N           = 5,     // input division factor
  parameter int unsigned C           = 3,     // output division factor
  parameter int unsigned N_OUT       = 1,     // number of phase-shifted outputs
  parameter real         JITTER_PS   = 14.0,  // rms edge jitter
  parameter real         DUTY        = 0.5,   // duty cycle alpha
  parameter real         PHASE_PS    = 0.0,   // start offset of output 0
  parameter int unsigned LOCK_CYCLES = 16     // input cycles until locked
) (
  input  logic             clk_in,   // input (reference) clock
  input  logic             areset,   // asynchronous reset, active high
  output logic [N_OUT-1:0] clk_out,  // output clocks
  output logic             locked    // lock indicator
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_IN  = 1.0e6 / F_IN_MHZ;                          // ps
  localparam real T_OUT = T_IN * real'(N) * real'(C) / real'(M);    // ps

  // Approximately standard normal value: sum of 12 uniform values minus 6.
  function automatic real gauss();
    real g = -6.0;
    for (int i = 0; i < 12; i++) g += real'($urandom) / 4294967296.0;
    return g;
  endfunction

  // Lock indicator.
  int unsigned lock_count;
  initial begin
    lock_count = 0;
    locked     = 1'b0;
  end
  always @(posedge clk_in or posedge areset) begin
    if (areset) begin
      lock_count <= 0;
      locked     <= 1'b0;
    end else if (lock_count < LOCK_CYCLES) begin
      lock_count <= lock_count + 1;
    end else begin
      locked <= 1'b1;
    end
  end

  for (genvar k = 0; k < N_OUT; k++) begin : g_out
    logic ck;
    assign clk_out[k] = ck;

    initial begin
      realtime t_ref, t_edge;
      longint unsigned e;
      real d;
      ck = 1'b0;
      forever begin
        @(posedge clk_in iff !areset);
        t_ref = $realtime + PHASE_PS + real'(k) * T_OUT / (2.0 * real'(N_OUT));
        e = 0;
        while (!areset) begin
          t_edge = t_ref + real'(e) * T_OUT + JITTER_PS * gauss();
          d = t_edge - $realtime;
          if (d > 0.0) #(d);
          ck = 1'b1;
          t_edge = t_ref + (real'(e) + DUTY) * T_OUT + JITTER_PS * gauss();
          d = t_edge - $realtime;
          if (d > 0.0) #(d);
          ck = 1'b0;
          e++;
        end
      end
    end
  end
endmodule
