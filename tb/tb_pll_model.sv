// tb_pll_model -- self-checking test of the behavioural PLL model.
// Three instances share a 125 MHz input clock:
//   u_a : M/N/C = 26/5/3 (216.67 MHz), 14 ps jitter, one output;
//   u_b : same dividers, no jitter, two outputs (90 degree shift), duty 0.4;
//   u_c : M/N/C = 29/4/7 (129.46 MHz), no jitter.
// Checks: `locked` rises LOCK_CYCLES input cycles after reset; the edges of
// the jitter-free outputs sit at their ideal times (within 1 fs rounding);
// the rms deviation of the jittered edges from their ideal times is 14 ps
// within 10 %, with a mean near zero; the duty cycle and the phase shift of
// the second output are as set; the edge count of u_a and u_c over a long
// time has the ratio 728/435 of the TRNG configuration.
module tb_pll_model;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real T_IN = 8000.0;
  localparam real T_A  = T_IN * 15.0 / 26.0;
  localparam real T_C  = T_IN * 28.0 / 29.0;

  logic clk_in = 1'b0;
  logic areset = 1'b1;
  logic [0:0] ca;
  logic [1:0] cb;
  logic [0:0] cc;
  logic la, lb, lc;
  int checks = 0, failures = 0;
  realtime t_ref;
  int in_edges = 0;

  always #(T_IN / 2.0) clk_in = ~clk_in;

  pll_model #(.M(26), .N(5), .C(3), .JITTER_PS(14.0)) u_a (
    .clk_in(clk_in), .areset(areset), .clk_out(ca), .locked(la));
  pll_model #(.M(26), .N(5), .C(3), .N_OUT(2), .JITTER_PS(0.0), .DUTY(0.4), .PHASE_PS(100.0)) u_b (
    .clk_in(clk_in), .areset(areset), .clk_out(cb), .locked(lb));
  pll_model #(.M(29), .N(4), .C(7), .JITTER_PS(0.0)) u_c (
    .clk_in(clk_in), .areset(areset), .clk_out(cc), .locked(lc));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Jitter statistics of u_a rising edges.
  real sum_d = 0.0, sum_d2 = 0.0;
  int  na = 0;
  always @(posedge ca[0]) begin
    real dv;
    dv = ($realtime - t_ref) - real'(na) * T_A;
    sum_d += dv;
    sum_d2 += dv * dv;
    na++;
  end

  // Ideal edges of u_b (both outputs) and u_c.
  int nb0 = 0, nb1 = 0, nbf = 0, nc = 0;
  real max_err = 0.0;
  task automatic ideal(real t_ideal);
    real err;
    err = $realtime - t_ideal;
    if (err < 0.0) err = -err;
    if (err > max_err) max_err = err;
  endtask
  always @(posedge cb[0]) begin ideal(t_ref + 100.0 + real'(nb0) * T_A); nb0++; end
  always @(posedge cb[1]) begin ideal(t_ref + 100.0 + T_A / 4.0 + real'(nb1) * T_A); nb1++; end
  always @(negedge cb[0]) begin ideal(t_ref + 100.0 + (real'(nbf) + 0.4) * T_A); nbf++; end
  always @(posedge cc[0]) begin ideal(t_ref + real'(nc) * T_C); nc++; end

  always @(posedge clk_in) if (!areset) in_edges++;

  initial begin
    real mean, rms;
    #(3.3 * T_IN) areset = 1'b0;
    @(posedge clk_in);
    t_ref = $realtime;
    check(!la && !lb && !lc, "not locked right after reset");
    repeat (17) @(posedge clk_in);
    #1 check(la && lb && lc, "locked after LOCK_CYCLES input cycles");
    // Run for 3 pattern periods of the TRNG (T_P = 435 * T_C = 728 * T_A).
    #(t_ref + 3.0 * 435.0 * T_C + T_A / 2.0 - $realtime);
    check(nc == 3 * 435 + 1, $sformatf("u_c edge count %0d", nc));
    check(na == 3 * 728 + 1, $sformatf("u_a edge count %0d", na));
    check(nb0 == na && nb1 == na, "u_b outputs have the same frequency");
    check(max_err < 0.01, $sformatf("jitter-free edges at ideal times (max error %f ps)", max_err));
    mean = sum_d / real'(na);
    rms  = $sqrt(sum_d2 / real'(na) - mean * mean);
    check(rms > 12.6 && rms < 15.4, $sformatf("rms jitter %f ps close to 14 ps", rms));
    check(mean > -2.0 && mean < 2.0, $sformatf("mean edge deviation %f ps near 0", mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_IN * 100000.0);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
