// tb_tbase_counter -- self-checking test of the T-base counter.
// Runs the default K_D = 435 counter for several pattern periods and checks
// the count against a reference counter, that `period_end` comes exactly
// every K_D cycles and only at count K_D-1, and that reset restarts it.
module tb_tbase_counter;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;

  localparam int unsigned KD = CFG_A_KD;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [CNT_W-1:0] count;
  logic period_end;
  int checks = 0, failures = 0;
  int ref_count = 0;
  int last_end = -1;
  int cycle = 0;
  int ends = 0;

  always #500 clk = ~clk;

  tbase_counter dut (.clk(clk), .rst_n(rst_n), .count(count), .period_end(period_end));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      check(int'(count) == ref_count, "count matches reference");
      check(period_end == (ref_count == int'(KD) - 1), "period_end only at K_D-1");
      if (period_end) begin
        if (last_end >= 0) check(cycle - last_end == int'(KD), "period_end spacing is K_D cycles");
        last_end = cycle;
        ends++;
      end
      ref_count = (ref_count == int'(KD) - 1) ? 0 : ref_count + 1;
    end
    cycle++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    repeat (5 * KD + 17) @(posedge clk);
    // Reset in the middle of a period restarts the count.
    #100 rst_n = 1'b0;
    ref_count = 0;
    last_end = -1;
    @(posedge clk);
    #100 check(count == 0, "reset clears the count");
    rst_n = 1'b1;
    repeat (3 * KD) @(posedge clk);
    check(ends >= 7, "enough periods observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
