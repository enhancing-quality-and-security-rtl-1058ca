// tb_trng_tdc -- self-checking test of the m-bit time-to-digital converter.
// A reference T-base counter (K_D = 435) frames the periods; random sample
// streams with different densities (all zeros, all ones, sparse, half) are
// counted by an independent model and compared with cnt, raw_bit = cnt[0]
// and the one-cycle cnt_valid strobe, which must come K_D cycles apart.
// The first period after reset must not be delivered.
module tb_trng_tdc;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;

  localparam int unsigned KD = CFG_A_KD;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic x = 1'b0;
  logic period_end;
  logic [CNT_W-1:0] tcount;
  logic [CNT_W-1:0] cnt;
  logic cnt_valid, raw_bit;
  int checks = 0, failures = 0;
  int ones = 0;
  int expected[$];
  int nvalid = 0;
  int last_valid = -1;
  int cycle = 0;
  int density = 50;   // percent of ones
  int e;
  bit primed_ref = 1'b0;   // the first period after reset is not delivered

  always #500 clk = ~clk;

  tbase_counter u_tb (.clk(clk), .rst_n(rst_n), .count(tcount), .period_end(period_end));
  trng_tdc dut (.clk(clk), .rst_n(rst_n), .x(x), .period_end(period_end),
                .cnt(cnt), .cnt_valid(cnt_valid), .raw_bit(raw_bit));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cycle);
    end
  endtask

  // Reference model: count the ones seen at each edge inside a period.
  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      if (cnt_valid) begin
        check(expected.size() > 0, "strobe matches a finished period");
        if (expected.size() > 0) begin
          e = expected.pop_front();
          check(int'(cnt) == e, $sformatf("cnt %0d == expected %0d", cnt, e));
          check(raw_bit == e[0], "raw bit is the counter LSB");
        end
        if (last_valid >= 0) check(cycle - last_valid == int'(KD), "one value per K_D cycles");
        last_valid = cycle;
        nvalid++;
      end
      ones += int'(x);
      if (period_end) begin
        if (primed_ref) expected.push_back(ones);
        primed_ref = 1'b1;
        ones = 0;
      end
    end
  end

  // Stimulus changes away from the sampling edge.
  always @(negedge clk) begin
    x <= ($urandom % 100) < density;
  end

  initial begin
    repeat (3) @(posedge clk);
    #100 rst_n = 1'b1;
    density = 0;   repeat (2 * KD) @(posedge clk);
    density = 100; repeat (2 * KD) @(posedge clk);
    density = 3;   repeat (3 * KD) @(posedge clk);
    density = 50;  repeat (10 * KD) @(posedge clk);
    check(nvalid >= 15, "enough counter values produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 30000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
