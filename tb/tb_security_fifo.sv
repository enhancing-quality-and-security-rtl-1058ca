// tb_security_fifo -- self-checking test of the security FIFO (DEPTH = 24).
// Writes random bits at irregular intervals, checks that nothing comes out
// before DEPTH bits are held, that afterwards each write releases exactly
// the bit written DEPTH writes earlier, and that a flush discards the held
// bits and blocks output while it is asserted.
module tb_security_fifo;
  timeunit 1ps;
  timeprecision 1fs;
  import pll_trng_pkg::*;

  localparam int unsigned DEPTH = TOT_L_MIN;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en = 1'b0, wr_bit = 1'b0, flush = 1'b0;
  logic rd_valid, rd_bit;
  logic [$clog2(DEPTH+1)-1:0] level;
  bit   model[$];
  int   checks = 0, failures = 0;
  int   released = 0;
  bit   exp_valid = 1'b0;
  bit   exp_bit = 1'b0;

  always #500 clk = ~clk;

  security_fifo dut (.clk(clk), .rst_n(rst_n), .wr_en(wr_en), .wr_bit(wr_bit),
                     .flush(flush), .rd_valid(rd_valid), .rd_bit(rd_bit), .level(level));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Model update on each edge, comparison of the registered outputs after it.
  always @(posedge clk) begin
    if (rst_n) begin
      exp_valid = 1'b0;
      if (flush) model.delete();
      else if (wr_en) begin
        model.push_back(wr_bit);
        if (model.size() > DEPTH) begin
          exp_valid = 1'b1;
          exp_bit   = model.pop_front();
        end
      end
      #1;
      check(rd_valid == exp_valid, "rd_valid as expected");
      if (exp_valid) begin
        check(rd_bit == exp_bit, "released bit is the one written DEPTH writes earlier");
        released++;
      end
      check(int'(level) == model.size(), "level matches");
    end
  end

  task automatic write_bits(int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_bit = 1'($urandom);
      @(negedge clk);
      wr_en = 1'b0;
      repeat ($urandom % 3) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #100 rst_n = 1'b1;
    write_bits(DEPTH);
    check(released == 0, "nothing released before DEPTH bits are held");
    write_bits(100);
    check(released == 100, "one bit released per write once full");
    @(negedge clk) flush = 1'b1;
    write_bits(10);               // writes during flush are discarded
    @(negedge clk) flush = 1'b0;
    check(level == 0, "flush empties the FIFO");
    released = 0;
    write_bits(DEPTH + 5);
    check(released == 5, "refills before releasing again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(1000.0 * 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
