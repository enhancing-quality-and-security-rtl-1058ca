// tb_trng_sampler -- self-checking test of the two-stage sampler.
// Drives two random data streams as "clk1" inputs (N_OUT = 2) and checks
// that each s[k] equals its input two clk0 edges earlier and that x is the
// XOR of the delayed samples. A second instance with the default N_OUT = 1
// checks x = s[0].
module tb_trng_sampler;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] d2;
  logic [1:0] s2;
  logic x2;
  logic [0:0] d1;
  logic [0:0] s1;
  logic x1;
  logic [1:0] h2 [2];
  logic       h1 [2];
  int checks = 0, failures = 0;
  int n = 0;

  always #500 clk = ~clk;

  trng_sampler #(.N_OUT(2)) dut2 (.clk0(clk), .rst_n(rst_n), .clk1(d2), .s(s2), .x(x2));
  trng_sampler dut1 (.clk0(clk), .rst_n(rst_n), .clk1(d1), .s(s1), .x(x1));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    d2 = 2'b00; d1 = 1'b0;
    repeat (2) @(posedge clk);
    #100 check(s2 == 2'b00 && x2 == 1'b0 && s1 == 1'b0, "reset clears both stages");
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      d2 = 2'($urandom);
      d1 = 1'($urandom);
      @(posedge clk);
      h2[1] = h2[0]; h2[0] = d2;
      h1[1] = h1[0]; h1[0] = d1[0];
      #100;
      if (i >= 1) begin
        check(s2 == h2[1], "s equals input two edges earlier (n=2)");
        check(x2 == ^h2[1], "x is the XOR of the samples (n=2)");
        check(s1[0] == h1[1] && x1 == h1[1], "x equals the sample (n=1)");
        n++;
      end
    end
    check(n == 1999, "all samples compared");
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
