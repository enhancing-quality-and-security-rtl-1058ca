// security_fifo -- holding buffer for the raw random bits.
//
// Every raw bit R_p enters the FIFO when its counter value is produced and
// leaves it only after DEPTH further counter values have been checked by the
// embedded tests. With DEPTH equal to the Total failure threshold l_min, the
// first value of a run that triggers the alarm is still inside the FIFO when
// the alarm rises, so no bit of a failing run ever reaches the output.
// `flush` (driven by the alarms) empties the FIFO and suppresses output while
// it is high. Interface: one bit in per `wr_en`; `rd_valid` pulses one cycle
// after a write that found the FIFO full, with the oldest bit on `rd_bit`.
// The FIFO as such and the link between its depth and the test latency follow
// the generator; the shift-register form, the flush behaviour and the depth
// value are this design's choices.
module security_fifo
  import pll_trng_pkg::*;
#(
  parameter int unsigned DEPTH = TOT_L_MIN  // bits held back
) (
  input  logic clk,
  input  logic rst_n,        // asynchronous active-low reset
  input  logic wr_en,        // new raw bit available
  input  logic wr_bit,       // raw bit R_p
  input  logic flush,        // discard everything (alarm)
  output logic rd_valid,     // released bit strobe
  output logic rd_bit,       // released raw bit
  output logic [$clog2(DEPTH+1)-1:0] level  // number of bits held
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned LW = $clog2(DEPTH + 1);

  logic [DEPTH-1:0] mem;     // mem[0] newest, mem[DEPTH-1] oldest
  logic             full;

  assign full = (level == LW'(DEPTH));

  initial begin
    assert (DEPTH >= 2) else $error("security_fifo: DEPTH must be at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem      <= '0;
      level    <= '0;
      rd_valid <= 1'b0;
      rd_bit   <= 1'b0;
    end else begin
      rd_valid <= 1'b0;
      if (flush) begin
        level <= '0;
      end else if (wr_en) begin
        mem <= {mem[DEPTH-2:0], wr_bit};
        if (full) begin
          rd_valid <= 1'b1;
          rd_bit   <= mem[DEPTH-1];
        end else begin
          level <= level + 1'b1;
        end
      end
    end
  end
endmodule
