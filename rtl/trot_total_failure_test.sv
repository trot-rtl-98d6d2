// trot_total_failure_test: alarm on a collapsed ring oscillator.
//
// If the three edges collide before a raw bit is produced (environmental
// stress or a frequency-injection attack), the oscillator falls into
// single-edge mode and the number of rising edges counted at stage C during
// t_acc drops to about a third of its normal value. This block samples the
// ripple counter in the last accumulation cycle, at the clock edge where Run
// falls, and flags every raw bit whose count is below CNT_MIN.
//
// The reference design states only that the counter "can be used to raise
// the alarm"; the sampling point, the threshold and the one-cycle alarm
// strobe are this design's choices. The count crosses from the oscillator's
// clock domain; a sample taken while a ripple is in flight can be off, which
// a threshold this far from the nominal count tolerates.
//
// Timing: cnt_sample and alarm update at the edge that ends the cycle with
// sample high; alarm is then high for one cycle.
module trot_total_failure_test #(
  parameter int unsigned M       = trot_pkg::CNT_W,   // counter width
  parameter int unsigned CNT_MIN = trot_pkg::CNT_MIN  // lowest healthy count
) (
  input  logic         clk,          // system clock
  input  logic         rst,          // synchronous reset, active high
  input  logic         sample,       // high in the last accumulation cycle
  input  logic [M-1:0] cnt,          // ripple counter value
  output logic [M-1:0] cnt_sample,   // Cnt(t_acc) of the latest raw bit
  output logic         alarm         // one-cycle strobe: count below CNT_MIN
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt_sample <= '0;
      alarm      <= 1'b0;
    end else begin
      alarm <= 1'b0;
      if (sample) begin
        cnt_sample <= cnt;
        alarm      <= (cnt < M'(CNT_MIN));
      end
    end
  end
endmodule
