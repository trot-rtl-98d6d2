// trot_ripple_counter: m-bit asynchronous ripple counter of the rising edges
// at the ring-oscillator stage C output.
//
// Bit 0 toggles on every rising edge of stage C, bit i toggles on every
// falling edge of bit i-1, so the count rises by one per oscillation without
// any system clock. Its value after the accumulation time, Cnt(t_acc), tells
// how many periods the edges have run (it sets the lower bound of the
// accumulated jitter variance) and serves as a total-failure indicator: if
// the three edges collapse into one, the count drops to about a third.
//
// Interface: clk_c is the stage C output, clr an asynchronous clear, held
// high while the oscillator is stopped so that each run counts from zero.
// The clear is this design's own choice; the reference design only names the
// counter and its use. The count is only meaningful to a reader in another
// clock domain once the oscillator has stopped or when sampled with that in
// mind: bits settle one after another.
module trot_ripple_counter #(
  parameter int unsigned M = trot_pkg::CNT_W   // counter width m
) (
  input  logic         clk_c,   // stage C output, counted on rising edges
  input  logic         clr,     // asynchronous clear, active high
  output logic [M-1:0] cnt      // oscillation count
);
  timeunit 1ps;
  timeprecision 1fs;

  // ck[i] clocks bit i: the stage C signal for bit 0, the inverted
  // previous bit (rising on its falling edge) for the others.
  logic [M:0] ck;
  assign ck[0] = clk_c;

  for (genvar i = 0; i < M; i++) begin : g_bit
    logic q;
    always_ff @(posedge ck[i] or posedge clr) begin
      if (clr) q <= 1'b0;
      else     q <= ~q;
    end
    assign ck[i+1] = ~q;
    assign cnt[i]  = q;
  end
endmodule
