// trot_sys_capture: moves the raw bit and its validity into the system clock
// domain.
//
// Two flip-flops on the system clock. Run is low for one system clock cycle
// after each accumulation; during that cycle the ring oscillator is stopped,
// the TDC snapshot is stable and the pulse width encoder has settled, so the
// rising clock edge that ends the cycle (and raises Run again) loads the
// result. The raw-bit flip-flop is enabled by not-Run, as in the reference
// design, and holds the bit through the next accumulation. The validity
// flip-flop is this design's variant: it loads raw_valid AND not-Run on every
// edge, so it is a one-cycle strobe per generated bit. A held validity would
// let the post-processing consume the same bit once per clock cycle, while
// the reference throughput (k/n)/(t_acc + T_CLK) consumes each raw bit once.
// The synchronous reset is also this design's own addition.
module trot_sys_capture (
  input  logic clk,            // system clock
  input  logic rst,            // synchronous reset, active high
  input  logic run,            // ring oscillator enable; capture when low
  input  logic raw_bit,        // from the pulse width encoder
  input  logic raw_valid,
  output logic raw_bit_sys,    // raw bit in the system clock domain
  output logic raw_valid_sys   // its validity; high for one cycle per bit
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(posedge clk) begin
    if (rst) begin
      raw_bit_sys   <= 1'b0;
      raw_valid_sys <= 1'b0;
    end else begin
      if (!run) raw_bit_sys <= raw_bit;
      raw_valid_sys <= raw_valid & ~run;
    end
  end
endmodule
