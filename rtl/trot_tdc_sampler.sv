// trot_tdc_sampler: the n D flip-flops of the time-to-digital converter.
//
// Every flip-flop samples one delay-line bin on the falling edge of the
// ring-oscillator stage C signal. The last falling edge of stage C before
// the oscillator is stopped (edge gamma) leaves the delay-line snapshot that
// the pulse width encoder turns into a raw bit; when Run is low the stage C
// output stays high, so the snapshot is held until the next run.
//
// Interface: clk_c is the stage C output (not the system clock), dline the
// delay line, c the registered snapshot. The asynchronous clear rst is this
// design's own addition: it plays the role of the FPGA power-up value 0,
// which makes the first snapshot read as invalid.
module trot_tdc_sampler #(
  parameter int unsigned N = trot_pkg::N_BINS
) (
  input  logic         clk_c,   // stage C output, sampled on its falling edge
  input  logic         rst,     // asynchronous clear, active high
  input  logic [N-1:0] dline,    // delay-line bins
  output logic [N-1:0] c        // captured TDC code C[0..N-1]
);
  timeunit 1ps;
  timeprecision 1fs;

  always_ff @(negedge clk_c or posedge rst) begin
    if (rst) c <= '0;
    else     c <= dline;
  end
endmodule
