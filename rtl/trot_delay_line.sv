// trot_delay_line: behavioural model of the TDC delay line (not
// synthesizable; on the FPGA it is a chain of 17 CARRY4 primitives).
//
// The line is a cascade of 2*N multiplexers. The first one selects, by the
// stage C signal, between the constant 1 (C low) and the stage F signal
// (C high); every later one has its select tied to 1 and passes the previous
// output on. Two consecutive multiplexers form one bin, whose output is a
// D input of the TDC sampler. So while C is low the line fills with ones;
// the rising edge alpha of C lets the low F signal in and zeros run down the
// line; the rising edge beta of F chases them with ones. The falling edge
// gamma of C then samples a run of zeros (the pulse) framed by ones.
//
// Timing model: every change at the line input walks down the line, bin by
// bin, with delay BIN_DELAY_R_PS for a 0->1 and BIN_DELAY_F_PS for a 1->0
// transition (transport delay: narrow pulses survive). BIN_SPREAD_PS adds a
// fixed, uniformly distributed per-bin mismatch drawn at time zero, to mimic
// the bin-to-bin non-uniformity of a real carry chain. The mean bin delay of
// one three-edge period over 33 bins follows the reference design; the
// default spread of 0 and the equal rise and fall delays are this model's
// choice.
module trot_delay_line #(
  parameter int unsigned N  = trot_pkg::N_BINS,      // number of bins
  parameter real BIN_DELAY_R_PS = trot_pkg::BIN_DELAY_PS,  // 0->1 delay per bin
  parameter real BIN_DELAY_F_PS = trot_pkg::BIN_DELAY_PS,  // 1->0 delay per bin
  parameter real BIN_SPREAD_PS  = 0.0                       // +/- mismatch per bin
) (
  input  logic         stage_c,   // select of the first multiplexer
  input  logic         stage_f,   // data input 1 of the first multiplexer
  output logic [N-1:0] dline      // bin outputs, bin 0 nearest the input
);
  timeunit 1ps;
  timeprecision 1fs;

  logic line_in;
  real  dr [N];
  real  df [N];

  assign line_in = stage_c ? stage_f : 1'b1;

  initial begin
    for (int k = 0; k < N; k++) begin
      real m;
      m = BIN_SPREAD_PS * (2.0 * real'($urandom_range(1000000)) / 1000000.0 - 1.0);
      dr[k] = BIN_DELAY_R_PS + m;
      df[k] = BIN_DELAY_F_PS + m;
    end
    dline = '1;
  end

  task automatic walk(input logic v);
    for (int k = 0; k < N; k++) begin
      #(v ? dr[k] : df[k]);
      dline[k] = v;
    end
  endtask

  always begin
    @(line_in);
    fork
      walk(line_in);
    join_none
  end
endmodule
