// trot_noise_source: the TROT digital noise source, entropy source plus
// digitization.
//
// While Run is high the three-edge ring oscillator (trot_ring_osc) runs and
// its three edges gather independent white Gaussian jitter. The delay line
// (trot_delay_line) is opened by the rising edge alpha of stage C and carries
// the stage F signal, whose rising edge beta follows about one stage delay
// later, so a pulse of zeros travels down the line. Every falling edge of
// stage C samples the line into the TDC flip-flops (trot_tdc_sampler); the
// last one before Run falls, gamma, leaves the final code. The positions of
// alpha and beta relative to gamma, and so the jitter of all three edges,
// decide the pulse width. The pulse width encoder (trot_pw_encoder) reduces
// the code to the parity of the pulse width and a validity flag, and
// trot_sys_capture loads both into the system clock domain at the end of the
// one-cycle reset period in which Run is low. A ripple counter on stage C
// (trot_ripple_counter) counts the oscillations during each run; it is
// cleared while Run is low (this design's choice).
//
// The oscillator and the delay line are behavioural models with delays, so
// this module simulates with timing but is not synthesizable as a whole; on
// an FPGA those two instances are replaced by placed LUTs and carry
// primitives. The structure follows the reference design; the asynchronous
// clear of the TDC flip-flops by rst is this design's addition.
//
// Timing: raw_bit_sys / raw_valid_sys change at the rising clock edge where
// Run rises again, i.e. one raw bit per t_acc + T_CLK.
module trot_noise_source #(
  parameter int unsigned N              = trot_pkg::N_BINS,
  parameter int unsigned M              = trot_pkg::CNT_W,
  parameter real         STAGE_DELAY_PS = trot_pkg::RO_STAGE_DELAY_PS,
  parameter real         JS_FS          = trot_pkg::JITTER_STRENGTH_FS,
  parameter real         JITTER_SCALE   = 1.0,
  parameter real         BIN_DELAY_PS   = trot_pkg::BIN_DELAY_PS,
  parameter real         BIN_SPREAD_PS  = 0.0
) (
  input  logic         clk,            // system clock
  input  logic         rst,            // reset, active high
  input  logic         run,            // ring oscillator enable
  output logic         raw_bit_sys,    // raw bit, system clock domain
  output logic         raw_valid_sys,  // one-cycle strobe per valid raw bit
  output logic [M-1:0] cnt,            // ripple counter (oscillator domain)
  output logic [N-1:0] tdc_code        // TDC snapshot C[0..N-1], for observation
);
  timeunit 1ps;
  timeprecision 1fs;

  logic         stage_c, stage_f;
  logic [5:0]   stages;
  logic [N-1:0] dline;
  logic         raw_bit, raw_valid;

  trot_ring_osc #(
    .STAGE_DELAY_PS(STAGE_DELAY_PS), .JS_FS(JS_FS), .JITTER_SCALE(JITTER_SCALE)
  ) u_ro (
    .run(run), .stage_c(stage_c), .stage_f(stage_f), .stages(stages)
  );

  trot_delay_line #(
    .N(N), .BIN_DELAY_R_PS(BIN_DELAY_PS), .BIN_DELAY_F_PS(BIN_DELAY_PS),
    .BIN_SPREAD_PS(BIN_SPREAD_PS)
  ) u_line (
    .stage_c(stage_c), .stage_f(stage_f), .dline(dline)
  );

  trot_tdc_sampler #(.N(N)) u_sampler (
    .clk_c(stage_c), .rst(rst), .dline(dline), .c(tdc_code)
  );

  trot_pw_encoder #(.N(N)) u_enc (
    .c(tdc_code), .raw_bit(raw_bit), .raw_valid(raw_valid)
  );

  trot_sys_capture u_cap (
    .clk(clk), .rst(rst), .run(run), .raw_bit(raw_bit), .raw_valid(raw_valid),
    .raw_bit_sys(raw_bit_sys), .raw_valid_sys(raw_valid_sys)
  );

  trot_ripple_counter #(.M(M)) u_cnt (
    .clk_c(stage_c), .clr(~run), .cnt(cnt)
  );

  logic unused_stages;
  assign unused_stages = ^stages;
endmodule
