// trot_top: complete TROT true random number generator.
//
// A three-edge ring oscillator is run for a short accumulation time t_acc
// (4 system clock cycles, 32 ns) and stopped for one cycle. The relative
// positions of its last three edges, captured by a time-to-digital converter,
// give one raw bit per t_acc + T_CLK (25 Mbit/s at 125 MHz) with min-entropy
// of at least 0.770 per bit. Post-processing with the generator matrix of the
// [24,12,8] Golay code turns every 24 raw bits into 12 internal bits with
// min-entropy rate above 0.999 (12.5 Mbit/s).
//
// Blocks: trot_run_ctrl (Run pattern), trot_noise_source (oscillator, TDC,
// pulse width encoder, capture, oscillation counter), trot_total_failure_test
// (alarm on a low oscillation count) and trot_golay_postproc. The raw stream
// is also brought out, for health tests outside this design.
//
// Interface: all outputs are in the system clock domain except cnt_live.
// pp_valid and raw_valid are one-cycle strobes. Reset is synchronous, active
// high, and must be held for at least two clock cycles. The behavioural
// models inside the noise source make this top a simulation model; the
// parameters of the models are brought out so that testbenches can stress
// the oscillator.
module trot_top #(
  parameter int unsigned N              = trot_pkg::N_BINS,
  parameter int unsigned M              = trot_pkg::CNT_W,
  parameter int unsigned ACC_CYCLES     = trot_pkg::ACC_CYCLES,
  parameter int unsigned CNT_MIN        = trot_pkg::cnt_min(ACC_CYCLES),
  parameter real         STAGE_DELAY_PS = trot_pkg::RO_STAGE_DELAY_PS,
  parameter real         JS_FS          = trot_pkg::JITTER_STRENGTH_FS,
  parameter real         JITTER_SCALE   = 1.0,
  parameter real         BIN_DELAY_PS   = trot_pkg::BIN_DELAY_PS,
  parameter real         BIN_SPREAD_PS  = 0.0
) (
  input  logic         clk,         // system clock, 125 MHz nominal
  input  logic         rst,         // synchronous reset, active high
  output logic         pp_bit,      // internal (post-processed) random bit
  output logic         pp_valid,    // strobe for pp_bit
  output logic         raw_bit,     // raw random bit
  output logic         raw_valid,   // strobe for raw_bit
  output logic         run,         // ring oscillator enable
  output logic [M-1:0] cnt_sample,  // oscillation count of the latest run
  output logic         alarm,       // total failure: count below CNT_MIN
  output logic [M-1:0] cnt_live,    // ripple counter, oscillator domain
  output logic [N-1:0] tdc_code     // TDC snapshot, oscillator domain
);
  timeunit 1ps;
  timeprecision 1fs;

  logic acc_last;

  trot_run_ctrl #(.ACC_CYCLES(ACC_CYCLES)) u_ctrl (
    .clk(clk), .rst(rst), .run(run), .acc_last(acc_last)
  );

  trot_noise_source #(
    .N(N), .M(M), .STAGE_DELAY_PS(STAGE_DELAY_PS), .JS_FS(JS_FS),
    .JITTER_SCALE(JITTER_SCALE), .BIN_DELAY_PS(BIN_DELAY_PS),
    .BIN_SPREAD_PS(BIN_SPREAD_PS)
  ) u_ns (
    .clk(clk), .rst(rst), .run(run), .raw_bit_sys(raw_bit),
    .raw_valid_sys(raw_valid), .cnt(cnt_live), .tdc_code(tdc_code)
  );

  trot_total_failure_test #(.M(M), .CNT_MIN(CNT_MIN)) u_tft (
    .clk(clk), .rst(rst), .sample(acc_last), .cnt(cnt_live),
    .cnt_sample(cnt_sample), .alarm(alarm)
  );

  trot_golay_postproc u_pp (
    .clk(clk), .rst(rst), .raw_bit(raw_bit), .raw_valid(raw_valid),
    .pp_bit(pp_bit), .pp_valid(pp_valid)
  );
endmodule
