// trot_ring_osc: behavioural model of the three-edge ring oscillator (not
// synthesizable; on the FPGA each stage is one LUT placed by hand).
//
// Six stages in a ring: A, C and E are NAND gates with the enable Run as
// second input, B, D and F are non-inverting buffers. A = NAND(Run, F),
// B = A, C = NAND(Run, B), D = C, E = NAND(Run, D), F = E. While Run is low
// every NAND output is 1 and the ring rests at all ones. When Run rises all
// three NANDs fall at once, so three edges (origins 0, 1 and 2) travel the
// ring together. Every node then toggles every two stage delays: the
// three-edge period is 4 stage delays, three times faster than the
// single-edge period T_1RO = 12 stage delays, and stage F lags stage C by one
// stage delay (90 degrees). Edges that come closer than one stage delay
// swallow each other, as in a real gate; after such a collision the ring
// continues in single-edge mode.
//
// Timing model: every transition is delayed by STAGE_DELAY_PS plus
// independent Gaussian jitter of variance J_S * STAGE_DELAY_PS per stage,
// so each edge's jitter variance grows linearly with its travel time, as the
// stochastic model of the design assumes. J_S = 9.7 fs and T_1RO = 3127.7 ps
// are the measured values of the reference FPGA. JITTER_SCALE (1.0 for the
// real device) multiplies the jitter standard deviation; testbenches raise it
// to provoke collisions. The Gaussian is approximated by the sum of twelve
// uniform variables. The stage delay is the same for rising and falling
// edges, a simplification of this model.
//
// Ports: run in, stage_c and stage_f out (the two taps the TDC uses), plus
// all six stage outputs for observation.
module trot_ring_osc #(
  parameter real STAGE_DELAY_PS = trot_pkg::RO_STAGE_DELAY_PS,  // mean stage delay
  parameter real JS_FS          = trot_pkg::JITTER_STRENGTH_FS, // jitter strength
  parameter real JITTER_SCALE   = 1.0                           // sigma multiplier
) (
  input  logic       run,       // enable, active high
  output logic       stage_c,   // output of stage C (second NAND)
  output logic       stage_f,   // output of stage F (third buffer)
  output logic [5:0] stages     // outputs of stages A..F at bits 0..5
);
  timeunit 1ps;
  timeprecision 1fs;

  // Per-stage jitter sigma in ps: sqrt(J_S * d), J_S in fs, d in ps.
  localparam real SIGMA_PS = JITTER_SCALE * $sqrt(JS_FS * 1.0e-15 * STAGE_DELAY_PS * 1.0e-12) * 1.0e12;

  logic a, b, c, d, e, f;

  // One stage delay with Gaussian jitter (never below 10% of nominal).
  function automatic real next_delay();
    real g;
    g = 0.0;
    for (int i = 0; i < 12; i++) g += real'($urandom_range(1000000)) / 1000000.0;
    g = STAGE_DELAY_PS + SIGMA_PS * (g - 6.0);
    return (g < 0.1 * STAGE_DELAY_PS) ? 0.1 * STAGE_DELAY_PS : g;
  endfunction

  initial begin
    a = 1'b1; b = 1'b1; c = 1'b1; d = 1'b1; e = 1'b1; f = 1'b1;
  end

  // Each stage waits one (jittered) delay after an input change and then
  // takes the value its inputs have at that moment. Two input changes within
  // one delay cancel: narrow pulses do not pass.
  always begin @(run or f); #(next_delay()); a = ~(run & f); end
  always begin @(a);        #(next_delay()); b = a;           end
  always begin @(run or b); #(next_delay()); c = ~(run & b); end
  always begin @(c);        #(next_delay()); d = c;           end
  always begin @(run or d); #(next_delay()); e = ~(run & d); end
  always begin @(e);        #(next_delay()); f = e;           end

  assign stage_c = c;
  assign stage_f = f;
  assign stages  = {f, e, d, c, b, a};
endmodule
