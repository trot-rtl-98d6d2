// trot_pkg: constants shared by the TROT (three-edge ring oscillator TRNG with
// time-to-digital conversion) modules.
//
// The numbers are the ones of the reference FPGA build: a 125 MHz system
// clock (8 ns), 32 ns of jitter accumulation per raw bit (4 clock cycles),
// 34 delay-line bins, a 9-bit oscillation counter and post-processing with the
// generator matrix G = [A | I12] of the [24,12,8] extended Golay code.
// The total-failure threshold is this design's own choice (see cnt_min).
package trot_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Number of TDC bins (n). Each bin is two carry-chain multiplexer stages;
  // 33 bins cover one three-edge period, 34 keeps n even.
  localparam int unsigned N_BINS = 34;

  // Width m of the ripple counter at the output of stage C.
  localparam int unsigned CNT_W = 9;

  // Accumulation time t_acc in system clock cycles (32 ns / 8 ns).
  localparam int unsigned ACC_CYCLES = 4;

  // System clock period of the reference implementation, in picoseconds.
  localparam int unsigned CLK_PERIOD_PS = 8000;

  // Three-edge period T_3RO of the reference device, in femtoseconds.
  localparam longint unsigned T3RO_FS = 1042570;

  // Total-failure threshold on the oscillation count after t_acc: two thirds
  // of the three-edge count t_acc / T_3RO. In three-edge mode about
  // 32 ns / 1.04 ns = 30 rising edges reach stage C, in single-edge mode
  // about 32 ns / 3.13 ns = 10; the threshold (20 at 32 ns) splits the two.
  function automatic int unsigned cnt_min(input int unsigned acc_cycles);
    return int'((longint'(acc_cycles) * CLK_PERIOD_PS * 1000 * 2) / (3 * T3RO_FS));
  endfunction

  localparam int unsigned CNT_MIN = cnt_min(ACC_CYCLES);

  // Golay [24,12,8] code: message length K, block length N.
  localparam int unsigned GOLAY_K = 12;
  localparam int unsigned GOLAY_N = 24;

  // First row of the 12x12 circulant A, column j at bit j:
  // A[0] = 1 1 0 1 1 1 1 0 1 0 0 0 (columns 0..11). Row i is row 0 rotated
  // right by i, A[i][j] = A[0][(j - i) mod 12].
  localparam logic [GOLAY_K-1:0] GOLAY_A_ROW0 = 12'b0001_0111_1011;

  // Nominal timing of the reference implementation, in picoseconds.
  // Single-edge period T_1RO = 3127.7 ps = 12 stage delays.
  localparam real RO_STAGE_DELAY_PS = 3127.7 / 12.0;
  // Jitter strength J_S (variance growth of the white Gaussian jitter per
  // unit time), 9.7 fs.
  localparam real JITTER_STRENGTH_FS = 9.7;
  // Mean bin delay: one three-edge period (1042.57 ps) over 33 bins.
  localparam real BIN_DELAY_PS = 1042.57 / 33.0;
endpackage
