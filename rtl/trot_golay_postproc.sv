// trot_golay_postproc: post-processing with the generator matrix of the
// [24,12,8] extended Golay code.
//
// Every 24 valid raw bits x0..x23 give 12 internal bits y = G*x with
// G = [A | I12], A the 12x12 circulant whose row i is its first row rotated
// right by i. So y_i = x_(12+i) XOR (row i of A) . (x0..x11). Because any
// non-zero combination of outputs is an XOR of at least d = 8 raw bits, the
// bias of the output shrinks to the power of 8 (piling-up lemma); with raw
// min-entropy >= 0.770 the output min-entropy rate is >= 0.999.
//
// Architecture (as in the reference design): twelve registers Q0..Q11, all
// enabled by raw_valid, and a mod-24 counter of valid raw bits.
//  * Fill phase (count 0..11): raw bits shift in at Q0; after 12 bits
//    Qk holds x_(11-k). Output validity is 0.
//  * Output phase (count 12..23): a multiplexer at the Q0 input closes the
//    registers into a circular shift register. The output bit is the incoming
//    raw bit XORed with the registers at fixed tap positions. The taps are Q_t
//    for every column j = 11 - t where the first row of A holds a one
//    (Q3, Q5, Q6, Q7, Q8, Q10, Q11); each rotation of the ring steps to the
//    next row of the circulant.
// The output bit and its validity are registered: they appear one cycle after
// the raw bit that completes them. One output bit per two valid raw bits, so
// 12.5 Mbit/s from a 25 Mbit/s raw stream. Reset values are this design's own.
module trot_golay_postproc
  import trot_pkg::*;
#(
  parameter logic [GOLAY_K-1:0] A_ROW0 = GOLAY_A_ROW0   // first row of A, column j at bit j
) (
  input  logic clk,         // system clock
  input  logic rst,         // synchronous reset, active high
  input  logic raw_bit,     // raw random bit (system clock domain)
  input  logic raw_valid,   // one-cycle strobe per raw bit
  output logic pp_bit,      // post-processed (internal) random bit
  output logic pp_valid     // one-cycle strobe per internal bit
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K = GOLAY_K;

  // Register Q_t is a tap when column 11 - t of the first row of A is one.
  function automatic logic [K-1:0] tap_mask(input logic [K-1:0] row0);
    logic [K-1:0] m;
    for (int t = 0; t < K; t++) m[t] = row0[K-1-t];
    return m;
  endfunction

  localparam logic [K-1:0] TAPS = tap_mask(A_ROW0);

  logic [K-1:0] q;          // q[k] is register Qk
  logic [4:0]   cnt;        // valid raw bits modulo 24
  logic         out_phase;  // count >= 12: ring closed, output valid

  assign out_phase = (cnt >= 5'd12);

  always_ff @(posedge clk) begin
    if (rst) begin
      q        <= '0;
      cnt      <= '0;
      pp_bit   <= 1'b0;
      pp_valid <= 1'b0;
    end else begin
      if (raw_valid) begin
        q   <= {q[K-2:0], out_phase ? q[K-1] : raw_bit};
        cnt <= (cnt == 5'd23) ? 5'd0 : cnt + 5'd1;
      end
      pp_bit   <= raw_bit ^ (^(q & TAPS));
      pp_valid <= raw_valid & out_phase;
    end
  end
endmodule
