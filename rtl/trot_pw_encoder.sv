// trot_pw_encoder: pulse width encoder of the TROT noise source.
//
// Turns the n sampled TDC bits C[0..n-1] into one raw bit and its validity.
// At the sampling instant the delay line holds a run of zeros (the pulse
// between edges beta and alpha) framed by ones. The raw bit is the parity of
// the pulse width: with n even, the XOR of all bits equals the parity of the
// number of zeros, so bubbles inside the code do not change the result and no
// bin reordering is needed. The capture is valid only when the first and the
// last bin hold 1 and at least one bin in between holds 0; otherwise the
// pulse ran off the line or was not formed (for example after the three edges
// collapsed into one).
//
// Purely combinational. Both equations follow the reference design; nothing
// here is added.
module trot_pw_encoder #(
  parameter int unsigned N = trot_pkg::N_BINS   // number of TDC bins, even
) (
  input  logic [N-1:0] c,          // sampled bins, c[0] nearest the line input
  output logic         raw_bit,    // XOR of all bins
  output logic         raw_valid   // c[0] & c[N-1] & (some zero in c[N-2:1])
);
  timeunit 1ps;
  timeprecision 1fs;

  always_comb begin
    raw_bit   = ^c;
    raw_valid = c[0] & c[N-1] & ~(&c[N-2:1]);
  end

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("trot_pw_encoder: N must be even and at least 4");
  end
endmodule
