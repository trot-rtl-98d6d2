// tb_trot_delay_line: self-checking test of the TDC delay line model.
//
// Drives stage C and stage F by hand. Checks: with C low the line holds all
// ones; after C rises with F low a front of zeros reaches bin k after
// (k+1) bin delays; a later rise of F sends a front of ones behind it, so a
// snapshot shows ones, a run of zeros of the expected width at the expected
// place, and ones; when C falls the constant 1 refills the line.
module tb_trot_delay_line;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = trot_pkg::N_BINS;
  localparam real DB = trot_pkg::BIN_DELAY_PS;

  logic c = 1'b0, f = 1'b1;
  logic [N-1:0] dline;
  int checks = 0, failures = 0;

  trot_delay_line u_dut (.stage_c(c), .stage_f(f), .dline(dline));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: %b", what, dline);
    end
  endtask

  // expected code: bins [0, ones_end) are 1 (refilled by the second front),
  // bins [ones_end, zeros_end) 0, the rest 1
  function automatic logic [N-1:0] pulse(input int ones_end, input int zeros_end);
    logic [N-1:0] v;
    for (int k = 0; k < N; k++) v[k] = !(k >= ones_end && k < zeros_end);
    return v;
  endfunction

  initial begin
    #1000;
    check(dline == '1, "idle all ones");
    for (int t = 0; t < 30; t++) begin
      int za, zb;        // bins passed by the zero front and the ones front
      real ta, tb;
      f = 1'b0;
      #300;
      // alpha: C rises, F low
      c = 1'b1;
      ta = real'($urandom_range(200, 900));
      tb = real'($urandom_range(50, 150)) + 0.5 * DB;
      #(tb);
      f = 1'b1;                       // beta
      #(ta);
      za = int'($floor((tb + ta) / DB));
      zb = int'($floor(ta / DB));
      if (za > N) za = N;
      if (zb > N) zb = N;
      check(dline == pulse(zb, za), $sformatf("pulse snapshot (%0d..%0d)", zb, za));
      c = 1'b0;                       // gamma
      #(N * DB + 100);
      check(dline == '1, "refilled after C falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
