// tb_trot_noise_source: self-checking test of the digital noise source with
// the measured parameters of the reference device.
//
// The testbench makes its own Run pattern (4 cycles high, 1 low, 8 ns clock).
// For every generated bit it checks, independently of the encoder, that the
// raw bit presented at the end of the reset cycle is the parity of the number
// of zeros in the TDC snapshot and that its validity means "ones at both ends,
// a zero in between"; that the validity is a one-cycle strobe, once per
// 5 cycles; that the snapshot holds one clean pulse whose width
// matches the one-stage-delay distance between alpha and beta (8 +/- 4 bins
// of ~31.6 ps); and that the oscillation count after t_acc is the three-edge
// count 32 ns / 1042.57 ps = 30 or 31. It also counts the ones to see that the
// bit is not stuck.
module tb_trot_noise_source;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = trot_pkg::N_BINS;
  localparam int unsigned M = trot_pkg::CNT_W;
  localparam int BITS = 300;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0;
  logic raw_bit_sys, raw_valid_sys;
  logic [M-1:0] cnt;
  logic [N-1:0] tdc_code;
  int checks = 0, failures = 0, valid_bits = 0, ones = 0;

  trot_noise_source dut (.*);

  always #4000 clk = ~clk;

  
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Run pattern: 4 cycles high, 1 cycle low
  int phase = 0;
  always @(posedge clk) begin
    if (rst) begin
      run <= 1'b0;
      phase <= 4;
    end else begin
      phase <= (phase == 4) ? 0 : phase + 1;
      run   <= (phase == 4) || (phase < 3);
    end
  end

  initial begin
    logic [M-1:0] count;
    count = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int b = 0; b < BITS; b++) begin
      logic [N-1:0] code;
      int zeros, first0, last0;
      logic exp_bit, exp_valid;
      // wait for the end of an accumulation (Run falls at this edge)
      do begin
        @(posedge clk);
        if (run) count = cnt;
      end while (!(run && phase == 3));
      @(posedge clk);                  // reset cycle ends at this edge
      code = tdc_code;
            #1;
      zeros = 0; first0 = -1; last0 = -1;
      for (int k = 0; k < N; k++)
        if (!code[k]) begin
          zeros++;
          if (first0 < 0) first0 = k;
          last0 = k;
        end
      exp_bit = zeros[0];
      exp_valid = code[0] && code[N-1] && zeros > 0;
      check(run === 1'b1, "Run high again after the reset cycle");
      check(raw_valid_sys === exp_valid, $sformatf("bit %0d validity", b));
      if (exp_valid) begin
        check(raw_bit_sys === exp_bit, $sformatf("bit %0d value", b));
        check(zeros >= 5 && zeros <= 12 && last0 - first0 + 1 == zeros,
              $sformatf("bit %0d pulse width %0d (code %b)", b, zeros, code));
        valid_bits++;
        ones += exp_bit;
      end
      @(posedge clk);
      #1;
      check(raw_valid_sys === 1'b0, "validity is a one-cycle strobe");
      if (b > 0)
        check(count == 30 || count == 31, $sformatf("bit %0d count %0d", b, count));
    end
    check(valid_bits > BITS * 9 / 10, $sformatf("valid bits %0d of %0d", valid_bits, BITS));
    check(ones > valid_bits / 5 && ones < valid_bits * 4 / 5, $sformatf("ones %0d of %0d", ones, valid_bits));
    $display("valid %0d of %0d, ones %0d", valid_bits, BITS, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
