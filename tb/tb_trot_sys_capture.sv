// tb_trot_sys_capture: self-checking test of the system clock capture.
//
// Runs a Run pattern of four high cycles and one low cycle with random raw
// bits and validity that change while Run is high. Checks that the raw bit
// is loaded only at the edge ending a low-Run cycle and held otherwise, and
// that the validity is a one-cycle strobe at that edge.
module tb_trot_sys_capture;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 1'b0, rst = 1'b1, run = 1'b0, raw_bit = 1'b0, raw_valid = 1'b0;
  logic raw_bit_sys, raw_valid_sys;
  logic exp_bit, exp_valid;
  int checks = 0, failures = 0, strobes = 0;

  trot_sys_capture dut (.*);

  always #4000 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (raw_bit_sys !== 1'b0 || raw_valid_sys !== 1'b0) failures++;
    rst = 1'b0;
    exp_bit = 1'b0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      run = (cyc % 5) != 4;
      raw_bit = $urandom_range(1);
      raw_valid = $urandom_range(3) != 0;
      @(posedge clk);
      if (!run) exp_bit = raw_bit;
      exp_valid = !run && raw_valid;
      #1;
      checks++;
      if (raw_bit_sys !== exp_bit || raw_valid_sys !== exp_valid) begin
        failures++;
        $display("FAIL cyc %0d: bit %b/%b valid %b/%b", cyc, raw_bit_sys, exp_bit, raw_valid_sys, exp_valid);
      end
      strobes += raw_valid_sys;
    end
    checks++;
    if (strobes == 0 || strobes > 100) failures++;
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
