// tb_trot_total_failure_test: self-checking test of the oscillation-count
// alarm. Drives random counts, with and without the sample strobe, and checks
// the captured count and the alarm strobe against the threshold.
module tb_trot_total_failure_test;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned M = trot_pkg::CNT_W;
  localparam int unsigned CNT_MIN = trot_pkg::CNT_MIN;

  logic clk = 1'b0, rst = 1'b1, sample = 1'b0;
  logic [M-1:0] cnt = '0, cnt_sample, exp_cnt;
  logic alarm, exp_alarm;
  int checks = 0, failures = 0, alarms = 0;

  trot_total_failure_test dut (.*);

  always #4000 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    exp_cnt = '0;
    for (int i = 0; i < 1000; i++) begin
      sample = $urandom_range(1);
      cnt = M'($urandom_range(0, 40));
      if (i == 3) cnt = M'(CNT_MIN);
      if (i == 4) cnt = M'(CNT_MIN - 1);
      if (i == 3 || i == 4) sample = 1'b1;
      @(posedge clk);
      if (sample) exp_cnt = cnt;
      exp_alarm = sample && (cnt < CNT_MIN);
      #1;
      checks++;
      if (cnt_sample !== exp_cnt || alarm !== exp_alarm) begin
        failures++;
        $display("FAIL i=%0d cnt=%0d sample=%b: got %0d/%b", i, cnt, sample, cnt_sample, alarm);
      end
      alarms += alarm;
    end
    checks++;
    if (alarms == 0) failures++;
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
