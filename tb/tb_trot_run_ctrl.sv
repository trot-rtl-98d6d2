// tb_trot_run_ctrl: self-checking test of the Run generator.
//
// After reset Run must be low, then repeat four cycles high and one low;
// acc_last must mark exactly the fourth high cycle. Also checks the raw bit
// rate: one low-Run cycle per t_acc + T_CLK = 5 cycles (25 Mbit/s at 8 ns).
module tb_trot_run_ctrl;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned ACC = trot_pkg::ACC_CYCLES;

  logic clk = 1'b0, rst = 1'b1, run, acc_last;
  int checks = 0, failures = 0, lows = 0;

  trot_run_ctrl dut (.clk(clk), .rst(rst), .run(run), .acc_last(acc_last));

  always #4000 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (run !== 1'b0) failures++;
    rst = 1'b0;
    for (int cyc = 0; cyc < 500; cyc++) begin
      int ph;
      @(posedge clk);
      #1;
      ph = cyc % (ACC + 1);
      checks++;
      if (run !== (ph < ACC) || acc_last !== (ph == ACC - 1)) begin
        failures++;
        $display("FAIL cyc %0d: run=%b acc_last=%b", cyc, run, acc_last);
      end
      if (!run) lows++;
    end
    checks++;
    if (lows != 500 / (ACC + 1)) begin
      failures++;
      $display("FAIL rate: %0d reset cycles in 500", lows);
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
