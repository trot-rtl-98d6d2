// tb_trot_ripple_counter: self-checking test of the 9-bit ripple counter.
//
// Applies bursts of random numbers of rising edges (including bursts past
// the 512 wrap) and compares the count with the number of edges modulo 2^m;
// checks that the clear zeroes the count and blocks counting while held.
module tb_trot_ripple_counter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned M = trot_pkg::CNT_W;

  logic         clk_c = 1'b1, clr = 1'b0;
  logic [M-1:0] cnt;
  int checks = 0, failures = 0;

  trot_ripple_counter #(.M(M)) dut (.clk_c(clk_c), .clr(clr), .cnt(cnt));

  task automatic pulses(input int n);
    repeat (n) begin
      #260 clk_c = 1'b0;
      #260 clk_c = 1'b1;
    end
  endtask

  initial begin
    #10 clr = 1'b1;
    #100;
    checks++;
    if (cnt !== '0) failures++;
    pulses(5);              // clear held: no counting
    checks++;
    if (cnt !== '0) begin failures++; $display("FAIL counted while cleared"); end
    for (int t = 0; t < 40; t++) begin
      int n;
      n = (t == 5) ? 700 : $urandom_range(0, 60);
      clr = 1'b1;
      #100 clr = 1'b0;
      #100;
      pulses(n);
      #100;
      checks++;
      if (cnt !== M'(n)) begin
        failures++;
        $display("FAIL after %0d edges: cnt=%0d", n, cnt);
      end
    end
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
