// tb_trot_tdc_sampler: self-checking test of the TDC flip-flop bank.
//
// Drives random delay-line codes and a stage C clock. Checks that the code
// is taken only on falling edges of stage C, held across rising edges and
// line changes, and cleared by the asynchronous reset.
module tb_trot_tdc_sampler;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = trot_pkg::N_BINS;

  logic         clk_c, rst;
  logic [N-1:0] dline, c, expected;
  int checks = 0, failures = 0;

  trot_tdc_sampler #(.N(N)) dut (.clk_c(clk_c), .rst(rst), .dline(dline), .c(c));

  task automatic check(input logic [N-1:0] exp, input string what);
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL %s: c=%b expected %b", what, c, exp);
    end
  endtask

  initial begin
    clk_c = 1'b1; rst = 1'b1; dline = '1;
    #10;
    check('0, "reset clears");
    rst = 1'b0;
    #10;
    expected = '0;
    repeat (200) begin
      dline = {$urandom, $urandom};
      #50 clk_c = 1'b0;           // falling edge: capture
      expected = dline;
      #1 check(expected, "capture on falling edge");
      dline = ~dline;             // line moves on
      #50 clk_c = 1'b1;           // rising edge: no capture
      #1 check(expected, "hold on rising edge");
      dline = {$urandom, $urandom};
      #50 check(expected, "hold while line changes");
    end
    rst = 1'b1;
    #1 check('0, "asynchronous clear");
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
