// tb_trot_pw_encoder: self-checking test of the pulse width encoder.
//
// Applies every pulse (start bin, width) that fits inside the 34-bin code,
// pulses with bubbles, codes that touch the ends, all-ones and all-zeros, and
// random codes. The expected raw bit is the parity of the number of zero
// bins, counted in a loop; the expected validity requires ones at both ends
// and at least one zero between them.
module tb_trot_pw_encoder;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = trot_pkg::N_BINS;

  logic [N-1:0] c;
  logic raw_bit, raw_valid;
  int checks = 0, failures = 0;

  trot_pw_encoder #(.N(N)) dut (.c(c), .raw_bit(raw_bit), .raw_valid(raw_valid));

  task automatic check_code(input logic [N-1:0] code);
    int zeros;
    logic exp_bit, exp_valid;
    c = code;
    #1;
    zeros = 0;
    for (int i = 0; i < N; i++) if (!code[i]) zeros++;
    exp_bit = zeros[0];
    exp_valid = code[0] && code[N-1] && (zeros > 0);
    checks++;
    if (raw_bit !== exp_bit || raw_valid !== exp_valid) begin
      failures++;
      if (failures < 10)
        $display("FAIL code=%b bit=%b/%b valid=%b/%b", code, raw_bit, exp_bit, raw_valid, exp_valid);
    end
  endtask

  initial begin
    // clean pulses
    for (int s = 0; s < N; s++)
      for (int w = 1; s + w <= N; w++) begin
        logic [N-1:0] code;
        code = '1;
        for (int k = s; k < s + w; k++) code[k] = 1'b0;
        check_code(code);
      end
    // bubbles around pulse edges (as in a real capture)
    for (int s = 2; s < N - 12; s++) begin
      logic [N-1:0] code;
      code = '1;
      for (int k = s; k < s + 8; k++) code[k] = 1'b0;
      code[s + 9] = 1'b0;       // bubble of 0 in the ones
      code[s + 3] = 1'b1;       // bubble of 1 in the zeros
      check_code(code);
    end
    check_code('1);
    check_code('0);
    repeat (2000) check_code({$urandom, $urandom});
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
