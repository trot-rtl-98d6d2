// tb_trot_golay_postproc: self-checking test of the Golay post-processing.
//
// Reference: y = G*x with G = [A | I12] over GF(2), A[i][j] = row0[(j-i) mod
// 12], computed directly as a matrix-vector product for every block of 24
// valid raw bits x0..x23 (arrival order). Raw bits arrive with random gaps
// in the validity strobe. Checked: every output bit and its position in the
// stream, that pp_valid follows the raw strobes of x12..x23 by exactly one
// cycle, 12 outputs per 24 inputs, and that the first row of A gives a code
// of minimum distance 8 (every non-zero message has a codeword of weight at
// least 8, and some have exactly 8).
module tb_trot_golay_postproc;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned K = trot_pkg::GOLAY_K;
  localparam logic [K-1:0] ROW0 = trot_pkg::GOLAY_A_ROW0;
  localparam int BLOCKS = 40;

  logic clk = 1'b0, rst = 1'b1, raw_bit = 1'b0, raw_valid = 1'b0;
  logic pp_bit, pp_valid;
  int checks = 0, failures = 0;

  trot_golay_postproc dut (.*);

  always #4000 clk = ~clk;

  function automatic logic a_elem(input int i, input int j);
    return ROW0[(j - i + K) % K];
  endfunction

  logic exp_q[$];       // expected output bits in order
  int   n_in = 0, n_out = 0;
  logic prev_out_strobe = 1'b0;

  // output monitor
  always @(posedge clk) begin
    if (!rst) begin
      checks++;
      if (pp_valid !== prev_out_strobe) begin
        failures++;
        $display("FAIL pp_valid=%b, expected %b at output %0d", pp_valid, prev_out_strobe, n_out);
      end
      if (pp_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected output");
        end else begin
          logic e;
          e = exp_q.pop_front();
          if (pp_bit !== e) begin
            failures++;
            $display("FAIL output %0d: got %b expected %b", n_out, pp_bit, e);
          end
        end
        n_out++;
      end
    end
  end

  initial begin
    logic [2*K-1:0] x;
    int wmin, wmin_cnt;

    // minimum distance of the code [A | I]
    wmin = 99; wmin_cnt = 0;
    for (int m = 1; m < (1 << K); m++) begin
      int w;
      w = $countones(m);
      for (int j = 0; j < K; j++) begin
        logic s;
        s = 1'b0;
        for (int i = 0; i < K; i++) s ^= m[i] & a_elem(i, j);
        w += s;
      end
      if (w < wmin) begin wmin = w; wmin_cnt = 0; end
      if (w == wmin) wmin_cnt++;
    end
    checks++;
    if (wmin != 8) begin
      failures++;
      $display("FAIL minimum distance %0d", wmin);
    end

    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int b = 0; b < BLOCKS; b++) begin
      for (int i = 0; i < 2 * K; i++) x[i] = $urandom_range(1);
      // expected outputs of this block
      for (int i = 0; i < K; i++) begin
        logic y;
        y = x[K + i];
        for (int j = 0; j < K; j++) y ^= a_elem(i, j) & x[j];
        exp_q.push_back(y);
      end
      for (int i = 0; i < 2 * K; i++) begin
        // random idle cycles (invalid raw bits) in between
        int gap;
        gap = (b % 4 == 0) ? 0 : $urandom_range(0, 3);
        repeat (gap) begin
          raw_valid <= 1'b0;
          raw_bit   <= $urandom_range(1);
          @(posedge clk);
          prev_out_strobe <= 1'b0;
        end
        raw_valid <= 1'b1;
        raw_bit   <= x[i];
        @(posedge clk);
        prev_out_strobe <= (i >= K);
        n_in++;
      end
    end
    raw_valid <= 1'b0;
    @(posedge clk);
    prev_out_strobe <= 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != BLOCKS * K || exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, n_in);
    end
    $display("code minimum weight %0d (%0d codewords), %0d raw -> %0d internal bits",
             wmin, wmin_cnt, n_in, n_out);
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
