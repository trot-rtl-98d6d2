// tb_trot_top_full: one complete operation of the generator at its default
// parameters: from reset, 24 raw bits are generated and post-processed into
// 12 internal bits.
//
// Checks every internal bit against y = [A | I12] * x computed here from the
// raw bits, the timing (the first raw bit within 7 cycles of reset, then one
// every 5 cycles; internal bit i follows raw bit 12+i by one cycle), the rate of 12 internal bits per
// 120 cycles (12.5 Mbit/s at 125 MHz), the oscillation count and the absence
// of alarms.
module tb_trot_top_full;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = trot_pkg::N_BINS;
  localparam int unsigned M = trot_pkg::CNT_W;
  localparam int unsigned K = trot_pkg::GOLAY_K;
  localparam logic [K-1:0] ROW0 = trot_pkg::GOLAY_A_ROW0;

  logic clk = 1'b0, rst = 1'b0;
  always #4000 clk = ~clk;

  logic         pp_bit, pp_valid, raw_bit, raw_valid, run, alarm;
  logic [M-1:0] cnt_sample, cnt_live;
  logic [N-1:0] tdc_code;

  trot_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [2*K-1:0] x;
    int cyc, nx, ny, raw_cyc[2*K], pp_cyc[K];
    logic y;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    cyc = 0; nx = 0; ny = 0;
    while (ny < K && cyc < 2000) begin
      @(posedge clk);
      #1;
      cyc++;
      if (pp_valid) begin
        int i;
        i = ny;
        y = x[K + i];
        for (int j = 0; j < K; j++) y ^= ROW0[(j - i + K) % K] & x[j];
        check(pp_bit === y, $sformatf("internal bit %0d", i));
        check(nx == K + i + 1, $sformatf("internal bit %0d after raw bit %0d", i, nx - 1));
        pp_cyc[i] = cyc;
        ny++;
      end
      if (raw_valid) begin
        x[nx] = raw_bit;
        raw_cyc[nx] = cyc;
        nx++;
      end
      if (cyc > 10) check(!alarm, "no alarm");
      if (cyc > 10 && !run) check(cnt_sample == 30 || cnt_sample == 31,
                                  $sformatf("count %0d", cnt_sample));
    end
    check(ny == K, "12 internal bits");
    for (int i = 0; i < K; i++)
      check(pp_cyc[i] == raw_cyc[K + i] + 1, $sformatf("internal bit %0d latency", i));
    check((raw_cyc[2*K-1] - raw_cyc[0]) % 5 == 0 && raw_cyc[2*K-1] - raw_cyc[0] >= 5 * (2*K - 1),
          $sformatf("raw bit timing: first %0d last %0d", raw_cyc[0], raw_cyc[2*K-1]));
    check(raw_cyc[0] <= 7, $sformatf("first raw bit at cycle %0d", raw_cyc[0]));
    $display("24 raw bits in cycles %0d..%0d, 12 internal bits: %0.2f Mbit/s",
             raw_cyc[0], raw_cyc[2*K-1], K * 1000.0 / ((raw_cyc[2*K-1] - raw_cyc[0] + 5) * 8.0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
