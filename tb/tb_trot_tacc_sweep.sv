// tb_trot_tacc_sweep: the generator at several accumulation times t_acc
// (8, 16, 32, 64, 96 and 160 ns, i.e. ACC_CYCLES = 1, 2, 4, 8, 12, 20 at
// 8 ns), the range over which the entropy of the raw bits was evaluated.
//
// For each instance it checks: one raw bit per ACC_CYCLES + 1 cycles and
// one internal bit per two valid raw bits; every internal bit against
// y = [A | I12] * x computed here; the oscillation count after t_acc within
// 1.5 of t_acc / T_3RO (T_3RO = 4 stage delays = 1042.57 ps); no alarm
// (beyond the first, uninitialised count), since the default threshold
// scales with t_acc. It prints the fraction of ones per
// setting (the bias falls as jitter accumulates).
module tb_trot_tacc_sweep;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = trot_pkg::N_BINS;
  localparam int unsigned M = trot_pkg::CNT_W;
  localparam int unsigned K = trot_pkg::GOLAY_K;
  localparam logic [K-1:0] ROW0 = trot_pkg::GOLAY_A_ROW0;
  localparam real T3RO = 4.0 * trot_pkg::RO_STAGE_DELAY_PS;
  localparam int NCFG = 6;
  localparam int ACC[NCFG] = '{1, 2, 4, 8, 12, 20};
  localparam int BITS = 120;     // raw bits per setting

  logic clk = 1'b0, rst = 1'b0;
  always #4000 clk = ~clk;

  int checks = 0, failures = 0;
  bit done [NCFG];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic         pp_bit, pp_valid, raw_bit, raw_valid, run, alarm;
    logic [M-1:0] cnt_sample, cnt_live;
    logic [N-1:0] tdc_code;

    trot_top #(.ACC_CYCLES(ACC[g])) u_top (.*);

    logic [2*K-1:0] x;
    logic exp_q[$];
    int nx = 0, raw_n = 0, ones = 0, pp_n = 0, cyc = 0, last_raw = -1, alarms = 0, counts = 0;
    logic run_q = 1'b1;

    always @(posedge clk) begin
      if (!rst && !done[g]) begin
        cyc++;
        if (run_q == 1'b0 && run) begin
          // a reset cycle just ended
          check(last_raw < 0 || raw_valid == 1'b0 || (cyc - last_raw) % (ACC[g] + 1) == 0,
                $sformatf("t_acc %0d: raw grid", ACC[g]));
        end
        if (raw_valid) begin
          last_raw = cyc;
          raw_n++;
          ones += raw_bit;
          x[nx] = raw_bit;
          if (nx >= K) begin
            logic y;
            y = x[nx];
            for (int j = 0; j < K; j++) y ^= ROW0[(j - (nx - K) + K) % K] & x[j];
            exp_q.push_back(y);
          end
          nx = (nx == 2 * K - 1) ? 0 : nx + 1;
        end
        if (pp_valid) begin
          pp_n++;
          check(exp_q.size() > 0 && pp_bit === exp_q.pop_front(), $sformatf("t_acc %0d: internal bit", ACC[g]));
        end
        if (alarm) alarms++;
        if (!run && cyc > 30) begin
          real expc;
          expc = ACC[g] * 8000.0 / T3RO;
          counts++;
          check(real'(cnt_sample) > expc - 1.5 && real'(cnt_sample) < expc + 1.5,
                $sformatf("t_acc %0d: count %0d, expected about %0.1f", ACC[g], cnt_sample, expc));
        end
        run_q = run;
        if (raw_n == BITS) begin
          done[g] = 1'b1;
          check(pp_n + exp_q.size() == (BITS / (2 * K)) * K + ((nx > K) ? nx - K : 0), $sformatf("t_acc %0d: internal count", ACC[g]));
          check(cyc <= (BITS + 2) * (ACC[g] + 1) + 10, $sformatf("t_acc %0d: %0d cycles for %0d raw bits", ACC[g], cyc, BITS));
          check(alarms <= 1, $sformatf("t_acc %0d: %0d alarms", ACC[g], alarms));
          check(counts > 0, "counts checked");
          $display("t_acc %3d ns: %0d raw bits in %0d cycles, ones %0d, %0d internal bits, %0d alarms",
                   ACC[g] * 8, raw_n, cyc, ones, pp_n, alarms);
        end
      end
    end
  end

  initial begin
    bit all;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    do begin
      @(posedge clk);
      all = 1'b1;
      foreach (done[i]) all &= done[i];
    end while (!all);
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
