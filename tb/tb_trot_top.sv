// tb_trot_top: end-to-end test of the complete generator.
//
// Two generators run side by side from one 125 MHz clock: u_nom with the
// measured jitter of the reference device, and u_hot whose oscillator jitter
// is 40 times larger, so that its three edges collide within t_acc (the
// effect of an attack or of failing silicon). The testbench keeps its own
// model of the post-processing: it collects u_nom's valid raw bits, forms
// y = [A | I12] * x for every 24 of them and compares each internal bit. It
// also checks the raw bit rate (one bit per 5 cycles), the internal rate
// (12 per 24 valid raw bits, 12.5 Mbit/s when all are valid), the oscillation
// count (30 or 31 in three-edge mode) and the alarm.
//
// Mechanisms that must each occur at least once, counted and reported:
// valid raw bit, rejected (invalid) raw bit, post-processing fill phase,
// post-processing output phase, completed 24-bit block (counter wrap),
// total-failure alarm, healthy count without alarm.
module tb_trot_top;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned N = trot_pkg::N_BINS;
  localparam int unsigned M = trot_pkg::CNT_W;
  localparam int unsigned K = trot_pkg::GOLAY_K;
  localparam logic [K-1:0] ROW0 = trot_pkg::GOLAY_A_ROW0;
  localparam int CYCLES = 3000;

  logic clk = 1'b0, rst = 1'b0;
  always #4000 clk = ~clk;

  logic         n_pp_bit, n_pp_valid, n_raw_bit, n_raw_valid, n_run, n_alarm;
  logic [M-1:0] n_cnt_sample, n_cnt_live;
  logic [N-1:0] n_tdc;
  logic         h_pp_bit, h_pp_valid, h_raw_bit, h_raw_valid, h_run, h_alarm;
  logic [M-1:0] h_cnt_sample, h_cnt_live;
  logic [N-1:0] h_tdc;

  trot_top u_nom (
    .clk(clk), .rst(rst), .pp_bit(n_pp_bit), .pp_valid(n_pp_valid),
    .raw_bit(n_raw_bit), .raw_valid(n_raw_valid), .run(n_run),
    .cnt_sample(n_cnt_sample), .alarm(n_alarm), .cnt_live(n_cnt_live), .tdc_code(n_tdc)
  );

  trot_top #(.JITTER_SCALE(40.0)) u_hot (
    .clk(clk), .rst(rst), .pp_bit(h_pp_bit), .pp_valid(h_pp_valid),
    .raw_bit(h_raw_bit), .raw_valid(h_raw_valid), .run(h_run),
    .cnt_sample(h_cnt_sample), .alarm(h_alarm), .cnt_live(h_cnt_live), .tdc_code(h_tdc)
  );

  int checks = 0, failures = 0;
  int m_valid = 0, m_invalid = 0, m_fill = 0, m_output = 0, m_block = 0,
      m_alarm = 0, m_healthy = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // reference post-processing
  logic [2*K-1:0] xblk;
  int           nx = 0;
  logic         exp_q[$];
  logic         h_run_q = 1'b1, n_run_q = 1'b1;
  int           pp_seen = 0, raw_seen = 0, cyc = 0, last_raw_cyc = -1;

  always @(posedge clk) begin
    if (!rst) begin
      cyc++;
      // raw bits of the nominal generator
      if (n_raw_valid) begin
        m_valid++;
        raw_seen++;
        if (last_raw_cyc >= 0) check((cyc - last_raw_cyc) % 5 == 0, "raw bits on the 5-cycle grid");
        last_raw_cyc = cyc;
        xblk[nx] = n_raw_bit;
        if (nx < K) m_fill++;
        else begin
          // y_i needs x0..x11 and x_(12+i) only: due as soon as x_(12+i) is in
          logic y;
          int i;
          i = nx - K;
          y = xblk[K + i];
          for (int j = 0; j < K; j++) y ^= ROW0[(j - i + K) % K] & xblk[j];
          exp_q.push_back(y);
          m_output++;
        end
        nx++;
        if (nx == 2 * K) begin
          nx = 0;
          m_block++;
        end
      end
      if (n_pp_valid) begin
        pp_seen++;
        if (exp_q.size() == 0) check(1'b0, "internal bit without reference");
        else check(n_pp_bit === exp_q.pop_front(), $sformatf("internal bit %0d", pp_seen));
      end
      // the stressed generator must not emit raw bits from a collapsed ring
      if (h_raw_valid) m_valid++;
      // a reset cycle ended at the previous edge without a validity strobe
      if (h_run_q == 1'b0 && h_run && !h_raw_valid) m_invalid++;
      if (n_run_q == 1'b0 && n_run && !n_raw_valid) m_invalid++;
      h_run_q = h_run;
      n_run_q = n_run;
      // total-failure test
      if (h_alarm) m_alarm++;
      if (n_alarm && cyc > 10) check(1'b0, $sformatf("false alarm, count %0d", n_cnt_sample));
      if (n_run === 1'b0 && n_cnt_sample != '0 && cyc > 10) begin
        check(n_cnt_sample == 30 || n_cnt_sample == 31, $sformatf("count %0d", n_cnt_sample));
        m_healthy++;
      end
    end
  end

  initial begin
    int h_valid_raw;
    #1 rst = 1'b1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    h_valid_raw = 0;
    fork
      forever begin @(posedge clk); if (h_raw_valid) h_valid_raw++; end
    join_none
    repeat (CYCLES) @(posedge clk);
    // a block in progress has produced (nx - K) outputs already
    check(pp_seen + exp_q.size() == m_block * K + ((nx > K) ? nx - K : 0) && exp_q.size() <= 1,
          "internal bit count");
    check(pp_seen >= (raw_seen / (2 * K)) * K, $sformatf("%0d internal bits for %0d raw", pp_seen, raw_seen));
    check(raw_seen >= (CYCLES / 5) * 9 / 10, $sformatf("raw rate: %0d bits in %0d cycles", raw_seen, CYCLES));
    check(h_valid_raw * 5 < CYCLES / 5, $sformatf("stressed generator let %0d raw bits through", h_valid_raw));
    $display("raw %0d, internal %0d in %0d cycles: %0.2f / %0.2f Mbit/s", raw_seen, pp_seen, CYCLES,
             raw_seen * 1000.0 / (CYCLES * 8.0), pp_seen * 1000.0 / (CYCLES * 8.0));
    $display("mechanisms: valid=%0d invalid=%0d fill=%0d output=%0d block=%0d alarm=%0d healthy=%0d",
             m_valid, m_invalid, m_fill, m_output, m_block, m_alarm, m_healthy);
    check(m_valid > 0,   "mechanism: valid raw bit");
    check(m_invalid > 0, "mechanism: rejected raw bit");
    check(m_fill > 0,    "mechanism: fill phase");
    check(m_output > 0,  "mechanism: output phase");
    check(m_block > 0,   "mechanism: 24-bit block completed");
    check(m_alarm > 0,   "mechanism: total-failure alarm");
    check(m_healthy > 0, "mechanism: healthy count");
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
