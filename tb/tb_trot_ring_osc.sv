// tb_trot_ring_osc: self-checking test of the three-edge ring oscillator
// model.
//
// Instance u_nom has the measured jitter of the reference device, instance
// u_hot 40 times that. Checks: with Run low every stage rests at 1; after
// Run rises the stage C period is the three-edge period 4 * d (1042.57 ps in
// the reference device, within 1%); every stage F edge follows the latest
// stage C edge by one stage delay (90 degrees); after Run falls the ring
// stops at all ones within a few stage delays; with heavy jitter the edges
// collide and the ring ends in single-edge mode, period 12 * d (3127.7 ps).
module tb_trot_ring_osc;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real D = trot_pkg::RO_STAGE_DELAY_PS;

  logic run = 1'b0;
  logic c_nom, f_nom, c_hot, f_hot;
  logic [5:0] s_nom, s_hot;
  int checks = 0, failures = 0;

  trot_ring_osc u_nom (.run(run), .stage_c(c_nom), .stage_f(f_nom), .stages(s_nom));
  trot_ring_osc #(.JITTER_SCALE(40.0)) u_hot (.run(run), .stage_c(c_hot), .stage_f(f_hot), .stages(s_hot));

  realtime last_c = 0, first_rise = 0, last_rise = 0;
  int      rises = 0, f_edges = 0, f_bad = 0;
  realtime hot_first = 0, hot_last = 0;
  int      hot_rises = 0;
  bit      measure = 1'b0, hot_measure = 1'b0;

  always @(c_nom) begin
    last_c = $realtime;
    if (measure && c_nom) begin
      if (rises == 0) first_rise = $realtime;
      last_rise = $realtime;
      rises++;
    end
  end

  always @(f_nom) begin
    if (measure) begin
      f_edges++;
      if ($realtime - last_c < 0.8 * D || $realtime - last_c > 1.2 * D) f_bad++;
    end
  end

  always @(posedge c_hot) begin
    if (hot_measure) begin
      if (hot_rises == 0) hot_first = $realtime;
      hot_last = $realtime;
      hot_rises++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    real period, hot_period;
    #5000;
    check(s_nom == 6'b111111 && s_hot == 6'b111111, "rest state all ones");
    run = 1'b1;
    #(5 * D);
    measure = 1'b1;
    #20000;
    measure = 1'b0;
    period = (last_rise - first_rise) / (rises - 1);
    $display("three-edge period %0.2f ps over %0d rising edges", period, rises);
    check(period > 0.99 * 4.0 * D && period < 1.01 * 4.0 * D, "three-edge period");
    check(f_edges > 30 && f_bad == 0, "stage F lags stage C by one stage delay");
    #200000;
    hot_measure = 1'b1;
    #100000;
    hot_measure = 1'b0;
    hot_period = (hot_last - hot_first) / (hot_rises - 1);
    $display("stressed oscillator period %0.2f ps", hot_period);
    check(hot_rises > 5 && hot_period > 0.9 * 12.0 * D && hot_period < 1.1 * 12.0 * D,
          "collapse into single-edge mode");
    run = 1'b0;
    #(20 * D);
    check(s_nom == 6'b111111 && s_hot == 6'b111111, "stops at all ones");
    rises = 0;
    measure = 1'b1;
    #5000;
    check(rises == 0, "no oscillation while Run is low");
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
