// trot_run_ctrl: generates the ring-oscillator enable Run.
//
// Run is high for ACC_CYCLES system clock cycles (the accumulation time
// t_acc, 32 ns = 4 cycles at 8 ns) and then low for exactly one cycle, the
// reset cycle that makes consecutive raw bits independent and lets the pulse
// width encoder settle. One raw bit is therefore produced every
// ACC_CYCLES + 1 cycles: 25 Mbit/s at 125 MHz. The pattern follows the
// reference design; the state counter that produces it is this design's own.
//
// Outputs are registered. acc_last is high during the last accumulation
// cycle, i.e. the rising clock edge at its end is the one at which Run falls;
// a register enabled by acc_last samples quantities "after t_acc". Reset
// holds Run low; the first accumulation starts on the first edge after reset
// is released.
module trot_run_ctrl #(
  parameter int unsigned ACC_CYCLES = trot_pkg::ACC_CYCLES   // t_acc / T_CLK, >= 1
) (
  input  logic clk,        // system clock
  input  logic rst,        // synchronous reset, active high
  output logic run,        // ring oscillator enable
  output logic acc_last    // last cycle of the accumulation
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned SW = $clog2(ACC_CYCLES + 1);

  // phase = 0 .. ACC_CYCLES-1 while Run is high, ACC_CYCLES in the reset cycle
  logic [SW-1:0] phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= SW'(ACC_CYCLES);
      run   <= 1'b0;
    end else if (phase == SW'(ACC_CYCLES)) begin
      phase <= '0;
      run   <= 1'b1;
    end else begin
      phase <= phase + 1'b1;
      run   <= (phase != SW'(ACC_CYCLES - 1));
    end
  end

  assign acc_last = run && (phase == SW'(ACC_CYCLES - 1));

  initial begin
    assert (ACC_CYCLES >= 1) else $error("trot_run_ctrl: ACC_CYCLES must be >= 1");
  end
endmodule
