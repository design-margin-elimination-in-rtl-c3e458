// edff_timing_ctrl: behavioural model of the timing/control block of one error
// detection flip-flop. It derives from the clock a slave clock `sclk` (slave
// latch transparent while high) and a master enable `mclk` (master latch
// transparent while high) that overlap for a window right after each rising
// clock edge. The overlap is made by delaying the clock through a biased delay
// line of WIN_PS; the design description lets it scale from 3% to 25% of the clock period
// under test and uses 5% in timing analysis. `window` is high during the
// overlap and enables the error latch.
// Timing: sclk = clk; mclk = not(clk delayed by WIN_PS); window = sclk & mclk.
// The analog bias of the delay line is represented by the parameter only.
`timescale 1ns / 1ps
module edff_timing_ctrl #(
  parameter int unsigned WIN_PS = 10000
) (
  input  logic clk,
  output logic sclk,
  output logic mclk,
  output logic window
);

  logic clk_dl;  // delay line output

  initial clk_dl = 1'b0;
  always @(clk) clk_dl <= #(WIN_PS * 1ps) clk;

  assign sclk   = clk;
  assign mclk   = ~clk_dl;
  assign window = sclk & mclk;

endmodule
