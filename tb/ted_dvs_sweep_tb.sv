// ted_dvs_sweep_tb: runs the voltage scaling loop of the whole system at two
// more clock frequencies, 7.5 MHz (the minimum-energy point of the chip) and
// 20 MHz, each with 32 error detection flip-flops to keep the run short.
// Each experiment (dvs_point) lowers the supply from 500 mV until masked
// errors appear and must settle at the delay model's point of first failure
// for its clock, with no timing error escaping the flip-flops. Under the same
// delay model these points are about 318 mV and 422 mV; the chip was measured
// at 306 mV and 422 mV for these clocks.
`timescale 1ns / 1ps
module ted_dvs_sweep_tb;

  logic        done_a, done_b;
  int unsigned checks_a, failures_a, mv_a, checks_b, failures_b, mv_b;
  int unsigned checks = 0, failures = 0;

  dvs_point #(.TCLK_PS(133333), .N(32)) u_7m5 (
    .done(done_a), .checks(checks_a), .failures(failures_a), .settled_mv(mv_a));
  dvs_point #(.TCLK_PS(50000), .N(32)) u_20m (
    .done(done_b), .checks(checks_b), .failures(failures_b), .settled_mv(mv_b));

  initial begin : watchdog
    #(5ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (done_a && done_b);
    checks   = checks_a + checks_b + 1;
    failures = failures_a + failures_b;
    // the faster clock needs the higher supply
    if (mv_b <= mv_a) begin
      failures++;
      $display("FAIL 20 MHz settled at %0d mV, not above 7.5 MHz at %0d mV", mv_b, mv_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
