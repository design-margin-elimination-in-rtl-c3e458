// edff_tb: self-checking test of the error detection soft edge flip-flop model
// at 5 MHz (200 ns period). Two flip-flops share clock and data: one with the
// 5% window (10 ns) and one with a 25% window (50 ns), the ends of the range
// the delay line covers. Each test cycle flips the data
//   0: well before the rising edge (normal operation),
//   1: inside the 5% window after the edge (time borrowing),
//   2: after the edge, at a time that is inside the 25% window or beyond it,
//   3: not at all.
// Expected Q at the end of the high phase and the error flag just before the
// next edge are worked out from the data change time and the window alone:
// data inside the window reaches Q at once and raises err; data beyond it
// waits for the next edge and raises nothing. The error flag must be cleared
// right after the next edge, and Q_b must always be the complement of Q.
`timescale 1ns / 1ps
module edff_tb;

  localparam int unsigned TCLK_PS = 200000;
  localparam real         HALF    = 100.0;

  logic clk = 1'b0;
  always #(HALF) clk = ~clk;

  logic d = 1'b0;
  logic q5, qb5, err5, q25, qb25, err25;
  int unsigned checks = 0, failures = 0;
  int unsigned n_mask = 0, n_late = 0;

  edff #(.TCLK_PS(TCLK_PS), .WINDOW_PCT(5)) dut5 (
    .clk, .d, .d_b(~d), .q(q5), .q_b(qb5), .err(err5));
  edff #(.TCLK_PS(TCLK_PS), .WINDOW_PCT(25)) dut25 (
    .clk, .d, .d_b(~d), .q(q25), .q_b(qb25), .err(err25));

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   sc;
    real  t;
    logic old_d, in5, in25;
    // settle: two quiet cycles
    repeat (2) @(posedge clk);
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      sc    = (k < 4) ? k : $urandom_range(0, 3);
      old_d = d;
      in5   = 1'b0;
      in25  = 1'b0;
      t     = 0.0;
      if (sc == 0) begin
        #(50.0) d = ~d;
        @(posedge clk);
      end else begin
        @(posedge clk);
        if (sc == 1) begin
          t = 0.5 + real'($urandom_range(0, 80)) / 10.0;       // 0.5 .. 8.5 ns
          in5 = 1'b1;
          in25 = 1'b1;
        end else if (sc == 2) begin
          t = $urandom_range(0, 1) ? 15.0 + real'($urandom_range(0, 30))
                                   : 55.0 + real'($urandom_range(0, 25));
          in25 = (t < 50.0);
        end
        if (sc == 1 || sc == 2) #(t) d = ~d;
      end
      if (in5) n_mask++;
      if (sc == 2 && !in25) n_late++;
      // end of the high phase: data in the window has reached Q
      #(90.0 - t);
      check("q 5%",  q5,  (sc == 0 || in5)  ? d : old_d);
      check("q 25%", q25, (sc == 0 || in25) ? d : old_d);
      check("qb 5%", qb5, ~q5);
      check("qb 25%", qb25, ~q25);
      // just before the next edge: error flags
      #(105.0);
      check("err 5%",  err5,  in5);
      check("err 25%", err25, in25);
      // after the next edge: flags cleared, late data captured
      @(posedge clk);
      #(1.0);
      check("err 5% cleared",  err5,  1'b0);
      check("err 25% cleared", err25, 1'b0);
      check("q 5% next",  q5,  d);
      check("q 25% next", q25, d);
    end
    checks++;
    if (n_mask == 0 || n_late == 0) begin
      failures++;
      $display("FAIL scenario coverage mask=%0d late=%0d", n_mask, n_late);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
