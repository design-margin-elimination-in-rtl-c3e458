// edff_pipeline_tb: two error detection flip-flops in series (stage A feeds
// stage B through a path of delay D_AB), 5 MHz clock, 5% (10 ns) window.
// It checks the two pipeline effects of time borrowing:
//  1. Borrowing passes on: when A borrows time and the A->B path is nearly a
//     full period long, B's data arrives late as well; B masks it too and both
//     flag an error, and B still delivers the right value.
//  2. Without borrowing in A, the same near-critical A->B path arrives in time
//     and nobody flags.
//  3. Hold hazard: a path shorter than the window lets A's new value race
//     through B in the same cycle (B captures the value meant for the next
//     cycle and flags it). This is why such paths need padding to at least the
//     window; the test shows the hazard exists in the model.
`timescale 1ns / 1ps
module edff_pipeline_tb;

  localparam real T = 200.0;

  logic clk = 1'b0;
  always #(T / 2.0) clk = ~clk;

  logic da = 1'b0, db = 1'b0;
  logic qa, qa_b, erra, qb, qb_b, errb;
  real  d_ab = 150.0;
  int unsigned checks = 0, failures = 0;

  edff #(.TCLK_PS(200000), .WINDOW_PCT(5)) u_a (.clk, .d(da), .d_b(~da), .q(qa), .q_b(qa_b), .err(erra));
  edff #(.TCLK_PS(200000), .WINDOW_PCT(5)) u_b (.clk, .d(db), .d_b(~db), .q(qb), .q_b(qb_b), .err(errb));

  // A->B combinational path as a transport delay
  always @(qa) begin
    fork
      automatic logic v  = qa;
      automatic real  tl = d_ab;
      begin
        #(tl) db = v;
      end
    join_none
  end

  task automatic check(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %0b expected %0b", what, $time, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 10; k++) begin
      // 1: A borrows 4 ns, A->B path 1 ns short of a period
      d_ab = T - 1.0;
      v = ~da;
      @(posedge clk);            // edge 0
      #(4.0) da = v;
      #(190.0);                  // just before edge 1
      check("1 A flags", erra, 1'b1);
      check("1 A masked", qa, v);
      @(posedge clk);            // edge 1: B's data arrives about 3.5 ns later
      #(15.0);
      check("1 B masked", qb, v);
      #(180.0);                  // just before edge 2
      check("1 B flags", errb, 1'b1);
      repeat (2) @(posedge clk);

      // 2: A on time, same path: B on time, no flags
      @(negedge clk);
      da = ~da;
      v = da;
      @(posedge clk);            // edge 0
      #(195.0);
      check("2 A quiet", erra, 1'b0);
      @(posedge clk);            // edge 1
      #(195.0);
      check("2 B quiet", errb, 1'b0);
      check("2 B value", qb, v);
      repeat (2) @(posedge clk);

      // 3: short path (3 ns) races through B in the same cycle
      d_ab = 3.0;
      @(negedge clk);
      v = qb;                    // what B should still hold after edge 0
      da = ~da;
      @(posedge clk);            // edge 0: A launches, B should keep v
      #(20.0);
      check("3 race-through", qb, ~v);
      #(175.0);
      check("3 B flags race", errb, 1'b1);
      d_ab = T - 1.0;
      repeat (3) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
