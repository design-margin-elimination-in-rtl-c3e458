// error_or_tree_tb: self-checking test of the slack-ordered error OR-tree at
// its full width of 224 inputs. Drives no-error cycles, single errors on every
// input and random sparse and dense patterns; after the one-cycle register
// delay it compares err_any and err_idx with a reference (OR of all inputs and
// lowest-numbered active input).
`timescale 1ns / 1ps
module error_or_tree_tb;

  localparam int unsigned N  = 224;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  err_in;
  logic          err_any;
  logic [IW-1:0] err_idx;
  int unsigned   checks = 0, failures = 0;

  error_or_tree #(.N_ERR(N)) dut (.clk, .rst_n, .err_in, .err_any, .err_idx);

  task automatic apply_and_check(input logic [N-1:0] v);
    logic exp_any;
    int   exp_idx;
    exp_any = 1'b0;
    exp_idx = 0;
    for (int i = N - 1; i >= 0; i--)
      if (v[i]) begin
        exp_any = 1'b1;
        exp_idx = i;
      end
    @(negedge clk);
    err_in = v;
    @(negedge clk);   // one register stage
    checks++;
    if (err_any !== exp_any || (exp_any && int'(err_idx) != exp_idx)) begin
      failures++;
      $display("FAIL any=%0b idx=%0d expected any=%0b idx=%0d", err_any, err_idx,
               exp_any, exp_idx);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] v;
    err_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    apply_and_check('0);
    for (int i = 0; i < N; i++) apply_and_check(N'(1) << i);
    for (int k = 0; k < 500; k++) begin
      v = '0;
      for (int j = 0; j < N; j += 32) v[j +: 32] = $urandom;
      if (k % 2 == 0)   // sparse: a few bits only
        for (int j = 0; j < N; j++) v[j] = v[j] & ($urandom_range(0, 40) == 0);
      apply_and_check(v);
    end
    apply_and_check('1);
    apply_and_check('0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
