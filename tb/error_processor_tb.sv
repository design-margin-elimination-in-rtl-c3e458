// error_processor_tb: self-checking test of the error processor through its
// AHB registers, with all 224 error inputs.
//  - Register reset values and read-back.
//  - Averaging: with an error pattern of one error cycle in every 5, every
//    window of PERIOD=20 cycles holds exactly 4 error cycles whatever its
//    alignment, so COUNT must read 4; thresholds just at and just beyond 4
//    decide whether HI and LO are set, and irq follows the enabled bits.
//  - Window timing: with no errors and THR_LO=0, irq_lo must rise PERIOD
//    cycles after the enable write.
//  - TOTAL counts exactly the injected error cycles; LASTIX reports the
//    lowest-numbered (most critical) of simultaneous errors.
//  - STATUS bits clear on write-1, and irq drops.
`timescale 1ns / 1ps
module error_processor_tb;
  import ted_pkg::*;

  localparam int unsigned N = 224;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_mreq_t    mreq;
  ahb_req_t     req;
  ahb_rsp_t     rsp;
  logic [N-1:0] err_in;
  logic         irq;
  int unsigned  checks = 0, failures = 0;
  longint unsigned cyc = 0;
  logic         pattern_on = 1'b0;

  always @(posedge clk) cyc++;

  ahb_master_bfm bfm (.clk, .req(mreq), .hrdata(rsp.hrdata), .hready(rsp.hreadyout),
                      .hresp(rsp.hresp));

  always_comb begin
    req.hsel   = 1'b1;
    req.haddr  = mreq.haddr;
    req.htrans = mreq.htrans;
    req.hwrite = mreq.hwrite;
    req.hsize  = mreq.hsize;
    req.hwdata = mreq.hwdata;
    req.hready = rsp.hreadyout;
  end

  error_processor #(.N_ERR(N)) dut (.clk, .rst_n, .req, .rsp, .err_in, .irq);

  // periodic error pattern: one error cycle in every five, on a random input
  always @(negedge clk) begin
    err_in <= '0;
    if (pattern_on && (cyc % 5 == 0)) err_in[$urandom_range(0, N - 1)] <= 1'b1;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic rd(input logic [7:0] off, output logic [31:0] v);
    bfm.read(ERRP_BASE + 32'(off), v);
  endtask

  task automatic wr(input logic [7:0] off, input logic [31:0] v);
    bfm.write(ERRP_BASE + 32'(off), v);
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    longint unsigned t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    rd(ERRP_PERIOD, v); check("period reset", v, 1024);
    rd(ERRP_THR_HI, v); check("thr_hi reset", v, 1);
    rd(ERRP_STATUS, v); check("status reset", v, 0);
    check("irq reset", 32'(irq), 0);

    // window timing with no errors: LO must fire PERIOD cycles after enable
    wr(ERRP_PERIOD, 20);
    wr(ERRP_THR_LO, 0);
    wr(ERRP_THR_HI, 1);
    wr(ERRP_CTRL, 32'b101);            // enable, irq on LO
    t0 = cyc;
    wait (irq);
    checks++;
    if (cyc - t0 < 20 || cyc - t0 > 21) begin
      failures++;
      $display("FAIL window length: irq after %0d cycles", cyc - t0);
    end
    rd(ERRP_STATUS, v); check("lo+done", v, 32'b110);
    rd(ERRP_COUNT, v);  check("count idle", v, 0);
    wr(ERRP_STATUS, 32'b111);
    @(negedge clk);
    check("irq cleared", 32'(irq), 0);

    // averaging with the periodic pattern, sweep the thresholds
    for (int t = 3; t <= 5; t++) begin
      wr(ERRP_CTRL, 0);
      wr(ERRP_THR_HI, t);
      wr(ERRP_THR_LO, t);
      wr(ERRP_STATUS, 32'b111);
      pattern_on = 1'b1;
      repeat (10) @(posedge clk);
      wr(ERRP_CTRL, 32'b011);          // enable, irq on HI
      repeat (45) @(posedge clk);      // at least one whole window
      rd(ERRP_COUNT, v);  check("count 4 per 20", v, 4);
      rd(ERRP_STATUS, v);
      check("hi", v & 1, (4 >= t) ? 1 : 0);
      check("lo", (v >> 1) & 1, (4 <= t) ? 1 : 0);
      check("irq hi", 32'(irq), (4 >= t) ? 1 : 0);
      pattern_on = 1'b0;
      repeat (5) @(posedge clk);
    end

    // TOTAL counts injected error cycles exactly
    wr(ERRP_PERIOD, 1000);
    wr(ERRP_CTRL, 32'b001);
    repeat (5) @(posedge clk);
    wr(ERRP_TOTAL, 0);
    repeat (3) @(posedge clk);
    for (int k = 0; k < 17; k++) begin
      @(negedge clk);
      force err_in = N'(1) << $urandom_range(0, N - 1);
      @(negedge clk);
      release err_in;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (5) @(posedge clk);
    rd(ERRP_TOTAL, v); check("total", v, 17);

    // LASTIX: lowest index of simultaneous errors
    @(negedge clk);
    force err_in = (N'(1) << 150) | (N'(1) << 37) | (N'(1) << 200);
    @(negedge clk);
    release err_in;
    repeat (3) @(posedge clk);
    rd(ERRP_LASTIX, v); check("lastix", v, 32'h8000_0000 | 37);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
