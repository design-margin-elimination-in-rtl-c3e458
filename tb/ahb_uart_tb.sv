// ahb_uart_tb: self-checking test of the UART. The transmitter output is
// decoded by an independent serial receiver in the testbench (8N1, bit period
// from BAUD) and compared byte by byte, including the frame length in cycles.
// Bytes serialised by the testbench onto rxd are read back through DATA with
// STATUS rx valid. Runs at three baud settings, down to 4 cycles per bit.
`timescale 1ns / 1ps
module ahb_uart_tb;
  import ted_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_mreq_t   mreq;
  ahb_req_t    req;
  ahb_rsp_t    rsp;
  logic        rxd, txd;
  int unsigned checks = 0, failures = 0;
  int unsigned baud = 8;
  longint unsigned cyc = 0;

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

  ahb_uart #(.BAUD_RESET(8)) dut (.clk, .rst_n, .req, .rsp, .rxd, .txd);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  // independent receiver on txd
  logic [7:0] rx_q [$];
  longint unsigned frame_start [$];
  initial begin
    logic [7:0] b;
    longint unsigned t0;
    forever begin
      @(negedge txd);
      t0 = cyc;
      repeat (baud / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (baud) @(posedge clk);
        b[i] = txd;
      end
      repeat (baud) @(posedge clk);
      if (txd !== 1'b1) begin
        failures++;
        $display("FAIL stop bit");
      end
      rx_q.push_back(b);
      frame_start.push_back(t0);
    end
  end

  task automatic send_rx(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (baud) @(posedge clk);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    logic [7:0] b;
    longint unsigned t_wr;
    rxd = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bfm.read(UART_BASE + UART_BAUD, rd);
    check("baud reset", rd, 8);
    for (int pass = 0; pass < 3; pass++) begin
      if (pass > 0) begin
        baud = (pass == 1) ? 13 : 4;
        bfm.write(UART_BASE + UART_BAUD, baud);
      end
      for (int i = 0; i < 8; i++) begin
        b = 8'($urandom);
        bfm.write(UART_BASE + UART_DATA, 32'(b));
        t_wr = cyc;
        bfm.read(UART_BASE + UART_STATUS, rd);
        check("tx busy", rd & 1, 1);
        wait (rx_q.size() != 0);
        check("tx byte", 32'(rx_q.pop_front()), 32'(b));
        // frame starts within two cycles of the write completing
        checks++;
        if (frame_start[0] > t_wr + 2) begin
          failures++;
          $display("FAIL tx start latency %0d", frame_start[0] - t_wr);
        end
        void'(frame_start.pop_front());
        repeat (2 * baud) @(posedge clk);
        bfm.read(UART_BASE + UART_STATUS, rd);
        check("tx idle", rd & 1, 0);
        // receive
        b = 8'($urandom);
        send_rx(b);
        repeat (baud) @(posedge clk);
        bfm.read(UART_BASE + UART_STATUS, rd);
        check("rx valid", (rd >> 1) & 1, 1);
        bfm.read(UART_BASE + UART_DATA, rd);
        check("rx byte", rd, 32'(b));
        bfm.read(UART_BASE + UART_STATUS, rd);
        check("rx cleared", (rd >> 1) & 1, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
