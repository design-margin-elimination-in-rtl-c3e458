// ahb_gpio_tb: self-checking test of the GPIO port. Random writes to OUT and
// OE with full and partial byte lanes, compared with a reference model on the
// pins and on read-back; IN is checked to return the pins after the
// two-flop synchroniser (two cycles of latency).
`timescale 1ns / 1ps
module ahb_gpio_tb;
  import ted_pkg::*;

  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_mreq_t      mreq;
  ahb_req_t       req;
  ahb_rsp_t       rsp;
  logic [W-1:0]   gpio_in, gpio_out, gpio_oe;
  int unsigned    checks = 0, failures = 0;

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

  ahb_gpio #(.WIDTH(W)) dut (.clk, .rst_n, .req, .rsp, .gpio_in, .gpio_out, .gpio_oe);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, rs;
    logic [W-1:0] m_out, m_oe, v;
    logic resp;
    int unsigned op;
    gpio_in = '0;
    m_out = '0;
    m_oe  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check("reset out", 32'(gpio_out), 0);
    for (int i = 0; i < 100; i++) begin
      v = W'($urandom);
      op = $urandom_range(0, 3);
      case (op)
        0: begin bfm.write(GPIO_BASE + GPIO_OUT, 32'(v)); m_out = v; end
        1: begin bfm.write(GPIO_BASE + GPIO_OE, 32'(v)); m_oe = v; end
        2: begin  // byte write to the upper byte of OUT
             bfm.xfer(1'b1, GPIO_BASE + GPIO_OUT + 1, 32'(v) << 8, 3'd0, rs, resp);
             m_out[15:8] = v[7:0];
           end
        default: begin
             bfm.read(GPIO_BASE + GPIO_OE, rd);
             check("oe readback", rd, 32'(m_oe));
           end
      endcase
      @(negedge clk);
      check("pins out", 32'(gpio_out), 32'(m_out));
      check("pins oe", 32'(gpio_oe), 32'(m_oe));
      bfm.read(GPIO_BASE + GPIO_OUT, rd);
      check("out readback", rd, 32'(m_out));
      // input path
      gpio_in = W'($urandom);
      repeat (3) @(posedge clk);
      bfm.read(GPIO_BASE + GPIO_IN, rd);
      check("in", rd, 32'(gpio_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
