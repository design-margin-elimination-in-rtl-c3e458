// ahb_interconnect_tb: self-checking test of the AHB decoder/multiplexer.
// Four behavioural slaves answer reads with their own number and the
// transfer address and insert a number of wait states equal to their number,
// so the test sees whether HRDATA and HREADY come from the right slave and
// whether the master waits for it. Writes must reach the addressed slave only.
// Unmapped addresses must give the two-cycle ERROR response.
`timescale 1ns / 1ps
module ahb_interconnect_tb;
  import ted_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_mreq_t   mreq;
  logic [31:0] m_hrdata;
  logic        m_hready, m_hresp;
  ahb_req_t    s_req [NUM_SLAVES];
  ahb_rsp_t    s_rsp [NUM_SLAVES];
  logic [31:0] s_last_wr [NUM_SLAVES];
  int unsigned checks = 0, failures = 0;

  ahb_master_bfm bfm (.clk, .req(mreq), .hrdata(m_hrdata), .hready(m_hready), .hresp(m_hresp));

  ahb_interconnect dut (.clk, .rst_n, .m_req(mreq), .m_hrdata, .m_hready, .m_hresp,
                        .s_req, .s_rsp);

  for (genvar s = 0; s < NUM_SLAVES; s++) begin : g_slv
    logic        act, wr;
    logic [31:0] a;
    int unsigned ws;
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        act <= 1'b0; wr <= 1'b0; a <= '0; ws <= 0; s_last_wr[s] <= '0;
      end else begin
        if (act && ws != 0) ws <= ws - 1;
        else begin
          if (act && wr) s_last_wr[s] <= s_req[s].hwdata;
          if (s_req[s].hready) begin
            act <= s_req[s].hsel && s_req[s].htrans[1];
            wr  <= s_req[s].hwrite;
            a   <= s_req[s].haddr;
            ws  <= s;
          end
        end
      end
    end
    assign s_rsp[s].hreadyout = !(act && ws != 0);
    assign s_rsp[s].hresp     = 1'b0;
    assign s_rsp[s].hrdata    = (act && !wr) ? {4'(s), a[27:0]} : 32'h0;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] bases [NUM_SLAVES];
    logic [31:0] a, rd, wd;
    logic rs;
    int unsigned s;
    bases[SLV_SRAM] = SRAM_BASE;
    bases[SLV_GPIO] = GPIO_BASE;
    bases[SLV_UART] = UART_BASE;
    bases[SLV_ERRP] = ERRP_BASE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      s = $urandom_range(0, NUM_SLAVES - 1);
      a = bases[s] + ($urandom_range(0, (s == SLV_SRAM) ? 16383 : 1023) << 2);
      if ($urandom_range(0, 1)) begin
        bfm.xfer(1'b0, a, 32'h0, 3'd2, rd, rs);
        check("rdata", rd, {4'(s), a[27:0]});
        check("resp", 32'(rs), 0);
        check("wait states", bfm.last_cycles, 1 + s);
      end else begin
        wd = $urandom;
        bfm.xfer(1'b1, a, wd, 3'd2, rd, rs);
        @(negedge clk);
        check("write reached", s_last_wr[s], wd);
        for (int o = 0; o < NUM_SLAVES; o++)
          if (o != int'(s)) begin
            checks++;
            if (s_last_wr[o] === wd) begin
              failures++;
              $display("FAIL write leaked to slave %0d", o);
            end
          end
      end
    end
    // unmapped addresses
    for (int i = 0; i < 5; i++) begin
      bfm.xfer(1'b0, 32'h6000_0000 + 32'(i * 4), 32'h0, 3'd2, rd, rs);
      check("error resp", 32'(rs), 1);
      check("error cycles", bfm.last_cycles, 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
