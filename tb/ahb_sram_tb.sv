// ahb_sram_tb: self-checking test of the AHB SRAM. Writes words, halfwords and
// bytes at random addresses across the full 64 KB, keeps a reference model in
// an associative array, reads everything back and checks data and the
// single-cycle data phase. Also checks a read right after a write to the same
// word and both ends of the address range.
`timescale 1ns / 1ps
module ahb_sram_tb;
  import ted_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  ahb_mreq_t mreq;
  ahb_req_t  req;
  ahb_rsp_t  rsp;
  int unsigned checks = 0, failures = 0;

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

  ahb_sram dut (.clk, .rst_n, .req, .rsp);

  logic [31:0] model [logic [13:0]];

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, exp);
    end
  endtask

  task automatic wr_sized(input logic [31:0] a, input logic [31:0] d, input logic [2:0] sz);
    logic [31:0] rd, lane;
    logic rs;
    logic [31:0] old;
    // data appears on the byte lanes of the address, as on AHB
    lane = d << (8 * a[1:0]);
    bfm.xfer(1'b1, a, lane, sz, rd, rs);
    old = model.exists(a[15:2]) ? model[a[15:2]] : 32'h0;
    for (int b = 0; b < 4; b++)
      if (ahb_strb(sz, a[1:0])[b]) old[8*b +: 8] = lane[8*b +: 8];
    model[a[15:2]] = old;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, a;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fill every word we will read first, so reads compare to known data
    for (int i = 0; i < 400; i++) begin
      a = SRAM_BASE | ($urandom_range(0, 16383) << 2);
      wr_sized(a, $urandom, 3'd2);
    end
    wr_sized(SRAM_BASE, 32'hA5A5_0001, 3'd2);
    wr_sized(SRAM_BASE + 32'hFFFC, 32'h5A5A_FFFC, 3'd2);
    // sub-word writes onto words already written
    foreach (model[k]) begin
      a = SRAM_BASE | (32'(k) << 2);
      if ($urandom_range(0, 1)) wr_sized(a | 32'($urandom_range(0, 3)), 32'($urandom_range(0, 255)), 3'd0);
      else                      wr_sized(a | (32'($urandom_range(0, 1)) << 1), 32'($urandom_range(0, 65535)), 3'd1);
    end
    foreach (model[k]) begin
      bfm.read(SRAM_BASE | (32'(k) << 2), rd);
      check($sformatf("word %0d", k), rd, model[k]);
      checks++;
      if (bfm.last_cycles != 1) begin
        failures++;
        $display("FAIL data phase took %0d cycles", bfm.last_cycles);
      end
    end
    // read directly after write to the same word
    wr_sized(SRAM_BASE + 32'h100, 32'hDEAD_BEEF, 3'd2);
    bfm.read(SRAM_BASE + 32'h100, rd);
    check("read after write", rd, 32'hDEAD_BEEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
