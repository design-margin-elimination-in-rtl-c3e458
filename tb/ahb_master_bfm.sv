// ahb_master_bfm: behavioural AHB-Lite bus master for the testbenches. It
// stands in for the processor and runs one non-pipelined transfer at a time:
// `xfer` drives the address phase on a falling clock edge, waits for HREADY,
// then drives HWDATA for the data phase, samples HRDATA/HRESP on the falling
// edge before the data phase completes and returns on the falling edge after
// it, so the transfer's effects are visible to the caller. `write`/`read` wrap it for
// word transfers and count the cycles each transfer took.
`timescale 1ns / 1ps
module ahb_master_bfm
  import ted_pkg::*;
(
  input  logic        clk,
  output ahb_mreq_t   req,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic        hresp
);

  int unsigned last_cycles;

  initial begin
    req        = '0;
    req.htrans = HTRANS_IDLE;
    req.hsize  = 3'd2;
  end

  task automatic xfer(input logic wr, input logic [31:0] addr, input logic [31:0] wdata,
                      input logic [2:0] size, output logic [31:0] rdata,
                      output logic resp);
    int unsigned n;
    n = 0;
    @(negedge clk);
    req.haddr  = addr;
    req.htrans = HTRANS_NONSEQ;
    req.hwrite = wr;
    req.hsize  = size;
    while (!hready) @(negedge clk);
    @(negedge clk);
    n++;
    req.htrans = HTRANS_IDLE;
    req.hwdata = wdata;
    while (!hready) begin
      @(negedge clk);
      n++;
    end
    rdata       = hrdata;
    resp        = hresp;
    last_cycles = n;
    @(negedge clk);   // data phase has completed, its effects are visible
  endtask

  task automatic write(input logic [31:0] addr, input logic [31:0] wdata);
    logic [31:0] rd;
    logic        rs;
    xfer(1'b1, addr, wdata, 3'd2, rd, rs);
  endtask

  task automatic read(input logic [31:0] addr, output logic [31:0] rdata);
    logic rs;
    xfer(1'b0, addr, 32'h0, 3'd2, rdata, rs);
  endtask

endmodule
