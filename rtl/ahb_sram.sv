// ahb_sram: the system's on-chip data/program memory, 64 KB by default, as a
// zero wait state AHB-Lite slave.
// The memory is a word array. A write lands in the data phase with byte lane
// enables taken from HSIZE/HADDR; a read returns the addressed word in the data
// phase (array read on the registered address). A read directly after a write
// to the same word sees the new data, since the write completes at the end of
// its data phase. The design description gives only the 64 KB size; the bus interface and
// the single-cycle timing are this design's choice.
`timescale 1ns / 1ps
module ahb_sram
  import ted_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_req_t req,
  output ahb_rsp_t rsp
);

  localparam int unsigned WORDS = SIZE_BYTES / 4;
  localparam int unsigned AW    = $clog2(SIZE_BYTES);

  logic [31:0]   mem [WORDS];
  logic          wr_en, rd_en;
  logic [AW-1:0] addr;
  logic [3:0]    strb;
  logic [31:0]   wdata;

  ahb_slave_port #(.AW(AW)) u_port (
    .clk, .rst_n, .req, .wr_en, .rd_en, .addr, .strb, .wdata
  );

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < 4; b++)
        if (strb[b]) mem[addr[AW-1:2]][8*b +: 8] <= wdata[8*b +: 8];
    end
  end

  assign rsp.hrdata    = rd_en ? mem[addr[AW-1:2]] : 32'h0;
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
