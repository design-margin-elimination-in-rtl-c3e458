// ahb_slave_port: AHB-Lite address/data phase splitter shared by the bus slaves
// of the system (SRAM, GPIO, UART, error processor).
// A transfer is accepted in its address phase when HSEL, HREADY and a NONSEQ or
// SEQ HTRANS are seen at a rising clock edge; the address, direction and byte
// lanes are registered. In the following data phase the slave sees `wr_en`
// (with `addr`, `strb` and the bus HWDATA on `wdata`) for a write, or `rd_en`
// for a read, and drives its read data combinationally from `addr`.
// All slaves built on it are zero wait state and answer OKAY. This is the
// system's own bus front end; the design description only names the AHB bus.
`timescale 1ns / 1ps
module ahb_slave_port
  import ted_pkg::*;
#(
  parameter int unsigned AW = 16  // address bits kept
) (
  input  logic          clk,
  input  logic          rst_n,
  input  ahb_req_t      req,
  output logic          wr_en,   // data phase of a write
  output logic          rd_en,   // data phase of a read
  output logic [AW-1:0] addr,    // byte address of the transfer in its data phase
  output logic [3:0]    strb,    // byte lanes of the transfer
  output logic [31:0]   wdata
);

  logic act_q, write_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_q   <= 1'b0;
      write_q <= 1'b0;
      addr    <= '0;
      strb    <= '0;
    end else if (req.hready) begin
      act_q <= req.hsel && req.htrans[1];
      if (req.hsel && req.htrans[1]) begin
        write_q <= req.hwrite;
        addr    <= req.haddr[AW-1:0];
        strb    <= ahb_strb(req.hsize, req.haddr[1:0]);
      end
    end
  end

  assign wr_en = act_q && write_q;
  assign rd_en = act_q && !write_q;
  assign wdata = req.hwdata;

endmodule
