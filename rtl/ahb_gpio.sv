// ahb_gpio: general purpose I/O port on the AHB bus. Interrupt handlers on the
// processor write it to command the external supply in the voltage scaling loop.
// Registers: OUT (0x00, R/W) output levels, OE (0x04, R/W) output enables,
// IN (0x08, RO) pin levels through a two-flop synchroniser. Writes take effect
// at the end of the data phase; reads are zero wait state. The design description only
// names the GPIO port; width and register layout are this design's choice.
`timescale 1ns / 1ps
module ahb_gpio
  import ted_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ahb_req_t         req,
  output ahb_rsp_t         rsp,
  input  logic [WIDTH-1:0] gpio_in,
  output logic [WIDTH-1:0] gpio_out,
  output logic [WIDTH-1:0] gpio_oe
);

  logic             wr_en, rd_en;
  logic [11:0]      addr;
  logic [3:0]       strb;
  logic [31:0]      wdata, wmask;
  logic [WIDTH-1:0] in_s1, in_s2;

  ahb_slave_port #(.AW(12)) u_port (
    .clk, .rst_n, .req, .wr_en, .rd_en, .addr, .strb, .wdata
  );

  always_comb
    for (int b = 0; b < 4; b++) wmask[8*b +: 8] = {8{strb[b]}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gpio_out <= '0;
      gpio_oe  <= '0;
      in_s1    <= '0;
      in_s2    <= '0;
    end else begin
      in_s1 <= gpio_in;
      in_s2 <= in_s1;
      if (wr_en && {addr[7:2], 2'b00} == GPIO_OUT)
        gpio_out <= (gpio_out & ~wmask[WIDTH-1:0]) | (wdata[WIDTH-1:0] & wmask[WIDTH-1:0]);
      if (wr_en && {addr[7:2], 2'b00} == GPIO_OE)
        gpio_oe <= (gpio_oe & ~wmask[WIDTH-1:0]) | (wdata[WIDTH-1:0] & wmask[WIDTH-1:0]);
    end
  end

  always_comb begin
    rsp.hrdata = '0;
    if (rd_en) begin
      unique case ({addr[7:2], 2'b00})
        GPIO_OUT: rsp.hrdata[WIDTH-1:0] = gpio_out;
        GPIO_OE:  rsp.hrdata[WIDTH-1:0] = gpio_oe;
        GPIO_IN:  rsp.hrdata[WIDTH-1:0] = in_s2;
        default:  rsp.hrdata = '0;
      endcase
    end
  end
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
