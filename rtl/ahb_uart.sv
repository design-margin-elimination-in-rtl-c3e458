// ahb_uart: 8N1 serial port on the AHB bus, the second channel the processor's
// interrupt handlers can use to send voltage scaling commands.
// Registers: DATA (0x00) write sends a byte, read returns the last received
// byte and clears rx valid; STATUS (0x04) [0] tx busy, [1] rx valid;
// BAUD (0x08) clock cycles per bit (reset value BAUD_RESET).
// The transmitter shifts start bit, 8 data bits LSB first and a stop bit, one
// per BAUD cycles. The receiver synchronises rxd, finds the start bit edge,
// samples each bit in its middle and checks the stop bit. A byte written while
// the transmitter is busy is dropped. The design description only names the UART; the
// frame format and registers are this design's choice.
`timescale 1ns / 1ps
module ahb_uart
  import ted_pkg::*;
#(
  parameter int unsigned BAUD_RESET = 52
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_req_t req,
  output ahb_rsp_t rsp,
  input  logic     rxd,
  output logic     txd
);

  logic        wr_en, rd_en;
  logic [11:0] addr;
  logic [3:0]  strb;
  logic [31:0] wdata;

  ahb_slave_port #(.AW(12)) u_port (
    .clk, .rst_n, .req, .wr_en, .rd_en, .addr, .strb, .wdata
  );

  logic [15:0] baud;
  // transmitter
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;   // bits left to send
  logic [15:0] tx_cnt;
  logic        tx_busy;
  // receiver
  logic        rx_s1, rx_s2, rx_busy, rx_valid;
  logic [15:0] rx_cnt;
  logic [3:0]  rx_bits;
  logic [7:0]  rx_shift, rx_data;

  assign tx_busy = (tx_bits != 0);
  assign txd     = tx_busy ? tx_shift[0] : 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud     <= 16'(BAUD_RESET);
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      rx_s1    <= 1'b1;
      rx_s2    <= 1'b1;
      rx_busy  <= 1'b0;
      rx_valid <= 1'b0;
      rx_cnt   <= '0;
      rx_bits  <= '0;
      rx_shift <= '0;
      rx_data  <= '0;
    end else begin
      // register writes
      if (wr_en && {addr[7:2], 2'b00} == UART_BAUD && strb[0]) baud <= wdata[15:0];
      if (wr_en && {addr[7:2], 2'b00} == UART_DATA && strb[0] && !tx_busy) begin
        tx_shift <= {1'b1, wdata[7:0], 1'b0};
        tx_bits  <= 4'd10;
        tx_cnt   <= baud - 16'd1;
      end else if (tx_busy) begin
        if (tx_cnt == 0) begin
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 4'd1;
          tx_cnt   <= baud - 16'd1;
        end else begin
          tx_cnt <= tx_cnt - 16'd1;
        end
      end

      // receiver
      rx_s1 <= rxd;
      rx_s2 <= rx_s1;
      if (rd_en && {addr[7:2], 2'b00} == UART_DATA) rx_valid <= 1'b0;
      if (!rx_busy) begin
        if (!rx_s2) begin               // start bit edge
          rx_busy <= 1'b1;
          // to the middle of the start bit, less the synchroniser delay
          rx_cnt  <= (baud[15:1] != 0) ? {1'b0, baud[15:1]} - 16'd1 : 16'd0;
          rx_bits <= 4'd9;
        end
      end else if (rx_cnt == 0) begin
        rx_cnt <= baud - 16'd1;
        if (rx_bits == 4'd9) begin
          if (rx_s2) rx_busy <= 1'b0;   // false start
          rx_bits <= rx_bits - 4'd1;
        end else if (rx_bits != 0) begin
          rx_shift <= {rx_s2, rx_shift[7:1]};
          rx_bits  <= rx_bits - 4'd1;
        end else begin                  // stop bit
          rx_busy <= 1'b0;
          if (rx_s2) begin
            rx_data  <= rx_shift;
            rx_valid <= 1'b1;
          end
        end
      end else begin
        rx_cnt <= rx_cnt - 16'd1;
      end
    end
  end

  always_comb begin
    rsp.hrdata = '0;
    if (rd_en) begin
      unique case ({addr[7:2], 2'b00})
        UART_DATA:   rsp.hrdata[7:0]  = rx_data;
        UART_STATUS: rsp.hrdata[1:0]  = {rx_valid, tx_busy};
        UART_BAUD:   rsp.hrdata[15:0] = baud;
        default:     rsp.hrdata = '0;
      endcase
    end
  end
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
