// ted_pkg: types and constants shared by the timing error-aware microcontroller
// system. It holds the AHB-Lite request/response bundles that every bus slave
// uses, the system address map and the register map of the error processor.
// The address map and register offsets are this design's own choices; the
// AHB bus itself and the peripherals on it follow the system description.
`timescale 1ns / 1ps
package ted_pkg;

  // AHB-Lite transfer types (HTRANS)
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // Master-to-slave signals of one AHB-Lite slave port.
  typedef struct packed {
    logic        hsel;
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
    logic        hready;   // bus-wide ready: previous transfer completes
  } ahb_req_t;

  // Slave-to-master signals of one AHB-Lite slave port.
  typedef struct packed {
    logic [31:0] hrdata;
    logic        hreadyout;
    logic        hresp;     // 0 = OKAY, 1 = ERROR
  } ahb_rsp_t;

  // Master-side bundle (the processor's bus port, without HSEL/HREADY input).
  typedef struct packed {
    logic [31:0] haddr;
    htrans_e     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [31:0] hwdata;
  } ahb_mreq_t;

  // Address map: slave index and region base, decoded on HADDR[31:12].
  localparam int unsigned NUM_SLAVES = 4;
  localparam int unsigned SLV_SRAM   = 0;
  localparam int unsigned SLV_GPIO   = 1;
  localparam int unsigned SLV_UART   = 2;
  localparam int unsigned SLV_ERRP   = 3;

  localparam logic [31:0] SRAM_BASE = 32'h2000_0000;  // 64 KB
  localparam logic [31:0] GPIO_BASE = 32'h4000_0000;  // 4 KB region
  localparam logic [31:0] UART_BASE = 32'h4000_1000;  // 4 KB region
  localparam logic [31:0] ERRP_BASE = 32'h4000_2000;  // 4 KB region

  // Error processor register offsets (word aligned).
  localparam logic [7:0] ERRP_CTRL   = 8'h00;  // [0] enable [1] irq_hi_en [2] irq_lo_en
  localparam logic [7:0] ERRP_PERIOD = 8'h04;  // averaging window, cycles
  localparam logic [7:0] ERRP_THR_HI = 8'h08;  // error cycles per window that raise irq_hi
  localparam logic [7:0] ERRP_THR_LO = 8'h0C;  // error cycles per window at or below which irq_lo
  localparam logic [7:0] ERRP_COUNT  = 8'h10;  // error cycles in last completed window (RO)
  localparam logic [7:0] ERRP_STATUS = 8'h14;  // [0] hi [1] lo [2] window done, write 1 to clear
  localparam logic [7:0] ERRP_TOTAL  = 8'h18;  // error cycles since last clear; write clears
  localparam logic [7:0] ERRP_LASTIX = 8'h1C;  // [31] valid, [15:0] most critical flagged endpoint

  // GPIO register offsets.
  localparam logic [7:0] GPIO_OUT = 8'h00;
  localparam logic [7:0] GPIO_OE  = 8'h04;
  localparam logic [7:0] GPIO_IN  = 8'h08;

  // UART register offsets.
  localparam logic [7:0] UART_DATA   = 8'h00;  // write: send byte, read: received byte
  localparam logic [7:0] UART_STATUS = 8'h04;  // [0] tx busy [1] rx valid
  localparam logic [7:0] UART_BAUD   = 8'h08;  // clock cycles per bit

  // Byte lane enables of a transfer, from HSIZE and the low address bits.
  function automatic logic [3:0] ahb_strb(input logic [2:0] hsize, input logic [1:0] a);
    unique case (hsize)
      3'd0:    return 4'b0001 << a;
      3'd1:    return a[1] ? 4'b1100 : 4'b0011;
      default: return 4'b1111;
    endcase
  endfunction

endpackage
