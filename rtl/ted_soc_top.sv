// ted_soc_top: timing error-aware microcontroller system.
// Critical path endpoints of the processor are captured by error detection
// soft edge flip-flops (`edff`, N_EDFF of them, 224 by default) that let late
// data through during a short window after the clock edge and flag it. Their
// error outputs go to the error processor, an AHB peripheral that averages the
// error rate over a programmable number of cycles and interrupts the processor
// at preset thresholds; the processor then commands the supply through GPIO or
// the UART, closing a dynamic voltage scaling loop that runs the chip at its
// point of first failure.
// Contents: AHB interconnect; 64 KB SRAM; GPIO; UART; error processor; the
// bank of error detection flip-flops.
// The ARM Cortex M0 processor is not part of this RTL: its AHB master port
// (m_*), its interrupt input (irq) and the critical-path signals it would hand
// to the error detection flip-flops (cp_d in, cp_q out) are ports of this
// module. The complement rail of each differential pair is formed here as the
// inverse of the true rail. The supply regulator is off chip; gpio_* and
// uart_txd/uart_rxd are its command channels.
// Timing: one clock; TCLK_PS is the clock period the flip-flop windows are
// sized for (5 MHz, window 5% by default). The structure follows the system
// description; the address map (ted_pkg) is this design's own.
`timescale 1ns / 1ps
module ted_soc_top
  import ted_pkg::*;
#(
  parameter int unsigned N_EDFF     = 224,
  parameter int unsigned TCLK_PS    = 200000,
  parameter int unsigned WINDOW_PCT = 5,
  parameter int unsigned SRAM_BYTES = 65536,
  parameter int unsigned GPIO_W     = 16,
  parameter int unsigned BAUD_RESET = 52
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor AHB master port
  input  ahb_mreq_t         m_req,
  output logic [31:0]       m_hrdata,
  output logic              m_hready,
  output logic              m_hresp,
  // interrupt to the processor
  output logic              irq,
  // critical path endpoints
  input  logic [N_EDFF-1:0] cp_d,
  output logic [N_EDFF-1:0] cp_q,
  // voltage scaling command channels
  input  logic [GPIO_W-1:0] gpio_in,
  output logic [GPIO_W-1:0] gpio_out,
  output logic [GPIO_W-1:0] gpio_oe,
  input  logic              uart_rxd,
  output logic              uart_txd
);

  ahb_req_t          s_req [NUM_SLAVES];
  ahb_rsp_t          s_rsp [NUM_SLAVES];
  logic [N_EDFF-1:0] cp_q_b, cp_err;

  ahb_interconnect u_bus (
    .clk, .rst_n, .m_req, .m_hrdata, .m_hready, .m_hresp, .s_req, .s_rsp
  );

  ahb_sram #(.SIZE_BYTES(SRAM_BYTES)) u_sram (
    .clk, .rst_n, .req(s_req[SLV_SRAM]), .rsp(s_rsp[SLV_SRAM])
  );

  ahb_gpio #(.WIDTH(GPIO_W)) u_gpio (
    .clk, .rst_n, .req(s_req[SLV_GPIO]), .rsp(s_rsp[SLV_GPIO]),
    .gpio_in, .gpio_out, .gpio_oe
  );

  ahb_uart #(.BAUD_RESET(BAUD_RESET)) u_uart (
    .clk, .rst_n, .req(s_req[SLV_UART]), .rsp(s_rsp[SLV_UART]),
    .rxd(uart_rxd), .txd(uart_txd)
  );

  error_processor #(.N_ERR(N_EDFF)) u_errp (
    .clk, .rst_n, .req(s_req[SLV_ERRP]), .rsp(s_rsp[SLV_ERRP]),
    .err_in(cp_err), .irq
  );

  for (genvar i = 0; i < N_EDFF; i++) begin : g_edff
    edff #(.TCLK_PS(TCLK_PS), .WINDOW_PCT(WINDOW_PCT)) u_edff (
      .clk, .d(cp_d[i]), .d_b(~cp_d[i]), .q(cp_q[i]), .q_b(cp_q_b[i]),
      .err(cp_err[i])
    );
  end

endmodule
