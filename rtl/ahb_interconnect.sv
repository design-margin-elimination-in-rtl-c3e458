// ahb_interconnect: single-master AHB-Lite bus joining the processor to the
// system's slaves (SRAM, GPIO, UART, error processor).
// The decoder selects a slave from HADDR in the address phase (map in
// ted_pkg): SRAM at 0x2000_0000 (64 KB), GPIO, UART and the error processor in
// 4 KB regions from 0x4000_0000. The slave index is registered when HREADY is
// high and steers the data phase multiplexer for HRDATA, HREADY and HRESP.
// Addresses outside the map go to a built-in default slave that gives the
// two-cycle AHB ERROR response. All slaves see the shared HREADY.
// The design description names the AHB bus; the map and default slave are this
// design's choices.
`timescale 1ns / 1ps
module ahb_interconnect
  import ted_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // master (processor) side
  input  ahb_mreq_t   m_req,
  output logic [31:0] m_hrdata,
  output logic        m_hready,
  output logic        m_hresp,
  // slave side
  output ahb_req_t    s_req [NUM_SLAVES],
  input  ahb_rsp_t    s_rsp [NUM_SLAVES]
);

  localparam int unsigned SW = $clog2(NUM_SLAVES + 1);
  localparam logic [SW-1:0] SEL_NONE = SW'(NUM_SLAVES);  // default slave

  logic [SW-1:0] sel_a, sel_d;
  logic          def_err1, def_err2;   // default slave error cycles 1 and 2

  // address decode
  always_comb begin
    sel_a = SEL_NONE;
    if (m_req.haddr[31:16] == SRAM_BASE[31:16])      sel_a = SW'(SLV_SRAM);
    else if (m_req.haddr[31:12] == GPIO_BASE[31:12]) sel_a = SW'(SLV_GPIO);
    else if (m_req.haddr[31:12] == UART_BASE[31:12]) sel_a = SW'(SLV_UART);
    else if (m_req.haddr[31:12] == ERRP_BASE[31:12]) sel_a = SW'(SLV_ERRP);
  end

  always_comb begin
    for (int s = 0; s < NUM_SLAVES; s++) begin
      s_req[s].hsel   = (sel_a == SW'(s));
      s_req[s].haddr  = m_req.haddr;
      s_req[s].htrans = m_req.htrans;
      s_req[s].hwrite = m_req.hwrite;
      s_req[s].hsize  = m_req.hsize;
      s_req[s].hwdata = m_req.hwdata;
      s_req[s].hready = m_hready;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_d    <= SW'(SLV_SRAM);
      def_err1 <= 1'b0;
      def_err2 <= 1'b0;
    end else begin
      def_err2 <= def_err1;
      def_err1 <= 1'b0;
      if (m_hready) begin
        sel_d    <= sel_a;
        def_err1 <= (sel_a == SEL_NONE) && m_req.htrans[1];
      end
    end
  end

  // data phase multiplexer
  always_comb begin
    if (sel_d == SEL_NONE) begin
      m_hrdata = '0;
      m_hready = !def_err1;
      m_hresp  = def_err1 || def_err2;
    end else begin
      m_hrdata = s_rsp[sel_d[SW-2:0]].hrdata;
      m_hready = s_rsp[sel_d[SW-2:0]].hreadyout;
      m_hresp  = s_rsp[sel_d[SW-2:0]].hresp;
    end
  end

  // An ERROR response takes two cycles: first with HREADY low, then high.
  a_err_two_cycle : assert property (@(posedge clk) disable iff (!rst_n)
      (m_hresp && !m_hready) |=> (m_hresp && m_hready))
    else $error("AHB ERROR response not two cycles");

endmodule
