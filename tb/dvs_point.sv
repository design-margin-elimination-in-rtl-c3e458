// dvs_point: one voltage scaling experiment for ted_dvs_sweep_tb. It builds a
// ted_soc_top with N_EDFF endpoints and a clock of TCLK_PS, and closes the
// supply loop around it as ted_soc_top_tb does: software on a behavioural AHB
// master steps the supply code on GPIO by 2 mV on every HI or LO interrupt,
// the regulator follows GPIO, and each endpoint's data arrives after an
// alpha-power delay of the supply (most critical path 200 ns at 290 mV,
// 0.1% faster per endpoint index, +/-0.3% jitter). The model's point of first
// failure for this clock is where the most critical path equals the period:
// V = 0.2 V + 0.09 V * (200 ns / T)^(2/3). The experiment passes if no
// timing error escapes the flip-flops, both interrupts occurred, and the loop
// settles between 4 mV below and 8 mV above that voltage. The upper allowance
// covers the last upward step and the master latch delay: data arriving up to
// TM_PS before the edge is already flagged, so the loop stops slightly early. `done` rises when it has finished.
`timescale 1ns / 1ps
module dvs_point
  import ted_pkg::*;
#(
  parameter int unsigned TCLK_PS  = 200000,
  parameter int unsigned N        = 32,
  parameter int unsigned START_MV = 500
) (
  output logic        done,
  output int unsigned checks,
  output int unsigned failures,
  output int unsigned settled_mv
);

  localparam real TCLK_NS = real'(TCLK_PS) / 1000.0;
  localparam real WIN_NS  = TCLK_NS * 0.05;
  localparam int unsigned STEP_MV = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK_NS / 2.0) clk = ~clk;

  ahb_mreq_t     m_req;
  logic [31:0]   m_hrdata;
  logic          m_hready, m_hresp, irq;
  logic [N-1:0]  cp_d, cp_q;
  logic          cp_d_u [N];
  logic [15:0]   gpio_out, gpio_oe;
  logic          uart_txd;
  int unsigned   n_masked = 0, n_escaped = 0, n_hi = 0, n_lo = 0;
  logic          run_paths = 1'b0;
  int unsigned   vdd_mv = START_MV;

  ted_soc_top #(.N_EDFF(N), .TCLK_PS(TCLK_PS)) dut (
    .clk, .rst_n, .m_req, .m_hrdata, .m_hready, .m_hresp, .irq,
    .cp_d, .cp_q, .gpio_in(16'h0), .gpio_out, .gpio_oe, .uart_rxd(1'b1), .uart_txd
  );

  ahb_master_bfm bfm (.clk, .req(m_req), .hrdata(m_hrdata), .hready(m_hready),
                      .hresp(m_hresp));

  always @(gpio_out, gpio_oe) if (gpio_oe == 16'hFFFF) vdd_mv = int'(gpio_out);

  function automatic real path_delay_ns(input int unsigned mv);
    real v;
    v = real'(mv) / 1000.0;
    return 200.0 * ((0.09 / (v - 0.2)) ** 1.5);
  endfunction

  always_comb for (int i = 0; i < N; i++) cp_d[i] = cp_d_u[i];

  for (genvar i = 0; i < N; i++) begin : g_path
    logic cur = 1'b0, exp_q;
    real  dl;
    initial cp_d_u[i] = 1'b0;
    always @(posedge clk) begin
      exp_q = cur;
      dl = path_delay_ns(vdd_mv) * (1.0 - 0.001 * real'(i))
           * (1.0 + real'(int'($urandom_range(0, 600)) - 300) / 100000.0);
      if (run_paths) cur = 1'($urandom_range(0, 1));
      fork
        automatic logic v  = cur;
        automatic real  tl = dl;
        begin
          #(tl) cp_d_u[i] = v;
        end
      join_none
      if (run_paths && exp_q != cp_d_u[i] && dl > TCLK_NS && dl < TCLK_NS + WIN_NS) n_masked++;
      #(WIN_NS + TCLK_NS * 0.02);
      if (run_paths && cp_q[i] !== exp_q) n_escaped++;
    end
  end

  initial begin
    logic [31:0] st;
    real poff;
    done       = 1'b0;
    checks     = 0;
    failures   = 0;
    settled_mv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    bfm.write(GPIO_BASE + 32'(GPIO_OUT), vdd_mv);
    bfm.write(GPIO_BASE + 32'(GPIO_OE), 32'hFFFF);
    bfm.write(ERRP_BASE + 32'(ERRP_PERIOD), 16);
    bfm.write(ERRP_BASE + 32'(ERRP_THR_HI), 1);
    bfm.write(ERRP_BASE + 32'(ERRP_THR_LO), 0);
    run_paths = 1'b1;
    repeat (2) @(posedge clk);
    bfm.write(ERRP_BASE + 32'(ERRP_CTRL), 32'b111);
    while (n_hi < 6 && vdd_mv > 250) begin
      wait (irq);
      bfm.read(ERRP_BASE + 32'(ERRP_STATUS), st);
      if (st[0]) begin
        n_hi++;
        bfm.write(GPIO_BASE + 32'(GPIO_OUT), int'(gpio_out) + STEP_MV);
      end else if (st[1]) begin
        n_lo++;
        bfm.write(GPIO_BASE + 32'(GPIO_OUT), int'(gpio_out) - STEP_MV);
      end
      bfm.write(ERRP_BASE + 32'(ERRP_STATUS), 32'b111);
    end
    run_paths = 1'b0;
    repeat (2) @(posedge clk);
    poff = 200.0 + 90.0 * ((200.0 / TCLK_NS) ** (2.0 / 3.0));
    settled_mv = vdd_mv;
    $display("%0.1f MHz: settled at %0d mV, model point of first failure %0.1f mV, masked=%0d hi=%0d lo=%0d escaped=%0d",
             1.0e3 / TCLK_NS, vdd_mv, poff, n_masked, n_hi, n_lo, n_escaped);
    checks += 3;
    if (real'(vdd_mv) < poff - 4.0 || real'(vdd_mv) > poff + 8.0) begin
      failures++;
      $display("FAIL %0.1f MHz settled at %0d mV", 1.0e3 / TCLK_NS, vdd_mv);
    end
    if (n_escaped != 0) begin
      failures++;
      $display("FAIL %0d escaped timing errors", n_escaped);
    end
    if (n_lo == 0 || n_hi == 0) begin
      failures++;
      $display("FAIL interrupts hi=%0d lo=%0d", n_hi, n_lo);
    end
    done = 1'b1;
  end

endmodule
