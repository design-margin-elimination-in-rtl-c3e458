// ted_soc_top_tb: end-to-end test of the timing error-aware microcontroller
// system at its default size (224 error detection flip-flops, 5 MHz clock,
// 5% window, 64 KB SRAM), closing the dynamic voltage scaling loop.
// The testbench plays three roles:
//  - Processor software, through a behavioural AHB master: it tests the SRAM,
//    reads a byte from the UART receiver, sets up the error processor and the
//    UART, and runs an interrupt handler that, on a HI status, raises the
//    supply one step and, on a LO status, lowers it one step. Each new supply
//    code is written to GPIO and sent as a command byte over the UART.
//  - The supply regulator: the supply voltage follows the GPIO output.
//  - The critical paths: endpoint i launches random data at every rising edge
//    that arrives after a delay set by the supply voltage (alpha-power model,
//    calibrated so the most critical path equals the 200 ns period at 290 mV),
//    scaled down by 0.1% per endpoint index, with +/-0.3% random jitter.
// Checks: every endpoint captures the data launched one cycle earlier (no
// timing error escapes the flip-flops while the loop runs); UART command bytes
// decoded on the pin match the codes written; the loop settles within a few
// millivolts of the 290 mV point of first failure; and each mechanism
// occurred at least once: late data masked inside the window, HI and LO
// interrupts, GPIO and UART commands, UART reception, bus ERROR response.
`timescale 1ns / 1ps
module ted_soc_top_tb;
  import ted_pkg::*;

  localparam int unsigned N       = 224;
  localparam real         TCLK_NS = 200.0;
  localparam real         WIN_NS  = 10.0;
  localparam int unsigned STEP_MV = 2;
  localparam int unsigned BAUD    = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(TCLK_NS / 2.0) clk = ~clk;

  ahb_mreq_t     m_req;
  logic [31:0]   m_hrdata;
  logic          m_hready, m_hresp, irq;
  logic [N-1:0]  cp_d, cp_q;
  logic          cp_d_u [N];
  logic [15:0]   gpio_in, gpio_out, gpio_oe;
  logic          uart_rxd = 1'b1, uart_txd;

  int unsigned checks = 0, failures = 0;
  int unsigned n_masked = 0, n_escaped = 0, n_hi = 0, n_lo = 0, n_gpio = 0;
  int unsigned n_uart = 0, n_uart_rx = 0, n_bus_err = 0;
  logic        run_paths = 1'b0;
  int unsigned vdd_mv = 500;          // regulator output
  logic [7:0]  sent_q [$];

  ted_soc_top dut (
    .clk, .rst_n, .m_req, .m_hrdata, .m_hready, .m_hresp, .irq,
    .cp_d, .cp_q, .gpio_in, .gpio_out, .gpio_oe, .uart_rxd, .uart_txd
  );

  ahb_master_bfm bfm (.clk, .req(m_req), .hrdata(m_hrdata), .hready(m_hready),
                      .hresp(m_hresp));

  assign gpio_in = 16'h00A5;

  // regulator: follows the GPIO supply code once its outputs are enabled
  always @(gpio_out, gpio_oe) if (gpio_oe == 16'hFFFF) vdd_mv = int'(gpio_out);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  // critical path delay of the most critical endpoint at a supply voltage
  function automatic real path_delay_ns(input int unsigned mv);
    real v;
    v = real'(mv) / 1000.0;
    return TCLK_NS * ((0.09 / (v - 0.2)) ** 1.5);
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
      // one process per launch, so launches can overlap in flight
      fork
        automatic logic v  = cur;
        automatic real  tl = dl;
        begin
          #(tl) cp_d_u[i] = v;
        end
      join_none
      if (run_paths && exp_q != cp_d_u[i] && dl > TCLK_NS && dl < TCLK_NS + WIN_NS) n_masked++;
      #(WIN_NS + 5.0);
      if (run_paths && cp_q[i] !== exp_q) begin
        n_escaped++;
        if (n_escaped < 10) $display("escaped timing error on endpoint %0d at %0d mV", i, vdd_mv);
      end
    end
  end

  // UART line monitor: decode command bytes on the transmit pin
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (BAUD / 2) @(posedge clk);
      for (int k = 0; k < 8; k++) begin
        repeat (BAUD) @(posedge clk);
        b[k] = uart_txd;
      end
      repeat (BAUD) @(posedge clk);
      n_uart++;
      check("uart stop bit", 32'(uart_txd), 1);
      if (sent_q.size() != 0) check("uart command", 32'(b), 32'(sent_q.pop_front()));
      else begin
        failures++;
        $display("FAIL unexpected uart byte %02h", b);
      end
    end
  end

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog: vdd=%0d mV hi=%0d lo=%0d", vdd_mv, n_hi, n_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor software
  initial begin
    logic [31:0] v, st;
    logic rs;
    int unsigned lo_streak;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // memory test
    for (int i = 0; i < 32; i++) bfm.write(SRAM_BASE + 32'(i * 2048 + 4 * i), 32'h1234_0000 + 32'(i));
    for (int i = 0; i < 32; i++) begin
      bfm.read(SRAM_BASE + 32'(i * 2048 + 4 * i), v);
      check("sram", v, 32'h1234_0000 + 32'(i));
    end
    // unmapped address: bus ERROR response
    bfm.xfer(1'b0, 32'h7000_0000, 32'h0, 3'd2, v, rs);
    if (rs) n_bus_err++;
    check("bus error", 32'(rs), 1);

    // peripherals
    bfm.write(UART_BASE + UART_BAUD, BAUD);
    bfm.write(GPIO_BASE + GPIO_OUT, vdd_mv);
    bfm.write(GPIO_BASE + GPIO_OE, 32'hFFFF);
    bfm.read(GPIO_BASE + GPIO_IN, v);
    check("gpio in", v, 32'h00A5);
    // regulator announces itself with one byte on the receive line
    fork
      begin
        logic [9:0] f;
        f = {1'b1, 8'h3C, 1'b0};
        @(negedge clk);
        for (int k = 0; k < 10; k++) begin
          uart_rxd = f[k];
          repeat (BAUD) @(posedge clk);
        end
      end
    join_none
    do bfm.read(UART_BASE + UART_STATUS, v); while (!v[1]);
    bfm.read(UART_BASE + UART_DATA, v);
    check("uart rx", v, 32'h3C);
    n_uart_rx++;

    // error processor: 16-cycle windows, HI at 1 error cycle, LO at 0
    bfm.write(ERRP_BASE + ERRP_PERIOD, 16);
    bfm.write(ERRP_BASE + ERRP_THR_HI, 1);
    bfm.write(ERRP_BASE + ERRP_THR_LO, 0);
    run_paths = 1'b1;
    repeat (2) @(posedge clk);
    bfm.write(ERRP_BASE + ERRP_CTRL, 32'b111);

    // interrupt handler: voltage scaling loop until the supply has been
    // raised back several times (point of first failure found and held)
    lo_streak = 0;
    while (n_hi < 6 && vdd_mv > 250) begin
      wait (irq);
      bfm.read(ERRP_BASE + ERRP_STATUS, st);
      if (st[0]) begin
        n_hi++;
        bfm.write(GPIO_BASE + GPIO_OUT, int'(gpio_out) + STEP_MV);
      end else if (st[1]) begin
        n_lo++;
        bfm.write(GPIO_BASE + GPIO_OUT, int'(gpio_out) - STEP_MV);
      end
      n_gpio++;
      do bfm.read(UART_BASE + UART_STATUS, v); while (v[0]);
      sent_q.push_back(gpio_out[7:0]);
      bfm.write(UART_BASE + UART_DATA, 32'(gpio_out[7:0]));
      bfm.write(ERRP_BASE + ERRP_STATUS, 32'b111);
    end
    run_paths = 1'b0;
    bfm.read(ERRP_BASE + ERRP_LASTIX, v);
    check("lastix valid", 32'(v[31]), 1);
    checks++;
    if (v[15:0] >= 16'(N)) begin
      failures++;
      $display("FAIL lastix %0d", v[15:0]);
    end
    repeat (20 * BAUD) @(posedge clk);

    $display("settled at %0d mV: masked=%0d hi=%0d lo=%0d gpio=%0d uart=%0d escaped=%0d",
             vdd_mv, n_masked, n_hi, n_lo, n_gpio, n_uart, n_escaped);
    checks++;
    if (vdd_mv < 284 || vdd_mv > 296) begin
      failures++;
      $display("FAIL loop settled at %0d mV", vdd_mv);
    end
    check("no escaped timing errors", n_escaped, 0);
    check("uart commands all seen", 32'(sent_q.size()), 0);
    checks++; if (n_masked == 0)  begin failures++; $display("FAIL no masked late data"); end
    checks++; if (n_hi == 0)      begin failures++; $display("FAIL no HI interrupt"); end
    checks++; if (n_lo == 0)      begin failures++; $display("FAIL no LO interrupt"); end
    checks++; if (n_gpio == 0)    begin failures++; $display("FAIL no GPIO command"); end
    checks++; if (n_uart == 0)    begin failures++; $display("FAIL no UART command"); end
    checks++; if (n_uart_rx == 0) begin failures++; $display("FAIL no UART reception"); end
    checks++; if (n_bus_err == 0) begin failures++; $display("FAIL no bus error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
