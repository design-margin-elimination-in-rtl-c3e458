// error_processor: AHB peripheral that turns the per-cycle timing error flags
// of the error detection flip-flops into interrupts for voltage scaling.
// The N_ERR error latch outputs are joined by `error_or_tree` (inputs ordered
// by timing slack). While enabled, the processor counts, over a window of
// PERIOD clock cycles, the cycles in which any error was flagged; this count is
// the error rate averaged over the window. At the end of every window the count
// is published in COUNT and compared with two thresholds: COUNT >= THR_HI sets
// status bit HI (supply too low), COUNT <= THR_LO sets status bit LO (room to
// lower the supply). `irq` is high while an enabled status bit is set;
// software clears bits by writing 1 to them in STATUS.
// Registers (offsets in ted_pkg): CTRL, PERIOD, THR_HI, THR_LO, COUNT (RO),
// STATUS (W1C), TOTAL (error cycles since cleared, write clears), LASTIX
// (valid bit and index of the most critical endpoint last flagged).
// Timing: an error latched in cycle k is counted at the edge ending cycle k+1
// (one register stage in the OR-tree); `irq` rises one cycle after the window
// closes. Joining the 224 signals with a slack-ordered OR-tree, averaging
// errors over several cycles and interrupting at preset thresholds follow the
// document; the register map, the two-threshold scheme and the reset values
// are this design's choices.
`timescale 1ns / 1ps
module error_processor
  import ted_pkg::*;
#(
  parameter int unsigned N_ERR        = 224,
  parameter int unsigned PERIOD_RESET = 1024,
  parameter int unsigned THR_HI_RESET = 1,
  parameter int unsigned THR_LO_RESET = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ahb_req_t         req,
  output ahb_rsp_t         rsp,
  input  logic [N_ERR-1:0] err_in,
  output logic             irq
);

  localparam int unsigned IW = (N_ERR > 1) ? $clog2(N_ERR) : 1;

  typedef struct packed {
    logic irq_lo_en;
    logic irq_hi_en;
    logic enable;
  } ctrl_t;

  typedef struct packed {
    logic done;
    logic lo;
    logic hi;
  } status_t;

  logic          wr_en, rd_en;
  logic [11:0]   addr;
  logic [3:0]    strb;
  logic [31:0]   wdata;

  logic          err_any;
  logic [IW-1:0] err_idx;

  ctrl_t         ctrl;
  status_t       status;
  logic [31:0]   period, thr_hi, thr_lo, count, total, cyc_cnt, win_cnt;
  logic          last_vld;
  logic [IW-1:0] last_idx;
  logic [31:0]   win_next;
  logic          win_end;

  ahb_slave_port #(.AW(12)) u_port (
    .clk, .rst_n, .req, .wr_en, .rd_en, .addr, .strb, .wdata
  );

  error_or_tree #(.N_ERR(N_ERR)) u_tree (
    .clk, .rst_n, .err_in, .err_any, .err_idx
  );

  wire wr_ctrl   = wr_en && {addr[7:2], 2'b00} == ERRP_CTRL;
  wire wr_period = wr_en && {addr[7:2], 2'b00} == ERRP_PERIOD;
  wire wr_thr_hi = wr_en && {addr[7:2], 2'b00} == ERRP_THR_HI;
  wire wr_thr_lo = wr_en && {addr[7:2], 2'b00} == ERRP_THR_LO;
  wire wr_status = wr_en && {addr[7:2], 2'b00} == ERRP_STATUS;
  wire wr_total  = wr_en && {addr[7:2], 2'b00} == ERRP_TOTAL;

  assign win_next = win_cnt + 32'(err_any);
  assign win_end  = ctrl.enable && (cyc_cnt + 32'd1 >= period);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl     <= '0;
      status   <= '0;
      period   <= 32'(PERIOD_RESET);
      thr_hi   <= 32'(THR_HI_RESET);
      thr_lo   <= 32'(THR_LO_RESET);
      count    <= '0;
      total    <= '0;
      cyc_cnt  <= '0;
      win_cnt  <= '0;
      last_vld <= 1'b0;
      last_idx <= '0;
    end else begin
      if (wr_ctrl)   ctrl   <= ctrl_t'(wdata[2:0]);
      if (wr_period) period <= wdata;
      if (wr_thr_hi) thr_hi <= wdata;
      if (wr_thr_lo) thr_lo <= wdata;

      // averaging window
      if (!ctrl.enable) begin
        cyc_cnt <= '0;
        win_cnt <= '0;
      end else if (win_end) begin
        cyc_cnt <= '0;
        win_cnt <= '0;
        count   <= win_next;
      end else begin
        cyc_cnt <= cyc_cnt + 32'd1;
        win_cnt <= win_next;
      end

      // status: write 1 to clear, a new event in the same cycle wins
      status <= wr_status ? (status & ~status_t'(wdata[2:0])) : status;
      if (win_end) begin
        status.done <= 1'b1;
        if (win_next >= thr_hi) status.hi <= 1'b1;
        if (win_next <= thr_lo) status.lo <= 1'b1;
      end

      if (wr_total) total <= '0;
      else if (ctrl.enable && err_any && total != '1) total <= total + 32'd1;

      if (ctrl.enable && err_any) begin
        last_vld <= 1'b1;
        last_idx <= err_idx;
      end
    end
  end

  assign irq = (status.hi && ctrl.irq_hi_en) || (status.lo && ctrl.irq_lo_en);

  always_comb begin
    rsp.hrdata = '0;
    if (rd_en) begin
      unique case ({addr[7:2], 2'b00})
        ERRP_CTRL:   rsp.hrdata = 32'(ctrl);
        ERRP_PERIOD: rsp.hrdata = period;
        ERRP_THR_HI: rsp.hrdata = thr_hi;
        ERRP_THR_LO: rsp.hrdata = thr_lo;
        ERRP_COUNT:  rsp.hrdata = count;
        ERRP_STATUS: rsp.hrdata = 32'(status);
        ERRP_TOTAL:  rsp.hrdata = total;
        ERRP_LASTIX: rsp.hrdata = {last_vld, 15'd0, 16'(last_idx)};
        default:     rsp.hrdata = '0;
      endcase
    end
  end
  assign rsp.hreadyout = 1'b1;
  assign rsp.hresp     = 1'b0;

endmodule
