// edff: behavioural model of the timing error-aware soft edge flip-flop, which
// replaces ordinary master/slave flip-flops on the most critical path endpoints.
// It cannot be synthesised from RTL: it is a custom differential transmission
// gate cell whose behaviour rests on clock overlap and latch delays, so this
// file models it with delays.
// Parts, as in the cell: a timing/control block (edff_timing_ctrl) makes
// overlapping master and slave clocks; a master latch, transparent while
// `mclk`, with internal delay TM_PS; a slave latch, transparent while `sclk`;
// a transition detector that pulses `edge` while the differential input and
// the delayed master node disagree (1-1 overlap of D with the delayed D_bar,
// or of D_bar with the delayed D); and an error latch, set by `edge` while the
// overlap window is open and cleared at every rising clock edge.
// Behaviour: data that settles before the rising edge passes at the edge and
// raises no error. Data that changes within the window after the edge ripples
// through both transparent latches to Q (time borrowed from the next stage,
// the timing error is masked) and sets `err`. `err` stays high for the rest of
// the cycle and is sampled at the next rising edge, the edge that clears it.
// Data later than the window is not captured (a real timing failure).
// Ports: clk; differential data d/d_b in and q/q_b out; err.
// Window width WINDOW_PCT percent of TCLK_PS follows the design description (5%); the
// master latch delay TM_PS is this model's own number. The master and slave
// latches are latches on purpose: they are the cell's storage.
`timescale 1ns / 1ps
module edff #(
  parameter int unsigned TCLK_PS    = 200000,  // clock period (5 MHz)
  parameter int unsigned WINDOW_PCT = 5,       // overlap window, % of period
  parameter int unsigned TM_PS      = 500      // master latch internal delay
) (
  input  logic clk,
  input  logic d,
  input  logic d_b,
  output logic q,
  output logic q_b,
  output logic err
);

  localparam int unsigned WIN_PS = TCLK_PS * WINDOW_PCT / 100;

  logic sclk, mclk, window;
  logic m_in, m, m_b;     // master latch: ideal state and delayed node
  logic s;                // slave latch state
  logic edge_p;           // transition detector pulse
  logic set_err;

  edff_timing_ctrl #(.WIN_PS(WIN_PS)) u_tc (
    .clk, .sclk, .mclk, .window
  );

  initial begin
    m_in = 1'b0;
    m    = 1'b0;
    s    = 1'b0;
    err  = 1'b0;
  end

  // master latch with internal delay; its delayed node doubles as D_d
  always @(d, mclk) if (mclk) m_in = d;
  always @(m_in) m <= #(TM_PS * 1ps) m_in;
  assign m_b = ~m;

  // slave latch
  always @(m, sclk) if (sclk) s = m;
  assign q   = s;
  assign q_b = ~s;

  // transition detector: 1-1 overlap of D with D_d,bar or of D_bar with D_d
  assign edge_p  = (d & m_b) | (d_b & m);
  assign set_err = edge_p & window;

  // error latch: set inside the window, cleared at the start of each cycle
  always @(posedge clk or posedge set_err)
    if (set_err) err <= 1'b1;
    else         err <= 1'b0;

endmodule
