// robust_scan_design: example scan design mixing MUX-based CSER cells with an
// ordinary muxed-scan flip-flop.
//
// Data path:  d_in -> CSER cell A -> comb0 -> muxed-scan FF -> comb1 -> CSER cell B.
// The combinational logic clouds are outside this module: their inputs
// (comb0_in, comb1_in) and outputs (comb0_out, comb1_out) are ports.
// Slow scan chain (manufacturing test, se = 1): si -> A.si, A.q_so -> FF.si,
// FF.q -> B.si, B.q_so -> so.
// Debug chain (online debug, debug = 1): sdi -> A.sdi, A.sdo -> B.sdi, B.sdo -> sdo.
// se, debug and test are global, as are clk, sck and update (the last two are
// pins of the CSER cell that the example scan design does not draw; routing
// them globally is this design's choice). The plain flip-flop is clocked by clk
// only, so during a slow-chain shift clk must pulse together with sck.
//
// The control bundle carries clocks and the clock-mux selects, so lint reports
// it as used both synchronously and asynchronously; that is intended.
module robust_scan_design
  import cser_pkg::*;
(
  input  scan_ctrl_t ctrl,
  input  logic       d_in,       // D of CSER cell A
  input  logic       si,         // slow scan chain in
  output logic       so,         // slow scan chain out (= q_out)
  input  logic       sdi,        // debug chain in
  output logic       sdo,        // debug chain out
  output logic       comb0_in,   // to the first logic cloud (cell A Q/SO)
  input  logic       comb0_out,  // from the first logic cloud (to FF D)
  output logic       comb1_in,   // to the second logic cloud (FF Q)
  input  logic       comb1_out,  // from the second logic cloud (to cell B D)
  output logic       q_out       // Q/SO of cell B
);
  logic a_q, a_sdo, ff_q, b_q;

  mux_cser_cell u_cell_a (
    .d(d_in), .si(si), .sdi(sdi),
    .se(ctrl.se), .debug(ctrl.debug), .update(ctrl.update), .test(ctrl.test),
    .clk(ctrl.clk), .sck(ctrl.sck),
    .sdo(a_sdo), .q_so(a_q)
  );

  muxed_scan_ff u_ff (
    .d(comb0_out), .si(a_q), .se(ctrl.se), .clk(ctrl.clk), .q(ff_q)
  );

  mux_cser_cell u_cell_b (
    .d(comb1_out), .si(ff_q), .sdi(a_sdo),
    .se(ctrl.se), .debug(ctrl.debug), .update(ctrl.update), .test(ctrl.test),
    .clk(ctrl.clk), .sck(ctrl.sck),
    .sdo(sdo), .q_so(b_q)
  );

  assign comb0_in = a_q;
  assign comb1_in = ff_q;
  assign q_out    = b_q;
  assign so       = b_q;
endmodule
