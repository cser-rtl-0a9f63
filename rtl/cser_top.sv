// cser_top: the CSER cell family side by side.
//
// Holds the MUX-based robust scan design (two MUX-based CSER cells and a
// muxed-scan flip-flop with slow scan and debug chains) and one instance of each
// latch-based CSER cell: slow-speed snapshot, MBISER (manufacturing test),
// CBISER (signature analysis), defect tolerance, and the combined
// CBISER + S-element cell, and the MUX-based cell extended with signature logic
// and an S-element (mx_* ports). The latch-based cells are alternatives, not parts of
// one circuit, so each has its own control bundle (lc_ctrl[i]), data inputs
// (lc_in[i]) and outputs (lc_out[i]), indexed by cser_pkg::cell_e. Fields of
// latch_ctrl_t that a cell lacks are ignored for that cell. The logic clouds of
// the scan design are external and connect through the comb* ports.
// Timing: every cell is rising-edge on its clk; scan clocks are level-sensitive
// (latch cells) or rising-edge on sck (MUX-based cells).
//
// The control bundle carries clocks and the clock-mux selects, so lint reports
// it as used both synchronously and asynchronously; that is intended.
module cser_top
  import cser_pkg::*;
(
  // Latch-based CSER cells
  input  latch_ctrl_t   lc_ctrl [NUM_LATCH_CELLS],
  input  latch_io_in_t  lc_in   [NUM_LATCH_CELLS],
  output latch_io_out_t lc_out  [NUM_LATCH_CELLS],
  // MUX-based robust scan design
  input  scan_ctrl_t    rs_ctrl,
  input  logic          rs_d_in,
  input  logic          rs_si,
  output logic          rs_so,
  input  logic          rs_sdi,
  output logic          rs_sdo,
  output logic          rs_comb0_in,
  input  logic          rs_comb0_out,
  output logic          rs_comb1_in,
  input  logic          rs_comb1_out,
  output logic          rs_q_out,
  // MUX-based CSER cell with signature logic and S-element
  input  mux_ctrl_t     mx_ctrl,
  input  logic          mx_d,
  input  logic          mx_si,
  input  logic          mx_sdi,
  output logic          mx_sdo,
  output logic          mx_q_so
);
  localparam int S = int'(CELL_SNAPSHOT);
  localparam int M = int'(CELL_MBISER);
  localparam int C = int'(CELL_CBISER);
  localparam int T = int'(CELL_DT);
  localparam int F = int'(CELL_FULL);

  cser_snapshot_cell u_snapshot (
    .d(lc_in[S].d), .clk(lc_ctrl[S].clk), .sca(lc_ctrl[S].sca), .scb(lc_ctrl[S].scb),
    .update(lc_ctrl[S].update), .capture(lc_ctrl[S].capture), .test(lc_ctrl[S].test),
    .si(lc_in[S].si), .so(lc_out[S].so), .q(lc_out[S].q)
  );

  mbiser_cell u_mbiser (
    .d(lc_in[M].d), .clk(lc_ctrl[M].clk), .sca(lc_ctrl[M].sca), .scb(lc_ctrl[M].scb),
    .update(lc_ctrl[M].update), .capture(lc_ctrl[M].capture), .test(lc_ctrl[M].test),
    .shift(lc_ctrl[M].shift),
    .sdi(lc_in[M].si), .sdo(lc_out[M].so), .q(lc_out[M].q)
  );

  cbiser_cell u_cbiser (
    .d(lc_in[C].d), .clk(lc_ctrl[C].clk), .sca(lc_ctrl[C].sca), .scb(lc_ctrl[C].scb),
    .update(lc_ctrl[C].update), .capture(lc_ctrl[C].capture), .test(lc_ctrl[C].test),
    .shift(lc_ctrl[C].shift), .load(lc_ctrl[C].load),
    .sdi(lc_in[C].si), .sdo(lc_out[C].so), .q(lc_out[C].q)
  );

  cser_dt_cell u_dt (
    .d(lc_in[T].d), .clk(lc_ctrl[T].clk), .sca(lc_ctrl[T].sca), .scb(lc_ctrl[T].scb),
    .update(lc_ctrl[T].update), .capture(lc_ctrl[T].capture), .test(lc_ctrl[T].test),
    .select_o2(lc_ctrl[T].select_o2),
    .si(lc_in[T].si), .so(lc_out[T].so), .q(lc_out[T].q)
  );

  cser_full_cell u_full (
    .d(lc_in[F].d), .clk(lc_ctrl[F].clk), .sca(lc_ctrl[F].sca), .scb(lc_ctrl[F].scb),
    .update(lc_ctrl[F].update), .capture(lc_ctrl[F].capture), .test(lc_ctrl[F].test),
    .shift(lc_ctrl[F].shift), .load(lc_ctrl[F].load), .select_o2(lc_ctrl[F].select_o2),
    .sdi(lc_in[F].si), .sdo(lc_out[F].so), .q(lc_out[F].q)
  );

  mux_cser_full_cell u_mux_full (
    .d(mx_d), .si(mx_si), .sdi(mx_sdi),
    .se(mx_ctrl.se), .debug(mx_ctrl.debug), .update(mx_ctrl.update), .test(mx_ctrl.test),
    .shift(mx_ctrl.shift), .select_o2(mx_ctrl.select_o2),
    .clk(mx_ctrl.clk), .sck(mx_ctrl.sck),
    .sdo(mx_sdo), .q_so(mx_q_so)
  );

  robust_scan_design u_scan (
    .ctrl(rs_ctrl), .d_in(rs_d_in), .si(rs_si), .so(rs_so), .sdi(rs_sdi), .sdo(rs_sdo),
    .comb0_in(rs_comb0_in), .comb0_out(rs_comb0_out),
    .comb1_in(rs_comb1_in), .comb1_out(rs_comb1_out), .q_out(rs_q_out)
  );
endmodule
