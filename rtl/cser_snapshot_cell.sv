// cser_snapshot_cell: CSER cell for slow-speed snapshot (BISER cell plus one AND
// gate).
//
// Structure. A system flip-flop (PH2 master, transparent while clk = 0; PH1 slave,
// transparent while clk = 1) and a scan portion (LA master, LB slave) hold two
// copies of the bit. LA port 2 takes d while capture = 1 and clk = 0; LA port 1
// takes si while sca = 1. LB opens on scb OR (clk AND capture): the AND gate is
// what this cell adds to BISER. PH1 port 1 copies LB (o2) while update = 1. The
// C-element joins o1 (PH1) and o2 (LB) into q; so = ~o2.
//
// Modes. System: capture = 1, sca = scb = update = 0, test = 0 - the scan portion
// shadows the system flip-flop and the C-element masks a single upset in either.
// Snapshot: capture = 0 decouples the scan portion from clk, so the captured
// state can be shifted out with sca/scb at any rate while clk keeps running.
// Test: test = 1, shift with sca/scb, load PH1 with update, capture with clk.
//
// Timing. Edge-triggered on the rising edge of clk (master-slave); q changes on
// that edge, one cycle after d was set up. q and so carry the complement of the
// stored bit (C-element truth table); so's polarity is this design's choice.
module cser_snapshot_cell (
  input  logic d,
  input  logic clk,
  input  logic sca,
  input  logic scb,
  input  logic update,
  input  logic capture,
  input  logic test,
  input  logic si,
  output logic so,
  output logic q
);
  logic ph2_q, o1, la_q, o2;

  // System flip-flop
  d_latch  u_ph2 (.en(~clk), .d(d), .q(ph2_q));
  d_latch2 u_ph1 (.c1(update), .d1(o2), .c2(clk), .d2(ph2_q), .q(o1));

  // Scan portion
  d_latch2 u_la (.c1(sca), .d1(si), .c2(capture & ~clk), .d2(d), .q(la_q));
  d_latch  u_lb (.en(scb | (clk & capture)), .d(la_q), .q(o2));

  // Output joining circuit
  c_element u_cel (.o1(o1), .o2(o2), .test(test), .q(q));

  assign so = ~o2;
endmodule
