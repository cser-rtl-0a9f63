// mbiser_cell: modified BISER (MBISER) cell - CSER cell for slow-speed snapshot
// and manufacturing test.
//
// Identical to cser_snapshot_cell except for the scan-in port of LA, which now
// selects between sdi (shift = 1) and o1, the output of PH1 (shift = 0). With
// capture = 0 and shift = 0 an sca/scb pulse pair loads the system flip-flop's
// own output into the scan portion, so a fault at the output of PH2 becomes
// observable on sdo. Scan pins are named sdi/sdo in this cell.
//   snapshot : capture = 1 for a clk cycle loads d
//   shift    : shift = 1, capture = 0, sca/scb shift sdi -> sdo
//   load O1  : shift = 0, capture = 0, sca/scb copy PH1 into LA/LB
// Timing as in cser_snapshot_cell: rising-edge master-slave on clk, level-sensitive
// scan clocks. q and sdo carry the complement of the stored bit.
//
// Lint and synthesis report a logic loop o1 -> LA -> LB -> PH1 -> o1. It runs
// through three latches opened by sca, scb and update, which are never 1
// together in any mode, so it never forms a transparent path; it stands.
module mbiser_cell (
  input  logic d,
  input  logic clk,
  input  logic sca,
  input  logic scb,
  input  logic update,
  input  logic capture,
  input  logic test,
  input  logic shift,
  input  logic sdi,
  output logic sdo,
  output logic q
);
  logic ph2_q, o1, la_q, o2, scan_in;

  // System flip-flop
  d_latch  u_ph2 (.en(~clk), .d(d), .q(ph2_q));
  d_latch2 u_ph1 (.c1(update), .d1(o2), .c2(clk), .d2(ph2_q), .q(o1));

  // Scan portion: LA port 1 selects the scan input or PH1
  assign scan_in = (shift & sdi) | (~shift & o1);

  d_latch2 u_la (.c1(sca), .d1(scan_in), .c2(capture & ~clk), .d2(d), .q(la_q));
  d_latch  u_lb (.en(scb | (clk & capture)), .d(la_q), .q(o2));

  c_element u_cel (.o1(o1), .o2(o2), .test(test), .q(q));

  assign sdo = ~o2;
endmodule
