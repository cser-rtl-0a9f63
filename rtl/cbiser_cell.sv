// cbiser_cell: concurrent BISER (CBISER) cell - CSER cell for slow-speed
// signature analysis.
//
// The MBISER cell with signature logic: a LOAD input and one XOR gate. The LA
// scan-in port takes  m = (shift AND sdi) OR (load AND o1),  and the LA capture
// port takes  d XOR m. Operation (shift, capture, load):
//   0 0 1  load O1        : sca/scb copy PH1 into the scanout portion
//   0 0 0  clear          : sca/scb load 0
//   1 0 0  shift          : sca/scb shift sdi -> sdo
//   0 1 0  snapshot       : a clk cycle loads d (as PH1 does)
//   1 1 0  signature      : a clk cycle loads d XOR sdi, i.e. compresses the new
//                           system value with the upstream cell's scanout bit
// In slow-speed signature analysis capture is 1 for one clk cycle and 0 for one or
// more cycles, so the debug chain can run far slower than clk. Placing the XOR on
// the capture port (so that it is inert outside signature mode) is how this
// design reads the cell drawing. Timing as in cser_snapshot_cell.
//
// Lint and synthesis report a logic loop o1 -> LA -> LB -> PH1 -> o1. It runs
// through three latches opened by sca, scb and update, which are never 1
// together in any mode, so it never forms a transparent path; it stands.
module cbiser_cell (
  input  logic d,
  input  logic clk,
  input  logic sca,
  input  logic scb,
  input  logic update,
  input  logic capture,
  input  logic test,
  input  logic shift,
  input  logic load,
  input  logic sdi,
  output logic sdo,
  output logic q
);
  logic ph2_q, o1, la_q, o2, scan_in;

  // System flip-flop
  d_latch  u_ph2 (.en(~clk), .d(d), .q(ph2_q));
  d_latch2 u_ph1 (.c1(update), .d1(o2), .c2(clk), .d2(ph2_q), .q(o1));

  // Scanout portion with signature logic
  assign scan_in = (shift & sdi) | (load & o1);

  d_latch2 u_la (.c1(sca), .d1(scan_in), .c2(capture & ~clk), .d2(d ^ scan_in), .q(la_q));
  d_latch  u_lb (.en(scb | (clk & capture)), .d(la_q), .q(o2));

  c_element u_cel (.o1(o1), .o2(o2), .test(test), .q(q));

  assign sdo = ~o2;
endmodule
