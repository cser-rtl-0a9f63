// cser_full_cell: CSER cell with test, debug, soft-error resilience and defect
// tolerance - the CBISER cell (signature logic) with the S-element of the defect
// tolerance cell added after its C-element.
//
// Scanout portion and modes as in cbiser_cell (shift/capture/load select load-O1,
// clear, shift, snapshot and signature); output selection as in cser_dt_cell
// (test/select_o2: C-element, ~o1 only, ~o2 only). Rising-edge clk timing; q and
// sdo carry the complement of the stored bit.
//
// Lint and synthesis report a logic loop o1 -> LA -> LB -> PH1 -> o1. It runs
// through three latches opened by sca, scb and update, which are never 1
// together in any mode, so it never forms a transparent path; it stands.
module cser_full_cell (
  input  logic d,
  input  logic clk,
  input  logic sca,
  input  logic scb,
  input  logic update,
  input  logic capture,
  input  logic test,
  input  logic shift,
  input  logic load,
  input  logic select_o2,
  input  logic sdi,
  output logic sdo,
  output logic q
);
  logic ph2_q, o1, la_q, o2, scan_in, c_q;

  d_latch  u_ph2 (.en(~clk), .d(d), .q(ph2_q));
  d_latch2 u_ph1 (.c1(update), .d1(o2), .c2(clk), .d2(ph2_q), .q(o1));

  assign scan_in = (shift & sdi) | (load & o1);

  d_latch2 u_la (.c1(sca), .d1(scan_in), .c2(capture & ~clk), .d2(d ^ scan_in), .q(la_q));
  d_latch  u_lb (.en(scb | (clk & capture)), .d(la_q), .q(o2));

  c_element u_cel (.o1(o1), .o2(o2), .test(test), .q(c_q));
  s_element u_sel (.c_q(c_q), .o1(o1), .o2(o2), .test(test), .select_o2(select_o2), .q(q));

  assign sdo = ~o2;
endmodule
