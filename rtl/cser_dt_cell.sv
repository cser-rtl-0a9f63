// cser_dt_cell: CSER cell for defect tolerance.
//
// The snapshot cell (cser_snapshot_cell) with an S-element after the C-element.
// test/select_o2 choose what drives q:
//   0/0  C-element (normal soft-error resilient operation)
//   1/0  ~o1 only: the scan portion is bypassed
//   0/1  ~o2 only: a defective system flip-flop is bypassed, the scan portion
//        (which shadows it while capture = 1) carries the state
// Everything else, including timing (rising edge of clk) and polarity (q is the
// complement of the stored bit), is as in cser_snapshot_cell.
module cser_dt_cell (
  input  logic d,
  input  logic clk,
  input  logic sca,
  input  logic scb,
  input  logic update,
  input  logic capture,
  input  logic test,
  input  logic select_o2,
  input  logic si,
  output logic so,
  output logic q
);
  logic ph2_q, o1, la_q, o2, c_q;

  d_latch  u_ph2 (.en(~clk), .d(d), .q(ph2_q));
  d_latch2 u_ph1 (.c1(update), .d1(o2), .c2(clk), .d2(ph2_q), .q(o1));

  d_latch2 u_la (.c1(sca), .d1(si), .c2(capture & ~clk), .d2(d), .q(la_q));
  d_latch  u_lb (.en(scb | (clk & capture)), .d(la_q), .q(o2));

  c_element u_cel (.o1(o1), .o2(o2), .test(test), .q(c_q));
  s_element u_sel (.c_q(c_q), .o1(o1), .o2(o2), .test(test), .select_o2(select_o2), .q(q));

  assign so = ~o2;
endmodule
