// mux_cser_full_cell: MUX-based CSER cell extended with signature logic and an
// S-element, for slow-speed signature analysis and defect tolerance.
//
// It is mux_cser_cell (two muxed-scan flip-flops SDFF1/SDFF2 joined by a
// C-element, UPDATE mux for enhanced scan) with the two additions made in the
// same way as in the latch-based cells:
//   * signature logic: one AND and one XOR on SDFF2's system input, which
//     becomes  u XOR (shift AND sdi)  with u = update ? o2 : d. With shift = 0
//     SDFF2 shadows SDFF1 as before; with shift = 1 a clk edge loads d XOR sdi,
//     compressing the new value with the upstream debug-chain bit. DEBUG plays
//     the part of ~CAPTURE: debug = 0 for one clk cycle captures (or compresses),
//     debug = 1 holds SDFF2 and lets sck shift the debug chain at a slow rate.
//   * S-element after the C-element: test/select_o2 = 0/0 C-element, 1/0 ~o1
//     only, 0/1 ~o2 only (a defective SDFF1 bypassed).
// The source says such a cell can be built but draws no circuit for it; the gate
// placement above is this design's simplest choice. Rising-edge flip-flops; q_so
// and sdo carry the complement of the stored bit. se and debug select clocks as
// well as data (lint reports this); change them only while clk and sck are low.
module mux_cser_full_cell (
  input  logic d,
  input  logic si,
  input  logic sdi,
  input  logic se,
  input  logic debug,
  input  logic update,
  input  logic test,
  input  logic shift,
  input  logic select_o2,
  input  logic clk,
  input  logic sck,
  output logic sdo,
  output logic q_so
);
  logic o1, o2, d_upd, ck1, ck2, c_q;

  assign d_upd = update ? o2 : d;

  // SDFF1: system flip-flop, slow scan chain
  assign ck1 = se ? sck : clk;
  always_ff @(posedge ck1) o1 <= se ? si : d_upd;

  // SDFF2: shadow / debug flip-flop with signature logic
  assign ck2 = debug ? sck : clk;
  always_ff @(posedge ck2) o2 <= debug ? sdi : (d_upd ^ (shift & sdi));

  c_element u_cel (.o1(o1), .o2(o2), .test(test), .q(c_q));
  s_element u_sel (.c_q(c_q), .o1(o1), .o2(o2), .test(test), .select_o2(select_o2), .q(q_so));

  assign sdo = ~o2;
endmodule
