// mux_cser_cell: MUX-based CSER cell for test and debug, built from two
// muxed-scan flip-flops.
//
// SDFF1 is the system flip-flop: its clock mux takes sck when se = 1, else clk;
// its data mux takes si when se = 1, else the UPDATE mux output. SDFF2 is the
// shadow / debug flip-flop: clock mux sck when debug = 1, else clk; data mux sdi
// when debug = 1, else the UPDATE mux output. The UPDATE mux selects d
// (update = 0) or o2, SDFF2's output (update = 1). The C-element joins o1 and o2
// into q_so, which is both the cell output and the slow scan chain output; sdo =
// ~o2 is the debug chain output.
//   system     : se = debug = update = 0, test = 0 - both flops capture d on clk,
//                an upset in either is masked by the C-element
//   slow scan  : se = 1, test = 1 - SDFF1 shifts si -> q_so on sck
//   snapshot   : debug = 1 - SDFF2 keeps the captured state and shifts it
//                sdi -> sdo on sck while SDFF1 keeps running on clk
//   enhanced   : V2 is shifted into SDFF2; a clk with update = 1 launches it
//                into SDFF1 (two-pattern delay test)
// Both flops are rising-edge. That SDFF2's system input is also taken from the
// UPDATE mux is this design's reading of the cell drawing. q_so and sdo carry
// the complement of the stored bit.
//
// se and debug select both a clock and a data input, so lint reports them as
// used both synchronously and as clocks; that is the cell's clock-mux design.
// Change se/debug only while clk and sck are low to avoid clock glitches.
module mux_cser_cell (
  input  logic d,
  input  logic si,
  input  logic sdi,
  input  logic se,
  input  logic debug,
  input  logic update,
  input  logic test,
  input  logic clk,
  input  logic sck,
  output logic sdo,
  output logic q_so
);
  logic o1, o2, d_upd, ck1, ck2;

  // Enhanced-scan UPDATE mux
  assign d_upd = update ? o2 : d;

  // SDFF1: clock and data muxes controlled by SE
  assign ck1 = se ? sck : clk;
  always_ff @(posedge ck1) o1 <= se ? si : d_upd;

  // SDFF2: clock and data muxes controlled by DEBUG
  assign ck2 = debug ? sck : clk;
  always_ff @(posedge ck2) o2 <= debug ? sdi : d_upd;

  c_element u_cel (.o1(o1), .o2(o2), .test(test), .q(q_so));

  assign sdo = ~o2;
endmodule
