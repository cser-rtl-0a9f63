// muxed_scan_ff: ordinary muxed-scan flip-flop, as used between the CSER cells of
// the robust scan design. On the rising edge of clk it captures si when se = 1
// and d otherwise. It has no soft-error protection and no reset.
module muxed_scan_ff (
  input  logic d,
  input  logic si,
  input  logic se,
  input  logic clk,
  output logic q
);
  always_ff @(posedge clk) q <= se ? si : d;
endmodule
