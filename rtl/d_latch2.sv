// d_latch2: two-port, level-sensitive D latch (PH1 and LA of the CSER cells).
//
// Port 1 (c1/d1) and port 2 (c2/d2) each make the latch transparent to their own
// data input; with both clocks at 0 it holds. In the cells the two clocks are
// never 1 together in a legal mode; should they be, port 1 wins here (a choice of
// this model, the cells do not define it). No reset, like the cells' latches.
module d_latch2 (
  input  logic c1,
  input  logic d1,
  input  logic c2,
  input  logic d2,
  output logic q
);
  always_latch begin
    if (c1)      q = d1;
    else if (c2) q = d2;
  end
endmodule
