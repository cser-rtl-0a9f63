// d_latch: one-port, level-sensitive D latch (PH2 and LB of the CSER cells).
//
// While en is 1 the latch is transparent (q follows d); while en is 0 it holds.
// This is the plain gate-level latch the cell schematics use; there is no reset,
// as in the cells themselves: the content is set by the first transparent phase.
module d_latch (
  input  logic en,
  input  logic d,
  output logic q
);
  always_latch begin
    if (en) q = d;
  end
endmodule
