// s_element: selector coupled to the C-element for defect tolerance.
//
// It chooses what drives the cell output Q:
//   test select_o2 | q
//    0      0      | c_q, the C-element output (normal, soft-error resilient)
//    1      0      | ~o1, the system flip-flop alone (scan portion bypassed)
//    0      1      | ~o2, the scan portion alone (system flip-flop bypassed)
//    1      1      | ~o1 (combination not defined by the cell; this design's choice)
// The selected copies are inverted so that Q keeps the C-element's polarity in
// every mode. Purely combinational; the keeper after it is the C-element's.
module s_element (
  input  logic c_q,
  input  logic o1,
  input  logic o2,
  input  logic test,
  input  logic select_o2,
  output logic q
);
  always_comb begin
    unique case ({test, select_o2})
      2'b00:   q = c_q;
      2'b01:   q = ~o2;
      default: q = ~o1;
    endcase
  end
endmodule
