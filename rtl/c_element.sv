// c_element: inverting Muller C-element with keeper, the output joining circuit of
// every CSER cell.
//
// System mode (test = 0): when o1 and o2 agree the output is driven to their
// complement (0,0 -> 1 and 1,1 -> 0); when they disagree the output is not
// driven and the keeper holds the previous value. A single upset in either copy of
// the stored bit therefore cannot reach q. Test mode (test = 1): o2 is ignored and
// the element is an inverter of o1. The keeper is modelled by the latch behaviour
// of q; the truth table and the test-mode inverter follow the CSER cell
// description, the choice to fold the keeper into this module is this design's.
// Purely level-sensitive, no clock.
//
// Lint may report that it finds no latch here; q does hold while o1 != o2
// and test = 0 (that hold is the keeper), which synthesis maps to a latch.
module c_element (
  input  logic o1,
  input  logic o2,
  input  logic test,
  output logic q
);
  logic drive;

  assign drive = test | (o1 == o2);

  always_latch begin
    if (drive) q = ~o1;
  end
endmodule
