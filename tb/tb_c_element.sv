// tb_c_element: self-checking test of the inverting C-element with keeper.
// Walks o1/o2/test through sequences that exercise every row of the truth table:
// equal inputs drive q to their complement, unequal inputs keep the previous q
// (checked after both a 0 and a 1 was stored), and test = 1 makes q = ~o1
// whatever o2 is. Expected values come from a small reference model kept here.
module tb_c_element;
  logic o1, o2, test, q;
  logic exp_q;
  int checks = 0, failures = 0;

  c_element dut (.o1(o1), .o2(o2), .test(test), .q(q));

  task automatic apply(input logic a, input logic b, input logic t);
    o1 = a; o2 = b; test = t;
    #1;
    if (t || (a == b)) exp_q = ~a;   // driven; otherwise the keeper holds
    checks++;
    if (q !== exp_q) begin
      failures++;
      $display("FAIL o1=%0b o2=%0b test=%0b q=%0b exp=%0b", a, b, t, q, exp_q);
    end
  endtask

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(0, 0, 0);            // q = 1
    apply(0, 1, 0);            // hold 1
    apply(1, 0, 0);            // hold 1
    apply(1, 1, 0);            // q = 0
    apply(0, 1, 0);            // hold 0
    apply(1, 0, 0);            // hold 0
    apply(0, 0, 0);            // q = 1
    apply(1, 0, 1);            // test: q = ~o1 = 0
    apply(0, 1, 1);            // test: q = 1
    apply(1, 1, 1);            // q = 0
    apply(0, 1, 0);            // hold 0
    for (int i = 0; i < 64; i++) apply(1'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
