// tb_s_element: exhaustive self-checking test of the S-element selector.
// For every combination of c_q, o1, o2, test and select_o2 the output is compared
// with the mode table: normal -> c_q, select O1 -> ~o1, select O2 -> ~o2, and the
// undefined test = select_o2 = 1 case -> ~o1.
module tb_s_element;
  logic c_q, o1, o2, test, select_o2, q, exp_q;
  int checks = 0, failures = 0;

  s_element dut (.c_q(c_q), .o1(o1), .o2(o2), .test(test), .select_o2(select_o2), .q(q));

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {c_q, o1, o2, test, select_o2} = 5'(v);
      #1;
      if (!test && !select_o2)     exp_q = c_q;
      else if (!test && select_o2) exp_q = ~o2;
      else                         exp_q = ~o1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL vector %05b q=%0b exp=%0b", v[4:0], q, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
