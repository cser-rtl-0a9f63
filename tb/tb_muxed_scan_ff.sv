// tb_muxed_scan_ff: self-checking test of the muxed-scan flip-flop. Random d, si
// and se are applied; after every rising clk edge q must equal si when se was 1
// and d otherwise, and q must not change before the edge.
module tb_muxed_scan_ff;
  logic d, si, se, clk, q, exp_q;
  int checks = 0, failures = 0;

  muxed_scan_ff dut (.d(d), .si(si), .se(se), .clk(clk), .q(q));

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; d = 0; si = 0; se = 0;
    #5 clk = 1; #5 clk = 0; exp_q = 0;
    for (int i = 0; i < 100; i++) begin
      d = 1'($urandom); si = 1'($urandom); se = 1'($urandom);
      #4 chk("hold before edge", q, exp_q);
      clk = 1; #1;
      exp_q = se ? si : d;
      chk("capture", q, exp_q);
      #4 clk = 0; #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
