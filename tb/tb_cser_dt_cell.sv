// tb_cser_dt_cell: self-checking test of the defect-tolerance CSER cell.
//
// 1. Normal mode (test = 0, select_o2 = 0): upsets in PH1 / LB are masked.
// 2. Select O2: the output of PH2 is forced stuck (a defective system
//    flip-flop) for many cycles; with select_o2 = 1 and capture = 1 the scan
//    portion carries the state and q must still be ~d after every edge.
// 3. Select O1: the output of LA is forced stuck (a defective scan portion); with
//    test = 1 q must follow the system flip-flop.
// 4. For contrast, with both selects 0 and the system flip-flop stuck, q can no
//    longer follow d, which shows the bypass is what keeps the cell working.
module tb_cser_dt_cell;
  logic d, clk, sca, scb, update, capture, test, select_o2, si;
  logic so, q;
  logic exp_q;
  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_seu = 0, n_bypass_o1 = 0, n_bypass_o2 = 0, n_stuck_seen = 0;

  cser_dt_cell dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic cycle(input logic v);
    d = v;
    #4;
    chk("q before edge", q, exp_q);
    clk = 1;
    #1;
    exp_q = ~v;
    chk("q after edge", q, exp_q);
    #4 clk = 0;
    #1;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int misses;
    clk = 0; sca = 0; scb = 0; update = 0; capture = 1; test = 0; select_o2 = 0; si = 0; d = 0;
    #5 clk = 1; #5 clk = 0; #5 clk = 1; #5 clk = 0; #1;
    exp_q = 1;

    // 1. normal mode with upsets
    for (int i = 0; i < 16; i++) begin
      cycle(1'($urandom));
      if (i % 2 == 0) begin fv = ~dut.u_ph1.q; force dut.u_ph1.q = fv; #1 release dut.u_ph1.q; end
      else            begin force dut.u_lb.q  = ~dut.u_lb.q;  #1 release dut.u_lb.q;  end
      #1 chk("q masks upset", q, exp_q);
      n_seu++;
    end

    // 2. defective system flip-flop bypassed through O2
    cycle(1'($urandom));            // refresh both copies after the last upset
    select_o2 = 1;
    cycle(1'($urandom));
    force dut.u_ph2.q = 1'b0;
    for (int i = 0; i < 20; i++) begin
      cycle(1'($urandom));
      chk("sdo shadow while bypassing O1", so, exp_q);
      n_bypass_o2++;
    end

    // 4. same defect without the bypass: q cannot follow d
    select_o2 = 0;
    misses = 0;
    for (int i = 0; i < 10; i++) begin
      d = 1'(i % 2);
      #4 clk = 1; #1;
      if (q !== ~d) misses++;
      #4 clk = 0; #1;
    end
    checks++;
    if (misses == 0) begin
      failures++;
      $display("FAIL stuck system flip-flop had no effect without bypass");
    end else n_stuck_seen++;
    release dut.u_ph2.q;
    d = 1'b0; #4 clk = 1; #5 clk = 0; #1;
    exp_q = 1'b1;
    cycle(1'b1);

    // 3. defective scan portion bypassed through O1
    test = 1;
    force dut.u_la.q = 1'b1;
    for (int i = 0; i < 20; i++) begin
      cycle(1'($urandom));
      n_bypass_o1++;
    end
    release dut.u_la.q;
    test = 0;
    cycle(1'($urandom)); cycle(1'($urandom));

    if (n_seu == 0 || n_bypass_o1 == 0 || n_bypass_o2 == 0 || n_stuck_seen == 0) failures++;
    $display("seu=%0d bypass_o1=%0d bypass_o2=%0d stuck_seen=%0d",
             n_seu, n_bypass_o1, n_bypass_o2, n_stuck_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
