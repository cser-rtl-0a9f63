// tb_cser_snapshot_cell: self-checking test of the slow-speed snapshot CSER cell.
//
// 1. System mode (capture = 1, test = 0): random data, q must change to ~d on the
//    rising clk edge and not before (one-cycle latency); so shadows it.
// 2. Soft errors: single upsets are injected into each of the four latches
//    (PH1 and LB while clk = 0, PH2 and LA while clk = 1, i.e. while they hold);
//    q must keep the correct value and the next cycle must restore both copies.
// 3. Test mode (test = 1): a bit is shifted in with sca/scb, moved into PH1 with
//    update, and a response is captured with clk.
// 4. Snapshot: capture = 0 while clk keeps running with new data; the scan
//    portion must keep the captured state and shift it out with sca/scb while q
//    keeps following the system data.
// Expected values come from a reference model in this file (exp_* variables).
module tb_cser_snapshot_cell;
  logic d, clk, sca, scb, update, capture, test, si;
  logic so, q;
  logic exp_sys, exp_scan;          // stored bit of the system flip-flop / scan portion
  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_seu = 0, n_snapshot = 0, n_shift = 0, n_update = 0;

  cser_snapshot_cell dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  // One functional clock cycle: d set up while clk = 0, rising edge, falling edge.
  task automatic cycle(input logic v);
    d = v;
    #4;
    chk("q before edge", q, ~exp_sys);
    clk = 1;
    #1;
    exp_sys = v;
    if (capture) exp_scan = v;
    chk("q after edge", q, ~exp_sys);
    chk("so after edge", so, ~exp_scan);
    #4 clk = 0;
    #1;
  endtask

  task automatic pulse_sca(); #1 sca = 1; #2 sca = 0; #1; endtask
  task automatic pulse_scb(); #1 scb = 1; #2 scb = 0; #1; endtask

  // Shift one bit: after sca only LA may have changed, so must still show the old bit.
  task automatic shift_bit(input logic b);
    si = b;
    pulse_sca();
    chk("so unchanged until scb", so, ~exp_scan);
    pulse_scb();
    exp_scan = b;
    n_shift++;
    chk("so after shift", so, ~exp_scan);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; sca = 0; scb = 0; update = 0; capture = 1; test = 0; si = 0; d = 0;
    // bring both copies to a known value
    #5 clk = 1; #5 clk = 0; #5 clk = 1; #5 clk = 0; #1;
    exp_sys = 0; exp_scan = 0;

    // 1. system mode
    for (int i = 0; i < 32; i++) cycle(1'($urandom));

    // 2. soft errors in each latch
    for (int i = 0; i < 8; i++) begin
      cycle(1'($urandom));
      // clk = 0: PH1 and LB hold the slave values
      fv = ~dut.u_ph1.q; force dut.u_ph1.q = fv; #1 release dut.u_ph1.q; #1;
      chk("q masks PH1 upset", q, ~exp_sys);
      n_seu++;
      cycle(1'($urandom));
      fv = ~dut.u_lb.q; force dut.u_lb.q = fv; #1 release dut.u_lb.q; #1;
      chk("q masks LB upset", q, ~exp_sys);
      n_seu++;
      cycle(1'($urandom));
      // clk = 1: PH2 and LA hold the master values
      d = 1'($urandom); #4 clk = 1; #1;
      exp_sys = d; exp_scan = d;
      chk("q after edge", q, ~exp_sys);
      if (i % 2 == 0) begin
        fv = ~dut.u_ph2.q; force dut.u_ph2.q = fv; #1 release dut.u_ph2.q; #1;
      end else begin
        fv = ~dut.u_la.q; force dut.u_la.q = fv; #1 release dut.u_la.q; #1;
      end
      chk("q masks master upset (clk high)", q, ~exp_sys);
      #2 clk = 0; #3;
      chk("q masks master upset (clk low)", q, ~exp_sys);
      n_seu++;
      cycle(1'($urandom));
      cycle(1'($urandom));
    end

    // 3. test mode: shift, update, capture
    test = 1; capture = 0;
    for (int i = 0; i < 6; i++) begin
      shift_bit(1'($urandom));
      #1 update = 1; #2 update = 0; #1;
      exp_sys = exp_scan;
      n_update++;
      chk("q after update", q, ~exp_sys);
      capture = 1;
      cycle(1'($urandom));
      capture = 0;
      chk("so holds captured response", so, ~exp_scan);
    end

    // 4. snapshot while the system clock keeps running
    test = 0; capture = 1;
    cycle(1'($urandom));
    cycle(1'($urandom));
    capture = 0; test = 1;          // scan portion decoupled, Q from PH1
    for (int i = 0; i < 12; i++) begin
      cycle(1'($urandom));
      chk("snapshot frozen while clk runs", so, ~exp_scan);
      if (i % 3 == 2) shift_bit(1'($urandom));
      // scan clock overlapping the high phase of clk: no flush-through to so
      si = 1'($urandom);
      d = 1'($urandom);
      #2 clk = 1; #1;
      exp_sys = d;
      pulse_sca();
      chk("so unchanged while sca and clk overlap", so, ~exp_scan);
      chk("q follows system data during shift", q, ~exp_sys);
      #1 clk = 0; #1;
      pulse_scb();
      exp_scan = si;
      chk("so after overlapped shift", so, ~exp_scan);
      n_snapshot++;
    end
    test = 0; capture = 1;
    cycle(1'($urandom));
    cycle(1'($urandom));

    if (n_seu == 0 || n_snapshot == 0 || n_shift == 0 || n_update == 0) failures++;
    $display("seu=%0d snapshot=%0d shift=%0d update=%0d", n_seu, n_snapshot, n_shift, n_update);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
