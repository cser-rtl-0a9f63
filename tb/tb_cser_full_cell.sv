// tb_cser_full_cell: self-checking test of the combined CSER cell (signature
// logic plus S-element).
//
// Checks system-mode upset masking, the scanout mode table (load O1, clear,
// shift, snapshot, signature), slow-speed signature analysis with clk running,
// and both bypass modes of the S-element with a forced stuck-at defect: the
// system flip-flop bypassed through O2 and the scanout portion bypassed through
// O1. Expected values come from the reference variables exp_sys / exp_scan.
module tb_cser_full_cell;
  logic d, clk, sca, scb, update, capture, test, shift, load, select_o2, sdi;
  logic sdo, q;
  logic exp_sys, exp_scan;
  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_seu = 0, n_load_o1 = 0, n_clear = 0, n_shift = 0, n_snapshot = 0, n_signature = 0;
  int n_bypass_o1 = 0, n_bypass_o2 = 0;

  cser_full_cell dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  // q is checked against the copy the output currently follows
  function automatic logic exp_q();
    return (!test && select_o2) ? ~exp_scan : ~exp_sys;
  endfunction

  task automatic cycle(input logic v);
    logic m;
    d = v;
    #4;
    chk("q before edge", q, exp_q());
    m = (shift & sdi) | (load & exp_sys);
    clk = 1;
    #1;
    exp_sys = v;
    if (capture) exp_scan = v ^ m;
    chk("q after edge", q, exp_q());
    chk("sdo after edge", sdo, ~exp_scan);
    #4 clk = 0;
    #1;
  endtask

  task automatic scan_clocks(input logic expected_new);
    #1 sca = 1; #2 sca = 0; #1;
    chk("sdo unchanged until scb", sdo, ~exp_scan);
    #1 scb = 1; #2 scb = 0; #1;
    exp_scan = expected_new;
    chk("sdo after scan clocks", sdo, ~exp_scan);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clk = 0; sca = 0; scb = 0; update = 0; capture = 1; test = 0; shift = 0; load = 0;
    select_o2 = 0; sdi = 0; d = 0;
    #5 clk = 1; #5 clk = 0; #5 clk = 1; #5 clk = 0; #1;
    exp_sys = 0; exp_scan = 0;

    // system mode with upsets
    for (int i = 0; i < 12; i++) begin
      cycle(1'($urandom));
      if (i % 2 == 0) begin fv = ~dut.u_ph1.q; force dut.u_ph1.q = fv; #1 release dut.u_ph1.q; end
      else            begin force dut.u_lb.q  = ~dut.u_lb.q;  #1 release dut.u_lb.q;  end
      #1 chk("q masks upset", q, ~exp_sys);
      n_seu++;
    end
    cycle(1'($urandom));

    // scanout mode table
    test = 1;
    for (int i = 0; i < 6; i++) begin
      capture = 1; cycle(1'($urandom)); n_snapshot++;
      capture = 0; cycle(1'($urandom));
      load = 1; scan_clocks(exp_sys); load = 0; n_load_o1++;
      scan_clocks(1'b0); n_clear++;
      shift = 1; sdi = 1'($urandom); scan_clocks(sdi); n_shift++;
      sdi = 1'($urandom); capture = 1; cycle(1'($urandom)); n_signature++;
      capture = 0; shift = 0;
    end

    // slow-speed signature analysis
    shift = 1;
    for (int i = 0; i < 8; i++) begin
      sdi = 1'($urandom);
      capture = 1; cycle(1'($urandom)); capture = 0;
      n_signature++;
      for (int k = 0; k <= int'($urandom_range(3)); k++) begin
        cycle(1'($urandom));
        chk("signature held between captures", sdo, ~exp_scan);
      end
    end
    shift = 0; test = 0; capture = 1;
    cycle(1'($urandom)); cycle(1'($urandom));

    // defective system flip-flop: bypass through O2
    select_o2 = 1;
    cycle(1'($urandom));
    force dut.u_ph2.q = 1'b1;
    for (int i = 0; i < 12; i++) begin cycle(1'($urandom)); n_bypass_o2++; end
    release dut.u_ph2.q;
    cycle(1'($urandom));                 // PH1 recovers
    select_o2 = 0;
    cycle(1'($urandom));

    // defective scanout portion: bypass through O1
    test = 1;
    force dut.u_lb.q = 1'b0;
    for (int i = 0; i < 12; i++) begin
      d = 1'($urandom);
      #4 clk = 1; #1;
      exp_sys = d;
      chk("q follows system flip-flop with LB stuck", q, ~exp_sys);
      #4 clk = 0; #1;
      n_bypass_o1++;
    end
    release dut.u_lb.q;
    test = 0;
    cycle(1'($urandom)); cycle(1'($urandom));

    if (n_seu == 0 || n_load_o1 == 0 || n_clear == 0 || n_shift == 0 || n_snapshot == 0 ||
        n_signature == 0 || n_bypass_o1 == 0 || n_bypass_o2 == 0) failures++;
    $display("seu=%0d load_o1=%0d clear=%0d shift=%0d snapshot=%0d signature=%0d bypass_o1=%0d bypass_o2=%0d",
             n_seu, n_load_o1, n_clear, n_shift, n_snapshot, n_signature, n_bypass_o1, n_bypass_o2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
