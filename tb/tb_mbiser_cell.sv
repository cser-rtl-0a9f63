// tb_mbiser_cell: self-checking test of the modified BISER (MBISER) cell.
//
// 1. System mode with upsets injected into PH1 and LB (must be masked at q).
// 2. Test shift (shift = 1): sdi -> sdo through LA/LB, update into PH1, capture.
// 3. Load O1 (shift = 0, capture = 0): the scan portion copies PH1. With the
//    output of PH2 forced stuck, a normal capture leaves the fault invisible on
//    sdo (LB takes d directly), while load O1 exposes it - the reason for this cell.
// 4. Snapshot: capture = 0 keeps the scan portion frozen while clk runs.
// Expected values come from the reference variables exp_sys / exp_scan.
module tb_mbiser_cell;
  logic d, clk, sca, scb, update, capture, test, shift, sdi;
  logic sdo, q;
  logic exp_sys, exp_scan;
  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_seu = 0, n_load_o1 = 0, n_fault_seen = 0, n_shift = 0, n_snapshot = 0;

  mbiser_cell dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  // One clk cycle; sys_val is what PH1 is expected to take (differs from v only
  // when a stuck-at fault is forced on PH2).
  task automatic cycle_x(input logic v, input logic sys_val);
    d = v;
    #4;
    chk("q before edge", q, ~exp_sys);
    clk = 1;
    #1;
    exp_sys = sys_val;
    if (capture) exp_scan = v;
    chk("q after edge", q, ~exp_sys);
    chk("sdo after edge", sdo, ~exp_scan);
    #4 clk = 0;
    #1;
  endtask

  task automatic cycle(input logic v); cycle_x(v, v); endtask

  task automatic scan_clocks();
    #1 sca = 1; #2 sca = 0; #1;
    chk("sdo unchanged until scb", sdo, ~exp_scan);
    #1 scb = 1; #2 scb = 0; #1;
  endtask

  task automatic shift_bit(input logic b);
    shift = 1; sdi = b;
    scan_clocks();
    exp_scan = b;
    n_shift++;
    chk("sdo after shift", sdo, ~exp_scan);
  endtask

  task automatic load_o1();
    shift = 0;
    scan_clocks();
    exp_scan = exp_sys;
    n_load_o1++;
    chk("sdo after load O1", sdo, ~exp_scan);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic stuck;
    clk = 0; sca = 0; scb = 0; update = 0; capture = 1; test = 0; shift = 0; sdi = 0; d = 0;
    #5 clk = 1; #5 clk = 0; #5 clk = 1; #5 clk = 0; #1;
    exp_sys = 0; exp_scan = 0;

    // 1. system mode with upsets
    for (int i = 0; i < 16; i++) begin
      cycle(1'($urandom));
      if (i % 2 == 0) begin fv = ~dut.u_ph1.q; force dut.u_ph1.q = fv; #1 release dut.u_ph1.q; end
      else            begin force dut.u_lb.q  = ~dut.u_lb.q;  #1 release dut.u_lb.q;  end
      #1 chk("q masks upset", q, ~exp_sys);
      n_seu++;
    end
    cycle(1'($urandom));

    // 2. test shift, update, capture
    test = 1; capture = 0;
    for (int i = 0; i < 6; i++) begin
      shift_bit(1'($urandom));
      #1 update = 1; #2 update = 0; #1;
      exp_sys = exp_scan;
      chk("q after update", q, ~exp_sys);
      capture = 1; cycle(1'($urandom)); capture = 0;
    end

    // 3. load O1, fault free and with the output of PH2 stuck
    for (int i = 0; i < 6; i++) begin
      capture = 1; cycle(1'($urandom)); capture = 0;
      load_o1();
    end
    for (int i = 0; i < 4; i++) begin
      stuck = 1'(i);
      force dut.u_ph2.q = stuck;
      capture = 1;
      cycle_x(~stuck, stuck);             // PH1 takes the stuck value, LB the good one
      capture = 0;
      chk("capture alone misses the PH2 fault", sdo, stuck);    // sdo = ~(~stuck)
      load_o1();
      chk("load O1 exposes the PH2 fault", sdo, ~stuck);
      if (sdo == ~stuck) n_fault_seen++;
      release dut.u_ph2.q;
      cycle(1'($urandom));
    end

    // 4. snapshot while clk runs
    test = 0; capture = 1;
    cycle(1'($urandom)); cycle(1'($urandom));
    capture = 0; test = 1;
    for (int i = 0; i < 8; i++) begin
      cycle(1'($urandom));
      chk("snapshot frozen", sdo, ~exp_scan);
      if (i % 2 == 1) shift_bit(1'($urandom));
      n_snapshot++;
    end

    if (n_seu == 0 || n_load_o1 == 0 || n_fault_seen == 0 || n_shift == 0 || n_snapshot == 0) failures++;
    $display("seu=%0d load_o1=%0d fault_seen=%0d shift=%0d snapshot=%0d",
             n_seu, n_load_o1, n_fault_seen, n_shift, n_snapshot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
