// tb_cbiser_cell: self-checking test of the concurrent BISER (CBISER) cell.
//
// Walks through every row of the scanout-portion mode table (shift, capture,
// load): load O1, clear, shift sdi, snapshot load d, and signature (d XOR sdi),
// then runs slow-speed signature analysis: capture = 1 for one clk cycle and 0
// for one to four cycles while clk keeps running; the signature must stay on sdo
// in between while q follows the system data. It ends with the 1 GHz / 10 MHz
// example: one capture every 100 clk cycles with a slow shift in between. System-mode upset masking is also
// checked. Expected values come from the reference variables exp_sys / exp_scan.
module tb_cbiser_cell;
  logic d, clk, sca, scb, update, capture, test, shift, load, sdi;
  logic sdo, q;
  logic exp_sys, exp_scan;
  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_cycles_since_capture = 0;   // clk cycles with capture = 0 since the last capture
  int n_seu = 0, n_load_o1 = 0, n_clear = 0, n_shift = 0, n_snapshot = 0, n_signature = 0;

  cbiser_cell dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  // One clk cycle; when capture = 1 the scan portion takes d, XORed with sdi
  // when shift = 1 (signature) or with o1 when load = 1.
  task automatic cycle(input logic v);
    logic m;
    d = v;
    #4;
    chk("q before edge", q, ~exp_sys);
    m = (shift & sdi) | (load & exp_sys);
    clk = 1;
    #1;
    n_cycles_since_capture = capture ? 0 : n_cycles_since_capture + 1;
    exp_sys = v;
    if (capture) exp_scan = v ^ m;
    chk("q after edge", q, ~exp_sys);
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
    sdi = 0; d = 0;
    #5 clk = 1; #5 clk = 0; #5 clk = 1; #5 clk = 0; #1;
    exp_sys = 0; exp_scan = 0;

    // system mode with upsets (snapshot setting, test = 0)
    for (int i = 0; i < 16; i++) begin
      cycle(1'($urandom));
      if (i % 2 == 0) begin fv = ~dut.u_ph1.q; force dut.u_ph1.q = fv; #1 release dut.u_ph1.q; end
      else            begin force dut.u_lb.q  = ~dut.u_lb.q;  #1 release dut.u_lb.q;  end
      #1 chk("q masks upset", q, ~exp_sys);
      n_seu++;
    end

    // mode table, test = 1 so that q follows PH1 while the copies differ
    test = 1;
    for (int i = 0; i < 8; i++) begin
      // snapshot: 0 1 0
      shift = 0; load = 0; capture = 1; cycle(1'($urandom)); n_snapshot++;
      capture = 0; cycle(1'($urandom));
      // load O1: 0 0 1
      load = 1; scan_clocks(exp_sys); load = 0; n_load_o1++;
      // clear: 0 0 0
      scan_clocks(1'b0); n_clear++;
      // shift: 1 0 0
      shift = 1; sdi = 1'($urandom); scan_clocks(sdi); n_shift++;
      // signature: 1 1 0
      sdi = 1'($urandom); capture = 1; cycle(1'($urandom)); n_signature++;
      capture = 0; shift = 0;
    end

    // slow-speed signature analysis: one capture cycle every 2..5 clk cycles
    shift = 1;
    for (int i = 0; i < 12; i++) begin
      sdi = 1'($urandom);
      capture = 1; cycle(1'($urandom)); capture = 0;
      n_signature++;
      for (int k = 0; k <= int'($urandom_range(3)); k++) begin
        cycle(1'($urandom));
        chk("signature held between captures", sdo, ~exp_scan);
      end
    end
    // the 1 GHz CLK / 10 MHz scan clock example: one capture per 100 CLK cycles,
    // the signature bit is shifted out with one slow sca/scb pair in between
    for (int i = 0; i < 3; i++) begin
      sdi = 1'($urandom);
      capture = 1; cycle(1'($urandom)); capture = 0;
      n_signature++;
      for (int k = 0; k < 99; k++) begin
        cycle(1'($urandom));
        if (k == 49) begin
          chk("signature on sdo before the slow shift", sdo, ~exp_scan);
          sdi = 1'($urandom);
          scan_clocks(sdi);
        end
      end
      checks++;
      if (n_cycles_since_capture != 99) begin
        failures++;
        $display("FAIL capture spacing %0d", n_cycles_since_capture);
      end
    end
    shift = 0; test = 0; capture = 1;
    cycle(1'($urandom)); cycle(1'($urandom));

    if (n_seu == 0 || n_load_o1 == 0 || n_clear == 0 || n_shift == 0 || n_snapshot == 0 ||
        n_signature == 0) failures++;
    $display("seu=%0d load_o1=%0d clear=%0d shift=%0d snapshot=%0d signature=%0d",
             n_seu, n_load_o1, n_clear, n_shift, n_snapshot, n_signature);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
