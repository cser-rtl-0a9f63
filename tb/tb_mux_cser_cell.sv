// tb_mux_cser_cell: self-checking test of the MUX-based CSER cell.
//
// 1. System mode: both flip-flops take d on the clk edge; q_so = ~d one edge
//    later, sdo shadows it; upsets injected into either flip-flop between edges
//    are masked by the C-element and repaired by the next edge.
// 2. Slow scan chain (se = 1, test = 1): si shifts into SDFF1 on sck.
// 3. Snapshot (debug = 1): clk keeps running with new data and q_so follows it,
//    while SDFF2 holds the captured bit and then shifts sdi -> sdo on sck.
// 4. Enhanced scan: V1 into SDFF1 (si), V2 into SDFF2 (sdi), then one clk with
//    update = 1 launches V2 into SDFF1 (the V1 -> V2 transition).
// Expected values come from the reference variables exp_o1 / exp_o2.
module tb_mux_cser_cell;
  logic d, si, sdi, se, debug, update, test, clk, sck;
  logic sdo, q_so;
  logic exp_o1, exp_o2, exp_q;
  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_seu = 0, n_slow_shift = 0, n_snapshot = 0, n_launch = 0, n_transition = 0;

  mux_cser_cell dut (.*);

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  // expected q_so: C-element over the reference copies
  task automatic upd_q();
    if (test || exp_o1 == exp_o2) exp_q = ~exp_o1;
  endtask

  task automatic clk_cycle(input logic v);
    logic nd;
    d = v;
    #4;
    chk("q_so before clk edge", q_so, exp_q);
    nd = update ? exp_o2 : v;
    clk = 1;
    #1;
    if (!se)    exp_o1 = nd;
    if (!debug) exp_o2 = nd;
    upd_q();
    chk("q_so after clk edge", q_so, exp_q);
    chk("sdo after clk edge", sdo, ~exp_o2);
    #4 clk = 0;
    #1;
  endtask

  task automatic sck_cycle(input logic s, input logic sd);
    si = s; sdi = sd;
    #2 sck = 1;
    #1;
    if (se)    exp_o1 = s;
    if (debug) exp_o2 = sd;
    upd_q();
    chk("q_so after sck edge", q_so, exp_q);
    chk("sdo after sck edge", sdo, ~exp_o2);
    #2 sck = 0;
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
    clk = 0; sck = 0; se = 0; debug = 0; update = 0; test = 0; d = 0; si = 0; sdi = 0;
    #5 clk = 1; #5 clk = 0; #1;
    exp_o1 = 0; exp_o2 = 0; exp_q = 1;

    // 1. system mode with upsets
    for (int i = 0; i < 20; i++) begin
      clk_cycle(1'($urandom));
      if (i % 2 == 0) begin fv = ~dut.o1; force dut.o1 = fv; #1 release dut.o1; end
      else            begin fv = ~dut.o2; force dut.o2 = fv; #1 release dut.o2; end
      #1 chk("q_so masks upset", q_so, exp_q);
      n_seu++;
      clk_cycle(1'($urandom));
    end

    // 2. slow scan chain shift
    se = 1; test = 1;
    for (int i = 0; i < 10; i++) begin sck_cycle(1'($urandom), 1'($urandom)); n_slow_shift++; end
    se = 0;
    clk_cycle(1'($urandom));

    // 3. snapshot: SDFF2 frozen and shifted on sck while clk runs
    debug = 1;
    for (int i = 0; i < 10; i++) begin
      clk_cycle(1'($urandom));
      chk("snapshot held on sdo", sdo, ~exp_o2);
      sck_cycle(1'($urandom), 1'($urandom));
      n_snapshot++;
    end
    debug = 0;
    clk_cycle(1'($urandom)); clk_cycle(1'($urandom));

    // 4. enhanced scan two-pattern launch
    for (int i = 0; i < 8; i++) begin
      logic v1, v2;
      v1 = 1'($urandom); v2 = 1'(i);
      se = 1; debug = 1;
      sck_cycle(v1, v2);
      chk("V1 in SDFF1", q_so, ~v1);
      se = 0; debug = 0; update = 1;
      clk_cycle(1'($urandom));
      chk("V2 launched into SDFF1", q_so, ~v2);
      n_launch++;
      if (v1 != v2) n_transition++;
      update = 0;
    end
    test = 0;
    clk_cycle(1'($urandom)); clk_cycle(1'($urandom));

    if (n_seu == 0 || n_slow_shift == 0 || n_snapshot == 0 || n_launch == 0 || n_transition == 0)
      failures++;
    $display("seu=%0d slow_shift=%0d snapshot=%0d launch=%0d transition=%0d",
             n_seu, n_slow_shift, n_snapshot, n_launch, n_transition);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
