// tb_robust_scan_design: self-checking test of the example robust scan design.
//
// The two logic clouds are modelled here as XORs with random side inputs
// (comb0_out = comb0_in ^ x0, comb1_out = comb1_in ^ x1). A cycle-level
// reference model of the five flip-flops (SDFF1/SDFF2 of cell A, the plain
// flip-flop, SDFF1/SDFF2 of cell B) and the two C-element keepers is stepped on
// every clk and sck edge and all outputs are compared after each edge.
// Phases: system operation with upsets in the CSER cells, a full slow-chain
// shift (clk pulsed together with sck, se = 1), a debug-chain snapshot shift
// while clk keeps running, and enhanced-scan launches with update = 1.
module tb_robust_scan_design;
  import cser_pkg::*;

  scan_ctrl_t ctrl;
  logic d_in, si, so, sdi, sdo, comb0_in, comb0_out, comb1_in, comb1_out, q_out;
  logic x0, x1;
  // reference state
  logic a1, a2, ff, b1, b2, qa, qb;
  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_system = 0, n_seu = 0, n_slow_shift = 0, n_debug_shift = 0, n_launch = 0;

  robust_scan_design dut (.*);

  assign comb0_out = comb0_in ^ x0;
  assign comb1_out = comb1_in ^ x1;

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  function automatic logic cel(input logic o1, input logic o2, input logic t, input logic prev);
    return (t || o1 == o2) ? ~o1 : prev;
  endfunction

  task automatic check_outputs();
    chk("cell A q/so", comb0_in, qa);
    chk("plain flip-flop q", comb1_in, ff);
    chk("cell B q/so", q_out, qb);
    chk("slow chain out", so, qb);
    chk("debug chain out", sdo, ~b2);
  endtask

  // Apply one clock event: rising clk, rising sck, or both together.
  task automatic edge_step(input logic do_clk, input logic do_sck);
    logic ck1, ck2, a_upd, b_upd, c0, c1;
    logic na1, na2, nff, nb1, nb2;
    #3;
    check_outputs();
    c0 = qa ^ x0;
    c1 = ff ^ x1;
    a_upd = ctrl.update ? a2 : d_in;
    b_upd = ctrl.update ? b2 : c1;
    ck1 = ctrl.se ? do_sck : do_clk;
    ck2 = ctrl.debug ? do_sck : do_clk;
    na1 = ck1 ? (ctrl.se ? si : a_upd) : a1;
    na2 = ck2 ? (ctrl.debug ? sdi : a_upd) : a2;
    nff = do_clk ? (ctrl.se ? qa : c0) : ff;
    nb1 = ck1 ? (ctrl.se ? ff : b_upd) : b1;
    nb2 = ck2 ? (ctrl.debug ? ~a2 : b_upd) : b2;
    if (do_clk) ctrl.clk = 1;
    if (do_sck) ctrl.sck = 1;
    a1 = na1; a2 = na2; ff = nff; b1 = nb1; b2 = nb2;
    qa = cel(a1, a2, ctrl.test, qa);
    qb = cel(b1, b2, ctrl.test, qb);
    #1;
    check_outputs();
    #3 ctrl.clk = 0; ctrl.sck = 0;
    #1;
  endtask

  task automatic randomize_inputs();
    d_in = 1'($urandom); si = 1'($urandom); sdi = 1'($urandom);
    x0 = 1'($urandom); x1 = 1'($urandom);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl = '0;
    d_in = 0; si = 0; sdi = 0; x0 = 0; x1 = 0;
    // initialise every flip-flop through the slow chain with clk and sck together
    ctrl.se = 1; ctrl.test = 1;
    for (int i = 0; i < 4; i++) begin
      #2 ctrl.clk = 1; ctrl.sck = 1; #3 ctrl.clk = 0; ctrl.sck = 0; #1;
    end
    ctrl.se = 0;
    #2 ctrl.clk = 1; #3 ctrl.clk = 0; #1;
    ctrl.test = 0;
    for (int i = 0; i < 3; i++) begin
      d_in = 0; x0 = 0; x1 = 0;
      #2 ctrl.clk = 1; #3 ctrl.clk = 0; #1;
    end
    // after three system cycles with d_in = x0 = x1 = 0 the state is known
    a1 = 0; a2 = 0; qa = 1; ff = 1; b1 = 1; b2 = 1; qb = 0;

    // system operation with upsets
    for (int i = 0; i < 40; i++) begin
      randomize_inputs();
      edge_step(1, 0);
      n_system++;
      if (i % 4 == 1) begin
        fv = ~dut.u_cell_a.o1; force dut.u_cell_a.o1 = fv; #1 release dut.u_cell_a.o1;
        a1 = ~a1;                   // the model copy is upset as well
        #1 chk("cell A masks upset", comb0_in, qa);
        n_seu++;
      end else if (i % 4 == 3) begin
        fv = ~dut.u_cell_b.o2; force dut.u_cell_b.o2 = fv; #1 release dut.u_cell_b.o2;
        b2 = ~b2;
        #1 chk("cell B masks upset", q_out, qb);
        n_seu++;
      end
    end
    randomize_inputs(); edge_step(1, 0);
    randomize_inputs(); edge_step(1, 0);

    // slow scan chain: clk and sck together, se = 1, test = 1
    ctrl.se = 1; ctrl.test = 1;
    for (int i = 0; i < 12; i++) begin randomize_inputs(); edge_step(1, 1); n_slow_shift++; end
    ctrl.se = 0;
    randomize_inputs(); edge_step(1, 0);

    // debug chain snapshot: clk keeps running, sck shifts the debug chain
    ctrl.debug = 1;
    for (int i = 0; i < 12; i++) begin
      randomize_inputs(); edge_step(1, 0);
      randomize_inputs(); edge_step(0, 1);
      n_debug_shift++;
    end
    ctrl.debug = 0;

    // enhanced scan: load V1/V2 through both chains, then launch with update
    for (int i = 0; i < 6; i++) begin
      ctrl.se = 1; ctrl.debug = 1;
      randomize_inputs(); edge_step(0, 1);
      ctrl.se = 0; ctrl.debug = 0; ctrl.update = 1;
      randomize_inputs(); edge_step(1, 0);
      n_launch++;
      ctrl.update = 0;
    end
    ctrl.test = 0;
    for (int i = 0; i < 4; i++) begin randomize_inputs(); edge_step(1, 0); end

    if (n_system == 0 || n_seu == 0 || n_slow_shift == 0 || n_debug_shift == 0 || n_launch == 0)
      failures++;
    $display("system=%0d seu=%0d slow_shift=%0d debug_shift=%0d launch=%0d",
             n_system, n_seu, n_slow_shift, n_debug_shift, n_launch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
