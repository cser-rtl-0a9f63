// tb_cser_top: end-to-end test of the whole CSER cell family at its only size.
//
// Part 1 drives the five latch-based cells with one shared control sequence
// (fields a cell does not have are ignored by it) and separate random data, and
// compares every q and so after every event with a latch-level reference model
// (la, lb, ph1 and the C-element keeper per cell). The sequence goes through
// system operation with injected upsets, manufacturing test (shift, update,
// capture, load O1), clear, slow-speed snapshot with clk running, slow-speed
// signature analysis, and both defect-bypass modes with forced stuck-at defects.
// Part 2 runs the robust scan design against a flip-flop-level model: system
// operation with upsets, slow scan chain, debug-chain snapshot and enhanced-scan
// launches. Part 3 runs the MUX-based cell with signature logic and S-element
// against its own flip-flop-level model: system operation with upsets, slow
// scan, snapshot, enhanced-scan launch, slow-speed signature analysis and both
// bypasses with stuck flip-flops. Every mechanism is counted; one that never
// happened is a failure.
module tb_cser_top;
  import cser_pkg::*;

  localparam int N = NUM_LATCH_CELLS;

  latch_ctrl_t   lc_ctrl [N];
  latch_io_in_t  lc_in   [N];
  latch_io_out_t lc_out  [N];
  scan_ctrl_t    rs_ctrl;
  logic rs_d_in, rs_si, rs_so, rs_sdi, rs_sdo, rs_comb0_in, rs_comb0_out;
  logic rs_comb1_in, rs_comb1_out, rs_q_out;
  logic x0, x1;
  mux_ctrl_t mx_ctrl;
  logic mx_d, mx_si, mx_sdi, mx_sdo, mx_q_so;
  logic m1, m2, mkeep;                  // extended MUX-based cell model
  logic m1_stuck, m2_stuck;

  latch_ctrl_t c;                       // shared control of the latch-based cells
  logic la [N], lb [N], ph1 [N], kq [N];
  logic stuck_ph2 [N], stuck_val [N];
  logic a1, a2, ff, b1, b2, qa, qb;     // robust scan design model

  logic fv;                         // value written by an injected upset
  int checks = 0, failures = 0;
  int n_seu = 0, n_update = 0, n_load_o1 = 0, n_clear = 0, n_snapshot = 0, n_signature = 0;
  int n_bypass_o1 = 0, n_bypass_o2 = 0, n_slow_shift = 0, n_debug_shift = 0, n_launch = 0;

  cser_top dut (.*);

  assign rs_comb0_out = rs_comb0_in ^ x0;
  assign rs_comb1_out = rs_comb1_in ^ x1;

  always_comb for (int i = 0; i < N; i++) lc_ctrl[i] = c;

  task automatic chk(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%0b exp=%0b at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------- latch-based cell model ----------------
  function automatic logic has_sig(input int i);
    return i == int'(CELL_CBISER) || i == int'(CELL_FULL);
  endfunction
  function automatic logic has_sel(input int i);
    return i == int'(CELL_DT) || i == int'(CELL_FULL);
  endfunction
  function automatic logic scan_in(input int i);
    if (has_sig(i))                 return (c.shift & lc_in[i].si) | (c.load & ph1[i]);
    if (i == int'(CELL_MBISER))     return c.shift ? lc_in[i].si : ph1[i];
    return lc_in[i].si;
  endfunction
  function automatic logic model_q(input int i);
    if (has_sel(i) && !c.test && c.select_o2) return ~lb[i];
    return kq[i];
  endfunction

  task automatic eval_keepers();
    for (int i = 0; i < N; i++)
      if (c.test || ph1[i] == lb[i]) kq[i] = ~ph1[i];
  endtask

  task automatic check_cells(input string what);
    for (int i = 0; i < N; i++) begin
      chk($sformatf("%s: cell %0d q", what, i), lc_out[i].q, model_q(i));
      chk($sformatf("%s: cell %0d so", what, i), lc_out[i].so, ~lb[i]);
    end
  endtask

  task automatic set_ctrl(input latch_ctrl_t nc);
    nc.clk = 0; nc.sca = 0; nc.scb = 0; nc.update = 0;
    c = nc;
    #1;
    eval_keepers();
    check_cells("mode change");
  endtask

  task automatic rand_data();
    for (int i = 0; i < N; i++) begin
      lc_in[i].d = 1'($urandom);
      lc_in[i].si = 1'($urandom);
    end
  endtask

  // functional clock cycle of the latch-based cells
  task automatic lclk();
    rand_data();
    #2;
    if (c.capture)
      for (int i = 0; i < N; i++) la[i] = lc_in[i].d ^ (has_sig(i) ? scan_in(i) : 1'b0);
    c.clk = 1;
    #1;
    for (int i = 0; i < N; i++) begin
      ph1[i] = stuck_ph2[i] ? stuck_val[i] : lc_in[i].d;
      if (c.capture) lb[i] = la[i];
    end
    eval_keepers();
    check_cells("clk edge");
    #2 c.clk = 0;
    #1;
  endtask

  task automatic lsca();
    rand_data();
    #1;
    for (int i = 0; i < N; i++) la[i] = scan_in(i);
    c.sca = 1; #2 c.sca = 0; #1;
    check_cells("sca");
  endtask

  task automatic lscb();
    #1 c.scb = 1;
    for (int i = 0; i < N; i++) lb[i] = la[i];
    #2 c.scb = 0; #1;
    eval_keepers();
    check_cells("scb");
  endtask

  task automatic lupdate();
    #1 c.update = 1;
    for (int i = 0; i < N; i++) ph1[i] = lb[i];
    #2 c.update = 0; #1;
    eval_keepers();
    check_cells("update");
  endtask

  task automatic upset(input int i, input logic which_lb);
    if (which_lb) begin
      case (i)
        0: begin fv = ~dut.u_snapshot.u_lb.q; force dut.u_snapshot.u_lb.q = fv; #1 release dut.u_snapshot.u_lb.q; end
        1: begin fv = ~dut.u_mbiser.u_lb.q;   force dut.u_mbiser.u_lb.q = fv;   #1 release dut.u_mbiser.u_lb.q;   end
        2: begin fv = ~dut.u_cbiser.u_lb.q;   force dut.u_cbiser.u_lb.q = fv;   #1 release dut.u_cbiser.u_lb.q;   end
        3: begin fv = ~dut.u_dt.u_lb.q;       force dut.u_dt.u_lb.q = fv;       #1 release dut.u_dt.u_lb.q;       end
        default: begin fv = ~dut.u_full.u_lb.q; force dut.u_full.u_lb.q = fv;   #1 release dut.u_full.u_lb.q;     end
      endcase
      lb[i] = ~lb[i];
    end else begin
      case (i)
        0: begin fv = ~dut.u_snapshot.u_ph1.q; force dut.u_snapshot.u_ph1.q = fv; #1 release dut.u_snapshot.u_ph1.q; end
        1: begin fv = ~dut.u_mbiser.u_ph1.q;   force dut.u_mbiser.u_ph1.q = fv;   #1 release dut.u_mbiser.u_ph1.q;   end
        2: begin fv = ~dut.u_cbiser.u_ph1.q;   force dut.u_cbiser.u_ph1.q = fv;   #1 release dut.u_cbiser.u_ph1.q;   end
        3: begin fv = ~dut.u_dt.u_ph1.q;       force dut.u_dt.u_ph1.q = fv;       #1 release dut.u_dt.u_ph1.q;       end
        default: begin fv = ~dut.u_full.u_ph1.q; force dut.u_full.u_ph1.q = fv;   #1 release dut.u_full.u_ph1.q;     end
      endcase
      ph1[i] = ~ph1[i];
    end
    #1;
    eval_keepers();
    check_cells("after upset");
  endtask

  // ---------------- robust scan design model ----------------
  function automatic logic cel(input logic o1, input logic o2, input logic t, input logic prev);
    return (t || o1 == o2) ? ~o1 : prev;
  endfunction

  task automatic rs_check();
    chk("rs cell A q/so", rs_comb0_in, qa);
    chk("rs flip-flop", rs_comb1_in, ff);
    chk("rs cell B q/so", rs_q_out, qb);
    chk("rs slow chain out", rs_so, qb);
    chk("rs debug chain out", rs_sdo, ~b2);
  endtask

  task automatic rs_edge(input logic do_clk, input logic do_sck);
    logic ck1, ck2, a_upd, b_upd, c0, c1;
    logic na1, na2, nff, nb1, nb2;
    rs_d_in = 1'($urandom); rs_si = 1'($urandom); rs_sdi = 1'($urandom);
    x0 = 1'($urandom); x1 = 1'($urandom);
    #3;
    rs_check();
    c0 = qa ^ x0;
    c1 = ff ^ x1;
    a_upd = rs_ctrl.update ? a2 : rs_d_in;
    b_upd = rs_ctrl.update ? b2 : c1;
    ck1 = rs_ctrl.se ? do_sck : do_clk;
    ck2 = rs_ctrl.debug ? do_sck : do_clk;
    na1 = ck1 ? (rs_ctrl.se ? rs_si : a_upd) : a1;
    na2 = ck2 ? (rs_ctrl.debug ? rs_sdi : a_upd) : a2;
    nff = do_clk ? (rs_ctrl.se ? qa : c0) : ff;
    nb1 = ck1 ? (rs_ctrl.se ? ff : b_upd) : b1;
    nb2 = ck2 ? (rs_ctrl.debug ? ~a2 : b_upd) : b2;
    if (do_clk) rs_ctrl.clk = 1;
    if (do_sck) rs_ctrl.sck = 1;
    a1 = na1; a2 = na2; ff = nff; b1 = nb1; b2 = nb2;
    qa = cel(a1, a2, rs_ctrl.test, qa);
    qb = cel(b1, b2, rs_ctrl.test, qb);
    #1;
    rs_check();
    #3 rs_ctrl.clk = 0; rs_ctrl.sck = 0;
    #1;
  endtask

  // ---------------- extended MUX-based cell model ----------------
  function automatic logic mx_exp_q();
    return (!mx_ctrl.test && mx_ctrl.select_o2) ? ~m2 : mkeep;
  endfunction

  task automatic mx_check(input string what);
    if (mx_ctrl.test || m1 == m2) mkeep = ~m1;
    chk({what, ": mux cell q_so"}, mx_q_so, mx_exp_q());
    chk({what, ": mux cell sdo"}, mx_sdo, ~m2);
  endtask

  task automatic mx_edge(input logic do_clk, input logic do_sck);
    logic u, ck1, ck2, n1, n2;
    mx_d = 1'($urandom); mx_si = 1'($urandom); mx_sdi = 1'($urandom);
    #3;
    mx_check("before edge");
    u = mx_ctrl.update ? m2 : mx_d;
    ck1 = mx_ctrl.se ? do_sck : do_clk;
    ck2 = mx_ctrl.debug ? do_sck : do_clk;
    n1 = m1_stuck ? m1 : (ck1 ? (mx_ctrl.se ? mx_si : u) : m1);
    n2 = m2_stuck ? m2 : (ck2 ? (mx_ctrl.debug ? mx_sdi : (u ^ (mx_ctrl.shift & mx_sdi))) : m2);
    if (do_clk) mx_ctrl.clk = 1;
    if (do_sck) mx_ctrl.sck = 1;
    m1 = n1; m2 = n2;
    #1;
    mx_check("after edge");
    #3 mx_ctrl.clk = 0; mx_ctrl.sck = 0;
    #1;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    latch_ctrl_t m;
    mx_ctrl = '0; mx_d = 0; mx_si = 0; mx_sdi = 0; m1_stuck = 0; m2_stuck = 0;
    rs_ctrl = '0; rs_d_in = 0; rs_si = 0; rs_sdi = 0; x0 = 0; x1 = 0;
    c = '0; c.capture = 1;
    for (int i = 0; i < N; i++) begin
      lc_in[i] = '0; stuck_ph2[i] = 0; stuck_val[i] = 0;
    end

    // ---------- Part 1: latch-based cells ----------
    // initialise: capture = 1, d = 0 for three cycles
    for (int k = 0; k < 3; k++) begin #2 c.clk = 1; #2 c.clk = 0; end
    #1;
    for (int i = 0; i < N; i++) begin la[i] = 0; lb[i] = 0; ph1[i] = 0; kq[i] = 1; end
    check_cells("init");

    // system operation with upsets
    for (int k = 0; k < 30; k++) begin
      lclk();
      upset(int'($urandom_range(N - 1)), 1'(k));
      n_seu++;
    end
    lclk();

    // manufacturing test: shift, update, capture, load O1, clear
    m = '0; m.test = 1; m.shift = 1;
    for (int k = 0; k < 6; k++) begin
      m.capture = 0; m.shift = 1; m.load = 0; set_ctrl(m);
      lsca(); lscb();
      lupdate(); n_update++;
      m.capture = 1; set_ctrl(m);
      m.shift = 0; set_ctrl(m);
      lclk();
      m.capture = 0; m.load = 1; set_ctrl(m);
      lsca(); lscb(); n_load_o1++;
      m.load = 0; set_ctrl(m);
      lsca(); lscb(); n_clear++;
    end

    // slow-speed snapshot: capture then freeze the scan portion while clk runs
    m = '0; m.capture = 1; set_ctrl(m);
    lclk(); lclk();
    m.test = 1; m.capture = 0; m.shift = 1; set_ctrl(m);
    for (int k = 0; k < 10; k++) begin
      lclk(); lclk();
      lsca(); lclk(); lscb();
      n_snapshot++;
    end

    // slow-speed signature analysis: capture 1 for one cycle, then 0
    m = '0; m.test = 1; m.shift = 1;
    for (int k = 0; k < 10; k++) begin
      m.capture = 1; set_ctrl(m); lclk();
      m.capture = 0; set_ctrl(m);
      for (int j = 0; j <= int'($urandom_range(3)); j++) lclk();
      n_signature++;
    end

    // defect tolerance: system flip-flop defective, bypass through O2
    m = '0; m.capture = 1; set_ctrl(m);
    lclk(); lclk();
    m.select_o2 = 1; set_ctrl(m);
    stuck_ph2[int'(CELL_DT)] = 1; stuck_val[int'(CELL_DT)] = 0;
    stuck_ph2[int'(CELL_FULL)] = 1; stuck_val[int'(CELL_FULL)] = 1;
    force dut.u_dt.u_ph2.q = 1'b0;
    force dut.u_full.u_ph2.q = 1'b1;
    for (int k = 0; k < 12; k++) begin lclk(); n_bypass_o2++; end
    release dut.u_dt.u_ph2.q;
    release dut.u_full.u_ph2.q;
    stuck_ph2[int'(CELL_DT)] = 0; stuck_ph2[int'(CELL_FULL)] = 0;
    lclk(); lclk();
    m.select_o2 = 0; set_ctrl(m);
    lclk();

    // defect tolerance: scan portion defective, bypass through O1 (test = 1)
    m.test = 1; set_ctrl(m);
    for (int k = 0; k < 12; k++) begin
      lclk();
      // the scan-portion defect: LB upset every cycle has no effect on q
      upset(int'(CELL_DT), 1'b1);
      upset(int'(CELL_FULL), 1'b1);
      n_bypass_o1++;
    end
    m.test = 0; set_ctrl(m);
    lclk(); lclk();

    // ---------- Part 2: robust scan design ----------
    rs_ctrl.se = 1; rs_ctrl.test = 1;
    for (int k = 0; k < 4; k++) begin #2 rs_ctrl.clk = 1; rs_ctrl.sck = 1; #3 rs_ctrl.clk = 0; rs_ctrl.sck = 0; #1; end
    rs_ctrl.se = 0; rs_ctrl.test = 0;
    rs_d_in = 0; rs_si = 0; rs_sdi = 0; x0 = 0; x1 = 0;
    for (int k = 0; k < 4; k++) begin #2 rs_ctrl.clk = 1; #3 rs_ctrl.clk = 0; #1; end
    a1 = 0; a2 = 0; qa = 1; ff = 1; b1 = 1; b2 = 1; qb = 0;
    rs_check();

    for (int k = 0; k < 20; k++) begin
      rs_edge(1, 0);
      if (k % 2 == 0) begin
        fv = ~dut.u_scan.u_cell_a.o2; force dut.u_scan.u_cell_a.o2 = fv; #1 release dut.u_scan.u_cell_a.o2;
        a2 = ~a2;
      end else begin
        fv = ~dut.u_scan.u_cell_b.o1; force dut.u_scan.u_cell_b.o1 = fv; #1 release dut.u_scan.u_cell_b.o1;
        b1 = ~b1;
      end
      #1 rs_check();
      n_seu++;
    end
    rs_edge(1, 0);

    rs_ctrl.se = 1; rs_ctrl.test = 1;
    for (int k = 0; k < 8; k++) begin rs_edge(1, 1); n_slow_shift++; end
    rs_ctrl.se = 0;
    rs_ctrl.debug = 1;
    for (int k = 0; k < 8; k++) begin rs_edge(1, 0); rs_edge(0, 1); n_debug_shift++; end
    rs_ctrl.debug = 0;
    for (int k = 0; k < 6; k++) begin
      rs_ctrl.se = 1; rs_ctrl.debug = 1; rs_edge(0, 1);
      rs_ctrl.se = 0; rs_ctrl.debug = 0; rs_ctrl.update = 1; rs_edge(1, 0);
      rs_ctrl.update = 0;
      n_launch++;
    end
    rs_ctrl.test = 0;
    rs_edge(1, 0); rs_edge(1, 0);

    // ---------- Part 3: MUX-based cell with signature logic and S-element ----------
    mx_d = 0;
    for (int k = 0; k < 2; k++) begin #2 mx_ctrl.clk = 1; #3 mx_ctrl.clk = 0; #1; end
    m1 = 0; m2 = 0; mkeep = 1;
    mx_check("init");
    for (int k = 0; k < 16; k++) begin
      mx_edge(1, 0);
      if (k % 2 == 0) begin
        fv = ~dut.u_mux_full.o1; force dut.u_mux_full.o1 = fv; #1 release dut.u_mux_full.o1;
        m1 = ~m1;
      end else begin
        fv = ~dut.u_mux_full.o2; force dut.u_mux_full.o2 = fv; #1 release dut.u_mux_full.o2;
        m2 = ~m2;
      end
      #1 mx_check("after upset");
      n_seu++;
    end
    mx_edge(1, 0);
    mx_ctrl.se = 1; mx_ctrl.test = 1;
    for (int k = 0; k < 6; k++) begin mx_edge(0, 1); n_slow_shift++; end
    mx_ctrl.se = 0;
    mx_ctrl.debug = 1;
    for (int k = 0; k < 6; k++) begin mx_edge(1, 0); mx_edge(0, 1); n_debug_shift++; end
    mx_ctrl.debug = 0;
    for (int k = 0; k < 4; k++) begin
      mx_ctrl.se = 1; mx_ctrl.debug = 1; mx_edge(0, 1);
      mx_ctrl.se = 0; mx_ctrl.debug = 0; mx_ctrl.update = 1; mx_edge(1, 0);
      mx_ctrl.update = 0;
      n_launch++;
    end
    mx_ctrl.shift = 1;
    for (int k = 0; k < 8; k++) begin
      mx_ctrl.debug = 0; mx_edge(1, 0);
      n_signature++;
      mx_ctrl.debug = 1;
      for (int j = 0; j <= int'($urandom_range(3)); j++) mx_edge(1, 0);
    end
    mx_ctrl.debug = 0; mx_ctrl.shift = 0; mx_ctrl.test = 0;
    mx_edge(1, 0); mx_edge(1, 0);
    mx_ctrl.select_o2 = 1;
    force dut.u_mux_full.o1 = 1'b0; m1 = 0; m1_stuck = 1;
    for (int k = 0; k < 8; k++) begin mx_edge(1, 0); n_bypass_o2++; end
    release dut.u_mux_full.o1; m1_stuck = 0;
    mx_edge(1, 0);
    mx_ctrl.select_o2 = 0; mx_ctrl.test = 1;
    force dut.u_mux_full.o2 = 1'b1; m2 = 1; m2_stuck = 1;
    for (int k = 0; k < 8; k++) begin mx_edge(1, 0); n_bypass_o1++; end
    release dut.u_mux_full.o2; m2_stuck = 0;
    mx_ctrl.test = 0;
    mx_edge(1, 0); mx_edge(1, 0);

    if (n_seu == 0 || n_update == 0 || n_load_o1 == 0 || n_clear == 0 || n_snapshot == 0 ||
        n_signature == 0 || n_bypass_o1 == 0 || n_bypass_o2 == 0 || n_slow_shift == 0 ||
        n_debug_shift == 0 || n_launch == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("seu=%0d update=%0d load_o1=%0d clear=%0d snapshot=%0d signature=%0d bypass_o1=%0d bypass_o2=%0d",
             n_seu, n_update, n_load_o1, n_clear, n_snapshot, n_signature, n_bypass_o1, n_bypass_o2);
    $display("slow_shift=%0d debug_shift=%0d launch=%0d", n_slow_shift, n_debug_shift, n_launch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
