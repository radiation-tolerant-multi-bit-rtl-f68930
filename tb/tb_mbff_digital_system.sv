`timescale 1ps/1ps
// End-to-end testbench of mbff_digital_system.
//
// dut runs at the default configuration (two 2-bit even-parity groups,
// common reset, no clock filter, 256-cycle window); dut_x is the variant
// with separate reset trees, clock glitch filters and a 16-cycle window.
// Both get the same random data on an 18 ns clock; the expected Q is the
// data applied before each edge. The testbench makes each mechanism of the
// system happen and counts it:
//   seu_prim, seu_sse, seu_par  upsets forced into the three flip-flop kinds
//   set_d                       a transient on D captured by a primary FF
//   pre_err                     a late data change flagged as pre-error
//   pd_sel                      a change caught only with a longer SEL delay
//   rad_win, tim_win            sample-and-count verdicts of both kinds
//   clk_glitch                  a clock transient removed by the filter
//   cd1_set                     a reset transient masked by the SSEs
// A mechanism that never happened counts as a failure.
module tb_mbff_digital_system;
  import mbff_pkg::*;

  localparam int unsigned PERIOD = 18000;
  localparam int unsigned HALF   = PERIOD / 2;

  logic cp = 1'b0, glitch = 1'b0, cd = 1'b1;
  logic [1:0] sel = '0;
  logic [1:0][1:0] d = '0;
  logic [1:0][1:0] q, qx, exp_q = '0;
  logic [1:0] err, errx;
  logic err_any, err_anyx, terr, terrx;
  err_class_e cls, clsx;
  logic [8:0] cnt;
  logic [4:0] cntx;

  int checks = 0, failures = 0;
  int seu_prim = 0, seu_sse = 0, seu_par = 0, set_d = 0, pre_err = 0, pd_sel = 0;
  int rad_win = 0, tim_win = 0, clk_glitch = 0, cd1_set = 0;

  mbff_digital_system dut (
    .CP(cp), .CD(cd), .SEL(sel), .D(d), .Q(q), .ERR(err), .err_any(err_any),
    .timing_err(terr), .err_class(cls), .err_count(cnt));

  mbff_digital_system #(.SEPARATE_RESET(1'b1), .CLK_FILTER(1'b1), .WINDOW(16)) dut_x (
    .CP(cp | glitch), .CD(cd), .SEL(sel), .D(d), .Q(qx), .ERR(errx), .err_any(err_anyx),
    .timing_err(terrx), .err_class(clsx), .err_count(cntx));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s q=%h qx=%h exp=%h err=%b errx=%b", $time, what, q, qx, exp_q, err, errx);
    end
  endtask

  // Verdicts of the sample-and-count units, counted as they appear.
  always @(cls)  begin if (cls == ERR_RADIATION) rad_win++; if (cls == ERR_TIMING) tim_win++; end
  always @(clsx) begin if (clsx == ERR_RADIATION) rad_win++; if (clsx == ERR_TIMING) tim_win++; end

  task automatic rise();
    #(HALF) cp = 1'b1;
    exp_q = d;
  endtask
  task automatic fall();
    #(HALF) cp = 1'b0;
  endtask

  // A clean cycle: edge, check, new random data at mid-cycle.
  task automatic cycle();
    rise();
    #2000;
    chk(q == exp_q, "Q (default)");
    chk(qx == exp_q, "Q (variant)");
    #2000 d = 4'($urandom);
    #(HALF - 4000);
    fall();
  endtask

  // A cycle whose D change lands `early` ps before the rising edge.
  task automatic late_cycle(input logic [3:0] nd, input int early);
    fork
      begin #(HALF - early) d = nd; end
      rise();
    join
  endtask

  logic v;

  initial begin
    #10 cd = 1'b0;
    #100;
    chk(err == 2'b00, "common reset: no error");
    chk(errx == 2'b11, "separate reset: false error during reset");
    #1000 cd = 1'b1;
    #(HALF - 1110);
    fall();
    repeat (300) cycle();
    chk(cls == ERR_NONE && clsx == ERR_NONE, "clean run: no verdict");

    // Upset in a primary flip-flop of group 0.
    rise(); #2000;
    v = ~dut.g_grp[0].u_grp.g_bit[1].u_prim.Q;
    force dut.g_grp[0].u_grp.g_bit[1].u_prim.Q = v;
    #5 release dut.g_grp[0].u_grp.g_bit[1].u_prim.Q;
    #100;
    if (err[0] && q == exp_q) seu_prim++;
    chk(err[0] && err_any && q == exp_q, "SEU primary masked and flagged");
    #(HALF - 2105); fall();
    cycle();

    // Upset in an SSE of group 1.
    rise(); #2000;
    v = ~dut.g_grp[1].u_grp.g_bit[0].u_sse.Q;
    force dut.g_grp[1].u_grp.g_bit[0].u_sse.Q = v;
    #5 release dut.g_grp[1].u_grp.g_bit[0].u_sse.Q;
    #100;
    if (!err[1] && q == exp_q) seu_sse++;
    chk(!err[1] && q == exp_q, "SEU SSE without effect");
    #(HALF - 2105); fall();
    cycle();

    // Upset in the parity flip-flop of group 1.
    rise(); #2000;
    v = ~dut.g_grp[1].u_grp.u_parity_ff.Q;
    force dut.g_grp[1].u_grp.u_parity_ff.Q = v;
    #5 release dut.g_grp[1].u_grp.u_parity_ff.Q;
    #100;
    if (err[1] && q == exp_q) seu_par++;
    chk(err[1] && q == exp_q, "SEU parity FF flagged, Q unchanged");
    #(HALF - 2105); fall();
    cycle();

    // Transient on D of group 0 bit 0 straddling the edge (40 ps).
    fork
      begin #(HALF - 10) d[0][0] = ~d[0][0]; #40 d[0][0] = ~d[0][0]; end
      rise();
    join
    exp_q = d;   // the transient is over: the intended data
    #1970;
    if (err[0] && errx[0] && q == exp_q && qx == exp_q) set_d++;
    chk(err[0] && q == exp_q && qx == exp_q, "SET on D masked");
    #(HALF - 2000); fall();

    // The default window has seen three isolated errors so far; let it
    // close and give a radiation verdict.
    repeat (260) cycle();
    chk(rad_win > 0, "radiation verdict after isolated errors");

    // Late data change 20 ps before the edge: pre-error, Q correct.
    late_cycle(d ^ 4'b0001, 20);
    #2000;
    if (err[0] && q == exp_q) pre_err++;
    chk(err[0] && q == exp_q && qx == exp_q, "pre-error flagged, Q correct");
    #(HALF - 2000); fall();

    // 120 ps early: missed with SEL=0, caught with SEL=2 (150 ps).
    late_cycle(d ^ 4'b0100, 120);
    #2000;
    chk(err == 2'b00, "120 ps: outside SEL=0 window");
    #(HALF - 2000); fall();
    sel = 2'd2;
    cycle();
    late_cycle(d ^ 4'b0100, 120);
    #2000;
    if (err[1]) pd_sel++;
    chk(err[1] && q == exp_q, "120 ps: inside SEL=2 window");
    #(HALF - 2000); fall();
    sel = 2'd0;

    // Systematic late changes for many cycles: timing verdict.
    repeat (40) begin
      late_cycle(d ^ 4'b0101, 30);
      #2000;
      chk(q == exp_q && qx == exp_q, "Q correct under systematic pre-errors");
      if (err != 2'b00) pre_err++;
      #(HALF - 2000); fall();
    end
    repeat (260) cycle();
    chk(tim_win > 0, "timing verdict after systematic errors");

    // Clock transient of 30 ps while the clock is low: the filtered variant
    // ignores it, the unfiltered one captures the new data early.
    rise(); #2000; #(HALF - 2000); fall();
    #3000 d = ~d;
    #1000 glitch = 1'b1; #30 glitch = 1'b0;
    #100;
    if (qx == exp_q) clk_glitch++;
    chk(qx == exp_q, "clock glitch filtered");
    #(HALF - 4130);
    rise(); #2000; #(HALF - 2000); fall();

    // Transient on CD1 of the variant: primary FFs cleared, SSEs take over.
    d = 4'b1111;
    rise(); #2000;
    force dut_x.cd1_tree = 1'b0;
    #30 release dut_x.cd1_tree;
    #100;
    if (errx == 2'b11 && qx == exp_q) cd1_set++;
    chk(errx == 2'b11 && qx == exp_q, "CD1 transient masked");
    #(HALF - 2130); fall();
    repeat (20) cycle();

    chk(seu_prim > 0, "mechanism seu_prim");
    chk(seu_sse > 0, "mechanism seu_sse");
    chk(seu_par > 0, "mechanism seu_par");
    chk(set_d > 0, "mechanism set_d");
    chk(pre_err > 0, "mechanism pre_err");
    chk(pd_sel > 0, "mechanism pd_sel");
    chk(rad_win > 0, "mechanism rad_win");
    chk(tim_win > 0, "mechanism tim_win");
    chk(clk_glitch > 0, "mechanism clk_glitch");
    chk(cd1_set > 0, "mechanism cd1_set");
    $display("mechanisms: seu_prim=%0d seu_sse=%0d seu_par=%0d set_d=%0d pre_err=%0d pd_sel=%0d rad_win=%0d tim_win=%0d clk_glitch=%0d cd1_set=%0d",
             seu_prim, seu_sse, seu_par, set_d, pre_err, pd_sel, rad_win, tim_win, clk_glitch, cd1_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
