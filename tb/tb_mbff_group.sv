`timescale 1ps/1ps
// Self-checking testbench of mbff_group.
//
// Four groups run side by side: 2-bit even-parity groups with common reset
// (dut_e) and with separate reset trees (dut_s), a 2-bit odd-parity group
// with separate reset trees (dut_os) and a 3-bit odd-parity group with
// common reset (dut_o). The testbench makes its own clocks:
// CP1 with a 10 ns period and CP2 lagging it by 55 ps. Expected outputs come
// from a reference register that holds the intended (glitch-free) data. The
// scenarios are: normal operation with random data, upsets forced into a
// primary flip-flop, an SSE and the parity flip-flop, transients on D caught
// by the parity flip-flop, by a primary flip-flop and by an SSE, late data
// transitions inside and outside the pre-error window for two SEL settings,
// a simultaneous two-bit late change (not detectable), a transient on CD1,
// a transient in the error logic,
// two upsets accumulating in one group while the clock is stopped and the
// refresh edge that clears them, and the reset behaviour of each
// configuration.
module tb_mbff_group;
  import mbff_pkg::*;

  localparam int unsigned HALF = 5000;
  localparam int unsigned SKEW = 55;
  localparam int unsigned CELL = 50;   // SEL step; XOR level is 40 ps

  logic       cp1 = 1'b0;
  logic       cp2 = 1'b0;
  logic       cd1 = 1'b1;
  logic       cd2 = 1'b1;
  logic [1:0] sel = '0;
  logic [1:0] d   = '0;
  logic [2:0] d3  = '0;

  logic [1:0] q_e, q_s, q_os;
  logic [2:0] q_o;
  logic       err_e, err_s, err_o, err_os;

  logic [1:0] exp_q  = '0;
  logic [2:0] exp_q3 = '0;

  int checks   = 0;
  int failures = 0;

  always @(cp1) cp2 <= #(SKEW) cp1;

  mbff_group #(.N(2), .PARITY(PARITY_EVEN), .SEPARATE_RESET(1'b0), .SEL_W(2), .PD_CELL_PS(CELL))
    dut_e (.D(d), .CP1(cp1), .CP2(cp2), .CD1(cd1), .CD2(cd2), .SEL(sel), .Q(q_e), .ERR(err_e));
  mbff_group #(.N(2), .PARITY(PARITY_EVEN), .SEPARATE_RESET(1'b1), .SEL_W(2), .PD_CELL_PS(CELL))
    dut_s (.D(d), .CP1(cp1), .CP2(cp2), .CD1(cd1), .CD2(cd2), .SEL(sel), .Q(q_s), .ERR(err_s));
  mbff_group #(.N(2), .PARITY(PARITY_ODD), .SEPARATE_RESET(1'b1), .SEL_W(2), .PD_CELL_PS(CELL))
    dut_os (.D(d), .CP1(cp1), .CP2(cp2), .CD1(cd1), .CD2(cd2), .SEL(sel), .Q(q_os), .ERR(err_os));
  mbff_group #(.N(3), .PARITY(PARITY_ODD), .SEPARATE_RESET(1'b0), .SEL_W(2), .PD_CELL_PS(CELL))
    dut_o (.D(d3), .CP1(cp1), .CP2(cp2), .CD1(cd1), .CD2(cd2), .SEL(sel), .Q(q_o), .ERR(err_o));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (q_e=%b q_s=%b q_o=%b err=%b%b%b exp=%b/%b)",
               $time, what, q_e, q_s, q_o, err_e, err_s, err_o, exp_q, exp_q3);
    end
  endtask

  // Rising edge at the end of the first half period; falling edge after.
  task automatic rise();
    #(HALF) cp1 = 1'b1;
    exp_q  = d;
    exp_q3 = d3;
  endtask
  task automatic fall();
    #(HALF) cp1 = 1'b0;
  endtask

  // Check all three groups after the outputs have settled (1 ns after edge).
  task automatic settle_check(input bit e_err, input string what);
    #1000;
    chk(q_e == exp_q,  {what, ": dut_e Q"});
    chk(q_s == exp_q,  {what, ": dut_s Q"});
    chk(q_o == exp_q3, {what, ": dut_o Q"});
    chk(err_e == e_err, {what, ": dut_e ERR"});
    chk(err_s == e_err, {what, ": dut_s ERR"});
  endtask

  // One normal cycle with new random data applied mid-cycle.
  task automatic normal_cycle();
    rise();
    settle_check(1'b0, "normal");
    chk(err_o == 1'b0, "normal: dut_o ERR");
    chk(err_os == 1'b0 && q_os == exp_q, "normal: dut_os");
    #1000;
    d  = 2'($urandom);
    d3 = 3'($urandom);
    #(HALF - 2000);
    fall();
  endtask

  logic v;

  initial begin
    // Reset: common-reset groups show no error, the separate-reset group
    // flags the (false) error the set-type parity flip-flop creates.
    #10 cd1 = 1'b0; cd2 = 1'b0;
    #90;
    chk(err_e == 1'b0 && err_o == 1'b0, "reset: common reset no ERR");
    chk(err_s == 1'b1, "reset: separate reset ERR high");
    chk(err_os == 1'b1 && dut_os.pir == 1'b0, "reset: odd separate reset, parity FF 0, ERR high");
    chk(dut_s.pir == 1'b1 && dut_e.pir == 1'b0 && dut_o.pir == 1'b1, "reset: parity FF reset values");
    chk(q_e == 2'b00 && q_s == 2'b00 && q_o == 3'b000, "reset: Q cleared");
    #1000 cd1 = 1'b1; cd2 = 1'b1;
    d = 2'b01; d3 = 3'b011;
    #(HALF - 1100);
    fall();

    repeat (40) normal_cycle();

    // Upset in primary flip-flop 0 (error condition 1).
    d = 2'b10; d3 = 3'b001;
    rise();
    settle_check(1'b0, "pre-SEU");
    v = ~dut_e.g_bit[0].u_prim.Q;
    force dut_e.g_bit[0].u_prim.Q = v;
    #10 release dut_e.g_bit[0].u_prim.Q;
    v = ~dut_o.g_bit[2].u_prim.Q;
    force dut_o.g_bit[2].u_prim.Q = v;
    #10 release dut_o.g_bit[2].u_prim.Q;
    #100;
    chk(err_e == 1'b1 && q_e == exp_q, "SEU primary bit0: ERR and masked Q");
    chk(err_o == 1'b1 && q_o == exp_q3, "SEU primary odd: ERR and masked Q");
    #(HALF - 1120);
    fall();
    normal_cycle();   // next edge rewrites the flip-flops

    // Upset in primary flip-flop 1 (error condition 2).
    rise();
    #1000;
    v = ~dut_e.g_bit[1].u_prim.Q;
    force dut_e.g_bit[1].u_prim.Q = v;
    #10 release dut_e.g_bit[1].u_prim.Q;
    #100;
    chk(err_e == 1'b1 && q_e == exp_q, "SEU primary bit1: ERR and masked Q");
    #(HALF - 1110);
    fall();
    normal_cycle();

    // Upset in the parity flip-flop (error condition 3).
    rise();
    #1000;
    v = ~dut_e.u_parity_ff.Q;
    force dut_e.u_parity_ff.Q = v;
    #10 release dut_e.u_parity_ff.Q;
    #100;
    chk(err_e == 1'b1 && q_e == exp_q, "SEU parity FF: ERR, Q unchanged");
    #(HALF - 1110);
    fall();
    normal_cycle();

    // Upsets in the SSEs (conditions 4 and 5): no error, Q from primary.
    rise();
    #1000;
    v = ~dut_e.g_bit[0].u_sse.Q;
    force dut_e.g_bit[0].u_sse.Q = v;
    #10 release dut_e.g_bit[0].u_sse.Q;
    v = ~dut_e.g_bit[1].u_sse.Q;
    force dut_e.g_bit[1].u_sse.Q = v;
    #10 release dut_e.g_bit[1].u_sse.Q;
    #100;
    chk(err_e == 1'b0 && q_e == exp_q, "SEU SSE: no ERR, Q from primary");
    #(HALF - 1120);
    fall();
    normal_cycle();

    // SET on D1 caught by the parity flip-flop only (condition 6):
    // pulse ends 20 ps before the edge, the parity (40 ps later) shows it.
    d = 2'b00;
    fork
      begin #(HALF - 60) d[0] = 1'b1; #40 d[0] = 1'b0; end
      rise();
    join
    settle_check(1'b1, "SET caught by parity FF");

    #(HALF - 1000);
    fall();
    // SET on D1 caught by the primary flip-flop (condition 7): 30 ps pulse
    // around the CP1 edge, gone before CP2.
    fork
      begin #(HALF - 10) d[0] = 1'b1; #30 d[0] = 1'b0; end
      rise();
    join
    exp_q = 2'b00;
    settle_check(1'b1, "SET caught by primary FF");
    chk(dut_e.qp[0] == 1'b1, "SET condition 7 reached the primary FF");

    #(HALF - 1000);
    fall();
    // SET on D1 caught by the SSE only (condition 8).
    fork
      begin #(HALF + 40) d[0] = 1'b1; #30 d[0] = 1'b0; end
      rise();
    join
    settle_check(1'b0, "SET caught by SSE");
    chk(dut_e.qs[0] == 1'b1, "SET condition 8 reached the SSE");
    #(HALF - 1000);
    fall();
    normal_cycle();

    // Timing pre-error: D1 changes 20 ps before the edge, inside the
    // 40 ps window of a 2-bit group with SEL=0. Q must still be the new (correct) value.
    d = 2'b00;
    rise(); #(HALF) ; fall();
    fork
      begin #(HALF - 20) d[0] = 1'b1; end
      rise();
    join
    settle_check(1'b1, "late D1 (SEL=0)");
    #(HALF - 1000); fall();
    // D2 late (conditions 3 and 4 of the pre-error figure).
    fork
      begin #(HALF - 20) d[1] = 1'b1; end
      rise();
    join
    settle_check(1'b1, "late D2 (SEL=0)");
    #(HALF - 1000); fall();
    // 150 ps early: outside the SEL=0 window, no error.
    fork
      begin #(HALF - 150) d = 2'b10; end
      rise();
    join
    settle_check(1'b0, "early D (SEL=0)");
    #(HALF - 1000); fall();
    // Same 150 ps with SEL=3 (40 + 150 ps window): flagged.
    sel = 2'd3;
    rise(); #(HALF); fall();
    fork
      begin #(HALF - 150) d = 2'b11; end
      rise();
    join
    settle_check(1'b1, "late D (SEL=3)");
    #(HALF - 1000); fall();
    fork
      begin #(HALF - 250) d = 2'b01; end
      rise();
    join
    settle_check(1'b0, "early D (SEL=3)");
    #(HALF - 1000); fall();
    sel = 2'd0;
    // Both bits change late: parity unchanged, not detectable.
    d = 2'b01;
    rise(); #(HALF); fall();
    fork
      begin #(HALF - 20) d = 2'b10; end
      rise();
    join
    settle_check(1'b0, "two bits late (undetectable)");
    #(HALF - 1000); fall();
    normal_cycle();

    // SET on CD1 (separate reset): primary flip-flops cleared, the set-type
    // parity flip-flop forces ERR and the SSEs drive Q.
    d = 2'b11; d3 = 3'b111;
    rise();
    #1000;
    cd1 = 1'b0; #30 cd1 = 1'b1;
    #100;
    chk(err_s == 1'b1 && q_s == exp_q, "SET on CD1: separate reset masks it");
    chk(err_os == 1'b1 && q_os == exp_q, "SET on CD1: odd separate reset masks it");
    chk(q_e != exp_q, "SET on CD1: common reset group is corrupted");
    #(HALF - 1130); fall();
    // SET on CD2: no effect on Q.
    rise();
    #1000;
    cd2 = 1'b0; #30 cd2 = 1'b1;
    #100;
    chk(err_s == 1'b0 && q_s == exp_q, "SET on CD2: no effect");
    #(HALF - 1130); fall();

    // Transient in the output parity / error logic: ERR pulses, but both
    // copies hold the same word, so Q does not move.
    d = 2'b10; d3 = 3'b010;
    rise();
    #1000;
    v = ~dut_e.po;
    force dut_e.po = v;
    #15 chk(err_e == 1'b1 && q_e == exp_q, "SET on ERR path: ERR pulses, Q steady");
    #15 release dut_e.po;
    #10 chk(err_e == 1'b0 && q_e == exp_q, "SET on ERR path: over");
    #(HALF - 1040);
    fall();

    // Accumulated upsets while the clock is stopped (clock gating): the
    // first upset is masked and flagged, a second one on the SSE copy of the
    // same bit is not; one refresh edge rewrites both copies.
    d = 2'b01; d3 = 3'b000;
    rise();
    #1000;
    v = ~dut_e.g_bit[0].u_prim.Q;
    force dut_e.g_bit[0].u_prim.Q = v;
    #10 release dut_e.g_bit[0].u_prim.Q;
    #100;
    chk(err_e == 1'b1 && q_e == exp_q, "MEU: first upset masked and flagged");
    v = ~dut_e.g_bit[0].u_sse.Q;
    force dut_e.g_bit[0].u_sse.Q = v;
    #10 release dut_e.g_bit[0].u_sse.Q;
    #100;
    chk(err_e == 1'b1 && q_e != exp_q, "MEU: second upset in the same group reaches Q");
    #(HALF - 1220);
    fall();
    rise();   // refresh cycle with the same data
    #1000;
    chk(err_e == 1'b0 && q_e == exp_q, "MEU: refresh edge restores the group");
    #(HALF - 1000);
    fall();

    repeat (20) normal_cycle();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
