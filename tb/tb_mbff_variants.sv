`timescale 1ps/1ps
// Characterisation of 2-, 4- and 8-bit even-parity groups, the three widths
// whose standalone figures are compared for the flip-flop system.
//
// Part 1 sweeps how long before the CP1 edge a single D bit changes, from
// 198 ps down to 3 ps in 5 ps steps, with SEL = 0 and again with SEL = 1.
// A change is expected to be flagged as a pre-error exactly when it comes
// less than ceil(log2 N)*40 ps + SEL*50 ps before the edge, so the window
// widens with the group. Q must be right in every trial.
// Part 2 sweeps the width of a transient on D that starts 5 ps before the
// edge, from 12 ps to 102 ps: while it ends before the SSE clock (55 ps
// skew) the output must stay correct; a longer one is captured by both
// copies and reaches Q. The measured window and widest filtered transient
// of each width are printed.
module tb_mbff_variants;
  import mbff_pkg::*;

  localparam int unsigned HALF = 5000;
  localparam int unsigned SKEW = 55;
  localparam int          NV   = 3;
  localparam int          WID [NV] = '{2, 4, 8};

  logic       cp1 = 1'b0, cp2 = 1'b0, cd = 1'b1;
  logic [0:0] sel = '0;
  logic [7:0] d = '0, exp_d = '0;
  logic [7:0] q   [NV];
  logic       err [NV];

  int checks = 0, failures = 0;
  int window [NV];
  int filt   [NV];

  always @(cp1) cp2 <= #(SKEW) cp1;

  for (genvar k = 0; k < NV; k++) begin : g_v
    localparam int unsigned N = WID[k];
    logic [N-1:0] qn;
    mbff_group #(.N(N), .PARITY(PARITY_EVEN), .SEL_W(1)) dut (
      .D(d[N-1:0]), .CP1(cp1), .CP2(cp2), .CD1(cd), .CD2(cd), .SEL(sel),
      .Q(qn), .ERR(err[k]));
    assign q[k] = 8'(qn);
  end

  function automatic int levels(int n);
    return $clog2(n);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [7:0] mask(int k);
    return 8'((1 << WID[k]) - 1);
  endfunction

  // A full clock period in which nothing changes near the edge.
  task automatic quiet_cycle();
    #(HALF) cp1 = 1'b1; exp_d = d;
    #(HALF) cp1 = 1'b0;
  endtask

  initial begin
    #10 cd = 1'b0;
    #100 cd = 1'b1;
    #(HALF - 110) cp1 = 1'b0;
    quiet_cycle();

    // Part 1: detection window.
    for (int s = 0; s < 2; s++) begin
      sel = 1'(s);
      for (int k = 0; k < NV; k++) window[k] = 0;
      for (int t = 198; t > 0; t -= 5) begin
        quiet_cycle();
        fork
          begin #(HALF - t) d[0] = ~d[0]; end
          begin #(HALF) cp1 = 1'b1; exp_d = d; end
        join
        #1000;
        for (int k = 0; k < NV; k++) begin
          automatic int exp_win = levels(WID[k]) * 40 + s * 50;
          chk(err[k] == (t < exp_win), $sformatf("N=%0d SEL=%0d change %0d ps early: ERR", WID[k], s, t));
          chk(q[k] == (exp_d & mask(k)), $sformatf("N=%0d change %0d ps early: Q", WID[k], t));
          if (err[k] && t > window[k]) window[k] = t;
        end
        #(HALF - 1000) cp1 = 1'b0;
      end
      for (int k = 0; k < NV; k++)
        $display("N=%0d SEL=%0d: latest flagged change %0d ps before the edge (window %0d ps)",
                 WID[k], s, window[k], levels(WID[k]) * 40 + s * 50);
    end
    sel = '0;

    // Part 2: transient on D straddling the edge.
    for (int k = 0; k < NV; k++) filt[k] = 0;
    for (int w = 12; w <= 102; w += 10) begin
      quiet_cycle();
      fork
        begin #(HALF - 5) d[0] = ~d[0]; #(w) d[0] = ~d[0]; end
        begin #(HALF) cp1 = 1'b1; end
      join
      exp_d = d;
      #1000;
      for (int k = 0; k < NV; k++) begin
        automatic bit ok = (q[k] == (exp_d & mask(k)));
        // the pulse ends at w-5 ps after CP1; the SSE samples at SKEW
        if (w - 5 < int'(SKEW)) chk(ok, $sformatf("N=%0d %0d ps transient filtered", WID[k], w));
        else                    chk(!ok, $sformatf("N=%0d %0d ps transient captured", WID[k], w));
        if (ok && w > filt[k]) filt[k] = w;
      end
      #(HALF - 1000) cp1 = 1'b0;
    end
    for (int k = 0; k < NV; k++)
      $display("N=%0d: widest filtered transient %0d ps", WID[k], filt[k]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(2 * HALF * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
