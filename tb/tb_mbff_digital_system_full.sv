`timescale 1ps/1ps
// Full-size closed-loop run of mbff_digital_system at its default
// parameters.
//
// The two groups form the path of a small digital system: group 0 is
// loaded with random data from outside, and the combinational logic between
// the groups (modelled here, an inverter with a variable delay comb_ps)
// feeds group 1. Lowering the supply voltage is emulated by lengthening
// comb_ps. A simple controller steps comb_ps up by 20 ps every window of the
// sample-and-count circuit and backs off by 60 ps whenever the global timing
// error reports a timing verdict, as an adaptive voltage scaling loop would.
// Checks: group 1 always holds the inverted group 0 word of the previous
// cycle (no functional failure at any point of the loop), group 0 always
// holds its input, and the loop both reaches a timing verdict and keeps the
// path below the clock period.
module tb_mbff_digital_system_full;
  import mbff_pkg::*;

  localparam int unsigned PERIOD = 18000;
  localparam int unsigned HALF   = PERIOD / 2;
  localparam int unsigned WINDOW = 256;

  logic cp = 1'b0, cd = 1'b1;
  logic [1:0] sel = '0;
  logic [1:0][1:0] d, q;
  logic [1:0] err;
  logic err_any, terr;
  err_class_e cls;
  logic [8:0] cnt;

  logic [1:0] d0 = '0;
  logic [1:0] d1 = '1;   // inverse of the reset state of group 0
  logic [1:0] exp0 = '0, exp1 = '0;
  int unsigned comb_ps = 17700;
  int unsigned max_comb = 0;
  int checks = 0, failures = 0, verdicts = 0, pre_errors = 0;

  assign d = {d1, d0};

  mbff_digital_system dut (
    .CP(cp), .CD(cd), .SEL(sel), .D(d), .Q(q), .ERR(err), .err_any(err_any),
    .timing_err(terr), .err_class(cls), .err_count(cnt));

  // Combinational path between the groups: inverter with transport delay.
  initial forever begin
    @(q[0]);
    fork
      begin
        automatic logic [1:0] v = ~q[0];
        #(comb_ps) d1 = v;
      end
    join_none
  end

  always #(HALF) cp = ~cp;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s q=%h exp=%b%b comb=%0d", $time, what, q, exp1, exp0, comb_ps);
    end
  endtask

  always @(posedge cp) if (cd) begin
    exp1 <= ~exp0;
    exp0 <= d0;
    if (err[1]) pre_errors++;
  end

  initial begin
    #10 cd = 1'b0;
    #(PERIOD) cd = 1'b1;
    repeat (40) begin
      repeat (WINDOW) begin
        @(posedge cp);
        #3000;
        chk(q[0] == exp0, "group 0 holds its input");
        chk(q[1] == exp1, "group 1 holds the path result");
        d0 = 2'($urandom);
      end
      if (terr) begin
        verdicts++;
        comb_ps -= 60;
      end else begin
        comb_ps += 20;
      end
      if (comb_ps > max_comb) max_comb = comb_ps;
    end
    chk(verdicts > 0, "loop reached a timing verdict");
    chk(max_comb < PERIOD, "loop kept the path inside the clock period");
    $display("closed loop: verdicts=%0d pre_errors=%0d max_comb_ps=%0d final_comb_ps=%0d",
             verdicts, pre_errors, max_comb, comb_ps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(PERIOD) * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
