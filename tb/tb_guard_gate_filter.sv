`timescale 1ps/1ps
// Self-checking testbench of guard_gate_filter (60 ps): a 2 ns clock must
// reach cp_f 60 ps late with every edge, while 20 ps and 40 ps transients
// on the clock, high or low, must not show at the output.
module tb_guard_gate_filter;
  logic cp = 1'b0;
  logic cp_f;
  int checks = 0, failures = 0;
  int edges_f = 0;

  guard_gate_filter dut (.cp(cp), .cp_f(cp_f));

  always @(posedge cp_f) edges_f++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s cp=%b cp_f=%b", $time, what, cp, cp_f); end
  endtask

  initial begin
    #500;
    chk(cp_f == 1'b0, "initial low");
    repeat (10) begin
      cp = 1'b1;
      #58 chk(cp_f == 1'b0, "rise not yet through");
      #4  chk(cp_f == 1'b1, "rise through at 60 ps");
      #938 cp = 1'b0;
      #58 chk(cp_f == 1'b1, "fall not yet through");
      #4  chk(cp_f == 1'b0, "fall through at 60 ps");
      #438;
      // positive glitch while the clock is low
      cp = 1'b1; #20 cp = 1'b0;
      repeat (10) begin #10 chk(cp_f == 1'b0, "20 ps high glitch filtered"); end
      cp = 1'b1; #40 cp = 1'b0;
      repeat (10) begin #10 chk(cp_f == 1'b0, "40 ps high glitch filtered"); end
      #300;
    end
    chk(edges_f == 10, "one filtered edge per clock edge");
    // negative glitch while high
    cp = 1'b1; #500;
    cp = 1'b0; #30 cp = 1'b1;
    repeat (10) begin #10 chk(cp_f == 1'b1, "30 ps low glitch filtered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
