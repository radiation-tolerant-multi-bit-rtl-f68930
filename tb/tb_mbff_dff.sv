`timescale 1ps/1ps
// Self-checking testbench of mbff_dff: a clear-type and a set-type
// flip-flop get random data on a 1 ns clock; each output is compared with a
// reference copy of the data taken at the rising edge. The asynchronous
// reset is pulsed in the middle of a cycle and must act at once, before any
// clock edge, and hold while low.
module tb_mbff_dff;
  logic cp = 1'b0, cdn = 1'b1, d = 1'b0;
  logic q0, q1;
  logic ref_q = 1'b0;
  int checks = 0, failures = 0;

  mbff_dff #(.RESET_VAL(1'b0)) dut0 (.CP(cp), .CDN(cdn), .D(d), .Q(q0));
  mbff_dff #(.RESET_VAL(1'b1)) dut1 (.CP(cp), .CDN(cdn), .D(d), .Q(q1));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s q0=%b q1=%b ref=%b", $time, what, q0, q1, ref_q); end
  endtask

  initial begin
    #10 cdn = 1'b0;
    #10 chk(q0 == 1'b0 && q1 == 1'b1, "reset values");
    cp = 1'b1; d = 1'b1; #10 cp = 1'b0;
    chk(q0 == 1'b0 && q1 == 1'b1, "reset holds against clock");
    cdn = 1'b1;
    repeat (200) begin
      #200 d = 1'($urandom);
      #300 cp = 1'b1; ref_q = d;
      #100 chk(q0 == ref_q && q1 == ref_q, "capture");
      d = ~d;
      #50 chk(q0 == ref_q && q1 == ref_q, "hold after edge");
      #350 cp = 1'b0;
    end
    #100 cdn = 1'b0;
    #1 chk(q0 == 1'b0 && q1 == 1'b1, "async reset mid-cycle");
    #100 cdn = 1'b1;
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
