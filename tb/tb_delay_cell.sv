`timescale 1ps/1ps
// Self-checking testbench of delay_cell (55 ps default): each edge of a must
// reach y after exactly 55 ps, a 100 ps pulse must pass and a 20 ps pulse,
// shorter than the delay, must be swallowed.
module tb_delay_cell;
  logic a = 1'b0;
  logic y;
  int checks = 0, failures = 0;

  delay_cell dut (.a(a), .y(y));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s y=%b", $time, what, y); end
  endtask

  initial begin
    #1000;
    chk(y == 1'b0, "initial");
    repeat (10) begin
      a = ~a;
      #54 chk(y != a, "not yet at 54 ps");
      #2  chk(y == a, "arrived at 56 ps");
      #200;
    end
    a = ~a; #100 a = ~a;
    #10 chk(y != a, "100 ps pulse passes");
    #100 chk(y == a, "100 ps pulse ends");
    a = ~a; #20 a = ~a;
    repeat (10) begin #10 chk(y == a, "20 ps pulse swallowed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
