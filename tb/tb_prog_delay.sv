`timescale 1ps/1ps
// Self-checking testbench of prog_delay (SEL_W=2, 50 ps per tap): for every
// SEL the output must follow an input edge after SEL*50 ps (at once for
// SEL=0), and a 30 ps pulse must travel through unchanged in width.
module tb_prog_delay;
  logic a = 1'b0;
  logic [1:0] sel = '0;
  logic y;
  int checks = 0, failures = 0;

  prog_delay dut (.a(a), .sel(sel), .y(y));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: sel=%0d %s y=%b", $time, sel, what, y); end
  endtask

  initial begin
    #1000;
    for (int s = 0; s < 4; s++) begin
      int unsigned dly;
      sel = 2'(s);
      dly = s * 50;
      #1000;
      repeat (4) begin
        a = ~a;
        if (dly == 0) begin
          #1 chk(y == a, "no delay at SEL=0");
        end else begin
          #(dly - 2) chk(y != a, "edge not yet arrived");
          #4 chk(y == a, "edge arrived");
        end
        #500;
      end
      // 30 ps pulse: present at the output from dly to dly+30
      if (dly == 0) begin
        a = ~a;
        #10 chk(y == a, "short pulse present at output");
        #20 a = ~a;
        #1 chk(y == a, "short pulse over");
      end else begin
        a = ~a; #30 a = ~a;
        #(dly - 20) chk(y != a, "short pulse present at output");
        #30 chk(y == a, "short pulse over");
      end
      #500;
    end
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
