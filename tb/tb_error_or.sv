`timescale 1ps/1ps
// Self-checking testbench of error_or (5 groups): every combination of group
// errors; err_any must be high unless all are low.
module tb_error_or;
  logic [4:0] err;
  logic err_any;
  int checks = 0, failures = 0;

  error_or #(.G(5)) dut (.err(err), .err_any(err_any));

  initial begin
    for (int i = 0; i < 32; i++) begin
      err = 5'(i);
      #1;
      checks++;
      if (err_any != (i != 0)) begin failures++; $display("FAIL err=%b any=%b", err, err_any); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
