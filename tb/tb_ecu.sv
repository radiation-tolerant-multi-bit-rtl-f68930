`timescale 1ps/1ps
// Self-checking testbench of ecu: all four input combinations; err must be
// high exactly when the stored and recomputed parities differ.
module tb_ecu;
  logic pir, po, err;
  int checks = 0, failures = 0;

  ecu dut (.pir(pir), .po(po), .err(err));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {pir, po} = 2'(i);
      #1;
      checks++;
      if (err != (pir != po)) begin failures++; $display("FAIL pir=%b po=%b err=%b", pir, po, err); end
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
