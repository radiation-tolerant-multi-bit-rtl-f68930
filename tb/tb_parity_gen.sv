`timescale 1ps/1ps
// Self-checking testbench of parity_gen: an 8-bit even-parity and a 3-bit
// odd-parity generator are driven with every 8-bit word; the expected
// parity is found by counting ones in a loop (even: count is odd; odd: count
// is even).
module tb_parity_gen;
  import mbff_pkg::*;
  logic [7:0] d;
  logic pe, po;
  int checks = 0, failures = 0;

  parity_gen #(.N(8), .PARITY(PARITY_EVEN)) dut_e (.d(d), .p(pe));
  parity_gen #(.N(3), .PARITY(PARITY_ODD))  dut_o (.d(d[2:0]), .p(po));

  initial begin
    for (int w = 0; w < 256; w++) begin
      int ones8, ones3;
      d = 8'(w);
      ones8 = 0; ones3 = 0;
      for (int b = 0; b < 8; b++) if (w[b]) begin ones8++; if (b < 3) ones3++; end
      #1;
      checks++;
      if (pe != 1'(ones8 % 2)) begin failures++; $display("FAIL even w=%0d p=%b", w, pe); end
      checks++;
      if (po != 1'((ones3 + 1) % 2)) begin failures++; $display("FAIL odd w=%0d p=%b", w, po); end
    end
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
