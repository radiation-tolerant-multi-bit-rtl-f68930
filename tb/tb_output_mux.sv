`timescale 1ps/1ps
// Self-checking testbench of output_mux (4 bits): random primary and SSE
// words with both select values; q must be the primary word when err is low
// and the SSE word when it is high.
module tb_output_mux;
  logic [3:0] qp, qs, q;
  logic err;
  int checks = 0, failures = 0;

  output_mux #(.N(4)) dut (.qp(qp), .qs(qs), .err(err), .q(q));

  initial begin
    repeat (200) begin
      qp = 4'($urandom); qs = 4'($urandom); err = 1'($urandom);
      #1;
      checks++;
      if (q != (err ? qs : qp)) begin failures++; $display("FAIL qp=%h qs=%h err=%b q=%h", qp, qs, err, q); end
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
