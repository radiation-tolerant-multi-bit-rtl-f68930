`timescale 1ps/1ps
// Self-checking testbench of sample_count with a 16-cycle window and the
// threshold of two. Windows with 0, 1, 2, 3 and 10 error cycles are
// replayed; after each window the class and count must be NONE, RADIATION,
// RADIATION, TIMING and TIMING, and the verdict must appear exactly on the
// edge that closes the window (checked against a cycle counter).
module tb_sample_count;
  import mbff_pkg::*;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b1, err_in = 1'b0;
  logic timing_err;
  err_class_e err_class;
  logic [4:0] err_count;
  int checks = 0, failures = 0;

  sample_count #(.WINDOW(W), .THRESH(2)) dut (
    .clk(clk), .rst_n(rst_n), .err_in(err_in),
    .timing_err(timing_err), .err_class(err_class), .err_count(err_count));

  always #500 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s class=%0d count=%0d", $time, what, err_class, err_count); end
  endtask

  int         prev_count = 0;
  err_class_e prev_class = ERR_NONE;
  bit         prev_t     = 1'b0;

  // One window of W cycles with err_in high during the first n of them.
  // The task starts just after the edge before a window-closing edge, so
  // its first edge closes the previous window: the verdict of the previous
  // window is checked there and must then hold for the rest of the window.
  task automatic window(input int n, input err_class_e exp_c, input bit exp_t);
    for (int c = 0; c < W; c++) begin
      err_in = (c < n);
      @(posedge clk); #1;
      chk(err_count == 5'(prev_count), "count");
      chk(err_class == prev_class, "class");
      chk(timing_err == prev_t, "timing_err");
    end
    prev_count = n;
    prev_class = exp_c;
    prev_t     = exp_t;
  endtask

  initial begin
    #10 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    chk(err_class == ERR_NONE && err_count == 0, "reset");
    // The first window closes on the W-th edge after reset; stop one
    // edge before it.
    repeat (W - 1) @(posedge clk);
    #1;
    window(0, ERR_NONE, 1'b0);
    window(1, ERR_RADIATION, 1'b0);
    window(2, ERR_RADIATION, 1'b0);
    window(3, ERR_TIMING, 1'b1);
    window(10, ERR_TIMING, 1'b1);
    window(0, ERR_NONE, 1'b0);
    window(0, ERR_NONE, 1'b0);
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
