`timescale 1ps/1ps
// Sample-and-count circuit that turns the merged error line of all
// multi-bit flip-flop groups into a global timing error signal.
//
// err_in is sampled on every rising clock edge and the sampled error cycles
// are counted over a window of WINDOW clock cycles. At the end of a window
// the count is classified: more than THRESH error cycles means a systematic
// fault, i.e. the design runs too close to its timing limit (timing_err,
// class ERR_TIMING); one to THRESH error cycles means sporadic events such
// as radiation strikes (class ERR_RADIATION); none gives ERR_NONE. The
// verdict and the window's count are held for the whole next window, so a
// closed-loop voltage or frequency controller can read them at leisure.
//
// Timing: an error present before clock edge k is sampled at k and counted
// at k+1; the verdict of a window appears on the edge that ends it.
// rst_n is asynchronous and active low. The threshold of two follows the
// published rule; the window length and the classification of a count of
// exactly two as radiation are this design's choices.
module sample_count
  import mbff_pkg::*;
#(
  parameter int unsigned WINDOW = 256,
  parameter int unsigned THRESH = 2,
  localparam int unsigned CW    = $clog2(WINDOW + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          err_in,
  output logic          timing_err,
  output err_class_e    err_class,
  output logic [CW-1:0] err_count
);

  if (WINDOW <= THRESH) begin : g_bad_window
    $error("sample_count: WINDOW must be longer than THRESH");
  end

  logic          err_s;
  logic [CW-1:0] cyc;
  logic [CW-1:0] cnt;
  logic [CW-1:0] cnt_next;
  logic          last;

  always_comb begin
    cnt_next = cnt + CW'(err_s);
    last     = (cyc == CW'(WINDOW - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_s     <= 1'b0;
      cyc       <= '0;
      cnt       <= '0;
      err_class <= ERR_NONE;
      err_count <= '0;
    end else begin
      err_s <= err_in;
      if (last) begin
        cyc       <= '0;
        cnt       <= '0;
        err_count <= cnt_next;
        if (cnt_next > CW'(THRESH))   err_class <= ERR_TIMING;
        else if (cnt_next != '0)      err_class <= ERR_RADIATION;
        else                          err_class <= ERR_NONE;
      end else begin
        cyc <= cyc + 1'b1;
        cnt <= cnt_next;
      end
    end
  end

  always_comb timing_err = (err_class == ERR_TIMING);

endmodule
