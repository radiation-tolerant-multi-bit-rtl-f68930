`timescale 1ps/1ps
// Output selection unit of a multi-bit flip-flop group.
//
// One 2:1 multiplexer per bit: with err low the primary flip-flop outputs qp
// drive q, with err high the secondary storage element outputs qs do. Since
// an error means the primary word (or the parity flip-flop) disagrees with
// the stored parity, the SSE copy, sampled on the skewed clock, is used
// instead. Purely combinational.
module output_mux #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] qp,
  input  logic [N-1:0] qs,
  input  logic         err,
  output logic [N-1:0] q
);

  always_comb q = err ? qs : qp;

endmodule
