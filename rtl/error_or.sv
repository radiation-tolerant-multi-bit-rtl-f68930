`timescale 1ps/1ps
// OR logic that merges the ERR outputs of all multi-bit flip-flop groups of a
// design into one error line for the sample-and-count circuit. Purely
// combinational: err_any is high while any group reports an error.
module error_or #(
  parameter int unsigned G = 2
) (
  input  logic [G-1:0] err,
  output logic         err_any
);

  always_comb err_any = |err;

endmodule
