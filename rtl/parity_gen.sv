`timescale 1ps/1ps
// PGEN: n-bit parity generator.
//
// Even parity is the XOR of all bits, odd parity its complement (XNOR), as
// in the 2-bit circuits of the multi-bit flip-flop system. One copy computes
// the parity of the D inputs before the clock edge (input parity), another
// the parity of the primary flip-flop outputs after it (output parity).
// Purely combinational.
module parity_gen
  import mbff_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter parity_e     PARITY = PARITY_EVEN
) (
  input  logic [N-1:0] d,
  output logic         p
);

  always_comb p = (^d) ^ zero_parity(PARITY);

endmodule
