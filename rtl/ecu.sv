`timescale 1ps/1ps
// ECU: error computation unit of a multi-bit flip-flop group.
//
// Compares the input parity stored in the parity flip-flop (pir) with the
// parity recomputed from the primary flip-flop outputs (po) using one XOR.
// err is high whenever they differ: an upset in a primary flip-flop or in
// the parity flip-flop, a transient captured by one of them, or a data
// transition that reached the primary flip-flops but not yet the parity
// flip-flop (timing pre-error). Purely combinational.
module ecu (
  input  logic pir,
  input  logic po,
  output logic err
);

  always_comb err = pir ^ po;

endmodule
