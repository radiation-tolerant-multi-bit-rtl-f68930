`timescale 1ps/1ps
// Storage flip-flop of the multi-bit flip-flop system.
//
// A plain positive-edge D flip-flop with an asynchronous active-low reset,
// the standard-cell DFF the system is built from. It is used for the primary
// flip-flops, for the secondary storage elements (SSE) and for the
// input-parity flip-flop. RESET_VAL = 0 gives the clear (CD) type and
// RESET_VAL = 1 the set (SD) type; the parity flip-flop needs the set type in
// some configurations. Q follows D on each rising edge of CP; CDN low forces
// Q to RESET_VAL at once and holds it there.
module mbff_dff #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic CP,
  input  logic CDN,
  input  logic D,
  output logic Q
);

  always_ff @(posedge CP or negedge CDN) begin
    if (!CDN) Q <= RESET_VAL;
    else      Q <= D;
  end

endmodule
