`timescale 1ps/1ps
// Behavioural model of a library buffer or delay cell: y follows a after
// DELAY_PS picoseconds.
//
// It stands for the single clock-skew buffer that derives the SSE clock from
// the primary clock and for the stages of the programmable delay on the
// input-parity path. The delay is inertial, as in a real gate: a pulse
// shorter than DELAY_PS is swallowed, so long delays that must pass short
// pulses are built as chains of short cells. Synthesis ignores the delay and
// maps the cell to a wire; in a netlist it is replaced by the library cell
// of the wanted delay.
module delay_cell #(
  parameter int unsigned DELAY_PS = 55
) (
  input  logic a,
  output logic y
);

  assign #(DELAY_PS * 1ps) y = a;

endmodule
