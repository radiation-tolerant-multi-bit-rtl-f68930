`timescale 1ps/1ps
// Behavioural model (not synthesizable logic): guard-gate glitch filter for
// the clock input of the primary flip-flops.
//
// The clock cp and a copy delayed by DELAY_PS drive a guard gate, a
// C-element: its output takes the value of the inputs when they agree and
// holds otherwise. A real clock edge therefore reaches cp_f DELAY_PS late,
// while a transient pulse on cp shorter than DELAY_PS never makes both
// inputs agree on the new value and is removed. The guard gate is a
// transistor-level keeper circuit; this model gives its function so the
// filter can be simulated in place. Synthesis maps the gate to a latch
// enabled when both inputs agree.
module guard_gate_filter #(
  parameter int unsigned DELAY_PS = 60
) (
  input  logic cp,
  output logic cp_f
);

  logic cp_d;

  delay_cell #(.DELAY_PS(DELAY_PS)) u_delay (.a(cp), .y(cp_d));

  // The guard gate keeps its state while its inputs disagree: this is the
  // latch that synthesis reports, and it is intended.
  always_latch begin
    if (cp == cp_d) cp_f = cp;
  end

endmodule
