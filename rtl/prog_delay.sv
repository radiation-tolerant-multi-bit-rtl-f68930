`timescale 1ps/1ps
// PD: programmable delay on the input-parity path.
//
// The input parity runs down a delay line with 2**SEL_W taps, CELL_PS
// apart; SEL picks the tap, so the added delay is SEL*CELL_PS and SEL = 0
// adds none (the detection window is then the parity generator's own gate
// delay). The longer the delay, the earlier before the clock edge a data
// transition is flagged as a timing pre-error.
// Each tap is a chain of delay cells of STAGE_PS each, so any pulse wider
// than one stage travels through, as in a real buffer chain; CELL_PS should
// be a multiple of STAGE_PS. The tap multiplexer is ordinary logic and the
// cells are behavioural models of library delay cells (wires after
// synthesis). SEL is static, set once for the system.
module prog_delay #(
  parameter int unsigned SEL_W    = 2,
  parameter int unsigned CELL_PS  = 50,
  parameter int unsigned STAGE_PS = 10
) (
  input  logic             a,
  input  logic [SEL_W-1:0] sel,
  output logic             y
);

  localparam int unsigned TAPS   = 2 ** SEL_W;
  localparam int unsigned STAGES = (CELL_PS + STAGE_PS - 1) / STAGE_PS;

  logic [(TAPS-1)*STAGES:0] line;
  logic [TAPS-1:0]      tap;

  if (SEL_W < 1) begin : g_bad_sel
    $error("prog_delay: SEL_W must be at least 1");
  end
  if (CELL_PS % STAGE_PS != 0) begin : g_bad_cell
    $error("prog_delay: CELL_PS must be a multiple of STAGE_PS");
  end

  assign line[0] = a;

  for (genvar i = 0; i < (TAPS - 1) * STAGES; i++) begin : g_chain
    delay_cell #(.DELAY_PS(STAGE_PS)) u_cell (.a(line[i]), .y(line[i+1]));
  end

  for (genvar t = 0; t < TAPS; t++) begin : g_tap
    assign tap[t] = line[t * STAGES];
  end

  always_comb y = tap[sel];

endmodule
